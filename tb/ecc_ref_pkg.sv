// ecc_ref_pkg: reference arithmetic for the testbenches, written independently of the RTL.
//
// GF(2^163) multiplication is bit-serial (shift-and-add, reduction one bit at a time),
// inversion uses plain square-and-multiply on the exponent 2^163 - 2, and the point
// multiplication reference is the classic Lopez-Dahab ladder with a separate Z per point
// and the curve constant b (not its square root), so it shares no formulas with the
// common-Z hardware. Integer arithmetic mod n uses wide SystemVerilog operators.
package ecc_ref_pkg;

  typedef logic [162:0] fe_t;
  localparam logic [163:0] F_POLY = {1'b1, 155'b0, 8'b1100_1001};  // x^163+x^7+x^6+x^3+1
  localparam fe_t B_CURVE = 163'h20A601907B8C953CA1481EB10512F78744A3205FD;
  localparam fe_t GX      = 163'h3F0EBA16286A2D57EA0991168D4994637E8343E36;
  localparam logic [167:0] N_ORDER = 168'h40000000000000000000292FE77E70C12A4234C33;

  function automatic fe_t fmul(fe_t a, fe_t b);
    logic [163:0] aa;
    fe_t r;
    r  = '0;
    aa = {1'b0, a};
    for (int i = 0; i < 163; i++) begin
      if (b[i]) r ^= aa[162:0];
      aa = aa << 1;
      if (aa[163]) aa ^= F_POLY;
    end
    return r;
  endfunction

  function automatic fe_t fsq(fe_t a);
    return fmul(a, a);
  endfunction

  function automatic fe_t finv(fe_t a);
    fe_t r;
    r = 163'd1;
    // a^(2^163-2): bits 162..1 of the exponent are one, bit 0 is zero
    for (int i = 162; i >= 0; i--) begin
      r = fsq(r);
      if (i != 0) r = fmul(r, a);
    end
    return r;
  endfunction

  // x(kP) for k > 0 (k up to 168 bits), classic Lopez-Dahab ladder
  function automatic fe_t point_mul_x(logic [167:0] k, fe_t x);
    fe_t x1, z1, x2, z2, ta, tb, t;
    int top;
    top = -1;
    for (int i = 0; i < 168; i++) if (k[i]) top = i;
    if (top < 0) return '0;
    x1 = x; z1 = 163'd1;
    x2 = fsq(fsq(x)) ^ B_CURVE; z2 = fsq(x);
    for (int i = top - 1; i >= 0; i--) begin
      if (k[i]) begin
        ta = fmul(x1, z2); tb = fmul(x2, z1);
        z1 = fsq(ta ^ tb); x1 = fmul(x, z1) ^ fmul(ta, tb);
        t  = fsq(z2);
        z2 = fmul(fsq(x2), t); x2 = fsq(fsq(x2)) ^ fmul(B_CURVE, fsq(t));
      end else begin
        ta = fmul(x2, z1); tb = fmul(x1, z2);
        z2 = fsq(ta ^ tb); x2 = fmul(x, z2) ^ fmul(ta, tb);
        t  = fsq(z1);
        z1 = fmul(fsq(x1), t); x1 = fsq(fsq(x1)) ^ fmul(B_CURVE, fsq(t));
      end
    end
    return fmul(x1, finv(z1));
  endfunction

  function automatic logic [167:0] mod_add(logic [167:0] a, logic [167:0] b);
    logic [335:0] s;
    s = 336'(a) + 336'(b);
    return 168'(s % 336'(N_ORDER));
  endfunction

  function automatic logic [167:0] mod_mul(logic [167:0] a, logic [167:0] b);
    logic [335:0] p;
    p = 336'(a) * 336'(b);
    return 168'(p % 336'(N_ORDER));
  endfunction

endpackage
