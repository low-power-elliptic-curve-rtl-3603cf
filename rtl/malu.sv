// malu: modular arithmetic unit of the EC processor, GF(2^163).
//
// Computes a*b (MUL), a*b + c (MAC) or a + b (ADD) in GF(2^163) with
// f(x) = x^163 + x^7 + x^6 + x^3 + 1. Multiplication is digit-serial with a digit of
// D = 4 bits, most significant digit first: each cycle the accumulator is multiplied by
// x^4 and reduced, and a times the next digit of b is added. The digit size is the
// design's; MSD-first order, the MAC option and the one-cycle ADD are this design's choices.
//
// Interface: pulse start for one cycle with op and operands valid. b is captured at
// start; a and c are read while busy and must stay stable until done (the register file
// is not written while the MALU works). done pulses for one cycle with result valid; the
// result stays in result until the next start.
// Timing: MUL/MAC take one capture edge and NDIGITS = 41 digit cycles: done is high in
// the 42nd cycle after the cycle in which start is high. ADD: done in the next cycle.
module malu
  import ecc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  malu_op_e op,
  input  fe_t      a,
  input  fe_t      b,
  input  fe_t      c,
  output logic     busy,
  output logic     done,
  output fe_t      result
);

  localparam int unsigned BW = NDIGITS * D;   // 164, b padded with a zero bit

  logic [BW-1:0]  bsh;       // b, shifted left one digit per cycle
  fe_t            acc;
  logic [5:0]     cnt;
  logic           mac;

  // v * x^k mod f for k <= 4: the bits shifted past x^162 are folded back through FRED
  function automatic fe_t mulxk(fe_t v, int unsigned k);
    logic [M+3:0] s;
    logic [3:0]   hi;
    fe_t          r;
    s  = {4'b0, v} << k;
    hi = s[M+3:M];
    r  = s[M-1:0];
    for (int unsigned j = 0; j < 4; j++)
      if (hi[j]) r ^= fe_t'(FRED) << j;   // x^(163+j) = x^j * FRED
    return r;
  endfunction

  fe_t a_x1, a_x2, a_x3, partial, acc_next;
  logic [D-1:0] digit;

  always_comb begin
    a_x1    = mulxk(a, 1);
    a_x2    = mulxk(a, 2);
    a_x3    = mulxk(a, 3);
    digit   = bsh[BW-1 -: D];
    partial = (digit[0] ? a    : '0) ^ (digit[1] ? a_x1 : '0) ^
              (digit[2] ? a_x2 : '0) ^ (digit[3] ? a_x3 : '0);
    acc_next = mulxk(acc, D) ^ partial;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      acc    <= '0;
      bsh    <= '0;
      mac    <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        if (op == MALU_ADD) begin
          result <= a ^ b;
          done   <= 1'b1;
        end else begin
          busy <= 1'b1;
          acc  <= '0;
          bsh  <= {{(BW - M){1'b0}}, b};
          cnt  <= 6'(NDIGITS - 1);
          mac  <= (op == MALU_MAC);
        end
      end else if (busy) begin
        acc <= acc_next;
        bsh <= bsh << D;
        cnt <= cnt - 6'd1;
        if (cnt == '0) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= acc_next ^ (mac ? c : '0);
        end
      end
    end
  end

endmodule
