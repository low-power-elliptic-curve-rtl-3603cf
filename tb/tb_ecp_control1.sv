// tb_ecp_control1: self-checking test of the ladder-step controller with its datapath.
//
// Instantiates ecp_control1 with the MALU and the register file, loads x, X1, X2 and Z
// through the byte port, and runs ladder steps for key bits 1 and 0. The expected values
// come from the textbook addition and doubling in the reference package: for k = 1,
// X1' = (x (X1+X2)^2 + X1 X2) (X2 Z)^2, X2' = (X2^4 + b Z^4) (X1+X2)^2,
// Z' = (X1+X2)^2 (X2 Z)^2, with X1 and X2 swapped for k = 0; b is used, not sqrt(b).
// Also runs single micro-ops and checks the step latency (519 cycles from cmd_start to
// done: 12 multiplications of 43 cycles, one addition of 2, one idle cycle).
module tb_ecp_control1;
  import ecc_pkg::*;
  import ecc_ref_pkg::fmul;
  import ecc_ref_pkg::fsq;
  import ecc_ref_pkg::B_CURVE;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_start = 0, cmd_step = 0, cmd_kbit = 0, busy, done;
  uop_t cmd_uop;
  raddr_t ra, rb, rc, rf_wa, byte_reg;
  logic rf_we, malu_start, malu_done, malu_busy, byte_we;
  malu_op_e malu_op;
  ecc_pkg::fe_t qa, qb, qc, mres;
  logic [4:0] byte_idx;
  logic [7:0] byte_wd, byte_rd;
  int checks = 0, failures = 0;

  ecp_control1 dut (.clk, .rst_n, .cmd_start, .cmd_step, .cmd_kbit, .cmd_uop, .busy, .done,
                    .ra, .rb, .rc, .rf_we, .rf_wa, .malu_start, .malu_op, .malu_done);
  ecp_regfile u_rf (.clk, .rst_n, .ra, .rb, .rc, .qa, .qb, .qc, .we(rf_we), .wa(rf_wa),
                    .wd(mres), .byte_reg, .byte_idx, .byte_we, .byte_wd, .byte_rd);
  malu u_malu (.clk, .rst_n, .start(malu_start), .op(malu_op), .a(qa), .b(qb), .c(qc),
               .busy(malu_busy), .done(malu_done), .result(mres));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ecc_pkg::fe_t rnd();
    ecc_pkg::fe_t v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom();
    return v;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load(raddr_t r, ecc_pkg::fe_t v);
    logic [167:0] w;
    w = {5'b0, v};
    for (int j = 0; j < 21; j++) begin
      @(negedge clk);
      byte_we = 1; byte_reg = r; byte_idx = 5'(j); byte_wd = w[8*j +: 8];
    end
    @(negedge clk);
    byte_we = 0;
  endtask

  function automatic ecc_pkg::fe_t peek(raddr_t r);
    return u_rf.regs[r];
  endfunction

  task automatic go(logic step, logic k, uop_t u, output int cyc);
    @(negedge clk);
    cmd_start = 1; cmd_step = step; cmd_kbit = k; cmd_uop = u;
    @(negedge clk);
    cmd_start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    ecc_pkg::fe_t x, x1, x2, z, s2, d, e, m, ex1, ex2, ez;
    int cyc;
    byte_we = 0; byte_reg = '0; byte_idx = '0; byte_wd = '0; cmd_uop = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      logic k;
      k = t[0];
      x = rnd(); x1 = rnd(); x2 = rnd(); z = rnd();
      load(R_X, x); load(R_X1, x1); load(R_X2, x2); load(R_Z, z);
      if (k) begin
        s2 = fsq(x1 ^ x2); d = fsq(fmul(x2, z)); m = fmul(x1, x2);
        e  = fsq(fsq(x2)) ^ fmul(B_CURVE, fsq(fsq(z)));
        ex1 = fmul(fmul(x, s2) ^ m, d); ex2 = fmul(e, s2); ez = fmul(s2, d);
      end else begin
        s2 = fsq(x1 ^ x2); d = fsq(fmul(x1, z)); m = fmul(x1, x2);
        e  = fsq(fsq(x1)) ^ fmul(B_CURVE, fsq(fsq(z)));
        ex2 = fmul(fmul(x, s2) ^ m, d); ex1 = fmul(e, s2); ez = fmul(s2, d);
      end
      go(1'b1, k, '0, cyc);
      chk(peek(R_X1) == ex1, $sformatf("X1' k=%0d", k));
      chk(peek(R_X2) == ex2, $sformatf("X2' k=%0d", k));
      chk(peek(R_Z)  == ez,  $sformatf("Z' k=%0d", k));
      chk(peek(R_X)  == x,   "x preserved");
      chk(cyc == 519, $sformatf("step latency %0d", cyc));
    end
    // single micro-ops
    x = rnd(); x1 = rnd();
    load(R_T1, x); load(R_T2, x1);
    go(1'b0, 1'b0, '{MALU_MUL, R_X2, R_T1, R_T2, R_0}, cyc);
    chk(peek(R_X2) == fmul(x, x1), "single MUL (no swap)");
    chk(cyc == 44, $sformatf("single MUL latency %0d", cyc));
    go(1'b0, 1'b0, '{MALU_ADD, R_X1, R_T1, R_C, R_0}, cyc);
    chk(fsq(peek(R_X1) ^ x) == B_CURVE, "single ADD with constant c");
    go(1'b0, 1'b0, '{MALU_MAC, R_Z, R_T1, R_T1, R_T2}, cyc);
    chk(peek(R_Z) == (fsq(x) ^ x1), "single MAC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
