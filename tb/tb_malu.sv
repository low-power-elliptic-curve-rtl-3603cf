// tb_malu: self-checking test of the GF(2^163) MALU.
//
// Drives random operands through MUL, MAC and ADD, plus the corner operands zero, one and
// x^162, and compares each result with the bit-serial reference multiplier. Checks the
// latency: done rises 42 cycles after the cycle in which start is raised for a
// multiplication (41 digit cycles after the capture edge), 1 cycle for an addition.
module tb_malu;
  import ecc_pkg::*;
  import ecc_ref_pkg::fmul;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  malu_op_e op;
  ecc_pkg::fe_t a, b, c, result;
  int checks = 0, failures = 0;

  malu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ecc_pkg::fe_t rnd();
    ecc_pkg::fe_t v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = (i == 5) ? ($urandom() & 32'h7) : $urandom();
    return v;
  endfunction

  task automatic run(malu_op_e o, ecc_pkg::fe_t x, ecc_pkg::fe_t y, ecc_pkg::fe_t z);
    ecc_pkg::fe_t exp;
    int cyc;
    @(negedge clk);
    op = o; a = x; b = y; c = z; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    b = ~y;                                  // b is captured at start
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    case (o)
      MALU_MUL: exp = fmul(x, y);
      MALU_MAC: exp = fmul(x, y) ^ z;
      default:  exp = x ^ y;
    endcase
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h exp %h", o, x, y, result, exp);
    end
    checks++;
    if (cyc != ((o == MALU_ADD) ? 1 : 42)) begin
      failures++;
      $display("FAIL latency op=%0d %0d cycles", o, cyc);
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0; op = MALU_MUL;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(MALU_MUL, 163'd1, 163'd1, '0);
    run(MALU_MUL, 163'd1 << 162, 163'd1 << 162, '0);  // x^324 mod f
    run(MALU_MUL, '0, rnd(), '0);
    run(MALU_MUL, {163{1'b1}}, {163{1'b1}}, '0);
    for (int i = 0; i < 40; i++) run(MALU_MUL, rnd(), rnd(), '0);
    for (int i = 0; i < 20; i++) run(MALU_MAC, rnd(), rnd(), rnd());
    for (int i = 0; i < 10; i++) run(MALU_ADD, rnd(), rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
