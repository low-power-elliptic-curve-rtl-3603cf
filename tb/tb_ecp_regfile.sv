// tb_ecp_regfile: self-checking test of the six-register file of the EC processor.
//
// Writes random values through the MALU write port and through the byte port, reads them
// back on all three read ports and the byte port, and checks the read-only constants at
// addresses 6 (c = sqrt(b), checked by squaring it against b) and 7 (zero), the dropping
// of bits above 162 on byte writes, and that a write to a constant address changes nothing.
module tb_ecp_regfile;
  import ecc_pkg::*;
  import ecc_ref_pkg::fsq;
  import ecc_ref_pkg::B_CURVE;

  logic clk = 1'b0, rst_n = 1'b0;
  raddr_t ra, rb, rc, wa, byte_reg;
  ecc_pkg::fe_t qa, qb, qc, wd;
  logic we, byte_we;
  logic [4:0] byte_idx;
  logic [7:0] byte_wd, byte_rd;
  int checks = 0, failures = 0;
  ecc_pkg::fe_t model [6];

  ecp_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic check_all();
    logic [167:0] w;
    for (int r = 0; r < 8; r++) begin
      ra = raddr_t'(r); rb = raddr_t'((r + 1) % 8); rc = raddr_t'((r + 2) % 8);
      #1;
      if (r < 6) chk(qa == model[r], $sformatf("qa r%0d", r));
      else if (r == 6) chk(fsq(qa) == B_CURVE, "c^2 == b");
      else chk(qa == '0, "zero constant");
      if ((r + 1) % 8 < 6) chk(qb == model[(r + 1) % 8], "qb");
      if ((r + 2) % 8 < 6) chk(qc == model[(r + 2) % 8], "qc");
      if (r < 6) begin
        byte_reg = raddr_t'(r);
        w = {5'b0, model[r]};
        for (int j = 0; j < 21; j++) begin
          byte_idx = 5'(j);
          #1;
          chk(byte_rd == w[8*j +: 8], $sformatf("byte_rd r%0d j%0d", r, j));
        end
      end
    end
  endtask

  initial begin
    we = 0; byte_we = 0; wa = '0; wd = '0; byte_reg = '0; byte_idx = '0; byte_wd = '0;
    ra = '0; rb = '0; rc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 6; r++) model[r] = '0;
    check_all();
    // full-width writes
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      we = 1; wa = raddr_t'(r); wd = rnd();
      if (r < 6) model[r] = wd;
      @(negedge clk);
      we = 0;
    end
    check_all();
    // byte writes
    for (int k = 0; k < 60; k++) begin
      logic [167:0] w;
      int r, j;
      r = $urandom_range(0, 5); j = $urandom_range(0, 20);
      @(negedge clk);
      byte_we = 1; byte_reg = raddr_t'(r); byte_idx = 5'(j); byte_wd = 8'($urandom());
      w = {5'b0, model[r]};
      w[8*j +: 8] = byte_wd;
      model[r] = w[162:0];
      @(negedge clk);
      byte_we = 0;
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
