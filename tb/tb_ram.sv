// tb_ram: self-checking test of the data RAM.
//
// Writes random bytes to random addresses, keeps a shadow copy, and reads back through the
// synchronous port: data one edge after en, unchanged by writes (write does not update
// rdata), and held while en is low.
module tb_ram;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] shadow [1024];
  logic       known [1024];
  int checks = 0, failures = 0;

  ram #(.DEPTH(1024)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [7:0] last;
    for (int i = 0; i < 1024; i++) known[i] = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      int a;
      a = $urandom_range(0, 1023);
      @(negedge clk);
      if ($urandom_range(0, 1) == 0) begin
        en = 1; we = 1; addr = 10'(a); wdata = 8'($urandom());
        shadow[a] = wdata; known[a] = 1'b1;
        last = rdata;
        @(negedge clk);
        en = 0; we = 0;
        chk(rdata == last, "write leaves rdata alone");
      end else if (known[a]) begin
        en = 1; we = 0; addr = 10'(a);
        @(negedge clk);
        en = 0;
        chk(rdata == shadow[a], $sformatf("read %0d", a));
        @(negedge clk);
        chk(rdata == shadow[a], "rdata held while en is low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
