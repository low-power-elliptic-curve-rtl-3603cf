// tb_rom: self-checking test of the program/parameter ROM with the default image.
//
// Reads the image rtl/rom_image.hex through the synchronous port and checks the parameter
// blocks against the reference constants (block 0: x of the B-163 base point, block 3:
// the group order n), the first Schnorr instructions (Block_Mov RAM[4], RNG and
// Activate_ECP ROM[0]), that data appears one edge after en and holds while en is low,
// and that bytes past the image read as zero.
module tb_rom;
  import ecc_ref_pkg::GX;
  import ecc_ref_pkg::N_ORDER;

  logic clk = 1'b0, en = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] rdata;
  int checks = 0, failures = 0;

  rom #(.DEPTH(1024), .INIT_FILE("rtl/rom_image.hex")) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int a, output logic [7:0] d);
    @(negedge clk);
    en = 1; addr = 10'(a);
    @(negedge clk);
    en = 0;
    d = rdata;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [7:0] d;
    logic [167:0] gx, n;
    gx = {5'b0, GX};
    n  = N_ORDER;
    for (int j = 0; j < 21; j++) begin
      rd(j, d);      chk(d == gx[8*j +: 8], $sformatf("Gx byte %0d", j));
      rd(63 + j, d); chk(d == n[8*j +: 8],  $sformatf("n byte %0d", j));
    end
    rd(512, d); chk(d == 8'h01, "opcode Block_Mov");
    rd(513, d); chk(d == 8'h24, "operand RAM[4]");
    rd(514, d); chk(d == 8'h40, "operand RNG");
    rd(515, d); chk(d == 8'h06, "opcode Activate_ECP");
    repeat (3) @(negedge clk);
    chk(rdata == 8'h06, "output holds while en is low");
    rd(1023, d); chk(d == 8'h00, "unused byte reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
