// rom: program and parameter ROM, 1024 x 8 bits, synchronous read.
//
// Holds the microcontroller's program and the system parameters (base point, secret
// key, public key of the server, group order). Its contents come from a hex file named by
// INIT_FILE (one byte per line, $readmemh format); with an empty name it reads as zero.
// The 10-bit address and 8-bit data follow the design's bus widths; the size and the
// synchronous read are this design's choices.
// Timing: rdata holds the byte at addr one clock edge after en.
module rom #(
  parameter int unsigned DEPTH     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [7:0]               rdata
);

  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk)
    if (en) rdata <= mem[addr];

endmodule
