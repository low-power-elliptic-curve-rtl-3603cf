// ram: data RAM of the RFID processor, 1024 x 8 bits, synchronous read and write.
//
// Holds the 21-byte data blocks of the protocol (RAM[0] result of the microcontroller's
// arithmetic, RAM[2] result of the EC processor, RAM[4] scalar, two scratch blocks).
// The 10-bit address and 8-bit data follow the design's bus widths; the size is this
// design's choice. Contents are not reset: software writes a block before reading it.
// Timing: with en and we the byte is written at the clock edge; with en and !we, rdata
// holds the byte at addr one clock edge later.
module ram #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end

endmodule
