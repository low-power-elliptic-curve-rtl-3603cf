// ecc_rfid_top: public-key crypto processor for an RFID tag, with its ROM and RAM.
//
// The microcontroller runs an authentication protocol (Schnorr identification or
// EC-RAC) from ROM; it moves 21-byte blocks between RAM, ROM, the random number generator
// and the RFID front end, does the protocol's modular arithmetic itself and hands scalar
// point multiplications to the EC processor. Both are masters on one 8-bit bus behind the
// bus manager. The random number generator and the analog front end lie outside this
// logic: their byte streams are ports (valid/ready handshakes).
// The default ROM image (rom_image.hex, read from rtl/) holds the base point of B-163,
// a test secret key, the x coordinate of a test server public key, the group order n,
// and three programs: Schnorr at pc 0, EC-RAC at pc 16, and a short Block_Comp /
// Cond_Jump program at pc 40 (this design's own, to exercise those two instructions).
// Interface: pulse start with start_pc; busy until done pulses at End_of_code.
// Timing: a point multiplication with a t-bit scalar keeps ecp_busy high for
// 8,198 + 520 (t - 1) cycles (92,438 for t = 163). With a randomly stalling front end the
// Schnorr program takes about 157,000 cycles in all and EC-RAC about 339,000.
// The microcontroller's flag output (result of Block_Comp) is for observation only and
// is not used at this level.
module ecc_rfid_top
  import ecc_pkg::*;
#(
  parameter string ROM_FILE = "rtl/rom_image.hex"
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] start_pc,
  output logic       busy,
  output logic       done,
  output logic       ecp_busy,
  // random number generator
  input  logic [7:0] rng_data,
  input  logic       rng_valid,
  output logic       rng_ready,
  // RFID front end
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ready,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready
);

  bus_req_t   ecp_req, mcu_req;
  bus_rsp_t   ecp_rsp, mcu_rsp;
  logic       ecp_start, ecp_done, flag;
  blkref_t    ecp_point_ref;
  logic       rom_en, ram_en, ram_we;
  logic [9:0] rom_addr, ram_addr;
  logic [7:0] rom_rdata, ram_rdata, ram_wdata;

  mcu u_mcu (
    .clk, .rst_n, .start, .start_pc, .busy, .done, .flag,
    .bus_req(mcu_req), .bus_rsp(mcu_rsp),
    .ecp_start, .ecp_point_ref, .ecp_done
  );

  ecp u_ecp (
    .clk, .rst_n, .start(ecp_start), .point_ref(ecp_point_ref),
    .busy(ecp_busy), .done(ecp_done), .bus_req(ecp_req), .bus_rsp(ecp_rsp)
  );

  bus_manager u_bus (
    .clk, .rst_n, .ecp_req, .ecp_rsp, .mcu_req, .mcu_rsp,
    .rom_en, .rom_addr, .rom_rdata,
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .rng_data, .rng_valid, .rng_ready,
    .rx_data, .rx_valid, .rx_ready, .tx_data, .tx_valid, .tx_ready
  );

  rom #(.DEPTH(1024), .INIT_FILE(ROM_FILE)) u_rom (
    .clk, .en(rom_en), .addr(rom_addr), .rdata(rom_rdata)
  );

  ram #(.DEPTH(1024)) u_ram (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

endmodule
