// ecc_pkg: shared constants and types of the RFID elliptic-curve processor.
//
// Field: GF(2^163) with the NIST reduction polynomial f(x) = x^163 + x^7 + x^6 + x^3 + 1.
// Curve: the NIST B-163 curve y^2 + xy = x^3 + x^2 + b. The field size and the 21-byte
// data blocks follow the design; the choice of polynomial and curve is this design's own
// (the standard curve of that size). The curve enters the hardware only through the
// constant c = sqrt(b), used by the common-Z doubling formula, and through the group
// order n, which the protocol ROM holds for the microcontroller's modular arithmetic.
//
// Memory map of the 13-bit system bus: addr[12:10] selects the device (ROM, RAM, RNG,
// front end), addr[9:0] is the byte address inside ROM or RAM. A "block reference" byte
// names a 21-byte block: ref[7:5] device, ref[4:0] block index; block i starts at byte
// 21*i and stores its value little-endian (byte 0 holds bits 7..0).
package ecc_pkg;

  // ---------------- field and curve ----------------
  localparam int unsigned M = 163;                 // field degree
  localparam int unsigned D = 4;                   // digit size of the multiplier
  localparam int unsigned NDIGITS = (M + D - 1) / D;  // 41 cycles per multiplication
  // low part of the reduction polynomial: f(x) = x^163 + FRED
  localparam logic [10:0] FRED = 11'b000_1100_1001;  // x^7 + x^6 + x^3 + 1
  // c = sqrt(b) of B-163, so that b*Z^4 = (c*Z^2)^2
  localparam logic [M-1:0] CURVE_C = 163'h2c25b85badf8927593d21c366da89c03969f34da5;

  typedef logic [M-1:0] fe_t;                      // field element

  // ---------------- blocks and bus ----------------
  localparam int unsigned BLOCK_BYTES = 21;        // 21 * 8 = 168 >= 163
  localparam int unsigned ADDR_W = 13;

  typedef enum logic [2:0] {
    DEV_ROM = 3'd0,
    DEV_RAM = 3'd1,
    DEV_RNG = 3'd2,
    DEV_FE  = 3'd3     // read: receiver, write: transmitter
  } dev_e;

  typedef logic [7:0] blkref_t;                    // {dev[2:0], index[4:0]}

  // block references used by the programs
  localparam blkref_t REF_ROM0 = {DEV_ROM, 5'd0};
  localparam blkref_t REF_RAM0 = {DEV_RAM, 5'd0};
  localparam blkref_t REF_RAM2 = {DEV_RAM, 5'd2};
  localparam blkref_t REF_RAM4 = {DEV_RAM, 5'd4};
  localparam blkref_t REF_RNG  = {DEV_RNG, 5'd0};
  localparam blkref_t REF_FE   = {DEV_FE,  5'd0};

  // bus request from a master and response to it; req is held until ack
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [7:0]        wdata;
  } bus_req_t;

  typedef struct packed {
    logic       ack;
    logic [7:0] rdata;
  } bus_rsp_t;

  // byte address of byte j of a referenced block
  function automatic logic [ADDR_W-1:0] blk_addr(blkref_t br, int unsigned j);
    logic [9:0] off;
    off = 10'(br[4:0] * BLOCK_BYTES + j);
    return {br[7:5], off};
  endfunction

  // ---------------- MALU ----------------
  typedef enum logic [1:0] {
    MALU_MUL = 2'd0,   // r = a*b
    MALU_MAC = 2'd1,   // r = a*b + c
    MALU_ADD = 2'd2    // r = a + b   (one cycle)
  } malu_op_e;

  // register file addresses: 0..5 are the six registers, 6 reads CURVE_C, 7 reads zero
  typedef logic [2:0] raddr_t;
  localparam raddr_t R_X  = 3'd0;   // affine x of the base point
  localparam raddr_t R_X1 = 3'd1;   // X1 (common Z)
  localparam raddr_t R_X2 = 3'd2;   // X2 (common Z)
  localparam raddr_t R_Z  = 3'd3;   // common Z
  localparam raddr_t R_T1 = 3'd4;   // temporary
  localparam raddr_t R_T2 = 3'd5;   // temporary
  localparam raddr_t R_C  = 3'd6;   // constant c = sqrt(b)
  localparam raddr_t R_0  = 3'd7;   // constant zero

  typedef struct packed {
    malu_op_e op;
    raddr_t   dst;
    raddr_t   a;
    raddr_t   b;
    raddr_t   c;
  } uop_t;

  // ---------------- microcontroller ----------------
  typedef enum logic [2:0] {
    OP_END      = 3'd0,  // End_of_code
    OP_MOV      = 3'd1,  // Block_Mov (A, B): A <- B
    OP_ADD      = 3'd2,  // Block_Add (A, B): RAM[0] <- A + B mod n
    OP_MUL      = 3'd3,  // Block_Mul (A, B): RAM[0] <- A * B mod n
    OP_COMP     = 3'd4,  // Block_Comp (A, B): flag <- (A == B)
    OP_JUMP     = 3'd5,  // Cond_Jump (T): pc <- T if flag
    OP_ECP      = 3'd6,  // Activate_ECP (A)
    OP_WAIT_ECP = 3'd7   // Wait_for_ECP
  } mcu_op_e;

  localparam logic [9:0] PROG_BASE = 10'h200;  // ROM byte address of instruction 0

endpackage
