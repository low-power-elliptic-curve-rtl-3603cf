// ecp: elliptic-curve processor, x-only scalar point multiplication on B-163.
//
// Structure as in the design: a two-level controller (ecp_control2 for the point
// multiplication, ecp_control1 for point addition and doubling), a register file of six
// 163-bit registers and a 163-bit modular ALU with a 4-bit digit-serial multiplier.
// The processor is a master on the 8-bit system bus: it reads the x coordinate of the
// base point from the block point_ref and the scalar from SCALAR_REF (RAM[4]), and
// writes x(kP) to RESULT_REF (RAM[2]). The y coordinate is never needed.
// The design draws the 8-bit register-file path through the lower controller; here it
// runs from the upper controller straight to the register file, which is the same
// connection without a pass-through.
// Interface: pulse start with point_ref; busy stays high until done pulses.
// Timing: 8,198 + 520 (t - 1) clock cycles for a t-bit scalar, 92,438 for t = 163
// (see ecp_control2); more if the microcontroller holds the bus.
module ecp
  import ecc_pkg::*;
#(
  parameter blkref_t SCALAR_REF = REF_RAM4,
  parameter blkref_t RESULT_REF = REF_RAM2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  blkref_t  point_ref,
  output logic     busy,
  output logic     done,
  output bus_req_t bus_req,
  input  bus_rsp_t bus_rsp
);

  logic       c1_start, c1_step, c1_kbit, c1_busy, c1_done;
  uop_t       c1_uop;
  raddr_t     ra, rb, rc, rf_wa, byte_reg;
  logic       rf_we, byte_we;
  logic [4:0] byte_idx;
  logic [7:0] byte_wd, byte_rd;
  fe_t        qa, qb, qc, mres;
  logic       malu_start, malu_busy, malu_done;
  malu_op_e   malu_op;

  ecp_control2 #(.SCALAR_REF(SCALAR_REF), .RESULT_REF(RESULT_REF)) u_ctrl2 (
    .clk, .rst_n, .start, .point_ref, .busy, .done, .bus_req, .bus_rsp,
    .c1_start, .c1_step, .c1_kbit, .c1_uop, .c1_done,
    .byte_reg, .byte_idx, .byte_we, .byte_wd, .byte_rd
  );

  ecp_control1 u_ctrl1 (
    .clk, .rst_n,
    .cmd_start(c1_start), .cmd_step(c1_step), .cmd_kbit(c1_kbit), .cmd_uop(c1_uop),
    .busy(c1_busy), .done(c1_done),
    .ra, .rb, .rc, .rf_we, .rf_wa,
    .malu_start, .malu_op, .malu_done
  );

  ecp_regfile u_rf (
    .clk, .rst_n, .ra, .rb, .rc, .qa, .qb, .qc,
    .we(rf_we), .wa(rf_wa), .wd(mres),
    .byte_reg, .byte_idx, .byte_we, .byte_wd, .byte_rd
  );

  malu u_malu (
    .clk, .rst_n, .start(malu_start), .op(malu_op), .a(qa), .b(qb), .c(qc),
    .busy(malu_busy), .done(malu_done), .result(mres)
  );

endmodule
