// ecp_regfile: the six 163-bit registers of the EC processor.
//
// Six registers (x, X1, X2, Z and two temporaries) as in the design. Three combinational
// read ports feed the MALU operands a, b and c; one write port takes the MALU result.
// Addresses 6 and 7 are read-only and return the curve constant c = sqrt(b) and zero;
// making the curve constant a hard-wired operand instead of a seventh register is this
// design's choice. A byte port lets the controller load a register from the 8-bit
// memory bus and read it back: byte j covers bits 8j+7..8j (bits above 162 are dropped
// on write and read as zero).
// Timing: writes take effect at the clock edge; reads are combinational. A MALU write
// and a byte write in the same cycle to the same register: the MALU write wins.
module ecp_regfile
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // MALU side
  input  raddr_t     ra, rb, rc,
  output fe_t        qa, qb, qc,
  input  logic       we,
  input  raddr_t     wa,
  input  fe_t        wd,
  // byte port
  input  raddr_t     byte_reg,
  input  logic [4:0] byte_idx,
  input  logic       byte_we,
  input  logic [7:0] byte_wd,
  output logic [7:0] byte_rd
);

  localparam int unsigned NREG = 6;
  localparam int unsigned PADW = 256;   // covers every 5-bit byte index

  fe_t regs [NREG];

  function automatic fe_t rd(fe_t r [NREG], raddr_t ad);
    case (ad)
      R_C:     return CURVE_C;
      R_0:     return '0;
      default: return r[ad];
    endcase
  endfunction

  always_comb begin
    logic [PADW-1:0] wide;
    qa = rd(regs, ra);
    qb = rd(regs, rb);
    qc = rd(regs, rc);
    wide = {{(PADW - M){1'b0}}, rd(regs, byte_reg)};
    byte_rd = wide[8*byte_idx +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      if (byte_we && byte_reg < raddr_t'(NREG)) begin
        logic [PADW-1:0] w;
        w = {{(PADW - M){1'b0}}, regs[byte_reg]};
        w[8*byte_idx +: 8] = byte_wd;
        regs[byte_reg] <= w[M-1:0];
      end
      if (we && wa < raddr_t'(NREG)) regs[wa] <= wd;
    end
  end

endmodule
