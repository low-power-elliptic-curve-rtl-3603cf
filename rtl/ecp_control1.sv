// ecp_control1: lower-level controller of the EC processor (point add and double).
//
// Runs one step of the Montgomery ladder in common-Z projective coordinates, where both
// ladder points P1 = (X1/Z) and P2 = (X2/Z) share one Z. For key bit k = 1 the step
// computes P1 <- P1 + P2 and P2 <- 2 P2 and brings both results back onto one Z:
//     S2 = (X1 + X2)^2,   D = (X2 Z)^2,   E = (X2^2 + c Z^2)^2
//     X1' = (x S2 + X1 X2) D,   X2' = E S2,   Z' = S2 D
// (the addition result is scaled by 1/Z^2, which is allowed in projective coordinates).
// For k = 0 the roles of X1 and X2 swap, which is done by swapping register addresses
// 1 and 2 in every micro-op. The formulas follow the design's common-Z equations; the
// order of the 13 micro-ops (12 multiplications or squarings, one addition) and the
// register allocation are this design's own, chosen to fit the six registers.
//
// It also runs a single MALU micro-op on request (used by the upper controller for
// initialisation and inversion) and passes the upper controller's byte port through to
// the register file.
// Interface: pulse cmd_start with cmd_step (1 = ladder step with cmd_kbit, 0 = the single
// micro-op cmd_uop); busy is high until done pulses.
// Timing: each micro-op is an issue cycle (malu_start) followed by the MALU's run, 42
// cycles for a multiplication and 1 for the addition. A ladder step takes 519 cycles
// from cmd_start to done, a single multiplication 44.
module ecp_control1
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // command from the upper controller
  input  logic       cmd_start,
  input  logic       cmd_step,
  input  logic       cmd_kbit,
  input  uop_t       cmd_uop,
  output logic       busy,
  output logic       done,
  // register file
  output raddr_t     ra, rb, rc,
  output logic       rf_we,
  output raddr_t     rf_wa,
  // MALU
  output logic       malu_start,
  output malu_op_e   malu_op,
  input  logic       malu_done
);

  localparam int unsigned NSTEP = 13;

  // ladder step for k = 1: {op, dst, a, b, c}
  function automatic uop_t step_uop(logic [3:0] i);
    case (i)
      4'd0:  return '{MALU_MUL, R_T1, R_X2, R_Z,  R_0 };  // T1 = X2*Z
      4'd1:  return '{MALU_MUL, R_T1, R_T1, R_T1, R_0 };  // T1 = D = (X2 Z)^2
      4'd2:  return '{MALU_MUL, R_T2, R_X1, R_X2, R_0 };  // T2 = X1*X2
      4'd3:  return '{MALU_ADD, R_X1, R_X1, R_X2, R_0 };  // X1 = X1 + X2
      4'd4:  return '{MALU_MUL, R_X1, R_X1, R_X1, R_0 };  // X1 = S2
      4'd5:  return '{MALU_MUL, R_Z,  R_Z,  R_Z,  R_0 };  // Z  = Z^2
      4'd6:  return '{MALU_MUL, R_X2, R_X2, R_X2, R_0 };  // X2 = X2^2
      4'd7:  return '{MALU_MAC, R_X2, R_C,  R_Z,  R_X2};  // X2 = c Z^2 + X2^2
      4'd8:  return '{MALU_MUL, R_X2, R_X2, R_X2, R_0 };  // X2 = E
      4'd9:  return '{MALU_MUL, R_X2, R_X2, R_X1, R_0 };  // X2' = E*S2
      4'd10: return '{MALU_MAC, R_T2, R_X,  R_X1, R_T2};  // T2 = x S2 + X1 X2
      4'd11: return '{MALU_MUL, R_Z,  R_X1, R_T1, R_0 };  // Z'  = S2*D
      default: return '{MALU_MUL, R_X1, R_T2, R_T1, R_0 };  // X1' = (x S2 + X1 X2)*D
    endcase
  endfunction

  function automatic raddr_t swp(raddr_t r, logic k);
    if (!k && r == R_X1) return R_X2;
    if (!k && r == R_X2) return R_X1;
    return r;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e     state;
  logic       stepping, kbit;
  logic [3:0] idx;
  uop_t       single, cur;

  always_comb begin
    uop_t u;
    u = stepping ? step_uop(idx) : single;
    cur = '{u.op, swp(u.dst, kbit | !stepping), swp(u.a, kbit | !stepping),
            swp(u.b, kbit | !stepping), swp(u.c, kbit | !stepping)};
  end

  assign ra         = cur.a;
  assign rb         = cur.b;
  assign rc         = cur.c;
  assign malu_op    = cur.op;
  assign malu_start = (state == S_ISSUE);
  assign rf_we      = (state == S_WAIT) && malu_done;
  assign rf_wa      = cur.dst;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      stepping <= 1'b0;
      kbit     <= 1'b1;
      idx      <= '0;
      single   <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (cmd_start) begin
          stepping <= cmd_step;
          kbit     <= cmd_kbit;
          single   <= cmd_uop;
          idx      <= '0;
          state    <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (malu_done) begin
          if (stepping && idx != 4'(NSTEP - 1)) begin
            idx   <= idx + 4'd1;
            state <= S_ISSUE;
          end else begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
