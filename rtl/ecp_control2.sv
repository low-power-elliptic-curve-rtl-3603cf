// ecp_control2: upper-level controller of the EC processor (point multiplication).
//
// On start it
//   1. reads the 21-byte x coordinate of the base point from the block point_ref into
//      register x;
//   2. sets up the ladder in common-Z coordinates: Z = x^2, X1 = x^3 (that is P with
//      Z = x^2) and X2 = (x^2 + c)^2 = x^4 + b (2P with the same Z);
//   3. reads the 21-byte scalar k from block SCALAR_REF one byte at a time, most
//      significant byte first, skips the leading zero bits and the leading one, and for
//      every later bit k_i has the lower controller run one ladder step;
//   4. converts X1 to affine x = X1 / Z, inverting Z by Fermat's little theorem with the
//      Itoh-Tsujii chain 1,2,4,8,16,32,64,128,160,162 (162 squarings, 9 multiplications,
//      all on the MALU);
//   5. writes x(kP) into block RESULT_REF and pulses done.
// Reading the point and the scalar from memory, the ladder, and writing the result back
// follow the design (the scalar block and the result block are those its programs use:
// RAM[4] and RAM[2]). Skipping leading zeros, the inversion method, the zero result for
// k = 0 and the byte order are this design's choices.
// Interface: start pulse with point_ref; busy until done pulses. System-bus master with
// req held until ack.
// Timing: busy is high for 8,198 + 520 (t - 1) cycles for a scalar of bit length t
// (92,438 for t = 163): 520 cycles per ladder step, and a fixed part made of the byte
// transfers (two bus cycles per ROM/RAM byte when the bus is free), the three set-up
// operations, the inversion and the final multiplication (172 MALU operations).
module ecp_control2
  import ecc_pkg::*;
#(
  parameter blkref_t SCALAR_REF = REF_RAM4,
  parameter blkref_t RESULT_REF = REF_RAM2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  blkref_t    point_ref,
  output logic       busy,
  output logic       done,
  // system bus
  output bus_req_t   bus_req,
  input  bus_rsp_t   bus_rsp,
  // lower controller
  output logic       c1_start,
  output logic       c1_step,
  output logic       c1_kbit,
  output uop_t       c1_uop,
  input  logic       c1_done,
  // register-file byte port
  output raddr_t     byte_reg,
  output logic [4:0] byte_idx,
  output logic       byte_we,
  output logic [7:0] byte_wd,
  input  logic [7:0] byte_rd
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_INIT, S_KFETCH, S_KBIT, S_INV, S_C1_ISSUE, S_C1_WAIT, S_WRITE, S_DONE
  } state_e;
  typedef enum logic [1:0] {PH_INIT, PH_LADDER, PH_INV} phase_e;

  state_e     state;
  phase_e     phase;
  blkref_t    pref;
  logic [4:0] j;          // byte counter
  logic [2:0] bi;         // bit counter within the scalar byte
  logic [7:0] kbyte;
  logic       found;      // leading one seen
  logic [1:0] ii;         // initialisation micro-op
  logic [4:0] vi;         // inversion table entry
  logic [6:0] sqc;        // squarings left in the current inversion entry
  logic       c1_step_q, c1_kbit_q;
  uop_t       c1_uop_q;

  function automatic uop_t init_uop(logic [1:0] i);
    case (i)
      2'd0:    return '{MALU_MUL, R_Z,  R_X,  R_X,  R_0};   // Z  = x^2
      2'd1:    return '{MALU_MUL, R_X1, R_X,  R_Z,  R_0};   // X1 = x^3
      2'd2:    return '{MALU_ADD, R_X2, R_Z,  R_C,  R_0};   // X2 = x^2 + c
      default: return '{MALU_MUL, R_X2, R_X2, R_X2, R_0};   // X2 = x^4 + b
    endcase
  endfunction

  // inversion chain: squaring entries give {dst, src, count}, multiplications dst = dst*b
  typedef struct packed {
    logic       sq;
    raddr_t     dst;
    raddr_t     a;
    raddr_t     b;
    logic [6:0] n;
  } inv_t;

  localparam int unsigned NINV = 20;

  function automatic inv_t inv_entry(logic [4:0] i);
    case (i)
      5'd0:  return '{1'b1, R_X,  R_Z,  R_0,  7'd1 };   // beta1^2
      5'd1:  return '{1'b0, R_X,  R_X,  R_Z,  7'd0 };   // beta2   in x
      5'd2:  return '{1'b1, R_T1, R_X,  R_0,  7'd2 };
      5'd3:  return '{1'b0, R_T1, R_T1, R_X,  7'd0 };   // beta4   in T1
      5'd4:  return '{1'b1, R_T2, R_T1, R_0,  7'd4 };
      5'd5:  return '{1'b0, R_T2, R_T2, R_T1, 7'd0 };   // beta8   in T2
      5'd6:  return '{1'b1, R_T1, R_T2, R_0,  7'd8 };
      5'd7:  return '{1'b0, R_T1, R_T1, R_T2, 7'd0 };   // beta16  in T1
      5'd8:  return '{1'b1, R_T2, R_T1, R_0,  7'd16};
      5'd9:  return '{1'b0, R_T2, R_T2, R_T1, 7'd0 };   // beta32  in T2 (kept)
      5'd10: return '{1'b1, R_X2, R_T2, R_0,  7'd32};
      5'd11: return '{1'b0, R_X2, R_X2, R_T2, 7'd0 };   // beta64  in X2
      5'd12: return '{1'b1, R_T1, R_X2, R_0,  7'd64};
      5'd13: return '{1'b0, R_T1, R_T1, R_X2, 7'd0 };   // beta128 in T1
      5'd14: return '{1'b1, R_X2, R_T1, R_0,  7'd32};
      5'd15: return '{1'b0, R_X2, R_X2, R_T2, 7'd0 };   // beta160 in X2
      5'd16: return '{1'b1, R_T1, R_X2, R_0,  7'd2 };
      5'd17: return '{1'b0, R_T1, R_T1, R_X,  7'd0 };   // beta162 in T1
      5'd18: return '{1'b1, R_T1, R_T1, R_0,  7'd1 };   // Z^-1 = beta162^2
      default: return '{1'b0, R_X2, R_X1, R_T1, 7'd0 }; // x = X1 * Z^-1 in X2
    endcase
  endfunction

  inv_t ie;
  assign ie = inv_entry(vi);

  // ---- outputs ----
  assign busy     = (state != S_IDLE);
  assign c1_start = (state == S_C1_ISSUE);
  assign c1_step  = c1_step_q;
  assign c1_kbit  = c1_kbit_q;
  assign c1_uop   = c1_uop_q;

  always_comb begin
    bus_req  = '0;
    byte_reg = R_X2;
    byte_idx = j;
    byte_we  = 1'b0;
    byte_wd  = bus_rsp.rdata;
    case (state)
      S_LOAD: begin
        bus_req.req  = 1'b1;
        bus_req.addr = blk_addr(pref, 32'(j));
        byte_reg     = R_X;
        byte_we      = bus_rsp.ack;
      end
      S_KFETCH: begin
        bus_req.req  = 1'b1;
        bus_req.addr = blk_addr(SCALAR_REF, 32'(j));
      end
      S_WRITE: begin
        bus_req.req   = 1'b1;
        bus_req.we    = 1'b1;
        bus_req.addr  = blk_addr(RESULT_REF, 32'(j));
        bus_req.wdata = found ? byte_rd : 8'h00;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= PH_INIT;
      pref      <= '0;
      j         <= '0;
      bi        <= '0;
      kbyte     <= '0;
      found     <= 1'b0;
      ii        <= '0;
      vi        <= '0;
      sqc       <= '0;
      c1_step_q <= 1'b0;
      c1_kbit_q <= 1'b0;
      c1_uop_q  <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          pref  <= point_ref;
          j     <= '0;
          found <= 1'b0;
          state <= S_LOAD;
        end
        S_LOAD: if (bus_rsp.ack) begin
          if (j == 5'(BLOCK_BYTES - 1)) begin
            ii    <= '0;
            state <= S_INIT;
          end else j <= j + 5'd1;
        end
        S_INIT: begin                        // issue initialisation micro-op ii
          phase     <= PH_INIT;
          c1_step_q <= 1'b0;
          c1_uop_q  <= init_uop(ii);
          state     <= S_C1_ISSUE;
        end
        S_KFETCH: if (bus_rsp.ack) begin
          kbyte <= bus_rsp.rdata;
          bi    <= 3'd7;
          state <= S_KBIT;
        end
        S_KBIT: begin
          if (found) begin                   // one ladder step for k_i
            phase     <= PH_LADDER;
            c1_step_q <= 1'b1;
            c1_kbit_q <= kbyte[bi];
            state     <= S_C1_ISSUE;
          end else begin                     // still skipping leading zeros
            if (kbyte[bi]) found <= 1'b1;
            if (bi != 3'd0) bi <= bi - 3'd1;
            else if (j != 5'd0) begin
              j     <= j - 5'd1;
              state <= S_KFETCH;
            end else begin                   // no more bits
              vi    <= '0;
              j     <= '0;
              state <= (found || kbyte[0]) ? S_INV : S_WRITE;
            end
          end
        end
        S_INV: begin                         // issue the current inversion micro-op
          phase     <= PH_INV;
          c1_step_q <= 1'b0;
          if (ie.sq) c1_uop_q <= '{MALU_MUL, ie.dst, ie.a, ie.a, R_0};
          else       c1_uop_q <= '{MALU_MUL, ie.dst, ie.a, ie.b, R_0};
          sqc       <= ie.n;
          state     <= S_C1_ISSUE;
        end
        S_C1_ISSUE: state <= S_C1_WAIT;
        S_C1_WAIT: if (c1_done) begin
          case (phase)
            PH_INIT: begin
              if (ii == 2'd3) begin
                j     <= 5'(BLOCK_BYTES - 1);
                state <= S_KFETCH;
              end else begin
                ii    <= ii + 2'd1;
                state <= S_INIT;
              end
            end
            PH_LADDER: begin
              if (bi != 3'd0) begin
                bi    <= bi - 3'd1;
                state <= S_KBIT;
              end else if (j != 5'd0) begin
                j     <= j - 5'd1;
                state <= S_KFETCH;
              end else begin
                vi    <= '0;
                state <= S_INV;
              end
            end
            default: begin                   // PH_INV
              if (sqc > 7'd1) begin          // further squarings of dst in place
                sqc      <= sqc - 7'd1;
                c1_uop_q <= '{MALU_MUL, ie.dst, ie.dst, ie.dst, R_0};
                state    <= S_C1_ISSUE;
              end else if (vi == 5'(NINV - 1)) begin
                j     <= '0;
                state <= S_WRITE;
              end else begin
                vi    <= vi + 5'd1;
                state <= S_INV;
              end
            end
          endcase
        end
        S_WRITE: if (bus_rsp.ack) begin
          if (j == 5'(BLOCK_BYTES - 1)) state <= S_DONE;
          else j <= j + 5'd1;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
