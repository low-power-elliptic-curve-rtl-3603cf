// mcu: 8-bit microcontroller that runs the authentication protocol.
//
// Executes a program of block instructions from ROM. Every data operand is a 21-byte block
// named by a block-reference byte (device and block index), and every instruction is
// executed byte-serially through an 8-bit ALU with a carry/borrow flag, one byte per
// step, least significant byte first. The instruction set is the design's:
//   Block_Mov (A, B)   A <- B                    (A or B may be the RNG or the front end)
//   Block_Add (A, B)   RAM[0] <- (A + B) mod n
//   Block_Mul (A, B)   RAM[0] <- (A * B) mod n
//   Block_Comp (A, B)  flag <- (A == B)
//   Cond_Jump (T)      pc <- T if flag, else pc + 1
//   Activate_ECP (A)   start the EC processor on the point in block A
//   Wait_for_ECP       stall until the EC processor is done
//   End_of_code        stop and pulse done
// The modular arithmetic is this design's: n is read from block N_REF of the ROM,
// Block_Add adds and then subtracts n on trial (keeping the difference if it did not
// borrow), and Block_Mul is a left-to-right shift-and-add over the bits of A, with a
// doubling and a conditional addition of B per bit, each followed by a trial
// subtraction. Intermediate values live in two scratch RAM blocks (T0_REF, T1_REF) used
// ping-pong, so no 168-bit register is needed. Block_Add requires A + B < 2n; Block_Mul
// requires B < n (A may be any 168-bit value).
// Encoding (this design's): 3 bytes per instruction at ROM byte PROG_BASE + 3*pc:
// opcode (bits 2:0), operand A, operand B.
// Interface: pulse start with start_pc; busy until done pulses. System-bus master with
// req held until ack. ecp_start pulses for one cycle; ecp_done is the processor's done.
// Timing: a byte step costs one bus access per operand and one for the result (2 cycles
// each for ROM/RAM); Block_Mov about 90 cycles, Block_Add about 380, Block_Mul about
// 42,000 for 168 bits.
module mcu
  import ecc_pkg::*;
#(
  parameter blkref_t N_REF   = {DEV_ROM, 5'd3},   // group order n
  parameter blkref_t T0_REF  = {DEV_RAM, 5'd5},   // scratch blocks
  parameter blkref_t T1_REF  = {DEV_RAM, 5'd6},
  parameter blkref_t DST_REF = REF_RAM0           // result of Block_Add / Block_Mul
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  logic [7:0] start_pc,
  output logic     busy,
  output logic     done,
  output logic     flag,
  output bus_req_t bus_req,
  input  bus_rsp_t bus_rsp,
  output logic     ecp_start,
  output blkref_t  ecp_point_ref,
  input  logic     ecp_done
);

  typedef enum logic [4:0] {
    S_IDLE, S_FETCH, S_DECODE, S_NEXT,
    S_P_RD1, S_P_RD2, S_P_WR,
    S_ADD_SUB, S_ADD_FIN, S_COMP_FIN,
    S_MUL_ABYTE, S_MUL_DBL, S_MUL_DBL_SUB, S_MUL_DBL_SEL, S_MUL_ADD_SUB, S_MUL_ADD_SEL,
    S_MUL_FIN, S_WAIT_ECP
  } state_e;

  typedef enum logic [2:0] {P_MOV, P_ADD, P_SUB, P_CMP, P_ZERO} pop_e;

  state_e     state, ret;
  logic [7:0] pc;
  logic [1:0] fk;                  // instruction byte being fetched
  mcu_op_e    opc;
  blkref_t    opa, opb;
  // pass engine
  pop_e       pop;
  blkref_t    ps1, ps2, pd;
  logic [4:0] pj;
  logic       cy;                  // carry / borrow
  logic       ne;                  // a compared byte differed
  logic [7:0] t1, wres;
  // multiplication
  logic       p;                   // which scratch block holds the current value
  logic [4:0] jb;
  logic [2:0] bi;
  logic [7:0] abyte;
  logic       ecp_pending;

  function automatic blkref_t tblk(logic sel);
    return sel ? T1_REF : T0_REF;
  endfunction

  // 8-bit ALU
  logic [8:0] sum, dif;
  assign sum = {1'b0, t1} + {1'b0, bus_rsp.rdata} + {8'b0, cy};
  assign dif = {1'b0, t1} - {1'b0, bus_rsp.rdata} - {8'b0, cy};

  assign busy = (state != S_IDLE);

  always_comb begin
    bus_req = '0;
    case (state)
      S_FETCH: begin
        bus_req.req  = 1'b1;
        bus_req.addr = {DEV_ROM, 10'(PROG_BASE + 10'(3 * pc) + 10'(fk))};
      end
      S_P_RD1: begin
        bus_req.req  = 1'b1;
        bus_req.addr = blk_addr(ps1, 32'(pj));
      end
      S_P_RD2: begin
        bus_req.req  = 1'b1;
        bus_req.addr = blk_addr(ps2, 32'(pj));
      end
      S_P_WR: begin
        bus_req.req   = 1'b1;
        bus_req.we    = 1'b1;
        bus_req.addr  = blk_addr(pd, 32'(pj));
        bus_req.wdata = wres;
      end
      S_MUL_ABYTE: begin
        bus_req.req  = 1'b1;
        bus_req.addr = blk_addr(opa, 32'(jb));
      end
      default: ;
    endcase
  end

  task automatic start_pass(pop_e o, blkref_t s1, blkref_t s2, blkref_t d, state_e r);
    pop   <= o;
    ps1   <= s1;
    ps2   <= s2;
    pd    <= d;
    pj    <= '0;
    cy    <= 1'b0;
    ne    <= 1'b0;
    ret   <= r;
    wres  <= '0;
    state <= (o == P_ZERO) ? S_P_WR : S_P_RD1;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ret <= S_IDLE;
      pc <= '0; fk <= '0; opc <= OP_END; opa <= '0; opb <= '0;
      pop <= P_MOV; ps1 <= '0; ps2 <= '0; pd <= '0; pj <= '0;
      cy <= 1'b0; ne <= 1'b0; t1 <= '0; wres <= '0;
      p <= 1'b0; jb <= '0; bi <= '0; abyte <= '0;
      flag <= 1'b0; done <= 1'b0;
      ecp_start <= 1'b0; ecp_point_ref <= '0; ecp_pending <= 1'b0;
    end else begin
      done      <= 1'b0;
      ecp_start <= 1'b0;
      if (ecp_done) ecp_pending <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          pc    <= start_pc;
          fk    <= '0;
          state <= S_FETCH;
        end
        S_FETCH: if (bus_rsp.ack) begin
          case (fk)
            2'd0:    opc <= mcu_op_e'(bus_rsp.rdata[2:0]);
            2'd1:    opa <= bus_rsp.rdata;
            default: opb <= bus_rsp.rdata;
          endcase
          if (fk == 2'd2) state <= S_DECODE;
          else fk <= fk + 2'd1;
        end
        S_DECODE: begin
          case (opc)
            OP_MOV:  start_pass(P_MOV, opb, opb, opa, S_NEXT);
            OP_ADD:  start_pass(P_ADD, opa, opb, T0_REF, S_ADD_SUB);
            OP_COMP: start_pass(P_CMP, opa, opb, opa, S_COMP_FIN);
            OP_MUL: begin
              p  <= 1'b0;
              jb <= 5'(BLOCK_BYTES - 1);
              start_pass(P_ZERO, T0_REF, T0_REF, T0_REF, S_MUL_ABYTE);
            end
            OP_JUMP: begin
              pc    <= flag ? opa : pc + 8'd1;
              fk    <= '0;
              state <= S_FETCH;
            end
            OP_ECP: begin
              ecp_start     <= 1'b1;
              ecp_point_ref <= opa;
              ecp_pending   <= 1'b1;
              state         <= S_NEXT;
            end
            OP_WAIT_ECP: state <= S_WAIT_ECP;
            default: begin                          // End_of_code
              done  <= 1'b1;
              state <= S_IDLE;
            end
          endcase
        end
        S_NEXT: begin
          pc    <= pc + 8'd1;
          fk    <= '0;
          state <= S_FETCH;
        end
        S_WAIT_ECP: if (!ecp_pending) state <= S_NEXT;

        // ---------------- pass engine ----------------
        S_P_RD1: if (bus_rsp.ack) begin
          t1 <= bus_rsp.rdata;
          if (pop == P_MOV) begin
            wres  <= bus_rsp.rdata;
            state <= S_P_WR;
          end else state <= S_P_RD2;
        end
        S_P_RD2: if (bus_rsp.ack) begin
          case (pop)
            P_ADD:   begin wres <= sum[7:0]; cy <= sum[8]; end
            P_SUB:   begin wres <= dif[7:0]; cy <= dif[8]; end
            default: if (t1 != bus_rsp.rdata) ne <= 1'b1;  // P_CMP
          endcase
          if (pop == P_CMP) begin
            if (pj == 5'(BLOCK_BYTES - 1)) state <= ret;
            else begin
              pj    <= pj + 5'd1;
              state <= S_P_RD1;
            end
          end else state <= S_P_WR;
        end
        S_P_WR: if (bus_rsp.ack) begin
          if (pj == 5'(BLOCK_BYTES - 1)) state <= ret;
          else begin
            pj    <= pj + 5'd1;
            state <= (pop == P_ZERO) ? S_P_WR : S_P_RD1;
          end
        end

        // ---------------- Block_Add ----------------
        S_ADD_SUB: start_pass(P_SUB, T0_REF, N_REF, T1_REF, S_ADD_FIN);
        S_ADD_FIN: start_pass(P_MOV, cy ? T0_REF : T1_REF, T0_REF, DST_REF, S_NEXT);

        // ---------------- Block_Comp ----------------
        S_COMP_FIN: begin
          flag  <= !ne;
          state <= S_NEXT;
        end

        // ---------------- Block_Mul ----------------
        S_MUL_ABYTE: if (bus_rsp.ack) begin
          abyte <= bus_rsp.rdata;
          bi    <= 3'd7;
          state <= S_MUL_DBL;
        end
        S_MUL_DBL:     start_pass(P_ADD, tblk(p), tblk(p), tblk(!p), S_MUL_DBL_SUB);
        S_MUL_DBL_SUB: start_pass(P_SUB, tblk(!p), N_REF, tblk(p), S_MUL_DBL_SEL);
        S_MUL_DBL_SEL, S_MUL_ADD_SEL: begin
          logic np;
          np = cy ? !p : p;                  // borrow: the unreduced value was right
          p <= np;
          if (state == S_MUL_DBL_SEL && abyte[bi])
            start_pass(P_ADD, tblk(np), opb, tblk(!np), S_MUL_ADD_SUB);
          else if (bi != 3'd0) begin
            bi    <= bi - 3'd1;
            state <= S_MUL_DBL;
          end else if (jb != 5'd0) begin
            jb    <= jb - 5'd1;
            state <= S_MUL_ABYTE;
          end else state <= S_MUL_FIN;
        end
        S_MUL_ADD_SUB: start_pass(P_SUB, tblk(!p), N_REF, tblk(p), S_MUL_ADD_SEL);
        S_MUL_FIN:     start_pass(P_MOV, tblk(p), tblk(p), DST_REF, S_NEXT);
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
