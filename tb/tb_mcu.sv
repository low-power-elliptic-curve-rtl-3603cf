// tb_mcu: self-checking test of the protocol microcontroller.
//
// A behavioural bus slave provides ROM (program at byte 0x200, n in block 3), RAM, a
// random-number stream and a front end (receiver queue, transmitter log), with random
// stalls on the RNG and front-end handshakes. A behavioural EC processor answers
// Activate_ECP with done after 300 cycles. The program below exercises every instruction:
//   0 Block_Mov RAM1, RNG      1 Block_Mov RAM2, Receiver   2 Block_Mul RAM2, ROM1
//   3 Block_Mov RAM3, RAM0     4 Block_Add RAM3, RAM1       5 Block_Mov Transmitter, RAM0
//   6 Activate_ECP ROM2        7 Wait_for_ECP               8 Block_Comp RAM0, RAM3
//   9 Cond_Jump 12 (not taken) 10 Block_Comp RAM1, RAM1    11 Cond_Jump 13 (taken)
//   12 Block_Mov Transmitter, ROM0 (skipped)   13 Block_Mov Transmitter, RAM3   14 End
// Expected: transmitted (e*b + r) mod n, then e*b mod n, computed with wide integer
// arithmetic. Runs include a random value r = n - 1 so that Block_Add must wrap.
// Also checks that Wait_for_ECP holds the program until the processor is done.
module tb_mcu;
  import ecc_pkg::*;
  import ecc_ref_pkg::N_ORDER;
  import ecc_ref_pkg::mod_add;
  import ecc_ref_pkg::mod_mul;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, flag;
  logic [7:0] start_pc;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic ecp_start, ecp_done;
  blkref_t ecp_point_ref;
  int checks = 0, failures = 0;

  logic [7:0] rom_m [1024];
  logic [7:0] ram_m [1024];
  logic [7:0] rng_q [$];
  logic [7:0] rx_q [$];
  logic [7:0] tx_log [$];
  logic pend;
  int ecp_timer, ecp_starts, ecp_ref_ok, wait_cycles;

  mcu dut (.*);
  always #5 clk = ~clk;

  // bus slave
  always_ff @(posedge clk) begin
    if (!rst_n) pend <= 1'b0;
    else if (bus_rsp.ack) pend <= 1'b0;
    else if (bus_req.req) begin
      case (bus_req.addr[12:10])
        3'(DEV_ROM), 3'(DEV_RAM): pend <= 1'b1;
        3'(DEV_RNG): pend <= (rng_q.size() != 0) && ($urandom_range(0, 3) != 0);
        default: pend <= bus_req.we ? ($urandom_range(0, 2) != 0)
                                    : (rx_q.size() != 0) && ($urandom_range(0, 2) != 0);
      endcase
    end
    if (bus_rsp.ack) begin
      case (bus_req.addr[12:10])
        3'(DEV_RAM): if (bus_req.we) ram_m[bus_req.addr[9:0]] <= bus_req.wdata;
        3'(DEV_RNG): void'(rng_q.pop_front());
        3'(DEV_FE):  if (bus_req.we) tx_log.push_back(bus_req.wdata);
                     else void'(rx_q.pop_front());
        default: ;
      endcase
    end
  end
  always_comb begin
    bus_rsp.ack = pend && bus_req.req;
    case (bus_req.addr[12:10])
      3'(DEV_ROM): bus_rsp.rdata = rom_m[bus_req.addr[9:0]];
      3'(DEV_RAM): bus_rsp.rdata = ram_m[bus_req.addr[9:0]];
      3'(DEV_RNG): bus_rsp.rdata = (rng_q.size() != 0) ? rng_q[0] : 8'h00;
      default:     bus_rsp.rdata = (rx_q.size() != 0) ? rx_q[0] : 8'h00;
    endcase
  end

  // behavioural EC processor: done 300 cycles after start
  always @(posedge clk) begin
    ecp_done <= 1'b0;
    if (!rst_n) ecp_timer <= 0;
    else if (ecp_start) begin
      ecp_timer <= 300;
      ecp_starts++;
      if (ecp_point_ref == 8'h02) ecp_ref_ok++;
    end else if (ecp_timer == 1) begin
      ecp_timer <= 0;
      ecp_done  <= 1'b1;
    end else if (ecp_timer != 0) ecp_timer <= ecp_timer - 1;
    if (ecp_timer != 0 && bus_req.req) wait_cycles++;   // bus use while the ECP runs
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic ins(int pc, mcu_op_e o, logic [7:0] a, logic [7:0] b);
    rom_m[512 + 3*pc] = 8'(o); rom_m[512 + 3*pc + 1] = a; rom_m[512 + 3*pc + 2] = b;
  endtask

  function automatic logic [167:0] rnd_below_n();
    logic [167:0] v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom();
    v[167:162] = '0;
    return v;
  endfunction

  task automatic run(logic [167:0] r, logic [167:0] e, logic [167:0] bv);
    logic [167:0] t0, t1, em;
    int c0;
    for (int j = 0; j < 21; j++) begin
      rom_m[21 + j] = bv[8*j +: 8];
      rng_q.push_back(r[8*j +: 8]);
      rx_q.push_back(e[8*j +: 8]);
    end
    tx_log.delete();
    c0 = ecp_starts; ecp_ref_ok = 0; wait_cycles = 0;
    @(negedge clk);
    start = 1; start_pc = 8'd0;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    em = mod_mul(e, bv);
    chk(tx_log.size() == 42, $sformatf("transmitted %0d bytes", tx_log.size()));
    for (int j = 0; j < 21; j++) begin
      t0[8*j +: 8] = (tx_log.size() > j) ? tx_log[j] : 8'h00;
      t1[8*j +: 8] = (tx_log.size() > 21 + j) ? tx_log[21 + j] : 8'h00;
    end
    chk(t0 == mod_add(em, r), $sformatf("Block_Add result %h exp %h", t0, mod_add(em, r)));
    chk(t1 == em, $sformatf("Block_Mul result %h exp %h", t1, em));
    chk(ecp_starts == c0 + 1 && ecp_ref_ok == 1, "Activate_ECP with ROM[2]");
    chk(wait_cycles <= 8, $sformatf("Wait_for_ECP: %0d bus cycles while the ECP ran", wait_cycles));
    chk(flag == 1'b1, "flag after equal compare");
    chk(rng_q.size() == 0 && rx_q.size() == 0, "RNG and receiver consumed");
  endtask

  initial begin
    logic [167:0] nv;
    nv = N_ORDER;
    start_pc = '0;
    ecp_starts = 0;
    for (int i = 0; i < 1024; i++) begin rom_m[i] = '0; ram_m[i] = '0; end
    for (int j = 0; j < 21; j++) rom_m[63 + j] = nv[8*j +: 8];
    ins(0, OP_MOV, 8'h21, 8'h40);   ins(1, OP_MOV, 8'h22, 8'h60);
    ins(2, OP_MUL, 8'h22, 8'h01);   ins(3, OP_MOV, 8'h23, 8'h20);
    ins(4, OP_ADD, 8'h23, 8'h21);   ins(5, OP_MOV, 8'h60, 8'h20);
    ins(6, OP_ECP, 8'h02, 8'h00);   ins(7, OP_WAIT_ECP, 8'h00, 8'h00);
    ins(8, OP_COMP, 8'h20, 8'h23);  ins(9, OP_JUMP, 8'd12, 8'h00);
    ins(10, OP_COMP, 8'h21, 8'h21); ins(11, OP_JUMP, 8'd13, 8'h00);
    ins(12, OP_MOV, 8'h60, 8'h00);  ins(13, OP_MOV, 8'h60, 8'h23);
    ins(14, OP_END, 8'h00, 8'h00);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(rnd_below_n(), rnd_below_n(), rnd_below_n());
    run(nv - 168'd1, {168{1'b1}}, nv - 168'd1);        // Block_Add wraps
    run(rnd_below_n(), 168'd0, rnd_below_n());         // zero product
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
