// tb_ecc_rfid_top: end-to-end test of the RFID crypto processor at its default size.
//
// Plays the server and the tag's surroundings: a behavioural random number generator
// (random bytes, the top byte of each 21-byte number kept below 4 so that every random
// value is below the group order n), and a front end that queues the server's messages
// for the receiver and logs what the transmitter sends, both with random stalls.
// It runs the three programs of the default ROM image:
//   * Schnorr identification (pc 0): checks X = x(rP) and y = (a e + r) mod n;
//   * EC-RAC (pc 16): checks T1 = x(r_t P), and T2 = x(v Y) with
//     v = (r_t + x(r_s P) s1) mod n and Y the server's public key;
//   * the compare-and-jump program (pc 40) once with an equal and once with a different
//     block, checking which block is transmitted.
// The expected values come from the reference package (classic Lopez-Dahab ladder, wide
// integer arithmetic), with the secret key and the server key below. Each point
// multiplication's busy time is checked against the processor's schedule
// (8,198 + 520 (t - 1) cycles for a t-bit scalar), and every mechanism - RNG read, receive,
// transmit, point multiplication with both key-bit values, Wait_for_ECP stall, taken and
// untaken jump - is counted and must occur.
module tb_ecc_rfid_top;
  import ecc_ref_pkg::*;

  localparam logic [167:0] SECRET_A = 168'h1234567890abcdef0fedcba98765432100112233;
  localparam logic [167:0] SERVER_Y = 168'h0badc0ffee1234567;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, ecp_busy;
  logic [7:0] start_pc = '0;
  logic [7:0] rng_data, rx_data, tx_data;
  logic rng_valid, rng_ready, rx_valid, rx_ready, tx_valid, tx_ready;
  int checks = 0, failures = 0;

  ecc_rfid_top dut (.*);
  always #5 clk = ~clk;

  // ---------------- environment ----------------
  logic [7:0] rng_log [$];
  logic [7:0] rx_q [$];
  logic [7:0] tx_log [$];
  int rng_cnt = 0;
  int n_rng = 0, n_rx = 0, n_tx = 0, n_ecp = 0, n_wait = 0, n_kbit0 = 0, n_kbit1 = 0;
  int n_jump_taken = 0, n_jump_not = 0;
  int busy_len = 0;
  int ecp_lens [$];
  logic ecp_busy_q = 1'b0;
  logic [7:0] rng_cur;

  always_ff @(posedge clk) begin
    rng_valid <= ($urandom_range(0, 3) != 0);
    rx_valid  <= (rx_q.size() != 0) && ($urandom_range(0, 2) != 0);
    tx_ready  <= ($urandom_range(0, 2) != 0);
    if (!rst_n) rng_cur <= 8'($urandom());
    if (rng_valid && rng_ready) begin
      rng_log.push_back(rng_cur);
      rng_cnt++;
      n_rng++;
      rng_cur <= (rng_cnt % 21 == 20) ? 8'($urandom_range(0, 3)) : 8'($urandom());
    end
    if (rx_valid && rx_ready) begin
      void'(rx_q.pop_front());
      n_rx++;
    end
    if (tx_valid && tx_ready) begin
      tx_log.push_back(tx_data);
      n_tx++;
    end
    ecp_busy_q <= ecp_busy;
    if (rst_n && ecp_busy && !ecp_busy_q) n_ecp++;
    if (ecp_busy) busy_len++;
    if (!ecp_busy && ecp_busy_q) begin
      ecp_lens.push_back(busy_len);
      busy_len = 0;
    end
    if (ecp_busy && busy && !rng_ready && !rx_ready && !tx_valid) n_wait++;
  end
  assign rng_data = rng_cur;
  assign rx_data  = (rx_q.size() != 0) ? rx_q[0] : 8'h00;

  initial begin
    repeat (2000000) @(posedge clk);
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

  function automatic logic [167:0] rnd163();
    logic [167:0] v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom();
    v[167:163] = '0;
    return v;
  endfunction

  function automatic logic [167:0] blk(int i);        // i-th received / transmitted block
    logic [167:0] v;
    for (int j = 0; j < 21; j++) v[8*j +: 8] = (tx_log.size() > 21*i + j) ? tx_log[21*i + j] : 8'h00;
    return v;
  endfunction

  function automatic logic [167:0] rng_blk(int i);
    logic [167:0] v;
    for (int j = 0; j < 21; j++) v[8*j +: 8] = rng_log[21*i + j];
    return v;
  endfunction

  task automatic send(logic [167:0] v);
    for (int j = 0; j < 21; j++) rx_q.push_back(v[8*j +: 8]);
  endtask

  task automatic run_prog(logic [7:0] pc, output int cyc);
    tx_log.delete();
    rng_log.delete();
    rng_cnt = 0;
    ecp_lens.delete();
    @(negedge clk);
    start = 1; start_pc = pc;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  function automatic int bitlen(logic [167:0] k);
    int t = 0;
    for (int i = 0; i < 168; i++) if (k[i]) t = i + 1;
    return t;
  endfunction

  task automatic count_bits(logic [167:0] k);
    for (int i = bitlen(k) - 2; i >= 0; i--) if (k[i]) n_kbit1++; else n_kbit0++;
  endtask

  task automatic chk_ecp_len(int idx, logic [167:0] k);
    int exp;
    exp = 8198 + 520 * (bitlen(k) - 1);
    chk(ecp_lens.size() > idx && ecp_lens[idx] == exp,
        $sformatf("point multiplication %0d busy %0d cycles, expected %0d", idx,
                  (ecp_lens.size() > idx) ? ecp_lens[idx] : -1, exp));
  endtask

  initial begin
    logic [167:0] r, e, y, x_r, rt, rs, rsd, v, t2, yx, a_mod;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    a_mod = SECRET_A;
    yx = {5'b0, point_mul_x(SERVER_Y, GX)};

    // ---------------- Schnorr ----------------
    e = rnd163();
    send(e);
    run_prog(8'd0, cyc);
    r = rng_blk(0);
    x_r = {5'b0, point_mul_x(r, GX)};
    chk(tx_log.size() == 42, $sformatf("Schnorr: %0d bytes sent", tx_log.size()));
    chk(blk(0) == x_r, $sformatf("Schnorr X = x(rP): got %h exp %h", blk(0), x_r));
    y = mod_add(mod_mul(e, a_mod), r);
    chk(blk(1) == y, $sformatf("Schnorr y = ae + r: got %h exp %h", blk(1), y));
    chk_ecp_len(0, r);
    count_bits(r);
    $display("Schnorr: %0d cycles, point multiplication %0d cycles", cyc, ecp_lens[0]);

    // ---------------- EC-RAC ----------------
    rs = rnd163();
    send(rs);
    run_prog(8'd16, cyc);
    rt = rng_blk(0);
    chk(tx_log.size() == 42, $sformatf("EC-RAC: %0d bytes sent", tx_log.size()));
    chk(blk(0) == {5'b0, point_mul_x(rt, GX)}, "EC-RAC T1 = x(r_t P)");
    rsd = {5'b0, point_mul_x(rs, GX)};
    v = mod_add(rt, mod_mul(rsd, a_mod));
    t2 = {5'b0, point_mul_x(v, yx[162:0])};
    chk(blk(1) == t2, $sformatf("EC-RAC T2 = x(vY): got %h exp %h", blk(1), t2));
    chk_ecp_len(0, rt); chk_ecp_len(1, rs); chk_ecp_len(2, v);
    count_bits(rt); count_bits(rs); count_bits(v);
    $display("EC-RAC: %0d cycles", cyc);

    // ---------------- compare and jump ----------------
    send(yx);
    run_prog(8'd40, cyc);
    chk(blk(0) == yx, "Cond_Jump taken on equal blocks");
    if (blk(0) == yx) n_jump_taken++;
    send(yx ^ 168'h100);
    run_prog(8'd40, cyc);
    chk(blk(0) == {5'b0, GX}, "Cond_Jump not taken on different blocks");
    if (blk(0) == {5'b0, GX}) n_jump_not++;

    // ---------------- mechanisms ----------------
    chk(n_rng == 42, $sformatf("RNG bytes read: %0d", n_rng));
    chk(n_rx == 84, $sformatf("receiver bytes: %0d", n_rx));
    chk(n_tx == 126, $sformatf("transmitter bytes: %0d", n_tx));
    chk(n_ecp == 4, $sformatf("point multiplications: %0d", n_ecp));
    chk(n_wait > 300000, $sformatf("cycles stalled in Wait_for_ECP: %0d", n_wait));
    chk(n_kbit0 > 0 && n_kbit1 > 0, $sformatf("ladder steps k=0: %0d, k=1: %0d", n_kbit0, n_kbit1));
    chk(n_jump_taken == 1 && n_jump_not == 1, "both jump outcomes");
    $display("mechanisms: rng=%0d rx=%0d tx=%0d ecp=%0d wait=%0d kbit0=%0d kbit1=%0d jump=%0d/%0d",
             n_rng, n_rx, n_tx, n_ecp, n_wait, n_kbit0, n_kbit1, n_jump_taken, n_jump_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
