// tb_bus_manager: self-checking test of the system bus.
//
// Two behavioural masters (standing for the EC processor and the microcontroller) issue
// random reads and writes to ROM, RAM, RNG and the front end at the same time; each holds
// its request until ack. Synchronous ROM and RAM arrays, an RNG counter stream and
// receiver / transmitter streams with random readiness sit on the slave side. Checks every
// read value against a shadow memory, every transmitted byte, that each RNG and receiver
// byte goes to exactly one master, the 2-cycle memory latency, and that the EC processor
// wins when both masters start a request in the same cycle.
module tb_bus_manager;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t ecp_req, mcu_req;
  bus_rsp_t ecp_rsp, mcu_rsp;
  logic rom_en, ram_en, ram_we;
  logic [9:0] rom_addr, ram_addr;
  logic [7:0] rom_rdata, ram_rdata, ram_wdata;
  logic [7:0] rng_data, rx_data, tx_data;
  logic rng_valid, rng_ready, rx_valid, rx_ready, tx_valid, tx_ready;
  int checks = 0, failures = 0;

  logic [7:0] rom_m [1024];
  logic [7:0] ram_m [1024];
  logic [7:0] shadow [1024];
  logic [7:0] rng_next, rx_next;
  logic [7:0] tx_seen [$];
  int both_same_cycle = 0, ecp_first = 0;

  bus_manager dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rom_en) rom_rdata <= rom_m[rom_addr];
    if (ram_en) begin
      if (ram_we) ram_m[ram_addr] <= ram_wdata;
      else ram_rdata <= ram_m[ram_addr];
    end
    if (!rst_n) begin rng_next <= 8'h00; rx_next <= 8'h00; end
    else begin
      if (rng_ready) rng_next <= rng_next + 8'd1;
      if (rx_ready)  rx_next  <= rx_next + 8'd1;
      if (tx_valid && tx_ready) tx_seen.push_back(tx_data);
    end
    rng_valid <= ($urandom_range(0, 2) != 0);
    rx_valid  <= ($urandom_range(0, 2) != 0);
    tx_ready  <= ($urandom_range(0, 2) != 0);
  end
  assign rng_data = rng_next;
  assign rx_data  = rx_next;

  initial begin
    repeat (200000) @(posedge clk);
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

  // one master: random accesses, checked against the shadow memory
  logic [7:0] got_rng [$];
  logic [7:0] got_rx  [$];
  logic [7:0] sent_tx [$];

  task automatic master(bit is_ecp, int n);
    for (int i = 0; i < n; i++) begin
      bus_req_t q;
      int dev, cyc;
      logic [7:0] d;
      dev = $urandom_range(0, 3);
      q.req = 1'b1;
      q.we = (dev == 0) ? 1'b0 : 1'($urandom_range(0, 1));
      if (dev == 2) q.we = 1'b0;
      // each master writes only its own half of RAM so the shadow stays exact
      q.addr = {3'(dev), is_ecp ? 1'b0 : 1'b1, 9'($urandom_range(0, 511))};
      q.wdata = 8'($urandom());
      if (is_ecp) ecp_req = q; else mcu_req = q;   // driven just after a clock edge
      cyc = 0;
      #1;                                            // same cycle: an I/O ack may come now
      while (!(is_ecp ? ecp_rsp.ack : mcu_rsp.ack)) begin
        @(posedge clk); #2;                          // after the other master's updates
        cyc++;
      end
      d = is_ecp ? ecp_rsp.rdata : mcu_rsp.rdata;
      case (dev)
        0: begin
          chk(d == rom_m[q.addr[9:0]], "ROM read data");
          chk(cyc >= 1, "ROM data one cycle after the request");
        end
        1: if (q.we) shadow[q.addr[9:0]] = q.wdata;
           else chk(d == shadow[q.addr[9:0]], $sformatf("RAM read %h", q.addr));
        2: got_rng.push_back(d);
        default: if (q.we) sent_tx.push_back(q.wdata); else got_rx.push_back(d);
      endcase
      @(posedge clk); #1;                            // ack was sampled: release
      if (is_ecp) ecp_req = '0; else mcu_req = '0;
    end
  endtask

  initial begin
    ecp_req = '0; mcu_req = '0;
    for (int i = 0; i < 1024; i++) begin
      rom_m[i] = 8'($urandom()); ram_m[i] = 8'h00; shadow[i] = 8'h00;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // priority: both masters raise a RAM read in the same cycle
    for (int i = 0; i < 10; i++) begin
      @(posedge clk); #1;
      ecp_req = '{1'b1, 1'b0, {3'(DEV_RAM), 10'd5}, 8'h00};
      mcu_req = '{1'b1, 1'b0, {3'(DEV_RAM), 10'd600}, 8'h00};
      @(posedge clk); #1;
      both_same_cycle++;
      if (ecp_rsp.ack && !mcu_rsp.ack) ecp_first++;
      @(posedge clk); #1;
      ecp_req = '0;
      while (!mcu_rsp.ack) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      mcu_req = '0;
    end
    chk(ecp_first == both_same_cycle, "EC processor has priority");
    @(posedge clk); #1;
    fork
      master(1'b1, 300);
      master(1'b0, 300);
    join
    // RNG and receiver bytes are consecutive counts, each delivered exactly once
    begin
      logic [7:0] all [$];
      all = {got_rng};
      all.sort();
      for (int i = 0; i < all.size(); i++) chk(all[i] == 8'(i), $sformatf("RNG stream %0d: %0d", i, all[i]));
      all = {got_rx};
      all.sort();
      for (int i = 0; i < all.size(); i++) chk(all[i] == 8'(i), "receiver stream");
    end
    chk(tx_seen.size() == sent_tx.size(), "transmitter byte count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
