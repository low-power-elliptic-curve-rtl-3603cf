// tb_ecp: self-checking test of the EC processor (x-only point multiplication on B-163).
//
// A behavioural bus slave stands in for ROM and RAM (acknowledging every access in the
// cycle after the request, as the bus manager does). The base point x is placed in
// ROM[0] or in another block, the scalar in RAM[4]; after done the result block RAM[2] is
// compared with the reference package's Lopez-Dahab ladder with a separate Z per point.
// Scalars: 1, 2, 3, a 16-bit value, the group order minus two, a full-length random
// scalar and zero (zero result). The cycle count of each run is checked against the
// controller's schedule: 520 cycles per scalar bit after the leading one, plus a fixed
// 8,199 cycles (point load, ladder set-up, 21 scalar-byte fetches, the inversion with its
// 172 multiplications, write-back); 439 cycles for k = 0 (no inversion).
module tb_ecp;
  import ecc_pkg::*;
  import ecc_ref_pkg::point_mul_x;
  import ecc_ref_pkg::GX;
  import ecc_ref_pkg::N_ORDER;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  blkref_t point_ref;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  int checks = 0, failures = 0;
  logic [7:0] rom_m [1024];
  logic [7:0] ram_m [1024];
  logic pend;

  ecp dut (.*);
  always #5 clk = ~clk;

  // bus slave: ack one cycle after the request is seen
  always_ff @(posedge clk) begin
    if (!rst_n) pend <= 1'b0;
    else pend <= bus_req.req && !pend;
    if (bus_req.req && !pend && bus_req.we && bus_req.addr[12:10] == 3'(DEV_RAM))
      ram_m[bus_req.addr[9:0]] <= bus_req.wdata;
  end
  always_comb begin
    bus_rsp.ack   = pend && bus_req.req;
    bus_rsp.rdata = (bus_req.addr[12:10] == 3'(DEV_ROM)) ? rom_m[bus_req.addr[9:0]]
                                                         : ram_m[bus_req.addr[9:0]];
  end

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

  task automatic put(logic to_rom, int blk, logic [167:0] v);
    for (int j = 0; j < 21; j++)
      if (to_rom) rom_m[21*blk + j] = v[8*j +: 8];
      else        ram_m[21*blk + j] = v[8*j +: 8];
  endtask

  task automatic run(logic [167:0] k, blkref_t pr, ecc_ref_pkg::fe_t x);
    logic [167:0] got;
    ecc_ref_pkg::fe_t exp;
    int cyc, t, expc;
    put(pr[7:5] == 3'(DEV_ROM), int'(pr[4:0]), {5'b0, x});
    put(1'b0, 4, k);
    put(1'b0, 2, {168{1'b1}});
    @(negedge clk);
    start = 1; point_ref = pr;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    for (int j = 0; j < 21; j++) got[8*j +: 8] = ram_m[42 + j];
    exp = point_mul_x(k, x);
    chk(got == {5'b0, exp}, $sformatf("x(kP) for k=%h: got %h exp %h", k, got, exp));
    t = 0;
    for (int i = 0; i < 168; i++) if (k[i]) t = i + 1;
    if (t == 0) expc = 439;
    else expc = 8199 + (t - 1)*520;
    chk(cyc == expc, $sformatf("cycles %0d expected %0d (t=%0d)", cyc, expc, t));
    $display("k bits %0d: %0d cycles", t, cyc);
  endtask

  initial begin
    logic [167:0] k;
    point_ref = '0;
    for (int i = 0; i < 1024; i++) begin rom_m[i] = '0; ram_m[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(168'd1, REF_ROM0, GX);
    run(168'd2, REF_ROM0, GX);
    run(168'd3, REF_ROM0, GX);
    run(168'hb35d, {DEV_RAM, 5'd7}, GX);
    run(N_ORDER - 168'd2, REF_ROM0, GX);
    for (int i = 0; i < 6; i++) k[i*32 +: 32] = $urandom();
    k[167:163] = '0;
    k[162] = 1'b1;
    run(k, REF_ROM0, GX);
    run(168'd0, REF_ROM0, GX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
