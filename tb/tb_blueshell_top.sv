// tb_blueshell_top -- end-to-end test of the whole system at its default
// size: 16 CPU tiles on the 4x4 mesh and on the shared memory tree, the
// prefetch unit, the clock crossing and a memory model at twice the tree
// clock.
//
// Every tile runs a sequential-read traffic generator (lines N, N+1, ...)
// with a fixed delay between accesses, as in the evaluation of the design,
// through a tag-only cache model that marks prefetched lines and sends hit
// notifications. Runs: one single read to measure the tree + prefetch unit
// round trip (20 cycles), then bypass, distance 1, 2 and 4 at a moderate
// delay, then distance 4 and bypass with no delay (memory saturated).
// Every read's data is checked. Mesh messages travel between tiles during
// the first run. The test counts how often each mechanism of the prefetch
// unit fired and fails if any of them never did; it prints the normalised
// execution time (bypass / prefetching) of each run.
module tb_blueshell_top;
  import bt_pkg::*;
  localparam int NX = 4, NY = 4, N = NX * NY;
  localparam int NACC = 48;

  logic clk = 1'b0, mem_clk = 1'b0, rst_n = 1'b0, mem_rst_n = 1'b0;
  always #10 clk = ~clk;          // 50 MHz tree / CPU clock
  always #5  mem_clk = ~mem_clk;  // 100 MHz memory clock

  logic        cfg_pf_enable;
  pf_dist_e    cfg_pf_distance;
  logic        cpu_req_valid [N], cpu_req_ready [N], cpu_rsp_valid [N], cpu_rsp_ready [N];
  bt_pkt_t     cpu_req_pkt [N], cpu_rsp_pkt [N];
  logic        tile_in_valid [N], tile_in_ready [N], tile_out_valid [N], tile_out_ready [N];
  logic [31:0] tile_in_data [N], tile_out_data [N];
  logic        ddr_req_valid, ddr_req_ready, ddr_rsp_valid, ddr_rsp_ready;
  bt_pkt_t     ddr_req_pkt, ddr_rsp_pkt;
  pu_events_t  pu_ev;
  logic [15:0] pu_mem_outstanding;
  logic [5:0]  pu_pf_queued, pu_sq_count;

  blueshell_top dut (.*);

  int mem_reads, mem_writes, mem_busy;
  ddr_model u_mem (
    .clk(mem_clk), .rst_n(mem_rst_n),
    .req_valid(ddr_req_valid), .req_ready(ddr_req_ready), .req_pkt(ddr_req_pkt),
    .rsp_valid(ddr_rsp_valid), .rsp_ready(ddr_rsp_ready), .rsp_pkt(ddr_rsp_pkt),
    .reads(mem_reads), .writes(mem_writes), .busy(mem_busy));

  logic start [N];
  int   base, nacc, delay;
  logic done [N];
  int   cycles [N], misses [N], pf_hits [N], errors [N], pf_inst [N];

  for (genvar t = 0; t < N; t++) begin : g_cpu
    cpu_tile_model #(.CPU_ID(t), .WRITE_EVERY(t % 4 == 3 ? 7 : 0)) u_cpu (
      .clk, .rst_n, .start(start[t]), .base(base + t * 100000), .nacc(nacc), .delay(delay),
      .req_valid(cpu_req_valid[t]), .req_ready(cpu_req_ready[t]), .req_pkt(cpu_req_pkt[t]),
      .rsp_valid(cpu_rsp_valid[t]), .rsp_ready(cpu_rsp_ready[t]), .rsp_pkt(cpu_rsp_pkt[t]),
      .done(done[t]), .cycles(cycles[t]), .misses(misses[t]), .pf_hits(pf_hits[t]),
      .errors(errors[t]), .pf_installs(pf_inst[t]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  int cyc = 0;
  int c_demand, c_write, c_snew, c_shit, c_hit, c_alloc, c_drop, c_dup, c_disp,
      c_squash, c_recent, c_sqfull, c_rd, c_pf, c_inv;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      c_demand += int'(pu_ev.demand);     c_write  += int'(pu_ev.write);
      c_snew   += int'(pu_ev.stream_new); c_shit   += int'(pu_ev.stream_hit);
      c_hit    += int'(pu_ev.hit_notify); c_alloc  += int'(pu_ev.pf_alloc);
      c_drop   += int'(pu_ev.pf_drop);    c_dup    += int'(pu_ev.pf_dup);
      c_disp   += int'(pu_ev.pf_dispatch);c_squash += int'(pu_ev.squash);
      c_recent += int'(pu_ev.recent_discard); c_sqfull += int'(pu_ev.squash_full);
      c_rd     += int'(pu_ev.resp_read);  c_pf     += int'(pu_ev.resp_pf);
      c_inv    += int'(pu_ev.wr_invalidate);
    end
  end

  // ---------------- round-trip probe ----------------
  int t_leaf_req, t_pu_out, t_pu_in, t_leaf_rsp;
  always @(posedge clk) if (rst_n) begin
    if (cpu_req_valid[0] && cpu_req_ready[0]) t_leaf_req = cyc;
    if (dut.u_pu.mem_req_valid && dut.u_pu.mem_req_ready) t_pu_out = cyc;
    if (dut.u_pu.mem_rsp_valid && dut.u_pu.mem_rsp_ready) t_pu_in = cyc;
    if (cpu_rsp_valid[0] && cpu_rsp_ready[0]) t_leaf_rsp = cyc;
  end

  // ---------------- mesh traffic ----------------
  int noc_sent = 0, noc_recv = 0, noc_bad = 0;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < N; t++)
      if (tile_out_valid[t] && tile_out_ready[t]) begin
        noc_recv++;
        if (int'(tile_out_data[t][3:0]) != t % NX || int'(tile_out_data[t][7:4]) != t / NX) noc_bad++;
      end
  end

  task automatic noc_traffic();
    for (int t = 0; t < N; t++) begin
      fork
        automatic int tt = t;
        for (int m = 0; m < 5; m++) begin
          automatic int d = (tt + 5 + m) % N;
          @(negedge clk);
          tile_in_valid[tt] = 1;
          tile_in_data[tt] = {8'(tt), 8'(m), 8'd0, 4'(d / NX), 4'(d % NX)};
          @(posedge clk); while (!tile_in_ready[tt]) @(posedge clk);
          noc_sent++;
          @(negedge clk) tile_in_valid[tt] = 0;
          repeat ($urandom_range(0, 20)) @(posedge clk);
        end
      join_none
    end
  endtask

  // ---------------- runs ----------------
  task automatic reset_all();
    @(negedge clk);
    rst_n = 0; mem_rst_n = 0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1; mem_rst_n = 1;
    repeat (4) @(posedge clk);
  endtask

  // runs the given tiles; returns the longest execution time
  task automatic run(string name, bit en, pf_dist_e d, int dly, int n_acc, int ntiles,
                     int run_base, output int exec_cycles, input bit keep = 0);
    int tmo = 0, errs = 0, pfh = 0;
    cfg_pf_enable = en; cfg_pf_distance = d;
    if (!keep) reset_all();
    base = run_base; nacc = n_acc; delay = dly;
    @(negedge clk);
    for (int t = 0; t < ntiles; t++) start[t] = 1;
    forever begin
      automatic bit all = 1;
      @(posedge clk);
      for (int t = 0; t < ntiles; t++) all &= done[t];
      if (all) break;
      tmo++;
      if (tmo > 400000) break;
    end
    check(tmo <= 400000, $sformatf("%s: all tiles finished", name));
    @(negedge clk);
    for (int t = 0; t < N; t++) start[t] = 0;
    exec_cycles = 0;
    for (int t = 0; t < ntiles; t++) begin
      if (cycles[t] > exec_cycles) exec_cycles = cycles[t];
      errs += errors[t];
      pfh += pf_hits[t];
    end
    check(errs == 0, $sformatf("%s: read data and destinations correct", name));
    $display("%-22s cycles %6d  prefetch hits %4d  memory busy %0d of %0d mem cycles",
             name, exec_cycles, pfh, mem_busy, 2 * exec_cycles);
    repeat (5) @(posedge clk);
  endtask

  int t [10];
  int dummy;

  initial begin
    cfg_pf_enable = 0; cfg_pf_distance = DIST_1;
    for (int t = 0; t < N; t++) begin
      start[t] = 0; tile_in_valid[t] = 0; tile_in_data[t] = '0; tile_out_ready[t] = 1;
    end
    base = 0; nacc = 0; delay = 0;
    {c_demand, c_write, c_snew, c_shit, c_hit, c_alloc, c_drop, c_dup, c_disp,
     c_squash, c_recent, c_sqfull, c_rd, c_pf, c_inv} = '0;

    // one read from tile 0: the tree and the prefetch unit add 20 cycles
    run("single read", 0, DIST_1, 0, 1, 1, 7, dummy);
    check((t_leaf_rsp - t_leaf_req) - (t_pu_in - t_pu_out) == 20,
          $sformatf("tree + prefetch unit round trip %0d cycles, expected 20",
                    (t_leaf_rsp - t_leaf_req) - (t_pu_in - t_pu_out)));
    $display("single read: %0d cycles in total, %0d of them beyond the prefetch unit",
             t_leaf_rsp - t_leaf_req, t_pu_in - t_pu_out);

    // mesh messages while the tree is busy
    reset_all();
    fork noc_traffic(); join_none
    run("16 tiles, bypass, delay 300", 0, DIST_1, 300, NACC, 16, 1000, t[0], 1);
    check(noc_recv == noc_sent && noc_sent == 5 * N && noc_bad == 0,
          $sformatf("mesh delivered %0d of %0d messages during memory traffic", noc_recv, noc_sent));
    run("16 tiles, d1, delay 300", 1, DIST_1, 300, NACC, 16, 2000, t[1]);
    run("8 tiles, bypass, delay 150", 0, DIST_1, 150, NACC, 8, 3000, t[2]);
    run("8 tiles, d1, delay 150", 1, DIST_1, 150, NACC, 8, 4000, t[3]);
    run("4 tiles, bypass, delay 30", 0, DIST_1, 30, NACC, 4, 5000, t[4]);
    run("4 tiles, d1, delay 30", 1, DIST_1, 30, NACC, 4, 6000, t[5]);
    run("4 tiles, d2, delay 30", 1, DIST_2, 30, NACC, 4, 7000, t[6]);
    run("4 tiles, d4, delay 30", 1, DIST_4, 30, NACC, 4, 8000, t[7]);
    run("16 tiles, bypass, delay 0", 0, DIST_1, 0, NACC, 16, 9000, t[8]);
    run("16 tiles, d4, delay 0", 1, DIST_4, 0, NACC, 16, 10000, t[9]);

    $display("normalised execution time (bypass / prefetch):");
    $display("  16 tiles delay 300 d1 %0.2f", real'(t[0]) / t[1]);
    $display("  8 tiles delay 150 d1 %0.2f", real'(t[2]) / t[3]);
    $display("  4 tiles delay 30 d1 %0.2f d2 %0.2f d4 %0.2f",
             real'(t[4]) / t[5], real'(t[4]) / t[6], real'(t[4]) / t[7]);
    $display("  16 tiles delay 0 d4 %0.2f", real'(t[8]) / t[9]);
    check(t[1] < t[0], "prefetching shortens the 16-tile run at light load");
    check(t[7] < t[4], "prefetching at distance 4 shortens the 4-tile run");

    $display("events: demand %0d write %0d stream_new %0d stream_hit %0d hit_notify %0d",
             c_demand, c_write, c_snew, c_shit, c_hit);
    $display("        pf_alloc %0d pf_dispatch %0d pf_dup %0d pf_drop %0d squash %0d recent_discard %0d",
             c_alloc, c_disp, c_dup, c_drop, c_squash, c_recent);
    $display("        squash_full %0d resp_read %0d resp_pf %0d wr_invalidate %0d",
             c_sqfull, c_rd, c_pf, c_inv);
    check(c_demand > 0, "demand reads happened");
    check(c_write > 0, "writes happened");
    check(c_snew > 0, "new streams happened");
    check(c_shit > 0, "stream continued by a miss happened");
    check(c_hit > 0, "stream continued by a hit notification happened");
    check(c_alloc > 0 && c_disp > 0, "prefetches issued");
    check(c_squash > 0, "demand coalesced with a pending prefetch");
    check(c_recent > 0, "demand served by a recent prefetch");
    check(c_pf > 0 && c_rd > 0, "both response kinds delivered");
    check(c_inv > 0, "write cleared a recent prefetch");
    check(c_drop > 0, "prefetch refused by a full prefetch buffer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
