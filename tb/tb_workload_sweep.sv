// tb_workload_sweep -- the evaluation workloads run on the whole system at
// its default size: tiles reading lines N, N+1, ... with a fixed delay
// between accesses, the delay swept from 300 down to 0 cycles in steps of
// 60, for 16 and 8 tiles at distance 1 and for 4 tiles at distances 1, 2
// and 4. Each point is run once with the prefetch unit bypassed and once
// with it on. The test prints, per point, the memory load of the bypassed
// run (share of cycles with a read outstanding at memory) and the
// normalised execution time (bypassed cycles / prefetching cycles).
// It checks that every run finishes with correct data, that prefetching
// pays off for 4 tiles at light load, and that the gain of 16 tiles at
// the heaviest load is below their best gain.
module tb_workload_sweep;
  import bt_pkg::*;
  localparam int NX = 4, NY = 4, N = NX * NY;
  localparam int NACC = 32;

  logic clk = 1'b0, mem_clk = 1'b0, rst_n = 1'b0, mem_rst_n = 1'b0;
  always #10 clk = ~clk;
  always #5  mem_clk = ~mem_clk;

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
    cpu_tile_model #(.CPU_ID(t)) u_cpu (
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
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles with a read outstanding at memory
  int load_cycles = 0, run_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    run_cycles++;
    if (pu_mem_outstanding != 0) load_cycles++;
  end

  task automatic run(bit en, pf_dist_e d, int dly, int ntiles, output int exec_cycles,
                     output real load);
    int tmo = 0, errs = 0;
    cfg_pf_enable = en; cfg_pf_distance = d;
    @(negedge clk);
    rst_n = 0; mem_rst_n = 0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1; mem_rst_n = 1;
    repeat (4) @(posedge clk);
    base = 1000 * dly; nacc = NACC; delay = dly;
    @(negedge clk);
    load_cycles = 0; run_cycles = 0;
    for (int t = 0; t < ntiles; t++) start[t] = 1;
    forever begin
      automatic bit all = 1;
      @(posedge clk);
      for (int t = 0; t < ntiles; t++) all &= done[t];
      if (all) break;
      tmo++;
      if (tmo > 400000) break;
    end
    load = real'(load_cycles) / real'(run_cycles);
    @(negedge clk);
    for (int t = 0; t < N; t++) start[t] = 0;
    exec_cycles = 0;
    for (int t = 0; t < ntiles; t++) begin
      if (cycles[t] > exec_cycles) exec_cycles = cycles[t];
      errs += errors[t];
    end
    check(tmo <= 400000 && errs == 0,
          $sformatf("%0d tiles, delay %0d, prefetch %0d: finished with correct data", ntiles, dly, en));
    repeat (5) @(posedge clk);
  endtask

  int   ntl [5] = '{16, 8, 4, 4, 4};
  pf_dist_e dst [5] = '{DIST_1, DIST_1, DIST_1, DIST_2, DIST_4};
  real  speed [5][6];
  int   tb_cyc, tp_cyc;
  real  ld, ld2;

  initial begin
    cfg_pf_enable = 0; cfg_pf_distance = DIST_1;
    for (int t = 0; t < N; t++) begin
      start[t] = 0; tile_in_valid[t] = 0; tile_in_data[t] = '0; tile_out_ready[t] = 1;
    end
    base = 0; nacc = 0; delay = 0;

    $display("tiles distance delay  memory-load  normalised-execution-time");
    for (int c = 0; c < 5; c++) begin
      for (int k = 0; k < 6; k++) begin
        automatic int dly = 300 - 60 * k;
        run(0, DIST_1, dly, ntl[c], tb_cyc, ld);
        run(1, dst[c], dly, ntl[c], tp_cyc, ld2);
        speed[c][k] = real'(tb_cyc) / real'(tp_cyc);
        $display("%5d %8d %5d  %10.2f  %8.2f", ntl[c], 1 << int'(dst[c]), dly, ld, speed[c][k]);
      end
    end

    check(speed[4][4] > 1.0, "4 tiles, distance 4, delay 60: prefetching pays off");
    check(speed[2][4] > 1.0, "4 tiles, distance 1, delay 60: prefetching pays off");
    begin
      real best = 0.0;
      for (int k = 0; k < 6; k++) if (speed[0][k] > best) best = speed[0][k];
      check(speed[0][5] < best, "16 tiles: gain at delay 0 below the best gain");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
