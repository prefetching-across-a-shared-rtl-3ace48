// tb_bt_cdc_bridge -- self-checking test of the clock domain crossing
// between the prefetch unit (50 MHz tree clock) and memory (100 MHz).
// 200 requests cross upwards and 200 responses cross downwards at the same
// time, with random stalls on both receiving sides; every packet must
// arrive once, unchanged and in order. A single packet must cross within a
// few destination-clock cycles.
module tb_bt_cdc_bridge;
  import bt_pkg::*;
  localparam int N = 200;

  logic clk = 1'b0, mem_clk = 1'b0, rst_n = 1'b0, mem_rst_n = 1'b0;
  always #10 clk = ~clk;        // 50 MHz
  always #5  mem_clk = ~mem_clk; // 100 MHz

  logic    req_valid, req_ready, rsp_valid, rsp_ready;
  bt_pkt_t req_pkt, rsp_pkt;
  logic    mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  bt_pkt_t mem_req_pkt, mem_rsp_pkt;

  bt_cdc_bridge dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bt_pkt_t mk(int n, bt_type_e t);
    bt_pkt_t p = '0;
    p.typ = t; p.cpu = CPU_W'(n); p.addr = ADDR_W'(n * 17 + 3); p.data = 32'(n ^ 32'h5a5a);
    p.tag = TAG_W'(n);
    return p;
  endfunction

  int got_req = 0, got_rsp = 0;
  realtime t_send, t_recv;

  initial begin
    req_valid = 0; req_pkt = '0; rsp_ready = 1; mem_req_ready = 1; mem_rsp_valid = 0; mem_rsp_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; mem_rst_n = 1;
    repeat (2) @(posedge clk);

    // single packet latency
    @(negedge clk);
    req_valid = 1; req_pkt = mk(999, BT_READ);
    @(posedge clk); t_send = $realtime; #1 req_valid = 0;
    while (!mem_req_valid) @(posedge mem_clk);
    t_recv = $realtime;
    check(mem_req_pkt == mk(999, BT_READ), "single packet unchanged");
    check(t_recv - t_send <= 50.0, $sformatf("single packet crossed in %0t", t_recv - t_send));
    @(posedge mem_clk);   // consumed (ready high)
    #1;

    fork
      // tree side sends requests
      begin
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          req_valid = ($urandom_range(0, 3) != 0);
          req_pkt = mk(n, BT_READ);
          if (!req_valid) begin n--; continue; end
          @(posedge clk); while (!req_ready) @(posedge clk);
        end
        @(negedge clk) req_valid = 0;
      end
      // memory side receives requests
      while (got_req < N) begin
        @(negedge mem_clk) mem_req_ready = ($urandom_range(0, 2) != 0);
        @(posedge mem_clk);
        if (mem_req_valid && mem_req_ready) begin
          check(mem_req_pkt == mk(got_req, BT_READ), $sformatf("request %0d", got_req));
          got_req++;
        end
      end
      // memory side sends responses
      begin
        for (int n = 0; n < N; n++) begin
          @(negedge mem_clk);
          mem_rsp_valid = 1; mem_rsp_pkt = mk(n, BT_RD_RESP);
          @(posedge mem_clk); while (!mem_rsp_ready) @(posedge mem_clk);
        end
        @(negedge mem_clk) mem_rsp_valid = 0;
      end
      // tree side receives responses, slowly at times so the FIFO fills
      while (got_rsp < N) begin
        @(negedge clk) rsp_ready = ($urandom_range(0, 3) == 0);
        @(posedge clk);
        if (rsp_valid && rsp_ready) begin
          check(rsp_pkt == mk(got_rsp, BT_RD_RESP), $sformatf("response %0d", got_rsp));
          got_rsp++;
        end
      end
    join
    repeat (10) @(posedge clk);
    check(!rsp_valid && !mem_req_valid, "nothing left over");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
