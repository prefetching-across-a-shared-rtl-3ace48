// tb_bt_mux -- self-checking test of one shared memory tree node.
// Checks the 2-cycle crossing in both directions, that the two children are
// served alternately when both have requests, that every packet arrives
// once and in order under random back-pressure, and that responses reach
// the child selected by the CPU number bit.
module tb_bt_mux;
  import bt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    c_up_valid [2], c_up_ready [2];
  bt_pkt_t c_up_pkt   [2];
  logic    p_up_valid, p_up_ready;
  bt_pkt_t p_up_pkt;
  logic    p_dn_valid, p_dn_ready;
  bt_pkt_t p_dn_pkt;
  logic    c_dn_valid [2], c_dn_ready [2];
  bt_pkt_t c_dn_pkt   [2];

  bt_mux #(.SEL_BIT(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bt_pkt_t mk(int c, int n);
    bt_pkt_t p = '0;
    p.typ = BT_READ; p.cpu = CPU_W'(c); p.addr = ADDR_W'(n); p.data = 32'(n * 7 + c);
    return p;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat;
  bt_pkt_t exp_q [2][$];
  int got [2];
  int last_child, alternations;

  initial begin
    c_up_valid = '{0, 0}; c_up_pkt = '{default: '0};
    p_up_ready = 1'b1; p_dn_valid = 1'b0; p_dn_pkt = '0; c_dn_ready = '{1, 1};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. single request latency
    @(negedge clk);
    c_up_valid[0] = 1'b1; c_up_pkt[0] = mk(0, 99);
    lat = 0;
    @(posedge clk); #1 c_up_valid[0] = 1'b0;
    lat = 1;
    while (!p_up_valid) begin @(posedge clk); #1 lat++; end
    check(lat == 2, $sformatf("up crossing takes %0d cycles, expected 2", lat));
    check(p_up_pkt == mk(0, 99), "up packet contents");
    @(posedge clk);

    // 2. single response latency and steering
    @(negedge clk);
    p_dn_valid = 1'b1; p_dn_pkt = mk(4, 5);   // cpu bit 2 set -> child 1
    @(posedge clk); #1 p_dn_valid = 1'b0;
    lat = 1;
    while (!c_dn_valid[1]) begin @(posedge clk); #1 lat++; end
    check(lat == 2, $sformatf("down crossing takes %0d cycles, expected 2", lat));
    check(c_dn_pkt[1] == mk(4, 5), "down packet contents");
    check(!c_dn_valid[0], "down packet not sent to the other child");
    @(posedge clk);

    // 3. both children saturate: alternate grants, order per child
    fork
      begin
        for (int n = 0; n < 20; n++) begin
          @(negedge clk);
          c_up_valid[0] = 1'b1; c_up_pkt[0] = mk(0, n); exp_q[0].push_back(mk(0, n));
          @(posedge clk); while (!c_up_ready[0]) @(posedge clk);
        end
        @(negedge clk) c_up_valid[0] = 1'b0;
      end
      begin
        for (int n = 0; n < 20; n++) begin
          @(negedge clk);
          c_up_valid[1] = 1'b1; c_up_pkt[1] = mk(8, 100 + n); exp_q[1].push_back(mk(8, 100 + n));
          @(posedge clk); while (!c_up_ready[1]) @(posedge clk);
        end
        @(negedge clk) c_up_valid[1] = 1'b0;
      end
      begin
        got = '{0, 0}; last_child = -1; alternations = 0;
        while (got[0] + got[1] < 40) begin
          @(posedge clk);
          if (p_up_valid && p_up_ready) begin
            automatic int ch;
            automatic bt_pkt_t e;
            ch = (p_up_pkt.cpu == 0) ? 0 : 1;
            e = exp_q[ch].pop_front();
            check(p_up_pkt == e, $sformatf("child %0d packet %0d in order", ch, got[ch]));
            if (ch != last_child) alternations++;
            last_child = ch;
            got[ch]++;
          end
        end
      end
    join
    check(alternations >= 38, $sformatf("round-robin alternated %0d times of 40", alternations));

    // 4. random back-pressure on both directions
    fork
      begin
        for (int n = 0; n < 50; n++) begin
          @(negedge clk);
          p_dn_valid = 1'b1; p_dn_pkt = mk(n % 8, n);
          @(posedge clk); while (!p_dn_ready) @(posedge clk);
        end
        @(negedge clk) p_dn_valid = 1'b0;
      end
      begin
        int tot = 0;
        int nxt [2];
        nxt = '{0, 4};
        while (tot < 50) begin
          @(negedge clk);
          c_dn_ready[0] = $urandom_range(0, 1); c_dn_ready[1] = $urandom_range(0, 1);
          @(posedge clk);
          for (int c = 0; c < 2; c++)
            if (c_dn_valid[c] && c_dn_ready[c]) begin
              check(c_dn_pkt[c].cpu[2] == 1'(c), "response on the right child");
              check(int'(c_dn_pkt[c].addr) == nxt[c],
                    $sformatf("child %0d response %0d in order", c, nxt[c]));
              nxt[c]++;
              if (nxt[c] % 4 == 0) nxt[c] += 4;   // skip the other child's numbers
              tot++;
            end
        end
      end
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
