// tb_bt_tree -- self-checking test of the shared memory tree with 16 leaves.
// A single request must reach the root after 8 cycles (4 levels x 2) and a
// response must reach its leaf after 8 cycles. Then every leaf sends a
// burst of reads at once; a loop-back at the root turns each into a
// response, and each leaf must get back exactly its own packets, in order.
module tb_bt_tree;
  import bt_pkg::*;
  localparam int NLEAF = 16;
  localparam int PER_LEAF = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    leaf_up_valid [NLEAF], leaf_up_ready [NLEAF];
  bt_pkt_t leaf_up_pkt   [NLEAF];
  logic    leaf_dn_valid [NLEAF], leaf_dn_ready [NLEAF];
  bt_pkt_t leaf_dn_pkt   [NLEAF];
  logic    root_up_valid, root_up_ready, root_dn_valid, root_dn_ready;
  bt_pkt_t root_up_pkt, root_dn_pkt;

  bt_tree #(.NLEAF(NLEAF)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bt_pkt_t mk(int c, int n);
    bt_pkt_t p = '0;
    p.typ = BT_READ; p.cpu = CPU_W'(c); p.addr = ADDR_W'(c * 1000 + n);
    return p;
  endfunction

  bit loopback = 0;
  // loop-back at the root: one cycle, unlimited rate
  always_comb begin
    root_dn_valid = loopback && root_up_valid;
    root_dn_pkt   = root_up_pkt;
    root_dn_pkt.typ = BT_RD_RESP;
    root_up_ready = loopback ? root_dn_ready : 1'b0;
  end

  int lat;
  int got [NLEAF];
  int total;

  initial begin
    leaf_up_valid = '{default: 0}; leaf_up_pkt = '{default: '0};
    leaf_dn_ready = '{default: 1};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // latency up from leaf 13 (loop-back off: the packet waits at the root)
    @(negedge clk);
    leaf_up_valid[13] = 1'b1; leaf_up_pkt[13] = mk(13, 0);
    @(posedge clk); #1 leaf_up_valid[13] = 1'b0;
    lat = 1;
    while (!root_up_valid && lat < 100) begin @(posedge clk); #1 lat++; end
    check(lat == 8, $sformatf("leaf to root takes %0d cycles, expected 8", lat));
    check(root_up_pkt == mk(13, 0), "root packet contents");
    // latency down: release it through the loop-back
    @(negedge clk) loopback = 1;
    @(posedge clk); #1 lat = 1;
    while (!leaf_dn_valid[13] && lat < 100) begin @(posedge clk); #1 lat++; end
    check(lat == 8, $sformatf("root to leaf takes %0d cycles, expected 8", lat));
    check(leaf_dn_pkt[13].addr == mk(13, 0).addr, "response at leaf 13");
    @(posedge clk);

    // all leaves at once
    got = '{default: 0}; total = 0;
    fork
      for (int c = 0; c < NLEAF; c++) begin
        fork
          automatic int cc = c;
          begin
            for (int n = 0; n < PER_LEAF; n++) begin
              @(negedge clk);
              leaf_up_valid[cc] = 1'b1; leaf_up_pkt[cc] = mk(cc, n);
              @(posedge clk); while (!leaf_up_ready[cc]) @(posedge clk);
            end
            @(negedge clk) leaf_up_valid[cc] = 1'b0;
          end
        join_none
      end
      begin
        while (total < NLEAF * PER_LEAF) begin
          @(negedge clk);
          for (int c = 0; c < NLEAF; c++) leaf_dn_ready[c] = ($urandom_range(0, 3) != 0);
          @(posedge clk);
          for (int c = 0; c < NLEAF; c++)
            if (leaf_dn_valid[c] && leaf_dn_ready[c]) begin
              check(leaf_dn_pkt[c].cpu == CPU_W'(c) &&
                    leaf_dn_pkt[c].addr == mk(c, got[c]).addr,
                    $sformatf("leaf %0d response %0d", c, got[c]));
              got[c]++;
              total++;
            end
        end
      end
    join
    repeat (20) @(posedge clk);
    for (int c = 0; c < NLEAF; c++)
      check(got[c] == PER_LEAF && !leaf_dn_valid[c], $sformatf("leaf %0d got all", c));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
