// tb_prefetch_unit -- self-checking test of the prefetch unit on its own.
// The test plays both the tree (requests in, responses out) and the memory
// (requests out, responses in) and walks through each rule of the unit:
// 2-cycle crossing in both directions; a new stream; a stream continued by
// a miss with a prefetch of addr+D; prefetch responses delivered as
// prefetches; a demand for a RECENT line dropped; a hit notification
// continuing a stream; a demand coalesced (squashed) with a pending
// prefetch and its response delivered as a standard read; demand reads
// overtaking a queued prefetch; distances 2 and 4; a duplicate prefetch not
// repeated; a write clearing a RECENT line; and the bypass mode.
module tb_prefetch_unit;
  import bt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       cfg_enable;
  pf_dist_e   cfg_distance;
  logic       up_valid, up_ready, dn_valid, dn_ready;
  bt_pkt_t    up_pkt, dn_pkt;
  logic       mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  bt_pkt_t    mem_req_pkt, mem_rsp_pkt;
  pu_events_t ev;
  logic [15:0] mem_outstanding;
  logic [5:0] pf_queued, sq_count;

  prefetch_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // monitors
  bt_pkt_t mq [$];  int mq_t [$];
  bt_pkt_t dq [$];  int dq_t [$];
  int n_squash = 0, n_recent = 0, n_dup = 0;
  always @(posedge clk) if (rst_n) begin
    if (mem_req_valid && mem_req_ready) begin mq.push_back(mem_req_pkt); mq_t.push_back(cyc); end
    if (dn_valid && dn_ready) begin dq.push_back(dn_pkt); dq_t.push_back(cyc); end
    if (ev.squash) n_squash++;
    if (ev.recent_discard) n_recent++;
    if (ev.pf_dup) n_dup++;
  end

  function automatic bt_pkt_t req(bt_type_e t, int c, int a);
    bt_pkt_t p = '0;
    p.typ = t; p.cpu = CPU_W'(c); p.addr = ADDR_W'(a); p.data = 32'(a * 3);
    return p;
  endfunction

  int t_acc;
  task automatic send_up(bt_pkt_t p);
    @(negedge clk);
    up_valid = 1'b1; up_pkt = p;
    @(posedge clk);
    while (!up_ready) @(posedge clk);
    t_acc = cyc;
    #1 up_valid = 1'b0;
  endtask

  task automatic send_rsp(bt_pkt_t r);
    @(negedge clk);
    mem_rsp_valid = 1'b1; mem_rsp_pkt = r; mem_rsp_pkt.data = ~r.addr;
    @(posedge clk);
    while (!mem_rsp_ready) @(posedge clk);
    t_acc = cyc;
    #1 mem_rsp_valid = 1'b0;
  endtask

  task automatic settle(int n = 6);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // expect exactly the listed memory requests since the queue was cleared
  task automatic expect_mem(string what, bt_pkt_t exp [$]);
    check(mq.size() == exp.size(), $sformatf("%s: %0d memory requests, expected %0d", what, mq.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < mq.size(); i++)
      check(mq[i].typ == exp[i].typ && mq[i].cpu == exp[i].cpu && mq[i].addr == exp[i].addr &&
            mq[i].pf == exp[i].pf,
            $sformatf("%s: request %0d is %s cpu %0d addr %0d pf %0d", what, i,
                      mq[i].typ.name(), mq[i].cpu, mq[i].addr, mq[i].pf));
  endtask

  function automatic bt_pkt_t pfr(int c, int a);
    bt_pkt_t p = req(BT_READ, c, a);
    p.pf = 1'b1;
    return p;
  endfunction

  bt_pkt_t pf102, pf103, r;
  int t0;

  initial begin
    cfg_enable = 1'b1; cfg_distance = DIST_1;
    up_valid = 0; up_pkt = '0; dn_ready = 1; mem_req_ready = 1; mem_rsp_valid = 0; mem_rsp_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    settle(2);

    // 1. first miss: new stream, demand only, 2-cycle crossing
    send_up(req(BT_READ, 0, 100)); t0 = t_acc;
    settle();
    expect_mem("new stream", '{req(BT_READ, 0, 100)});
    check(mq_t.size() > 0 && mq_t[0] - t0 == 2, "request crosses the unit in 2 cycles");
    mq.delete(); mq_t.delete();

    // 2. next miss continues the stream: demand 101 then prefetch 102
    send_up(req(BT_READ, 0, 101));
    settle();
    expect_mem("stream continued", '{req(BT_READ, 0, 101), pfr(0, 102)});
    pf102 = mq[1];
    mq.delete(); mq_t.delete();

    // 3. responses: demand -> standard read, prefetch -> prefetch
    r = req(BT_READ, 0, 100); send_rsp(r); t0 = t_acc;
    settle();
    check(dq.size() == 1 && dq[0].typ == BT_RD_RESP && dq[0].addr == 100, "demand response is a standard read");
    check(dq_t.size() == 1 && dq_t[0] - t0 == 2, "response crosses the unit in 2 cycles");
    check(dq.size() == 1 && dq[0].data == ~32'(100), "response data passed");
    dq.delete(); dq_t.delete();
    send_rsp(pf102);
    settle();
    check(dq.size() == 1 && dq[0].typ == BT_PF_RESP && dq[0].addr == 102 && dq[0].cpu == 0,
          "prefetch response delivered as a prefetch");
    dq.delete(); dq_t.delete();

    // 4. demand for a RECENT line is dropped
    send_up(req(BT_READ, 0, 102));
    settle();
    expect_mem("recent line", '{});
    check(n_recent == 1, "recent discard seen");

    // 5. hit notification continues the stream: prefetch 103
    send_up(req(BT_HIT, 0, 102));
    settle();
    expect_mem("hit notification", '{pfr(0, 103)});
    pf103 = mq[0];
    mq.delete(); mq_t.delete();

    // 6. demand for the pending 103 is squashed; its response becomes a standard read
    send_up(req(BT_READ, 0, 103));
    settle();
    expect_mem("squash", '{});
    check(n_squash == 1 && sq_count == 1, "demand recorded in the squash buffer");
    send_rsp(pf103);
    settle();
    check(dq.size() == 1 && dq[0].typ == BT_RD_RESP && dq[0].addr == 103,
          "squashed demand answered as a standard read");
    check(sq_count == 0, "squash entry freed");
    dq.delete(); dq_t.delete();

    // 7. demand reads go before a queued prefetch
    @(negedge clk) mem_req_ready = 1'b0;
    send_up(req(BT_READ, 1, 200));
    send_up(req(BT_READ, 1, 201));        // queues prefetch 202
    fork send_up(req(BT_READ, 2, 300)); join_none
    settle(4);
    check(pf_queued == 1, "prefetch waiting while memory is busy");
    @(negedge clk) mem_req_ready = 1'b1;
    settle(8);
    expect_mem("priority", '{req(BT_READ, 1, 200), req(BT_READ, 1, 201), req(BT_READ, 2, 300), pfr(1, 202)});
    mq.delete(); mq_t.delete();

    // 8. distance 4 and 2
    @(negedge clk) cfg_distance = DIST_4;
    for (int a = 400; a <= 405; a++) send_up(req(BT_READ, 3, a));
    settle();
    expect_mem("distance 4", '{req(BT_READ, 3, 400), req(BT_READ, 3, 401), req(BT_READ, 3, 402),
                                req(BT_READ, 3, 403), req(BT_READ, 3, 404), req(BT_READ, 3, 405),
                                pfr(3, 408), pfr(3, 409)});
    mq.delete(); mq_t.delete();
    @(negedge clk) cfg_distance = DIST_2;
    send_up(req(BT_READ, 4, 500));
    send_up(req(BT_READ, 4, 502));
    settle();
    expect_mem("distance 2", '{req(BT_READ, 4, 500), req(BT_READ, 4, 502), pfr(4, 504)});
    mq.delete(); mq_t.delete();

    // 9. the same prefetch is not issued twice. CPU 4 now has a stream
    //    ending at 504 (prefetch pending); a repeated miss on 502 starts a
    //    second stream at 502.
    send_up(req(BT_READ, 4, 502));
    settle();
    mq.delete(); mq_t.delete();
    send_up(req(BT_HIT, 4, 504));    // stream at 504 -> prefetch 506
    send_up(req(BT_HIT, 4, 502));    // stream at 502 -> 504 already pending
    settle();
    expect_mem("duplicate prefetch", '{pfr(4, 506)});
    check(n_dup == 1, "duplicate prefetch detected");
    mq.delete(); mq_t.delete();

    // 10. a write clears a RECENT line: the next demand goes to memory
    @(negedge clk) cfg_distance = DIST_1;
    send_up(req(BT_WRITE, 0, 102));
    settle();
    expect_mem("write", '{req(BT_WRITE, 0, 102)});
    mq.delete(); mq_t.delete();
    send_up(req(BT_READ, 0, 102));
    settle();
    check(mq.size() >= 1 && mq[0].addr == 102 && !mq[0].pf, "demand after write goes to memory");
    mq.delete(); mq_t.delete();

    // 11. bypass: no prefetching at all
    @(negedge clk) cfg_enable = 1'b0;
    for (int a = 600; a < 604; a++) send_up(req(BT_READ, 5, a));
    send_up(req(BT_HIT, 5, 603));
    settle();
    expect_mem("bypass", '{req(BT_READ, 5, 600), req(BT_READ, 5, 601), req(BT_READ, 5, 602),
                            req(BT_READ, 5, 603)});
    mq.delete(); mq_t.delete();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
