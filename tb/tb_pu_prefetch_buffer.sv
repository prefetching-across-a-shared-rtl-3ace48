// tb_pu_prefetch_buffer -- self-checking test of the prefetch buffer.
// Directed part: prefetches leave in the order they entered with their slot
// as tag; a completed slot reads as RECENT; once all 32 slots are pending a
// new prefetch is refused, and a RECENT slot may be overwritten; a write
// clears a RECENT slot. Random part: allocations, dispatches, completions
// and writes are applied to the buffer and to a reference model, and every
// output is compared each cycle.
module tb_pu_prefetch_buffer;
  import bt_pkg::*;
  localparam int DEPTH = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [CPU_W-1:0]  a_cpu, b_cpu, alloc_cpu, disp_cpu;
  logic [ADDR_W-1:0] a_addr, b_addr, alloc_addr, disp_addr, inv_addr;
  logic a_pending, a_recent, b_hit, alloc_en, alloc_ok, disp_valid, disp_take;
  logic [4:0] disp_tag, cmpl_tag;
  logic cmpl_en, inv_en, inv_hit;
  logic [5:0] queued_count;

  pu_prefetch_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model: 0 invalid, 1 queued, 2 issued, 3 recent
  int m_st [DEPTH];
  int m_cpu [DEPTH];
  int m_addr [DEPTH];
  int m_ap, m_dp, m_q;

  task automatic idle();
    alloc_en = 0; disp_take = 0; cmpl_en = 0; inv_en = 0;
  endtask

  // compare outputs with the model (inputs already applied)
  task automatic compare(string what);
    bit ap = 0, ar = 0, bh = 0, ih = 0;
    for (int i = 0; i < DEPTH; i++) begin
      if (m_st[i] != 0 && m_cpu[i] == int'(a_cpu) && m_addr[i] == int'(a_addr)) begin
        if (m_st[i] == 3) ar = 1; else ap = 1;
      end
      if (m_st[i] != 0 && m_cpu[i] == int'(b_cpu) && m_addr[i] == int'(b_addr)) bh = 1;
      if (inv_en && m_st[i] == 3 && m_addr[i] == int'(inv_addr)) ih = 1;
    end
    check(a_pending == ap && a_recent == ar, $sformatf("%s: lookup a", what));
    check(b_hit == bh, $sformatf("%s: lookup b", what));
    check(inv_hit == ih, $sformatf("%s: write hit", what));
    check(alloc_ok == (m_st[m_ap] == 0 || m_st[m_ap] == 3), $sformatf("%s: alloc_ok", what));
    check(disp_valid == (m_q != 0), $sformatf("%s: disp_valid", what));
    check(int'(queued_count) == m_q, $sformatf("%s: queued count", what));
    if (m_q != 0)
      check(int'(disp_tag) == m_dp && int'(disp_addr) == m_addr[m_dp] &&
            int'(disp_cpu) == m_cpu[m_dp], $sformatf("%s: dispatch head", what));
  endtask

  // clock edge: update the model the same way
  task automatic step();
    bit da, dd;
    da = alloc_en && (m_st[m_ap] == 0 || m_st[m_ap] == 3);
    dd = disp_take && (m_q != 0);
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++)
      if (inv_en && m_st[i] == 3 && m_addr[i] == int'(inv_addr)) m_st[i] = 0;
    if (cmpl_en && m_st[cmpl_tag] == 2) m_st[cmpl_tag] = 3;
    if (dd) begin m_st[m_dp] = 2; m_dp = (m_dp + 1) % DEPTH; m_q--; end
    if (da) begin
      m_st[m_ap] = 1; m_cpu[m_ap] = int'(alloc_cpu); m_addr[m_ap] = int'(alloc_addr);
      m_ap = (m_ap + 1) % DEPTH; m_q++;
    end
    #1;
  endtask

  int issued [$];

  initial begin
    idle();
    a_cpu = 0; a_addr = 0; b_cpu = 0; b_addr = 0; alloc_cpu = 0; alloc_addr = 0;
    cmpl_tag = 0; inv_addr = 0;
    for (int i = 0; i < DEPTH; i++) begin m_st[i] = 0; m_cpu[i] = 0; m_addr[i] = 0; end
    m_ap = 0; m_dp = 0; m_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // four prefetches in, dispatched in order with tags 0..3
    for (int n = 0; n < 4; n++) begin
      alloc_en = 1; alloc_cpu = 2; alloc_addr = ADDR_W'(50 + n);
      compare("alloc"); step(); idle();
    end
    a_cpu = 2; a_addr = 51; #1;
    check(a_pending && !a_recent, "queued prefetch is pending");
    for (int n = 0; n < 4; n++) begin
      disp_take = 1; #1;
      check(disp_valid && disp_tag == 5'(n) && disp_addr == ADDR_W'(50 + n),
            $sformatf("dispatch %0d in order", n));
      compare("dispatch"); step(); idle();
    end
    check(!disp_valid, "queue empty after four dispatches");
    cmpl_en = 1; cmpl_tag = 1; step(); idle();
    a_cpu = 2; a_addr = 51; #1;
    check(a_recent && !a_pending, "completed prefetch is recent");
    inv_en = 1; inv_addr = 51; #1;
    check(inv_hit, "write to a recent line hits");
    step(); idle(); #1;
    check(!a_recent && !a_pending, "write cleared the recent slot");

    // fill the remaining slots; slot 0 still issued, so the 33rd is refused
    for (int n = 4; n < DEPTH; n++) begin
      alloc_en = 1; alloc_cpu = 3; alloc_addr = ADDR_W'(100 + n);
      compare("fill"); step(); idle();
    end
    #1;
    check(!alloc_ok, "buffer full of pending prefetches refuses a new one");
    cmpl_en = 1; cmpl_tag = 0; step(); idle(); #1;
    check(alloc_ok, "recent slot can be overwritten");
    alloc_en = 1; alloc_cpu = 4; alloc_addr = 999; step(); idle();
    a_cpu = 4; a_addr = 999; #1;
    check(a_pending, "overwritten slot holds the new prefetch");

    // random operations against the model
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      alloc_en   = ($urandom_range(0, 2) == 0);
      alloc_cpu  = CPU_W'($urandom_range(0, 3));
      alloc_addr = ADDR_W'($urandom_range(0, 30));
      disp_take  = ($urandom_range(0, 2) == 0);
      cmpl_en    = ($urandom_range(0, 1) == 0);
      cmpl_tag   = 5'($urandom_range(0, DEPTH - 1));
      inv_en     = ($urandom_range(0, 4) == 0);
      inv_addr   = ADDR_W'($urandom_range(0, 30));
      a_cpu = CPU_W'($urandom_range(0, 3)); a_addr = ADDR_W'($urandom_range(0, 30));
      b_cpu = CPU_W'($urandom_range(0, 3)); b_addr = ADDR_W'($urandom_range(0, 30));
      #1 compare("random");
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
