// tb_pu_stream_buffers -- self-checking test of the stream table.
// Directed part: a new stream is found only for its own CPU, the ninth new
// stream of a CPU replaces its oldest entry (circular replacement), and an
// update moves an entry to a new address. Random part: a reference model
// of 16 CPUs x 8 entries is driven alongside the table and every lookup is
// compared.
module tb_pu_stream_buffers;
  import bt_pkg::*;
  localparam int NCPU = 16, NS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [CPU_W-1:0]  lk_cpu, upd_cpu, alloc_cpu;
  logic [ADDR_W-1:0] lk_addr, upd_addr, alloc_addr;
  logic              lk_hit, upd_en, alloc_en;
  logic [2:0]        lk_idx, upd_idx;

  pu_stream_buffers #(.NCPU(NCPU), .NSTREAM(NS)) dut (.*);

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

  // reference model
  logic [ADDR_W-1:0] m_addr [NCPU][NS];
  bit                m_val  [NCPU][NS];
  int                m_ptr  [NCPU];

  task automatic model_lookup(int c, logic [ADDR_W-1:0] a, output bit hit, output int idx);
    hit = 0; idx = 0;
    for (int s = 0; s < NS; s++)
      if (!hit && m_val[c][s] && m_addr[c][s] == a) begin hit = 1; idx = s; end
  endtask

  task automatic do_alloc(int c, logic [ADDR_W-1:0] a);
    @(negedge clk);
    alloc_en = 1; alloc_cpu = CPU_W'(c); alloc_addr = a;
    @(posedge clk); #1 alloc_en = 0;
    m_addr[c][m_ptr[c]] = a; m_val[c][m_ptr[c]] = 1; m_ptr[c] = (m_ptr[c] + 1) % NS;
  endtask

  task automatic do_update(int c, int idx, logic [ADDR_W-1:0] a);
    @(negedge clk);
    upd_en = 1; upd_cpu = CPU_W'(c); upd_idx = 3'(idx); upd_addr = a;
    @(posedge clk); #1 upd_en = 0;
    m_addr[c][idx] = a; m_val[c][idx] = 1;
  endtask

  task automatic lookup_check(int c, logic [ADDR_W-1:0] a, string what);
    bit h; int i;
    @(negedge clk);
    lk_cpu = CPU_W'(c); lk_addr = a;
    #1;
    model_lookup(c, a, h, i);
    check(lk_hit == h && (!h || int'(lk_idx) == i),
          $sformatf("%s: cpu %0d addr %0d hit %0d/%0d idx %0d/%0d", what, c, a, lk_hit, h, lk_idx, i));
  endtask

  initial begin
    upd_en = 0; alloc_en = 0; lk_cpu = 0; lk_addr = 0;
    upd_cpu = 0; upd_idx = 0; upd_addr = 0; alloc_cpu = 0; alloc_addr = 0;
    for (int c = 0; c < NCPU; c++) begin
      m_ptr[c] = 0;
      for (int s = 0; s < NS; s++) begin m_val[c][s] = 0; m_addr[c][s] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    lookup_check(3, 100, "empty table misses");
    do_alloc(3, 100);
    lookup_check(3, 100, "new stream found");
    check(lk_hit && lk_idx == 0, "new stream in entry 0");
    lookup_check(4, 100, "other CPU does not see it");
    check(!lk_hit, "other CPU misses");
    for (int n = 1; n <= 8; n++) do_alloc(3, ADDR_W'(100 + n));
    lookup_check(3, 100, "oldest stream replaced");
    check(!lk_hit, "ninth stream replaced the first");
    lookup_check(3, 108, "ninth stream");
    check(lk_hit && lk_idx == 0, "ninth stream in entry 0");
    do_update(3, 1, 200);
    lookup_check(3, 101, "updated entry left old address");
    check(!lk_hit, "old address gone after update");
    lookup_check(3, 200, "updated entry");
    check(lk_hit && lk_idx == 1, "update kept the entry");

    // random operations against the model
    for (int n = 0; n < 3000; n++) begin
      automatic int c = $urandom_range(0, 5);
      automatic logic [ADDR_W-1:0] a = ADDR_W'($urandom_range(0, 40));
      automatic int op = $urandom_range(0, 2);
      if (op == 0) do_alloc(c, a);
      else if (op == 1) do_update(c, $urandom_range(0, NS - 1), a);
      lookup_check(c, ADDR_W'($urandom_range(0, 40)), "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
