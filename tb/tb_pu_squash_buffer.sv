// tb_pu_squash_buffer -- self-checking test of the squash buffer.
// Directed part: an entry is found only by its own {cpu, addr} and is
// freed by a consuming lookup; 32 entries fill the buffer and a 33rd is
// refused. Random part: adds and consuming lookups are compared each
// cycle with a reference model.
module tb_pu_squash_buffer;
  import bt_pkg::*;
  localparam int DEPTH = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic add_en, add_ok, lk_en, lk_hit;
  logic [CPU_W-1:0] add_cpu, lk_cpu;
  logic [ADDR_W-1:0] add_addr, lk_addr;
  logic [5:0] count;

  pu_squash_buffer #(.DEPTH(DEPTH)) dut (.*);

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

  bit m_v [DEPTH];
  int m_c [DEPTH];
  int m_a [DEPTH];
  int m_p;

  task automatic compare(string what);
    bit h = 0; int n = 0;
    for (int i = 0; i < DEPTH; i++) begin
      if (m_v[i] && m_c[i] == int'(lk_cpu) && m_a[i] == int'(lk_addr)) h = 1;
      n += int'(m_v[i]);
    end
    check(lk_hit == h, $sformatf("%s: lookup", what));
    check(add_ok == !m_v[m_p], $sformatf("%s: add_ok", what));
    check(int'(count) == n, $sformatf("%s: count", what));
  endtask

  task automatic step();
    bit da = add_en && !m_v[m_p];
    int p = m_p;
    @(posedge clk);
    if (lk_en)
      for (int i = 0; i < DEPTH; i++)
        if (m_v[i] && m_c[i] == int'(lk_cpu) && m_a[i] == int'(lk_addr)) m_v[i] = 0;
    if (da) begin m_v[p] = 1; m_c[p] = int'(add_cpu); m_a[p] = int'(add_addr); m_p = (p + 1) % DEPTH; end
    #1;
  endtask

  initial begin
    add_en = 0; lk_en = 0; add_cpu = 0; add_addr = 0; lk_cpu = 0; lk_addr = 0;
    for (int i = 0; i < DEPTH; i++) begin m_v[i] = 0; m_c[i] = 0; m_a[i] = 0; end
    m_p = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    add_en = 1; add_cpu = 5; add_addr = 77; step(); add_en = 0;
    lk_cpu = 5; lk_addr = 77; #1;
    check(lk_hit, "entry found by its cpu and address");
    lk_cpu = 6; #1;
    check(!lk_hit, "other cpu does not match");
    lk_cpu = 5; lk_addr = 78; #1;
    check(!lk_hit, "other address does not match");
    lk_addr = 77; lk_en = 1; step(); lk_en = 0; #1;
    check(!lk_hit && count == 0, "consuming lookup frees the entry");

    for (int n = 0; n < DEPTH; n++) begin
      add_en = 1; add_cpu = CPU_W'(n % 16); add_addr = ADDR_W'(n); compare("fill"); step();
    end
    add_en = 0; #1;
    check(!add_ok && count == 6'(DEPTH), "full buffer refuses an entry");

    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      add_en = ($urandom_range(0, 1) == 0);
      add_cpu = CPU_W'($urandom_range(0, 3)); add_addr = ADDR_W'($urandom_range(0, 20));
      lk_en = ($urandom_range(0, 1) == 0);
      lk_cpu = CPU_W'($urandom_range(0, 3)); lk_addr = ADDR_W'($urandom_range(0, 20));
      #1 compare("random");
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
