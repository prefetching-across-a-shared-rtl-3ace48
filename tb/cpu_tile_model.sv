// cpu_tile_model -- behavioural stand-in for a CPU tile's data side on the
// shared memory tree (simulation only): a traffic generator behind a
// tag-only, direct-mapped cache that keeps a "prefetched" bit per line.
//
// After start it reads lines BASE, BASE+1, ... (NACC of them), waiting
// DELAY cycles between accesses. A hit on a line whose prefetched bit is
// set sends a hit notification (BT_HIT) and clears the bit. A miss sends a
// demand read and waits for the line. Lines arriving as prefetch responses
// are installed with the prefetched bit set; a response for the line being
// waited for ends the miss, whatever its kind. Every WRITE_EVERY-th access
// (0: never) is a write of the line's own value, so the data never
// changes. Read data is checked against the memory model's line value.
module cpu_tile_model
  import bt_pkg::*;
#(
  parameter int CPU_ID = 0,
  parameter int LINES = 256,
  parameter int WRITE_EVERY = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  int      base,
  input  int      nacc,
  input  int      delay,
  output logic    req_valid,
  input  logic    req_ready,
  output bt_pkt_t req_pkt,
  input  logic    rsp_valid,
  output logic    rsp_ready,
  input  bt_pkt_t rsp_pkt,
  output logic    done,
  output int      cycles,
  output int      misses,
  output int      pf_hits,
  output int      errors,
  output int      pf_installs
);
  logic [ADDR_W-1:0] tag_q [LINES];
  logic              val_q [LINES];
  logic              pfb_q [LINES];

  function automatic logic [DATA_W-1:0] line_value(logic [ADDR_W-1:0] a);
    return a * 32'h9e37_79b1 ^ 32'h0bad_cafe;
  endfunction

  assign rsp_ready = 1'b1;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic waiting;
  logic [ADDR_W-1:0] wait_addr;

  task automatic send(bt_pkt_t p);
    req_valid <= 1'b1;
    req_pkt   <= p;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 1'b0;
  endtask

  // response side: install lines, end a miss
  always @(posedge clk) begin
    if (rst_n && rsp_valid) begin
      automatic int i = int'(rsp_pkt.addr % LINES);
      if (rsp_pkt.cpu != CPU_W'(CPU_ID)) errors <= errors + 1;
      if (rsp_pkt.data != line_value(rsp_pkt.addr)) begin
        errors <= errors + 1;
        $display("cpu %0d: wrong data for line %0d", CPU_ID, rsp_pkt.addr);
      end
      tag_q[i] <= rsp_pkt.addr;
      val_q[i] <= 1'b1;
      if (waiting && rsp_pkt.addr == wait_addr) begin
        pfb_q[i] <= 1'b0;
        waiting  <= 1'b0;
      end else begin
        pfb_q[i] <= (rsp_pkt.typ == BT_PF_RESP);
        if (rsp_pkt.typ == BT_PF_RESP) pf_installs <= pf_installs + 1;
      end
    end
  end

  initial begin
    req_valid = 0; req_pkt = '0; done = 0; waiting = 0; wait_addr = '0;
    cycles = 0; misses = 0; pf_hits = 0; errors = 0; pf_installs = 0;
    forever begin
      @(posedge clk);
      if (start && !done) begin
        automatic int t0 = cyc;
        for (int i = 0; i < LINES; i++) begin val_q[i] = 0; pfb_q[i] = 0; tag_q[i] = '0; end
        misses = 0; pf_hits = 0; pf_installs = 0;
        for (int n = 0; n < nacc; n++) begin
          automatic logic [ADDR_W-1:0] a = ADDR_W'(base + n);
          automatic int i = int'(a % LINES);
          automatic bt_pkt_t p = '0;
          p.cpu = CPU_W'(CPU_ID); p.addr = a; p.data = line_value(a);
          if (WRITE_EVERY != 0 && n % WRITE_EVERY == WRITE_EVERY - 1) begin
            p.typ = BT_WRITE;
            send(p);
          end else if (val_q[i] && tag_q[i] == a) begin
            if (pfb_q[i]) begin
              pf_hits++;
              pfb_q[i] = 1'b0;
              p.typ = BT_HIT;
              send(p);
            end else @(posedge clk);
          end else begin
            misses++;
            waiting = 1'b1; wait_addr = a;
            p.typ = BT_READ;
            send(p);
            while (waiting) @(posedge clk);
          end
          repeat (delay) @(posedge clk);
        end
        cycles = cyc - t0;
        done = 1'b1;
      end else if (!start) done = 0;
    end
  end
endmodule
