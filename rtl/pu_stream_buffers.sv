// pu_stream_buffers -- the stream table of the prefetch unit.
//
// Each CPU owns NSTREAM stream entries (8 in the reference design). An entry holds the
// last address of its stream and a valid bit. A lookup compares one address
// against the entries of one CPU in the same cycle (combinational result).
// On the next clock edge the table applies at most one change: update the
// address of the entry that matched, or allocate a new stream, which
// replaces that CPU's entries in circular order (each CPU has its own
// replacement pointer). The circular replacement follows the reference design; the
// single-cycle lookup and the one-change-per-cycle rule are this design's.
//
// Reset clears all valid bits and pointers.
module pu_stream_buffers
  import bt_pkg::*;
#(
  parameter int unsigned NCPU    = 16,
  parameter int unsigned NSTREAM = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lookup (combinational)
  input  logic [CPU_W-1:0]            lk_cpu,
  input  logic [ADDR_W-1:0]           lk_addr,
  output logic                        lk_hit,
  output logic [$clog2(NSTREAM)-1:0]  lk_idx,
  // update a matched entry with a new last address
  input  logic                        upd_en,
  input  logic [CPU_W-1:0]            upd_cpu,
  input  logic [$clog2(NSTREAM)-1:0]  upd_idx,
  input  logic [ADDR_W-1:0]           upd_addr,
  // start a new stream (circular replacement)
  input  logic                        alloc_en,
  input  logic [CPU_W-1:0]            alloc_cpu,
  input  logic [ADDR_W-1:0]           alloc_addr
);
  localparam int unsigned IW = $clog2(NSTREAM);

  logic [ADDR_W-1:0] last_addr [NCPU][NSTREAM];
  logic              valid     [NCPU][NSTREAM];
  logic [IW-1:0]     rr_ptr    [NCPU];

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int s = NSTREAM - 1; s >= 0; s--) begin
      if (int'(lk_cpu) < NCPU && valid[lk_cpu][s] && last_addr[lk_cpu][s] == lk_addr) begin
        lk_hit = 1'b1;
        lk_idx = IW'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCPU; c++) begin
        rr_ptr[c] <= '0;
        for (int s = 0; s < NSTREAM; s++) valid[c][s] <= 1'b0;
      end
    end else if (upd_en) begin
      valid[upd_cpu][upd_idx] <= 1'b1;
    end else if (alloc_en) begin
      valid[alloc_cpu][rr_ptr[alloc_cpu]] <= 1'b1;
      rr_ptr[alloc_cpu] <= rr_ptr[alloc_cpu] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en)
      last_addr[upd_cpu][upd_idx] <= upd_addr;
    else if (alloc_en)
      last_addr[alloc_cpu][rr_ptr[alloc_cpu]] <= alloc_addr;
  end

  a_one_change: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(upd_en && alloc_en));
endmodule
