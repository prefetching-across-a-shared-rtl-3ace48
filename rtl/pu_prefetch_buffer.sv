// pu_prefetch_buffer -- the prefetch buffer of the prefetch unit: a circular
// buffer of DEPTH (32) entries holding every prefetch the unit has started.
//
// Each slot holds a CPU number, a line address and a state:
//   QUEUED  - accepted, waiting for the memory port (prefetches have lower
//             priority than demand reads, so they wait here);
//   ISSUED  - sent to memory, response pending;
//   RECENT  - response returned and on its way to the CPU;
//   INVALID - free.
// New prefetches are written at the allocation pointer, which moves in
// circular order. A slot can be overwritten only when it is INVALID or
// RECENT; if the slot under the pointer is still QUEUED or ISSUED the new
// prefetch is refused (alloc_ok low). Queued prefetches leave in the order
// they came, through the dispatch port; the slot number goes out as the
// memory read's tag and comes back with the response (cmpl_*), which
// turns the slot RECENT. A write to a line clears the RECENT slots for that
// line (inv_*). Two lookups (a: demand check, b: duplicate check) compare
// {cpu, addr} against all slots in the same cycle.
//
// The states QUEUED/ISSUED/RECENT, the overwrite rule and the size follow
// the reference design; the explicit dispatch queue order, the refusal of a prefetch
// into a busy slot and the {cpu, addr} match are this design's choices.
module pu_prefetch_buffer
  import bt_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // lookup a (demand miss check)
  input  logic [CPU_W-1:0]          a_cpu,
  input  logic [ADDR_W-1:0]         a_addr,
  output logic                      a_pending,   // QUEUED or ISSUED
  output logic                      a_recent,
  // lookup b (duplicate prefetch check)
  input  logic [CPU_W-1:0]          b_cpu,
  input  logic [ADDR_W-1:0]         b_addr,
  output logic                      b_hit,       // any non-INVALID state
  // allocate
  input  logic                      alloc_en,
  input  logic [CPU_W-1:0]          alloc_cpu,
  input  logic [ADDR_W-1:0]         alloc_addr,
  output logic                      alloc_ok,
  // dispatch to memory
  output logic                      disp_valid,
  input  logic                      disp_take,
  output logic [CPU_W-1:0]          disp_cpu,
  output logic [ADDR_W-1:0]         disp_addr,
  output logic [$clog2(DEPTH)-1:0]  disp_tag,
  // completion (response from memory)
  input  logic                      cmpl_en,
  input  logic [$clog2(DEPTH)-1:0]  cmpl_tag,
  // invalidation by a write
  input  logic                      inv_en,
  input  logic [ADDR_W-1:0]         inv_addr,
  output logic                      inv_hit,
  // occupancy
  output logic [$clog2(DEPTH):0]    queued_count
);
  localparam int unsigned PW = $clog2(DEPTH);

  pfb_state_e        state [DEPTH];
  logic [CPU_W-1:0]  cpu   [DEPTH];
  logic [ADDR_W-1:0] addr  [DEPTH];
  logic [PW-1:0]     alloc_ptr, disp_ptr;
  logic [PW:0]       qcnt;

  always_comb begin
    a_pending = 1'b0;
    a_recent  = 1'b0;
    b_hit     = 1'b0;
    inv_hit   = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (state[i] != PFB_INVALID && cpu[i] == a_cpu && addr[i] == a_addr) begin
        if (state[i] == PFB_RECENT) a_recent  = 1'b1;
        else                        a_pending = 1'b1;
      end
      if (state[i] != PFB_INVALID && cpu[i] == b_cpu && addr[i] == b_addr)
        b_hit = 1'b1;
      if (inv_en && state[i] == PFB_RECENT && addr[i] == inv_addr)
        inv_hit = 1'b1;
    end
  end

  assign alloc_ok     = (state[alloc_ptr] == PFB_INVALID) || (state[alloc_ptr] == PFB_RECENT);
  assign disp_valid   = (qcnt != '0);
  assign disp_cpu     = cpu[disp_ptr];
  assign disp_addr    = addr[disp_ptr];
  assign disp_tag     = disp_ptr;
  assign queued_count = qcnt;

  logic do_alloc, do_disp;
  assign do_alloc = alloc_en && alloc_ok;
  assign do_disp  = disp_valid && disp_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) state[i] <= PFB_INVALID;
      alloc_ptr <= '0;
      disp_ptr  <= '0;
      qcnt      <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (inv_en && state[i] == PFB_RECENT && addr[i] == inv_addr)
          state[i] <= PFB_INVALID;
      end
      if (cmpl_en && state[cmpl_tag] == PFB_ISSUED) state[cmpl_tag] <= PFB_RECENT;
      if (do_disp) begin
        state[disp_ptr] <= PFB_ISSUED;
        disp_ptr        <= disp_ptr + 1'b1;
      end
      if (do_alloc) begin
        state[alloc_ptr] <= PFB_QUEUED;
        alloc_ptr        <= alloc_ptr + 1'b1;
      end
      case ({do_alloc, do_disp})
        2'b10:   qcnt <= qcnt + 1'b1;
        2'b01:   qcnt <= qcnt - 1'b1;
        default: qcnt <= qcnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_alloc) begin
      cpu[alloc_ptr]  <= alloc_cpu;
      addr[alloc_ptr] <= alloc_addr;
    end
  end

  a_disp_queued: assert property (@(posedge clk) disable iff (!rst_n)
                                  disp_valid |-> state[disp_ptr] == PFB_QUEUED);
endmodule
