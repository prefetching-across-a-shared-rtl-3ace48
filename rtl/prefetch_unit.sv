// prefetch_unit -- stream prefetch unit at the root of the shared memory
// tree. Every memory transaction of every CPU passes through it, so it can
// follow each CPU's streams and start reads ahead of them.
//
// Requests from the tree (up_*) are handled one per cycle:
//   * demand read, line pending in the prefetch buffer (queued or issued):
//     the read is recorded in the squash buffer and not sent to memory;
//   * demand read, line RECENT in the prefetch buffer (prefetch already on
//     its way to the CPU): the read is dropped, the prefetch serves it;
//   * other demand reads go to memory. If a stream of this CPU ends at
//     addr-D, a prefetch of addr+D is started and the stream advances to
//     addr+D; otherwise a new stream holding addr replaces one of the CPU's
//     stream entries;
//   * hit notification (cache hit on a line marked prefetched): if a
//     stream ends at that address, prefetch addr+D and advance the stream;
//   * write: sent to memory; a RECENT prefetch of that line is dropped.
// Prefetches wait in the prefetch buffer and go to memory only in cycles
// with no demand request for the memory port, so demand reads always go
// first. Memory responses (mem_rsp_*) of prefetches turn their slot RECENT
// and go down as a standard read when a squashed demand waits for them,
// else as a prefetch; responses of demand reads go down as standard reads.
//
// cfg_enable low bypasses the unit: reads and writes pass through, hit
// notifications are dropped, no prefetch is started. cfg_distance selects
// the lookahead D of 1, 2 or 4 lines.
//
// Timing: an input buffer and an output buffer in each direction, so a
// packet crosses the unit in 2 cycles, as in the reference design. The prefetch
// tag (slot number) travels with the memory read and returns with the
// response; the memory side must return it unchanged.
//
// The behaviour above is the reference design's (its stream algorithm and its notes on the
// race with recent prefetches); the single-cycle decision, buffer depth of
// 2, matching on {cpu, addr}, the handling of full buffers and the
// same-cycle forwarding of a completing prefetch are this design's.
module prefetch_unit
  import bt_pkg::*;
#(
  parameter int unsigned NCPU      = 16,
  parameter int unsigned NSTREAM   = 8,
  parameter int unsigned PFB_DEPTH = 32,
  parameter int unsigned SQB_DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_enable,
  input  pf_dist_e   cfg_distance,
  // requests from the tree root
  input  logic       up_valid,
  output logic       up_ready,
  input  bt_pkt_t    up_pkt,
  // responses to the tree root
  output logic       dn_valid,
  input  logic       dn_ready,
  output bt_pkt_t    dn_pkt,
  // requests to memory
  output logic       mem_req_valid,
  input  logic       mem_req_ready,
  output bt_pkt_t    mem_req_pkt,
  // responses from memory
  input  logic       mem_rsp_valid,
  output logic       mem_rsp_ready,
  input  bt_pkt_t    mem_rsp_pkt,
  // monitoring: event strobes, reads outstanding at memory, prefetches
  // waiting for the memory port, demand reads waiting in the squash buffer
  output pu_events_t ev,
  output logic [15:0] mem_outstanding,
  output logic [$clog2(PFB_DEPTH):0] pf_queued,
  output logic [$clog2(SQB_DEPTH):0] sq_count
);
  localparam int unsigned SW = $clog2(NSTREAM);
  localparam int unsigned PW = $clog2(PFB_DEPTH);

  // ---------------- buffers ----------------
  logic    rq_valid, rq_ready;
  bt_pkt_t rq;
  logic    ob_valid, ob_ready;
  bt_pkt_t ob_pkt;
  logic    rs_valid, rs_ready;
  bt_pkt_t rs;
  logic    db_valid, db_ready;
  bt_pkt_t db_pkt;

  bt_fifo #(.WIDTH(PKT_W), .DEPTH(2)) u_req_ib (
    .clk, .rst_n, .in_valid(up_valid), .in_ready(up_ready), .in_data(up_pkt),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq));
  bt_fifo #(.WIDTH(PKT_W), .DEPTH(2)) u_req_ob (
    .clk, .rst_n, .in_valid(ob_valid), .in_ready(ob_ready), .in_data(ob_pkt),
    .out_valid(mem_req_valid), .out_ready(mem_req_ready), .out_data(mem_req_pkt));
  bt_fifo #(.WIDTH(PKT_W), .DEPTH(2)) u_rsp_ib (
    .clk, .rst_n, .in_valid(mem_rsp_valid), .in_ready(mem_rsp_ready), .in_data(mem_rsp_pkt),
    .out_valid(rs_valid), .out_ready(rs_ready), .out_data(rs));
  bt_fifo #(.WIDTH(PKT_W), .DEPTH(2)) u_rsp_ob (
    .clk, .rst_n, .in_valid(db_valid), .in_ready(db_ready), .in_data(db_pkt),
    .out_valid(dn_valid), .out_ready(dn_ready), .out_data(dn_pkt));

  // ---------------- tables ----------------
  logic [ADDR_W-1:0] d_lines;
  assign d_lines = dist_value(cfg_distance);

  logic              sb_lk_hit;
  logic [SW-1:0]     sb_lk_idx;
  logic [ADDR_W-1:0] sb_lk_addr;
  logic              sb_upd_en, sb_alloc_en;
  logic [ADDR_W-1:0] sb_upd_addr;

  pu_stream_buffers #(.NCPU(NCPU), .NSTREAM(NSTREAM)) u_streams (
    .clk, .rst_n,
    .lk_cpu(rq.cpu), .lk_addr(sb_lk_addr), .lk_hit(sb_lk_hit), .lk_idx(sb_lk_idx),
    .upd_en(sb_upd_en), .upd_cpu(rq.cpu), .upd_idx(sb_lk_idx), .upd_addr(sb_upd_addr),
    .alloc_en(sb_alloc_en), .alloc_cpu(rq.cpu), .alloc_addr(rq.addr));

  logic              pf_a_pending, pf_a_recent, pf_b_hit;
  logic              pf_alloc_en, pf_alloc_ok;
  logic [ADDR_W-1:0] pf_target;
  logic              pf_disp_valid, pf_disp_take;
  logic [CPU_W-1:0]  pf_disp_cpu;
  logic [ADDR_W-1:0] pf_disp_addr;
  logic [PW-1:0]     pf_disp_tag;
  logic              pf_cmpl_en, pf_inv_en, pf_inv_hit;

  pu_prefetch_buffer #(.DEPTH(PFB_DEPTH)) u_pfbuf (
    .clk, .rst_n,
    .a_cpu(rq.cpu), .a_addr(rq.addr), .a_pending(pf_a_pending), .a_recent(pf_a_recent),
    .b_cpu(rq.cpu), .b_addr(pf_target), .b_hit(pf_b_hit),
    .alloc_en(pf_alloc_en), .alloc_cpu(rq.cpu), .alloc_addr(pf_target), .alloc_ok(pf_alloc_ok),
    .disp_valid(pf_disp_valid), .disp_take(pf_disp_take), .disp_cpu(pf_disp_cpu),
    .disp_addr(pf_disp_addr), .disp_tag(pf_disp_tag),
    .cmpl_en(pf_cmpl_en), .cmpl_tag(rs.tag[PW-1:0]),
    .inv_en(pf_inv_en), .inv_addr(rq.addr), .inv_hit(pf_inv_hit),
    .queued_count(pf_queued));

  logic sq_add_en, sq_add_ok, sq_lk_en, sq_lk_hit;

  pu_squash_buffer #(.DEPTH(SQB_DEPTH)) u_squash (
    .clk, .rst_n,
    .add_en(sq_add_en), .add_cpu(rq.cpu), .add_addr(rq.addr), .add_ok(sq_add_ok),
    .lk_en(sq_lk_en), .lk_cpu(rs.cpu), .lk_addr(rs.addr), .lk_hit(sq_lk_hit),
    .count(sq_count));

  // ---------------- response path ----------------
  logic rs_fire, rs_pf_fire;
  always_comb begin
    db_valid = rs_valid;
    db_pkt   = rs;
    rs_ready = db_ready;
    rs_fire  = rs_valid && db_ready;
    rs_pf_fire = rs_fire && rs.pf;
    if (rs.pf && !sq_lk_hit) db_pkt.typ = BT_PF_RESP;
    else                     db_pkt.typ = BT_RD_RESP;
    pf_cmpl_en = rs_pf_fire;
    sq_lk_en   = rs_pf_fire;
  end

  // ---------------- request path ----------------
  logic    demand_push;   // request path needs the memory port
  bt_pkt_t demand_pkt;
  logic    fwd_recent;    // a prefetch of this line completes this cycle

  always_comb begin
    fwd_recent = rs_pf_fire && rs.cpu == rq.cpu && rs.addr == rq.addr;
    pf_target  = rq.addr + d_lines;
    sb_lk_addr = (rq.typ == BT_HIT) ? rq.addr : rq.addr - d_lines;

    demand_push = 1'b0;
    demand_pkt  = rq;
    demand_pkt.pf  = 1'b0;
    demand_pkt.tag = '0;
    rq_ready    = 1'b0;
    sb_upd_en   = 1'b0;
    sb_upd_addr = rq.addr;
    sb_alloc_en = 1'b0;
    pf_alloc_en = 1'b0;
    pf_inv_en   = 1'b0;
    sq_add_en   = 1'b0;
    ev          = '0;

    if (rq_valid) begin
      unique case (rq.typ)
        BT_READ: begin
          if (cfg_enable && (fwd_recent || pf_a_recent)) begin
            rq_ready = 1'b1;
            ev.recent_discard = 1'b1;
          end else if (cfg_enable && pf_a_pending && sq_add_ok) begin
            rq_ready  = 1'b1;
            sq_add_en = 1'b1;
            ev.squash = 1'b1;
          end else begin
            demand_push = 1'b1;
            rq_ready    = ob_ready;
            if (ob_ready) begin
              ev.demand = 1'b1;
              ev.squash_full = cfg_enable && pf_a_pending;
              if (cfg_enable && !pf_a_pending) begin
                if (sb_lk_hit) begin
                  ev.stream_hit = 1'b1;
                  sb_upd_en     = 1'b1;
                  if (pf_b_hit) begin
                    ev.pf_dup   = 1'b1;
                    sb_upd_addr = pf_target;
                  end else if (pf_alloc_ok) begin
                    pf_alloc_en = 1'b1;
                    ev.pf_alloc = 1'b1;
                    sb_upd_addr = pf_target;
                  end else begin
                    ev.pf_drop  = 1'b1;
                    sb_upd_addr = rq.addr;
                  end
                end else begin
                  ev.stream_new = 1'b1;
                  sb_alloc_en   = 1'b1;
                end
              end
            end
          end
        end
        BT_HIT: begin
          rq_ready = 1'b1;
          if (cfg_enable && sb_lk_hit) begin
            ev.hit_notify = 1'b1;
            sb_upd_en     = 1'b1;
            if (pf_b_hit) begin
              ev.pf_dup   = 1'b1;
              sb_upd_addr = pf_target;
            end else if (pf_alloc_ok) begin
              pf_alloc_en = 1'b1;
              ev.pf_alloc = 1'b1;
              sb_upd_addr = pf_target;
            end else begin
              ev.pf_drop  = 1'b1;
              sb_upd_addr = rq.addr;
            end
          end
        end
        BT_WRITE: begin
          demand_push = 1'b1;
          rq_ready    = ob_ready;
          if (ob_ready) begin
            ev.write  = 1'b1;
            pf_inv_en = 1'b1;
            ev.wr_invalidate = pf_inv_hit;
          end
        end
        default: rq_ready = 1'b1;   // responses never travel up: drop
      endcase
    end

    // memory port: demand first, then the oldest queued prefetch
    pf_disp_take = 1'b0;
    if (demand_push) begin
      ob_valid = 1'b1;
      ob_pkt   = demand_pkt;
    end else begin
      ob_valid = pf_disp_valid;
      ob_pkt   = '0;
      ob_pkt.typ  = BT_READ;
      ob_pkt.pf   = 1'b1;
      ob_pkt.cpu  = pf_disp_cpu;
      ob_pkt.addr = pf_disp_addr;
      ob_pkt.tag  = TAG_W'(pf_disp_tag);
      pf_disp_take = pf_disp_valid && ob_ready;
    end
    ev.pf_dispatch = pf_disp_take;
    ev.resp_read   = rs_fire && db_pkt.typ == BT_RD_RESP;
    ev.resp_pf     = rs_fire && db_pkt.typ == BT_PF_RESP;
  end

  // outstanding memory reads, for measuring memory load
  logic rd_out, rd_back;
  assign rd_out  = ob_valid && ob_ready && ob_pkt.typ == BT_READ;
  assign rd_back = mem_rsp_valid && mem_rsp_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem_outstanding <= '0;
    else mem_outstanding <= mem_outstanding + 16'(rd_out) - 16'(rd_back);
  end

  a_rsp_is_read: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> (mem_rsp_pkt.typ == BT_READ || mem_rsp_pkt.typ == BT_RD_RESP));
endmodule
