// blueshell_top -- the Blueshell NoC system with a prefetch unit on its
// shared memory tree.
//
// The CPU tiles (not part of this RTL) sit at the ports of the design.
// Each tile has two independent connections:
//   * tile_in_* / tile_out_*: its local port on the Bluetiles mesh, which
//     carries CPU-to-CPU messages (bluetiles_mesh, NX x NY routers);
//   * cpu_req_* / cpu_rsp_*: its cache's link into the Bluetree shared
//     memory tree (bt_tree), which carries cache misses, writes and
//     hit notifications up and memory responses down.
// The tree's root feeds the prefetch unit (prefetch_unit), and the prefetch
// unit reaches the memory controller through a clock domain crossing
// (bt_cdc_bridge). The memory controller is outside the design and is
// connected to ddr_req_* / ddr_rsp_*, in the mem_clk domain; it must
// answer each read (typ BT_READ) with one response carrying the same cpu,
// pf, tag and addr fields and the read data, in any order, and must not
// answer writes.
//
// Because the two networks are separate, memory traffic never competes
// with CPU-to-CPU messages. With 16 tiles a request crosses 4 tree levels
// (2 cycles each) and the prefetch unit (2 cycles): a read answered right
// at the prefetch unit's memory port would return after 20 cycles.
//
// cfg_pf_enable switches prefetching on (low bypasses the unit);
// cfg_pf_distance selects a lookahead of 1, 2 or 4 lines. pu_* are the
// prefetch unit's monitoring outputs.
module blueshell_top
  import bt_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4,
  parameter int unsigned NSTREAM = 8,
  parameter int unsigned PFB_DEPTH = 32,
  parameter int unsigned SQB_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_clk,
  input  logic        mem_rst_n,
  input  logic        cfg_pf_enable,
  input  pf_dist_e    cfg_pf_distance,
  // shared memory tree, one link per tile
  input  logic        cpu_req_valid [NX*NY],
  output logic        cpu_req_ready [NX*NY],
  input  bt_pkt_t     cpu_req_pkt   [NX*NY],
  output logic        cpu_rsp_valid [NX*NY],
  input  logic        cpu_rsp_ready [NX*NY],
  output bt_pkt_t     cpu_rsp_pkt   [NX*NY],
  // mesh NoC, one local port per tile
  input  logic        tile_in_valid  [NX*NY],
  output logic        tile_in_ready  [NX*NY],
  input  logic [31:0] tile_in_data   [NX*NY],
  output logic        tile_out_valid [NX*NY],
  input  logic        tile_out_ready [NX*NY],
  output logic [31:0] tile_out_data  [NX*NY],
  // memory controller (mem_clk domain)
  output logic        ddr_req_valid,
  input  logic        ddr_req_ready,
  output bt_pkt_t     ddr_req_pkt,
  input  logic        ddr_rsp_valid,
  output logic        ddr_rsp_ready,
  input  bt_pkt_t     ddr_rsp_pkt,
  // prefetch unit monitoring
  output pu_events_t  pu_ev,
  output logic [15:0] pu_mem_outstanding,
  output logic [$clog2(PFB_DEPTH):0] pu_pf_queued,
  output logic [$clog2(SQB_DEPTH):0] pu_sq_count
);
  localparam int unsigned NCPU = NX * NY;

  bluetiles_mesh #(.NX(NX), .NY(NY)) u_mesh (
    .clk, .rst_n,
    .tile_in_valid, .tile_in_ready, .tile_in_data,
    .tile_out_valid, .tile_out_ready, .tile_out_data);

  logic    root_up_valid, root_up_ready, root_dn_valid, root_dn_ready;
  bt_pkt_t root_up_pkt, root_dn_pkt;

  bt_tree #(.NLEAF(NCPU)) u_tree (
    .clk, .rst_n,
    .leaf_up_valid(cpu_req_valid), .leaf_up_ready(cpu_req_ready), .leaf_up_pkt(cpu_req_pkt),
    .leaf_dn_valid(cpu_rsp_valid), .leaf_dn_ready(cpu_rsp_ready), .leaf_dn_pkt(cpu_rsp_pkt),
    .root_up_valid, .root_up_ready, .root_up_pkt,
    .root_dn_valid, .root_dn_ready, .root_dn_pkt);

  logic    pm_req_valid, pm_req_ready, pm_rsp_valid, pm_rsp_ready;
  bt_pkt_t pm_req_pkt, pm_rsp_pkt;

  prefetch_unit #(.NCPU(NCPU), .NSTREAM(NSTREAM), .PFB_DEPTH(PFB_DEPTH),
                  .SQB_DEPTH(SQB_DEPTH)) u_pu (
    .clk, .rst_n,
    .cfg_enable(cfg_pf_enable), .cfg_distance(cfg_pf_distance),
    .up_valid(root_up_valid), .up_ready(root_up_ready), .up_pkt(root_up_pkt),
    .dn_valid(root_dn_valid), .dn_ready(root_dn_ready), .dn_pkt(root_dn_pkt),
    .mem_req_valid(pm_req_valid), .mem_req_ready(pm_req_ready), .mem_req_pkt(pm_req_pkt),
    .mem_rsp_valid(pm_rsp_valid), .mem_rsp_ready(pm_rsp_ready), .mem_rsp_pkt(pm_rsp_pkt),
    .ev(pu_ev), .mem_outstanding(pu_mem_outstanding),
    .pf_queued(pu_pf_queued), .sq_count(pu_sq_count));

  bt_cdc_bridge u_cdc (
    .clk, .rst_n,
    .req_valid(pm_req_valid), .req_ready(pm_req_ready), .req_pkt(pm_req_pkt),
    .rsp_valid(pm_rsp_valid), .rsp_ready(pm_rsp_ready), .rsp_pkt(pm_rsp_pkt),
    .mem_clk, .mem_rst_n,
    .mem_req_valid(ddr_req_valid), .mem_req_ready(ddr_req_ready), .mem_req_pkt(ddr_req_pkt),
    .mem_rsp_valid(ddr_rsp_valid), .mem_rsp_ready(ddr_rsp_ready), .mem_rsp_pkt(ddr_rsp_pkt));
endmodule
