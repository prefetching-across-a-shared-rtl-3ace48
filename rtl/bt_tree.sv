// bt_tree -- the Bluetree shared memory tree: a binary tree of bt_mux nodes
// with the CPU tiles at the leaves and the memory side at the root.
//
// With NLEAF leaves the tree has log2(NLEAF) levels of multiplexers (4 for
// the 16 tiles of the 4x4 NoC), so a request needs 2 cycles per level to
// reach the root and a response 2 cycles per level to come back. Nodes are
// numbered as a heap: node k (1..NLEAF-1) has child links 2k and 2k+1 and
// parent link k; links NLEAF..2*NLEAF-1 are the leaves and link 1 is the
// root. A response is steered at a node of depth d by bit (LEVELS-1-d) of
// its CPU number, so leaf i receives the responses for CPU i. Requests
// from leaf i must carry CPU number i. NLEAF must be a power of two.
module bt_tree
  import bt_pkg::*;
#(
  parameter int unsigned NLEAF = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // leaf side (CPU tiles)
  input  logic    leaf_up_valid [NLEAF],
  output logic    leaf_up_ready [NLEAF],
  input  bt_pkt_t leaf_up_pkt   [NLEAF],
  output logic    leaf_dn_valid [NLEAF],
  input  logic    leaf_dn_ready [NLEAF],
  output bt_pkt_t leaf_dn_pkt   [NLEAF],
  // root side (towards the prefetch unit / memory)
  output logic    root_up_valid,
  input  logic    root_up_ready,
  output bt_pkt_t root_up_pkt,
  input  logic    root_dn_valid,
  output logic    root_dn_ready,
  input  bt_pkt_t root_dn_pkt
);
  localparam int unsigned LEVELS = $clog2(NLEAF);
  localparam int unsigned NLINK  = 2 * NLEAF;

  // link k: up = towards root, dn = towards leaves
  logic    up_valid [NLINK];
  logic    up_ready [NLINK];
  bt_pkt_t up_pkt   [NLINK];
  logic    dn_valid [NLINK];
  logic    dn_ready [NLINK];
  bt_pkt_t dn_pkt   [NLINK];

  for (genvar i = 0; i < NLEAF; i++) begin : g_leaf
    assign up_valid[NLEAF+i] = leaf_up_valid[i];
    assign up_pkt[NLEAF+i]   = leaf_up_pkt[i];
    assign leaf_up_ready[i]  = up_ready[NLEAF+i];
    assign leaf_dn_valid[i]  = dn_valid[NLEAF+i];
    assign leaf_dn_pkt[i]    = dn_pkt[NLEAF+i];
    assign dn_ready[NLEAF+i] = leaf_dn_ready[i];
  end

  assign root_up_valid = up_valid[1];
  assign root_up_pkt   = up_pkt[1];
  assign up_ready[1]   = root_up_ready;
  assign dn_valid[1]   = root_dn_valid;
  assign dn_pkt[1]     = root_dn_pkt;
  assign root_dn_ready = dn_ready[1];

  // link 0 is unused
  assign up_valid[0] = 1'b0;
  assign up_pkt[0]   = '0;
  assign up_ready[0] = 1'b0;
  assign dn_valid[0] = 1'b0;
  assign dn_pkt[0]   = '0;
  assign dn_ready[0] = 1'b0;

  for (genvar k = 1; k < NLEAF; k++) begin : g_node
    localparam int unsigned DEPTH = $clog2(k + 1) - 1;
    logic    cu_valid [2];
    logic    cu_ready [2];
    bt_pkt_t cu_pkt   [2];
    logic    cd_valid [2];
    logic    cd_ready [2];
    bt_pkt_t cd_pkt   [2];

    for (genvar c = 0; c < 2; c++) begin : g_c
      assign cu_valid[c]        = up_valid[2*k+c];
      assign cu_pkt[c]          = up_pkt[2*k+c];
      assign up_ready[2*k+c]    = cu_ready[c];
      assign dn_valid[2*k+c]    = cd_valid[c];
      assign dn_pkt[2*k+c]      = cd_pkt[c];
      assign cd_ready[c]        = dn_ready[2*k+c];
    end

    bt_mux #(.SEL_BIT(LEVELS - 1 - DEPTH)) u_mux (
      .clk, .rst_n,
      .c_up_valid(cu_valid), .c_up_ready(cu_ready), .c_up_pkt(cu_pkt),
      .p_up_valid(up_valid[k]), .p_up_ready(up_ready[k]), .p_up_pkt(up_pkt[k]),
      .p_dn_valid(dn_valid[k]), .p_dn_ready(dn_ready[k]), .p_dn_pkt(dn_pkt[k]),
      .c_dn_valid(cd_valid), .c_dn_ready(cd_ready), .c_dn_pkt(cd_pkt)
    );
  end
endmodule
