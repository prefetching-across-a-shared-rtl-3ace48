// bt_mux -- one node of the Bluetree shared memory tree.
//
// Upwards it merges two child links into one parent link (the 2-to-1
// multiplexer of the tree); downwards it steers each response to the child
// whose subtree holds the destination CPU, chosen by bit SEL_BIT of the
// packet's CPU number (0 = child 0). Every direction has an input buffer and
// an output buffer, so crossing the node costs 2 cycles each way, as the
// reference design gives. The two children are served round-robin when both have a
// request; the arbitration policy and buffer depth are this design's choice.
//
// Ports: c_up_* are the requests from the children, p_up_* the merged
// requests to the parent, p_dn_* the responses from the parent and c_dn_*
// the responses to the children. All links are valid/ready with a whole
// packet per transfer.
module bt_mux
  import bt_pkg::*;
#(
  parameter int unsigned SEL_BIT = 0,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  // requests from children
  input  logic    c_up_valid [2],
  output logic    c_up_ready [2],
  input  bt_pkt_t c_up_pkt   [2],
  // requests to parent
  output logic    p_up_valid,
  input  logic    p_up_ready,
  output bt_pkt_t p_up_pkt,
  // responses from parent
  input  logic    p_dn_valid,
  output logic    p_dn_ready,
  input  bt_pkt_t p_dn_pkt,
  // responses to children
  output logic    c_dn_valid [2],
  input  logic    c_dn_ready [2],
  output bt_pkt_t c_dn_pkt   [2]
);
  // ---------------- upward path ----------------
  logic    ib_valid [2];
  logic    ib_ready [2];
  bt_pkt_t ib_pkt   [2];
  logic    ob_in_valid, ob_in_ready;
  bt_pkt_t ob_in_pkt;
  logic    last;      // child granted last
  logic    grant;

  for (genvar c = 0; c < 2; c++) begin : g_in
    bt_fifo #(.WIDTH(PKT_W), .DEPTH(BUF_DEPTH)) u_ib (
      .clk, .rst_n,
      .in_valid(c_up_valid[c]), .in_ready(c_up_ready[c]), .in_data(c_up_pkt[c]),
      .out_valid(ib_valid[c]), .out_ready(ib_ready[c]), .out_data(ib_pkt[c])
    );
  end

  always_comb begin
    // round-robin: prefer the child not granted last time
    if (ib_valid[0] && ib_valid[1]) grant = ~last;
    else                            grant = ib_valid[1];
    ob_in_valid = ib_valid[0] || ib_valid[1];
    ob_in_pkt   = ib_pkt[grant];
    ib_ready[0] = ob_in_ready && (grant == 1'b0);
    ib_ready[1] = ob_in_ready && (grant == 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= 1'b1;
    else if (ob_in_valid && ob_in_ready) last <= grant;
  end

  bt_fifo #(.WIDTH(PKT_W), .DEPTH(BUF_DEPTH)) u_ob (
    .clk, .rst_n,
    .in_valid(ob_in_valid), .in_ready(ob_in_ready), .in_data(ob_in_pkt),
    .out_valid(p_up_valid), .out_ready(p_up_ready), .out_data(p_up_pkt)
  );

  // ---------------- downward path ----------------
  logic    dib_valid, dib_ready;
  bt_pkt_t dib_pkt;
  logic    dob_in_ready [2];
  logic    dsel;

  bt_fifo #(.WIDTH(PKT_W), .DEPTH(BUF_DEPTH)) u_dib (
    .clk, .rst_n,
    .in_valid(p_dn_valid), .in_ready(p_dn_ready), .in_data(p_dn_pkt),
    .out_valid(dib_valid), .out_ready(dib_ready), .out_data(dib_pkt)
  );

  assign dsel      = dib_pkt.cpu[SEL_BIT];
  assign dib_ready = dob_in_ready[dsel];

  for (genvar c = 0; c < 2; c++) begin : g_out
    bt_fifo #(.WIDTH(PKT_W), .DEPTH(BUF_DEPTH)) u_dob (
      .clk, .rst_n,
      .in_valid(dib_valid && (dsel == 1'(c))), .in_ready(dob_in_ready[c]),
      .in_data(dib_pkt),
      .out_valid(c_dn_valid[c]), .out_ready(c_dn_ready[c]), .out_data(c_dn_pkt[c])
    );
  end

  // A request offered by a child must stay offered until accepted.
  for (genvar c = 0; c < 2; c++) begin : g_chk
    a_up_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (c_up_valid[c] && !c_up_ready[c]) |=> c_up_valid[c]);
  end
endmodule
