// bt_cdc_bridge -- the link between the prefetch unit and the memory
// controller, which crosses from the tree clock (50 MHz in the reference design) to the
// memory clock (100 MHz in the reference design).
//
// Requests go through one dual-clock FIFO from the tree clock domain to the
// memory clock domain; responses come back through a second one. The reference design
// puts a tree multiplexer here and gives the crossing a cost of about 15
// tree-clock cycles in total; it does not say what the multiplexer's second
// input serves, so this bridge has a single tree-side port and its own
// latency is that of the two FIFOs (about 3 destination-clock cycles each
// way). Valid/ready on every link, whole packets per transfer.
module bt_cdc_bridge
  import bt_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  // tree side
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  bt_pkt_t req_pkt,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output bt_pkt_t rsp_pkt,
  // memory side
  input  logic    mem_clk,
  input  logic    mem_rst_n,
  output logic    mem_req_valid,
  input  logic    mem_req_ready,
  output bt_pkt_t mem_req_pkt,
  input  logic    mem_rsp_valid,
  output logic    mem_rsp_ready,
  input  bt_pkt_t mem_rsp_pkt
);
  bt_async_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_req (
    .wclk(clk), .wrst_n(rst_n), .w_valid(req_valid), .w_ready(req_ready), .w_data(req_pkt),
    .rclk(mem_clk), .rrst_n(mem_rst_n), .r_valid(mem_req_valid), .r_ready(mem_req_ready),
    .r_data(mem_req_pkt));

  bt_async_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_rsp (
    .wclk(mem_clk), .wrst_n(mem_rst_n), .w_valid(mem_rsp_valid), .w_ready(mem_rsp_ready),
    .w_data(mem_rsp_pkt),
    .rclk(clk), .rrst_n(rst_n), .r_valid(rsp_valid), .r_ready(rsp_ready), .r_data(rsp_pkt));
endmodule
