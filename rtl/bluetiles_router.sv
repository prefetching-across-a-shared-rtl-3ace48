// bluetiles_router -- router of the Bluetiles mesh NoC that carries
// CPU-to-CPU messages between tiles (separate from the memory tree).
//
// Links are 32 bits wide in each direction. A message is a header word
// followed by its payload words; the router looks only at the header to
// choose the output and then passes the whole message through that output
// (wormhole switching) before the output can serve another input. Routing
// is X-Y: first along X to the destination column, then along Y. An input
// buffer on each of the five ports (local, north, east, south, west) adds
// one cycle per hop. Each output serves waiting headers in round-robin
// order.
//
// Header word (this design's layout; the reference design says only that the first
// word holds the destination): [3:0] destination x, [7:4] destination y,
// [15:8] number of payload words that follow, the rest free for software.
// North is towards smaller y, east towards larger x. 32-bit links, the
// header-based destination and X-Y routing follow the reference design; the rest is
// this design's choice.
module bluetiles_router #(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // port order: 0 local, 1 north, 2 east, 3 south, 4 west
  input  logic        in_valid  [5],
  output logic        in_ready  [5],
  input  logic [31:0] in_data   [5],
  output logic        out_valid [5],
  input  logic        out_ready [5],
  output logic [31:0] out_data  [5]
);
  localparam int unsigned P_LOCAL = 0, P_NORTH = 1, P_EAST = 2, P_SOUTH = 3, P_WEST = 4;

  logic        hv   [5];
  logic        hpop [5];
  logic [31:0] hd   [5];

  for (genvar i = 0; i < 5; i++) begin : g_ib
    bt_fifo #(.WIDTH(32), .DEPTH(BUF_DEPTH)) u_ib (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_data(in_data[i]),
      .out_valid(hv[i]), .out_ready(hpop[i]), .out_data(hd[i]));
  end

  function automatic logic [2:0] route(logic [31:0] hdr);
    if      (int'(hdr[3:0]) > MY_X) return 3'(P_EAST);
    else if (int'(hdr[3:0]) < MY_X) return 3'(P_WEST);
    else if (int'(hdr[7:4]) > MY_Y) return 3'(P_SOUTH);
    else if (int'(hdr[7:4]) < MY_Y) return 3'(P_NORTH);
    else                            return 3'(P_LOCAL);
  endfunction

  // per input: inside a message, its output, words still to pass
  logic       in_pkt  [5];
  logic [2:0] in_port [5];
  logic [7:0] in_left [5];
  // per output: locked to an input, round-robin pointer
  logic       o_lock  [5];
  logic [2:0] o_owner [5];
  logic [2:0] o_rr    [5];

  logic [2:0] req_port [5];
  logic       grant_v  [5];
  logic [2:0] grant_i  [5];

  always_comb begin
    for (int i = 0; i < 5; i++)
      req_port[i] = in_pkt[i] ? in_port[i] : route(hd[i]);
    for (int o = 0; o < 5; o++) begin
      grant_v[o] = 1'b0;
      grant_i[o] = '0;
      if (o_lock[o]) begin
        grant_v[o] = hv[o_owner[o]] && in_pkt[o_owner[o]];
        grant_i[o] = o_owner[o];
      end else begin
        for (int k = 4; k >= 0; k--) begin
          automatic int i = (int'(o_rr[o]) + k) % 5;
          if (hv[i] && !in_pkt[i] && req_port[i] == 3'(o)) begin
            grant_v[o] = 1'b1;
            grant_i[o] = 3'(i);
          end
        end
      end
      out_valid[o] = grant_v[o];
      out_data[o]  = hd[grant_i[o]];
    end
    for (int i = 0; i < 5; i++) hpop[i] = 1'b0;
    for (int o = 0; o < 5; o++)
      if (grant_v[o] && out_ready[o]) hpop[grant_i[o]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) begin
        in_pkt[i]  <= 1'b0;
        in_port[i] <= '0;
        in_left[i] <= '0;
        o_lock[i]  <= 1'b0;
        o_owner[i] <= '0;
        o_rr[i]    <= '0;
      end
    end else begin
      for (int o = 0; o < 5; o++) begin
        if (grant_v[o] && out_ready[o]) begin
          automatic int i = int'(grant_i[o]);
          if (!in_pkt[i]) begin
            // header word
            o_rr[o] <= 3'((i + 1) % 5);
            if (hd[i][15:8] != 8'd0) begin
              in_pkt[i]  <= 1'b1;
              in_port[i] <= 3'(o);
              in_left[i] <= hd[i][15:8];
              o_lock[o]  <= 1'b1;
              o_owner[o] <= 3'(i);
            end
          end else begin
            in_left[i] <= in_left[i] - 1'b1;
            if (in_left[i] == 8'd1) begin
              in_pkt[i] <= 1'b0;
              o_lock[o] <= 1'b0;
            end
          end
        end
      end
    end
  end
endmodule
