// bluetiles_mesh -- the Bluetiles Manhattan-grid NoC: NX x NY routers
// (4 x 4 in the reference design, one per CPU tile) joined to their north, east, south
// and west neighbours. Tile t = y*NX + x connects to the local port of
// router (x, y) through tile_in_* (messages from the tile) and tile_out_*
// (messages to the tile). Links at the edge of the grid are left idle: with
// X-Y routing and a destination inside the grid no message uses them.
// Each hop costs one cycle (the router input buffer). The grid and its size
// follow the reference design; link timing is this design's.
module bluetiles_mesh #(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tile_in_valid  [NX*NY],
  output logic        tile_in_ready  [NX*NY],
  input  logic [31:0] tile_in_data   [NX*NY],
  output logic        tile_out_valid [NX*NY],
  input  logic        tile_out_ready [NX*NY],
  output logic [31:0] tile_out_data  [NX*NY]
);
  localparam int unsigned N = NX * NY;

  // per router and port (0 local, 1 north, 2 east, 3 south, 4 west)
  logic        iv [N][5];
  logic        ir [N][5];
  logic [31:0] id [N][5];
  logic        ov [N][5];
  logic        orr[N][5];
  logic [31:0] od [N][5];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned T = y * NX + x;

      bluetiles_router #(.MY_X(x), .MY_Y(y)) u_router (
        .clk, .rst_n,
        .in_valid(iv[T]), .in_ready(ir[T]), .in_data(id[T]),
        .out_valid(ov[T]), .out_ready(orr[T]), .out_data(od[T]));

      // local port
      assign iv[T][0]          = tile_in_valid[T];
      assign id[T][0]          = tile_in_data[T];
      assign tile_in_ready[T]  = ir[T][0];
      assign tile_out_valid[T] = ov[T][0];
      assign tile_out_data[T]  = od[T][0];
      assign orr[T][0]         = tile_out_ready[T];

      // north input comes from the router above (its south output)
      if (y > 0) begin : g_n
        assign iv[T][1]  = ov[T-NX][3];
        assign id[T][1]  = od[T-NX][3];
        assign orr[T][1] = ir[T-NX][3];
      end else begin : g_nt
        assign iv[T][1]  = 1'b0;
        assign id[T][1]  = '0;
        assign orr[T][1] = 1'b0;
      end
      // south
      if (y < NY - 1) begin : g_s
        assign iv[T][3]  = ov[T+NX][1];
        assign id[T][3]  = od[T+NX][1];
        assign orr[T][3] = ir[T+NX][1];
      end else begin : g_st
        assign iv[T][3]  = 1'b0;
        assign id[T][3]  = '0;
        assign orr[T][3] = 1'b0;
      end
      // east
      if (x < NX - 1) begin : g_e
        assign iv[T][2]  = ov[T+1][4];
        assign id[T][2]  = od[T+1][4];
        assign orr[T][2] = ir[T+1][4];
      end else begin : g_et
        assign iv[T][2]  = 1'b0;
        assign id[T][2]  = '0;
        assign orr[T][2] = 1'b0;
      end
      // west
      if (x > 0) begin : g_w
        assign iv[T][4]  = ov[T-1][2];
        assign id[T][4]  = od[T-1][2];
        assign orr[T][4] = ir[T-1][2];
      end else begin : g_wt
        assign iv[T][4]  = 1'b0;
        assign id[T][4]  = '0;
        assign orr[T][4] = 1'b0;
      end
    end
  end
endmodule
