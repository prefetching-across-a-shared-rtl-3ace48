// tb_bluetiles_mesh -- self-checking test of the 4x4 mesh NoC.
// A single-word message from tile (0,0) to tile (3,3) passes 7 routers and
// must take 7 cycles. Then every tile sends messages of random length to
// random tiles (itself included) at once, under random back-pressure; each
// tile must receive every message addressed to it, whole, and the messages
// from each source in the order they were sent.
module tb_bluetiles_mesh;
  localparam int NX = 4, NY = 4, N = NX * NY, MSGS = 25;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        tile_in_valid [N], tile_in_ready [N], tile_out_valid [N], tile_out_ready [N];
  logic [31:0] tile_in_data [N], tile_out_data [N];

  bluetiles_mesh #(.NX(NX), .NY(NY)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // header: [31:24] source tile, [23:16] sequence number, [15:8] length,
  //         [7:4] y, [3:0] x; payload: [31:24] source, [23:16] seq, [7:0] index
  function automatic logic [31:0] hdr(int s, int q, int d, int len);
    return {8'(s), 8'(q), 8'(len), 4'(d / NX), 4'(d % NX)};
  endfunction

  int exp_seq [N][N];   // [dest][src] next sequence number expected
  int sent_to [N];      // messages addressed to each tile
  int recv [N];
  int left [N], src [N], seqn [N], idx [N];

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < N; t++) begin
      if (tile_out_valid[t] && tile_out_ready[t]) begin
        if (left[t] == 0) begin
          check(int'(tile_out_data[t][3:0]) == t % NX && int'(tile_out_data[t][7:4]) == t / NX,
                $sformatf("tile %0d got a message for another tile", t));
          src[t] = int'(tile_out_data[t][31:24]);
          seqn[t] = int'(tile_out_data[t][23:16]);
          check(seqn[t] == exp_seq[t][src[t]],
                $sformatf("tile %0d: message %0d from %0d, expected %0d", t, seqn[t], src[t], exp_seq[t][src[t]]));
          exp_seq[t][src[t]] = seqn[t] + 1;
          left[t] = int'(tile_out_data[t][15:8]);
          idx[t] = 0;
          if (left[t] == 0) recv[t]++;
        end else begin
          check(int'(tile_out_data[t][31:24]) == src[t] && int'(tile_out_data[t][23:16]) == seqn[t] &&
                int'(tile_out_data[t][7:0]) == idx[t], $sformatf("tile %0d payload unbroken", t));
          idx[t]++;
          left[t]--;
          if (left[t] == 0) recv[t]++;
        end
      end
    end
  end

  int lat, total_sent, total_recv;

  initial begin
    for (int t = 0; t < N; t++) begin
      tile_in_valid[t] = 0; tile_in_data[t] = '0; tile_out_ready[t] = 1;
      sent_to[t] = 0; recv[t] = 0; left[t] = 0; src[t] = 0; seqn[t] = 0; idx[t] = 0;
      for (int s = 0; s < N; s++) exp_seq[t][s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // corner to corner
    @(negedge clk);
    tile_in_valid[0] = 1; tile_in_data[0] = hdr(0, 0, N - 1, 0);
    @(posedge clk); #1 tile_in_valid[0] = 0;
    lat = 1;
    while (!tile_out_valid[N-1] && lat < 50) begin @(posedge clk); #1 lat++; end
    check(lat == 7, $sformatf("corner to corner took %0d cycles, expected 7", lat));
    repeat (3) @(posedge clk);
    for (int t = 0; t < N; t++) exp_seq[t][0] = (t == N - 1) ? 1 : 0;
    recv[N-1] = 0;

    fork
      for (int s = 0; s < N; s++) begin
        fork
          automatic int ss = s;
          begin
            automatic int q [N];
            for (int d = 0; d < N; d++) q[d] = (ss == 0 && d == N - 1) ? 1 : 0;
            for (int m = 0; m < MSGS; m++) begin
              automatic int d = $urandom_range(0, N - 1);
              automatic int len = $urandom_range(0, 6);
              sent_to[d]++;
              for (int w = 0; w <= len; w++) begin
                @(negedge clk);
                tile_in_valid[ss] = 1;
                tile_in_data[ss] = (w == 0) ? hdr(ss, q[d], d, len)
                                            : {8'(ss), 8'(q[d]), 8'h0, 8'(w - 1)};
                @(posedge clk); while (!tile_in_ready[ss]) @(posedge clk);
              end
              q[d]++;
              @(negedge clk) tile_in_valid[ss] = 0;
            end
          end
        join_none
      end
      begin
        total_recv = 0;
        while (total_recv < N * MSGS) begin
          @(negedge clk);
          for (int t = 0; t < N; t++) tile_out_ready[t] = ($urandom_range(0, 3) != 0);
          total_recv = 0;
          for (int t = 0; t < N; t++) total_recv += recv[t];
        end
      end
    join
    repeat (20) @(posedge clk);
    for (int t = 0; t < N; t++)
      check(recv[t] == sent_to[t], $sformatf("tile %0d received %0d of %0d", t, recv[t], sent_to[t]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
