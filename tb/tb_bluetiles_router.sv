// tb_bluetiles_router -- self-checking test of one mesh router, placed at
// (1, 1) of the grid. Messages from all five inputs to destinations in
// every direction are sent at once under random back-pressure. Each must
// leave by the X-Y output (east/west first, then south/north, then local),
// whole and without another message's words inside it, and a single word
// must cross the router in one cycle.
module tb_bluetiles_router;
  localparam int MX = 1, MY = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid [5], in_ready [5], out_valid [5], out_ready [5];
  logic [31:0] in_data [5], out_data [5];

  bluetiles_router #(.MY_X(MX), .MY_Y(MY)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xy_port(int dx, int dy);
    if (dx > MX) return 2;
    if (dx < MX) return 4;
    if (dy > MY) return 3;
    if (dy < MY) return 1;
    return 0;
  endfunction

  function automatic logic [31:0] hdr(int s, int dx, int dy, int len);
    return {8'(s), 8'h0, 8'(len), 4'(dy), 4'(dx)};
  endfunction

  // per output: words still expected of the current message, its source
  int left [5];
  int src  [5];
  int seqn [5];
  int delivered = 0;
  int expected_msgs = 0;

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        if (left[o] == 0) begin
          // header
          check(xy_port(int'(out_data[o][3:0]), int'(out_data[o][7:4])) == o,
                $sformatf("header for (%0d,%0d) left by port %0d", out_data[o][3:0], out_data[o][7:4], o));
          left[o] = int'(out_data[o][15:8]);
          src[o]  = int'(out_data[o][31:24]);
          seqn[o] = 0;
          if (left[o] == 0) delivered++;
        end else begin
          check(int'(out_data[o][31:24]) == src[o] && int'(out_data[o][7:0]) == seqn[o],
                $sformatf("port %0d payload word %0d of source %0d unbroken", o, seqn[o], src[o]));
          seqn[o]++;
          left[o]--;
          if (left[o] == 0) delivered++;
        end
      end
    end
  end

  int lat;

  initial begin
    for (int i = 0; i < 5; i++) begin
      in_valid[i] = 0; in_data[i] = '0; out_ready[i] = 1; left[i] = 0; src[i] = 0; seqn[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // single-word message from west to local: 1 cycle
    @(negedge clk);
    in_valid[4] = 1; in_data[4] = hdr(4, MX, MY, 0);
    @(posedge clk); #1 in_valid[4] = 0;
    lat = 1;
    while (!out_valid[0] && lat < 20) begin @(posedge clk); #1 lat++; end
    check(lat == 1, $sformatf("router crossing %0d cycles, expected 1", lat));
    repeat (3) @(posedge clk);

    // all inputs send messages to random destinations
    fork
      for (int i = 0; i < 5; i++) begin
        fork
          automatic int ii = i;
          begin
            for (int m = 0; m < 30; m++) begin
              automatic int dx = $urandom_range(0, 3);
              automatic int dy = $urandom_range(0, 3);
              automatic int len = $urandom_range(0, 5);
              // inputs only carry traffic that X-Y routing can bring to them
              if (ii == 2) dx = $urandom_range(0, MX);      // from east: going west
              if (ii == 4) dx = $urandom_range(MX, 3);      // from west: going east
              if (ii == 1 || ii == 3) dx = MX;              // Y leg only
              if (ii == 1) dy = $urandom_range(MY, 3);      // from north: going south
              if (ii == 3) dy = $urandom_range(0, MY);      // from south: going north
              for (int w = 0; w <= len; w++) begin
                @(negedge clk);
                in_valid[ii] = ($urandom_range(0, 4) != 0) || w > 0;
                if (!in_valid[ii]) begin w--; continue; end
                in_data[ii] = (w == 0) ? hdr(ii, dx, dy, len)
                                       : {8'(ii), 16'h0, 8'(w - 1)};
                @(posedge clk); while (!in_ready[ii]) @(posedge clk);
              end
              @(negedge clk) in_valid[ii] = 0;
            end
          end
        join_none
      end
      begin
        while (delivered < 150) begin
          @(negedge clk);
          for (int o = 0; o < 5; o++) out_ready[o] = ($urandom_range(0, 2) != 0);
        end
      end
    join
    repeat (10) @(posedge clk);
    check(delivered == 150, $sformatf("delivered %0d of 150 messages", delivered));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
