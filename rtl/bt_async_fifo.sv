// bt_async_fifo -- dual-clock FIFO used for the clock domain crossing
// between the tree side and the memory side.
//
// Write and read pointers are kept in Gray code and each is passed to the
// other clock domain through a two-stage synchroniser, so only one bit of
// a crossing pointer changes at a time. DEPTH must be a power of two.
// A word written in the write domain can be read about three read-clock
// cycles later. Valid/ready on both sides.
module bt_async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             w_valid,
  output logic             w_ready,
  input  logic [WIDTH-1:0] w_data,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             r_valid,
  input  logic             r_ready,
  output logic [WIDTH-1:0] r_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_n;
  assign wbin_n  = wbin + 1'b1;
  assign w_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (w_valid && w_ready) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (w_valid && w_ready) mem[wbin[AW-1:0]] <= w_data;
  end

  // read domain
  logic [AW:0] rbin_n;
  assign rbin_n  = rbin + 1'b1;
  assign r_valid = (rgray != wgray_r2);
  assign r_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (r_valid && r_ready) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end
endmodule
