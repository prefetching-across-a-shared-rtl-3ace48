// pu_squash_buffer -- the squash buffer of the prefetch unit: a circular
// buffer of DEPTH (32) entries recording demand reads that were coalesced
// with a prefetch already pending for the same line.
//
// add_* writes {cpu, addr} into the slot under the circular pointer when
// that slot is free (add_ok, combinational); a full slot refuses the entry.
// lk_* compares a returning prefetch's {cpu, addr} against all entries in
// the same cycle; lk_hit tells the unit to deliver the response as a
// standard read, and when lk_en is high the matching entries are freed on
// the clock edge. Size and circular organisation follow the reference design; the
// refusal when the pointed slot is busy is this design's choice.
module pu_squash_buffer
  import bt_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              add_en,
  input  logic [CPU_W-1:0]  add_cpu,
  input  logic [ADDR_W-1:0] add_addr,
  output logic              add_ok,
  input  logic              lk_en,
  input  logic [CPU_W-1:0]  lk_cpu,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic              valid [DEPTH];
  logic [CPU_W-1:0]  cpu   [DEPTH];
  logic [ADDR_W-1:0] addr  [DEPTH];
  logic [PW-1:0]     ptr;
  logic [DEPTH-1:0]  match;

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      match[i] = valid[i] && cpu[i] == lk_cpu && addr[i] == lk_addr;
    lk_hit = |match;
    count  = '0;
    for (int i = 0; i < DEPTH; i++) count = count + (PW+1)'(valid[i]);
  end

  assign add_ok = !valid[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) valid[i] <= 1'b0;
      ptr <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++)
        if (lk_en && match[i]) valid[i] <= 1'b0;
      if (add_en && add_ok) begin
        valid[ptr] <= 1'b1;
        ptr        <= ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (add_en && add_ok) begin
      cpu[ptr]  <= add_cpu;
      addr[ptr] <= add_addr;
    end
  end
endmodule
