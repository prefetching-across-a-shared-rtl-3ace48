// ddr_model -- behavioural stand-in for the memory controller and DDR
// memory behind the shared memory tree (simulation only).
//
// It serves one transaction at a time: a request is taken, and after
// LATENCY memory-clock cycles (setup and transfer) a read is answered with
// one response carrying the request's cpu, pf, tag and addr and the line's
// data; a write updates the line and sends nothing. A line never written
// reads as line_value(addr). busy counts the cycles a transaction was in
// progress, for measuring memory load.
module ddr_model
  import bt_pkg::*;
#(
  parameter int LATENCY = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  bt_pkt_t req_pkt,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output bt_pkt_t rsp_pkt,
  output int      reads,
  output int      writes,
  output int      busy
);
  logic [DATA_W-1:0] store [logic [ADDR_W-1:0]];

  function automatic logic [DATA_W-1:0] line_value(logic [ADDR_W-1:0] a);
    return a * 32'h9e37_79b1 ^ 32'h0bad_cafe;
  endfunction

  typedef enum logic [1:0] {IDLE, WORK, RESP} st_e;
  st_e     st;
  int      cnt;
  bt_pkt_t cur;

  assign req_ready = (st == IDLE);
  assign rsp_valid = (st == RESP);
  always_comb begin
    rsp_pkt = cur;
    rsp_pkt.typ = BT_RD_RESP;
    rsp_pkt.data = store.exists(cur.addr) ? store[cur.addr] : line_value(cur.addr);
  end

  always @(posedge clk)
    if (rst_n && st == WORK && cnt == 0 && cur.typ == BT_WRITE) store[cur.addr] = cur.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= 0; cur <= '0; reads <= 0; writes <= 0; busy <= 0;
    end else begin
      if (st != IDLE) busy <= busy + 1;
      case (st)
        IDLE: if (req_valid) begin
          cur <= req_pkt;
          cnt <= LATENCY - 1;
          st  <= WORK;
        end
        WORK: begin
          if (cnt > 0) cnt <= cnt - 1;
          else if (cur.typ == BT_WRITE) begin
            writes <= writes + 1;
            st <= IDLE;
          end else begin
            reads <= reads + 1;
            st <= RESP;
          end
        end
        default: if (rsp_ready) st <= IDLE;
      endcase
    end
  end
endmodule
