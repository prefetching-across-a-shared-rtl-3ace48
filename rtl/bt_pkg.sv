// bt_pkg -- types and constants shared by the shared memory tree (Bluetree),
// the prefetch unit and the memory clock crossing.
//
// A Bluetree packet is carried whole in one transfer on a valid/ready link.
// Requests travel up the tree (leaf = CPU tile, root = memory); responses
// travel down and are steered by the CPU number carried in the packet.
// Addresses are memory-line (block) addresses: "next line" is addr + 1.
//
// The packet kinds follow the reference design: demand reads (cache misses), writes,
// the hit notification a cache sends when it hits a line marked prefetched,
// and two kinds of read response (standard read and prefetch). The field
// layout and widths are this design's own choice.
package bt_pkg;

  localparam int unsigned NCPU_MAX = 16;   // 4x4 NoC, one tree leaf per tile
  localparam int unsigned CPU_W    = 4;    // CPU number width
  localparam int unsigned ADDR_W   = 32;   // line address width
  localparam int unsigned DATA_W   = 32;   // payload word width
  localparam int unsigned TAG_W    = 5;    // prefetch buffer slot (32 slots)

  typedef enum logic [2:0] {
    BT_READ    = 3'd0,  // demand read from a cache miss (up)
    BT_WRITE   = 3'd1,  // write of a line word, no response (up)
    BT_HIT     = 3'd2,  // hit on a line marked prefetched (up)
    BT_RD_RESP = 3'd3,  // response delivered as a standard read (down)
    BT_PF_RESP = 3'd4   // response delivered as a prefetch (down)
  } bt_type_e;

  typedef struct packed {
    bt_type_e            typ;
    logic [CPU_W-1:0]    cpu;   // requesting / destination CPU tile
    logic                pf;    // read was issued by the prefetch unit
    logic [TAG_W-1:0]    tag;   // prefetch buffer slot of a prefetch read
    logic [ADDR_W-1:0]   addr;  // line address
    logic [DATA_W-1:0]   data;  // write data / read data
  } bt_pkt_t;

  localparam int unsigned PKT_W = $bits(bt_pkt_t);

  // Prefetch distance (lookahead) settings named in the reference design: 1, 2 or 4.
  typedef enum logic [1:0] {
    DIST_1 = 2'd0,
    DIST_2 = 2'd1,
    DIST_4 = 2'd2
  } pf_dist_e;

  // Prefetch buffer slot states.
  typedef enum logic [1:0] {
    PFB_INVALID = 2'd0,
    PFB_QUEUED  = 2'd1,   // waiting for the memory port (lower priority)
    PFB_ISSUED  = 2'd2,   // sent to memory, response pending
    PFB_RECENT  = 2'd3    // completed, response on its way to the CPU
  } pfb_state_e;

  // One-cycle event strobes from the prefetch unit, for monitoring.
  typedef struct packed {
    logic demand;        // demand read forwarded to memory
    logic write;         // write forwarded to memory
    logic stream_new;    // miss started a new stream entry
    logic stream_hit;    // miss continued a stream (prefetch requested)
    logic hit_notify;    // hit notification continued a stream
    logic pf_alloc;      // prefetch entered the prefetch buffer
    logic pf_drop;       // prefetch not taken: buffer slot busy
    logic pf_dup;        // prefetch not taken: line already pending
    logic pf_dispatch;   // queued prefetch sent to memory
    logic squash;        // demand coalesced with a pending prefetch
    logic recent_discard;// demand discarded: recent prefetch serves it
    logic squash_full;   // squash buffer full: demand sent to memory
    logic resp_read;     // response sent down as standard read
    logic resp_pf;       // response sent down as prefetch
    logic wr_invalidate; // write cleared a recent prefetch entry
  } pu_events_t;

  function automatic logic [ADDR_W-1:0] dist_value(pf_dist_e d);
    case (d)
      DIST_1:  return ADDR_W'(1);
      DIST_2:  return ADDR_W'(2);
      default: return ADDR_W'(4);
    endcase
  endfunction

endpackage
