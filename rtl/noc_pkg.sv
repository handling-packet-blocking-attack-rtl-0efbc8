// noc_pkg: types and constants shared by the mesh NoC with the packet-blocking
// Trojan and the Traffic Snoop Manager (TSM).
//
// A flit is a 128-bit data word plus a flit type and a virtual-channel id. The
// 128-bit flit channel follows the design's published configuration; the head
// flit field layout below is this design's own choice. The head flit carries
// the final destination, the source, an optional intermediate destination used
// when the TSM redirects a packet, the delay the packet spent in the previous
// router (the quantity the TSM snoops on) and the injection time for latency.
package noc_pkg;

  localparam int unsigned FLIT_DATA_W = 128;  // flit channel width
  localparam int unsigned VC_ID_W     = 3;    // up to 8 VCs per port
  localparam int unsigned NODE_W      = 8;    // up to 256 routers
  localparam int unsigned DELAY_W     = 8;    // hop delay, cycles (mod 256)
  localparam int unsigned TIME_W      = 16;   // cycle counter width
  localparam int unsigned LEN_W       = 4;    // packet length in flits
  localparam int unsigned PAYLOAD_W   = 64;   // payload word carried per flit
  localparam int unsigned NUM_PORTS   = 5;
  localparam int unsigned PORT_W      = 3;

  // Router ports. North is towards larger y (node id + COLS).
  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    F_HEAD     = 2'd0,
    F_BODY     = 2'd1,
    F_TAIL     = 2'd2,
    F_HEADTAIL = 2'd3
  } flit_type_e;

  // Head flit data layout, 128 bits in total.
  typedef struct packed {
    logic [PAYLOAD_W-1:0] payload;     // 64
    logic [9:0]           rsvd;        // 10
    logic [LEN_W-1:0]     len;         // 4  packet length in flits
    logic [TIME_W-1:0]    inj_time;    // 16 time the head left the source NI
    logic [DELAY_W-1:0]   hop_delay;   // 8  previous router's buffering time
    logic                 rerouted;    // 1  redirected by a TSM on its way
    logic                 inter_valid; // 1  heading to inter_dst first
    logic [NODE_W-1:0]    inter_dst;   // 8
    logic [NODE_W-1:0]    src;         // 8
    logic [NODE_W-1:0]    dst;         // 8
  } head_t;                            // 64+10+4+16+8+1+1+8+8+8 = 128

  typedef struct packed {
    flit_type_e             ftype;
    logic [VC_ID_W-1:0]     vc;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  // Credit returned upstream: one buffer slot of VC `vc` was freed.
  typedef struct packed {
    logic               valid;
    logic [VC_ID_W-1:0] vc;
  } credit_t;

  // Result of route computation (with TSM redirection) for one head flit.
  typedef struct packed {
    logic [PORT_W-1:0] outport;
    logic [NODE_W-1:0] inter_dst;
    logic              inter_valid;
    logic              rerouted;
  } route_t;

  function automatic logic is_head(flit_type_e t);
    return (t == F_HEAD) || (t == F_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == F_TAIL) || (t == F_HEADTAIL);
  endfunction

endpackage
