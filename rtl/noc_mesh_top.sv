// noc_mesh_top: COLS x ROWS 2D mesh Network-on-Chip (8 x 8 by default) in
// which one router carries a packet-blocking hardware Trojan and every router
// carries a Traffic Snoop Manager (TSM) that detects it and routes around it.
//
// Each tile has a router and a network interface (NI); the IP blocks are
// outside and reach the NIs through the inj_* and rx_* ports, one entry per
// node, node id = y*COLS + x. Neighbouring routers are joined by one flit link
// and one credit link in each direction; ports at the mesh edge are tied off.
// Router HT_NODE instantiates the Trojan payload, armed by ht_kill_switch;
// tsm_enable switches the TSM detection on in every router, so the same
// netlist runs as an infected mesh without mitigation (tsm_enable = 0) or with
// it (tsm_enable = 1), and with ht_kill_switch = 0 as the clean baseline.
// A 16-bit cycle counter shared by all routers and NIs time-stamps packets.
// The mesh size, 5 VCs per port and the 128-bit flit channel follow the
// document's evaluated configuration; the Trojan's position at node 27
// (x = 3, y = 3, a centre router) and the buffer depth are this design's choice.
module noc_mesh_top
  import noc_pkg::*;
#(
  parameter int unsigned COLS        = 8,
  parameter int unsigned ROWS        = 8,
  parameter int unsigned NUM_VCS     = 5,
  parameter int unsigned BUF_DEPTH   = 4,
  parameter int unsigned HT_NODE     = 27,
  parameter int unsigned HT_P_ACT_Q8 = 154,
  parameter int unsigned TSM_HOLD    = 512,
  localparam int unsigned N          = COLS * ROWS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ht_kill_switch,
  input  logic                 tsm_enable,
  input  logic                 inj_valid   [N],
  output logic                 inj_ready   [N],
  input  logic [NODE_W-1:0]    inj_dst     [N],
  input  logic [LEN_W-1:0]     inj_len     [N],
  input  logic [PAYLOAD_W-1:0] inj_payload [N],
  output logic                 rx_valid    [N],
  output logic [NODE_W-1:0]    rx_src      [N],
  output logic [LEN_W-1:0]     rx_len      [N],
  output logic [TIME_W-1:0]    rx_latency  [N],
  output logic                 rx_rerouted [N],
  output logic                 rx_error    [N],
  output logic [PAYLOAD_W-1:0] rx_payload  [N],
  output logic [NUM_PORTS-1:0] suspect     [N],
  output logic [NUM_PORTS-1:0] anomaly     [N],
  output logic                 ht_active,
  output logic                 ht_block_event
);
  logic [TIME_W-1:0] now;
  always_ff @(posedge clk) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  flit_t                r_in_flit   [N][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_in_valid  [N];
  flit_t                r_out_flit  [N][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_out_valid [N];
  credit_t              r_cred_in   [N][NUM_PORTS];
  credit_t              r_cred_out  [N][NUM_PORTS];
  logic                 ht_act      [N];
  logic                 ht_evt      [N];

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int X = n % COLS;
    localparam int Y = n / COLS;

    // mesh links: input port p of node n is fed by the facing output port of
    // its neighbour in direction p
    if (Y < int'(ROWS) - 1) begin : g_n
      assign r_in_flit[n][P_NORTH]  = r_out_flit[n+COLS][P_SOUTH];
      assign r_in_valid[n][P_NORTH] = r_out_valid[n+COLS][P_SOUTH];
      assign r_cred_in[n][P_NORTH]  = r_cred_out[n+COLS][P_SOUTH];
    end else begin : g_n_edge
      assign r_in_flit[n][P_NORTH]  = '0;
      assign r_in_valid[n][P_NORTH] = 1'b0;
      assign r_cred_in[n][P_NORTH]  = '0;
    end
    if (Y > 0) begin : g_s
      assign r_in_flit[n][P_SOUTH]  = r_out_flit[n-COLS][P_NORTH];
      assign r_in_valid[n][P_SOUTH] = r_out_valid[n-COLS][P_NORTH];
      assign r_cred_in[n][P_SOUTH]  = r_cred_out[n-COLS][P_NORTH];
    end else begin : g_s_edge
      assign r_in_flit[n][P_SOUTH]  = '0;
      assign r_in_valid[n][P_SOUTH] = 1'b0;
      assign r_cred_in[n][P_SOUTH]  = '0;
    end
    if (X < int'(COLS) - 1) begin : g_e
      assign r_in_flit[n][P_EAST]  = r_out_flit[n+1][P_WEST];
      assign r_in_valid[n][P_EAST] = r_out_valid[n+1][P_WEST];
      assign r_cred_in[n][P_EAST]  = r_cred_out[n+1][P_WEST];
    end else begin : g_e_edge
      assign r_in_flit[n][P_EAST]  = '0;
      assign r_in_valid[n][P_EAST] = 1'b0;
      assign r_cred_in[n][P_EAST]  = '0;
    end
    if (X > 0) begin : g_w
      assign r_in_flit[n][P_WEST]  = r_out_flit[n-1][P_EAST];
      assign r_in_valid[n][P_WEST] = r_out_valid[n-1][P_EAST];
      assign r_cred_in[n][P_WEST]  = r_cred_out[n-1][P_EAST];
    end else begin : g_w_edge
      assign r_in_flit[n][P_WEST]  = '0;
      assign r_in_valid[n][P_WEST] = 1'b0;
      assign r_cred_in[n][P_WEST]  = '0;
    end

    router #(
      .COLS(COLS), .ROWS(ROWS), .NODE_ID(n), .NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH),
      .HT_EN(n == HT_NODE), .HT_P_ACT_Q8(HT_P_ACT_Q8), .TSM_HOLD(TSM_HOLD)
    ) u_router (
      .clk, .rst_n, .now,
      .in_flit        (r_in_flit[n]),
      .in_valid       (r_in_valid[n]),
      .credit_out     (r_cred_out[n]),
      .out_flit       (r_out_flit[n]),
      .out_valid      (r_out_valid[n]),
      .credit_in      (r_cred_in[n]),
      .ht_kill_switch (ht_kill_switch),
      .tsm_enable     (tsm_enable),
      .suspect        (suspect[n]),
      .anomaly        (anomaly[n]),
      .ht_active      (ht_act[n]),
      .ht_block_event (ht_evt[n])
    );

    network_interface #(.NODE_ID(n), .NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH)) u_ni (
      .clk, .rst_n, .now,
      .inj_valid          (inj_valid[n]),
      .inj_ready          (inj_ready[n]),
      .inj_dst            (inj_dst[n]),
      .inj_len            (inj_len[n]),
      .inj_payload        (inj_payload[n]),
      .rx_valid           (rx_valid[n]),
      .rx_src             (rx_src[n]),
      .rx_len             (rx_len[n]),
      .rx_latency         (rx_latency[n]),
      .rx_rerouted        (rx_rerouted[n]),
      .rx_error           (rx_error[n]),
      .rx_payload         (rx_payload[n]),
      .to_router_flit     (r_in_flit[n][P_LOCAL]),
      .to_router_valid    (r_in_valid[n][P_LOCAL]),
      .credit_from_router (r_cred_out[n][P_LOCAL]),
      .from_router_flit   (r_out_flit[n][P_LOCAL]),
      .from_router_valid  (r_out_valid[n][P_LOCAL]),
      .credit_to_router   (r_cred_in[n][P_LOCAL])
    );
  end

  always_comb begin
    ht_active      = 1'b0;
    ht_block_event = 1'b0;
    for (int n = 0; n < int'(N); n++) begin
      ht_active      = ht_active | ht_act[n];
      ht_block_event = ht_block_event | ht_evt[n];
    end
  end
endmodule
