// router: five-port virtual-channel wormhole router with a Traffic Snoop
// Manager and, when HT_EN is set, the packet-blocking Trojan payload.
//
// Ports are Local, North, East, South, West. A head flit is written into its
// VC buffer, then goes through route computation (XY routing, followed by the
// TSM redirection unit), VC allocation and switch arbitration; the switch
// arbitration grant drives buffer read and crossbar traversal, and the flit is
// registered onto the output link. Body and tail flits follow the head on the
// allocated output VC (wormhole switching). Flow control uses credits, one per
// buffer slot.
// The Trojan sits, as in the document's attack model, between the switch
// allocator's grants and the VC buffer reads: a blocked port's winning flit
// stays buffered although the arbiter counted the grant.
// The TSM snoops every arriving head flit's report of its delay in the
// previous router (carried in the head flit) and, per neighbour direction,
// raises a suspect flag on an anomalous delay; packets whose route would lead
// to a suspected neighbour are redirected.
// Interface: per-port link flits with valid, per-port credits in both
// directions, a shared cycle counter `now`, the Trojan's kill switch and the
// TSM enable. Head flit latency through an idle router: 3 cycles from buffer
// write to traversal, plus one cycle on the output link register.
module router
  import noc_pkg::*;
#(
  parameter int unsigned COLS         = 8,
  parameter int unsigned ROWS         = 8,
  parameter int unsigned NODE_ID      = 0,
  parameter int unsigned NUM_VCS      = 5,
  parameter int unsigned BUF_DEPTH    = 4,
  parameter bit          HT_EN        = 1'b0,
  parameter int unsigned HT_P_ACT_Q8  = 154,
  parameter int unsigned HT_PERIOD    = 64,
  parameter int unsigned HT_MAX_BLOCK = 32,
  parameter int unsigned TSM_W        = 5,
  parameter int unsigned TSM_THR      = 2,
  parameter int unsigned TSM_MIN      = 8,
  parameter int unsigned TSM_HOLD     = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TIME_W-1:0]    now,
  input  flit_t                in_flit    [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] in_valid,
  output credit_t              credit_out [NUM_PORTS],
  output flit_t                out_flit   [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid,
  input  credit_t              credit_in  [NUM_PORTS],
  input  logic                 ht_kill_switch,
  input  logic                 tsm_enable,
  output logic [NUM_PORTS-1:0] suspect,
  output logic [NUM_PORTS-1:0] anomaly,
  output logic                 ht_active,
  output logic                 ht_block_event
);
  // per input port
  logic                 rc_valid   [NUM_PORTS];
  head_t                rc_head    [NUM_PORTS];
  route_t               rc_route   [NUM_PORTS];
  logic [PORT_W-1:0]    rc_outport [NUM_PORTS];
  logic [NODE_W-1:0]    rc_target_unused [NUM_PORTS];
  logic                 rc_iv      [NUM_PORTS];
  logic [NODE_W-1:0]    rc_dst     [NUM_PORTS];
  logic [NODE_W-1:0]    rc_idst    [NUM_PORTS];
  logic [NUM_VCS-1:0]   va_req     [NUM_PORTS];
  logic [PORT_W-1:0]    vc_outport [NUM_PORTS][NUM_VCS];
  logic [NUM_VCS-1:0]   va_gnt     [NUM_PORTS];
  logic [VC_ID_W-1:0]   va_gnt_vc  [NUM_PORTS][NUM_VCS];
  logic [NUM_VCS-1:0]   cred_ok    [NUM_PORTS];
  logic [NUM_VCS-1:0]   sa_req     [NUM_PORTS];
  logic [NUM_VCS-1:0]   front_head [NUM_PORTS];
  logic [NUM_PORTS-1:0] sa_gnt, st_gnt, gnt_is_head;
  logic [VC_ID_W-1:0]   sa_vc      [NUM_PORTS];
  logic [PORT_W-1:0]    sa_outport [NUM_PORTS];
  logic [NUM_PORTS-1:0] st_valid;
  flit_t                st_flit    [NUM_PORTS];
  logic [PORT_W-1:0]    st_outport [NUM_PORTS];
  logic [VC_ID_W-1:0]   out_vc_of  [NUM_PORTS][NUM_VCS];
  // per output port
  logic [NUM_VCS-1:0]   vc_free    [NUM_PORTS];
  logic [NUM_VCS-1:0]   vc_credit  [NUM_PORTS];
  logic [NUM_PORTS-1:0] alloc_valid;
  logic [VC_ID_W-1:0]   alloc_vc   [NUM_PORTS];
  flit_t                xb_flit    [NUM_PORTS];
  logic [NUM_PORTS-1:0] xb_valid;
  // TSM snooping
  logic [NUM_PORTS-1:0] arr_valid;
  logic [DELAY_W-1:0]   arr_delay  [NUM_PORTS];
  logic [DELAY_W-1:0]   tsm_avg_unused [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    input_port #(.NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH)) u_in (
      .clk, .rst_n, .now,
      .in_flit       (in_flit[p]),
      .in_valid      (in_valid[p]),
      .credit_out    (credit_out[p]),
      .rc_valid      (rc_valid[p]),
      .rc_head       (rc_head[p]),
      .rc_route      (rc_route[p]),
      .va_req        (va_req[p]),
      .out_port      (vc_outport[p]),
      .va_gnt        (va_gnt[p]),
      .va_gnt_vc     (va_gnt_vc[p]),
      .cred_ok       (cred_ok[p]),
      .sa_req        (sa_req[p]),
      .front_is_head (front_head[p]),
      .st_gnt        (st_gnt[p]),
      .st_vc         (sa_vc[p]),
      .st_valid      (st_valid[p]),
      .st_flit       (st_flit[p]),
      .st_outport    (st_outport[p])
    );

    route_compute #(.COLS(COLS), .ROWS(ROWS), .NODE_ID(NODE_ID)) u_rc (
      .dst             (rc_head[p].dst),
      .inter_dst       (rc_head[p].inter_dst),
      .inter_valid     (rc_head[p].inter_valid),
      .outport         (rc_outport[p]),
      .target          (rc_target_unused[p]),
      .inter_valid_out (rc_iv[p])
    );
    assign rc_dst[p]  = rc_head[p].dst;
    assign rc_idst[p] = rc_head[p].inter_dst;

    output_port #(.NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH)) u_out (
      .clk, .rst_n,
      .st_valid      (xb_valid[p]),
      .st_flit       (xb_flit[p]),
      .alloc_valid   (alloc_valid[p]),
      .alloc_vc      (alloc_vc[p]),
      .credit_in     (credit_in[p]),
      .out_flit      (out_flit[p]),
      .out_valid     (out_valid[p]),
      .vc_free       (vc_free[p]),
      .vc_has_credit (vc_credit[p])
    );

    assign arr_valid[p]   = in_valid[p] && is_head(in_flit[p].ftype);
    head_t in_head;
    assign in_head        = head_t'(in_flit[p].data);
    assign arr_delay[p]   = in_head.hop_delay;
    assign gnt_is_head[p] = front_head[p][sa_vc[p]];
  end

  // output VC each input VC holds (tracked here for the credit check)
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VCS; v++) out_vc_of[i][v] <= '0;
    end else begin
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VCS; v++)
          if (va_gnt[i][v]) out_vc_of[i][v] <= va_gnt_vc[i][v];
    end
  end

  always_comb
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VCS; v++)
        cred_ok[i][v] = vc_credit[vc_outport[i][v]][out_vc_of[i][v]];

  vc_allocator #(.NUM_VCS(NUM_VCS)) u_va (
    .clk, .rst_n,
    .req         (va_req),
    .req_port    (vc_outport),
    .vc_free     (vc_free),
    .gnt         (va_gnt),
    .gnt_vc      (va_gnt_vc),
    .alloc_valid (alloc_valid),
    .alloc_vc    (alloc_vc)
  );

  switch_allocator #(.NUM_VCS(NUM_VCS)) u_sa (
    .clk, .rst_n,
    .req         (sa_req),
    .req_port    (vc_outport),
    .gnt         (sa_gnt),
    .gnt_vc      (sa_vc),
    .gnt_outport (sa_outport)
  );

  if (HT_EN) begin : g_ht
    logic [NUM_PORTS-1:0] mask_unused;
    ht_payload #(.P_ACT_Q8(HT_P_ACT_Q8), .ACT_PERIOD(HT_PERIOD), .MAX_BLOCK(HT_MAX_BLOCK),
                 .SEED(16'(16'hACE1 + NODE_ID))) u_ht (
      .clk, .rst_n,
      .kill_switch (ht_kill_switch),
      .gnt_in      (sa_gnt),
      .gnt_is_head (gnt_is_head),
      .gnt_out     (st_gnt),
      .active      (ht_active),
      .block_event (ht_block_event),
      .block_mask  (mask_unused)
    );
  end else begin : g_no_ht
    assign st_gnt         = sa_gnt;
    assign ht_active      = 1'b0;
    assign ht_block_event = 1'b0;
  end

  crossbar u_xb (
    .in_flit    (st_flit),
    .in_valid   (st_valid),
    .in_outport (st_outport),
    .out_flit   (xb_flit),
    .out_valid  (xb_valid)
  );

  tsm #(.COLS(COLS), .ROWS(ROWS), .NODE_ID(NODE_ID), .W(TSM_W), .THR_NUM(TSM_THR),
        .MIN_ANOMALY(TSM_MIN), .SUSPECT_HOLD(TSM_HOLD)) u_tsm (
    .clk, .rst_n,
    .enable         (tsm_enable),
    .arr_valid      (arr_valid),
    .arr_delay      (arr_delay),
    .rc_outport     (rc_outport),
    .rc_dst         (rc_dst),
    .rc_inter_dst   (rc_idst),
    .rc_inter_valid (rc_iv),
    .rc_route       (rc_route),
    .suspect        (suspect),
    .anomaly        (anomaly),
    .avg            (tsm_avg_unused)
  );

  // the switch allocator's output port must match the granted VC's route
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      st_gnt[p] |-> sa_outport[p] == st_outport[p]);
  end
endmodule
