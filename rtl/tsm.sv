// tsm: Traffic Snoop Manager of one router, made of a detection unit and a
// redirection unit as the document describes.
//
// Detection: one tsm_detector per neighbour direction (North, East, South,
// West) watches the buffering delay each arriving head flit reports for the
// router it came from. When a detector flags an anomaly, that direction is
// marked suspect (the document's ht_dir) for SUSPECT_HOLD cycles after its last
// anomaly; the hold time is this design's choice. Detection runs only while
// `enable` is high; clearing `enable` also clears all suspect flags.
// Redirection: one tsm_redirect per input port applies the redirection rules to
// that port's route computation request in the same cycle.
module tsm
  import noc_pkg::*;
#(
  parameter int unsigned COLS         = 8,
  parameter int unsigned ROWS         = 8,
  parameter int unsigned NODE_ID      = 0,
  parameter int unsigned W            = 5,
  parameter int unsigned THR_NUM      = 2,
  parameter int unsigned MIN_ANOMALY  = 8,
  parameter int unsigned SUSPECT_HOLD = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  // head flit arrivals per input port with the delay they report
  input  logic [NUM_PORTS-1:0] arr_valid,
  input  logic [DELAY_W-1:0]   arr_delay [NUM_PORTS],
  // route computation requests per input port
  input  logic [PORT_W-1:0]    rc_outport     [NUM_PORTS],
  input  logic [NODE_W-1:0]    rc_dst         [NUM_PORTS],
  input  logic [NODE_W-1:0]    rc_inter_dst   [NUM_PORTS],
  input  logic                 rc_inter_valid [NUM_PORTS],
  output route_t               rc_route       [NUM_PORTS],
  output logic [NUM_PORTS-1:0] suspect,
  output logic [NUM_PORTS-1:0] anomaly,
  output logic [DELAY_W-1:0]   avg [NUM_PORTS]
);
  localparam int unsigned HW = $clog2(SUSPECT_HOLD + 1);

  logic [HW-1:0] hold [NUM_PORTS];

  assign anomaly[P_LOCAL] = 1'b0;
  assign avg[P_LOCAL]     = '0;

  for (genvar p = 1; p < NUM_PORTS; p++) begin : g_det
    tsm_detector #(.W(W), .THR_NUM(THR_NUM), .MIN_ANOMALY(MIN_ANOMALY)) u_det (
      .clk, .rst_n,
      .sample_valid (enable && arr_valid[p]),
      .sample_delay (arr_delay[p]),
      .avg          (avg[p]),
      .anomaly      (anomaly[p])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      for (int p = 0; p < NUM_PORTS; p++) hold[p] <= '0;
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (anomaly[p])       hold[p] <= HW'(SUSPECT_HOLD);
        else if (hold[p] != 0) hold[p] <= hold[p] - 1'b1;
      end
    end
  end

  always_comb
    for (int p = 0; p < NUM_PORTS; p++) suspect[p] = (hold[p] != '0);

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_redir
    logic [PORT_W-1:0] op;
    logic [NODE_W-1:0] idst;
    logic              iv, rr;
    tsm_redirect #(.COLS(COLS), .ROWS(ROWS), .NODE_ID(NODE_ID)) u_redir (
      .suspect        (suspect),
      .exp_outport    (rc_outport[p]),
      .dst            (rc_dst[p]),
      .inter_dst_in   (rc_inter_dst[p]),
      .inter_valid_in (rc_inter_valid[p]),
      .new_outport    (op),
      .inter_dst      (idst),
      .inter_valid    (iv),
      .reroute        (rr)
    );
    assign rc_route[p] = '{outport: op, inter_dst: idst, inter_valid: iv, rerouted: rr};
  end
endmodule
