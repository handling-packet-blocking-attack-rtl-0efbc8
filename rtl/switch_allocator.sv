// switch_allocator: separable input-first round-robin switch arbitration.
//
// Stage 1: in each input port a round-robin arbiter picks one of the VCs that
// are ready to send (a flit buffered and a credit for its output VC). Stage 2:
// in each output port a round-robin arbiter picks one of the input ports whose
// stage-1 winner wants that output. An input port wins when its VC wins both
// stages. Each arbiter's priority moves past the winner whenever it issues a
// final grant, whether or not the flit then really leaves, so a request passed
// over in one cycle is favoured in the next. The round-robin scheme is the one
// the document uses as its example; the separable structure is this design's
// choice. Combinational grants, registered priorities.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VCS = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_VCS-1:0]     req      [NUM_PORTS],
  input  logic [PORT_W-1:0]      req_port [NUM_PORTS][NUM_VCS],
  output logic [NUM_PORTS-1:0]   gnt,
  output logic [VC_ID_W-1:0]     gnt_vc      [NUM_PORTS],
  output logic [PORT_W-1:0]      gnt_outport [NUM_PORTS]
);
  localparam int unsigned VW = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1;

  logic [NUM_PORTS-1:0] s1_valid;
  logic [VW-1:0]        s1_idx  [NUM_PORTS];
  logic [NUM_VCS-1:0]   s1_gnt  [NUM_PORTS];
  logic [PORT_W-1:0]    s1_port [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_req  [NUM_PORTS];   // [output][input]
  logic [NUM_PORTS-1:0] s2_gnt  [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_valid;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    rr_arbiter #(.N(NUM_VCS)) u_arb (
      .clk, .rst_n,
      .req       (req[i]),
      .advance   (gnt[i]),
      .gnt       (s1_gnt[i]),
      .gnt_idx   (s1_idx[i]),
      .gnt_valid (s1_valid[i])
    );
    assign s1_port[i] = req_port[i][s1_idx[i]];
  end

  always_comb
    for (int o = 0; o < NUM_PORTS; o++)
      for (int i = 0; i < NUM_PORTS; i++)
        s2_req[o][i] = s1_valid[i] && (int'(s1_port[i]) == o);

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    logic [$clog2(NUM_PORTS)-1:0] idx_unused;
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n,
      .req       (s2_req[o]),
      .advance   (1'b1),
      .gnt       (s2_gnt[o]),
      .gnt_idx   (idx_unused),
      .gnt_valid (s2_valid[o])
    );
  end

  always_comb begin
    gnt = '0;
    for (int o = 0; o < NUM_PORTS; o++) gnt = gnt | s2_gnt[o];
    for (int i = 0; i < NUM_PORTS; i++) begin
      gnt_vc[i]      = VC_ID_W'(s1_idx[i]);
      gnt_outport[i] = s1_port[i];
    end
  end
endmodule
