// output_port: state of one router output port and its link register.
//
// Keeps, for each VC of the downstream input port, a credit counter (free
// buffer slots, BUF_DEPTH after reset) and a busy flag (the VC is allocated to
// a packet until its tail flit leaves). A flit passing the crossbar uses one
// credit of its VC; a credit returned from downstream gives one back. The flit
// is registered onto the output link, so it reaches the next router one cycle
// after switch traversal. Credit-based flow control is this design's choice;
// the document does not describe the link protocol.
module output_port
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VCS   = 5,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               st_valid,
  input  flit_t              st_flit,
  input  logic               alloc_valid,
  input  logic [VC_ID_W-1:0] alloc_vc,
  input  credit_t            credit_in,
  output flit_t              out_flit,
  output logic               out_valid,
  output logic [NUM_VCS-1:0] vc_free,
  output logic [NUM_VCS-1:0] vc_has_credit
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  logic [CW-1:0]      credits [NUM_VCS];
  logic [NUM_VCS-1:0] busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= '0;
      out_valid <= 1'b0;
      out_flit  <= '0;
      for (int v = 0; v < NUM_VCS; v++) credits[v] <= CW'(BUF_DEPTH);
    end else begin
      out_valid <= st_valid;
      if (st_valid) out_flit <= st_flit;
      for (int v = 0; v < NUM_VCS; v++) begin
        credits[v] <= credits[v]
                      - CW'(st_valid && int'(st_flit.vc) == v)
                      + CW'(credit_in.valid && int'(credit_in.vc) == v);
        if (alloc_valid && int'(alloc_vc) == v)                            busy[v] <= 1'b1;
        else if (st_valid && int'(st_flit.vc) == v && is_tail(st_flit.ftype)) busy[v] <= 1'b0;
      end
    end
  end

  always_comb
    for (int v = 0; v < NUM_VCS; v++) begin
      vc_free[v]       = !busy[v];
      vc_has_credit[v] = (credits[v] != '0);
    end

  assert property (@(posedge clk) disable iff (!rst_n)
    st_valid |-> credits[st_flit.vc] != '0);
endmodule
