// input_port: one router input port with its virtual channels.
//
// Incoming flits are written into the VC buffer named by their VC field. On
// buffer write the hop_delay field of a head flit is overwritten with the low
// bits of the cycle counter (the packet's entry time); when the head flit
// leaves, the field is replaced by exit time minus entry time, which the next
// router's Traffic Snoop Manager reads as this router's buffering delay.
// Each VC runs through three states:
//   IDLE   : a head flit at the front waits for route computation. One VC per
//            cycle (lowest index first) is offered to the port's RC unit; the
//            route (output port, intermediate destination, rerouted flag) is
//            stored and the VC moves to VA.
//   VA     : requests an output VC; on grant it moves to ACTIVE.
//   ACTIVE : requests the switch whenever a flit is buffered and the output VC
//            has a credit. A granted flit is read, its VC field set to the
//            output VC, the head flit's fields patched, and a credit returned
//            upstream. The tail flit returns the VC to IDLE.
// With buffer write, RC, VA and SA/ST one cycle each, an unhindered head flit
// spends 3 cycles from write to traversal, the "about three cycles" router
// delay the document quotes. The state machine is this design's choice.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VCS   = 5,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [TIME_W-1:0]  now,
  // link
  input  flit_t              in_flit,
  input  logic               in_valid,
  output credit_t            credit_out,
  // route computation
  output logic               rc_valid,
  output head_t              rc_head,
  input  route_t             rc_route,
  // VC allocation
  output logic [NUM_VCS-1:0] va_req,
  output logic [PORT_W-1:0]  out_port [NUM_VCS],
  input  logic [NUM_VCS-1:0] va_gnt,
  input  logic [VC_ID_W-1:0] va_gnt_vc [NUM_VCS],
  // switch arbitration
  input  logic [NUM_VCS-1:0] cred_ok,       // output VC of each VC has a credit
  output logic [NUM_VCS-1:0] sa_req,
  output logic [NUM_VCS-1:0] front_is_head,
  input  logic               st_gnt,        // effective grant (after the Trojan gate)
  input  logic [VC_ID_W-1:0] st_vc,
  // switch traversal
  output logic               st_valid,
  output flit_t              st_flit,
  output logic [PORT_W-1:0]  st_outport
);
  localparam int unsigned CNTW = $clog2(BUF_DEPTH + 1);

  typedef enum logic [1:0] {VS_IDLE, VS_VA, VS_ACTIVE} vc_state_e;

  vc_state_e          state   [NUM_VCS];
  route_t             route   [NUM_VCS];
  logic [VC_ID_W-1:0] out_vc  [NUM_VCS];
  flit_t              front   [NUM_VCS];
  logic [CNTW-1:0]    count   [NUM_VCS];
  logic [NUM_VCS-1:0] rd_en;

  // buffer write with entry time stamp in head flits
  flit_t wr_flit;
  always_comb begin
    head_t h;
    h       = head_t'(in_flit.data);
    wr_flit = in_flit;
    if (is_head(in_flit.ftype)) begin
      h.hop_delay = now[DELAY_W-1:0];
      wr_flit.data = FLIT_DATA_W'(h);
    end
  end

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
    vc_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en   (in_valid && int'(in_flit.vc) == v),
      .wr_flit (wr_flit),
      .rd_en   (rd_en[v]),
      .head    (front[v]),
      .count   (count[v])
    );
    assign rd_en[v]         = st_gnt && int'(st_vc) == v;
    assign front_is_head[v] = is_head(front[v].ftype);
    assign va_req[v]        = (state[v] == VS_VA);
    assign out_port[v]      = route[v].outport;
    assign sa_req[v]        = (state[v] == VS_ACTIVE) && (count[v] != '0) && cred_ok[v];
  end

  // route computation: lowest idle VC with a head flit at its front
  logic [VC_ID_W-1:0] rc_vc;
  always_comb begin
    rc_valid = 1'b0;
    rc_vc    = '0;
    for (int v = NUM_VCS - 1; v >= 0; v--)
      if (state[v] == VS_IDLE && count[v] != '0) begin
        rc_valid = 1'b1;
        rc_vc    = VC_ID_W'(v);
      end
    rc_head = head_t'(front[rc_vc].data);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        state[v]  <= VS_IDLE;
        route[v]  <= '0;
        out_vc[v] <= '0;
      end
    end else begin
      for (int v = 0; v < NUM_VCS; v++) begin
        unique case (state[v])
          VS_IDLE:
            if (rc_valid && int'(rc_vc) == v) begin
              route[v] <= rc_route;
              state[v] <= VS_VA;
            end
          VS_VA:
            if (va_gnt[v]) begin
              out_vc[v] <= va_gnt_vc[v];
              state[v]  <= VS_ACTIVE;
            end
          default:
            if (rd_en[v] && is_tail(front[v].ftype)) state[v] <= VS_IDLE;
        endcase
      end
    end
  end

  // switch traversal: patch and forward the granted flit
  always_comb begin
    head_t h;
    st_valid   = st_gnt;
    h          = head_t'(front[st_vc].data);
    st_flit    = front[st_vc];
    st_flit.vc = out_vc[st_vc];
    st_outport = route[st_vc].outport;
    if (is_head(st_flit.ftype)) begin
      h.hop_delay   = now[DELAY_W-1:0] - h.hop_delay;
      h.inter_dst   = route[st_vc].inter_dst;
      h.inter_valid = route[st_vc].inter_valid;
      h.rerouted    = h.rerouted | route[st_vc].rerouted;
      st_flit.data  = FLIT_DATA_W'(h);
    end
  end

  assign credit_out = '{valid: st_gnt, vc: st_vc};

  assert property (@(posedge clk) disable iff (!rst_n) st_gnt |-> state[st_vc] == VS_ACTIVE);
  assert property (@(posedge clk) disable iff (!rst_n)
    rc_valid |-> is_head(front[rc_vc].ftype));
endmodule
