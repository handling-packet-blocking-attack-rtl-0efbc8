// vc_allocator: assigns output virtual channels to head flits.
//
// Every input VC that has finished route computation requests its output
// port. For each output port a round-robin arbiter over all NUM_PORTS*NUM_VCS
// input VCs picks one requester, which receives the lowest-numbered free VC of
// that output port; nothing is granted while the port has no free VC. At most
// one allocation per output port per cycle. The document only names this
// stage; this separable scheme is this design's choice. Combinational grants,
// registered priorities; the caller marks the VC busy with alloc_valid/alloc_vc.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VCS = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_VCS-1:0]   req      [NUM_PORTS],
  input  logic [PORT_W-1:0]    req_port [NUM_PORTS][NUM_VCS],
  input  logic [NUM_VCS-1:0]   vc_free  [NUM_PORTS],     // per output port
  output logic [NUM_VCS-1:0]   gnt      [NUM_PORTS],     // per input VC
  output logic [VC_ID_W-1:0]   gnt_vc   [NUM_PORTS][NUM_VCS], // per input VC
  output logic [NUM_PORTS-1:0] alloc_valid,              // per output port
  output logic [VC_ID_W-1:0]   alloc_vc [NUM_PORTS]
);
  localparam int unsigned NR = NUM_PORTS * NUM_VCS;

  logic [NR-1:0]          a_req [NUM_PORTS];
  logic [NR-1:0]          a_gnt [NUM_PORTS];
  logic [$clog2(NR)-1:0]  a_idx [NUM_PORTS];
  logic [NUM_PORTS-1:0]   a_valid;
  logic [NUM_PORTS-1:0]   has_free;
  logic [VC_ID_W-1:0]     free_vc [NUM_PORTS];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      has_free[o] = 1'b0;
      free_vc[o]  = '0;
      for (int v = NUM_VCS - 1; v >= 0; v--)
        if (vc_free[o][v]) begin
          has_free[o] = 1'b1;
          free_vc[o]  = VC_ID_W'(v);
        end
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VCS; v++)
          a_req[o][i*NUM_VCS+v] = has_free[o] && req[i][v] && (int'(req_port[i][v]) == o);
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    rr_arbiter #(.N(NR)) u_arb (
      .clk, .rst_n,
      .req       (a_req[o]),
      .advance   (1'b1),
      .gnt       (a_gnt[o]),
      .gnt_idx   (a_idx[o]),
      .gnt_valid (a_valid[o])
    );
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      gnt[i] = '0;
      for (int v = 0; v < NUM_VCS; v++) gnt_vc[i][v] = '0;
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      alloc_valid[o] = a_valid[o];
      alloc_vc[o]    = free_vc[o];
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VCS; v++)
          if (a_gnt[o][i*NUM_VCS+v]) begin
            gnt[i][v]    = 1'b1;
            gnt_vc[i][v] = free_vc[o];
          end
    end
  end
endmodule
