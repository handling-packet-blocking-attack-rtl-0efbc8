// route_compute: XY dimension-order route computation for one head flit.
//
// The packet is routed toward its intermediate destination while it has one,
// otherwise toward its final destination. When the router itself is the
// intermediate destination, that destination is dropped and routing continues
// to the final one. X is resolved first (East = larger x), then Y (North =
// larger y, node id + COLS); at the target the flit leaves through Local.
// Purely combinational. XY routing follows the document; the intermediate
// destination fields serve the TSM redirection unit.
module route_compute
  import noc_pkg::*;
#(
  parameter int unsigned COLS    = 8,
  parameter int unsigned ROWS    = 8,
  parameter int unsigned NODE_ID = 0
) (
  input  logic [NODE_W-1:0] dst,
  input  logic [NODE_W-1:0] inter_dst,
  input  logic              inter_valid,
  output logic [PORT_W-1:0] outport,
  output logic [NODE_W-1:0] target,
  output logic              inter_valid_out
);
  localparam int CUR_X = NODE_ID % COLS;
  localparam int CUR_Y = NODE_ID / COLS;

  int tx, ty;

  always_comb begin
    inter_valid_out = inter_valid && (int'(inter_dst) != NODE_ID);
    target          = inter_valid_out ? inter_dst : dst;
    tx              = int'(target) % int'(COLS);
    ty              = int'(target) / int'(COLS);
    if (tx > CUR_X)      outport = P_EAST;
    else if (tx < CUR_X) outport = P_WEST;
    else if (ty > CUR_Y) outport = P_NORTH;
    else if (ty < CUR_Y) outport = P_SOUTH;
    else                 outport = P_LOCAL;
  end
endmodule
