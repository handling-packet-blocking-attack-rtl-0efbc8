// tsm_redirect: redirection unit of the Traffic Snoop Manager.
//
// Given the expected output port of a head flit (from XY routing) and the
// directions whose neighbour router the TSM currently suspects, it decides
// whether the packet must avoid that neighbour and, if so, gives a detour
// output port and an intermediate destination; routing continues with XY from
// there. The rules follow the document's redirection algorithm:
//   East  : destination_y >  current_y -> North, intermediate = id + COLS,
//           otherwise South, intermediate = id - COLS.
//   West  : destination_y <  current_y -> North, intermediate = id + COLS,
//           otherwise South, intermediate = id - COLS (kept as published,
//           although it is not the mirror image of the East rule).
//   North : intermediate = id + 2*COLS +/- 1; South: id - 2*COLS +/- 1.
// For North and South the output port is recomputed locally by XY toward the
// intermediate destination, which gives East (+1) or West (-1, last column).
// Design choices the document leaves open: at a mesh edge the row that exists
// is taken (East/West) or the row is clamped into the mesh (North/South); a
// packet whose destination is the suspected neighbour, or which is already on
// its way to an intermediate destination, is not redirected. Combinational.
module tsm_redirect
  import noc_pkg::*;
#(
  parameter int unsigned COLS    = 8,
  parameter int unsigned ROWS    = 8,
  parameter int unsigned NODE_ID = 0
) (
  input  logic [NUM_PORTS-1:0] suspect,      // ht_dir flags, one per port
  input  logic [PORT_W-1:0]    exp_outport,  // expected outport (XY)
  input  logic [NODE_W-1:0]    dst,          // final destination
  input  logic [NODE_W-1:0]    inter_dst_in,
  input  logic                 inter_valid_in,
  output logic [PORT_W-1:0]    new_outport,
  output logic [NODE_W-1:0]    inter_dst,
  output logic                 inter_valid,
  output logic                 reroute
);
  localparam int CUR_X = NODE_ID % COLS;
  localparam int CUR_Y = NODE_ID / COLS;
  localparam int ID    = NODE_ID;
  localparam bit HAS_N = (CUR_Y < int'(ROWS) - 1);
  localparam bit HAS_S = (CUR_Y > 0);
  // column used by the North/South detour
  localparam int DET_X = (CUR_X < int'(COLS) - 1) ? CUR_X + 1 : CUR_X - 1;
  localparam int N2_Y  = (CUR_Y + 2 > int'(ROWS) - 1) ? int'(ROWS) - 1 : CUR_Y + 2;
  localparam int S2_Y  = (CUR_Y - 2 < 0) ? 0 : CUR_Y - 2;
  localparam logic [PORT_W-1:0] DET_PORT = (DET_X > CUR_X) ? P_EAST : P_WEST;

  int  dst_y;
  int  nb;          // node id of the neighbour in the expected direction
  logic go_north;

  always_comb begin
    dst_y = int'(dst) / COLS;
    unique case (exp_outport)
      P_NORTH: nb = ID + int'(COLS);
      P_SOUTH: nb = ID - int'(COLS);
      P_EAST:  nb = ID + 1;
      P_WEST:  nb = ID - 1;
      default: nb = ID;
    endcase

    new_outport = exp_outport;
    inter_dst   = inter_dst_in;
    inter_valid = inter_valid_in;
    reroute     = 1'b0;
    go_north    = 1'b0;

    if (suspect[exp_outport] && exp_outport != P_LOCAL && !inter_valid_in &&
        int'(dst) != nb) begin
      reroute = 1'b1;
      unique case (exp_outport)
        P_EAST, P_WEST: begin
          if (exp_outport == P_EAST) go_north = (dst_y > CUR_Y);
          else                       go_north = (dst_y < CUR_Y);
          if (go_north && !HAS_N) go_north = 1'b0;
          if (!go_north && !HAS_S) go_north = 1'b1;
          if (go_north) begin
            new_outport = P_NORTH;
            inter_dst   = NODE_W'(ID + int'(COLS));
          end else begin
            new_outport = P_SOUTH;
            inter_dst   = NODE_W'(ID - int'(COLS));
          end
        end
        P_NORTH: begin
          new_outport = DET_PORT;
          inter_dst   = NODE_W'(N2_Y * int'(COLS) + DET_X);
        end
        default: begin // P_SOUTH
          new_outport = DET_PORT;
          inter_dst   = NODE_W'(S2_Y * int'(COLS) + DET_X);
        end
      endcase
      inter_valid = 1'b1;
    end
  end
endmodule
