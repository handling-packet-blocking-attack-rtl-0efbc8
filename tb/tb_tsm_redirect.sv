// tb_tsm_redirect: drives the redirection unit of routers in the centre, at
// the edges and in the corners of an 8x8 mesh with every expected output port,
// suspect pattern and destination, and compares the detour port and the
// intermediate destination with a model of the redirection rules.
module tb_tsm_redirect;
  import noc_pkg::*;
  localparam int C = 8, R = 8;
  localparam int NK = 5;
  localparam int IDS [NK] = '{27, 7, 56, 63, 0};
  int checks = 0, failures = 0;
  int n_ew = 0, n_ns = 0;

  logic [NUM_PORTS-1:0] suspect;
  logic [PORT_W-1:0]    exp_op;
  logic [NODE_W-1:0]    dst, idst_in;
  logic                 iv_in;
  logic [PORT_W-1:0]    new_op [NK];
  logic [NODE_W-1:0]    idst [NK];
  logic                 iv [NK], rr [NK];

  for (genvar k = 0; k < NK; k++) begin : g
    tsm_redirect #(.COLS(C), .ROWS(R), .NODE_ID(IDS[k])) dut (
      .suspect(suspect), .exp_outport(exp_op), .dst(dst), .inter_dst_in(idst_in),
      .inter_valid_in(iv_in), .new_outport(new_op[k]), .inter_dst(idst[k]),
      .inter_valid(iv[k]), .reroute(rr[k]));
  end

  task automatic model(input int cur, output int op, output int id, output bit r);
    int cx = cur % C, cy = cur / C, dy = int'(dst) / C, nb;
    bit north;
    op = int'(exp_op); id = int'(idst_in); r = 0;
    case (int'(exp_op)) 1: nb = cur + C; 2: nb = cur + 1; 3: nb = cur - C; 4: nb = cur - 1; default: nb = cur; endcase
    if (exp_op == 0 || !suspect[exp_op] || iv_in || int'(dst) == nb) return;
    r = 1;
    if (exp_op == 2 || exp_op == 4) begin
      north = (exp_op == 2) ? (dy > cy) : (dy < cy);
      if (cy == R - 1) north = 0;
      if (cy == 0) north = 1;
      op = north ? 1 : 3;
      id = north ? cur + C : cur - C;
    end else begin
      int ny = (exp_op == 1) ? ((cy + 2 > R - 1) ? R - 1 : cy + 2) : ((cy - 2 < 0) ? 0 : cy - 2);
      int nx = (cx == C - 1) ? cx - 1 : cx + 1;
      op = (cx == C - 1) ? 4 : 2;
      id = ny * C + nx;
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      suspect = NUM_PORTS'($urandom) & 5'b11110;
      exp_op  = PORT_W'($urandom_range(0, 4));
      dst     = NODE_W'($urandom_range(0, C * R - 1));
      iv_in   = ($urandom_range(0, 9) == 0);
      idst_in = NODE_W'($urandom_range(0, C * R - 1));
      if (t < 64) begin  // first: the HT neighbour's own node as destination
        suspect = 5'b11110; iv_in = 0;
        dst = NODE_W'(27 + ((t % 4 == 0) ? C : (t % 4 == 1) ? 1 : (t % 4 == 2) ? -C : -1));
      end
      #1;
      for (int k = 0; k < NK; k++) begin
        int op, id; bit r;
        model(IDS[k], op, id, r);
        checks++;
        if (rr[k] != r || int'(new_op[k]) != op || (r && (int'(idst[k]) != id || !iv[k])) ||
            (!r && (iv[k] != iv_in || idst[k] != idst_in))) begin
          failures++;
          $display("node %0d exp %0d dst %0d sus %b: got op %0d id %0d rr %0d, want %0d %0d %0d",
                   IDS[k], exp_op, dst, suspect, new_op[k], idst[k], rr[k], op, id, r);
        end
        if (r && (exp_op == 2 || exp_op == 4)) n_ew++;
        if (r && (exp_op == 1 || exp_op == 3)) n_ns++;
      end
    end
    checks++;
    if (n_ew == 0 || n_ns == 0) failures++;
    $display("redirections east/west %0d north/south %0d", n_ew, n_ns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
