// tb_route_compute: for several router positions of an 8x8 mesh, checks the
// XY output port for every destination against an independent model, and the
// handling of an intermediate destination (used while set, dropped when
// reached).
module tb_route_compute;
  import noc_pkg::*;
  localparam int COLS = 8, ROWS = 8;
  int checks = 0, failures = 0;

  logic [NODE_W-1:0] dst [4], idst [4], target [4];
  logic              iv [4], iv_out [4];
  logic [PORT_W-1:0] outport [4];
  localparam int IDS [4] = '{0, 27, 63, 12};

  for (genvar k = 0; k < 4; k++) begin : g
    route_compute #(.COLS(COLS), .ROWS(ROWS), .NODE_ID(IDS[k])) dut (
      .dst(dst[k]), .inter_dst(idst[k]), .inter_valid(iv[k]),
      .outport(outport[k]), .target(target[k]), .inter_valid_out(iv_out[k]));
  end

  function automatic int xy(int cur, int d);
    int cx = cur % COLS, cy = cur / COLS, dx = d % COLS, dy = d / COLS;
    if (dx > cx) return 2;
    if (dx < cx) return 4;
    if (dy > cy) return 1;
    if (dy < cy) return 3;
    return 0;
  endfunction

  initial begin
    for (int d = 0; d < COLS * ROWS; d++) begin
      for (int k = 0; k < 4; k++) begin
        dst[k] = NODE_W'(d); iv[k] = 0; idst[k] = '0;
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(outport[k]) != xy(IDS[k], d) || iv_out[k]) begin
          failures++; $display("node %0d dst %0d got %0d", IDS[k], d, outport[k]);
        end
      end
      // intermediate destination d, final destination far away
      for (int k = 0; k < 4; k++) begin
        dst[k] = NODE_W'(63 - IDS[k]); iv[k] = 1; idst[k] = NODE_W'(d);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        int exp_t;
        exp_t = (d == IDS[k]) ? 63 - IDS[k] : d;
        checks++;
        if (int'(outport[k]) != xy(IDS[k], exp_t) || int'(target[k]) != exp_t ||
            iv_out[k] != (d != IDS[k])) begin
          failures++; $display("inter: node %0d idst %0d got %0d", IDS[k], d, outport[k]);
        end
      end
    end
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
