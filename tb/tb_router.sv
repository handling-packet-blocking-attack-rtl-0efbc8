// tb_router: router 27 (x = 3, y = 3) of an 8x8 mesh, with the Trojan payload
// present. The testbench plays the four neighbours and the NI: sources on all
// five inputs send packets of random length and destination under credit flow
// control, sinks on all five outputs drain at random and return credits.
// Checked for every packet: it leaves through the XY output port (or the
// redirected one), its flits stay in order on one output VC, nothing is lost
// or duplicated, and the head reports hop delay = exit time - entry time
// (3 cycles when unhindered). Phases: (1) plain traffic; (2) TSM enabled and a
// long delay reported by the East neighbour: packets bound East must be
// redirected North or South with the intermediate destination set; (3) the
// Trojan armed (activation probability 1): blocking must occur, raise hop
// delays, and still lose nothing.
module tb_router;
  import noc_pkg::*;
  localparam int C = 8, R = 8, ID = 27, NV = 5, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [TIME_W-1:0] now = '0;
  flit_t in_flit [NUM_PORTS], out_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0] in_valid, out_valid, suspect, anomaly;
  credit_t credit_out [NUM_PORTS], credit_in [NUM_PORTS];
  logic ht_kill_switch, tsm_enable, ht_active, ht_block_event;

  router #(.COLS(C), .ROWS(R), .NODE_ID(ID), .NUM_VCS(NV), .BUF_DEPTH(DEPTH), .HT_EN(1'b1),
           .HT_P_ACT_Q8(256), .HT_PERIOD(16), .TSM_HOLD(4000)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1'b1;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic int xy(int d);
    int cx = ID % C, cy = ID / C, dx = d % C, dy = d / C;
    if (dx > cx) return P_EAST;
    if (dx < cx) return P_WEST;
    if (dy > cy) return P_NORTH;
    if (dy < cy) return P_SOUTH;
    return P_LOCAL;
  endfunction

  // packet bookkeeping, indexed by tag (= payload)
  typedef struct { int dst; int len; int entry; int port; bit expect_rr; } pinfo_t;
  pinfo_t pk [int];
  // sources
  int src_credit [NUM_PORTS][NV];
  int src_left [NUM_PORTS], src_vc [NUM_PORTS], src_tag [NUM_PORTS];
  int next_tag = 1;
  // sinks
  int sink_occ [NUM_PORTS][NV];
  int sink_tag [NUM_PORTS][NV], sink_cnt [NUM_PORTS][NV];
  int phase = 0, spike_now = 0, force_dst [NUM_PORTS];
  int sent = 0, done = 0, redirected = 0, max_delay = 0, blocks = 0, min_delay = 999;

  function automatic flit_t src_flit(int p);
    flit_t f;
    head_t h;
    f = '0;
    f.vc = VC_ID_W'(src_vc[p]);
    if (src_left[p] == 0) begin
      int len, d;
      len = $urandom_range(1, 5);
      do d = (force_dst[p] >= 0) ? force_dst[p] : $urandom_range(0, C * R - 1);
      while (p != P_LOCAL && d == ID && force_dst[p] < 0 && $urandom_range(0, 3) != 0);
      src_tag[p] = next_tag++;
      src_left[p] = len;
      h = '0;
      h.dst = NODE_W'(d); h.src = NODE_W'(p); h.len = LEN_W'(len);
      h.payload = PAYLOAD_W'(src_tag[p]);
      h.hop_delay = (spike_now && p == P_EAST) ? 8'd60 : 8'd3;
      f.data = FLIT_DATA_W'(h);
      f.ftype = (len == 1) ? F_HEADTAIL : F_HEAD;
      pk[src_tag[p]] = '{dst: d, len: len, entry: int'(now), port: p, expect_rr: 0};
      sent++;
    end else begin
      f.data[127:64] = PAYLOAD_W'(src_tag[p]);
      f.ftype = (src_left[p] == 1) ? F_TAIL : F_BODY;
    end
    return f;
  endfunction

  initial begin
    ht_kill_switch = 0; tsm_enable = 0; in_valid = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_flit[p] = '0; credit_in[p] = '0; src_left[p] = 0; src_vc[p] = 0; force_dst[p] = -1;
      for (int v = 0; v < NV; v++) begin src_credit[p][v] = DEPTH; sink_occ[p][v] = 0; sink_cnt[p][v] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 24000; cyc++) begin
      @(negedge clk);
      // phase control
      if (cyc == 8000)  begin phase = 2; tsm_enable = 1; end
      if (cyc == 16000) begin phase = 3; tsm_enable = 0; ht_kill_switch = 1; end
      spike_now = (phase == 2 && cyc >= 8100 && cyc < 8110);
      force_dst[P_WEST]  = (phase == 2 && cyc >= 8200 && cyc < 12000) ? ID + 2 : -1;         // east, same row
      force_dst[P_LOCAL] = (phase == 2 && cyc >= 8200 && cyc < 12000) ? ID + 2 + 2 * C : -1; // east, north-east
      // sources (stop 400 cycles before the end of each phase to drain)
      in_valid = '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        bit quiet;
        quiet = (cyc % 8000) > 7600 || cyc > 23600;
        if (src_left[p] == 0 && !quiet && $urandom_range(0, 1) == 0) src_vc[p] = $urandom_range(0, NV - 1);
        if (!quiet || src_left[p] > 0)
          if (src_credit[p][src_vc[p]] > 0 && (src_left[p] > 0 || (!quiet && $urandom_range(0, 2) == 0))) begin
            in_flit[p] = src_flit(p);
            in_valid[p] = 1;
          end
      end
      // sinks: return one credit per port at random
      for (int o = 0; o < NUM_PORTS; o++) begin
        int v;
        credit_in[o] = '0;
        v = $urandom_range(0, NV - 1);
        if (sink_occ[o][v] > 0 && $urandom_range(0, 2) != 0) credit_in[o] = '{valid: 1'b1, vc: VC_ID_W'(v)};
      end
      #1;
      // outputs
      for (int o = 0; o < NUM_PORTS; o++) if (out_valid[o]) begin
        flit_t f;
        int v, tag;
        f = out_flit[o];
        v = int'(f.vc);
        chk(sink_occ[o][v] < DEPTH, "credit overrun at output");
        if (is_head(f.ftype)) begin
          head_t h;
          int eo, d;
          h = head_t'(f.data);
          tag = int'(h.payload);
          chk(pk.exists(tag) && sink_cnt[o][v] == 0, "unknown head / interleaved packet");
          if (pk.exists(tag)) begin
            d = int'(now) - 1 - pk[tag].entry;
            chk(int'(h.hop_delay) == (d & 255), "hop delay = exit - entry");
            if (d > max_delay) max_delay = d;
            if (d < min_delay) min_delay = d;
            eo = xy(pk[tag].dst);
            if (h.rerouted) begin
              redirected++;
              chk(phase == 2 && eo == P_EAST && (o == P_NORTH || o == P_SOUTH) && h.inter_valid &&
                  int'(h.inter_dst) == ((o == P_NORTH) ? ID + C : ID - C), "redirection");
              if (pk[tag].dst == ID + 2) chk(o == P_SOUTH, "same-row destination goes South");
              if (pk[tag].dst == ID + 2 + 2 * C) chk(o == P_NORTH, "northern destination goes North");
            end else begin
              chk(o == eo && !h.inter_valid, "XY output port");
              chk(!(suspect[P_EAST] && eo == P_EAST && phase == 2 && pk[tag].dst != ID + 1 && pk[tag].entry > 8200),
                  "East-bound packet not redirected while East is suspect");
            end
            sink_tag[o][v] = tag;
            sink_cnt[o][v] = 1;
          end
        end else begin
          tag = int'(f.data[127:64]);
          chk(sink_cnt[o][v] > 0 && tag == sink_tag[o][v], "body flit out of its packet");
          sink_cnt[o][v]++;
        end
        if (is_tail(f.ftype) && pk.exists(sink_tag[o][v])) begin
          chk(sink_cnt[o][v] == pk[sink_tag[o][v]].len, "packet length");
          pk.delete(sink_tag[o][v]);
          sink_cnt[o][v] = 0;
          done++;
        end
      end
      for (int p = 0; p < NUM_PORTS; p++)
        if (credit_out[p].valid) src_credit[p][credit_out[p].vc]++;
      if (ht_block_event) blocks++;
      @(posedge clk);
      for (int p = 0; p < NUM_PORTS; p++) if (in_valid[p]) begin
        src_credit[p][src_vc[p]]--;
        src_left[p]--;
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (out_valid[o]) sink_occ[o][out_flit[o].vc]++;
        if (credit_in[o].valid) sink_occ[o][credit_in[o].vc]--;
      end
    end
    $display("sent %0d delivered %0d redirected %0d blocks %0d hop delay min %0d max %0d",
             sent, done, redirected, blocks, min_delay, max_delay);
    chk(done == sent && pk.size() == 0, "all packets delivered");
    chk(min_delay == 3, "unhindered hop delay is 3 cycles");
    chk(redirected > 20, "redirection happened");
    chk(blocks > 20 && max_delay > 20, "Trojan blocking happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
