// tb_noc_mesh_top: end-to-end run of a reduced 4x4 mesh (Trojan in router 5,
// x = 1, y = 1, an inner router) under uniform random traffic, in three phases:
//   A  clean baseline (Trojan disarmed, TSM off),
//   B  Trojan armed in router 27, TSM off,
//   C  Trojan armed, TSM on (detection and redirection),
// followed by a drain. Every packet (random destination, 1..5 flits, unique
// tag as payload) must arrive exactly once at its destination with the right
// source, length and payload and no reassembly error, and its latency must be
// at least the pipeline minimum 4*(hops+1) + len - 1 cycles, which unhindered
// packets must reach. Counted and required: Trojan blocking events, packets
// slowed by the Trojan, TSM anomalies, suspect flags raised, redirected
// packets delivered. Average latencies per phase are printed.
module tb_noc_mesh_top;
  import noc_pkg::*;
  localparam int C = 4, R = 4, N = C * R, HT = 5;
  localparam int RATE_PPM = 30000;     // packets per node per cycle * 1e6

  logic clk = 0, rst_n = 0, ht_kill_switch = 0, tsm_enable = 0;
  logic                 inj_valid [N], inj_ready [N];
  logic [NODE_W-1:0]    inj_dst [N];
  logic [LEN_W-1:0]     inj_len [N];
  logic [PAYLOAD_W-1:0] inj_payload [N];
  logic                 rx_valid [N], rx_rerouted [N], rx_error [N];
  logic [NODE_W-1:0]    rx_src [N];
  logic [LEN_W-1:0]     rx_len [N];
  logic [TIME_W-1:0]    rx_latency [N];
  logic [PAYLOAD_W-1:0] rx_payload [N];
  logic [NUM_PORTS-1:0] suspect [N], anomaly [N];
  logic                 ht_active, ht_block_event;

  noc_mesh_top #(.COLS(C), .ROWS(R), .HT_NODE(HT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  typedef struct { int src; int dst; int len; int phase; } pinfo_t;
  pinfo_t pk [longint];
  longint next_tag = 1;
  bit     accept [N];
  int     phase = 0;
  int     sent = 0, delivered = 0, rerouted = 0, blocks = 0, anomalies = 0, suspect_raised = 0;
  int     at_min = 0, multi_flit = 0, slow = 0;
  longint lat_sum [3], lat_n [3];
  logic [NUM_PORTS-1:0] prev_suspect [N];

  function automatic int hops(int s, int d);
    int dx = (s % C) - (d % C), dy = (s / C) - (d / C);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  localparam int T_B = 3000, T_C = 7000, T_END = 12000, T_DRAIN = 15000;

  initial begin
    for (int n = 0; n < N; n++) begin
      inj_valid[n] = 0; inj_dst[n] = '0; inj_len[n] = 1; inj_payload[n] = '0; prev_suspect[n] = '0;
    end
    for (int k = 0; k < 3; k++) begin lat_sum[k] = 0; lat_n[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < T_DRAIN; cyc++) begin
      @(negedge clk);
      if (cyc == T_B) begin phase = 1; ht_kill_switch = 1; end
      if (cyc == T_C) begin phase = 2; tsm_enable = 1; end
      for (int n = 0; n < N; n++) begin
        if (!inj_valid[n] && cyc < T_END && $urandom_range(0, 999999) < RATE_PPM) begin
          int d, len;
          do d = $urandom_range(0, N - 1); while (d == n);
          len = $urandom_range(1, 5);
          inj_valid[n] = 1; inj_dst[n] = NODE_W'(d); inj_len[n] = LEN_W'(len);
          inj_payload[n] = PAYLOAD_W'(next_tag);
          pk[next_tag] = '{src: n, dst: d, len: len, phase: phase};
          next_tag++;
          sent++;
        end
      end
      #1;
      for (int n = 0; n < N; n++) begin
        accept[n] = inj_valid[n] && inj_ready[n];
        if (rx_valid[n]) begin
          longint tag;
          tag = longint'(rx_payload[n]);
          chk(pk.exists(tag), "unknown or duplicate packet");
          if (pk.exists(tag)) begin
            int lb;
            pinfo_t p;
            p = pk[tag];
            lb = 4 * (hops(p.src, p.dst) + 1) + p.len - 1;
            chk(p.dst == n && int'(rx_src[n]) == p.src && int'(rx_len[n]) == p.len && !rx_error[n],
                "delivery contents");
            chk(int'(rx_latency[n]) >= lb, "latency below the pipeline minimum");
            if (int'(rx_latency[n]) == lb) at_min++;
            if (int'(rx_latency[n]) > lb + 30) slow++;
            if (p.len > 1) multi_flit++;
            if (rx_rerouted[n]) rerouted++;
            lat_sum[p.phase] += rx_latency[n];
            lat_n[p.phase]++;
            pk.delete(tag);
            delivered++;
          end
        end
        for (int q = 0; q < NUM_PORTS; q++) begin
          if (anomaly[n][q]) anomalies++;
          if (suspect[n][q] && !prev_suspect[n][q]) suspect_raised++;
        end
        prev_suspect[n] = suspect[n];
      end
      if (ht_block_event) blocks++;
      @(posedge clk);
      #1;
      for (int n = 0; n < N; n++) if (accept[n]) inj_valid[n] = 0;
      if (cyc % 3000 == 0) $display("cycle %0d sent %0d delivered %0d", cyc, sent, delivered);
    end
    $display("sent %0d delivered %0d multi-flit %0d at-minimum %0d slowed %0d", sent, delivered, multi_flit, at_min, slow);
    $display("trojan blocks %0d anomalies %0d suspect flags raised %0d redirected packets %0d",
             blocks, anomalies, suspect_raised, rerouted);
    for (int k = 0; k < 3; k++)
      $display("phase %0d: %0d packets, average latency %0.2f cycles", k, lat_n[k],
               lat_n[k] ? real'(lat_sum[k]) / lat_n[k] : 0.0);
    chk(delivered == sent && pk.size() == 0, "every packet delivered");
    chk(at_min > 0, "unhindered packets reach the minimum latency");
    chk(multi_flit > 0, "multi-flit packets");
    chk(blocks > 0, "Trojan blocking");
    chk(slow > 0, "packets slowed");
    chk(anomalies > 0, "TSM anomaly detection");
    chk(suspect_raised > 0, "suspect flags raised");
    chk(rerouted > 0, "redirected packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (T_DRAIN + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
