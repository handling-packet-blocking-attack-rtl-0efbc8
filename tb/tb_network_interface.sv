// tb_network_interface: packets of random length are injected; the flits the
// NI sends are checked for format (head with header, body and tail flits with
// payload and index, one VC per packet) and for credit use against a model of
// a DEPTH-slot buffer per VC that drains at random and returns credits. The
// same flits are looped back, interleaved across VCs, into the ejection side,
// which must report every packet once with its source, length, payload,
// rerouted flag and a latency equal to arrival time minus injection time.
// Some looped-back body flits are corrupted and must be reported as errors.
module tb_network_interface;
  import noc_pkg::*;
  localparam int NV = 5, DEPTH = 4, ID = 9;
  logic clk = 0, rst_n = 0;
  logic [TIME_W-1:0] now = '0;
  logic inj_valid, inj_ready, rx_valid, rx_rerouted, rx_error, to_router_valid, from_router_valid;
  logic [NODE_W-1:0] inj_dst, rx_src;
  logic [LEN_W-1:0] inj_len, rx_len;
  logic [PAYLOAD_W-1:0] inj_payload, rx_payload;
  logic [TIME_W-1:0] rx_latency;
  flit_t to_router_flit, from_router_flit;
  credit_t credit_from_router, credit_to_router;

  network_interface #(.NODE_ID(ID), .NUM_VCS(NV), .BUF_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1'b1;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  typedef struct { int len; logic [PAYLOAD_W-1:0] pl; } pkt_t;
  pkt_t  sent_q [$];           // accepted by the NI, in order
  flit_t buf_q [NV][$];        // modelled downstream buffer (looped back)
  int    tx_idx [NV];          // flit index expected next on each VC
  pkt_t  tx_pkt [NV];
  typedef struct { int len; logic [PAYLOAD_W-1:0] pl; bit rr; bit bad; logic [TIME_W-1:0] t0; } exp_t;
  exp_t  exp_q [$];            // expected deliveries, in tail order
  exp_t  cur [NV];
  int    delivered = 0, errors_seen = 0, pkt_n = 0;
  bit    accept;

  initial begin
    inj_valid = 0; inj_dst = ID; inj_len = 1; inj_payload = '0;
    from_router_valid = 0; from_router_flit = '0; credit_from_router = '0;
    for (int v = 0; v < NV; v++) tx_idx[v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // injection request
      if (!inj_valid && pkt_n < 1500 && $urandom_range(0, 2) == 0) begin
        inj_valid = 1; inj_len = LEN_W'($urandom_range(1, 8));
        inj_payload = {$urandom, $urandom};
      end
      // downstream drains one flit: credit back and loop back
      credit_from_router = '0; from_router_valid = 0;
      begin
        int v;
        v = $urandom_range(0, NV - 1);
        if (buf_q[v].size() > 0 && $urandom_range(0, 1) == 1) begin
          flit_t f;
          f = buf_q[v].pop_front();
          credit_from_router = '{valid: 1'b1, vc: VC_ID_W'(v)};
          if (is_head(f.ftype)) begin
            head_t h;
            h = head_t'(f.data);
            cur[v].rr = $urandom_range(0, 1);
            h.rerouted = cur[v].rr;
            f.data = FLIT_DATA_W'(h);
            cur[v].len = int'(h.len); cur[v].pl = h.payload; cur[v].bad = 0; cur[v].t0 = h.inj_time;
          end else if ($urandom_range(0, 40) == 0) begin
            f.data[100] = ~f.data[100];
            cur[v].bad = 1;
          end
          from_router_flit = f; from_router_valid = 1;
          if (is_tail(f.ftype)) begin
            exp_t e;
            e = cur[v];
            e.t0 = now - e.t0;   // latency as seen one cycle later on rx
            exp_q.push_back(e);
          end
        end
      end
      #1;
      chk(credit_to_router.valid == from_router_valid &&
          (!from_router_valid || credit_to_router.vc == from_router_flit.vc), "ejection credit");
      // rx report of the previous cycle's tail
      if (rx_valid) begin
        exp_t e;
        chk(exp_q.size() > 0, "unexpected delivery");
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          chk(rx_src == ID && int'(rx_len) == e.len && rx_payload == e.pl && rx_rerouted == e.rr &&
              rx_error == e.bad && rx_latency == e.t0, "delivery report");
          delivered++;
          if (rx_error) errors_seen++;
        end
      end
      // flit sent by the NI this cycle
      if (to_router_valid) begin
        int v;
        flit_t f;
        f = to_router_flit;
        v = int'(f.vc);
        chk(v < NV && buf_q[v].size() < DEPTH, "credit overrun");
        if (tx_idx[v] == 0) begin
          head_t h;
          h = head_t'(f.data);
          chk(sent_q.size() > 0, "flit without packet");
          tx_pkt[v] = sent_q.pop_front();
          chk(h.dst == ID && h.src == ID && int'(h.len) == tx_pkt[v].len && h.payload == tx_pkt[v].pl &&
              h.inj_time == now && !h.inter_valid, "head fields");
          chk(f.ftype == ((tx_pkt[v].len == 1) ? F_HEADTAIL : F_HEAD), "head type");
        end else begin
          chk(f.data[127:64] == tx_pkt[v].pl && int'(f.data[23:16]) == tx_idx[v], "body fields");
          chk(f.ftype == ((tx_idx[v] == tx_pkt[v].len - 1) ? F_TAIL : F_BODY), "body type");
        end
        tx_idx[v]++;
        if (tx_idx[v] == tx_pkt[v].len) tx_idx[v] = 0;
        buf_q[v].push_back(f);
      end
      accept = inj_valid && inj_ready;
      @(posedge clk);
      #1;
      if (accept) begin
        sent_q.push_back('{len: int'(inj_len), pl: inj_payload});
        inj_valid = 0; pkt_n++;
      end
    end
    $display("packets %0d delivered %0d with errors %0d", pkt_n, delivered, errors_seen);
    chk(delivered > 1000 && delivered >= pkt_n - 2 * NV, "all packets delivered");
    chk(errors_seen > 0, "corruption detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
