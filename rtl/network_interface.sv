// network_interface: connects an IP block to the local port of its router.
//
// Injection: the IP hands over a packet descriptor (destination, length in
// flits, one 64-bit payload word) with a valid/ready handshake. The NI sends a
// head flit carrying the header (destination, source, injection time, length,
// payload), then LEN-2 body flits and a tail flit, each carrying the payload
// word, its flit index and the source id; a one-flit packet is a single
// head-tail flit. Packets use the router's VCs in turn, one packet at a time;
// a flit is sent only when the NI holds a credit for its VC.
// Ejection: flits from the router are accepted every cycle and their credit is
// returned at once. Per VC the NI reassembles the packet, checks that body and
// tail flits carry the head's payload and consecutive indices, and when the
// tail arrives reports source, length, latency (arrival cycle minus the
// injection time stamped in the head), whether a TSM redirected the packet and
// whether the checks failed. rx_* is registered: it appears the cycle after the
// tail flit arrives. The packet format is this design's choice; the document
// only says that the NI converts packets into head, body and tail flits.
module network_interface
  import noc_pkg::*;
#(
  parameter int unsigned NODE_ID   = 0,
  parameter int unsigned NUM_VCS   = 5,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TIME_W-1:0]    now,
  // IP side, injection
  input  logic                 inj_valid,
  output logic                 inj_ready,
  input  logic [NODE_W-1:0]    inj_dst,
  input  logic [LEN_W-1:0]     inj_len,      // 1..15 flits
  input  logic [PAYLOAD_W-1:0] inj_payload,
  // IP side, delivery
  output logic                 rx_valid,
  output logic [NODE_W-1:0]    rx_src,
  output logic [LEN_W-1:0]     rx_len,
  output logic [TIME_W-1:0]    rx_latency,
  output logic                 rx_rerouted,
  output logic                 rx_error,
  output logic [PAYLOAD_W-1:0] rx_payload,
  // router side
  output flit_t                to_router_flit,
  output logic                 to_router_valid,
  input  credit_t              credit_from_router,
  input  flit_t                from_router_flit,
  input  logic                 from_router_valid,
  output credit_t              credit_to_router
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  // ---------------- injection ----------------
  logic [CW-1:0]        credits [NUM_VCS];
  logic                 sending;
  logic [VC_ID_W-1:0]   tx_vc, next_vc;
  logic [LEN_W-1:0]     tx_len, tx_idx;
  logic [NODE_W-1:0]    tx_dst;
  logic [PAYLOAD_W-1:0] tx_payload;
  logic                 send;

  assign inj_ready = !sending;
  assign send      = sending && (credits[tx_vc] != '0);

  always_comb begin
    head_t h;
    h             = '0;
    h.dst         = tx_dst;
    h.src         = NODE_W'(NODE_ID);
    h.inj_time    = now;
    h.len         = tx_len;
    h.payload     = tx_payload;
    to_router_valid     = send;
    to_router_flit.vc   = tx_vc;
    if (tx_idx == '0) begin
      to_router_flit.ftype = (tx_len == LEN_W'(1)) ? F_HEADTAIL : F_HEAD;
      to_router_flit.data  = FLIT_DATA_W'(h);
    end else begin
      to_router_flit.ftype = (tx_idx == tx_len - 1'b1) ? F_TAIL : F_BODY;
      to_router_flit.data  = {tx_payload, 40'd0, 8'(tx_idx), 8'(NODE_ID), 8'(tx_dst)};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sending    <= 1'b0;
      tx_vc      <= '0;
      next_vc    <= '0;
      tx_len     <= '0;
      tx_idx     <= '0;
      tx_dst     <= '0;
      tx_payload <= '0;
      for (int v = 0; v < NUM_VCS; v++) credits[v] <= CW'(BUF_DEPTH);
    end else begin
      for (int v = 0; v < NUM_VCS; v++)
        credits[v] <= credits[v]
                      - CW'((send && int'(tx_vc) == v) ? 1 : 0)
                      + CW'((credit_from_router.valid && int'(credit_from_router.vc) == v) ? 1 : 0);
      if (!sending) begin
        if (inj_valid) begin
          sending    <= 1'b1;
          tx_vc      <= next_vc;
          next_vc    <= (int'(next_vc) == NUM_VCS - 1) ? '0 : next_vc + 1'b1;
          tx_len     <= (inj_len == '0) ? LEN_W'(1) : inj_len;
          tx_idx     <= '0;
          tx_dst     <= inj_dst;
          tx_payload <= inj_payload;
        end
      end else if (send) begin
        if (tx_idx == tx_len - 1'b1) sending <= 1'b0;
        tx_idx <= tx_idx + 1'b1;
      end
    end
  end

  // ---------------- ejection ----------------
  logic [NODE_W-1:0]    r_src     [NUM_VCS];
  logic [TIME_W-1:0]    r_time    [NUM_VCS];
  logic                 r_rr      [NUM_VCS];
  logic                 r_err     [NUM_VCS];
  logic [LEN_W-1:0]     r_cnt     [NUM_VCS];
  logic [PAYLOAD_W-1:0] r_payload [NUM_VCS];

  head_t              in_h;
  logic [VC_ID_W-1:0] in_vc;
  logic               body_bad;
  assign in_h     = head_t'(from_router_flit.data);
  assign in_vc    = from_router_flit.vc;
  assign body_bad = (from_router_flit.data[127:64] != r_payload[in_vc]) ||
                    (from_router_flit.data[23:16] != 8'(r_cnt[in_vc])) ||
                    (from_router_flit.data[15:8]  != r_src[in_vc]) ||
                    (from_router_flit.data[7:0]   != 8'(NODE_ID));

  assign credit_to_router = '{valid: from_router_valid, vc: from_router_flit.vc};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_valid    <= 1'b0;
      rx_src      <= '0;
      rx_len      <= '0;
      rx_latency  <= '0;
      rx_rerouted <= 1'b0;
      rx_error    <= 1'b0;
      rx_payload  <= '0;
      for (int v = 0; v < NUM_VCS; v++) begin
        r_src[v] <= '0; r_time[v] <= '0; r_rr[v] <= 1'b0; r_err[v] <= 1'b0;
        r_cnt[v] <= '0; r_payload[v] <= '0;
      end
    end else begin
      rx_valid <= 1'b0;
      if (from_router_valid) begin
        if (is_head(from_router_flit.ftype)) begin
          r_src[in_vc]     <= in_h.src;
          r_time[in_vc]    <= in_h.inj_time;
          r_rr[in_vc]      <= in_h.rerouted;
          r_err[in_vc]     <= (int'(in_h.dst) != NODE_ID) || in_h.inter_valid;
          r_cnt[in_vc]     <= LEN_W'(1);
          r_payload[in_vc] <= in_h.payload;
        end else begin
          r_cnt[in_vc] <= r_cnt[in_vc] + 1'b1;
          if (body_bad) r_err[in_vc] <= 1'b1;
        end
        if (is_tail(from_router_flit.ftype)) begin
          rx_valid    <= 1'b1;
          if (is_head(from_router_flit.ftype)) begin
            rx_src      <= in_h.src;
            rx_len      <= LEN_W'(1);
            rx_latency  <= now - in_h.inj_time;
            rx_rerouted <= in_h.rerouted;
            rx_error    <= (int'(in_h.dst) != NODE_ID) || in_h.inter_valid;
            rx_payload  <= in_h.payload;
          end else begin
            rx_src      <= r_src[in_vc];
            rx_len      <= r_cnt[in_vc] + 1'b1;
            rx_latency  <= now - r_time[in_vc];
            rx_rerouted <= r_rr[in_vc];
            rx_error    <= r_err[in_vc] || body_bad ||
                           (from_router_flit.data[127:64] != r_payload[in_vc]);
            rx_payload  <= r_payload[in_vc];
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) send |-> credits[tx_vc] != '0);
endmodule
