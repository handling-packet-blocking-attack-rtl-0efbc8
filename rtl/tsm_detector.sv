// tsm_detector: detection unit of the Traffic Snoop Manager for one neighbour.
//
// Every head flit arriving from a neighbour reports how long it spent buffered
// in that neighbour (sample_delay). The detector keeps the last W delays and
// forms their weighted moving average with linear weights, the newest delay
// weighted W, the oldest 1:
//     M_i = sum_{j=1..k} w_j * d_{i-j+1} / sum_{j=1..k} w_j,  w_j = W - j + 1,
// with k = min(i, W), so the first W-1 samples use the shorter window, as in the
// document's algorithm (window W = 5, linear weights). `avg` is M_i after the
// latest sample (integer quotient). A sample is anomalous when it exceeds
// THR_NUM times the average of the samples before it and is at least
// MIN_ANOMALY cycles; the comparison is done by cross-multiplication, without
// division. The threshold rule and its constants are this design's choice.
// Timing: `anomaly` is a one-cycle pulse in the cycle after the sample; `avg`
// is updated at the same edge.
module tsm_detector
  import noc_pkg::*;
#(
  parameter int unsigned W           = 5,
  parameter int unsigned THR_NUM     = 2,
  parameter int unsigned MIN_ANOMALY = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_valid,
  input  logic [DELAY_W-1:0] sample_delay,
  output logic [DELAY_W-1:0] avg,
  output logic               anomaly
);
  localparam int unsigned CW = $clog2(W + 1);
  localparam int unsigned SW = DELAY_W + 2 * $clog2(W + 1) + 4;  // sum width

  logic [DELAY_W-1:0] hist [W];   // hist[0] newest
  logic [CW-1:0]      cnt;        // valid entries, saturates at W

  // weighted sums over the stored history
  logic [SW-1:0] num, den;
  always_comb begin
    num = '0;
    den = '0;
    for (int unsigned j = 0; j < W; j++) begin
      if (j < cnt) begin
        num = num + SW'(W - j) * SW'(hist[j]);
        den = den + SW'(W - j);
      end
    end
  end

  assign avg = (den == '0) ? '0 : DELAY_W'(num / den);

  logic anomaly_c;
  assign anomaly_c = (cnt != '0) && (sample_delay >= DELAY_W'(MIN_ANOMALY)) &&
                     (SW'(sample_delay) * den > SW'(THR_NUM) * num);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      anomaly <= 1'b0;
      for (int unsigned j = 0; j < W; j++) hist[j] <= '0;
    end else begin
      anomaly <= sample_valid && anomaly_c;
      if (sample_valid) begin
        hist[0] <= sample_delay;
        for (int unsigned j = 1; j < W; j++) hist[j] <= hist[j-1];
        if (cnt < CW'(W)) cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
