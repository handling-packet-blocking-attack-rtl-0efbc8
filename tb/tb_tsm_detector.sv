// tb_tsm_detector: feeds delay sequences (steady, ramp, random, with spikes)
// and checks the weighted moving average after each sample and the anomaly
// flag against a model of the window-5 linearly weighted average.
module tb_tsm_detector;
  import noc_pkg::*;
  localparam int W = 5, THR = 2, MINA = 8;
  logic clk = 0, rst_n = 0;
  logic sample_valid;
  logic [DELAY_W-1:0] sample_delay, avg;
  logic anomaly;
  int checks = 0, failures = 0, n_anom = 0;
  int hist[$];

  tsm_detector #(.W(W), .THR_NUM(THR), .MIN_ANOMALY(MINA)) dut (.*);
  always #5 clk = ~clk;

  function automatic void wsum(output longint num, output longint den);
    num = 0; den = 0;
    for (int j = 0; j < hist.size() && j < W; j++) begin
      num += (W - j) * hist[j];
      den += (W - j);
    end
  endfunction

  initial begin
    sample_valid = 0; sample_delay = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      int d;
      longint num, den;
      bit exp_anom;
      if (i < 20)       d = 3;
      else if (i < 40)  d = 3 + (i - 20);
      else              d = ($urandom_range(0, 9) == 0) ? $urandom_range(20, 200) : $urandom_range(2, 12);
      wsum(num, den);
      exp_anom = (hist.size() > 0) && (d >= MINA) && (longint'(d) * den > THR * num);
      @(negedge clk);
      sample_valid = 1; sample_delay = DELAY_W'(d);
      @(negedge clk);
      sample_valid = 0;
      hist.push_front(d);
      wsum(num, den);
      checks += 2;
      if (anomaly != exp_anom) begin failures++; $display("sample %0d d=%0d anomaly %0d want %0d", i, d, anomaly, exp_anom); end
      if (int'(avg) != int'(num / den)) begin failures++; $display("sample %0d avg %0d want %0d", i, avg, num / den); end
      if (anomaly) n_anom++;
      @(negedge clk);
      checks++;
      if (anomaly) begin failures++; $display("anomaly not a pulse"); end
    end
    checks++;
    if (n_anom == 0) begin failures++; $display("no anomaly seen"); end
    $display("anomalies %0d", n_anom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
