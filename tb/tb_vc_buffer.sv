// tb_vc_buffer: random writes and reads against a queue model; checks the
// front flit and the occupancy every cycle, including simultaneous read and
// write and the full and empty corners.
module tb_vc_buffer;
  import noc_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  flit_t wr_flit, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t model[$];
  int full_seen = 0;

  vc_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      checks++;
      if (count != $bits(count)'(model.size())) begin
        failures++; $display("count %0d model %0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (head != model[0]) begin failures++; $display("head mismatch at %0d", cyc); end
      end
      if (model.size() == DEPTH) full_seen++;
      wr_flit = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      wr_en   = (model.size() < DEPTH) && ($urandom_range(0, 99) < (cyc < 1500 ? 70 : 40));
      rd_en   = (model.size() > 0) && ($urandom_range(0, 99) < (cyc < 1500 ? 40 : 70));
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_flit);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
