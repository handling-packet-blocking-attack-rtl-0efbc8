// tb_ht_payload: drives random switch-arbitration grants into the Trojan
// payload. Disarmed it must pass every grant. Armed, it checks every cycle
// that it only removes grants, removes at most one new winning head flit per
// cycle, keeps a blocked port blocked until the episode ends, blocks nothing
// while dormant, that episodes last 1..MAX_BLOCK cycles, and that the measured
// activation probability per draw is close to P_ACT_Q8/256.
module tb_ht_payload;
  import noc_pkg::*;
  localparam int P_Q8 = 154, PERIOD = 64, MAXB = 32;
  logic clk = 0, rst_n = 0, kill_switch;
  logic [NUM_PORTS-1:0] gnt_in, gnt_is_head, gnt_out, block_mask;
  logic active, block_event;
  int checks = 0, failures = 0;
  logic [NUM_PORTS-1:0] tb_mask, newly;
  int episodes = 0, dormant_armed = 0, ep_len = 0, blocks = 0, multi_cycle_blocks = 0;
  bit was_active = 0;

  ht_payload #(.P_ACT_Q8(P_Q8), .ACT_PERIOD(PERIOD), .MAX_BLOCK(MAXB)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    kill_switch = 0; gnt_in = '0; gnt_is_head = '0; tb_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      @(negedge clk);
      if (cyc == 2000) kill_switch = 1;
      gnt_in      = NUM_PORTS'($urandom);
      gnt_is_head = NUM_PORTS'($urandom) | NUM_PORTS'($urandom);
      #1;
      newly = gnt_in & ~gnt_out & ~tb_mask;
      chk((gnt_out & ~gnt_in) == '0, "grant created");
      chk(block_mask == tb_mask, "mask differs from the blocked ports");
      if (!active) begin
        chk(gnt_out == gnt_in && !block_event, "blocking while dormant");
        if (kill_switch) dormant_armed++;
      end else begin
        chk((gnt_out & tb_mask) == '0, "blocked port released during episode");
        chk($countones(newly) <= 1, "more than one new victim");
        chk((newly & ~gnt_is_head) == '0, "body flit chosen as victim");
        chk(block_event == (newly != '0), "block_event");
        if (newly != '0) blocks++;
        if ((gnt_in & tb_mask) != '0) multi_cycle_blocks++;
        ep_len++;
      end
      if (!kill_switch) chk(!active, "active while disarmed");
      @(posedge clk);
      #1;
      if (active) tb_mask = tb_mask | newly;
      else        tb_mask = '0;
      if (was_active && !active) begin
        episodes++;
        chk(ep_len >= 1 && ep_len <= MAXB, "episode length");
        ep_len = 0;
      end
      was_active = active;
    end
    begin
      real draws, p;
      draws = real'(dormant_armed) / PERIOD;
      p = real'(episodes) / draws;
      $display("episodes %0d draws %0.1f p=%0.3f blocks %0d held %0d", episodes, draws, p, blocks, multi_cycle_blocks);
      chk(p > 0.5 && p < 0.7, "activation probability");
      chk(blocks > 100 && multi_cycle_blocks > 100, "blocking seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
