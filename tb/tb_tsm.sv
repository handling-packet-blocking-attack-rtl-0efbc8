// tb_tsm: Traffic Snoop Manager of router 27 in an 8x8 mesh. Normal delays
// (3 cycles) arrive from every neighbour, then one neighbour reports a long
// delay: the TSM must mark exactly that direction suspect, keep it for the
// hold time, redirect route requests heading there and pass the others
// unchanged. With enable low no direction may become suspect.
module tb_tsm;
  import noc_pkg::*;
  localparam int C = 8, R = 8, ID = 27, HOLD = 40;
  logic clk = 0, rst_n = 0, enable;
  logic [NUM_PORTS-1:0] arr_valid, suspect, anomaly;
  logic [DELAY_W-1:0]   arr_delay [NUM_PORTS];
  logic [PORT_W-1:0]    rc_outport [NUM_PORTS];
  logic [NODE_W-1:0]    rc_dst [NUM_PORTS], rc_inter_dst [NUM_PORTS];
  logic                 rc_inter_valid [NUM_PORTS];
  route_t               rc_route [NUM_PORTS];
  logic [DELAY_W-1:0]   avg [NUM_PORTS];
  int checks = 0, failures = 0;

  tsm #(.COLS(C), .ROWS(R), .NODE_ID(ID), .SUSPECT_HOLD(HOLD)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic arrive(input int p, input int d);
    @(negedge clk);
    arr_valid = '0; arr_valid[p] = 1'b1; arr_delay[p] = DELAY_W'(d);
    @(negedge clk);
    arr_valid = '0;
  endtask

  task automatic normal_traffic(input int n);
    for (int i = 0; i < n; i++) for (int p = 1; p < NUM_PORTS; p++) arrive(p, 3);
  endtask

  initial begin
    enable = 0; arr_valid = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      arr_delay[p] = '0; rc_outport[p] = P_LOCAL; rc_dst[p] = ID; rc_inter_dst[p] = '0; rc_inter_valid[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // detection disabled: a spike must not raise a flag
    normal_traffic(3);
    arrive(P_EAST, 60);
    repeat (2) @(negedge clk);
    chk(suspect == '0, "suspect while disabled");
    enable = 1;
    normal_traffic(6);
    chk(suspect == '0, "suspect under normal delays");
    chk(avg[P_EAST] == 3 && avg[P_NORTH] == 3, "average of steady delays");
    // a long delay from the East neighbour
    arrive(P_EAST, 40);
    chk(anomaly == 5'b00100, "anomaly pulse on East");
    @(negedge clk);
    chk(suspect == 5'b00100, "East suspect");
    // route requests: East-bound with destination in the same row -> South
    rc_outport[P_WEST] = P_EAST; rc_dst[P_WEST] = NODE_W'(ID + 3);
    rc_outport[P_LOCAL] = P_EAST; rc_dst[P_LOCAL] = NODE_W'(ID + 2 + C);   // dst_y > cur_y -> North
    rc_outport[P_NORTH] = P_SOUTH; rc_dst[P_NORTH] = NODE_W'(ID - 3 * C);  // not suspect: unchanged
    rc_outport[P_SOUTH] = P_EAST; rc_dst[P_SOUTH] = NODE_W'(ID + 1);        // suspect itself: unchanged
    #1;
    chk(rc_route[P_WEST].outport == P_SOUTH && rc_route[P_WEST].inter_dst == NODE_W'(ID - C) &&
        rc_route[P_WEST].inter_valid && rc_route[P_WEST].rerouted, "East->South detour");
    chk(rc_route[P_LOCAL].outport == P_NORTH && rc_route[P_LOCAL].inter_dst == NODE_W'(ID + C) &&
        rc_route[P_LOCAL].rerouted, "East->North detour");
    chk(rc_route[P_NORTH].outport == P_SOUTH && !rc_route[P_NORTH].rerouted &&
        !rc_route[P_NORTH].inter_valid, "unsuspected direction unchanged");
    chk(rc_route[P_SOUTH].outport == P_EAST && !rc_route[P_SOUTH].rerouted, "destination is suspect node");
    // the flag holds for HOLD cycles after the last anomaly
    repeat (HOLD - 4) @(negedge clk);
    chk(suspect[P_EAST], "East still suspect before the hold time");
    repeat (6) @(negedge clk);
    chk(suspect == '0, "East cleared after the hold time");
    // a North anomaly: North-bound request gets the two-row detour
    normal_traffic(2);
    arrive(P_NORTH, 50);
    @(negedge clk);
    chk(suspect == 5'b00010, "North suspect");
    rc_outport[P_SOUTH] = P_NORTH; rc_dst[P_SOUTH] = NODE_W'(ID + 4 * C);
    #1;
    chk(rc_route[P_SOUTH].outport == P_EAST && rc_route[P_SOUTH].inter_dst == NODE_W'(ID + 2 * C + 1),
        "North detour through id + 2*COLS + 1");
    // switching detection off clears the flags
    @(negedge clk); enable = 0;
    @(negedge clk);
    chk(suspect == '0, "disable clears flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
