// tb_switch_allocator: random persistent requests (a VC keeps requesting until
// it is served). Checks every cycle that grants answer real requests with the
// right VC and output port, that no output port is granted twice, that some
// grant is given whenever anything requests, and that no request waits longer
// than a round-robin bound. A directed part checks strict alternation of two
// inputs competing for one output (the example of the document: North and
// East both asking for South).
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int NV = 5;
  logic clk = 0, rst_n = 0;
  logic [NV-1:0]      req [NUM_PORTS];
  logic [PORT_W-1:0]  req_port [NUM_PORTS][NV];
  logic [NUM_PORTS-1:0] gnt;
  logic [VC_ID_W-1:0] gnt_vc [NUM_PORTS];
  logic [PORT_W-1:0]  gnt_outport [NUM_PORTS];
  int checks = 0, failures = 0;
  int wait_cyc [NUM_PORTS][NV];
  int max_wait = 0, ngrants = 0;

  switch_allocator #(.NUM_VCS(NV)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      req[i] = '0;
      for (int v = 0; v < NV; v++) begin req_port[i][v] = '0; wait_cyc[i][v] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NV; v++)
          if (!req[i][v] && $urandom_range(0, 3) == 0) begin
            req[i][v] = 1'b1;
            req_port[i][v] = PORT_W'($urandom_range(0, 4));
          end
      #1;
      begin
        logic [NUM_PORTS-1:0] used;
        bit any;
        used = '0; any = 0;
        for (int i = 0; i < NUM_PORTS; i++) begin
          if (req[i] != '0) any = 1;
          if (gnt[i]) begin
            chk(int'(gnt_vc[i]) < NV && req[i][gnt_vc[i]], "grant without request");
            chk(gnt_outport[i] == req_port[i][gnt_vc[i]], "wrong output port");
            chk(!used[gnt_outport[i]], "output granted twice");
            used[gnt_outport[i]] = 1'b1;
          end
        end
        chk(!any || gnt != '0, "requests but no grant");
      end
      @(posedge clk);
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NV; v++)
          if (req[i][v]) begin
            if (gnt[i] && int'(gnt_vc[i]) == v) begin
              req[i][v] = 1'b0; wait_cyc[i][v] = 0; ngrants++;
            end else begin
              wait_cyc[i][v]++;
              if (wait_cyc[i][v] > max_wait) max_wait = wait_cyc[i][v];
            end
          end
    end
    $display("grants %0d longest wait %0d", ngrants, max_wait);
    chk(max_wait < 4 * NUM_PORTS * NV, "starvation bound");
    // directed: North and East VC 0 both want South, repeatedly
    @(negedge clk);
    for (int i = 0; i < NUM_PORTS; i++) req[i] = '0;
    req[P_NORTH][0] = 1; req_port[P_NORTH][0] = P_SOUTH;
    req[P_EAST][0]  = 1; req_port[P_EAST][0]  = P_SOUTH;
    req[P_WEST][0]  = 1; req_port[P_WEST][0]  = P_NORTH;
    begin
      logic [NUM_PORTS-1:0] prev;
      prev = '0;
      for (int k = 0; k < 10; k++) begin
        #1;
        chk(gnt[P_WEST], "West->North granted every cycle");
        chk(gnt[P_NORTH] ^ gnt[P_EAST], "one of North/East wins South");
        if (k > 0) chk(gnt[P_NORTH] == prev[P_EAST], "North and East alternate");
        prev = gnt;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
