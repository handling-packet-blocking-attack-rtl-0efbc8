// tb_vc_allocator: random VC requests against a model of the output VCs'
// busy state. Checks that a grant answers a request, gives a VC that is free
// (the lowest free one), never gives one output VC twice, that at most one
// allocation per output port happens per cycle, that an output port with a
// free VC and a requester always allocates, and that no requester starves.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int NV = 5;
  logic clk = 0, rst_n = 0;
  logic [NV-1:0]        req [NUM_PORTS];
  logic [PORT_W-1:0]    req_port [NUM_PORTS][NV];
  logic [NV-1:0]        vc_free [NUM_PORTS];
  logic [NV-1:0]        gnt [NUM_PORTS];
  logic [VC_ID_W-1:0]   gnt_vc [NUM_PORTS][NV];
  logic [NUM_PORTS-1:0] alloc_valid;
  logic [VC_ID_W-1:0]   alloc_vc [NUM_PORTS];
  int checks = 0, failures = 0, nalloc = 0, max_wait = 0;
  int wait_cyc [NUM_PORTS][NV];

  vc_allocator #(.NUM_VCS(NV)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      req[i] = '0; vc_free[i] = '1;
      for (int v = 0; v < NV; v++) begin req_port[i][v] = '0; wait_cyc[i][v] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NV; v++) begin
          if (!req[i][v] && $urandom_range(0, 4) == 0) begin
            req[i][v] = 1'b1; req_port[i][v] = PORT_W'($urandom_range(0, 4));
          end
          if (!vc_free[i][v] && $urandom_range(0, 3) == 0) vc_free[i][v] = 1'b1;  // tail left
        end
      #1;
      begin
        int nper [NUM_PORTS];
        bit wants [NUM_PORTS];
        for (int o = 0; o < NUM_PORTS; o++) begin nper[o] = 0; wants[o] = 0; end
        for (int i = 0; i < NUM_PORTS; i++)
          for (int v = 0; v < NV; v++) begin
            if (req[i][v]) wants[req_port[i][v]] = 1;
            if (gnt[i][v]) begin
              int o, lowest;
              o = int'(req_port[i][v]);
              lowest = -1;
              for (int k = NV - 1; k >= 0; k--) if (vc_free[o][k]) lowest = k;
              chk(req[i][v], "grant without request");
              chk(int'(gnt_vc[i][v]) == lowest, "not the lowest free VC");
              chk(alloc_valid[o] && alloc_vc[o] == gnt_vc[i][v], "alloc outputs");
              nper[o]++;
            end
          end
        for (int o = 0; o < NUM_PORTS; o++) begin
          chk(nper[o] <= 1, "two allocations on one output port");
          chk(nper[o] == int'(alloc_valid[o]), "alloc_valid without grant");
          if (wants[o] && vc_free[o] != '0) chk(nper[o] == 1, "free VC and requester, no allocation");
        end
      end
      @(posedge clk);
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NV; v++)
          if (req[i][v]) begin
            if (gnt[i][v]) begin
              vc_free[req_port[i][v]][gnt_vc[i][v]] = 1'b0;
              req[i][v] = 1'b0; nalloc++; wait_cyc[i][v] = 0;
            end else if (vc_free[req_port[i][v]] != '0) begin
              wait_cyc[i][v]++;
              if (wait_cyc[i][v] > max_wait) max_wait = wait_cyc[i][v];
            end
          end
    end
    $display("allocations %0d longest wait with a free VC %0d", nalloc, max_wait);
    chk(nalloc > 1000, "allocations happen");
    chk(max_wait <= 2 * NUM_PORTS * NV, "starvation bound");
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
