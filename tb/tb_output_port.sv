// tb_output_port: random traffic of packets on several VCs with a credit
// model of a downstream buffer that drains at random. Checks the link register
// (flit appears one cycle after traversal), the per-VC credit availability
// against the model, and the busy flags set on allocation and cleared by the
// tail flit.
module tb_output_port;
  import noc_pkg::*;
  localparam int NV = 5, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic st_valid, alloc_valid, out_valid;
  flit_t st_flit, out_flit;
  logic [VC_ID_W-1:0] alloc_vc;
  credit_t credit_in;
  logic [NV-1:0] vc_free, vc_has_credit;
  int checks = 0, failures = 0;
  int cred [NV], occ [NV], remaining [NV];
  bit busy [NV];
  int nflits = 0, ncredit_stalls = 0;

  output_port #(.NUM_VCS(NV), .BUF_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    flit_t last;
    bit last_v;
    st_valid = 0; alloc_valid = 0; alloc_vc = 0; st_flit = '0; credit_in = '0;
    for (int v = 0; v < NV; v++) begin cred[v] = DEPTH; occ[v] = 0; busy[v] = 0; remaining[v] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_v = 0; last = '0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // checks of the state after the last edge
      chk(out_valid == last_v && (!last_v || out_flit == last), "link register");
      for (int v = 0; v < NV; v++) begin
        chk(vc_has_credit[v] == (cred[v] > 0), "credit flag");
        chk(vc_free[v] == !busy[v], "busy flag");
      end
      // stimulus: allocate a free VC sometimes, send a flit of a busy VC with credit
      alloc_valid = 0; st_valid = 0; credit_in = '0;
      begin
        int v;
        v = $urandom_range(0, NV - 1);
        if (!busy[v] && $urandom_range(0, 1)) begin
          alloc_valid = 1; alloc_vc = VC_ID_W'(v);
        end
        v = $urandom_range(0, NV - 1);
        if (busy[v] && remaining[v] > 0) begin
          if (cred[v] > 0) begin
            st_valid = 1;
            st_flit = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
            st_flit.vc = VC_ID_W'(v);
            st_flit.ftype = (remaining[v] == 1) ? F_TAIL : F_BODY;
          end else ncredit_stalls++;
        end
        v = $urandom_range(0, NV - 1);
        if (occ[v] > 0 && $urandom_range(0, 2) == 0) credit_in = '{valid: 1'b1, vc: VC_ID_W'(v)};
      end
      @(posedge clk);
      last_v = st_valid; last = st_flit;
      if (alloc_valid) begin busy[alloc_vc] = 1; remaining[alloc_vc] = $urandom_range(1, 8); end
      if (st_valid) begin
        cred[st_flit.vc]--; occ[st_flit.vc]++; remaining[st_flit.vc]--; nflits++;
        if (st_flit.ftype == F_TAIL) busy[st_flit.vc] = 0;
      end
      if (credit_in.valid) begin cred[credit_in.vc]++; occ[credit_in.vc]--; end
    end
    $display("flits %0d credit stalls %0d", nflits, ncredit_stalls);
    chk(nflits > 500 && ncredit_stalls > 10, "traffic and credit stalls");
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
