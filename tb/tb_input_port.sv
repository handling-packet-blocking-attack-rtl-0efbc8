// tb_input_port: an upstream sender with credit accounting pushes packets of
// random length into all VCs; the testbench plays route computation, VC
// allocation and switch arbitration with random delays and keeps its own model
// of every VC (buffer contents, state, route, output VC). At every traversal it
// checks the flit against the model: order within the VC, the output VC
// written into the flit, the output port, the patched head fields (route
// fields and hop delay = exit time - entry time), and the credit sent back.
// A first directed packet checks the 3-cycle hop delay of an unhindered head.
module tb_input_port;
  import noc_pkg::*;
  localparam int NV = 5, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [TIME_W-1:0] now = '0;
  flit_t in_flit, st_flit;
  logic in_valid, rc_valid, st_gnt, st_valid;
  credit_t credit_out;
  head_t rc_head;
  route_t rc_route;
  logic [NV-1:0] va_req, va_gnt, cred_ok, sa_req, front_is_head;
  logic [PORT_W-1:0] out_port [NV];
  logic [VC_ID_W-1:0] va_gnt_vc [NV], st_vc;
  logic [PORT_W-1:0] st_outport;

  input_port #(.NUM_VCS(NV), .BUF_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1'b1;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  // route the testbench's RC unit returns, a fixed function of the head
  function automatic route_t route_of(head_t h);
    return '{outport: PORT_W'(h.dst % 5), inter_dst: h.dst ^ 8'h55, inter_valid: h.dst[0], rerouted: h.dst[1]};
  endfunction
  assign rc_route = route_of(rc_head);

  function automatic logic [NODE_W-1:0] dst_of(flit_t f);
    head_t h;
    h = head_t'(f.data);
    return h.dst;
  endfunction

  typedef struct { flit_t f; logic [TIME_W-1:0] t; } entry_t;
  entry_t q [NV][$];
  int      credits [NV];
  int      st [NV];          // 0 idle, 1 va, 2 active
  route_t  rt [NV];
  logic [VC_ID_W-1:0] ovc [NV];
  int      to_send [NV];     // flits left of the packet being sent on each VC
  int      sent_pkts = 0, recv_flits = 0, recv_heads = 0;

  function automatic flit_t make_flit(int v);
    flit_t f;
    head_t h;
    f = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
    f.vc = VC_ID_W'(v);
    if (to_send[v] == 0) begin
      int len = $urandom_range(1, 6);
      to_send[v] = len;
      h = head_t'(f.data);
      h.dst = NODE_W'($urandom_range(0, 63));
      h.rerouted = 0;
      f.data = FLIT_DATA_W'(h);
      f.ftype = (len == 1) ? F_HEADTAIL : F_HEAD;
    end else begin
      f.ftype = (to_send[v] == 1) ? F_TAIL : F_BODY;
    end
    return f;
  endfunction

  int rc_expect;
  bit do_random;
  logic [TIME_W-1:0] wtime;

  initial begin
    in_valid = 0; in_flit = '0; cred_ok = '1; va_gnt = '0; st_gnt = 0; st_vc = '0;
    for (int v = 0; v < NV; v++) begin credits[v] = DEPTH; st[v] = 0; to_send[v] = 0; va_gnt_vc[v] = '0; end
    do_random = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      do_random = (cyc >= 20);
      // ---- stimulus ----
      in_valid = 0;
      begin
        int v;
        v = do_random ? $urandom_range(0, NV - 1) : 2;
        if (credits[v] > 0 && (do_random ? $urandom_range(0, 1) == 1 : cyc == 0)) begin
          in_flit = make_flit(v);
          in_valid = 1;
          wtime = now;
        end
      end
      for (int v = 0; v < NV; v++) begin
        va_gnt[v] = va_req[v] && (!do_random || $urandom_range(0, 1) == 1);
        va_gnt_vc[v] = VC_ID_W'($urandom_range(0, NV - 1));
      end
      cred_ok = do_random ? NV'($urandom) | NV'($urandom) : '1;
      #1;
      st_gnt = 0;
      if (sa_req != '0 && (!do_random || $urandom_range(0, 3) != 0)) begin
        int v;
        do v = $urandom_range(0, NV - 1); while (!sa_req[v]);
        st_gnt = 1; st_vc = VC_ID_W'(v);
      end
      #1;
      // ---- checks of the combinational outputs ----
      rc_expect = -1;
      for (int v = NV - 1; v >= 0; v--) if (st[v] == 0 && q[v].size() > 0) rc_expect = v;
      chk(rc_valid == (rc_expect >= 0), "rc_valid");
      if (rc_valid && rc_expect >= 0) chk(rc_head.dst == dst_of(q[rc_expect][0].f), "rc_head");
      for (int v = 0; v < NV; v++) begin
        chk(va_req[v] == (st[v] == 1), "va_req");
        chk(sa_req[v] == (st[v] == 2 && q[v].size() > 0 && cred_ok[v]), "sa_req");
        if (st[v] >= 1) chk(out_port[v] == rt[v].outport, "out_port");
      end
      chk(credit_out.valid == st_gnt && (!st_gnt || credit_out.vc == st_vc), "credit out");
      if (st_gnt) begin
        entry_t e;
        flit_t exp;
        int v;
        v = int'(st_vc);
        e = q[v][0];
        exp = e.f;
        exp.vc = ovc[v];
        if (is_head(exp.ftype)) begin
          head_t h;
          h = head_t'(exp.data);
          h.hop_delay = DELAY_W'(now - e.t);
          h.inter_dst = rt[v].inter_dst;
          h.inter_valid = rt[v].inter_valid;
          h.rerouted = rt[v].rerouted;
          exp.data = FLIT_DATA_W'(h);
          recv_heads++;
          if (!do_random) chk(now - e.t == 3, "unhindered hop delay of 3 cycles");
        end
        chk(st_valid && st_flit == exp, "traversing flit");
        chk(st_outport == rt[v].outport, "st_outport");
        recv_flits++;
      end
      // ---- model update at the edge ----
      @(posedge clk);
      if (in_valid) begin
        q[in_flit.vc].push_back('{f: in_flit, t: wtime});
        credits[in_flit.vc]--;
        to_send[in_flit.vc]--;
      end
      if (rc_expect >= 0) begin
        st[rc_expect] = 1;
        rt[rc_expect] = route_of(head_t'(q[rc_expect][0].f.data));
      end
      for (int v = 0; v < NV; v++)
        if (st[v] == 1 && va_gnt[v] && !(rc_expect == v)) begin st[v] = 2; ovc[v] = va_gnt_vc[v]; end
      if (st_gnt) begin
        entry_t e;
        e = q[st_vc].pop_front();
        credits[st_vc]++;
        if (is_tail(e.f.ftype)) st[st_vc] = 0;
      end
    end
    $display("flits %0d heads %0d", recv_flits, recv_heads);
    chk(recv_heads > 500, "packets flowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
