// crossbar: NUM_PORTS x NUM_PORTS switch of the router.
//
// Each input port that won switch arbitration presents its flit with the
// output port it goes to; each output port forwards the flit of the input
// that selected it. The switch allocator guarantees at most one input per
// output; an assertion checks it. Purely combinational (switch traversal);
// the output link register sits in output_port.
module crossbar
  import noc_pkg::*;
(
  input  flit_t                in_flit    [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] in_valid,
  input  logic [PORT_W-1:0]    in_outport [NUM_PORTS],
  output flit_t                out_flit   [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid
);
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = 1'b0;
      out_flit[o]  = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (in_valid[i] && int'(in_outport[i]) == o) begin
          out_valid[o] = 1'b1;
          out_flit[o]  = in_flit[i];
        end
    end
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      int n;
      n = 0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (in_valid[i] && int'(in_outport[i]) == o) n++;
      assert (n <= 1) else $error("crossbar: two inputs drive output %0d", o);
    end
  end
endmodule
