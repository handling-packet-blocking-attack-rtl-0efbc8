// tb_crossbar: random conflict-free input-to-output assignments (random
// permutations with some inputs idle); checks that each output carries the
// flit of the input that chose it and that unused outputs are idle.
module tb_crossbar;
  import noc_pkg::*;
  flit_t                in_flit [NUM_PORTS], out_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0] in_valid, out_valid;
  logic [PORT_W-1:0]    in_outport [NUM_PORTS];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int perm [NUM_PORTS];
      int src_of [NUM_PORTS];
      for (int k = 0; k < NUM_PORTS; k++) begin perm[k] = k; src_of[k] = -1; end
      perm.shuffle();
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_flit[i]    = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        in_valid[i]   = ($urandom_range(0, 3) != 0);
        in_outport[i] = PORT_W'(perm[i]);
        if (in_valid[i]) src_of[perm[i]] = i;
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (src_of[o] < 0) begin
          if (out_valid[o]) begin failures++; $display("output %0d valid without input", o); end
        end else if (!out_valid[o] || out_flit[o] != in_flit[src_of[o]]) begin
          failures++; $display("output %0d wrong flit", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
