// vc_buffer: the flit FIFO of one virtual channel in a router input port.
//
// A circular buffer of DEPTH flits with read and write pointers and an
// occupancy count. A write and a read may happen in the same cycle. `head` shows
// the oldest flit whenever `count` is non-zero; a read removes it at the clock
// edge. Writes into a full buffer are a protocol error (credit flow control
// upstream prevents them) and are flagged by an assertion. The buffer depth is
// this design's choice; the document does not state one.
module vc_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  flit_t                    wr_flit,
  input  logic                     rd_en,
  output flit_t                    head,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= incr(wr_ptr);
      if (rd_en) rd_ptr <= incr(rd_ptr);
      count <= count + $bits(count)'(wr_en) - $bits(count)'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_flit;
  end

  assign head = mem[rd_ptr];

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (int'(count) < DEPTH) || rd_en);
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> count != 0);
endmodule
