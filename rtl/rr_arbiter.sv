// rr_arbiter: round-robin arbiter used by the VC and switch allocators.
//
// Among the asserted requests it grants the first one at or after the position
// following the last grant, so every requester is served within N grants. It
// masks off the requests below the priority pointer, takes the lowest
// remaining request, and falls back to the lowest request overall when none
// is left above the pointer (x & -x isolates the lowest set bit). The grant is
// combinational; the pointer moves past the winner in a cycle where `advance`
// is high and a grant is given. Reset makes requester 0 the first in line.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] mask;      // requesters at or above the pointer
  logic [N-1:0] masked;

  assign masked    = req & mask;
  assign gnt       = (masked != '0) ? (masked & (~masked + 1'b1)) : (req & (~req + 1'b1));
  assign gnt_valid = (req != '0);

  always_comb begin
    gnt_idx = '0;
    for (int unsigned i = 0; i < N; i++)
      if (gnt[i]) gnt_idx = IW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) mask <= '1;
    else if (advance && gnt_valid)
      mask <= ~((gnt << 1) - 1'b1);   // positions above the winner
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
