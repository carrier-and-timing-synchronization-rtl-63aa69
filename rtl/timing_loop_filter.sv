// Loop filter of the first-order timing PLL (loop 2).
//
//   c[i+1] = c[i] + u[i] / 2^KT_SHIFT
//
// c is the residual timing offset handed to interpolator 3, in Ti sample
// units (1.0 = 2^12), clamped to +-LIMIT. A first-order loop follows the
// document; the gain, the clamp and the restart from zero at every pass
// (clr) are this design's choices. Timing: c updates on en, one per symbol.
module timing_loop_filter
  import bpsk_sync_pkg::*;
#(
  parameter int KT_SHIFT = 3,
  parameter int LIMIT    = 8192
) (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  input  logic en,
  input  err_t u,
  output ofs_t c
);

  logic signed [OFS_W+1:0] nxt;

  assign nxt = (OFS_W+2)'(c) + (OFS_W+2)'(u >>> KT_SHIFT);

  always_ff @(posedge clk) begin
    if (rst || clr) c <= '0;
    else if (en) begin
      if (nxt > (OFS_W+2)'(LIMIT))       c <= ofs_t'(LIMIT);
      else if (nxt < -(OFS_W+2)'(LIMIT)) c <= -ofs_t'(LIMIT);
      else                               c <= ofs_t'(nxt);
    end
  end

endmodule
