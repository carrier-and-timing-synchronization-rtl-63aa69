// Decision-directed Mueller-Muller timing error detector (loop 2).
//
//   u[i] = (d[i-1] * s[i] - d[i] * s[i-1]) * w
//
// s[i] are the symbol-rate samples of this I or Q channel, d[i] the symbols
// decoded by the LDPC decoder in the previous iteration (1 = +1, 0 = -1), and
// w the carrier weight of the channel (cos(theta_hat) for I, sin(theta_hat)
// for Q, 1.0 = 2^14), which gives the detector the right sign and weight
// whatever the carrier phase. The M&M form and the use of decoded symbols
// follow the document; the carrier weighting is this design's reading of the
// carrier-phase input the document draws into the detector.
//
// Timing: u is combinational in the current s, d and the stored previous
// pair; en stores the current pair; clr (start of a pass) zeroes it.
module mm_ted
  import bpsk_sync_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,
  input  logic    en,
  input  sample_t s,
  input  logic    d,
  input  trig_t   w,
  output err_t    u
);

  sample_t s_prev;
  logic    d_prev;
  logic    have_prev;
  logic signed [17:0] raw;
  logic signed [47:0] wide;

  always_comb begin
    raw  = (d_prev ? 18'(s) : -18'(s)) - (d ? 18'(s_prev) : -18'(s_prev));
    wide = (48'(raw) * 48'(w)) >>> TRIG_FRAC;
    u    = have_prev ? sat_err(wide) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      s_prev    <= '0;
      d_prev    <= 1'b0;
      have_prev <= 1'b0;
    end else if (en) begin
      s_prev    <= s;
      d_prev    <= d;
      have_prev <= 1'b1;
    end
  end

endmodule
