// Decision-directed carrier synchronization (DDCS) loop: the carrier-phase
// estimator of the receiver.
//
// For each symbol k (en), the phase detector wipes the modulation off z_c,
// z_s with the decoder soft decision y_hat and forms
// e[k] = u_s cos(theta_hat[k]) - u_c sin(theta_hat[k]); the loop filter
// H(z) = (Kp + Ki z^-1)/(1 - z^-1) accumulates it into the next phase
// estimate, and the NCO (a cosine/sine table) turns theta_hat into
// w_c, w_s. These are the weights used for symbol k, valid in the same cycle
// as the inputs, so the LLR former can use them alongside. The structure
// (modulation wipe-off, error, filter, NCO) is the document's; reading the
// filter's accumulator as the phase itself, so that the NCO adds no second
// integration, is this design's interpretation (with an integrating NCO the
// document's gains give a loop with a damping ratio of about 0.03).
//
// Timing: one symbol per en; the loop state persists between blocks until
// clr, so repeated passes over a codeword keep refining the estimate.
module ddcs_carrier_loop
  import bpsk_sync_pkg::*;
#(
  parameter int KP        = 487792,
  parameter int KI        = -478496,
  parameter int GAIN_FRAC = 8
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,
  input  logic    en,
  input  sample_t zc,
  input  sample_t zs,
  input  sample_t yhat,
  output trig_t   wc,
  output trig_t   ws,
  output phase_t  theta,
  output err_t    e
);

  ddcs_phase_detector u_pd (.zc(zc), .zs(zs), .yhat(yhat), .wc(wc), .ws(ws), .e(e));

  pll_loop_filter #(.KP(KP), .KI(KI), .GAIN_FRAC(GAIN_FRAC)) u_lf (
    .clk(clk), .rst(rst), .clr(clr), .en(en), .e(e), .phase(theta));

  sincos_lut u_nco (.phase(theta), .cos_o(wc), .sin_o(ws));

endmodule
