// Phase detector of the decision-directed carrier synchronization (DDCS)
// loop.
//
// The soft decision y_hat removes the BPSK modulation,
//   u_s = z_s * y_hat,  u_c = z_c * y_hat,
// turning the block into a near pure tone, and the error against the NCO
// phase estimate is
//   e = u_s * cos(theta_hat) - u_c * sin(theta_hat)  ~  sin(theta - theta_hat).
// Both equations are the document's. Formats: z, y_hat 1.0 = 2^12, weights
// 1.0 = 2^14, e 1.0 = 2^12 saturated to 18 bits. Combinational.
module ddcs_phase_detector
  import bpsk_sync_pkg::*;
(
  input  sample_t zc,
  input  sample_t zs,
  input  sample_t yhat,
  input  trig_t   wc,
  input  trig_t   ws,
  output err_t    e
);

  logic signed [31:0] us, uc;
  logic signed [47:0] diff;

  always_comb begin
    us   = (32'(zs) * 32'(yhat)) >>> SAMPLE_FRAC;
    uc   = (32'(zc) * 32'(yhat)) >>> SAMPLE_FRAC;
    diff = (48'(us) * 48'(wc) - 48'(uc) * 48'(ws)) >>> TRIG_FRAC;
    e    = sat_err(diff);
  end

endmodule
