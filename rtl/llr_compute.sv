// Decoder input former: combines the timing-corrected channels with the
// carrier-phase estimate,
//
//   Q[k] = (2 / sigma_llr^2) * (z_c[k] cos(theta_hat) + z_s[k] sin(theta_hat))
//        ~ (2 / sigma_llr^2) * d[k] cos(theta - theta_hat) + noise.
//
// scale carries 2/sigma_llr^2 as an unsigned Q8 number; the LLR is signed
// 16 bit with 1.0 = 2^4 (LLR_FRAC), saturated. Combinational.
module llr_compute
  import bpsk_sync_pkg::*;
#(
  parameter int LLR_FRAC = 4
) (
  input  sample_t      zc,
  input  sample_t      zs,
  input  trig_t        wc,
  input  trig_t        ws,
  input  logic [15:0]  scale,
  output logic signed [15:0] q
);

  logic signed [47:0] r, p;

  always_comb begin
    r = (48'(zc) * 48'(wc) + 48'(zs) * 48'(ws)) >>> TRIG_FRAC;   // 1.0 = 2^12
    p = (r * $signed({32'd0, scale})) >>> (SAMPLE_FRAC + 8 - LLR_FRAC);
    q = sat_sample(p);
  end

endmodule
