// Fractional interval mu = eta / w (document: "Compute Fractional
// Interval"). At an NCO underflow, eta/w is the position of the interpolant
// between the base sample and the next one, in [0, 1). Computed by one
// combinational divide and clipped to the MU_W-bit range (1.0 = 2^MU_W).
// The exact division (rather than the usual approximation mu ~ 2*eta) is
// this design's choice.
module fractional_interval
  import bpsk_sync_pkg::*;
#(
  parameter int NCO_W = 32
) (
  input  logic [NCO_W-1:0] eta,
  input  logic [NCO_W-1:0] w,
  output mu_t              mu
);

  logic [NCO_W+MU_W-1:0] q;

  always_comb begin
    if (w == '0) q = '0;
    else         q = {eta, {MU_W{1'b0}}} / (NCO_W + MU_W)'(w);
    if (q >= (NCO_W + MU_W)'(1 << MU_W)) mu = '1;
    else                                 mu = mu_t'(q);
  end

endmodule
