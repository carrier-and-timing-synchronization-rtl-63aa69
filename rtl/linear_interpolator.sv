// Linear interpolator: y = a + mu * (b - a), mu in [0, 1) with 1.0 = 2^MU_W,
// rounded to nearest. The document uses linear interpolation for all three
// interpolators of the symbol-timing block; the word widths are this
// design's. Combinational.
module linear_interpolator
  import bpsk_sync_pkg::*;
#(
  parameter int W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  mu_t                 mu,
  output logic signed [W-1:0] y
);

  logic signed [W:0]        diff;
  logic signed [W+MU_W+1:0] prod;

  assign diff = (W+1)'(b) - (W+1)'(a);
  assign prod = (W+MU_W+2)'(diff) * $signed({2'b00, mu}) + (W+MU_W+2)'(1 << (MU_W - 1));
  assign y    = W'((W+MU_W+2)'(a) + (prod >>> MU_W));

endmodule
