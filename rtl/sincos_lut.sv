// Cosine / sine look-up for the carrier NCO.
//
// The carrier loop needs w_c = cos(theta_hat) and w_s = sin(theta_hat) of
// its phase estimate. The top LUT_AW bits of the 32-bit phase (one turn full
// scale) address a full-period cosine table; sine is read from the same
// table a quarter turn earlier. The table is built at elaboration by an
// integer Taylor series (range-reduced to |x| <= pi/2, terms to x^14), so no
// data file is needed: cos_tab[i] = round(2^14 * cos(2*pi*i/2^LUT_AW)).
// Purely combinational: outputs follow the phase input in the same cycle.
// The table size is this design's choice; the document only names the NCO
// outputs. The phase bits below the table index are not used (truncation,
// at most 2*pi/1024 rad of phase error).
module sincos_lut
  import bpsk_sync_pkg::*;
#(
  parameter int LUT_AW = 10
) (
  input  phase_t phase,
  output trig_t  cos_o,
  output trig_t  sin_o
);

  localparam int N = 1 << LUT_AW;

  // Q30 cosine of x (Q30 radians, |x| <= pi/2) by Taylor series.
  function automatic longint cos_q30(input longint x);
    longint x2, term, acc;
    x2   = (x * x) >>> 30;
    term = 64'sd1 <<< 30;
    acc  = term;
    for (int n = 1; n <= 7; n++) begin
      term = -((term * x2) >>> 30) / ((2*n - 1) * (2*n));
      acc  = acc + term;
    end
    return acc;
  endfunction

  function automatic logic [N*TRIG_W-1:0] build_table();
    logic [N*TRIG_W-1:0] t;
    longint pi_q30, x, c;
    logic   neg;
    pi_q30 = 64'sd3373259426;            // round(pi * 2^30)
    for (int i = 0; i < N; i++) begin
      // angle 2*pi*i/N folded to |x| <= pi/2 with a sign flip
      x   = (2 * pi_q30 * i) / longint'(N);
      neg = 1'b0;
      if (x > pi_q30) x = x - 2 * pi_q30;              // (-pi, pi]
      if (x > pi_q30 / 2)        begin x = pi_q30 - x;  neg = 1'b1; end
      else if (x < -pi_q30 / 2)  begin x = -pi_q30 - x; neg = 1'b1; end
      c = (cos_q30(x) + (64'sd1 <<< 15)) >>> 16;        // Q30 -> Q14
      if (c > 16383) c = 16383;
      if (neg) c = -c;
      t[i*TRIG_W +: TRIG_W] = c[TRIG_W-1:0];
    end
    return t;
  endfunction

  localparam logic [N*TRIG_W-1:0] COS_TAB = build_table();

  logic [LUT_AW-1:0] ci, si;
  assign ci = phase[PHASE_W-1 -: LUT_AW];
  // sin(theta) = cos(theta - quarter turn)
  assign si = ci - LUT_AW'(N / 4);

  assign cos_o = trig_t'(COS_TAB[ci*TRIG_W +: TRIG_W]);
  assign sin_o = trig_t'(COS_TAB[si*TRIG_W +: TRIG_W]);

endmodule
