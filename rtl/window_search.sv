// Fixed-step window search over offset hypotheses (frequency estimator and
// time-delay estimator of symbol-timing loop 1).
//
// start sets hyp to the first of POINTS hypotheses CENTER + (n - (POINTS-1)/2)
// * STEP. For each one the surrounding receiver runs a timing pass and a few
// decoder iterations and returns the number of satisfied parity checks on
// sat_valid/sat; the search then moves to the next hypothesis. After the
// last one the best point b is refined with its two neighbours by the vertex
// of the parabola through them,
//   est = hyp_b + STEP * (S[b-1] - S[b+1]) / (2 * (S[b-1] - 2 S[b] + S[b+1])),
// and done pulses. At the window edge, or for a flat top, est = hyp_b.
// The fixed step, the number of points and the final interpolation follow
// the document; the parabolic form of the interpolation is this design's
// choice (the document says only "an interpolation technique").
module window_search
  import bpsk_sync_pkg::*;
#(
  parameter int POINTS = 17,
  parameter int STEP   = 4000,
  parameter int CENTER = 0,
  parameter int HW     = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic                 sat_valid,
  input  logic [CNT_W-1:0]     sat,
  output logic signed [HW-1:0] hyp,
  output logic                 busy,
  output logic signed [HW-1:0] est,
  output logic                 done
);

  localparam int IW = $clog2(POINTS + 1);

  logic [CNT_W-1:0] score [POINTS];
  logic [IW-1:0]    idx, best;
  logic [CNT_W-1:0] best_s;
  logic             finish;

  // parabolic refinement, evaluated on the final cycle
  logic signed [CNT_W+2:0] sm, s0, sp, num, den;
  logic signed [47:0]      delta;
  logic [IW-1:0]           bm, bp;

  assign bm = best - IW'(1);
  assign bp = best + IW'(1);

  always_comb begin
    s0  = (CNT_W+3)'(best_s);
    sm  = (best != '0)                 ? (CNT_W+3)'(score[bm]) : s0;
    sp  = (best != IW'(POINTS - 1))    ? (CNT_W+3)'(score[bp]) : s0;
    num = sm - sp;
    den = 2 * (sm - 2 * s0 + sp);
    if (best == '0 || best == IW'(POINTS - 1) || den >= 0) delta = '0;
    else delta = (48'(num) * 48'(STEP)) / 48'(den);
  end

  function automatic logic signed [HW-1:0] hyp_of(input logic [IW-1:0] n);
    return HW'(CENTER + (int'(n) - (POINTS - 1) / 2) * STEP);
  endfunction

  assign hyp = hyp_of(idx);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      idx    <= '0;
      best   <= '0;
      best_s <= '0;
      busy   <= 1'b0;
      finish <= 1'b0;
      est    <= HW'(CENTER);
      for (int n = 0; n < POINTS; n++) score[n] <= '0;
    end else if (start) begin
      idx    <= '0;
      best   <= '0;
      best_s <= '0;
      busy   <= 1'b1;
      finish <= 1'b0;
    end else if (finish) begin
      est    <= hyp_of(best) + HW'(delta);
      finish <= 1'b0;
      busy   <= 1'b0;
      done   <= 1'b1;
    end else if (busy && sat_valid) begin
      score[idx] <= sat;
      if (idx == '0 || sat > best_s) begin
        best   <= idx;
        best_s <= sat;
      end
      if (idx == IW'(POINTS - 1)) finish <= 1'b1;
      else                        idx <= idx + IW'(1);
    end
  end

endmodule
