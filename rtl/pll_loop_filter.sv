// Loop filter of the DDCS carrier PLL (the "ACC" block), whose accumulator
// is the carrier-phase estimate:
//
//   H(z) = (Kp + Ki z^-1) / (1 - z^-1),
//   theta_hat[k+1] = theta_hat[k] + Kp e[k] + Ki e[k-1].
//
// The filter form and the DDCS gains Kp = 8.92e-5, Ki = -8.75e-5 are the
// document's. The document does not give the scale of the error signal
// (its amplitude sqrt(P) Ts); this design takes a full-amplitude symbol as
// E_SCALE = 128 error units, which reproduces the reported settling within
// about ten passes over a 1944-symbol block. With e in 1.0 = 2^12, phase in
// turns (2^32 = 2*pi) and GAIN_FRAC fractional gain bits the integer gains
// are K * E_SCALE * 2^(20 + GAIN_FRAC) / (2*pi): KP = 487792, KI = -478496.
//
// Timing: phase is the registered estimate; en adds the current e (and
// stores it as e[k-1]); clr returns the phase to zero.
module pll_loop_filter
  import bpsk_sync_pkg::*;
#(
  parameter int KP        = 487792,
  parameter int KI        = -478496,
  parameter int GAIN_FRAC = 8
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,
  input  logic   en,
  input  err_t   e,
  output phase_t phase
);

  logic [PHASE_W+GAIN_FRAC-1:0] acc, acc_next;
  err_t e_prev;

  // modulo-one-turn accumulation: the upper bits wrap like the phase
  assign acc_next   = acc + (PHASE_W+GAIN_FRAC)'(48'(e) * 48'(KP))
                          + (PHASE_W+GAIN_FRAC)'(48'(e_prev) * 48'(KI));
  assign phase      = phase_t'(acc >> GAIN_FRAC);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      acc    <= '0;
      e_prev <= '0;
    end else if (en) begin
      acc    <= acc_next;
      e_prev <= e;
    end
  end

endmodule
