// Interpolation-control NCO with its resample stage (symbol-timing loop 1).
//
// A modulo-1 register eta (NCO_W bits, 1.0 = 2^NCO_W) is decremented by the
// control word w every input sample period Ts. When eta < w the next
// decrement underflows: the current sample is the base point of an
// interpolant (ovf = 1), and fractional_interval turns eta/w into mu.
// Interpolants therefore fall every 1/w input samples; the nominal word is
// w = 0.5 (Ti = T/2 with Ts = T/4, as in the document).
//
// Resample: the frequency estimator delivers v (1/16 ppm) once per
// hypothesis; v_load latches it, and it is moved into the NCO at the next
// sample step, so w changes only on the Ts grid. w = 0.5 * (1 + v*1e-6),
// computed as 2^(NCO_W-1) + v * 2^(NCO_W-1)/16e6 (constant rounded to 2^-10).
//
// Timing: load clears eta (first interpolant at sample 0) and applies a
// pending word at once. eta, w and ovf
// are registered/combinational views of the current sample; step advances.
module timing_nco
  import bpsk_sync_pkg::*;
#(
  parameter int NCO_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,     // start of a pass: eta := 0
  input  logic             v_load,   // new frequency estimate available
  input  freq_t            v,        // frequency estimate, 1/16 ppm
  input  logic             step,     // advance one sample period Ts
  output logic [NCO_W-1:0] eta,
  output logic [NCO_W-1:0] w,
  output logic             ovf
);

  // 2^(NCO_W-1) / 16e6 in units of 2^-10 (137439 for NCO_W = 32)
  localparam longint KV = ((64'sd1 <<< (NCO_W - 1 + 10)) + 64'sd8000000) / 64'sd16000000;

  logic [NCO_W-1:0] w_pending;
  logic             pending;
  logic signed [63:0] dw_full;
  logic [NCO_W-1:0]   dw;

  assign dw_full = (64'(signed'(v)) * KV) >>> 10;
  assign dw      = dw_full[NCO_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      eta       <= '0;
      w         <= NCO_W'(1) << (NCO_W - 1);
      w_pending <= NCO_W'(1) << (NCO_W - 1);
      pending   <= 1'b0;
    end else begin
      if (v_load) begin
        w_pending <= (NCO_W'(1) << (NCO_W - 1)) + dw;
        pending   <= 1'b1;
      end
      if (load) begin
        eta <= '0;
        if (pending) begin
          w       <= w_pending;
          pending <= 1'b0;
        end
      end else if (step) begin
        eta <= eta - w;
        if (pending && !v_load) begin
          w       <= w_pending;
          pending <= 1'b0;
        end
      end
    end
  end

  assign ovf = (eta < w);

endmodule
