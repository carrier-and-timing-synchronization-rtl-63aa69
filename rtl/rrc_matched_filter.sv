// Root-raised-cosine matched filter at two samples per symbol (Ti = T/2).
//
// 17-tap FIR (span +-4 symbols, roll-off 0.5). Taps are
//   h[l] = round(2^14 * g(l - 8) / E),  g(n) = rrc(n/2),  E = sum g(n)^2,
// with rrc(t) the unit-symbol-period root-raised-cosine impulse response,
// so that a unit-amplitude transmitted pulse sampled at the right instant
// gives a matched-filter peak of 1.0. Group delay 8 input samples (4 symbols).
// The document names the pulse shape and the filter; roll-off, span and
// tap precision are this design's choices.
//
// Timing: one input per in_valid; out_valid/dout follow one cycle later.
// clr empties the delay line at the start of a pass.
module rrc_matched_filter
  import bpsk_sync_pkg::*;
#(
  parameter int TAPS = 17
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,
  input  logic    in_valid,
  input  sample_t din,
  output logic    out_valid,
  output sample_t dout
);

  localparam int H [17] = '{-83, 88, 25, -123, 348, -615, -869, 4741, 9312,
                            4741, -869, -615, 348, -123, 25, 88, -83};

  sample_t line [TAPS];
  logic signed [47:0] acc;

  always_comb begin
    acc = 48'(signed'(din)) * 48'(H[0]);
    for (int l = 1; l < TAPS; l++) acc += 48'(signed'(line[l-1])) * 48'(H[l]);
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int l = 0; l < TAPS; l++) line[l] <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        line[0] <= din;
        for (int l = 1; l < TAPS; l++) line[l] <= line[l-1];
        dout <= sat_sample((acc + 48'sd8192) >>> 14);
      end
    end
  end

endmodule
