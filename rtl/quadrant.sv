// Quadrant resolver ahead of the carrier loop.
//
// While meas is high it accumulates the power of the two timing-corrected
// channels, sum z_c^2 and sum z_s^2, over a block; decide latches
// swap = (P_s > P_c). The outputs are the inputs, swapped when swap is set,
// and both multiplied by -1 when flip is set. The swap removes carrier
// offsets beyond +-pi/2 down to a pi ambiguity, and flip is the
// orientation chosen afterwards from the odd-degree parity checks; both
// follow the document's procedure. The +-1 multipliers are the two "+-1"
// outputs of the document's Quadrant block.
//
// Timing: outputs are combinational; clr zeroes the accumulators.
module quadrant
  import bpsk_sync_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,
  input  logic    meas,
  input  logic    decide,
  input  logic    flip,
  input  sample_t zc_in,
  input  sample_t zs_in,
  output sample_t zc,
  output sample_t zs,
  output logic    swap
);

  logic [47:0] pc, ps;
  sample_t     a, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc   <= '0;
      ps   <= '0;
      swap <= 1'b0;
    end else begin
      if (clr) begin
        pc <= '0;
        ps <= '0;
      end else if (meas) begin
        pc <= pc + 48'(32'(zc_in) * 32'(zc_in));
        ps <= ps + 48'(32'(zs_in) * 32'(zs_in));
      end
      if (decide) swap <= (ps > pc);
    end
  end

  always_comb begin
    a  = swap ? zs_in : zc_in;
    b  = swap ? zc_in : zs_in;
    zc = flip ? sat_sample(-48'(a)) : a;
    zs = flip ? sat_sample(-48'(b)) : b;
  end

endmodule
