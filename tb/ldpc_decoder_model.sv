// Behavioural stand-in for the external LDPC decoder (test use only).
//
// It is not a decoder: it takes hard decisions of the LLRs it receives and
// scores them against the known transmitted bits with two families of
// "parity checks": degree-2 checks on neighbouring bits (blind to a global
// sign inversion, like the even-degree checks of a real code) and degree-3
// checks on bit triples (which flip under inversion, like odd-degree checks).
// That gives the synchronizer the same feedback signals a decoder would:
// the share of satisfied checks, the satisfied odd-degree checks, and soft_o
// symbol estimates (+-1.0 from the hard decisions).
// Protocol: see bpsk_ldpc_sync. Soft values stream one per clock after
// dec_start; dec_done pulses after the last with the counts.
module ldpc_decoder_model
  import tb_bpsk_pkg::*;
#(
  parameter int NSYM = 1944,
  localparam int IW  = $clog2(NSYM + 1)
) (
  input  logic               clk,
  input  logic               llr_valid,
  input  logic signed [15:0] llr,
  input  logic [IW-1:0]      llr_idx,
  input  logic               dec_start,
  output logic               soft_valid,
  output logic signed [15:0] soft_o,
  output logic               done,
  output logic [15:0]        sat,
  output logic [15:0]        odd_sat,
  output int                 starts,
  output int                 hard_errors
);

  logic signed [15:0] l [NSYM];
  bit  h [NSYM];
  int  cnt;
  bit  running;

  initial begin
    running = 0; soft_valid = 0; done = 0; sat = 0; odd_sat = 0; soft_o = 0;
    starts = 0; hard_errors = 0; cnt = 0;
  end

  always @(posedge clk) begin
    soft_valid <= 0;
    done       <= 0;
    if (llr_valid) l[llr_idx] <= llr;
    if (dec_start) begin
      int s2, s3, er;
      s2 = 0; s3 = 0; er = 0;
      for (int i = 0; i < NSYM; i++) begin
        h[i] = (l[i] >= 0);
        if (h[i] != tx_bit(i)) er++;
      end
      for (int i = 0; i + 1 < NSYM; i++)
        if ((h[i] ^ h[i+1]) == (tx_bit(i) ^ tx_bit(i+1))) s2++;
      for (int i = 0; i + 2 < NSYM; i += 3)
        if ((h[i] ^ h[i+1] ^ h[i+2]) == (tx_bit(i) ^ tx_bit(i+1) ^ tx_bit(i+2))) s3++;
      sat         <= 16'(s2 + s3);
      odd_sat     <= 16'(s3);
      hard_errors <= er;
      starts      <= starts + 1;
      running     <= 1;
      cnt         <= 0;
    end else if (running) begin
      soft_valid <= 1;
      soft_o       <= h[cnt] ? 16'sd4096 : -16'sd4096;
      cnt        <= cnt + 1;
      if (cnt == NSYM - 1) begin
        running <= 0;
        done    <= 1;      // after the last soft_o value (one cycle later)
      end
    end
  end

endmodule
