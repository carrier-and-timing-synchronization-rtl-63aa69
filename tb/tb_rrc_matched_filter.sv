// Drives an impulse and a random sequence through the matched filter and
// compares with a real-valued convolution using root-raised-cosine taps
// computed here from the pulse formula (roll-off 0.5, 2 samples/symbol,
// normalised to unit peak response); also checks the one-cycle latency.
module tb_rrc_matched_filter;
  import bpsk_sync_pkg::*;
  import tb_bpsk_pkg::*;
  logic clk = 0, rst = 1, clr = 0, in_valid = 0, out_valid;
  sample_t din = 0, dout;
  real h [17];
  real hist [17];
  int checks = 0, failures = 0;
  rrc_matched_filter dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real e, r;
    e = 0.0;
    for (int l = 0; l < 17; l++) begin h[l] = rrc(real'(l - 8) / 2.0, 0.5); e += h[l] * h[l]; end
    for (int l = 0; l < 17; l++) begin h[l] = h[l] / e; hist[l] = 0.0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      din = (n < 40) ? ((n == 5) ? 16'sd8192 : 16'sd0) : sample_t'($urandom % 8192) - 16'sd4096;
      in_valid = (n % 3 != 2);  // gaps in the input stream
      if (in_valid) begin
        for (int l = 16; l > 0; l--) hist[l] = hist[l-1];
        hist[0] = real'(din);
        r = 0.0;
        for (int l = 0; l < 17; l++) r += h[l] * hist[l];
        @(posedge clk); #1;
        checks += 2;
        if (!out_valid) begin failures++; $display("out_valid missing"); end
        if (real'(dout) - r > 2.0 || r - real'(dout) > 2.0) begin
          failures++; $display("n=%0d dout=%0d exp %f", n, dout, r);
        end
      end else begin
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("spurious out_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
