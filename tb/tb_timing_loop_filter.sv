// Checks the first-order loop accumulation c += u / 2^KT_SHIFT, the clamp,
// clr, and that c holds when en is low.
module tb_timing_loop_filter;
  import bpsk_sync_pkg::*;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  err_t u = 0;
  ofs_t c;
  int checks = 0, failures = 0;
  timing_loop_filter dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int rc;
    bit hit_hi, hit_lo;
    repeat (3) @(negedge clk);
    rst = 0; rc = 0; hit_hi = 0; hit_lo = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom % 4 != 0);
      u  = (n < 1000) ? err_t'($urandom % 4000) - 18'sd1000 : err_t'($urandom % 4000) - 18'sd3000;
      if (n == 1500) begin clr = 1; en = 0; end else clr = 0;
      @(posedge clk); #1;
      if (clr) rc = 0;
      else if (en) begin
        rc = rc + (int'(u) >>> 3);
        if (rc > 8192) rc = 8192;
        if (rc < -8192) rc = -8192;
      end
      if (rc == 8192) hit_hi = 1;
      if (rc == -8192) hit_lo = 1;
      checks++;
      if (int'(c) != rc) begin failures++; $display("n=%0d c=%0d exp %0d", n, c, rc); end
    end
    checks++;
    if (!hit_hi || !hit_lo) begin failures++; $display("clamp not reached: hi %0d lo %0d final %0d", hit_hi, hit_lo, rc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
