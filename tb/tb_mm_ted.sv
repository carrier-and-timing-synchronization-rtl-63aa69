// Compares the Mueller-Muller detector output with a reference model over a
// random stream, including the zero output for the first symbol after clr.
module tb_mm_ted;
  import bpsk_sync_pkg::*;
  logic clk = 0, rst = 1, clr = 0, en = 0, d = 0;
  sample_t s = 0;
  trig_t w = 0;
  err_t u;
  int checks = 0, failures = 0;
  mm_ted dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int sp, dp, exp_u, raw;
    bit have;
    repeat (3) @(negedge clk);
    rst = 0; have = 0; sp = 0; dp = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (n % 200 == 0) begin clr = 1; @(negedge clk); clr = 0; have = 0; end
      s = sample_t'($urandom % 16384) - 16'sd8192;
      d = 1'($urandom);
      w = trig_t'($urandom % 32768) - 16'sd16384;
      en = 1;
      #1;
      raw = (dp ? int'(s) : -int'(s)) - (d ? sp : -sp);
      exp_u = have ? int'((longint'(raw) * longint'(w)) >>> 14) : 0;
      if (exp_u > 131071) exp_u = 131071;
      if (exp_u < -131072) exp_u = -131072;
      checks++;
      if (int'(u) != exp_u) begin failures++; $display("n=%0d u=%0d exp %0d", n, u, exp_u); end
      sp = int'(s); dp = int'(d); have = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
