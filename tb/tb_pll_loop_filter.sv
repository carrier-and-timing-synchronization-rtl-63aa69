// Runs the loop filter on random error words and compares its phase with
// the document's recurrence theta[k+1] = theta[k] + Kp e[k] + Ki e[k-1]
// evaluated in real arithmetic with Kp = 8.92e-5, Ki = -8.75e-5, the error
// scaled by 128 per unit amplitude, modulo 2*pi (tolerance 1e-5 turn);
// also checks hold while en is low and clr.
module tb_pll_loop_filter;
  import bpsk_sync_pkg::*;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  err_t e = 0;
  phase_t phase;
  int checks = 0, failures = 0;
  pll_loop_filter dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real th, ep, got, d;
    repeat (3) @(negedge clk);
    rst = 0; th = 0.0; ep = 0.0;
    for (int n = 0; n < 3000; n++) begin
      e   = err_t'($urandom % 16384) - 18'sd6000;
      en  = ($urandom % 5 != 0);
      clr = (n == 1500);
      @(posedge clk); #1;
      if (clr) begin th = 0.0; ep = 0.0; end
      else if (en) begin
        th = th + 128.0 * (8.92e-5 * real'(e) / 4096.0 - 8.75e-5 * ep);
        ep = real'(e) / 4096.0;
      end
      got = real'(phase) / 4294967296.0;                 // turns
      d = got - th / (2.0 * 3.14159265358979);
      d = d - $floor(d + 0.5);
      checks++;
      if (d > 1e-5 || d < -1e-5) begin
        failures++; if (failures < 5) $display("n=%0d phase %f turn, reference %f rad", n, got, th);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
