// Compares a + mu (b - a) with a real-valued reference (within 1 LSB),
// including the end points mu = 0 and full-scale differences.
module tb_linear_interpolator;
  import bpsk_sync_pkg::*;
  sample_t a, b, y;
  mu_t mu;
  int checks = 0, failures = 0;
  linear_interpolator dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real r;
    for (int n = 0; n < 3000; n++) begin
      a  = sample_t'($urandom);
      b  = sample_t'($urandom);
      mu = (n % 10 == 0) ? '0 : mu_t'($urandom);
      #1;
      r = real'(a) + real'(mu) / 4096.0 * (real'(b) - real'(a));
      checks++;
      if (real'(y) - r > 1.0 || r - real'(y) > 1.0) begin
        failures++; $display("a=%0d b=%0d mu=%0d y=%0d exp %f", a, b, mu, y, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
