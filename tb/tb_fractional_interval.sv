// Compares mu = eta / w with a real-valued reference for random eta < w.
module tb_fractional_interval;
  import bpsk_sync_pkg::*;
  logic [31:0] eta, w;
  mu_t mu;
  int checks = 0, failures = 0;
  fractional_interval dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real r;
    for (int n = 0; n < 2000; n++) begin
      w   = 32'h7000_0000 + ($urandom % 32'h2000_0000);
      eta = $urandom % w;
      #1;
      r = real'(eta) / real'(w) * 4096.0;
      checks++;
      if (real'(mu) > r || real'(mu) < r - 1.0) begin
        failures++; $display("eta=%0d w=%0d mu=%0d exp %f", eta, w, mu, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
