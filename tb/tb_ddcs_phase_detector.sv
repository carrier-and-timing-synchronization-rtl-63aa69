// Checks e = u_s cos(theta_hat) - u_c sin(theta_hat) against a real-valued
// reference for random inputs (within 4 LSB: u_s, u_c are truncated first), and that for a wiped-off BPSK symbol the
// error is sin(theta - theta_hat) whatever the data sign.
module tb_ddcs_phase_detector;
  import bpsk_sync_pkg::*;
  sample_t zc, zs, yhat;
  trig_t wc, ws;
  err_t e;
  int checks = 0, failures = 0;
  ddcs_phase_detector dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real r, th, thh, d;
    for (int n = 0; n < 2000; n++) begin
      zc = sample_t'($urandom % 16384) - 16'sd8192; zs = sample_t'($urandom % 16384) - 16'sd8192;
      yhat = sample_t'($urandom % 16384) - 16'sd8192;
      wc = trig_t'($urandom % 32768) - 16'sd16384; ws = trig_t'($urandom % 32768) - 16'sd16384;
      #1;
      r = (real'(zs) * real'(yhat) / 4096.0 * real'(wc) - real'(zc) * real'(yhat) / 4096.0 * real'(ws)) / 16384.0;
      if (r > 131071.0) r = 131071.0;
      if (r < -131072.0) r = -131072.0;
      checks++;
      if (real'(e) - r > 4.0 || r - real'(e) > 4.0) begin failures++; $display("e=%0d exp %f", e, r); end
    end
    for (int n = 0; n < 500; n++) begin
      th = real'($urandom % 6283) / 1000.0 - 3.14; thh = real'($urandom % 6283) / 1000.0 - 3.14;
      d = ($urandom % 2 == 1) ? 1.0 : -1.0;
      zc = sample_t'($rtoi(4096.0 * d * $cos(th))); zs = sample_t'($rtoi(4096.0 * d * $sin(th)));
      yhat = sample_t'($rtoi(4096.0 * d));
      wc = trig_t'($rtoi(16383.0 * $cos(thh))); ws = trig_t'($rtoi(16383.0 * $sin(thh)));
      #1;
      r = 4096.0 * $sin(th - thh);
      checks++;
      if (real'(e) - r > 8.0 || r - real'(e) > 8.0) begin failures++; $display("tone: e=%0d exp %f", e, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
