// Compares Q = scale * (z_c cos + z_s sin) with a real-valued reference, and
// checks that a BPSK symbol derotated by the right phase gives an LLR of
// the data sign with magnitude scale * amplitude.
module tb_llr_compute;
  import bpsk_sync_pkg::*;
  sample_t zc, zs;
  trig_t wc, ws;
  logic [15:0] scale;
  logic signed [15:0] q;
  int checks = 0, failures = 0;
  llr_compute dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real r, th, d;
    for (int n = 0; n < 2000; n++) begin
      zc = sample_t'($urandom % 16384) - 16'sd8192; zs = sample_t'($urandom % 16384) - 16'sd8192;
      wc = trig_t'($urandom % 32768) - 16'sd16384; ws = trig_t'($urandom % 32768) - 16'sd16384;
      scale = 16'($urandom % 4096);
      #1;
      r = (real'(zc) * real'(wc) + real'(zs) * real'(ws)) / 16384.0 * real'(scale) / 65536.0;
      if (r > 32767.0) r = 32767.0;
      if (r < -32768.0) r = -32768.0;
      checks++;
      if (real'(q) - r > 1.5 || r - real'(q) > 1.5) begin failures++; $display("q=%0d exp %f", q, r); end
    end
    for (int n = 0; n < 200; n++) begin
      th = real'($urandom % 6283) / 1000.0 - 3.14;
      d = ($urandom % 2 != 0) ? 1.0 : -1.0;
      zc = sample_t'($rtoi(4096.0 * d * $cos(th))); zs = sample_t'($rtoi(4096.0 * d * $sin(th)));
      wc = trig_t'($rtoi(16383.0 * $cos(th))); ws = trig_t'($rtoi(16383.0 * $sin(th)));
      scale = 16'd512;   // 2.0
      #1;
      checks++;
      if (real'(q) - d * 32.0 > 1.5 || d * 32.0 - real'(q) > 1.5) begin
        failures++; $display("aligned symbol q=%0d exp %f", q, d * 32.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
