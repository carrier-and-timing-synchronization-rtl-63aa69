// Checks the cosine/sine table against real-valued cos/sin of the
// table-resolution phase (within 2 LSB), over a phase sweep and random phases.
module tb_sincos_lut;
  import bpsk_sync_pkg::*;
  phase_t phase;
  trig_t  c, s;
  int checks = 0, failures = 0;
  sincos_lut dut (.phase(phase), .cos_o(c), .sin_o(s));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    real a, ec, es;
    for (int n = 0; n < 3000; n++) begin
      phase = (n < 1024) ? phase_t'(n) << 22 : phase_t'($urandom);
      #1;
      a  = 2.0 * 3.14159265358979 * real'(phase >> 22) / 1024.0;
      ec = 16384.0 * $cos(a);
      es = 16384.0 * $sin(a);
      if (ec > 16383.0) ec = 16383.0;
      if (es > 16383.0) es = 16383.0;
      checks += 2;
      if (real'(c) - ec > 2.0 || ec - real'(c) > 2.0) begin
        failures++; if (failures < 5) $display("cos mismatch phase=%h got %0d exp %f", phase, c, ec);
      end
      if (real'(s) - es > 2.0 || es - real'(s) > 2.0) begin
        failures++; if (failures < 5) $display("sin mismatch phase=%h got %0d exp %f", phase, s, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
