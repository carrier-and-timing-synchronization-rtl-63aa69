// Checks the interpolation NCO against a reference model: eta sequence,
// underflow flags, the interpolant rate (one per two samples at zero offset,
// 1 + ppm faster otherwise) and that a new frequency word takes effect at
// the next load.
module tb_timing_nco;
  import bpsk_sync_pkg::*;
  logic clk = 0, rst = 1, load = 0, v_load = 0, step = 0;
  freq_t v = 0;
  logic [31:0] eta, w;
  logic ovf;
  int checks = 0, failures = 0;
  timing_nco dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic run(input int ppm, input int nsteps);
    longint unsigned reta, rw;
    int novf;
    real expw;
    @(negedge clk); v = freq_t'(ppm * 16); v_load = 1;
    @(negedge clk); v_load = 0; load = 1;
    @(negedge clk); load = 0;
    expw = 2147483648.0 * (1.0 + real'(ppm) * 1e-6);
    checks++;
    if (real'(w) - expw > 4.0 || expw - real'(w) > 4.0) begin
      failures++; $display("w=%0d expected %f", w, expw);
    end
    rw = w; reta = 0; novf = 0;
    for (int n = 0; n < nsteps; n++) begin
      checks += 2;
      if (eta != 32'(reta)) begin failures++; $display("eta mismatch step %0d", n); end
      if (ovf != (reta < rw)) begin failures++; $display("ovf mismatch step %0d", n); end
      if (reta < rw) novf++;
      step = 1;
      @(negedge clk);
      step = 0;
      reta = (reta - rw) & 64'hffffffff;
    end
    // interpolants per sample = w
    checks++;
    if ((real'(novf) - real'(nsteps) * expw / 4294967296.0) > 1.5 ||
        (real'(nsteps) * expw / 4294967296.0 - real'(novf)) > 1.5) begin
      failures++; $display("ppm %0d: %0d interpolants in %0d samples", ppm, novf, nsteps);
    end
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 1000);
    run(2000, 20000);
    run(-1750, 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
