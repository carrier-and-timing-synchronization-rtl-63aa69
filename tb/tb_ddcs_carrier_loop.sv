// Closed-loop test of the DDCS carrier loop. A block of 1944 BPSK symbols
// with carrier phase theta (and a small phase ramp) plus noise is processed
// repeatedly, as the receiver does once per decoder iteration, with the
// soft decisions y_hat = d (ideal wipe-off). With the document's DDCS gains
// the loop must lock to within 0.05 rad by the 10th pass (the document
// reports steady state after about 10 iterations); a second run with a
// noisy y_hat checks lock at a negative phase.
module tb_ddcs_carrier_loop;
  import bpsk_sync_pkg::*;
  import tb_bpsk_pkg::*;
  localparam int NSYM = 1944;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  sample_t zc = 0, zs = 0, yhat = 0;
  trig_t wc, ws;
  phase_t theta;
  err_t e;
  int checks = 0, failures = 0;
  ddcs_carrier_loop dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (1000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic real wrap(input real a);
    while (a > 3.14159265358979) a -= 2.0 * 3.14159265358979;
    while (a < -3.14159265358979) a += 2.0 * 3.14159265358979;
    return a;
  endfunction
  task automatic run(input real th0, input real ramp, input real yn, input int passes);
    real th, err, est;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int p = 0; p < passes; p++) begin
      for (int k = 0; k < NSYM; k++) begin
        real d;
        d  = tx_bit(k) ? 1.0 : -1.0;
        th = th0 + ramp * real'(p * NSYM + k);
        zc = sample_t'($rtoi(4096.0 * (d * $cos(th) + 0.3 * gauss())));
        zs = sample_t'($rtoi(4096.0 * (d * $sin(th) + 0.3 * gauss())));
        yhat = sample_t'($rtoi(4096.0 * (d + yn * gauss())));
        en = 1;
        @(negedge clk);
      end
      en = 0;
      est = 2.0 * 3.14159265358979 * real'(theta) / 4294967296.0;
      err = wrap(th - est);
      $display("pass %0d theta %f estimate %f error %f", p + 1, th, est, err);
      if (p + 1 >= 10) begin
        checks++;
        if (err > 0.05 || err < -0.05) begin failures++; $display("not locked after pass %0d", p + 1); end
      end
      if (p == 0) begin
        checks++;
        if (err > wrap(th0) - 0.05 && err < wrap(th0) + 0.05 && th0 != 0.0) begin
          failures++; $display("no pull-in during the first pass");
        end
      end
    end
  endtask
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(0.785, 1.0e-7, 0.0, 12);     // pi/4, the document's test offset
    run(-1.2, 0.0, 0.3, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
