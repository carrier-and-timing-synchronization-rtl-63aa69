// Runs the window search over 17 hypotheses with scores from a known
// parabola-shaped response and checks: the hypothesis sequence (-8..8 steps
// of 4000), the refined estimate against the parabola vertex through the
// best three points, and the edge case where the best point is the first.
module tb_window_search;
  import bpsk_sync_pkg::*;
  logic clk = 0, rst = 1, start = 0, sat_valid = 0;
  logic [15:0] sat = 0;
  logic signed [19:0] hyp, est;
  logic busy, done;
  int checks = 0, failures = 0;
  window_search dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input real peak, input real curv);
    int s [17];
    int b, cycles;
    real vert, r;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    b = 0;
    for (int n = 0; n < 17; n++) begin
      r = 3000.0 - curv * (real'(hyp) - peak) * (real'(hyp) - peak);
      if (r < 0.0) r = 0.0;
      s[n] = int'(r);
      checks++;
      if (int'(hyp) != (n - 8) * 4000) begin failures++; $display("hyp %0d = %0d", n, hyp); end
      if (s[n] > s[b]) b = n;
      repeat (3) @(negedge clk);
      sat = 16'(s[n]); sat_valid = 1;
      @(negedge clk); sat_valid = 0;
    end
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    if (b == 0 || b == 16) vert = real'((b - 8) * 4000);
    else vert = real'((b - 8) * 4000) + 4000.0 * real'(s[b-1] - s[b+1]) /
                (2.0 * real'(s[b-1] - 2 * s[b] + s[b+1]));
    checks += 2;
    if (real'(est) - vert > 1.5 || vert - real'(est) > 1.5) begin
      failures++; $display("peak %f: est=%0d vertex %f", peak, est, vert);
    end
    if (cycles > 3) begin failures++; $display("done late: %0d cycles", cycles); end
  endtask
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(1234.0, 1.0e-5);
    run(-17500.0, 2.0e-6);
    run(-40000.0, 1.0e-6);   // peak outside the window: edge point
    run(23999.0, 4.0e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
