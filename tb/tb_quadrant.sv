// Feeds blocks of I/Q symbols with known carrier phases through the
// quadrant resolver and checks the swap decision against the measured
// powers, and the swapped / negated outputs against a reference mapping.
module tb_quadrant;
  import bpsk_sync_pkg::*;
  logic clk = 0, rst = 1, clr = 0, meas = 0, decide = 0, flip = 0, swap;
  sample_t zc_in = 0, zs_in = 0, zc, zs;
  int checks = 0, failures = 0;
  quadrant dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic block(input real th);
    real pc, ps;
    bit exp_swap;
    sample_t a, b;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    pc = 0; ps = 0;
    for (int n = 0; n < 500; n++) begin
      real d;
      d = ($urandom % 2 != 0) ? 4096.0 : -4096.0;
      zc_in = sample_t'($rtoi(d * $cos(th))); zs_in = sample_t'($rtoi(d * $sin(th)));
      pc += real'(zc_in) * real'(zc_in); ps += real'(zs_in) * real'(zs_in);
      meas = 1; @(negedge clk); meas = 0;
    end
    decide = 1; @(negedge clk); decide = 0;
    exp_swap = ps > pc;
    checks++;
    if (swap != exp_swap) begin failures++; $display("theta %f swap=%0d", th, swap); end
    for (int n = 0; n < 20; n++) begin
      zc_in = sample_t'($urandom); zs_in = sample_t'($urandom); flip = 1'($urandom); #1;
      a = exp_swap ? zs_in : zc_in; b = exp_swap ? zc_in : zs_in;
      if (flip) begin
        a = (a == -16'sd32768) ? 16'sd32767 : -a;
        b = (b == -16'sd32768) ? 16'sd32767 : -b;
      end
      checks += 2;
      if (zc != a || zs != b) begin failures += 2; $display("mapping error"); end
      @(negedge clk);
    end
    flip = 0;
  endtask
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    block(0.3); block(1.4); block(-2.0); block(2.9); block(-0.9); block(-1.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
