// Tests one symbol-timing chain on a noiseless root-raised-cosine BPSK
// waveform (64 symbols, 4 samples per symbol) with a known time delay and
// symbol-frequency offset.
//  * Loop-1 pass with the true corrections (v = offset, p = -2 D): every
//    output symbol has the data sign and magnitude within 0.4 of 1.0 (linear
//    interpolation at two samples per symbol limits accuracy); the pass takes
//    NSAMP + 5 NSYM + a few cycles.
//  * Loop-1 pass with no correction: the symbol error power is at least
//    twice that of the corrected pass.
//  * Loop-2 passes with the decoded symbols supplied and p left 0.3 Ti off:
//    the Mueller-Muller loop pulls c towards +0.3 Ti and the late symbols
//    are restored.
module tb_symbol_timing;
  import bpsk_sync_pkg::*;
  import tb_bpsk_pkg::*;
  localparam int NSYM  = 64;
  localparam int NSAMP = 4 * NSYM + 48;
  localparam real PPM = 1500.0, DELAY = 0.2;
  logic clk = 0, rst = 1, cap_clr = 0, x_valid = 0, cap_full, start = 0, sel = 0;
  logic busy, done, sym_valid, interp_strobe;
  sample_t x = 0, sym;
  freq_t v = 0;
  ofs_t p = 0, c_ofs;
  logic [6:0] idx, sym_idx;
  trig_t w_car = 16'sd16384;
  logic d_in;
  int checks = 0, failures = 0;
  real got [NSYM];
  symbol_timing #(.NSYM(NSYM)) dut (.*);
  assign d_in = tx_bit(int'(idx));
  always #5 clk = ~clk;
  always @(posedge clk) if (sym_valid) got[sym_idx] = real'(sym) / 4096.0;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic pass(input bit s, input freq_t vv, input ofs_t pp, output int cyc);
    @(negedge clk); sel = s; v = vv; p = pp; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask
  initial begin
    int cyc, bad;
    real worst, tau, t, r, mse0, mse1;
    repeat (3) @(negedge clk);
    rst = 0; cap_clr = 1; @(negedge clk); cap_clr = 0;
    tau = DELAY;
    for (int k = 0; k < NSAMP; k++) begin
      t = real'(k) / 4.0 + tau; r = 0.0;
      for (int i = 0; i < NSYM; i++) r += (tx_bit(i) ? 1.0 : -1.0) * rrc(t - real'(i), 0.5);
      x = sample_t'($rtoi(r * 4096.0)); x_valid = 1;
      @(negedge clk);
      tau += PPM * 1e-6 / 4.0;
    end
    x_valid = 0;
    checks++; if (!cap_full) begin failures++; $display("capture not full"); end
    // corrected loop-1 pass
    pass(0, freq_t'(int'(PPM * 16.0)), ofs_t'(-int'(2.0 * DELAY * 4096.0)), cyc);
    worst = 10.0; bad = 0; mse1 = 0.0;
    for (int i = 4; i < NSYM - 4; i++) begin
      real m;
      m = tx_bit(i) ? got[i] : -got[i];
      if (m < worst) worst = m;
      if (m < 0.6 || m > 1.4) bad++;
      mse1 += (m - 1.0) * (m - 1.0);
    end
    $display("corrected pass: worst margin %f, %0d symbols off, mse %f, %0d cycles", worst, bad, mse1, cyc);
    checks += 2;
    if (bad != 0) begin failures++; $display("corrected symbols off"); end
    if (cyc > NSAMP + 5 * NSYM + 8) begin failures++; $display("pass too slow"); end
    // uncorrected pass
    pass(0, '0, '0, cyc);
    mse0 = 0.0;
    for (int i = 4; i < NSYM - 4; i++) mse0 += ((tx_bit(i) ? got[i] : -got[i]) - 1.0) ** 2;
    $display("uncorrected pass: mse %f", mse0);
    checks++; if (mse0 < 2.0 * mse1) begin failures++; $display("correction did not reduce the error"); end
    // loop-1 pass with a delay error, then loop-2 passes
    pass(0, freq_t'(int'(PPM * 16.0)), ofs_t'(-int'(2.0 * DELAY * 4096.0) - 1229), cyc);
    for (int n = 0; n < 3; n++) pass(1, '0, ofs_t'(-int'(2.0 * DELAY * 4096.0) - 1229), cyc);
    $display("loop 2: final c = %f Ti, %0d cycles per pass", real'(c_ofs) / 4096.0, cyc);
    checks += 3;
    if (c_ofs < 800 || c_ofs > 1700) begin failures++; $display("loop 2 did not converge"); end
    if (cyc > 5 * NSYM + 8) begin failures++; $display("loop-2 pass too slow"); end
    bad = 0;
    for (int i = NSYM / 2; i < NSYM - 4; i++) if ((tx_bit(i) ? got[i] : -got[i]) < 0.6) bad++;
    if (bad != 0) begin failures++; $display("loop 2 symbols off: %0d", bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
