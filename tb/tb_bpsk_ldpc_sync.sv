// End-to-end test of the synchronizer at its default size (1944-symbol
// codeword, 17 frequency points each at two delays, 9 delay points, 50
// iterations).
//
// A BPSK codeword is shaped with root-raised-cosine pulses and sampled at
// four samples per symbol with a constant time delay, a symbol-frequency
// offset, a timing random walk and a carrier phase beyond pi/2 (so the
// channel swap is needed), plus white Gaussian noise. The behavioural
// decoder stand-in closes the loop. Checks: the frequency and delay
// estimates, the final hard-decision error count, the number and kind of
// decoder runs, and that every mechanism (both window searches with their
// interpolation, the NCO underflows, the quadrant swap, the pi trial, the
// loop-2 tracking and the carrier loop locking to the rotated phase) took
// place.
module tb_bpsk_ldpc_sync;
  import bpsk_sync_pkg::*;
  import tb_bpsk_pkg::*;

  localparam int  NSYM   = 1944;
  localparam int  NSAMP  = 4 * NSYM + 48;
  localparam int  IW     = $clog2(NSYM + 1);
  localparam real PPM    = 1500.0;     // symbol-frequency offset
  localparam real DELAY  = 0.3;        // time delay, symbol periods
  localparam real RW     = 0.0005;     // random-walk step std, symbol periods
  localparam real THETA  = 2.3;        // carrier phase, rad
  localparam real SIGMA  = 0.4;       // noise std per channel
  localparam int  WATCHDOG = 4_000_000;

  logic clk = 0, rst = 1, blk_start = 0, x_valid = 0;
  sample_t x_c, x_s;
  logic llr_valid, dec_start, dec_reinit, sync_done, swap, flip;
  logic signed [15:0] llr;
  logic [IW-1:0] llr_idx;
  logic [3:0] dec_iters;
  logic soft_valid, done;
  logic signed [15:0] soft_o;
  logic [15:0] sat, odd_sat;
  logic [2:0] mode;
  freq_t f_est;
  ofs_t p_est, loop2_ofs;
  phase_t theta_hat;
  int starts, hard_errors;

  bpsk_ldpc_sync dut (
    .clk(clk), .rst(rst), .blk_start(blk_start), .x_c(x_c), .x_s(x_s),
    .x_valid(x_valid), .llr_scale(16'd256), .llr_valid(llr_valid), .llr(llr),
    .llr_idx(llr_idx), .dec_start(dec_start), .dec_reinit(dec_reinit),
    .dec_iters(dec_iters), .dec_soft_valid(soft_valid), .dec_soft(soft_o),
    .dec_done(done), .dec_sat(sat), .dec_odd_sat(odd_sat), .sync_done(sync_done),
    .mode(mode), .f_est(f_est), .p_est(p_est), .theta_hat(theta_hat), .swap(swap),
    .flip(flip), .loop2_ofs(loop2_ofs));

  ldpc_decoder_model #(.NSYM(NSYM)) u_dec (
    .clk(clk), .llr_valid(llr_valid), .llr(llr), .llr_idx(llr_idx),
    .dec_start(dec_start), .soft_valid(soft_valid), .soft_o(soft_o), .done(done),
    .sat(sat), .odd_sat(odd_sat), .starts(starts), .hard_errors(hard_errors));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_mode [8];
  int n_interp = 0, n_loop2_move = 0, n_reinit = 0, n_swap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    cycles++;
    if (dec_start && !rst) begin
      n_mode[mode]++;
      if (dec_reinit) n_reinit++;
    end
    if (!rst && dut.u_st_c.interp_strobe) n_interp++;
    if (!rst && dut.u_st_c.sym_valid && mode == 3'd6 && loop2_ofs != 0) n_loop2_move++;
  end

  initial begin
    #(10 * WATCHDOG);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xc_r [NSAMP];
  real xs_r [NSAMP];

  initial begin
    real tau, t, r, drift, p_exp, th_exp, th_err;
    int  i0;
    // waveform: r[k] = sum_i d_i rrc(kTs + tau[k] - iT)
    tau = DELAY;
    for (int k = 0; k < NSAMP; k++) begin
      t  = real'(k) / 4.0 + tau;
      r  = 0.0;
      i0 = int'(t);
      for (int i = i0 - 5; i <= i0 + 5; i++)
        if (i >= 0 && i < NSYM) r += (tx_bit(i) ? 1.0 : -1.0) * rrc(t - real'(i), 0.5);
      xc_r[k] = r * $cos(THETA) + SIGMA * gauss();
      xs_r[k] = r * $sin(THETA) + SIGMA * gauss();
      tau += PPM * 1e-6 / 4.0 + RW * gauss();
    end
    foreach (n_mode[m]) n_mode[m] = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    blk_start <= 1;
    @(posedge clk);
    blk_start <= 0;
    for (int k = 0; k < NSAMP; k++) begin
      x_valid <= 1;
      x_c <= sample_t'($rtoi(xc_r[k] * 4096.0));
      x_s <= sample_t'($rtoi(xs_r[k] * 4096.0));
      @(posedge clk);
    end
    x_valid <= 0;
    wait (sync_done);
    @(posedge clk);

    $display("f_est=%0d (1/16 ppm) p_est=%0d (Ti/4096) swap=%0d flip=%0d theta_hat=%0d errors=%0d cycles=%0d",
             f_est, p_est, swap, flip, theta_hat, hard_errors, cycles);
    $display("decoder runs: freq=%0d delay=%0d pi=%0d init=%0d iter=%0d interp=%0d loop2moves=%0d",
             n_mode[0], n_mode[1], n_mode[3] + n_mode[4], n_mode[5], n_mode[6], n_interp, n_loop2_move);

    // estimates
    check(f_est > freq_t'(int'(PPM * 16.0) - 6000) && f_est < freq_t'(int'(PPM * 16.0) + 6000),
          "frequency estimate within 1.5 steps of the offset");
    check(f_est % 4000 != 0, "frequency interpolation refined the grid point");
    // The delay search sees the true delay plus the mean drift left by the
    // frequency-estimate error over the block (in Ti units: half a sample per
    // Ti, mean over half the block).
    drift = (real'(f_est) / 16.0 - PPM) * 1e-6 * real'(NSAMP) / 4.0;
    p_exp = -2.0 * DELAY + drift;
    $display("expected delay estimate %f Ti, got %f Ti", p_exp, real'(p_est) / 4096.0);
    check(real'(p_est) / 4096.0 > p_exp - 0.35 && real'(p_est) / 4096.0 < p_exp + 0.35,
          "delay estimate within 0.35 Ti of the delay plus residual drift");
    // decoded data
    check(hard_errors <= NSYM / 100, "final hard decisions within 1 percent");
    // decoder schedule: 17 x 2 + 9 hypotheses, 2 pi trials, 1 restart, 49 iterations
    check(n_mode[0] == 34, "17 frequency hypotheses, each at two delays");
    check(n_mode[1] == 9, "9 delay hypotheses evaluated");
    check(n_mode[3] == 1 && n_mode[4] == 1, "both pi orientations tried");
    check(n_mode[5] == 1, "one restart");
    check(n_mode[6] == 49, "49 continuing iterations");
    check(n_reinit == 46, "46 decoder restarts");
    check(starts == 95, "95 decoder runs");
    // mechanisms
    check(swap == 1'b1, "quadrant swapped the channels");
    check(n_interp > 0, "interpolation NCO underflows");
    check(n_loop2_move > 0, "loop 2 moved its timing offset");
    // after the swap the carrier sits at pi/2 - theta (plus pi if negated)
    th_exp = 3.14159265358979 / 2.0 - THETA + (flip ? 3.14159265358979 : 0.0);
    th_err = 2.0 * 3.14159265358979 * real'(theta_hat) / 4294967296.0 - th_exp;
    while (th_err > 3.14159265358979) th_err -= 2.0 * 3.14159265358979;
    while (th_err < -3.14159265358979) th_err += 2.0 * 3.14159265358979;
    $display("carrier phase error %f rad", th_err);
    check(th_err < 0.1 && th_err > -0.1, "carrier loop locked to within 0.1 rad");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
