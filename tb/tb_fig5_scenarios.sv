// Runs the synchronizer, at its default size, through the four impairment
// combinations of the document's frame-error-rate comparison, one codeword
// each, back to back on the same instance:
//   [Carr.TD]        carrier phase pi/4, time delay 0.5 T
//   [Carr.Freq]      carrier phase pi/4, symbol-frequency offset -2000 ppm
//   [Carr.Rw]        carrier phase pi/4, random walk sigma_d/T = 0.5 %
//   [Carr.TD.Fr.Rw]  all of them
// The random walk follows tau[k] = tau[k-1] + N(0, sigma_d^2) * Ts with
// sigma_d = 0.005, i.e. a step of 0.005 Ts = 0.00125 T rms per sample.
// The decoder is the behavioural stand-in (it corrects no errors), so the
// channel is run at a high SNR and the check is on the hard decisions
// handed to the decoder after the last iteration: at most 1 percent wrong.
// Also checks that the blk_start / sync_done hand-over repeats cleanly.
module tb_fig5_scenarios;
  import bpsk_sync_pkg::*;
  import tb_bpsk_pkg::*;

  localparam int  NSYM  = 1944;
  localparam int  NSAMP = 4 * NSYM + 48;
  localparam int  IW    = $clog2(NSYM + 1);
  localparam real SIGMA = 0.25;

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

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scenario(input string name, input real delay, input real ppm, input real rw);
    real tau, t, r, th;
    int  i0, s0;
    th = 3.14159265358979 / 4.0;
    s0 = starts;
    @(negedge clk); blk_start = 1; @(negedge clk); blk_start = 0;
    tau = delay;
    for (int k = 0; k < NSAMP; k++) begin
      t  = real'(k) / 4.0 + tau;
      r  = 0.0;
      i0 = int'(t);
      for (int i = i0 - 5; i <= i0 + 5; i++)
        if (i >= 0 && i < NSYM) r += (tx_bit(i) ? 1.0 : -1.0) * rrc(t - real'(i), 0.5);
      x_c = sample_t'($rtoi((r * $cos(th) + SIGMA * gauss()) * 4096.0));
      x_s = sample_t'($rtoi((r * $sin(th) + SIGMA * gauss()) * 4096.0));
      x_valid = 1;
      @(negedge clk);
      tau += ppm * 1e-6 / 4.0 + rw * gauss();
    end
    x_valid = 0;
    @(negedge clk);
    wait (!sync_done);
    wait (sync_done);
    @(negedge clk);
    $display("%-16s f_est %7.1f ppm  p_est %6.3f T  errors %0d  decoder runs %0d",
             name, real'(f_est) / 16.0, real'(p_est) / 8192.0, hard_errors, starts - s0);
    checks += 2;
    if (hard_errors > NSYM / 100) begin failures++; $display("FAIL: %s: too many errors", name); end
    if (starts - s0 != 95) begin failures++; $display("FAIL: %s: decoder schedule", name); end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    scenario("[Carr.TD]",       0.5, 0.0,     0.0);
    scenario("[Carr.Freq]",     0.0, -2000.0, 0.0);
    scenario("[Carr.Rw]",       0.0, 0.0,     0.005 / 4.0);
    scenario("[Carr.TD.Fr.Rw]", 0.5, -2000.0, 0.005 / 4.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
