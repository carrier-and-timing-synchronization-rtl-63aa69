// Drives the sequencer with responders that model the timing, carrier and
// decoder units (fixed latencies, a satisfied-check score peaked at a known
// frequency and delay, and more odd-degree checks for the inverted
// orientation). Each frequency point is tried at two delays, and the
// responder spoils one of the two scores, so the better one must be kept. Checks the number of each kind of pass, the iteration
// counts and restart flags handed to the decoder, the frequency / delay
// estimates against the vertex of the score, the chosen orientation, and the
// sel / seed / PLL settings in each phase.
module tb_sync_controller;
  import bpsk_sync_pkg::*;
  logic clk = 0, rst = 1, go = 0;
  logic tim_start, cfg_sel, cfg_meas, tim_done = 0, q_clr, q_decide, cfg_flip;
  logic car_start, cfg_pll_en, cfg_seed, pll_clr, car_done = 0;
  logic dec_start, dec_reinit, dec_done = 0, sync_done;
  logic [3:0] dec_iters;
  logic [15:0] dec_sat = 0, dec_odd_sat = 0;
  logic [2:0] mode_o;
  freq_t cfg_v, f_est;
  ofs_t cfg_p, p_est;
  int checks = 0, failures = 0;
  sync_controller dut (.*);
  always #5 clk = ~clk;

  localparam real FPEAK = 13333.0, PPEAK = -1500.0;
  int n_tim = 0, n_tim_l2 = 0, n_car = 0, n_car_pll = 0, n_dec = 0, n_reinit = 0;
  int n_fm = 0, n_fp = 0;
  int n_it3 = 0, n_it4 = 0, n_it1 = 0, n_decide = 0, bad_cfg = 0;
  freq_t v_at_tim;
  ofs_t p_at_tim;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // responders
  always @(posedge clk) if (!rst) begin
    if (tim_start) begin
      n_tim++;
      if (cfg_sel) n_tim_l2++;
      v_at_tim = cfg_v; p_at_tim = cfg_p;
      fork begin repeat (20) @(posedge clk); tim_done <= 1; @(posedge clk); tim_done <= 0; end join_none
    end
    if (q_decide) n_decide++;
    if (car_start) begin
      n_car++;
      if (cfg_pll_en) n_car_pll++;
      fork begin repeat (10) @(posedge clk); car_done <= 1; @(posedge clk); car_done <= 0; end join_none
    end
    if (dec_start) begin
      real s;
      n_dec++;
      if (dec_reinit) n_reinit++;
      if (dec_iters == 3) n_it3++;
      if (dec_iters == 4) n_it4++;
      if (dec_iters == 1) n_it1++;
      if (mode_o == 3'd0) begin
        // frequency search: one of the two delays of each point returns a
        // junk score (the -T/4 one on even points, the +T/4 one on odd
        // points), so only the better of the two gives the right vertex
        int n;
        n = int'(v_at_tim) / 4000 + 8;
        s = 3000.0 - 1.0e-5 * (real'(v_at_tim) - FPEAK) ** 2;
        if ((n % 2 == 0) == (p_at_tim < 0)) s = 0.0;
      end else
        s = 3000.0 - 1.0e-5 * (real'(v_at_tim) - FPEAK) ** 2 - 2.0e-4 * (real'(p_at_tim) - PPEAK) ** 2;
      if (s < 0.0) s = 0.0;
      fork begin
        repeat (15) @(posedge clk);
        dec_sat <= 16'($rtoi(s));
        dec_odd_sat <= cfg_flip ? 16'd500 : 16'd300;
        dec_done <= 1; @(posedge clk); dec_done <= 0;
      end join_none
    end
    // configuration rules
    if (car_start && mode_o == 3'd6 && (!cfg_pll_en || cfg_seed || cfg_flip != 1'b1)) bad_cfg++;
    if (car_start && mode_o <= 3'd1 && cfg_pll_en) bad_cfg++;
    if (tim_start && mode_o != 3'd6 && cfg_sel) bad_cfg++;
    if (tim_start && mode_o == 3'd0 && cfg_p == -20'sd2048) n_fm++;
    if (tim_start && mode_o == 3'd0 && cfg_p == 20'sd2048) n_fp++;
  end

  initial begin
    real fv, pv;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    wait (sync_done);
    @(negedge clk);
    // vertex of the quadratic score through the grid points
    fv = FPEAK; pv = PPEAK;
    $display("f_est=%0d (vertex %f) p_est=%0d (vertex %f)", f_est, fv, p_est, pv);
    $display("tim=%0d l2=%0d car=%0d pll=%0d dec=%0d reinit=%0d it3=%0d it4=%0d it1=%0d",
             n_tim, n_tim_l2, n_car, n_car_pll, n_dec, n_reinit, n_it3, n_it4, n_it1);
    check(real'(f_est) > fv - 30.0 && real'(f_est) < fv + 30.0, "frequency estimate at the score vertex");
    check(real'(p_est) > pv - 10.0 && real'(p_est) < pv + 10.0, "delay estimate at the score vertex");
    check(n_tim == 2 * 17 + 9 + 1 + 49, "93 timing passes");
    check(n_tim_l2 == 49, "49 loop-2 passes");
    check(n_decide == 44, "quadrant decided after each loop-1 pass");
    check(n_car == 2 * 17 + 9 + 2 + 1 + 49, "95 carrier passes");
    check(n_car_pll == 52, "carrier loop on for pi trials, restart and iterations");
    check(n_dec == 95, "95 decoder runs");
    check(n_reinit == 46, "46 decoder restarts");
    check(n_fm == 17 && n_fp == 17, "each frequency point tried at -T/4 and +T/4");
    check(n_it3 == 43 && n_it4 == 2 && n_it1 == 50, "iterations per run");
    check(cfg_flip == 1'b1, "orientation with more odd-degree checks kept");
    check(bad_cfg == 0, "pass configuration per phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
