// Joint symbol-timing and carrier-phase synchronizer for pilotless BPSK,
// steered by LDPC decoder feedback (top level).
//
// Two symbol-timing chains (I and Q) capture one codeword of baseband
// samples at four per symbol and re-process it on command. Loop 1 searches
// the symbol-frequency and time-delay offsets by the share of satisfied
// parity checks the external LDPC decoder reports; loop 2 then tracks
// residual timing with a decision-directed Mueller-Muller loop fed by the
// decoded symbols. The quadrant block swaps / negates the channels to resolve
// the carrier-phase ambiguity, and the DDCS carrier loop tracks the phase
// after removing the modulation with the decoder's soft decisions. The LLR
// former hands Q[k] to the decoder. sync_controller sequences it all.
//
// External LDPC decoder protocol (this design's choice):
//   * before each dec_start the top streams NSYM LLRs (llr_valid, llr,
//     llr_idx) in symbol order;
//   * dec_start pulses with dec_iters (iterations to run) and dec_reinit
//     (1: start from these LLRs alone, 0: continue with the new LLRs as
//     updated channel observations);
//   * the decoder returns NSYM soft symbol estimates y_hat (dec_soft_valid,
//     dec_soft, 1.0 = 2^12, in order) and then pulses dec_done together with
//     the number of satisfied checks and of satisfied odd-degree checks.
//
// Samples: x_c/x_s with x_valid after a blk_start pulse; processing starts
// by itself once 4*NSYM+48 samples are in. sync_done stays high once the
// last iteration has finished; the decoder's last soft output is the data.
//
// The two timing chains run in lock-step, so only the I chain's done,
// interpolant strobe and loop-2 offset are used; the Q chain's copies, the
// busy flags and the carrier loop's error output are left unconnected on
// purpose. dec_iters never exceeds 4 at the default parameters.
module bpsk_ldpc_sync
  import bpsk_sync_pkg::*;
#(
  parameter int NSYM            = 1944,
  parameter int FREQ_POINTS     = 17,
  parameter int FREQ_STEP       = 4000,
  parameter int DELAY_POINTS    = 9,
  parameter int DELAY_STEP      = 1024,
  parameter int FREQ_DELAYS     = 2,
  parameter int FREQ_DSTEP      = 4096,
  parameter int ITERS_PER_POINT = 3,
  parameter int PI_ITERS        = 4,
  parameter int MAX_ITERS       = 50,
  parameter int KP              = 487792,
  parameter int KI              = -478496,
  parameter int KT_SHIFT        = 3,
  localparam int IW             = $clog2(NSYM + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             blk_start,
  input  sample_t          x_c,
  input  sample_t          x_s,
  input  logic             x_valid,
  input  logic [15:0]      llr_scale,       // 2/sigma_llr^2, unsigned Q8
  // to the LDPC decoder
  output logic             llr_valid,
  output logic signed [15:0] llr,
  output logic [IW-1:0]    llr_idx,
  output logic             dec_start,
  output logic             dec_reinit,
  output logic [3:0]       dec_iters,
  // from the LDPC decoder
  input  logic             dec_soft_valid,
  input  sample_t          dec_soft,
  input  logic             dec_done,
  input  logic [CNT_W-1:0] dec_sat,
  input  logic [CNT_W-1:0] dec_odd_sat,
  // status
  output logic             sync_done,
  output logic [2:0]       mode,
  output freq_t            f_est,
  output ofs_t             p_est,
  output phase_t           theta_hat,
  output logic             swap,
  output logic             flip,
  output ofs_t             loop2_ofs
);

  // ---------------- controller ----------------
  logic  tim_start, cfg_sel, cfg_meas, tim_done, q_clr, q_decide;
  logic  car_start, cfg_pll_en, cfg_seed, pll_clr, car_done;
  freq_t cfg_v;
  ofs_t  cfg_p;
  logic  armed, go;
  logic  cap_full_c, cap_full_s;

  always_ff @(posedge clk) begin
    if (rst)                          armed <= 1'b0;
    else if (blk_start)               armed <= 1'b1;
    else if (go)                      armed <= 1'b0;
  end
  assign go = armed && cap_full_c && cap_full_s && !blk_start;

  sync_controller #(
    .FREQ_POINTS(FREQ_POINTS), .FREQ_STEP(FREQ_STEP), .DELAY_POINTS(DELAY_POINTS),
    .DELAY_STEP(DELAY_STEP), .FREQ_DELAYS(FREQ_DELAYS), .FREQ_DSTEP(FREQ_DSTEP),
    .ITERS_PER_POINT(ITERS_PER_POINT), .PI_ITERS(PI_ITERS),
    .MAX_ITERS(MAX_ITERS)
  ) u_ctl (
    .clk(clk), .rst(rst), .go(go),
    .tim_start(tim_start), .cfg_sel(cfg_sel), .cfg_v(cfg_v), .cfg_p(cfg_p),
    .cfg_meas(cfg_meas), .tim_done(tim_done), .q_clr(q_clr), .q_decide(q_decide),
    .cfg_flip(flip), .car_start(car_start), .cfg_pll_en(cfg_pll_en),
    .cfg_seed(cfg_seed), .pll_clr(pll_clr), .car_done(car_done),
    .dec_start(dec_start), .dec_reinit(dec_reinit), .dec_iters(dec_iters),
    .dec_done(dec_done), .dec_sat(dec_sat), .dec_odd_sat(dec_odd_sat),
    .mode_o(mode), .sync_done(sync_done), .f_est(f_est), .p_est(p_est));

  // ---------------- symbol timing, I and Q ----------------
  logic [IW-1:0] idx_c, idx_s, sidx_c, sidx_s;
  logic          done_c, done_s, sv_c, sv_s, busy_c, busy_s, istr_c, istr_s;
  sample_t       sym_c, sym_s;
  ofs_t          c_ofs_s;
  logic [NSYM-1:0] dbits;          // decoded symbols, 1 = +1
  trig_t         wc, ws, wcar_c, wcar_s, wcar_a, wcar_b;

  // carrier weight of each physical channel, through the quadrant mapping
  always_comb begin
    wcar_a = swap ? ws : wc;
    wcar_b = swap ? wc : ws;
    wcar_c = flip ? -wcar_a : wcar_a;
    wcar_s = flip ? -wcar_b : wcar_b;
  end

  symbol_timing #(.NSYM(NSYM), .KT_SHIFT(KT_SHIFT)) u_st_c (
    .clk(clk), .rst(rst), .cap_clr(blk_start), .x_valid(x_valid), .x(x_c),
    .cap_full(cap_full_c), .start(tim_start), .sel(cfg_sel), .v(cfg_v), .p(cfg_p),
    .d_in(dbits[idx_c]), .w_car(wcar_c), .idx(idx_c), .busy(busy_c), .done(done_c),
    .sym_valid(sv_c), .sym(sym_c), .sym_idx(sidx_c), .c_ofs(loop2_ofs),
    .interp_strobe(istr_c));

  symbol_timing #(.NSYM(NSYM), .KT_SHIFT(KT_SHIFT)) u_st_s (
    .clk(clk), .rst(rst), .cap_clr(blk_start), .x_valid(x_valid), .x(x_s),
    .cap_full(cap_full_s), .start(tim_start), .sel(cfg_sel), .v(cfg_v), .p(cfg_p),
    .d_in(dbits[idx_s]), .w_car(wcar_s), .idx(idx_s), .busy(busy_s), .done(done_s),
    .sym_valid(sv_s), .sym(sym_s), .sym_idx(sidx_s), .c_ofs(c_ofs_s),
    .interp_strobe(istr_s));

  assign tim_done = done_c;

  // ---------------- symbol stores ----------------
  sample_t zc_mem [NSYM];
  sample_t zs_mem [NSYM];
  sample_t yh_mem [NSYM];
  sample_t zc_rd, zs_rd, yh_rd;
  logic [IW-1:0] k, soft_cnt;

  always_ff @(posedge clk) begin
    if (sv_c) zc_mem[sidx_c] <= sym_c;
    if (sv_s) zs_mem[sidx_s] <= sym_s;
    if (dec_soft_valid && soft_cnt < IW'(NSYM)) yh_mem[soft_cnt] <= dec_soft;
    zc_rd <= zc_mem[k];
    zs_rd <= zs_mem[k];
    yh_rd <= yh_mem[k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      soft_cnt <= '0;
      dbits    <= '0;
    end else if (dec_start) begin
      soft_cnt <= '0;
    end else if (dec_soft_valid && soft_cnt < IW'(NSYM)) begin
      dbits[soft_cnt] <= ~dec_soft[SAMPLE_W-1];
      soft_cnt        <= soft_cnt + 1'b1;
    end
  end

  // ---------------- quadrant ----------------
  sample_t qc_in, qs_in, zc_q, zs_q;
  logic    car_phase;   // carrier pass data cycle

  assign qc_in = car_phase ? zc_rd : sym_c;
  assign qs_in = car_phase ? zs_rd : sym_s;

  quadrant u_quad (
    .clk(clk), .rst(rst), .clr(q_clr), .meas(sv_c && cfg_meas && !car_phase),
    .decide(q_decide), .flip(flip), .zc_in(qc_in), .zs_in(qs_in),
    .zc(zc_q), .zs(zs_q), .swap(swap));

  // ---------------- carrier pass: DDCS loop and LLR former ----------------
  typedef enum logic [1:0] {C_IDLE, C_ADDR, C_DATA, C_END} cstate_t;
  cstate_t cst;
  sample_t yhat;
  trig_t   wc_l, ws_l, wc_u, ws_u;
  err_t    e_pd;

  assign car_phase = (cst == C_DATA);
  assign yhat      = cfg_seed ? zc_q : yh_rd;

  ddcs_carrier_loop #(.KP(KP), .KI(KI)) u_ddcs (
    .clk(clk), .rst(rst), .clr(pll_clr), .en(car_phase && cfg_pll_en),
    .zc(zc_q), .zs(zs_q), .yhat(yhat), .wc(wc_l), .ws(ws_l), .theta(theta_hat),
    .e(e_pd));

  // before the carrier loop runs, the LLRs come from the stronger channel
  assign wc_u = cfg_pll_en ? wc_l : trig_t'(1 << TRIG_FRAC);
  assign ws_u = cfg_pll_en ? ws_l : '0;
  assign wc   = wc_l;
  assign ws   = ws_l;

  logic signed [15:0] q_llr;

  llr_compute u_llr (.zc(zc_q), .zs(zs_q), .wc(wc_u), .ws(ws_u), .scale(llr_scale), .q(q_llr));

  always_ff @(posedge clk) begin
    llr_valid <= 1'b0;
    car_done  <= 1'b0;
    if (rst) begin
      cst     <= C_IDLE;
      k       <= '0;
      llr     <= '0;
      llr_idx <= '0;
    end else begin
      case (cst)
        C_IDLE: if (car_start) begin
          k   <= '0;
          cst <= C_ADDR;
        end
        C_ADDR: cst <= C_DATA;
        C_DATA: begin
          llr_valid <= 1'b1;
          llr       <= q_llr;
          llr_idx   <= k;
          if (k == IW'(NSYM - 1)) cst <= C_END;
          else begin
            k   <= k + 1'b1;
            cst <= C_ADDR;
          end
        end
        default: begin
          car_done <= 1'b1;
          cst      <= C_IDLE;
        end
      endcase
    end
  end

endmodule
