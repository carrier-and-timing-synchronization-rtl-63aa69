// Sequencer of the joint synchronization and decoding process.
//
// Order of operations for one captured codeword (all from the document,
// except where noted):
//  1. Loop 1, frequency: for each of FREQ_POINTS hypotheses spaced
//     FREQ_STEP (1/16 ppm units; 250 ppm) run a timing pass, form LLRs from
//     the stronger channel (no carrier loop yet), run ITERS_PER_POINT decoder
//     iterations from scratch and feed the satisfied-check count to the
//     frequency window search; its interpolated result is f_est. Each
//     frequency point is tried at FREQ_DELAYS delays (default: -T/4 and
//     +T/4) and scored by the better one: a small two-dimensional search.
//     Without it, a delay near T/2 makes a wrong frequency, whose drift
//     sweeps through the right timing for part of the block, outscore the
//     right one. The document allows a two-dimensional search when delay and
//     frequency offsets are both present; this coarse grid is this design's.
//  2. Loop 1, time delay: the same over DELAY_POINTS delays spaced
//     DELAY_STEP within +-0.5 T (point count and spacing are this design's).
//  3. Final loop-1 pass at (f_est, p_est); the quadrant block measures the
//     channel powers and decides the swap.
//  4. Pi ambiguity: with the soft decision seeded from the stronger channel,
//     one carrier-loop pass and PI_ITERS decoder iterations for each
//     orientation; the one with more satisfied odd-degree checks is kept.
//  5. Restart: carrier pass (seeded again), one decoder iteration from
//     scratch, then MAX_ITERS - 1 rounds of loop-2 timing pass, carrier pass
//     on the decoder's soft decisions, one decoder iteration continuing.
//
// The controller issues single-cycle start pulses to the timing, carrier and
// decoder units and waits for their done pulses; it holds the mode bits that
// configure them (cfg_* outputs are stable during a pass).
module sync_controller
  import bpsk_sync_pkg::*;
#(
  parameter int FREQ_POINTS     = 17,
  parameter int FREQ_STEP       = 4000,   // 250 ppm in 1/16 ppm
  parameter int DELAY_POINTS    = 9,
  parameter int DELAY_STEP      = 1024,   // T/8 in Ti units, 1.0 = 2^12
  parameter int FREQ_DELAYS     = 2,      // delays tried per frequency point
  parameter int FREQ_DSTEP      = 4096,   // their spacing, T/2
  parameter int ITERS_PER_POINT = 3,
  parameter int PI_ITERS        = 4,
  parameter int MAX_ITERS       = 50
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             go,          // a full codeword has been captured
  // timing passes
  output logic             tim_start,
  output logic             cfg_sel,     // 0: loop 1, 1: loop 2
  output freq_t            cfg_v,
  output ofs_t             cfg_p,
  output logic             cfg_meas,    // quadrant measures during this pass
  input  logic             tim_done,
  output logic             q_clr,
  output logic             q_decide,
  output logic             cfg_flip,
  // carrier / LLR passes
  output logic             car_start,
  output logic             cfg_pll_en,
  output logic             cfg_seed,    // y_hat from the stronger channel
  output logic             pll_clr,
  input  logic             car_done,
  // decoder
  output logic             dec_start,
  output logic             dec_reinit,
  output logic [3:0]       dec_iters,
  input  logic             dec_done,
  input  logic [CNT_W-1:0] dec_sat,
  input  logic [CNT_W-1:0] dec_odd_sat,
  // status
  output logic [2:0]       mode_o,
  output logic             sync_done,
  output freq_t            f_est,
  output ofs_t             p_est
);

  typedef enum logic [2:0] {
    M_FREQ, M_DELAY, M_FINAL, M_PI0, M_PI1, M_INIT, M_ITER
  } mode_t;

  typedef enum logic [3:0] {
    S_IDLE, S_HYP, S_TIM, S_TIMW, S_CAR, S_CARW, S_DEC, S_DECW, S_NEXT,
    S_SWAIT, S_DONE
  } state_t;

  state_t state;
  mode_t  mode;
  logic [7:0]       pt;
  logic [7:0]       it;
  logic [3:0]       sd;        // delay sub-hypothesis of a frequency point
  logic [CNT_W-1:0] sub_best;  // best score so far over the sub-hypotheses
  logic [CNT_W-1:0] f_score;
  logic             sd_last;
  logic [CNT_W-1:0] odd0;
  logic             best_flip;

  logic  fs_start, ds_start, fs_sv, ds_sv, fs_busy, ds_busy, fs_done, ds_done;
  freq_t fs_hyp, fs_est;
  ofs_t  ds_hyp, ds_est;

  window_search #(.POINTS(FREQ_POINTS), .STEP(FREQ_STEP), .HW(FREQ_W)) u_fsearch (
    .clk(clk), .rst(rst), .start(fs_start), .sat_valid(fs_sv), .sat(f_score),
    .hyp(fs_hyp), .busy(fs_busy), .est(fs_est), .done(fs_done));

  window_search #(.POINTS(DELAY_POINTS), .STEP(DELAY_STEP), .HW(OFS_W)) u_dsearch (
    .clk(clk), .rst(rst), .start(ds_start), .sat_valid(ds_sv), .sat(dec_sat),
    .hyp(ds_hyp), .busy(ds_busy), .est(ds_est), .done(ds_done));

  assign fs_start = (state == S_IDLE || state == S_DONE) && go;
  assign sd_last  = (sd == 4'(FREQ_DELAYS - 1));
  assign f_score  = (dec_sat > sub_best) ? dec_sat : sub_best;
  assign fs_sv    = (state == S_NEXT) && mode == M_FREQ && sd_last;
  assign ds_sv    = (state == S_NEXT) && mode == M_DELAY;
  assign ds_start = (state == S_SWAIT) && mode == M_FREQ && fs_done;

  // pass configuration from the mode
  always_comb begin
    cfg_sel    = (mode == M_ITER);
    cfg_v      = (mode == M_FREQ) ? fs_hyp : f_est;
    cfg_p      = (mode == M_FREQ) ? OFS_W'(32'(sd) * FREQ_DSTEP - (FREQ_DELAYS - 1) * FREQ_DSTEP / 2) :
                 (mode == M_DELAY) ? ds_hyp : p_est;
    cfg_meas   = (mode != M_ITER);
    cfg_pll_en = (mode == M_PI0 || mode == M_PI1 || mode == M_INIT || mode == M_ITER);
    cfg_seed   = (mode == M_PI0 || mode == M_PI1 || mode == M_INIT);
    cfg_flip   = (mode == M_PI1) ? 1'b1 :
                 (mode == M_INIT || mode == M_ITER) ? best_flip : 1'b0;
    dec_reinit = (mode != M_ITER);
    case (mode)
      M_FREQ, M_DELAY: dec_iters = 4'(ITERS_PER_POINT);
      M_PI0, M_PI1:    dec_iters = 4'(PI_ITERS);
      default:         dec_iters = 4'd1;
    endcase
  end

  assign tim_start = (state == S_TIM);
  assign q_clr     = (state == S_TIM) && cfg_meas;
  assign q_decide  = (state == S_TIMW) && tim_done && cfg_meas;
  assign car_start = (state == S_CAR);
  assign pll_clr   = (state == S_CAR) && cfg_seed;
  assign dec_start = (state == S_DEC);
  assign mode_o    = mode;
  assign sync_done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      mode      <= M_FREQ;
      pt        <= '0;
      it        <= '0;
      sd        <= '0;
      sub_best  <= '0;
      odd0      <= '0;
      best_flip <= 1'b0;
      f_est     <= '0;
      p_est     <= '0;
    end else begin
      case (state)
        S_IDLE: if (go) begin
          mode     <= M_FREQ;
          pt       <= '0;
          sd       <= '0;
          sub_best <= '0;
          state <= S_HYP;
        end
        S_DONE: if (go) begin
          mode     <= M_FREQ;
          pt       <= '0;
          sd       <= '0;
          sub_best <= '0;
          state <= S_HYP;
        end
        S_HYP:  state <= S_TIM;
        S_TIM:  state <= S_TIMW;
        S_TIMW: if (tim_done) state <= (mode == M_FINAL) ? S_NEXT : S_CAR;
        S_CAR:  state <= S_CARW;
        S_CARW: if (car_done) state <= S_DEC;
        S_DEC:  state <= S_DECW;
        S_DECW: if (dec_done) state <= S_NEXT;
        S_NEXT: begin
          case (mode)
            M_FREQ: begin
              if (!sd_last) begin
                sd       <= sd + 1'b1;
                sub_best <= f_score;
                state    <= S_HYP;
              end else begin
                sd       <= '0;
                sub_best <= '0;
                pt       <= pt + 1'b1;
                state    <= (pt == 8'(FREQ_POINTS - 1)) ? S_SWAIT : S_HYP;
              end
            end
            M_DELAY: begin
              pt    <= pt + 1'b1;
              state <= (pt == 8'(DELAY_POINTS - 1)) ? S_SWAIT : S_HYP;
            end
            M_FINAL: begin
              mode  <= M_PI0;
              state <= S_CAR;
            end
            M_PI0: begin
              odd0  <= dec_odd_sat;
              mode  <= M_PI1;
              state <= S_CAR;
            end
            M_PI1: begin
              best_flip <= (dec_odd_sat > odd0);
              mode      <= M_INIT;
              state     <= S_CAR;
            end
            M_INIT: begin
              it    <= 8'd1;
              mode  <= M_ITER;
              state <= (MAX_ITERS > 1) ? S_TIM : S_DONE;
            end
            default: begin  // M_ITER
              it    <= it + 1'b1;
              state <= (it + 1'b1 >= 8'(MAX_ITERS)) ? S_DONE : S_TIM;
            end
          endcase
        end
        S_SWAIT: begin
          if (mode == M_FREQ && fs_done) begin
            f_est <= fs_est;
            mode  <= M_DELAY;
            pt    <= '0;
            state <= S_HYP;
          end else if (mode == M_DELAY && ds_done) begin
            p_est <= ds_est;
            mode  <= M_FINAL;
            state <= S_TIM;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
