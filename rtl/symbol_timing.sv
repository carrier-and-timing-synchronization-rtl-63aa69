// Symbol-timing block of one channel (I or Q).
//
// The received samples x[k] (4 per symbol, Ts = T/4) of one codeword are
// captured into a block buffer. Each timing pass then re-processes it:
//
//  Phase A (loop 1 passes only, sel = 0): the interpolation NCO, driven by
//   the frequency estimate v, marks the base samples of interpolants at
//   Ti = T/2; fractional_interval gives mu and interpolator 1 forms y[j];
//   the RRC matched filter turns y[j] into q[j], which is stored in the q
//   buffer. One input sample per clock.
//  Phase B (every pass): for each symbol i the nominal position
//   2i + MF_DELAY (Ti units) is shifted by the time-delay estimate p
//   (interpolator 2, giving z[i]) and additionally by the loop-2 offset c[i]
//   (interpolator 3, giving s[i]); sel picks the output. In loop-2 passes
//   (sel = 1) the Mueller-Muller detector compares s[i] with the decoded
//   symbol d[i] and the first-order loop filter updates c for the next
//   symbol. Five clocks per symbol.
//
// Structure and loop split follow the document's generic symbol-timing
// block. Choices of this design: both interpolators read the one q buffer;
// loop-2 passes reuse the stored q[j] (the front end does not change in
// loop 2); c restarts from zero on every pass; all word widths.
//
// Interface: x/x_valid write the buffer from address 0 after cap_clr;
// cap_full rises when NSAMP samples are in. start begins a pass with the
// given sel, v, p; idx is the symbol being produced, and d_in must give the
// decoded symbol d[idx] in the same cycle. sym_valid/sym/sym_idx present
// one symbol per pulse; done pulses after the last one.
module symbol_timing
  import bpsk_sync_pkg::*;
#(
  parameter int NSYM     = 1944,
  parameter int KT_SHIFT = 3,
  localparam int MF_DELAY = 8,
  localparam int NSAMP    = 4 * NSYM + 48,
  localparam int NQ       = 2 * NSYM + 24,
  localparam int XAW      = $clog2(NSAMP),
  localparam int QAW      = $clog2(NQ),
  localparam int IW       = $clog2(NSYM + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // capture
  input  logic          cap_clr,
  input  logic          x_valid,
  input  sample_t       x,
  output logic          cap_full,
  // pass control
  input  logic          start,
  input  logic          sel,
  input  freq_t         v,
  input  ofs_t          p,
  input  logic          d_in,
  input  trig_t         w_car,
  output logic [IW-1:0] idx,
  output logic          busy,
  output logic          done,
  // symbols
  output logic          sym_valid,
  output sample_t       sym,
  output logic [IW-1:0] sym_idx,
  // observation
  output ofs_t          c_ofs,
  output logic          interp_strobe
);

  typedef enum logic [3:0] {
    S_IDLE, S_APRE, S_AX0, S_AUSE, S_AFLUSH,
    S_B0, S_B1, S_B2, S_B3, S_BOUT, S_DONE
  } state_t;

  state_t state;

  // ---------------- capture buffer ----------------
  logic [XAW:0]   wptr;
  logic [XAW-1:0] x_raddr;
  sample_t        x_rdata;
  logic [XAW:0]   m;
  sample_t        cur;

  assign cap_full = (wptr >= (XAW+1)'(NSAMP));

  always_ff @(posedge clk) begin
    if (rst || cap_clr)            wptr <= '0;
    else if (x_valid && !cap_full) wptr <= wptr + 1'b1;
  end

  sample_buffer #(.DEPTH(1 << XAW), .W(SAMPLE_W)) u_xbuf (
    .clk(clk), .we(x_valid && !cap_full), .waddr(wptr[XAW-1:0]), .wdata(x),
    .raddr(x_raddr), .rdata(x_rdata));

  // ---------------- interpolation NCO, interpolator 1, matched filter ----
  logic        nco_load, nco_step, ovf;
  logic [31:0] eta, w;
  mu_t         mu;
  sample_t     y1;
  logic        mf_valid;
  sample_t     q_in;
  logic [QAW:0] jq;   // q write index
  logic [QAW:0] jn;   // interpolants issued

  timing_nco u_nco (
    .clk(clk), .rst(rst), .load(nco_load), .v_load(start && !sel), .v(v),
    .step(nco_step), .eta(eta), .w(w), .ovf(ovf));

  fractional_interval u_fi (.eta(eta), .w(w), .mu(mu));

  linear_interpolator #(.W(SAMPLE_W)) u_int1 (.a(cur), .b(x_rdata), .mu(mu), .y(y1));

  assign interp_strobe = (state == S_AUSE) && ovf && (jn < (QAW+1)'(NQ));

  rrc_matched_filter u_mf (
    .clk(clk), .rst(rst), .clr(state == S_APRE), .in_valid(interp_strobe),
    .din(y1), .out_valid(mf_valid), .dout(q_in));

  assign nco_load = (state == S_APRE);
  assign nco_step = (state == S_AUSE);

  always_comb begin
    case (state)
      S_APRE:  x_raddr = '0;
      S_AX0:   x_raddr = XAW'(1);
      S_AUSE:  x_raddr = XAW'(m + 2);
      default: x_raddr = '0;
    endcase
  end

  // ---------------- q buffer, interpolators 2 and 3 ----------------
  logic [QAW-1:0] q_raddr;
  sample_t        q_rdata;
  sample_t        a2, b2, a3;
  logic signed [31:0] pos2, pos3;
  logic [QAW-1:0] n2, n3;
  mu_t            f2, f3;
  sample_t        z_i, s_i;
  err_t           u;
  ofs_t           c;

  sample_buffer #(.DEPTH(1 << QAW), .W(SAMPLE_W)) u_qbuf (
    .clk(clk), .we(mf_valid && jq < (QAW+1)'(NQ)), .waddr(jq[QAW-1:0]), .wdata(q_in),
    .raddr(q_raddr), .rdata(q_rdata));

  // clamp a fixed-point position to the stored range and split it
  function automatic logic [QAW+MU_W-1:0] clamp_pos(input logic signed [31:0] pos);
    if (pos < 0) return '0;
    if (pos >= 32'((NQ - 2) << OFS_FRAC)) return (QAW+MU_W)'((NQ - 2) << OFS_FRAC);
    return (QAW+MU_W)'(pos);
  endfunction

  always_comb begin
    pos2 = ((32'(idx) * 2 + MF_DELAY) <<< OFS_FRAC) + 32'(p);
    pos3 = pos2 + 32'(c);
    {n2, f2} = clamp_pos(pos2);
    {n3, f3} = clamp_pos(pos3);
    case (state)
      S_B0:    q_raddr = n2;
      S_B1:    q_raddr = n2 + 1'b1;
      S_B2:    q_raddr = n3;
      S_B3:    q_raddr = n3 + 1'b1;
      default: q_raddr = '0;
    endcase
  end

  linear_interpolator #(.W(SAMPLE_W)) u_int2 (.a(a2), .b(b2),      .mu(f2), .y(z_i));
  linear_interpolator #(.W(SAMPLE_W)) u_int3 (.a(a3), .b(q_rdata), .mu(f3), .y(s_i));

  mm_ted u_ted (
    .clk(clk), .rst(rst), .clr(state == S_APRE || (start && sel)),
    .en(state == S_BOUT && sel), .s(s_i), .d(d_in), .w(w_car), .u(u));

  timing_loop_filter #(.KT_SHIFT(KT_SHIFT)) u_lf (
    .clk(clk), .rst(rst), .clr(start), .en(state == S_BOUT && sel), .u(u), .c(c));

  assign c_ofs = c;

  // ---------------- sequencing ----------------
  logic sel_r;

  always_ff @(posedge clk) begin
    sym_valid <= 1'b0;
    done      <= 1'b0;
    if (rst) begin
      state   <= S_IDLE;
      m       <= '0;
      cur     <= '0;
      jq      <= '0;
      jn      <= '0;
      idx     <= '0;
      sel_r   <= 1'b0;
      a2      <= '0;
      b2      <= '0;
      a3      <= '0;
      sym     <= '0;
      sym_idx <= '0;
    end else begin
      if (mf_valid && jq < (QAW+1)'(NQ)) jq <= jq + 1'b1;
      case (state)
        S_IDLE: if (start) begin
          sel_r <= sel;
          idx   <= '0;
          state <= sel ? S_B0 : S_APRE;
        end
        S_APRE: begin
          jq    <= '0;
          jn    <= '0;
          state <= S_AX0;
        end
        S_AX0: begin
          cur   <= x_rdata;          // x[0]
          m     <= '0;
          state <= S_AUSE;
        end
        S_AUSE: begin
          cur <= x_rdata;            // x[m+1] becomes the base sample
          m   <= m + 1'b1;
          if (interp_strobe) jn <= jn + 1'b1;
          if (m + 2 >= (XAW+1)'(NSAMP) || jn >= (QAW+1)'(NQ)) state <= S_AFLUSH;
        end
        S_AFLUSH: state <= S_B0;     // last matched-filter output lands
        S_B0: state <= S_B1;
        S_B1: begin a2 <= q_rdata; state <= S_B2; end
        S_B2: begin b2 <= q_rdata; state <= S_B3; end
        S_B3: begin a3 <= q_rdata; state <= S_BOUT; end
        S_BOUT: begin
          sym_valid <= 1'b1;
          sym       <= sel_r ? s_i : z_i;
          sym_idx   <= idx;
          if (idx == IW'(NSYM - 1)) state <= S_DONE;
          else begin
            idx   <= idx + 1'b1;
            state <= S_B0;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
