// Shared types, fixed-point formats and helpers for the BPSK joint
// timing / carrier synchronizer.
//
// Fixed-point conventions (all chosen by this design; the published
// algorithm is given in real arithmetic):
//   samples, symbols, y_hat : signed 16 bit, 1.0 = 2^12
//   sin / cos weights       : signed 16 bit, 1.0 = 2^14
//   carrier phase           : unsigned 32 bit, full scale = one turn (2*pi)
//   interpolation fraction  : unsigned 12 bit, 1.0 = 2^12
//   time offsets            : signed, in Ti = T/2 sample units, 1.0 = 2^12
//   frequency estimate      : signed, units of 1/16 ppm
package bpsk_sync_pkg;

  localparam int SAMPLE_W    = 16;
  localparam int SAMPLE_FRAC = 12;
  localparam int TRIG_W      = 16;
  localparam int TRIG_FRAC   = 14;
  localparam int PHASE_W     = 32;
  localparam int MU_W        = 12;
  localparam int OFS_W       = 20;
  localparam int OFS_FRAC    = 12;
  localparam int FREQ_W      = 20;
  localparam int FREQ_FRAC   = 4;
  localparam int CNT_W       = 16;
  localparam int ERR_W       = 18;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [TRIG_W-1:0]   trig_t;
  typedef logic        [PHASE_W-1:0]  phase_t;
  typedef logic        [MU_W-1:0]     mu_t;
  typedef logic signed [OFS_W-1:0]    ofs_t;
  typedef logic signed [FREQ_W-1:0]   freq_t;
  typedef logic signed [ERR_W-1:0]    err_t;

  // Saturate a wide signed value to a 16-bit sample.
  function automatic sample_t sat_sample(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return sample_t'(v);
  endfunction

  // Saturate a wide signed value to an ERR_W-bit error word.
  function automatic err_t sat_err(input logic signed [47:0] v);
    if (v > 48'sd131071)       return 18'sh1ffff;
    else if (v < -48'sd131072) return 18'sh20000;
    else                       return err_t'(v);
  endfunction

endpackage
