// Test helpers shared by the testbenches: the transmitted bit sequence and
// the root-raised-cosine pulse used to synthesise received waveforms.
package tb_bpsk_pkg;

  // Pseudo-random data bit of symbol i (integer hash, reproducible).
  function automatic bit tx_bit(input int i);
    int unsigned h;
    h = 32'(i) * 32'h9e3779b1 + 32'h7f4a7c15;
    h = h ^ (h >> 15);
    h = h * 32'h2c1b3c6d;
    h = h ^ (h >> 12);
    return h[7];
  endfunction

  // Root-raised-cosine impulse response, t in symbol periods, roll-off a.
  function automatic real rrc(input real t, input real a);
    real pi, d;
    pi = 3.14159265358979;
    if (t < 1e-9 && t > -1e-9) return 1.0 - a + 4.0 * a / pi;
    d = 1.0 - (4.0 * a * t) * (4.0 * a * t);
    if (d < 1e-9 && d > -1e-9)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) +
                               (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a))) /
           (pi * t * d);
  endfunction

  // Gaussian sample by Box-Muller from $urandom.
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

endpackage
