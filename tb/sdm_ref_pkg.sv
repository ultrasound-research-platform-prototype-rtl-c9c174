// sdm_ref_pkg: testbench reference for the PC-side waveform preparation.
//
// Builds the test excitations the way the host software does: a signal is
// sampled at 500 MS/s for 3 us (1500 samples) and turned into a 1-bit
// stream by a second-order sigma-delta modulator, then padded with 36 '0'
// samples to 1536. The modulator uses error feedback with noise transfer
// (1 - z^-1)^2: y[n] = x[n] - 2 e[n-1] + e[n-2], v[n] = sign(y[n]),
// e[n] = v[n] - y[n]; bit n is 1 for v = +1. Also a moving-average low-pass
// and a normalised correlation used to judge how well a pin's output
// reproduces the original signal after band-limiting.
package sdm_ref_pkg;
  import ultra_pkg::*;

  localparam int  NSAMP = 1500;
  localparam real FS    = 500.0e6;
  localparam real PI    = 3.14159265358979;

  typedef real sig_t [NSAMP];

  // Linear chirp from f0 to f1 over 3 us, amplitude a.
  function automatic sig_t chirp(real f0, real f1, real a);
    sig_t s;
    real t, tt;
    tt = NSAMP / FS;
    for (int n = 0; n < NSAMP; n++) begin
      t = n / FS;
      s[n] = a * $sin(2.0 * PI * (f0 * t + (f1 - f0) * t * t / (2.0 * tt)));
    end
    return s;
  endfunction

  // Short pulse: two cycles of f0 under a Hann window, then silence.
  function automatic sig_t pulse(real f0, real a);
    sig_t s;
    int len;
    len = int'(2.0 * FS / f0);
    for (int n = 0; n < NSAMP; n++)
      s[n] = (n < len) ? a * $sin(2.0 * PI * f0 * n / FS) *
                         (0.5 - 0.5 * $cos(2.0 * PI * n / len)) : 0.0;
    return s;
  endfunction

  function automatic logic [WAVE_BITS-1:0] sdm2(sig_t x);
    logic [WAVE_BITS-1:0] b;
    real e1, e2, y, v;
    b = '0;
    e1 = 0.0; e2 = 0.0;
    for (int n = 0; n < NSAMP; n++) begin
      y = x[n] - 2.0 * e1 + e2;
      v = (y >= 0.0) ? 1.0 : -1.0;
      e2 = e1;
      e1 = v - y;
      b[n] = (v > 0.0);
    end
    return b;
  endfunction

  // Normalised correlation of two signals after a moving-average filter of
  // length `taps`; the first argument is a bit stream (+1/-1).
  function automatic real filtered_corr(logic [WAVE_BITS-1:0] bits, sig_t ref_sig, int taps);
    real fa [NSAMP];
    real fb [NSAMP];
    real sa, sb, sab, saa, sbb;
    for (int n = 0; n < NSAMP; n++) begin
      sa = 0.0; sb = 0.0;
      for (int k = 0; k < taps; k++)
        if (n - k >= 0) begin
          sa += bits[n-k] ? 1.0 : -1.0;
          sb += ref_sig[n-k];
        end
      fa[n] = sa / taps;
      fb[n] = sb / taps;
    end
    sab = 0.0; saa = 0.0; sbb = 0.0;
    for (int n = taps; n < NSAMP; n++) begin
      sab += fa[n] * fb[n];
      saa += fa[n] * fa[n];
      sbb += fb[n] * fb[n];
    end
    return sab / $sqrt(saa * sbb);
  endfunction
endpackage
