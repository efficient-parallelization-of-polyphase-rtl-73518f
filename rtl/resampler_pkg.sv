// Shared constants and constant functions of the two-lane polyphase resampler.
//
// The default configuration converts a 500 MHz sample stream to 600 MHz
// (f = 6/5). The intermediate rate is the least common multiple of the two,
// 3 GHz, so the prototype filter is split into N = 6 polyphase branches and
// the output is taken every D = 5 intermediate samples. The datapath runs at
// half the output rate (300 MHz) and computes two output samples per clock.
// N, D, the 16-bit data and coefficient width and 21 multipliers per lane
// follow the published 500-to-600 MHz prototype; the coefficient values, the
// output scaling and all interface details are this design's own choices.
//
// The functions below are evaluated at elaboration time only. They build the
// lookup tables of the filter-index state machine and the coefficient table;
// nothing here becomes an adder or a modulo operator in hardware.
package resampler_pkg;

  // ---- default configuration ----------------------------------------------
  parameter int DATA_W    = 16;  // input sample width (two's complement)
  parameter int COEF_W    = 16;  // filter coefficient width (two's complement)
  parameter int OUT_W     = 16;  // output sample width after rounding
  parameter int COEF_FRAC = 14;  // fractional bits of the coefficients
  parameter int NPHASE    = 6;   // N = F_i / F_s, number of polyphase branches
  parameter int DECIM     = 5;   // D = F_i / F_t, index step per output sample
  parameter int TAPS      = 21;  // taps per polyphase branch (multipliers per lane)
  parameter int FIFO_AW   = 4;   // input buffer holds 2**FIFO_AW samples
  parameter int PREFILL   = 8;   // samples buffered before the datapath starts

  // Root-raised-cosine roll-off of the prototype pulse-shaping filter.
  parameter real ROLLOFF  = 0.1;

  localparam real PI = 3.14159265358979323846;

  // ---- filter-index state machine tables (Eq. s_i[k+1] = (s_i[k]+2D) mod N)
  // Next state of either lane index.
  function automatic int idx_next(int s, int n, int d);
    return (s + 2 * d) % n;
  endfunction

  // Index of the odd (second) lane that belongs to even-lane index s.
  function automatic int idx_pair(int s, int n, int d);
    return (s + d) % n;
  endfunction

  // Number of new input samples the delay line must take when the even lane
  // moves from index s to the next one: floor((s + 2D) / N), 0, 1 or 2.
  function automatic int idx_shift(int s, int n, int d);
    return (s + 2 * d) / n;
  endfunction

  // True when the odd lane works on the same input window as the even lane,
  // i.e. s + D < N (equivalently s_2 > s_1).
  function automatic bit idx_same(int s, int n, int d);
    return (s + d) < n;
  endfunction

  // ---- prototype filter ----------------------------------------------------
  // Root-raised cosine sampled at the intermediate rate: n samples per input
  // symbol, n*taps samples long, centred between samples (n*taps-1)/2.
  function automatic real rrc(real t, real beta);
    real den;
    if (t == 0.0) return 1.0 - beta + 4.0 * beta / PI;
    den = 1.0 - (4.0 * beta * t) * (4.0 * beta * t);
    if (den < 1.0e-9 && den > -1.0e-9)
      return beta / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * beta))
                                 + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * beta)));
    return ($sin(PI * t * (1.0 - beta)) + 4.0 * beta * t * $cos(PI * t * (1.0 + beta)))
           / (PI * t * den);
  endfunction

  // Coefficient l (0 .. n*taps-1) of the prototype filter, rounded to
  // COEF_W bits with COEF_FRAC fractional bits.
  function automatic int proto_coef(int l, int n, int taps);
    real t, h, q;
    t = (real'(l) - real'(n * taps - 1) / 2.0) / real'(n);
    h = rrc(t, ROLLOFF);
    q = h * real'(1 << COEF_FRAC);
    return (q >= 0.0) ? $rtoi(q + 0.5) : -$rtoi(0.5 - q);
  endfunction

  // Coefficient of tap j of polyphase branch p: h[p + N*j].
  function automatic int branch_coef(int p, int j, int n, int taps);
    return proto_coef(p + n * j, n, taps);
  endfunction

endpackage
