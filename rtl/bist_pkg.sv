// bist_pkg: types, default sizes and table generators shared by the PWM
// built-in self-test of a sigma-delta ADC.
//
// The test drives the ADC input with a binary waveform whose period equals
// the ADC sample period and whose duty cycle changes from sample to sample.
// A sigma-delta converter responds to the average of its input over a sample
// period, so each pulse looks to it like the level
//   V = VrefL + (VrefH - VrefL) * eta,   eta = T_H / T.
// The duty cycle is quantised to PWM_STEPS master-clock cycles per sample.
//
// Sizes that follow the test method: a 20-bit converter, test sequences of
// N = 16, 64 or 256 samples (so at most 256), and the three stimulus shapes
// (linear ramp, triangle, sine). Sizes that are this design's own choice:
// 256 master-clock cycles per sample period, at most 32 samples of ADC
// latency, and 16-bit twiddle factors for the spectrum.
//
// sin_round() builds the sine tables of the stimulus generator and of the
// spectrum engine at elaboration time. It uses integer arithmetic only
// (Taylor series in Q28 fixed point on a quarter wave), so every tool
// evaluates it the same way, and it rounds half away from zero.
package bist_pkg;

  // Stimulus shapes.
  typedef enum logic [1:0] {
    MODE_RAMP     = 2'd0,  // eta = i/N, rising once per sequence
    MODE_TRIANGLE = 2'd1,  // rising over the first half, falling over the second
    MODE_SINE     = 2'd2   // eta = (1 + sin(2*pi*i/N)) / 2, rounded to the PWM step
  } mode_e;

  // Default sizes.
  localparam int unsigned ADC_BITS_DEF  = 20;   // converter resolution n
  localparam int unsigned LOG_NMAX_DEF  = 8;    // longest sequence: N = 256
  localparam int unsigned LOG_R_DEF     = 8;    // 256 master clocks per sample period
  localparam int unsigned DELTA_MAX_DEF = 32;   // longest ADC latency, in samples
  localparam int unsigned TW_BITS_DEF   = 16;   // twiddle factor width (signed)

  // round(amp * sin(2*pi*idx/size)) with size a power of two >= 4 and
  // amp < 2^20. Integer arithmetic only.
  function automatic longint sin_round(input longint idx, input longint size,
                                       input longint amp);
    longint one, half_pi, q, quarter, pos, x, x2, term, s, mag;
    bit neg;
    begin
      one     = 64'sd268435456;    // 1.0 in Q28
      half_pi = 64'sd421657428;    // pi/2 in Q28
      quarter = size / 4;
      q   = idx % size;
      neg = (q >= size / 2);
      if (neg) q = q - size / 2;
      // fold the second quadrant onto the first
      pos = (q > quarter) ? (size / 2 - q) : q;
      x   = (half_pi * pos) / quarter;          // angle in Q28
      x2  = (x * x) >>> 28;
      term = x;
      s    = x;
      for (int k = 1; k <= 6; k++) begin
        term = -((term * x2) >>> 28) / ((2 * k) * (2 * k + 1));
        s    = s + term;
      end
      if (s > one) s = one;
      mag = (s * amp + (one >>> 1)) >>> 28;
      return neg ? -mag : mag;
    end
  endfunction

endpackage
