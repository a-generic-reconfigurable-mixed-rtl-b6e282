// qam_tx_pkg: constants and elaboration-time functions shared by the mixed
// time/frequency domain QAM transmitter.
//
// Everything here is evaluated while the design is elaborated; nothing in it
// becomes logic of its own.  It replaces the three coefficient files that a
// configuration program would otherwise generate:
//   * DFT/IDFT weights   : dft_cos_q15 / dft_sin_q15, round(32767*cos|sin(2*pi*k*n/N))
//   * SRRC filter bins   : filter_h_q15, the N-point DFT of a zero-phase (centred)
//                          square-root raised cosine impulse response, scaled so
//                          that the largest |H[k]| is 32767 (1.0 in Q1.15)
//   * carrier table      : carrier_cos_q15, one period of a cosine in 2^AW steps,
//                          and carrier_fcw, the DDS frequency control word
// It also holds the Gray-coded PAM level function used by the QAM mapper and the
// symmetric rounding / saturation helpers used by every multiplier stage.
//
// Number format: all samples are W-bit two's complement; weights are Q1.15.
// The 2^-15 rescaling after every multiplication follows the document; the
// choice of 32767 as the value of 1.0, the SRRC roll-off and oversampling of
// the prototype and the mapper's normalisation are this design's own.
package qam_tx_pkg;

  localparam int    SAMPLE_W = 16;     // signal precision in bits
  localparam int    FRAC_W   = 15;     // weights are Q1.15, products rescaled by 2^-15
  localparam real   PI       = 3.14159265358979323846;
  localparam int    ONE_Q15  = 32767;  // largest representable weight, stands for 1.0

  // ---------------------------------------------------------------- rounding
  // Arithmetic shift right by sh with symmetric rounding (halves go away from
  // zero), as the multipliers of the document do.
  function automatic logic signed [63:0] round_sym(input logic signed [63:0] v, input int sh);
    logic signed [63:0] half, mag;
    if (sh <= 0) return v;
    half = 64'sd1 <<< (sh - 1);
    if (v >= 0) return (v + half) >>> sh;
    mag = (-v + half) >>> sh;
    return -mag;
  endfunction

  // Clamp v to the range of a w-bit signed number.
  function automatic logic signed [63:0] sat(input logic signed [63:0] v, input int w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // ----------------------------------------------------------------- weights
  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic int q15(input real x);
    return $rtoi($floor(x * real'(ONE_Q15) + 0.5));
  endfunction

  // cos(2*pi*num/den) in Q1.15
  function automatic int cos_q15(input longint num, input longint den);
    return q15($cos(2.0 * PI * real'(num % den) / real'(den)));
  endfunction

  // sin(2*pi*num/den) in Q1.15
  function automatic int sin_q15(input longint num, input longint den);
    return q15($sin(2.0 * PI * real'(num % den) / real'(den)));
  endfunction

  // Forward DFT weight e^{-j2*pi*kn/N}: real part cos, imaginary part -sin.
  function automatic int dft_cos_q15(input int k, input int n, input int npts);
    return cos_q15(longint'(k) * n, longint'(npts));
  endfunction
  function automatic int dft_sin_q15(input int k, input int n, input int npts);
    return -sin_q15(longint'(k) * n, longint'(npts));
  endfunction
  // Inverse DFT weight e^{+j2*pi*kn/N} (the 1/N factor is applied as a shift).
  function automatic int idft_sin_q15(input int k, input int n, input int npts);
    return sin_q15(longint'(k) * n, longint'(npts));
  endfunction

  // ------------------------------------------------------------ SRRC filter
  // Square-root raised cosine impulse response at time t (in symbol periods).
  function automatic real srrc(input real t, input real beta);
    real num, den;
    if (t == 0.0) return 1.0 - beta + 4.0 * beta / PI;
    if (beta > 0.0 && (rabs(4.0 * beta * t) - 1.0 < 1e-9) && (rabs(4.0 * beta * t) - 1.0 > -1e-9))
      return beta / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * beta))
                                + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * beta)));
    num = $sin(PI * t * (1.0 - beta)) + 4.0 * beta * t * $cos(PI * t * (1.0 + beta));
    den = PI * t * (1.0 - (4.0 * beta * t) * (4.0 * beta * t));
    return num / den;
  endfunction

  // Unscaled bin k of the N-point DFT of the centred, zero-padded SRRC taps.
  // Taps m = -(T-1)/2 .. (T-1)/2 sit at circular positions m mod N, so the
  // response is real (zero phase).
  function automatic real filter_h_raw(input int k, input int npts, input int taps,
                                       input real beta, input int osf);
    real acc;
    int  half;
    acc  = 0.0;
    half = (taps - 1) / 2;
    for (int m = -half; m <= half; m++)
      acc += srrc(real'(m) / real'(osf), beta) * $cos(2.0 * PI * real'(k * m) / real'(npts));
    return acc;
  endfunction

  // Bin k of the filter in Q1.15, normalised so the largest |H| is 1.0.
  function automatic int filter_h_q15(input int k, input int npts, input int taps,
                                      input real beta, input int osf);
    real mx, v;
    mx = 0.0;
    for (int i = 0; i < npts; i++) begin
      v = rabs(filter_h_raw(i, npts, taps, beta, osf));
      if (v > mx) mx = v;
    end
    return q15(filter_h_raw(k, npts, taps, beta, osf) / mx);
  endfunction

  // ----------------------------------------------------------------- carrier
  // Entry idx of a 2^aw-entry cosine table in Q1.15.
  function automatic int carrier_cos_q15(input int idx, input int aw);
    return cos_q15(longint'(idx), longint'(1) << aw);
  endfunction

  // DDS frequency control word: f_carrier / f_sample * 2^phase_w, rounded.
  function automatic longint carrier_fcw(input real f_carrier, input real f_sample, input int phase_w);
    return longint'($floor(f_carrier / f_sample * (2.0 ** phase_w) + 0.5));
  endfunction

  // -------------------------------------------------------------- QAM mapper
  // Bits of a symbol that go to the in-phase axis (the rest go to quadrature).
  function automatic int i_bits(input int format);
    return (format + 1) / 2;
  endfunction
  function automatic int q_bits(input int format);
    return format / 2;
  endfunction

  // Odd PAM level (-(L-1) .. L-1 in steps of 2) of a Gray-coded nb-bit field.
  function automatic int pam_level(input int gray, input int nb);
    int b;
    b = 0;
    for (int i = nb - 1; i >= 0; i--)
      b |= (((b >> (i + 1)) ^ (gray >> i)) & 1) << i;
    return 2 * b - ((1 << nb) - 1);
  endfunction

  // Distance between neighbouring constellation levels.  The outermost
  // in-phase level is placed at 2^(W-1)/(2N), so that an N-point DFT of any
  // symbol vector (at most N*sqrt(2) times that) stays inside W bits.
  function automatic int mapper_step(input int npts, input int w, input int format);
    return ((1 << (w - 1)) / (2 * npts)) / ((1 << i_bits(format)) - 1);
  endfunction

endpackage
