// tx_ref_pkg: reference models for the transmitter testbenches, written
// directly from the mathematics (floating point where the hardware uses fixed
// point) and independently of the RTL.
package tx_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // ---------------------------------------------- convolutional encoders
  // Generator c of the code of rate 1/code, octal, MSB = newest bit.
  function automatic int gen_poly(input int code, input int c);
    case (code)
      2:       return (c == 0) ? 'o171 : 'o133;
      3:       return (c == 0) ? 'o13 : (c == 1) ? 'o15 : 'o17;
      default: return 1;
    endcase
  endfunction

  function automatic int constraint_len(input int code);
    return (code == 2) ? 7 : (code == 3) ? 4 : 1;
  endfunction

  // hist[0] is the newest bit, hist[i] the bit i steps earlier.
  function automatic int enc_bit(input int code, input int c, input bit hist[8]);
    int k, g, p;
    k = constraint_len(code);
    g = gen_poly(code, c);
    p = 0;
    for (int i = 0; i < k; i++)
      if (((g >> (k - 1 - i)) & 1) != 0) p ^= int'(hist[i]);
    return p;
  endfunction

  // ------------------------------------------------------------ mapper
  // Level of Gray-coded field g (nb bits): position b in the Gray sequence
  // b ^ (b >> 1), mapped to the odd level 2b - (2^nb - 1), times step.
  function automatic int gray_level(input int g, input int nb, input int step);
    for (int b = 0; b < (1 << nb); b++)
      if ((b ^ (b >> 1)) == g) return (2 * b - ((1 << nb) - 1)) * step;
    return 0;
  endfunction

  function automatic int map_step(input int n, input int format);
    int ib;
    ib = (format + 1) / 2;
    return (32768 / (2 * n)) / ((1 << ib) - 1);
  endfunction

  // --------------------------------------------------------- SRRC filter
  function automatic real srrc_tap(input real t, input real b);
    real x;
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    x = 4.0 * b * t;
    if (fabs(fabs(x) - 1.0) < 1e-9)
      return (b / $sqrt(2.0)) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b))
                               + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + x * $cos(PI * t * (1.0 + b))) / (PI * t * (1.0 - x * x));
  endfunction

  // Normalised real frequency response of the centred tap set, peak 1.0.
  function automatic void filter_resp(input int n, input int taps, input real b, input int osf,
                                      output real h[]);
    real mx;
    h = new[n];
    mx = 0.0;
    for (int k = 0; k < n; k++) begin
      h[k] = 0.0;
      for (int m = -(taps / 2); m <= taps / 2; m++)
        h[k] += srrc_tap(real'(m) / osf, b) * $cos(2.0 * PI * k * m / n);
      if (fabs(h[k]) > mx) mx = fabs(h[k]);
    end
    for (int k = 0; k < n; k++) h[k] = h[k] / mx;
  endfunction

  // ------------------------------------------------------------- DFT
  // sign = -1 forward, +1 inverse (no 1/N).
  function automatic void dft(input real xr[], input real xi[], input int sign,
                              output real yr[], output real yi[]);
    int n;
    n = xr.size();
    yr = new[n];
    yi = new[n];
    for (int k = 0; k < n; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int j = 0; j < n; j++) begin
        real a;
        a = sign * 2.0 * PI * ((k * j) % n) / n;
        yr[k] += xr[j] * $cos(a) - xi[j] * $sin(a);
        yi[k] += xr[j] * $sin(a) + xi[j] * $cos(a);
      end
    end
  endfunction

endpackage
