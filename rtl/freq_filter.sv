// freq_filter: square-root raised cosine (SRRC) pulse shaping done in the
// frequency domain.  Convolution in time becomes a pointwise product across
// the N DFT bins, so all N bins are filtered in parallel:
//
//   Y[k] = 2^-15 * H[k] * X[k],   H[k] real, Q1.15
//
// H[k] is the N-point DFT of NUM_TAPS SRRC taps (roll-off ROLLOFF, OSF taps
// per symbol) placed symmetrically around sample 0 and zero-padded to N, which
// makes it real; it is computed at elaboration (qam_tx_pkg::filter_h_q15) and
// normalised to a peak of 1.0.  The filter therefore needs 2N real
// multipliers, as in the document, and its order is set by NUM_TAPS (<= N,
// odd).  Note that a product of N-point transforms is a circular convolution
// within each block of N samples.
// Timing follows a two-clock multiplier: products are registered, then
// rounded symmetrically and saturated into a second register.  Latency two
// clocks, one vector per clock.  The roll-off, the oversampling of the
// prototype and the zero-phase placement of the taps are this design's
// choices; the document leaves them to its configuration program.
module freq_filter
  import qam_tx_pkg::*;
#(
  parameter int  N        = 16,
  parameter int  W        = SAMPLE_W,
  parameter int  NUM_TAPS = 11,
  parameter real ROLLOFF  = 0.5,
  parameter int  OSF      = 2
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_re [N],
  input  logic signed [W-1:0] x_im [N],
  output logic                out_valid,
  output logic signed [W-1:0] y_re [N],
  output logic signed [W-1:0] y_im [N]
);
  typedef logic signed [2*W-1:0] prod_t;

  logic signed [W-1:0] h [N];
  prod_t               p_re [N];
  prod_t               p_im [N];
  logic [1:0]          vld;

  initial assert (NUM_TAPS >= 1 && NUM_TAPS <= N && NUM_TAPS % 2 == 1)
    else $error("freq_filter: NUM_TAPS must be odd and at most N");

  for (genvar k = 0; k < N; k++) begin : g_coef
    assign h[k] = W'(filter_h_q15(k, N, NUM_TAPS, ROLLOFF, OSF));
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      p_re[k] <= x_re[k] * h[k];
      p_im[k] <= x_im[k] * h[k];
      y_re[k] <= W'(sat(round_sym(64'(p_re[k]), FRAC_W), W));
      y_im[k] <= W'(sat(round_sym(64'(p_im[k]), FRAC_W), W));
    end
  end

  always_ff @(posedge clk) begin
    if (reset) vld <= '0;
    else       vld <= {vld[0], in_valid};
  end
  assign out_valid = vld[1];
endmodule
