// par_dft: fully parallel, pipelined N-point discrete Fourier transform.  The
// transmitter uses it twice: as the DFT that takes the mapped symbols into the
// frequency domain and as the IDFT that brings the filtered bins back.
//
//   X[k] = 2^-OSHIFT * sum_n (xn_re[n] + j xn_im[n]) * (ccos[k][n] + j csin[k][n])
//
// The weights arrive on ports, as in the document, so the same module does the
// forward transform (csin = -sin) and the inverse (csin = +sin, and OSHIFT
// raised by log2(N) to apply the 1/N factor).  All N*N complex products are
// formed at once (N^2 complex multipliers), and each bin is summed by a binary
// adder tree for the real and one for the imaginary part (2N(N-1) adders in
// total, the counts the document gives).  Every stage is registered:
//   stage 1          complex products (2W+1 bits, exact)
//   stages 2..L+1    adder-tree levels, L = log2(N), one level per clock
//   stage L+2        symmetric rounding by 2^-OSHIFT and saturation to W bits
// so the latency is log2(N)+2 clocks and a new vector is accepted every clock.
// N must be a power of two, the constraint the document adds so that an FFT
// could replace the DFT later.  The register after every tree level and the
// rounding/saturation rule are this design's choices.  Only the valid pipeline
// is reset; data registers are qualified by out_valid.
module par_dft
  import qam_tx_pkg::*;
#(
  parameter int N      = 16,
  parameter int W      = SAMPLE_W,
  parameter int OSHIFT = FRAC_W
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                in_valid,
  input  logic signed [W-1:0] xn_re [N],
  input  logic signed [W-1:0] xn_im [N],
  input  logic signed [W-1:0] ccos  [N][N],   // [k][n]
  input  logic signed [W-1:0] csin  [N][N],   // [k][n]
  output logic                out_valid,
  output logic signed [W-1:0] xk_re [N],
  output logic signed [W-1:0] xk_im [N]
);
  localparam int L     = $clog2(N);
  localparam int PW    = 2 * W + 1;          // width of one complex product part
  localparam int ACC_W = PW + L;             // width of a full bin sum
  localparam int LAT   = L + 2;

  typedef logic signed [ACC_W-1:0] acc_t;

  logic [LAT-1:0] vld;

  initial assert (N >= 2 && (1 << L) == N) else $error("par_dft: N must be a power of two");

  for (genvar k = 0; k < N; k++) begin : g_bin
    // Adder tree of bin k stored as a heap: node j sums nodes 2j+1 and 2j+2,
    // the leaves N-1 .. 2N-2 hold the N products, node 0 is the bin sum.
    // Since N is a power of two all leaves are at depth L.
    acc_t t_re [2*N-1];
    acc_t t_im [2*N-1];

    // Stage 1: complex multiplications.
    for (genvar n = 0; n < N; n++) begin : g_mul
      always_ff @(posedge clk) begin
        t_re[N-1+n] <= acc_t'(xn_re[n] * ccos[k][n]) - acc_t'(xn_im[n] * csin[k][n]);
        t_im[N-1+n] <= acc_t'(xn_re[n] * csin[k][n]) + acc_t'(xn_im[n] * ccos[k][n]);
      end
    end

    // Stages 2..L+1: one registered tree level per clock.
    for (genvar j = 0; j < N - 1; j++) begin : g_add
      always_ff @(posedge clk) begin
        t_re[j] <= t_re[2*j+1] + t_re[2*j+2];
        t_im[j] <= t_im[2*j+1] + t_im[2*j+2];
      end
    end

    // Stage L+2: rescale and saturate.
    always_ff @(posedge clk) begin
      xk_re[k] <= W'(sat(round_sym(64'(t_re[0]), OSHIFT), W));
      xk_im[k] <= W'(sat(round_sym(64'(t_im[0]), OSHIFT), W));
    end
  end

  always_ff @(posedge clk) begin
    if (reset) vld <= '0;
    else       vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];
endmodule
