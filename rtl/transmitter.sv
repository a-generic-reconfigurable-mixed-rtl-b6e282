// transmitter: generic, parallel mixed time/frequency domain QAM transmitter
// with forward error correction.
//
// Every clock the transmitter takes N words of FORMAT/CODE information bits
// (packed on one bus, word 0 in the least significant bits) and delivers N
// modulated 16-bit output samples, so it runs at N samples per clock.  The
// chain is
//
//   fec_encoder   N*FORMAT/CODE convolutional encoders, rate 1/CODE
//   qam_mapper    N Gray-coded 2^FORMAT-QAM symbols -> I, Q
//   par_dft       N-point DFT of the N complex symbols       (time -> frequency)
//   freq_filter   SRRC pulse shaping as a product per bin
//   par_dft       N-point IDFT, scaled by 1/N                (frequency -> time)
//   qam_modulator I cos - Q sin with a DDS carrier
//
// The pulse-shaping filter, which in the time domain is a convolution that
// forces serial processing, becomes a pointwise product in the frequency
// domain and so parallelises to any N.  CODE = 2 selects the rate 1/2 code,
// CODE = 3 the rate 1/3 code and CODE = 1 no coding.  FORMAT is log2 of the
// QAM order (4 = 16-QAM .. 8 = 256-QAM).  The DFT/IDFT weights, the filter
// bins and the carrier table are computed at elaboration from the
// parameters.
//
// Interface: clk, synchronous active-high reset, input bus `in`, output bus
// `out` (sample i in bits [16i+15:16i]) and `tvalid`.  There is no input
// handshake: after reset is released a new input word is taken every clock,
// and tvalid rises when the first of them leaves the pipeline,
// 1 + 1 + (log2 N + 2) + 2 + (log2 N + 2) + 4 clocks later (20 for N = 16),
// staying high while input keeps flowing.  Parameters, ports and the block
// structure follow the document; the pipeline depths, the scaling between
// blocks and the DDS are this design's choices.
module transmitter
  import qam_tx_pkg::*;
#(
  parameter int  N            = 16,
  parameter int  CODE         = 2,
  parameter int  FORMAT       = 4,
  parameter int  NUM_TAPS     = 11,
  parameter real ROLLOFF      = 0.5,
  parameter int  OSF          = 2,
  parameter real F_CARRIER_HZ = 100.0,
  parameter real F_CLK_HZ     = 202.96e6
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic [N*FORMAT/CODE-1:0] in,
  output logic                     tvalid,
  output logic [SAMPLE_W*N-1:0]    out
);
  localparam int W = SAMPLE_W;
  typedef logic signed [W-1:0] sample_t;

  // DFT and IDFT weights ([k][n]).
  sample_t dft_cos  [N][N];
  sample_t dft_sin  [N][N];
  sample_t idft_sin [N][N];
  for (genvar k = 0; k < N; k++) begin : g_k
    for (genvar n = 0; n < N; n++) begin : g_n
      assign dft_cos[k][n]  = sample_t'(dft_cos_q15(k, n, N));
      assign dft_sin[k][n]  = sample_t'(dft_sin_q15(k, n, N));
      assign idft_sin[k][n] = sample_t'(idft_sin_q15(k, n, N));
    end
  end

  logic                enc_valid, map_valid, dft_valid, flt_valid, idft_valid;
  logic [N*FORMAT-1:0] enc_bits;
  sample_t             map_i [N], map_q [N];
  sample_t             dft_re [N], dft_im [N];
  sample_t             flt_re [N], flt_im [N];
  sample_t             idft_re [N], idft_im [N];
  sample_t             mod_out [N];

  fec_encoder #(.N(N), .FORMAT(FORMAT), .CODE(CODE)) u_fec (
    .clk, .reset, .in_valid(!reset), .in_bits(in),
    .out_valid(enc_valid), .out_bits(enc_bits)
  );

  qam_mapper #(.N(N), .W(W), .FORMAT(FORMAT)) u_map (
    .clk, .reset, .in_valid(enc_valid), .sym(enc_bits),
    .out_valid(map_valid), .i_out(map_i), .q_out(map_q)
  );

  par_dft #(.N(N), .W(W), .OSHIFT(FRAC_W)) u_dft (
    .clk, .reset, .in_valid(map_valid), .xn_re(map_i), .xn_im(map_q),
    .ccos(dft_cos), .csin(dft_sin),
    .out_valid(dft_valid), .xk_re(dft_re), .xk_im(dft_im)
  );

  freq_filter #(.N(N), .W(W), .NUM_TAPS(NUM_TAPS), .ROLLOFF(ROLLOFF), .OSF(OSF)) u_flt (
    .clk, .reset, .in_valid(dft_valid), .x_re(dft_re), .x_im(dft_im),
    .out_valid(flt_valid), .y_re(flt_re), .y_im(flt_im)
  );

  par_dft #(.N(N), .W(W), .OSHIFT(FRAC_W + $clog2(N))) u_idft (
    .clk, .reset, .in_valid(flt_valid), .xn_re(flt_re), .xn_im(flt_im),
    .ccos(dft_cos), .csin(idft_sin),
    .out_valid(idft_valid), .xk_re(idft_re), .xk_im(idft_im)
  );

  qam_modulator #(.N(N), .W(W), .F_CARRIER_HZ(F_CARRIER_HZ), .F_CLK_HZ(F_CLK_HZ)) u_mod (
    .clk, .reset, .in_valid(idft_valid), .i_in(idft_re), .q_in(idft_im),
    .out_valid(tvalid), .out(mod_out)
  );

  for (genvar i = 0; i < N; i++) begin : g_out
    assign out[i*W +: W] = mod_out[i];
  end
endmodule
