// qam_modulator: quadrature modulation of N parallel baseband samples,
//
//   out(t) = I(t) cos(2 pi f0 t) - Q(t) sin(2 pi f0 t)
//
// Lane i of the vector that arrives at the c-th valid clock is sample
// t = c*N + i.  A direct digital synthesiser gives every lane its carrier
// phase: a PHASE_W-bit phase counter advances by N*FCW per valid vector, lane
// i adds i*FCW, and the top LUT_AW phase bits address a cosine table
// (2^LUT_AW entries, Q1.15); the sine is read from the same table a quarter
// period earlier.  FCW = round(f0/fs * 2^PHASE_W) is computed from the parameters
// F_CARRIER_HZ (f0) and F_CLK_HZ, with fs = N * F_CLK_HZ.
// Each lane has two multipliers (rounded symmetrically by 2^-15) and a
// subtracter, as in the document.  Pipeline:
//   clock 1  carrier look-up, inputs registered
//   clock 2  products                         (two-clock multiplier, as in the
//   clock 3  rounded, saturated products       document)
//   clock 4  subtraction and saturation
// Latency four clocks, one vector per clock.  The phase counter is cleared by
// reset and holds while in_valid is low, so the carrier phase is tied to the
// sample index.  The table size and phase width are this design's choices.
module qam_modulator
  import qam_tx_pkg::*;
#(
  parameter int          N            = 16,
  parameter int          W            = SAMPLE_W,
  parameter int          PHASE_W      = 32,
  parameter int          LUT_AW       = 10,
  parameter real         F_CARRIER_HZ = 100.0,
  parameter real         F_CLK_HZ     = 202.96e6
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in [N],
  input  logic signed [W-1:0] q_in [N],
  output logic                out_valid,
  output logic signed [W-1:0] out [N]
);
  typedef logic signed [W-1:0]   sample_t;
  typedef logic signed [2*W-1:0] prod_t;
  typedef logic [PHASE_W-1:0]    phase_t;

  localparam int     TBL     = 1 << LUT_AW;
  localparam phase_t FCW_P   = phase_t'(carrier_fcw(F_CARRIER_HZ, F_CLK_HZ * N, PHASE_W));
  localparam phase_t STEP_N  = phase_t'(FCW_P * N);

  sample_t cos_tbl [TBL];
  for (genvar a = 0; a < TBL; a++) begin : g_tbl
    assign cos_tbl[a] = sample_t'(carrier_cos_q15(a, LUT_AW));
  end

  phase_t          phase;                     // phase of lane 0
  sample_t         c_r [N], s_r [N], i_r [N], q_r [N];
  prod_t           pi_r [N], pq_r [N];
  sample_t         mi_r [N], mq_r [N];
  logic [3:0]      vld;

  always_ff @(posedge clk) begin
    if (reset)         phase <= '0;
    else if (in_valid) phase <= phase + STEP_N;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      logic [LUT_AW-1:0] idx;
      idx = LUT_AW'((phase + phase_t'(FCW_P * i)) >> (PHASE_W - LUT_AW));
      // clock 1
      c_r[i]  <= cos_tbl[idx];
      s_r[i]  <= cos_tbl[idx - LUT_AW'(TBL / 4)];   // sin(x) = cos(x - pi/2)
      i_r[i]  <= i_in[i];
      q_r[i]  <= q_in[i];
      // clock 2, 3
      pi_r[i] <= i_r[i] * c_r[i];
      pq_r[i] <= q_r[i] * s_r[i];
      mi_r[i] <= W'(sat(round_sym(64'(pi_r[i]), FRAC_W), W));
      mq_r[i] <= W'(sat(round_sym(64'(pq_r[i]), FRAC_W), W));
      // clock 4
      out[i]  <= W'(sat(64'(mi_r[i]) - 64'(mq_r[i]), W));
    end
  end

  always_ff @(posedge clk) begin
    if (reset) vld <= '0;
    else       vld <= {vld[2:0], in_valid};
  end
  assign out_valid = vld[3];
endmodule
