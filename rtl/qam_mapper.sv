// qam_mapper: maps N parallel FORMAT-bit symbols onto a Gray-coded rectangular
// 2^FORMAT-point constellation and outputs the in-phase and quadrature samples.
//
// The upper ceil(FORMAT/2) bits of a symbol select the in-phase level and the
// lower floor(FORMAT/2) bits the quadrature level.  Each field is Gray coded,
// so neighbouring levels differ in one bit, and selects an odd level
// -(L-1) .. (L-1) that is multiplied by a common step.  For odd FORMAT (32- and
// 128-QAM) the grid is rectangular, twice as wide in I as in Q.  The levels
// come from look-up tables filled at elaboration time (qam_tx_pkg::pam_level),
// one table per axis, and are normalised so that the outermost in-phase level
// is 2^(W-1)/(2N): the N-point DFT that follows then cannot overflow W bits.
// Gray coding and the rectangular grid are the document's; the bit split, the
// normalisation and the single generic module for all orders are this
// design's choices.  FORMAT may be 2..8.  Samples are registered: latency one
// clock.
module qam_mapper
  import qam_tx_pkg::*;
#(
  parameter int N      = 16,
  parameter int W      = SAMPLE_W,
  parameter int FORMAT = 4
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                in_valid,
  input  logic [N*FORMAT-1:0] sym,
  output logic                out_valid,
  output logic signed [W-1:0] i_out [N],
  output logic signed [W-1:0] q_out [N]
);
  localparam int IB   = i_bits(FORMAT);
  localparam int QB   = q_bits(FORMAT);
  localparam int STEP = mapper_step(N, W, FORMAT);

  typedef logic signed [W-1:0] sample_t;

  function automatic sample_t level(input int gray, input int nb);
    return sample_t'(pam_level(gray, nb) * STEP);
  endfunction

  // Per-axis level tables (together a 2^FORMAT-entry constellation LUT).
  sample_t lut_i [1 << IB];
  sample_t lut_q [1 << QB];
  for (genvar g = 0; g < (1 << IB); g++) begin : g_lut_i
    assign lut_i[g] = level(g, IB);
  end
  for (genvar g = 0; g < (1 << QB); g++) begin : g_lut_q
    assign lut_q[g] = level(g, QB);
  end

  initial assert (FORMAT >= 2 && FORMAT <= 8) else $error("qam_mapper: FORMAT must be 2..8");

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) begin
        i_out[i] <= '0;
        q_out[i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < N; i++) begin
          i_out[i] <= lut_i[sym[i*FORMAT + QB +: IB]];
          q_out[i] <= lut_q[sym[i*FORMAT +: QB]];
        end
    end
  end
endmodule
