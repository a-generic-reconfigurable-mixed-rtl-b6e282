// fec_encoder: the forward error correction stage of the transmitter, a bank
// of N*FORMAT/CODE independent convolutional encoders (conv_encoder), one per
// information-bit lane of the input bus.
//
// Every clock with in_valid high, lane j takes in_bits[j] and writes its CODE
// coded bits to out_bits[j*CODE +: CODE] (bit c of a lane is generator c).
// The N*FORMAT coded bits then form N symbols of FORMAT bits for the QAM
// mapper.  Lane count and code rates follow the document; the bit placement
// and the valid signal are this design's choice.  Latency: one clock.
module fec_encoder #(
  parameter int N      = 16,
  parameter int FORMAT = 4,
  parameter int CODE   = 2
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic                       in_valid,
  input  logic [N*FORMAT/CODE-1:0]   in_bits,
  output logic                       out_valid,
  output logic [N*FORMAT-1:0]        out_bits
);
  localparam int LANES = N * FORMAT / CODE;

  initial assert ((N * FORMAT) % CODE == 0)
    else $error("fec_encoder: N*FORMAT must be a multiple of CODE");

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    conv_encoder #(.CODE(CODE)) u_enc (
      .clk     (clk),
      .reset   (reset),
      .in_valid(in_valid),
      .in_bit  (in_bits[j]),
      .out_bits(out_bits[j*CODE +: CODE])
    );
  end

  always_ff @(posedge clk) begin
    if (reset) out_valid <= 1'b0;
    else       out_valid <= in_valid;
  end
endmodule
