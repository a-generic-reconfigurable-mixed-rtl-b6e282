// conv_encoder: one lane of the forward error correction stage, a
// feed-forward binary convolutional encoder.
//
// Each clock with in_valid high it shifts one information bit into its
// constraint-length register and emits CODE coded bits, bit c being the parity
// of the register masked by generator polynomial c.  Polynomials are in the
// usual octal notation whose most significant bit weights the newest bit:
//   CODE = 2 : rate 1/2, K = 7, generators 171 and 133 (octal)
//   CODE = 3 : rate 1/3, K = 4, generators 13, 15 and 17 (octal)
//   CODE = 1 : no coding, the bit is passed through (used for the uncoded
//              configurations)
// These two codes are the document's.  The coded bits are registered, so the
// latency is one clock; the register state is cleared by the synchronous
// active-high reset and holds while in_valid is low.
module conv_encoder #(
  parameter int CODE = 2
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            in_valid,
  input  logic            in_bit,
  output logic [CODE-1:0] out_bits
);
  localparam int K = (CODE == 2) ? 7 : (CODE == 3) ? 4 : 1;
  localparam logic [6:0] G [3] = (CODE == 2) ? '{7'o171, 7'o133, 7'o0}
                               : (CODE == 3) ? '{7'o13, 7'o15, 7'o17}
                               :               '{7'o1, 7'o0, 7'o0};

  initial assert (CODE >= 1 && CODE <= 3) else $error("conv_encoder: CODE must be 1, 2 or 3");

  if (K == 1) begin : g_uncoded
    always_ff @(posedge clk) begin
      if (reset)         out_bits <= '0;
      else if (in_valid) out_bits <= CODE'(in_bit);
    end
  end else begin : g_coded
    logic [K-2:0] state;                // the K-1 previous bits, newest in the MSB
    logic [K-1:0] window;               // {newest bit, previous K-1 bits}
    assign window = {in_bit, state};

    always_ff @(posedge clk) begin
      if (reset) begin
        state    <= '0;
        out_bits <= '0;
      end else if (in_valid) begin
        state <= window[K-1:1];
        for (int c = 0; c < CODE; c++)
          out_bits[c] <= ^(window & G[c][K-1:0]);
      end
    end
  end
endmodule
