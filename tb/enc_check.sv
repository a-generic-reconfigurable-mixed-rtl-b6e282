// enc_check: drives one fec_encoder configuration with random bits and random
// gaps in in_valid and compares every coded word with a per-lane software
// encoder (tx_ref_pkg::enc_bit).  Also checks the one-clock latency of
// out_valid and, first of all, the impulse response of lane 0, which must
// spell out the generator polynomials.
module enc_check
  import tx_ref_pkg::*;
#(
  parameter int N      = 4,
  parameter int FORMAT = 4,
  parameter int CODE   = 2,
  parameter int NWORDS = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int LANES = N * FORMAT / CODE;
  localparam int K     = constraint_len(CODE);

  logic                  reset, in_valid, out_valid;
  logic [LANES-1:0]      in_bits;
  logic [N*FORMAT-1:0]   out_bits, exp_bits;
  logic                  exp_valid;
  bit                    hist [LANES][8];

  fec_encoder #(.N(N), .FORMAT(FORMAT), .CODE(CODE)) dut (
    .clk, .reset, .in_valid, .in_bits, .out_valid, .out_bits
  );

  task automatic step_model();
    for (int j = 0; j < LANES; j++) begin
      if (in_valid) begin
        for (int i = 7; i > 0; i--) hist[j][i] = hist[j][i-1];
        hist[j][0] = in_bits[j];
        for (int c = 0; c < CODE; c++)
          exp_bits[j*CODE + c] = 1'(enc_bit(CODE, c, hist[j]));
      end
    end
    exp_valid = in_valid;
  endtask

  task automatic check();
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("enc CODE=%0d: out_valid %b, expected %b", CODE, out_valid, exp_valid);
    end else if (exp_valid) begin
      checks++;
      if (out_bits !== exp_bits) begin
        failures++;
        $display("enc CODE=%0d: out %h, expected %h", CODE, out_bits, exp_bits);
      end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    exp_bits = '0; exp_valid = 0;
    foreach (hist[j, i]) hist[j][i] = 0;
    reset = 1; in_valid = 0; in_bits = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // Impulse on lane 0: coded bit c over K clocks = generator c, MSB first.
    for (int t = 0; t < K + 2; t++) begin
      in_valid = 1;
      in_bits  = (t == 0) ? LANES'(1) : '0;
      step_model();
      @(negedge clk);
      check();
      if (t < K) begin
        for (int c = 0; c < CODE; c++) begin
          checks++;
          if (out_bits[c] !== 1'((gen_poly(CODE, c) >> (K - 1 - t)) & 1)) begin
            failures++;
            $display("enc CODE=%0d: impulse response bit %0d of generator %0d wrong", CODE, t, c);
          end
        end
      end
    end
    // Random traffic with gaps.
    for (int t = 0; t < NWORDS; t++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < LANES; j++) in_bits[j] = 1'($urandom);
      step_model();
      @(negedge clk);
      check();
    end
    done = 1;
  end
endmodule
