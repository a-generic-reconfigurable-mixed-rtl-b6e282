// map_check: feeds every symbol of one qam_mapper configuration (in random
// lane order, with gaps in in_valid) and compares I and Q with the Gray-coded
// levels of tx_ref_pkg::gray_level.  Also checks that neighbouring levels on
// each axis differ in exactly one bit and that out_valid follows in_valid
// one clock later.
module map_check
  import tx_ref_pkg::*;
#(
  parameter int N      = 2,
  parameter int FORMAT = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int IB   = (FORMAT + 1) / 2;
  localparam int QB   = FORMAT / 2;
  localparam int STEP = map_step(N, FORMAT);

  logic                   reset, in_valid, out_valid;
  logic [N*FORMAT-1:0]    sym;
  logic signed [15:0]     i_out [N], q_out [N];
  int                     exp_i [N], exp_q [N];

  qam_mapper #(.N(N), .W(16), .FORMAT(FORMAT)) dut (
    .clk, .reset, .in_valid, .sym, .out_valid, .i_out, .q_out
  );

  // Gray sequence property: adjacent levels (by value) differ in one bit.
  function automatic int code_of_level(input int lvl, input int nb);
    for (int g = 0; g < (1 << nb); g++)
      if (gray_level(g, nb, 1) == lvl) return g;
    return -1;
  endfunction

  initial begin
    int s, total;
    done = 0; checks = 0; failures = 0;
    for (int ax = 0; ax < 2; ax++) begin
      int nb;
      nb = (ax == 0) ? IB : QB;
      for (int l = -((1 << nb) - 1); l < (1 << nb) - 1; l += 2) begin
        checks++;
        if ($countones(code_of_level(l, nb) ^ code_of_level(l + 2, nb)) != 1) failures++;
      end
    end
    reset = 1; in_valid = 0; sym = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    total = 1 << FORMAT;
    s = 0;
    while (s < total + 8) begin
      in_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < N; i++) begin
        int v;
        v = (s + i * 7) % total;
        sym[i*FORMAT +: FORMAT] = FORMAT'(v);
        if (in_valid) begin
          exp_i[i] = gray_level(v >> QB, IB, STEP);
          exp_q[i] = gray_level(v & ((1 << QB) - 1), QB, STEP);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("map F=%0d: out_valid %b expected %b", FORMAT, out_valid, in_valid);
      end
      if (in_valid) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (int'(i_out[i]) != exp_i[i] || int'(q_out[i]) != exp_q[i]) begin
            failures++;
            $display("map F=%0d lane %0d: (%0d,%0d) expected (%0d,%0d)", FORMAT, i,
                     i_out[i], q_out[i], exp_i[i], exp_q[i]);
          end
        end
        s++;
      end
    end
    done = 1;
  end
endmodule
