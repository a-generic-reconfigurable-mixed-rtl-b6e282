// tb_freq_filter: self-checking test of the frequency-domain SRRC filter at
// its default size (N = 16 bins, 11 taps, roll-off 0.5, 2 taps per symbol).
// The reference response H[k] is computed here in floating point from the
// SRRC formula.  Checks:
//   * a full-scale vector (all bins 32767) returns H[k] itself, within 1 LSB;
//   * H is real and even (H[k] = H[N-k]) and a low-pass (H[N/2] < H[0]/4);
//   * random bins give x*H[k] within 1 LSB after rounding;
//   * latency two clocks, one vector per clock.
module tb_freq_filter;
  import tx_ref_pkg::*;

  localparam int N   = 16;
  localparam int LAT = 2;
  localparam int NV  = 200;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               reset, in_valid, out_valid;
  logic signed [15:0] xr [N], xi [N], yr [N], yi [N];
  real                h [];

  freq_filter dut (
    .clk, .reset, .in_valid, .x_re(xr), .x_im(xi), .out_valid, .y_re(yr), .y_im(yi)
  );

  typedef struct { real v[2*N]; } exp_t;
  exp_t q[$];
  int   sent = 0, got = 0, cyc = 0, first_in = -1, first_out = -1;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!reset && out_valid) begin
      exp_t e;
      if (first_out < 0) first_out = cyc;
      checks++;
      if (q.size() == 0) begin failures++; $display("filter: unexpected output"); end
      else begin
        e = q.pop_front();
        for (int k = 0; k < N; k++) begin
          checks += 2;
          if (fabs(real'(yr[k]) - e.v[k]) > 1.0) begin
            failures++; $display("filter vec %0d bin %0d re: %0d vs %f", got, k, yr[k], e.v[k]);
          end
          if (fabs(real'(yi[k]) - e.v[N+k]) > 1.0) begin
            failures++; $display("filter vec %0d bin %0d im: %0d vs %f", got, k, yi[k], e.v[N+k]);
          end
        end
        if (got == 0) begin
          // full-scale vector: output is H itself
          for (int k = 1; k < N; k++) begin
            checks += 2;
            if (yr[k] != yr[N-k]) begin failures++; $display("filter: H not even at %0d", k); end
          end
          checks++;
          if (4 * int'(yr[N/2]) > int'(yr[0])) begin failures++; $display("filter: not a low-pass"); end
        end
        got++;
      end
    end
  end

  initial begin
    filter_resp(N, 11, 0.5, 2, h);
    reset = 1; in_valid = 0;
    foreach (xr[k]) begin xr[k] = '0; xi[k] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    while (sent < NV) begin
      exp_t e;
      in_valid = (sent < 10) || ($urandom_range(0, 2) != 0);
      for (int k = 0; k < N; k++) begin
        if (sent == 0) begin xr[k] = 16'sd32767; xi[k] = -16'sd32767; end
        else begin
          xr[k] = 16'($urandom);
          xi[k] = 16'($urandom);
        end
        e.v[k]   = real'(xr[k]) * h[k] * (32767.0 / 32768.0);
        e.v[N+k] = real'(xi[k]) * h[k] * (32767.0 / 32768.0);
      end
      if (in_valid) begin
        if (first_in < 0) first_in = cyc;
        q.push_back(e);
        sent++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks += 2;
    if (got != NV) begin failures++; $display("filter: %0d of %0d vectors came out", got, NV); end
    if (first_out - first_in != LAT) begin
      failures++; $display("filter: latency %0d, expected %0d", first_out - first_in, LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("tb_freq_filter: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
