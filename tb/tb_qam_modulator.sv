// tb_qam_modulator: self-checking test of the quadrature modulator with a
// carrier fast enough to turn many times during the test (N = 4 lanes,
// 1 MHz clock, 123456.7 Hz carrier).  The reference is
//   out = I cos(theta) - Q sin(theta),  theta = 2 pi * idx / 1024,
//   idx = top 10 bits of (t * FCW mod 2^32),  FCW = round(f0 / (N fclk) * 2^32),
// with t the index of the sample among the valid ones, computed in floating
// point and clipped to 16 bits; the output must be within 2 LSB.  Also checks
// the four-clock latency and that gaps in in_valid do not advance the carrier.
module tb_qam_modulator;
  import tx_ref_pkg::*;

  localparam int  N    = 4;
  localparam int  LAT  = 4;
  localparam int  NV   = 600;
  localparam real FCLK = 1.0e6;
  localparam real F0   = 123456.7;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               reset, in_valid, out_valid;
  logic signed [15:0] ii [N], qq [N], oo [N];

  qam_modulator #(.N(N), .W(16), .F_CARRIER_HZ(F0), .F_CLK_HZ(FCLK)) dut (
    .clk, .reset, .in_valid, .i_in(ii), .q_in(qq), .out_valid, .out(oo)
  );

  typedef struct { real v[N]; } exp_t;
  exp_t    q[$];
  longint  fcw, t = 0;
  int      sent = 0, got = 0, cyc = 0, first_in = -1, first_out = -1, clips = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!reset && out_valid) begin
      exp_t e;
      if (first_out < 0) first_out = cyc;
      checks++;
      if (q.size() == 0) begin failures++; $display("mod: unexpected output"); end
      else begin
        e = q.pop_front();
        for (int i = 0; i < N; i++) begin
          checks++;
          if (fabs(real'(oo[i]) - e.v[i]) > 2.0) begin
            failures++; $display("mod vec %0d lane %0d: %0d vs %f", got, i, oo[i], e.v[i]);
          end
        end
        got++;
      end
    end
  end

  initial begin
    fcw = longint'($floor(F0 / (FCLK * N) * 4294967296.0 + 0.5));
    reset = 1; in_valid = 0;
    foreach (ii[i]) begin ii[i] = '0; qq[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    while (sent < NV) begin
      exp_t e;
      in_valid = (sent < 10) || ($urandom_range(0, 3) != 0);
      for (int i = 0; i < N; i++) begin
        real th, v;
        longint ph;
        ii[i] = 16'($urandom);
        qq[i] = 16'($urandom);
        ph = ((t + i) * fcw) % 64'h1_0000_0000;
        th = 2.0 * PI * real'(ph >> 22) / 1024.0;
        v  = real'(ii[i]) * $cos(th) - real'(qq[i]) * $sin(th);
        if (v > 32767.0) begin v = 32767.0; clips++; end
        if (v < -32768.0) begin v = -32768.0; clips++; end
        e.v[i] = v;
      end
      if (in_valid) begin
        if (first_in < 0) first_in = cyc;
        q.push_back(e);
        sent++;
        t += N;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks += 3;
    if (got != NV) begin failures++; $display("mod: %0d of %0d vectors came out", got, NV); end
    if (first_out - first_in != LAT) begin
      failures++; $display("mod: latency %0d, expected %0d", first_out - first_in, LAT);
    end
    if (clips == 0) begin failures++; $display("mod: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("tb_qam_modulator: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
