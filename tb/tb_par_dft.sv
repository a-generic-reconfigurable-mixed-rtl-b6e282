// tb_par_dft: self-checking test of the parallel pipelined DFT, used once as
// a forward DFT (OSHIFT 15) and once as an inverse DFT with the 1/N factor
// (OSHIFT 15 + log2 N), N = 8.  Random complex vectors enter back to back and
// with gaps; each output vector is compared
//   * bit-exactly with an integer model (sum of exact products, symmetric
//     rounding, saturation), and
//   * with a floating-point DFT within 2 LSB.
// The first output must appear log2(N)+2 = 5 clocks after the first input.
// One full-scale vector checks saturation of the DC bin.
module tb_par_dft;
  import tx_ref_pkg::*;

  localparam int N   = 8;
  localparam int LAT = 5;
  localparam int NV  = 300;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               reset, in_valid;
  logic signed [15:0] xr [N], xi [N];
  logic signed [15:0] ccos [N][N], csin_f [N][N], csin_i [N][N];
  logic               ov_f, ov_i;
  logic signed [15:0] yr_f [N], yi_f [N], yr_i [N], yi_i [N];

  par_dft #(.N(N), .W(16), .OSHIFT(15)) dut_f (
    .clk, .reset, .in_valid, .xn_re(xr), .xn_im(xi), .ccos(ccos), .csin(csin_f),
    .out_valid(ov_f), .xk_re(yr_f), .xk_im(yi_f)
  );
  par_dft #(.N(N), .W(16), .OSHIFT(18)) dut_i (
    .clk, .reset, .in_valid, .xn_re(xr), .xn_im(xi), .ccos(ccos), .csin(csin_i),
    .out_valid(ov_i), .xk_re(yr_i), .xk_im(yi_i)
  );

  // Expected vectors: [0..N-1] forward re, [N..2N-1] forward im, then inverse.
  typedef struct { longint ex[4*N]; real fl[4*N]; } exp_t;
  exp_t q[$];

  function automatic longint rnd_sat(input longint v, input int sh);
    longint r, h;
    h = longint'(1) << (sh - 1);
    r = (v >= 0) ? ((v + h) >>> sh) : -((-v + h) >>> sh);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic exp_t model();
    exp_t e;
    real fr[], fi[], gr[], gi[], yr[], yi[];
    fr = new[N]; fi = new[N];
    for (int n = 0; n < N; n++) begin fr[n] = xr[n]; fi[n] = xi[n]; end
    dft(fr, fi, -1, gr, gi);
    dft(fr, fi, +1, yr, yi);
    for (int k = 0; k < N; k++) begin
      longint af_r, af_i, ai_r, ai_i;
      af_r = 0; af_i = 0; ai_r = 0; ai_i = 0;
      for (int n = 0; n < N; n++) begin
        af_r += longint'(xr[n]) * ccos[k][n] - longint'(xi[n]) * csin_f[k][n];
        af_i += longint'(xr[n]) * csin_f[k][n] + longint'(xi[n]) * ccos[k][n];
        ai_r += longint'(xr[n]) * ccos[k][n] - longint'(xi[n]) * csin_i[k][n];
        ai_i += longint'(xr[n]) * csin_i[k][n] + longint'(xi[n]) * ccos[k][n];
      end
      e.ex[k] = rnd_sat(af_r, 15);       e.ex[N+k] = rnd_sat(af_i, 15);
      e.ex[2*N+k] = rnd_sat(ai_r, 18);   e.ex[3*N+k] = rnd_sat(ai_i, 18);
      e.fl[k] = gr[k];       e.fl[N+k] = gi[k];
      e.fl[2*N+k] = yr[k] / N; e.fl[3*N+k] = yi[k] / N;
    end
    return e;
  endfunction

  int  sent = 0, got = 0, first_in = -1, first_out = -1, cyc = 0, sats = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Output checker.
  always @(negedge clk) begin
    if (!reset && (ov_f || ov_i)) begin
      exp_t e;
      logic signed [15:0] o [4*N];
      if (first_out < 0) first_out = cyc;
      checks++;
      if (ov_f !== ov_i || q.size() == 0) begin
        failures++;
        $display("dft: unexpected output valid");
      end else begin
        e = q.pop_front();
        for (int k = 0; k < N; k++) begin
          o[k] = yr_f[k]; o[N+k] = yi_f[k]; o[2*N+k] = yr_i[k]; o[3*N+k] = yi_i[k];
        end
        for (int j = 0; j < 4*N; j++) begin
          checks += 2;
          if (longint'(o[j]) != e.ex[j]) begin
            failures++;
            $display("dft vec %0d out %0d: %0d, exact model %0d", got, j, o[j], e.ex[j]);
          end
          if (e.ex[j] > -32768 && e.ex[j] < 32767 && fabs(real'(o[j]) - e.fl[j]) > 2.0) begin
            failures++;
            $display("dft vec %0d out %0d: %0d, float model %f", got, j, o[j], e.fl[j]);
          end
          if (e.ex[j] == 32767) sats++;
        end
        got++;
      end
    end
  end

  initial begin
    for (int k = 0; k < N; k++)
      for (int n = 0; n < N; n++) begin
        real a;
        a = 2.0 * PI * ((k * n) % N) / N;
        ccos[k][n]   = 16'($rtoi($floor(32767.0 * $cos(a) + 0.5)));
        csin_i[k][n] = 16'($rtoi($floor(32767.0 * $sin(a) + 0.5)));
        csin_f[k][n] = -csin_i[k][n];
      end
    reset = 1; in_valid = 0;
    foreach (xr[n]) begin xr[n] = '0; xi[n] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    while (sent < NV) begin
      in_valid = (sent < 20) || ($urandom_range(0, 3) != 0);
      for (int n = 0; n < N; n++) begin
        if (sent == 10) begin xr[n] = 16'sd32767; xi[n] = 16'sd0; end
        else begin
          xr[n] = 16'($signed($urandom_range(0, 5792)) - 2896);
          xi[n] = 16'($signed($urandom_range(0, 5792)) - 2896);
        end
      end
      if (in_valid) begin
        if (first_in < 0) first_in = cyc;
        q.push_back(model());
        sent++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks += 3;
    if (got != NV) begin failures++; $display("dft: %0d of %0d vectors came out", got, NV); end
    if (first_out - first_in != LAT) begin
      failures++;
      $display("dft: latency %0d, expected %0d", first_out - first_in, LAT);
    end
    if (sats == 0) begin failures++; $display("dft: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("tb_par_dft: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
