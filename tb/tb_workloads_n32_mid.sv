// tb_workloads_n32_mid: configurations with 32 parallel inputs and the 31-tap SRRC
// filter (Table IV, rate 1/2), each at its reported clock rate:
//   32-QAM at 112.37 MHz, 8.99 Gb/s
//   64-QAM at 134.39 MHz, 12.90 Gb/s
//   128-QAM at 130.02 MHz, 14.56 Gb/s
// Every configuration runs end to end against the floating-point model, and
// its measured information throughput (one word of 32*FORMAT/2 bits per
// clock) must match the reported figure within 1 %.
module tb_workloads_n32_mid;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 3;
  logic done [NC];
  int   c [NC], f [NC];
  real  g [NC];
  localparam real REP [NC] = '{8.99, 12.90, 14.56};   // reported Gb/s

  tx_unit #(.N(32), .CODE(2), .FORMAT(5), .NUM_TAPS(31), .F_CLK_HZ(112.37e6), .NWORDS(40)) u0 (
    .clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .gbps(g[0]));
  tx_unit #(.N(32), .CODE(2), .FORMAT(6), .NUM_TAPS(31), .F_CLK_HZ(134.39e6), .NWORDS(40)) u1 (
    .clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .gbps(g[1]));
  tx_unit #(.N(32), .CODE(2), .FORMAT(7), .NUM_TAPS(31), .F_CLK_HZ(130.02e6), .NWORDS(40)) u2 (
    .clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .gbps(g[2]));

  int checks, failures;

  function automatic void sum_up();
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin
    bit all;
    repeat (2) @(posedge clk);   // let the checkers clear their outputs
    do begin
      @(negedge clk);
      all = 1;
      for (int i = 0; i < NC; i++) all &= done[i];
    end while (!all);
    #1;
    sum_up();
    for (int i = 0; i < NC; i++) begin
      checks++;
      if (g[i] < REP[i] * 0.99 || g[i] > REP[i] * 1.01) begin
        failures++;
        $display("configuration %0d: %0.2f Gb/s, reported %0.2f Gb/s", i, g[i], REP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    sum_up();
    $display("tb_workloads_n32_mid: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
