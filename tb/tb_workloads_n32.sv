// tb_workloads_n32: configurations with 32 parallel inputs and the 31-tap SRRC
// filter (Table IV, rate 1/2), each at its reported clock rate:
//   256-QAM at 146.16 MHz, 18.71 Gb/s
//   16-QAM at 168.55 MHz, 10.79 Gb/s
// Every configuration runs end to end against the floating-point model, and
// its measured information throughput (one word of 32*FORMAT/2 bits per
// clock) must match the reported figure within 1 %.
// The remaining rows are in tb_workloads_n32_mid.
module tb_workloads_n32;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 2;
  logic done [NC];
  int   c [NC], f [NC];
  real  g [NC];
  localparam real REP [NC] = '{18.71, 10.79};   // reported Gb/s

  tx_unit #(.N(32), .CODE(2), .FORMAT(8), .NUM_TAPS(31), .F_CLK_HZ(146.16e6), .NWORDS(40)) u0 (
    .clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .gbps(g[0]));
  tx_unit #(.N(32), .CODE(2), .FORMAT(4), .NUM_TAPS(31), .F_CLK_HZ(168.55e6), .NWORDS(40)) u1 (
    .clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .gbps(g[1]));

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
    $display("tb_workloads_n32: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
