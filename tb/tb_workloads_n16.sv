// tb_workloads_n16: the configurations evaluated with 16 parallel inputs.
//   Table III (with FEC): 16/32/64/128/256-QAM at rate 1/2 and 64-QAM at
//   rate 1/3, each at the clock rate reported for it;
//   Sec. IV-B (without FEC): 16-, 32- and 64-QAM uncoded at 62.5 MHz.
// Every configuration runs end to end against the floating-point model, and
// its measured information throughput (one word of N*FORMAT/CODE bits per
// clock) must match the reported figure within 1 %.
module tb_workloads_n16;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 9;
  logic done [NC];
  int   c [NC], f [NC];
  real  g [NC];
  // reported throughput in Gb/s, same order as the instances
  localparam real REP [NC] = '{6.5, 8.07, 8.57, 6.47, 10.73, 12.88, 4.0, 5.0, 6.0};

  tx_unit #(.N(16), .CODE(2), .FORMAT(4), .F_CLK_HZ(202.96e6)) u0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .gbps(g[0]));
  tx_unit #(.N(16), .CODE(2), .FORMAT(5), .F_CLK_HZ(201.74e6)) u1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .gbps(g[1]));
  tx_unit #(.N(16), .CODE(2), .FORMAT(6), .F_CLK_HZ(178.41e6)) u2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .gbps(g[2]));
  tx_unit #(.N(16), .CODE(3), .FORMAT(6), .F_CLK_HZ(202.30e6)) u3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .gbps(g[3]));
  tx_unit #(.N(16), .CODE(2), .FORMAT(7), .F_CLK_HZ(191.68e6)) u4 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]), .gbps(g[4]));
  tx_unit #(.N(16), .CODE(2), .FORMAT(8), .F_CLK_HZ(201.25e6)) u5 (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]), .gbps(g[5]));
  tx_unit #(.N(16), .CODE(1), .FORMAT(4), .F_CLK_HZ(62.5e6))   u6 (.clk, .done(done[6]), .checks(c[6]), .failures(f[6]), .gbps(g[6]));
  tx_unit #(.N(16), .CODE(1), .FORMAT(5), .F_CLK_HZ(62.5e6))   u7 (.clk, .done(done[7]), .checks(c[7]), .failures(f[7]), .gbps(g[7]));
  tx_unit #(.N(16), .CODE(1), .FORMAT(6), .F_CLK_HZ(62.5e6))   u8 (.clk, .done(done[8]), .checks(c[8]), .failures(f[8]), .gbps(g[8]));

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
    repeat (5000) @(posedge clk);
    sum_up();
    $display("tb_workloads_n16: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
