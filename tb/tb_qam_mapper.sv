// tb_qam_mapper: self-checking test of the Gray-coded QAM mapper for 16-,
// 32- (rectangular 8x4) and 256-QAM, plus a literal check of the 16-QAM
// levels for N = 2 (step 2730: levels +-2730 and +-8190).
module tb_qam_mapper;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d4, d5, d8;
  int   c4, c5, c8, f4, f5, f8;
  int   checks, failures;

  map_check #(.N(2), .FORMAT(4)) u_16 (.clk, .done(d4), .checks(c4), .failures(f4));
  map_check #(.N(2), .FORMAT(5)) u_32 (.clk, .done(d5), .checks(c5), .failures(f5));
  map_check #(.N(4), .FORMAT(8)) u_256 (.clk, .done(d8), .checks(c8), .failures(f8));

  // 16-QAM, Gray order 00,01,11,10 from the most negative level upwards.
  localparam int LVL16 [4] = '{-8190, -2730, 8190, 2730};   // indexed by the 2-bit code

  initial begin
    checks = 0; failures = 0;
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (tx_ref_pkg::gray_level(g, 2, tx_ref_pkg::map_step(2, 4)) != LVL16[g]) failures++;
    end
    repeat (2) @(posedge clk);   // let the checkers clear their outputs
    wait (d4 && d5 && d8);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c4 + c5 + c8, failures + f4 + f5 + f8);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("tb_qam_mapper: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c4 + c5 + c8, failures + f4 + f5 + f8 + 1);
    $finish;
  end
endmodule
