// tb_transmitter_full: the transmitter at its default configuration (N = 16
// lanes, 16-QAM, rate 1/2 code, 11-tap SRRC, 100 Hz carrier at 202.96 MHz)
// taking a stream of random words from reset, compared sample by sample with
// the floating-point model of tx_check within 6 LSB, with the pipeline-fill
// latency (20 clocks) checked as well.
module tb_transmitter_full;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          reset, tvalid, done;
  logic [31:0]   in;
  logic [255:0]  out;
  int            checks, failures, nw, nl, nr, fr;
  real           me;

  transmitter dut (.clk, .reset, .in, .tvalid, .out);

  tx_check #(.N(16), .CODE(2), .FORMAT(4), .NUM_TAPS(11), .F_CARRIER_HZ(100.0),
             .F_CLK_HZ(202.96e6), .NWORDS(200)) chk (
    .clk, .reset, .in, .tvalid, .out, .done, .checks, .failures,
    .n_words(nw), .n_latency_ok(nl), .n_restart(nr), .n_full_rate(fr), .max_err(me));

  initial begin
    repeat (2) @(posedge clk);   // let the checkers clear their outputs
    wait (done);
    checks++;
    if (nl == 0) begin failures++; $display("pipeline fill never seen"); end
    checks++;
    if (fr < 150) begin failures++; $display("output not at one word per clock"); end
    $display("words compared %0d, max error %f LSB", nw, me);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("tb_transmitter_full: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
