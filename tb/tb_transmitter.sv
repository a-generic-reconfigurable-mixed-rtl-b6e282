// tb_transmitter: end-to-end test of the transmitter in several reduced
// configurations (N = 4 and 8 lanes) that together exercise every mechanism
// of the design:
//   * rate 1/2 coding (16- and 256-QAM), rate 1/3 coding (64-QAM), no coding;
//   * square and rectangular (32-QAM) constellations;
//   * the pipeline fill: tvalid must rise exactly 2*log2(N)+12 clocks after
//     the first input word;
//   * a reset in mid-stream followed by a clean restart;
//   * full rate: once tvalid is up, a word of N samples every clock.
// Each configuration is checked sample by sample against a floating-point
// model of the whole chain (tx_check) within 6 LSB, with a carrier fast
// enough to turn several times per block.  A mechanism that never happened
// counts as a failure.
module tb_transmitter;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  logic done [NC];
  int   c [NC], f [NC], nw [NC], nl [NC], nr [NC], fr [NC];
  real  me [NC];

  // A: 16-QAM, rate 1/2, N = 8, mid-stream reset
  logic         rA, tA;  logic [15:0]  iA;  logic [127:0] oA;
  transmitter #(.N(8), .CODE(2), .FORMAT(4), .NUM_TAPS(7), .F_CARRIER_HZ(1.234e6),
                .F_CLK_HZ(10.0e6)) dut_a (.clk, .reset(rA), .in(iA), .tvalid(tA), .out(oA));
  tx_check #(.N(8), .CODE(2), .FORMAT(4), .NUM_TAPS(7), .F_CARRIER_HZ(1.234e6),
             .F_CLK_HZ(10.0e6), .NWORDS(120), .RESET_AT(60)) chk_a (
    .clk, .reset(rA), .in(iA), .tvalid(tA), .out(oA), .done(done[0]), .checks(c[0]),
    .failures(f[0]), .n_words(nw[0]), .n_latency_ok(nl[0]), .n_restart(nr[0]), .n_full_rate(fr[0]), .max_err(me[0]));

  // B: 64-QAM, rate 1/3, N = 8
  logic         rB, tB;  logic [15:0]  iB;  logic [127:0] oB;
  transmitter #(.N(8), .CODE(3), .FORMAT(6), .NUM_TAPS(7), .F_CARRIER_HZ(2.5e6),
                .F_CLK_HZ(10.0e6)) dut_b (.clk, .reset(rB), .in(iB), .tvalid(tB), .out(oB));
  tx_check #(.N(8), .CODE(3), .FORMAT(6), .NUM_TAPS(7), .F_CARRIER_HZ(2.5e6),
             .F_CLK_HZ(10.0e6), .NWORDS(100)) chk_b (
    .clk, .reset(rB), .in(iB), .tvalid(tB), .out(oB), .done(done[1]), .checks(c[1]),
    .failures(f[1]), .n_words(nw[1]), .n_latency_ok(nl[1]), .n_restart(nr[1]), .n_full_rate(fr[1]), .max_err(me[1]));

  // C: 32-QAM (rectangular), rate 1/2, N = 8
  logic         rC, tC;  logic [19:0]  iC;  logic [127:0] oC;
  transmitter #(.N(8), .CODE(2), .FORMAT(5), .NUM_TAPS(7), .F_CARRIER_HZ(0.777e6),
                .F_CLK_HZ(10.0e6)) dut_c (.clk, .reset(rC), .in(iC), .tvalid(tC), .out(oC));
  tx_check #(.N(8), .CODE(2), .FORMAT(5), .NUM_TAPS(7), .F_CARRIER_HZ(0.777e6),
             .F_CLK_HZ(10.0e6), .NWORDS(100)) chk_c (
    .clk, .reset(rC), .in(iC), .tvalid(tC), .out(oC), .done(done[2]), .checks(c[2]),
    .failures(f[2]), .n_words(nw[2]), .n_latency_ok(nl[2]), .n_restart(nr[2]), .n_full_rate(fr[2]), .max_err(me[2]));

  // D: 256-QAM, uncoded, N = 4
  logic         rD, tD;  logic [31:0]  iD;  logic [63:0]  oD;
  transmitter #(.N(4), .CODE(1), .FORMAT(8), .NUM_TAPS(3), .F_CARRIER_HZ(3.1e6),
                .F_CLK_HZ(10.0e6)) dut_d (.clk, .reset(rD), .in(iD), .tvalid(tD), .out(oD));
  tx_check #(.N(4), .CODE(1), .FORMAT(8), .NUM_TAPS(3), .F_CARRIER_HZ(3.1e6),
             .F_CLK_HZ(10.0e6), .NWORDS(100)) chk_d (
    .clk, .reset(rD), .in(iD), .tvalid(tD), .out(oD), .done(done[3]), .checks(c[3]),
    .failures(f[3]), .n_words(nw[3]), .n_latency_ok(nl[3]), .n_restart(nr[3]), .n_full_rate(fr[3]), .max_err(me[3]));

  int checks, failures;

  task automatic mech(input string name, input int count);
    checks++;
    $display("mechanism %-34s : %0d", name, count);
    if (count == 0) begin failures++; $display("  never happened"); end
  endtask

  function automatic void sum_up();
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin
    repeat (2) @(posedge clk);   // let the checkers clear their outputs
    wait (done[0] && done[1] && done[2] && done[3]);
    sum_up();
    mech("rate 1/2 coded words", nw[0] + nw[2]);
    mech("rate 1/3 coded words", nw[1]);
    mech("uncoded words", nw[3]);
    mech("rectangular (32-QAM) words", nw[2]);
    mech("pipeline fills with correct latency", nl[0] + nl[1] + nl[2] + nl[3]);
    mech("mid-stream reset and restart", nr[0]);
    mech("back-to-back words (1 per clock)", fr[0] + fr[1] + fr[2] + fr[3]);
    for (int i = 0; i < NC; i++) $display("configuration %0d: max error %f LSB", i, me[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    sum_up();
    $display("tb_transmitter: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
