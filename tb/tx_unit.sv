// tx_unit: one transmitter configuration with its stimulus/scoreboard
// (tx_check), for testbenches that run several configurations side by side.
// Besides the checker's counters it reports the measured output rate
// (words per clock, from the back-to-back count) and the information
// throughput this gives at clock F_CLK_HZ: N*FORMAT/CODE bits per word.
module tx_unit #(
  parameter int  N            = 16,
  parameter int  CODE         = 2,
  parameter int  FORMAT       = 4,
  parameter int  NUM_TAPS     = 11,
  parameter real F_CARRIER_HZ = 100.0,
  parameter real F_CLK_HZ     = 202.96e6,
  parameter int  NWORDS       = 60
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output real  gbps          // information throughput at F_CLK_HZ, Gb/s
);
  logic                     reset, tvalid;
  logic [N*FORMAT/CODE-1:0] in;
  logic [16*N-1:0]          out;
  int                       nw, nl, nr, fr;
  real                      me;

  transmitter #(.N(N), .CODE(CODE), .FORMAT(FORMAT), .NUM_TAPS(NUM_TAPS),
                .F_CARRIER_HZ(F_CARRIER_HZ), .F_CLK_HZ(F_CLK_HZ)) dut (
    .clk, .reset, .in, .tvalid, .out);

  tx_check #(.N(N), .CODE(CODE), .FORMAT(FORMAT), .NUM_TAPS(NUM_TAPS),
             .F_CARRIER_HZ(F_CARRIER_HZ), .F_CLK_HZ(F_CLK_HZ), .NWORDS(NWORDS)) chk (
    .clk, .reset, .in, .tvalid, .out, .done, .checks, .failures,
    .n_words(nw), .n_latency_ok(nl), .n_restart(nr), .n_full_rate(fr), .max_err(me));

  always @(posedge done) begin
    // fr counts clocks on which a word followed a word, so fr + 1 words came
    // out in fr + 1 clocks once the pipeline was full.
    gbps = real'(N * FORMAT / CODE) * (real'(fr + 1) / real'(nw)) * F_CLK_HZ / 1.0e9;
    $display("N=%0d %0d-QAM rate 1/%0d: %0d words, max error %f LSB, %0.2f Gb/s at %0.2f MHz",
             N, 1 << FORMAT, CODE, nw, me, gbps, F_CLK_HZ / 1.0e6);
  end
endmodule
