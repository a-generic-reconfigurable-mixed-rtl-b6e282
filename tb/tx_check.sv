// tx_check: stimulus and scoreboard for one transmitter instance.
//
// It drives reset and random input words, and runs a floating-point model of
// the whole chain for every word the transmitter takes: per-lane
// convolutional encoding, Gray mapping, exact DFT, the SRRC response computed
// from its formula, exact IDFT with 1/N, and modulation by the DDS carrier
// (phase quantised to the 1024-entry table, as the hardware must).  Every
// sample delivered with tvalid is compared with the model within TOL LSB.
// It measures the reset-to-tvalid latency (expected 2*log2(N) + 12 clocks),
// and, if RESET_AT >= 0, resets the transmitter in mid-stream after that many
// words and checks that tvalid drops and the output restarts cleanly.
// Once tvalid is up it must stay up: one word of N samples per clock.
// Counters of what happened are brought out for the testbench.
module tx_check
  import tx_ref_pkg::*;
#(
  parameter int  N            = 8,
  parameter int  CODE         = 2,
  parameter int  FORMAT       = 4,
  parameter int  NUM_TAPS     = 7,
  parameter real ROLLOFF      = 0.5,
  parameter int  OSF          = 2,
  parameter real F_CARRIER_HZ = 100.0,
  parameter real F_CLK_HZ     = 202.96e6,
  parameter int  NWORDS       = 100,
  parameter int  RESET_AT     = -1,
  parameter real TOL          = 6.0
) (
  input  logic                     clk,
  output logic                     reset,
  output logic [N*FORMAT/CODE-1:0] in,
  input  logic                     tvalid,
  input  logic [16*N-1:0]          out,
  output logic                     done,
  output int                       checks,
  output int                       failures,
  output int                       n_words,      // words compared
  output int                       n_latency_ok, // tvalid rises with the expected latency
  output int                       n_restart,    // clean restarts after a mid-stream reset
  output int                       n_full_rate,  // clocks with back-to-back output words
  output real                      max_err
);
  localparam int LANES = N * FORMAT / CODE;
  localparam int LAT   = 2 * $clog2(N) + 12;
  localparam int IB    = (FORMAT + 1) / 2;
  localparam int QB    = FORMAT / 2;
  localparam real G    = 32767.0 / 32768.0;   // gain of a Q1.15 "1.0"

  typedef struct { real v[N]; } exp_t;
  exp_t   q[$];
  bit     hist [LANES][8];
  real    h [];
  longint fcw, w;
  int     cyc = 0, start_cyc = -1;
  bit     restarted = 0, prev_tvalid = 0, stopped = 0;
  int     n_target = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic exp_t model(input logic [LANES-1:0] bits, input longint word);
    exp_t e;
    logic [N*FORMAT-1:0] enc;
    real xr[], xi[], fr[], fi[], yr[], yi[];
    int  step;
    step = map_step(N, FORMAT);
    for (int j = 0; j < LANES; j++) begin
      for (int i = 7; i > 0; i--) hist[j][i] = hist[j][i-1];
      hist[j][0] = bits[j];
      for (int c = 0; c < CODE; c++) enc[j*CODE + c] = 1'(enc_bit(CODE, c, hist[j]));
    end
    xr = new[N]; xi = new[N];
    for (int i = 0; i < N; i++) begin
      int s;
      s = int'(enc[i*FORMAT +: FORMAT]);
      xr[i] = gray_level(s >> QB, IB, step);
      xi[i] = gray_level(s & ((1 << QB) - 1), QB, step);
    end
    dft(xr, xi, -1, fr, fi);
    for (int k = 0; k < N; k++) begin
      fr[k] = fr[k] * h[k] * G * G;
      fi[k] = fi[k] * h[k] * G * G;
    end
    dft(fr, fi, +1, yr, yi);
    for (int i = 0; i < N; i++) begin
      longint ph;
      real    th;
      ph = ((word * N + i) * fcw) % 64'h1_0000_0000;
      th = 2.0 * PI * real'(ph >> 22) / 1024.0;
      e.v[i] = (yr[i] * $cos(th) - yi[i] * $sin(th)) * G * G / N;
    end
    return e;
  endfunction

  // Scoreboard, sampled between clock edges.
  always @(negedge clk) begin
    if (stopped) begin end
    else if (tvalid && !prev_tvalid && start_cyc >= 0) begin
      checks++;
      if (cyc - start_cyc == LAT) n_latency_ok++;
      else begin
        failures++;
        $display("tx N=%0d F=%0d C=%0d: tvalid after %0d clocks, expected %0d",
                 N, FORMAT, CODE, cyc - start_cyc, LAT);
      end
      if (restarted) begin n_restart++; restarted = 0; end
    end
    // Throughput: once the pipeline is full, one word leaves every clock.
    if (!stopped && !reset && prev_tvalid && !tvalid) begin
      failures++;
      $display("tx N=%0d F=%0d C=%0d: tvalid dropped while input was flowing", N, FORMAT, CODE);
    end
    if (!stopped && !reset && prev_tvalid && tvalid) n_full_rate++;
    prev_tvalid = tvalid;
    if (tvalid && !stopped) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("tx N=%0d F=%0d C=%0d: tvalid with no word outstanding", N, FORMAT, CODE);
      end else begin
        e = q.pop_front();
        for (int i = 0; i < N; i++) begin
          real d;
          d = fabs(real'($signed(out[16*i +: 16])) - e.v[i]);
          if (d > max_err) max_err = d;
          checks++;
          if (d > TOL) begin
            failures++;
            if (failures < 20)
              $display("tx N=%0d F=%0d C=%0d word %0d lane %0d: %0d vs %f", N, FORMAT, CODE,
                       n_words, i, $signed(out[16*i +: 16]), e.v[i]);
          end
        end
        n_words++;
      end
    end
  end

  task automatic do_reset(input int cycles);
    reset = 1;
    repeat (cycles) @(negedge clk);
    checks++;
    if (tvalid) begin failures++; $display("tx: tvalid high during reset"); end
    q.delete();
    foreach (hist[j, i]) hist[j][i] = 0;
    w = 0;
    prev_tvalid = 0;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_words = 0; n_full_rate = 0; n_latency_ok = 0; n_restart = 0;
    max_err = 0.0;
    filter_resp(N, NUM_TAPS, ROLLOFF, OSF, h);
    fcw = longint'($floor(F_CARRIER_HZ / (F_CLK_HZ * N) * 4294967296.0 + 0.5));
    in = '0;
    do_reset(3);
    // The transmitter takes a word every clock until it is reset, so words
    // keep flowing (and are modelled) until the last counted one is out.
    for (int k = 0; k < NWORDS + LAT + 2; k++) begin
      if (k == RESET_AT) begin
        do_reset(3);
        restarted = 1;
        n_target = n_words;
      end
      reset = 0;
      for (int j = 0; j < LANES; j++) in[j] = 1'($urandom);
      if (w == 0) start_cyc = cyc;
      q.push_back(model(in, w));
      w++;
      @(negedge clk);
    end
    stopped = 1;
    checks++;
    // words taken after the reset (or from the start) minus those in flight
    if (n_words - n_target < NWORDS - (RESET_AT >= 0 ? RESET_AT : 0)) begin
      failures++;
      $display("tx N=%0d F=%0d C=%0d: only %0d words came out", N, FORMAT, CODE, n_words);
    end
    done = 1;
  end
endmodule
