// tb_pntm_determinism: repeated link reconnections with different
// transceiver delays, at the default size (no parameter changed).
//
// The sender is synchronous with the local reference: clk_b has exactly
// the clk_a frequency, and its phase follows from the sender's clock phase,
// the fixed delay and the transceiver delay d_phy of each reconnection,
// which moves the recovered clock and the data by whole or partial bit
// times. Each reconnection resets the timestamper, reloads the time
// counters, waits for the drift rates, then sends frames. The transceiver
// model reports the bitslide as d_phy rounded to 800 ps steps; any rest
// (-400 ps for d_phy = 10000 ps, reported as 13 steps) stays in the
// timestamps as a static offset. For every frame the bench knows the line time T1 at which /S/
// arrived, and checks
//   T2 - T1 = d_phy - bitslide * 800 ps           (compensated timestamp)
// and prints, per reconnection, the normalised latency T2 - T1 +
// bitslide * 800 ps, which must equal d_phy.
//
// clk_b edges carry a random white jitter of up to +-JIT_FS. Timestamps
// follow the mean phase of clk_b, so the jitter of a single edge does not
// reach them, but it moves the slow-clock edges and so the measured
// periods and the positions of the slow edges. The last two reconnections
// use the same d_phy in mean mode and in single-period mode, with frames
// spread over several slow periods; both must meet the tolerance, and the
// spread (sigma) of each run is printed. With white edge jitter the slow
// edge position disturbs k as much as the period, so the two modes come
// out close; the bench does not rank them.
`timescale 1fs/1fs
module tb_pntm_determinism;
  import pntm_pkg::*;

  localparam int unsigned N      = 16384;
  localparam int unsigned TA     = 16_000_000;
  localparam int unsigned CPS    = 62_500_000;
  localparam longint      ONE_S  = longint'(CPS) * TA;
  localparam longint      TAL    = longint'(TA);
  localparam longint      TOL_FS = 12_000;
  localparam longint      JIT_FS = 2_000;
  localparam longint      TX_PHASE = 3_300_000;  // sender clock edge after a clk_a edge
  localparam longint      FIXED    = 1_234_567;  // SFP and circuit delay
  localparam int          RUNS = 8;
  localparam int          FRAMES = 50;

  // d_phy of each reconnection (ps) and mode; the last one is single-period
  localparam longint D_PHY [RUNS] = '{10000, 9600, 9600, 9600, 8000, 8000, 800, 800};
  localparam bit     MEAN  [RUNS] = '{1, 1, 1, 1, 1, 1, 1, 0};

  logic clk_a = 0, clk_b = 0, clk_pll = 0, rst_n = 1;
  longint phi_b = 0;                   // clk_b rising-edge phase, set per run

  initial forever #(TA/2) clk_a = ~clk_a;
  // clk_pll: half period 8 000 488.28125 fs, edges placed exactly
  initial begin
    longint k = 0;
    forever begin
      k++;
      #((k * 64'd262_160_000_000) / 64'd32768 - $time);
      clk_pll = ~clk_pll;
    end
  end
  // clk_b: edges on the grid phi_b + n * 8 ns, each moved by a random
  // jitter; a change of phi_b (reconnection) moves the grid
  longint phi_used = -1;
  initial begin
    longint g, t;
    g = 0;
    forever begin
      if (phi_b != phi_used) begin
        phi_used = phi_b;
        g = phi_b + (($time - phi_b) / (TAL / 2)) * (TAL / 2);
      end
      g = g + TAL / 2;
      t = g + longint'($urandom % (2 * JIT_FS + 1)) - JIT_FS;
      if (t <= $time) t = $time + 1;
      #(t - $time);
      clk_b = ~clk_b;
    end
  end

  logic             rx_valid = 0;
  logic [15:0]      rx_data = 16'hBC50;
  logic [1:0]       rx_k = 2'b10;
  logic             time_set = 0;
  logic [SEC_W-1:0] time_set_sec = '0;
  logic [CYC_W-1:0] time_set_cycles = '0;
  logic             use_mean = 1;
  logic [4:0]       bitslide = '0;
  logic [31:0]      fixed_delay_fs = 32'(FIXED);
  logic             pps, ts_valid, calibrated, phase_valid;
  logic [SEQ_W-1:0] ts_seq;
  logic [SEC_W-1:0] ts_sec;
  logic [FS_W-1:0]  ts_fs;
  logic [31:0]      ts_delta_fs, phase_fs;
  logic [15:0]      unmatched, drops;
  logic [TAG_W-1:0] n_cycles;

  pntm_top dut (.*);

  int checks = 0, failures = 0;

  localparam longint S0 = 7, C0 = 1000;
  longint t_set;
  longint t1 [4096];                  // line time of each frame, counter scale
  int     sent = 0, got = 0, run = 0;
  bit     checking = 0;
  real    sum_e [RUNS], sum_e2 [RUNS], sum_lat [RUNS];
  int     cnt [RUNS];

  // the stream changes on falling edges of clk_b
  task automatic send_word_b(input logic [15:0] d, input logic [1:0] k);
    @(negedge clk_b);
    rx_data = d;
    rx_k    = k;
  endtask

  task automatic send_frame(input bit lane);
    longint te;
    if (lane == 0) send_word_b(16'hFB55, 2'b10);
    else           send_word_b(16'hF7FB, 2'b11);
    @(posedge clk_b);
    te = $time;
    // /S/ left the fibre d_phy + fixed before the clk_b edge on the ideal
    // grid (jitter belongs to the recovered clock, not to the line)
    te = phi_b + ((te - phi_b + TAL / 4) / (TAL / 2)) * (TAL / 2);
    t1[sent % 4096] = S0 * ONE_S + C0 * TA + (te - t_set)
                      + (lane ? 64'sd8_000_000 : 64'sd0)
                      - D_PHY[run] * 1000 - FIXED;
    sent++;
    for (int i = 0; i < 30 + int'($urandom % 60); i++) send_word_b(16'(($urandom & 16'hFFFF)), 2'b00);
    send_word_b(16'hFDF7, 2'b11);
    for (int i = 0; i < 6 + int'($urandom % 300); i++) send_word_b(16'hBC50, 2'b10);
  endtask

  always @(posedge clk_a) if (ts_valid && checking) begin
    longint t2, err, want, jit_err;
    t2   = longint'(ts_sec) * ONE_S + longint'(ts_fs);
    err  = t2 - t1[int'(ts_seq) % 4096];
    want = D_PHY[run] * 1000 - longint'(bitslide) * 800_000;
    jit_err = err - want;
    got++;
    checks++;
    if (jit_err > TOL_FS || jit_err < -TOL_FS) begin
      failures++;
      $display("FAIL run %0d frame %0d: T2-T1 %0d fs, expected %0d fs", run, ts_seq, err, want);
    end
    sum_e[run]   += real'(jit_err);
    sum_e2[run]  += real'(jit_err) * real'(jit_err);
    sum_lat[run] += real'(err + longint'(bitslide) * 800_000);
    cnt[run]++;
  end

  real sd [RUNS];

  initial begin
    for (run = 0; run < RUNS; run++) begin
      // reconnection: new transceiver delay, new recovered clock phase
      checking = 0;
      rx_valid = 0;
      rst_n    = 0;
      use_mean = MEAN[run];
      bitslide = 5'((D_PHY[run] + 400) / 800);
      phi_b    = (TAL / 2 + TX_PHASE + FIXED + D_PHY[run] * 1000) % TAL;
      sum_e[run] = 0; sum_e2[run] = 0; sum_lat[run] = 0; cnt[run] = 0;
      repeat (5) @(posedge clk_a);
      rst_n = 1;
      repeat (10) @(posedge clk_a);
      @(negedge clk_a);
      time_set = 1; time_set_sec = SEC_W'(S0); time_set_cycles = CYC_W'(C0);
      @(posedge clk_a);
      t_set = $time;
      #1;
      time_set = 0;
      rx_valid = 1;
      sent = 0;
      wait (calibrated);
      repeat (N) @(posedge clk_pll);
      checking = 1;
      for (int f = 0; f < FRAMES; f++) begin
        send_frame(1'($urandom % 2));
        if (f % 10 == 9) repeat (N / 2) @(posedge clk_pll);
      end
      repeat (2 * N) @(posedge clk_pll);
      checking = 0;
      checks++;
      if (cnt[run] != FRAMES) begin
        failures++;
        $display("FAIL run %0d: %0d timestamps for %0d frames", run, cnt[run], FRAMES);
      end
      if (cnt[run] > 0) begin
        real m, l;
        m = sum_e[run] / cnt[run];
        l = sum_lat[run] / cnt[run];
        sd[run] = $sqrt(sum_e2[run] / cnt[run] - m * m);
        $display("run %0d: d_phy %0d ps bitslide %0d %s  normalised T2-T1 %.1f ps  mean error %.2f ps  sigma %.2f ps",
                 run, D_PHY[run], bitslide, MEAN[run] ? "mean  " : "single",
                 l / 1000.0, m / 1000.0, sd[run] / 1000.0);
        // the normalised latency equals d_phy
        checks++;
        if (l / 1000.0 - real'(D_PHY[run]) > 12.0 || l / 1000.0 - real'(D_PHY[run]) < -12.0) begin
          failures++;
          $display("FAIL run %0d: normalised latency %.1f ps, d_phy %0d ps", run, l / 1000.0, D_PHY[run]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd600_000_000_000_000);     // 600 ms of simulated time
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
