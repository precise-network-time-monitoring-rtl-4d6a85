// tb_pntm_top: end-to-end test of the PNTM timestamper with real clocks.
//
// clk_a (16 ns), clk_pll (16 ns * (N+1)/N) and a non-syntonized clk_b are
// generated with femtosecond timing. Frames (idle, /S/, preamble, payload,
// /T/) are sent on the decoded 16-bit stream with /S/ in either lane and
// random lengths and gaps, including bursts. For every frame the bench
// notes the clk_b edge at which /S/ is sampled and works out, from its own
// clock edges, the expected timestamp:
//   time of that edge on the time-counter scale + lane * 8 ns - D_RX
// and compares it with the design's result (tolerance TOL_FS; when the
// clk_b edge lies within EDGE_FS of a clk_a edge a whole-cycle slip is
// also accepted and counted). Runs: mean mode at +62.5 ppm, single-period
// mode, then mean mode at -50 ppm. Counted mechanisms, each must occur:
// lane 0 and lane 1 starts, mean and single-period modes, frames dropped
// before calibration, a second rollover inside the timestamps, a negative
// k (frame inside the DDMTD pipeline latency), several frames waiting on
// the same slow-clock edge, and a sub-cycle phase wrap.
// Parameters are reduced (N = 256, 4-period mean, short "second") to keep
// the run short.
`timescale 1fs/1fs
module tb_pntm_top;
  import pntm_pkg::*;

  localparam int unsigned N     = 256;
  localparam int unsigned TA    = 16_000_000;
  localparam int unsigned CPS   = 20_000;
  localparam int unsigned AVG_M = 4;
  localparam int unsigned THR   = 8;
  localparam longint      TP    = longint'(TA) * (N + 1) / N;
  localparam longint      ONE_S = longint'(CPS) * TA;
  localparam longint      TAL     = longint'(TA);
  localparam longint      TOL_FS  = 250_000;
  localparam longint      EDGE_FS = 400_000;

  logic clk_a = 0, clk_b = 0, clk_pll = 0, rst_n = 1;
  longint tb_half = 7_999_500;     // clk_b half period, changed at run time

  initial forever #(TA/2) clk_a = ~clk_a;
  initial forever #(TP/2) clk_pll = ~clk_pll;
  initial begin
    #3_333_333;
    forever #(tb_half) clk_b = ~clk_b;
  end

  logic             rx_valid = 0;
  logic [15:0]      rx_data = 16'hBC50;
  logic [1:0]       rx_k = 2'b10;
  logic             time_set = 0;
  logic [SEC_W-1:0] time_set_sec = '0;
  logic [CYC_W-1:0] time_set_cycles = '0;
  logic             use_mean = 1;
  logic [4:0]       bitslide = 5'd3;
  logic [31:0]      fixed_delay_fs = 32'd1_234_567;
  logic             pps, ts_valid, calibrated, phase_valid;
  logic [SEQ_W-1:0] ts_seq;
  logic [SEC_W-1:0] ts_sec;
  logic [FS_W-1:0]  ts_fs;
  logic [31:0]      ts_delta_fs, phase_fs;
  logic [15:0]      unmatched, drops;
  logic [TAG_W-1:0] n_cycles;

  pntm_top #(.N(N), .T_A_FS(TA), .CYCLES_PER_SEC(CPS), .AVG_M(AVG_M),
             .THRESH(THR), .DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_lane0 = 0, n_lane1 = 0, n_mean = 0, n_inst = 0, n_uncal = 0;
  int n_rollover = 0, n_negk = 0, n_shared = 0, n_wrap = 0, n_slip = 0;

  // time-counter origin
  longint t_set;
  localparam longint S0 = 5, C0 = CPS - 6000;

  // expected timestamps, by frame number
  longint exp_fs [4096];
  longint exp_near [4096];
  bit     exp_mean [4096];
  int     sent = 0, sent_cal = 0, got = 0;
  longint max_err = 0;
  bit     started = 0;

  function automatic longint rx_delay();
    return longint'(bitslide) * 800_000 + longint'(fixed_delay_fs);
  endfunction

  task automatic send_word(input logic [15:0] d, input logic [1:0] k);
    @(negedge clk_b);
    rx_data = d;
    rx_k    = k;
  endtask

  task automatic send_frame(input bit lane, input int bytes);
    longint ts, da;
    // /S/ word, sampled at the next rising edge of clk_b
    if (lane == 0) send_word(16'hFB55, 2'b10);
    else           send_word(16'hF7FB, 2'b11);
    @(posedge clk_b);
    ts = $time;
    // time on the counter scale: the clk_a edge at t_set reads S0 s + C0 cycles
    exp_fs[sent % 4096] = S0 * ONE_S + C0 * TA + (ts - t_set)
                          + (lane ? 64'sd8_000_000 : 64'sd0) - rx_delay();
    // distance of the clk_b edge to the nearest clk_a edge
    da = (ts - TA/2) % TA;
    exp_near[sent % 4096] = (da < TA - da) ? da : TA - da;
    exp_mean[sent % 4096] = use_mean;
    if (calibrated) sent_cal++;
    else            n_uncal++;
    if (lane) n_lane1++; else n_lane0++;
    sent++;
    for (int i = 0; i < bytes / 2; i++) send_word(16'(($urandom & 16'hFFFF)), 2'b00);
    send_word(16'hFDF7, 2'b11);                       // /T/ /R/
  endtask

  task automatic idle(input int words);
    for (int i = 0; i < words; i++) send_word(16'hBC50, 2'b10);
  endtask

  // compare every timestamp
  always @(posedge clk_a) if (ts_valid && started) begin
    longint got_fs, e, err;
    int idx;
    idx    = int'(ts_seq) % 4096;
    got_fs = longint'(ts_sec) * ONE_S + longint'(ts_fs);
    e      = exp_fs[idx];
    err    = got_fs - e;
    got++;
    checks++;
    if (ts_sec != SEC_W'(S0)) n_rollover++;
    if (exp_mean[idx]) n_mean++; else n_inst++;
    if (err <= TOL_FS && err >= -TOL_FS) begin
      if (err > max_err) max_err = err;
      if (-err > max_err) max_err = -err;
    end else if (exp_near[idx] < EDGE_FS &&
                 ((err - TAL <= TOL_FS && err - TAL >= -TOL_FS) ||
                  (err + TAL <= TOL_FS && err + TAL >= -TOL_FS))) begin
      n_slip++;
    end else begin
      failures++;
      $display("FAIL at %0t frame %0d: got %0d fs expected %0d fs (err %0d fs, near %0d)",
               $time, ts_seq, got_fs, e, err, exp_near[idx]);
    end
  end

  // internal events
  logic [TAG_W-1:0] last_delta_hi;
  always @(posedge clk_pll) begin
    if (dut.u_tags.res_valid && dut.u_tags.res_ready &&
        (dut.u_tags.res.k_a < 0 || dut.u_tags.res.k_b < 0)) n_negk++;
    if (dut.u_tags.q_pop && dut.u_tags.u_q.rd_valid &&
        (dut.u_tags.u_q.wp - dut.u_tags.u_q.rp) > 1) n_shared++;
  end
  logic [31:0] prev_delta = 0;
  always @(posedge clk_a) if (ts_valid && started) begin
    if ((prev_delta > TA*3/4 && ts_delta_fs < TA/4) || (prev_delta < TA/4 && ts_delta_fs > TA*3/4)) n_wrap++;
    prev_delta = ts_delta_fs;
  end

  task automatic traffic(input int frames);
    for (int f = 0; f < frames; f++) begin
      send_frame(1'($urandom % 2), 46 + int'($urandom % 120));
      if ($urandom % 8 == 0) idle(6);                 // burst: minimum gap
      else idle(6 + int'($urandom % 400));
    end
  endtask

  task automatic wait_cal();
    // two full averaging windows after a change
    repeat ((AVG_M * 2 + 3) * N) @(posedge clk_pll);
  endtask

  task automatic expect_mech(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", name);
    end else $display("mechanism %-24s seen %0d times", name, n);
  endtask

  initial begin
    #1000 rst_n = 0;                 // asynchronous reset needs an edge
    repeat (5) @(posedge clk_a);
    rx_valid = 1;
    rst_n = 1;
    started = 1;
    repeat (10) @(posedge clk_a);
    @(negedge clk_a);
    time_set = 1; time_set_sec = SEC_W'(S0); time_set_cycles = CYC_W'(C0);
    @(posedge clk_a);
    t_set = $time;
    #1;
    time_set = 0;
    // frames before the DDMTD is calibrated are dropped
    traffic(3);
    wait (calibrated);
    repeat (N) @(posedge clk_pll);
    // run 1: mean mode, clk_b +62.5 ppm
    traffic(150);
    // run 2: single-period values
    use_mean = 0;
    wait_cal();
    traffic(100);
    // run 3: mean mode, clk_b -50 ppm
    use_mean = 1;
    tb_half = 8_000_400;
    wait_cal();
    traffic(150);
    repeat (3 * N) @(posedge clk_pll);
    repeat (50) @(posedge clk_a);

    // every calibrated frame gives one timestamp; earlier ones are dropped
    checks++;
    if (got < sent_cal || got > sent) begin
      failures++;
      $display("FAIL %0d timestamps for %0d frames (%0d after calibration)", got, sent, sent_cal);
    end
    checks++;
    if (drops == 0 || unmatched == 0) begin
      failures++;
      $display("FAIL drops %0d unmatched %0d", drops, unmatched);
    end
    expect_mech("lane 0 start", n_lane0);
    expect_mech("lane 1 start", n_lane1);
    expect_mech("mean mode", n_mean);
    expect_mech("single-period mode", n_inst);
    expect_mech("dropped before calibration", n_uncal);
    expect_mech("second rollover", n_rollover);
    expect_mech("negative k", n_negk);
    expect_mech("frames sharing an edge", n_shared);
    expect_mech("sub-cycle phase wrap", n_wrap);
    $display("frames %0d timestamps %0d whole-cycle slips at clk edges %0d, largest error %0d fs", sent, got, n_slip, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20_000_000_000_000);      // 20 ms of simulated time
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
