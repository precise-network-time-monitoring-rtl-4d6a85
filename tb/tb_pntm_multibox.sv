// tb_pntm_multibox: two synchronized timestampers (A and B) stamping the
// same frames from an asynchronous sender, at the default size (no
// parameter changed), and the sweep of sender frequency offsets of a
// relative comparison T_B - T_A.
//
// The sender clock runs at 62.5 MHz plus an offset given, as is usual for
// 1 Gb/s links, in Hz at 125 MHz: +509, +190, -120 and -415 Hz (about
// +-4 ppm; more values can be added to DF_HZ, each adds two averaging
// windows of simulated time). The frames are split to both boxes; each box
// recovers the sender clock behind its own reception delay (bitslide
// steps plus a fixed delay), and each box is told its own delay. The local
// references of the two boxes have the same frequency, but B's clk_a edges
// come SYNC_OFF_FS later than A's (a synchronization offset), and each
// box's helper clock has its own phase. Both time counters are loaded with
// the same value at their own clk_a edge.
//
// Every timestamp of each box is checked against the time of the clk_b
// edge that sampled /S/ on that box's time scale, minus its delay
// (tolerance TOL_FS; a whole-cycle slip is accepted only when that edge is
// within EDGE_FS of a clk_a edge of the box). For each frequency offset the
// bench prints the mean and spread of T_B - T_A, which must equal
// -SYNC_OFF_FS within TOL_FS: the delays of the two paths are removed and
// the frequency offset of the sender leaves no trace.
`timescale 1fs/1fs
module tb_pntm_multibox;
  import pntm_pkg::*;

  localparam int unsigned N       = 16384;
  localparam int unsigned TA      = 16_000_000;
  localparam int unsigned CPS     = 62_500_000;
  localparam int unsigned AVG_M   = 100;
  localparam longint      ONE_S   = longint'(CPS) * TA;
  localparam longint      TAL     = longint'(TA);
  localparam longint      TOL_FS  = 12_000;
  localparam longint      EDGE_FS = 30_000;
  localparam longint      SYNC_OFF_FS = 170_000;
  localparam longint      PLL_OFF_FS  = 3_700_000;   // helper clock phase of box B
  localparam int          STEPS  = 4;
  localparam int          FRAMES = 40;
  localparam real         DF_HZ [STEPS] = '{509.0, 190.0, -120.0, -415.0};

  // reception delays of the two boxes
  localparam logic [4:0]  BS_A = 5'd12, BS_B = 5'd7;
  localparam longint      FIX_A = 1_000_000, FIX_B = 2_345_678;
  localparam longint      D_A = longint'(BS_A) * 800_000 + FIX_A;
  localparam longint      D_B = longint'(BS_B) * 800_000 + FIX_B;

  logic clk_aa = 0, clk_ab = 0, clk_pa = 0, clk_pb = 0, clk_ba = 0, clk_bb = 0;
  logic clk_tx = 0;
  logic rst_n = 1;
  real  df_hz = 509.0;

  // local references: B is SYNC_OFF_FS late
  initial forever #(TA/2) clk_aa = ~clk_aa;
  initial begin
    #(SYNC_OFF_FS);
    forever #(TA/2) clk_ab = ~clk_ab;
  end
  // helper clocks: half period 8 000 488.28125 fs, edges placed exactly
  initial begin
    longint k = 0;
    forever begin
      k++;
      #((k * 64'd262_160_000_000) / 64'd32768 - $time);
      clk_pa = ~clk_pa;
    end
  end
  initial begin
    longint k = 0;
    forever begin
      k++;
      #(PLL_OFF_FS + (k * 64'd262_160_000_000) / 64'd32768 - $time);
      clk_pb = ~clk_pb;
    end
  end
  // sender clock and the two recovered copies: the same edge sequence,
  // each copy delayed by its box's reception delay
  task automatic run_clock(input longint delay, ref logic clk);
    real t;
    t = 3_333_333.0;
    forever begin
      t = t + 8.0e6 * 125.0e6 / (125.0e6 + df_hz);
      #(longint'(t) + delay - $time);
      clk = ~clk;
    end
  endtask
  initial run_clock(0, clk_tx);
  initial run_clock(D_A, clk_ba);
  initial run_clock(D_B, clk_bb);

  // line stream: the sender writes one word per cycle, each box reads the
  // same word index on its own recovered clock
  logic [15:0] line_d [256];
  logic [1:0]  line_k [256];
  logic        line_s [256];           // word carries /S/
  int          tx_idx = 0;
  initial for (int i = 0; i < 256; i++) begin
    line_d[i] = 16'hBC50; line_k[i] = 2'b10; line_s[i] = 1'b0;
  end

  logic             rx_valid = 0;
  logic [15:0]      rxd_a = 16'hBC50, rxd_b = 16'hBC50;
  logic [1:0]       rxk_a = 2'b10, rxk_b = 2'b10;
  logic             set_a = 0, set_b = 0;
  localparam longint S0 = 3, C0 = CPS - 400_000;

  logic             pps_a, pps_b, tsv_a, tsv_b, cal_a, cal_b, phv_a, phv_b;
  logic [SEQ_W-1:0] seq_a, seq_b;
  logic [SEC_W-1:0] sec_a, sec_b;
  logic [FS_W-1:0]  fs_a, fs_b;
  logic [31:0]      dl_a, dl_b, ph_a, ph_b;
  logic [15:0]      um_a, um_b, dr_a, dr_b;
  logic [TAG_W-1:0] nc_a, nc_b;

  pntm_top box_a (
    .clk_a(clk_aa), .clk_b(clk_ba), .clk_pll(clk_pa), .rst_n,
    .rx_valid, .rx_data(rxd_a), .rx_k(rxk_a),
    .time_set(set_a), .time_set_sec(SEC_W'(S0)), .time_set_cycles(CYC_W'(C0)), .pps(pps_a),
    .use_mean(1'b1), .bitslide(BS_A), .fixed_delay_fs(32'(FIX_A)),
    .ts_valid(tsv_a), .ts_seq(seq_a), .ts_sec(sec_a), .ts_fs(fs_a), .ts_delta_fs(dl_a),
    .unmatched(um_a), .calibrated(cal_a), .drops(dr_a),
    .n_cycles(nc_a), .phase_fs(ph_a), .phase_valid(phv_a));

  pntm_top box_b (
    .clk_a(clk_ab), .clk_b(clk_bb), .clk_pll(clk_pb), .rst_n,
    .rx_valid, .rx_data(rxd_b), .rx_k(rxk_b),
    .time_set(set_b), .time_set_sec(SEC_W'(S0)), .time_set_cycles(CYC_W'(C0)), .pps(pps_b),
    .use_mean(1'b1), .bitslide(BS_B), .fixed_delay_fs(32'(FIX_B)),
    .ts_valid(tsv_b), .ts_seq(seq_b), .ts_sec(sec_b), .ts_fs(fs_b), .ts_delta_fs(dl_b),
    .unmatched(um_b), .calibrated(cal_b), .drops(dr_b),
    .n_cycles(nc_b), .phase_fs(ph_b), .phase_valid(phv_b));

  // sender: next word on each falling edge of clk_tx
  logic [15:0] next_d = 16'hBC50;
  logic [1:0]  next_k = 2'b10;
  logic        next_s = 1'b0;
  always @(negedge clk_tx) begin
    tx_idx <= tx_idx + 1;
    line_d[(tx_idx + 1) % 256] <= next_d;
    line_k[(tx_idx + 1) % 256] <= next_k;
    line_s[(tx_idx + 1) % 256] <= next_s;
  end

  int     checks = 0, failures = 0;
  longint t_set_a, t_set_b;
  longint exp_a [4096], exp_b [4096], near_a [4096], near_b [4096];
  longint got_a [4096], got_b [4096];
  bit     ok_a [4096], ok_b [4096];
  int     frame = 0, n_slip = 0, n_roll = 0;
  bit     started = 0;

  // box readers: /S/ word driven on the falling edge, sampled on the next
  // rising edge; record that edge on the box's time scale
  int rd_a = 0, rd_b = 0;
  int fa = 0, fb = 0;
  bit pend_a = 0, pend_b = 0;
  always @(negedge clk_ba) begin
    rd_a  <= rd_a + 1;
    rxd_a <= line_d[(rd_a + 1) % 256];
    rxk_a <= line_k[(rd_a + 1) % 256];
    pend_a <= line_s[(rd_a + 1) % 256];
  end
  always @(negedge clk_bb) begin
    rd_b  <= rd_b + 1;
    rxd_b <= line_d[(rd_b + 1) % 256];
    rxk_b <= line_k[(rd_b + 1) % 256];
    pend_b <= line_s[(rd_b + 1) % 256];
  end
  always @(posedge clk_ba) if (pend_a) begin
    longint da;
    exp_a[fa % 4096] = S0 * ONE_S + C0 * TA + ($time - t_set_a)
                       + (rxd_a[15:8] == 8'hFB ? 64'sd0 : 64'sd8_000_000) - D_A;
    da = ($time - TA/2) % TA;
    near_a[fa % 4096] = (da < TA - da) ? da : TA - da;
    fa++;
  end
  always @(posedge clk_bb) if (pend_b) begin
    longint db;
    exp_b[fb % 4096] = S0 * ONE_S + C0 * TA + ($time - t_set_b)
                       + (rxd_b[15:8] == 8'hFB ? 64'sd0 : 64'sd8_000_000) - D_B;
    db = ($time - TA/2 - SYNC_OFF_FS) % TA;
    near_b[fb % 4096] = (db < TA - db) ? db : TA - db;
    fb++;
  end

  // each box against its own truth
  function automatic bit judge(input string box, input int idx, input longint got,
                               input longint e, input longint near);
    longint err;
    err = got - e;
    if (err <= TOL_FS && err >= -TOL_FS) return 1'b1;
    if (near < EDGE_FS && ((err - TAL <= TOL_FS && err - TAL >= -TOL_FS) ||
                           (err + TAL <= TOL_FS && err + TAL >= -TOL_FS))) begin
      n_slip++;
      return 1'b0;
    end
    failures++;
    $display("FAIL box %s frame %0d: got %0d fs expected %0d fs (err %0d fs)", box, idx, got, e, err);
    return 1'b0;
  endfunction

  always @(posedge clk_aa) if (tsv_a && started) begin
    int i;
    i = int'(seq_a) % 4096;
    got_a[i] = longint'(sec_a) * ONE_S + longint'(fs_a);
    checks++;
    ok_a[i] = judge("A", i, got_a[i], exp_a[i], near_a[i]);
    if (sec_a != SEC_W'(S0)) n_roll++;
  end
  always @(posedge clk_ab) if (tsv_b && started) begin
    int i;
    i = int'(seq_b) % 4096;
    got_b[i] = longint'(sec_b) * ONE_S + longint'(fs_b);
    checks++;
    ok_b[i] = judge("B", i, got_b[i], exp_b[i], near_b[i]);
  end

  task automatic tx_word(input logic [15:0] d, input logic [1:0] k, input bit s);
    @(posedge clk_tx);
    next_d = d; next_k = k; next_s = s;
  endtask

  task automatic send_frame(input bit lane);
    if (lane == 0) tx_word(16'hFB55, 2'b10, 1'b1);
    else           tx_word(16'hF7FB, 2'b11, 1'b1);
    for (int i = 0; i < 25 + int'($urandom % 80); i++) tx_word(16'(($urandom & 16'hFFFF)), 2'b00, 1'b0);
    tx_word(16'hFDF7, 2'b11, 1'b0);
    for (int i = 0; i < 6 + int'($urandom % 400); i++) tx_word(16'hBC50, 2'b10, 1'b0);
    frame++;
  endtask

  initial begin
    real sum, sum2, m, sd;
    int  n, first;
    #1000 rst_n = 0;
    repeat (5) @(posedge clk_aa);
    rst_n = 1;
    started = 1;
    rx_valid = 1;
    repeat (10) @(posedge clk_aa);
    // load both time counters with the same value at their own edge
    fork
      begin
        @(negedge clk_aa); set_a = 1; @(posedge clk_aa); t_set_a = $time; #1 set_a = 0;
      end
      begin
        @(negedge clk_ab); set_b = 1; @(posedge clk_ab); t_set_b = $time; #1 set_b = 0;
      end
    join
    wait (cal_a && cal_b);
    repeat (N) @(posedge clk_pa);
    // frames only after both boxes are calibrated: the frame numbers of the
    // two boxes stay equal
    for (int s = 0; s < STEPS; s++) begin
      if (s > 0) begin
        repeat (2 * N) @(posedge clk_pa);
        df_hz = DF_HZ[s];
        repeat ((2 * AVG_M + 3) * N) @(posedge clk_pa);
      end
      first = frame;
      for (int f = 0; f < FRAMES; f++) send_frame(1'($urandom % 2));
      repeat (2 * N) @(posedge clk_pa);
      repeat (20) @(posedge clk_aa);
      sum = 0; sum2 = 0; n = 0;
      for (int f = first; f < frame; f++) begin
        if (ok_a[f % 4096] && ok_b[f % 4096]) begin
          real d;
          d = real'(got_b[f % 4096] - got_a[f % 4096]);
          sum += d; sum2 += d * d; n++;
        end
        ok_a[f % 4096] = 0; ok_b[f % 4096] = 0;
      end
      checks++;
      if (n < FRAMES / 2) begin
        failures++;
        $display("FAIL offset %0.0f Hz: only %0d frames compared", DF_HZ[s], n);
      end else begin
        m  = sum / n;
        sd = $sqrt(sum2 / n - m * m);
        $display("df %6.0f Hz: T_B - T_A = %8.2f ps  std dev %5.2f ps  (%0d frames)", DF_HZ[s], m / 1000.0, sd / 1000.0, n);
        if (m + real'(SYNC_OFF_FS) > real'(TOL_FS) || m + real'(SYNC_OFF_FS) < -real'(TOL_FS)) begin
          failures++;
          $display("FAIL offset %0.0f Hz: T_B - T_A %.2f ps, expected %.2f ps", DF_HZ[s], m / 1000.0, -real'(SYNC_OFF_FS) / 1000.0);
        end
      end
    end
    checks++;
    if (fa != frame || fb != frame) begin
      failures++;
      $display("FAIL frames sent %0d, seen by A %0d, by B %0d", frame, fa, fb);
    end
    $display("frames %0d, whole-cycle slips at clock edges %0d, timestamps after the second boundary %0d", frame, n_slip, n_roll);
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
