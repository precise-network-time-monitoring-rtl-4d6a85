// tb_timestamp_calc: feeds starts of frame (with the time counters set by
// the bench) and DDMTD results with random k and drift rates, including
// frames with no DDMTD result (which must be discarded and counted), and
// checks each timestamp against
//   delta = ((k_a*d_a - k_b*d_b) >> 24) mod T_A        (0 <= delta < T_A)
//   ts    = sec*1s + (cycles - 3)*T_A + lane*8 ns - delta - bitslide*800 ps - fixed
// worked out with the % operator and full-width integers. Cases near the
// start of a second check the borrow into the seconds field.
`timescale 1ns/1ps
module tb_timestamp_calc;
  import pntm_pkg::*;
  localparam longint TA  = 16_000_000;
  localparam int     CPS = 1000;
  localparam longint ONE = CPS * TA;
  logic clk = 0, rst_n = 0, sof = 0, sof_lane = 0;
  logic [SEC_W-1:0] sec = '0;
  logic [CYC_W-1:0] cycles = '0;
  phase_res_t res;
  logic res_valid, res_pop;
  logic [4:0] bitslide = 5'd7;
  logic [31:0] fixed_delay_fs = 32'd2_500_000;
  logic ts_valid;
  logic [SEQ_W-1:0] ts_seq;
  logic [SEC_W-1:0] ts_sec;
  logic [FS_W-1:0] ts_fs;
  logic [31:0] ts_delta_fs;
  logic [15:0] unmatched;
  int checks = 0, failures = 0;
  phase_res_t rq[$];
  longint exp_ts [4096];
  bit     has_res [4096];
  int nframes = 0, nts = 0, nborrow = 0, nskipped = 0;

  timestamp_calc #(.T_A_FS(16_000_000), .CYCLES_PER_SEC(CPS), .DEPTH(32)) dut (
    .clk_a(clk), .rst_n, .sof, .sof_lane, .sec, .cycles, .res, .res_valid, .res_pop,
    .bitslide, .fixed_delay_fs, .ts_valid, .ts_seq, .ts_sec, .ts_fs, .ts_delta_fs, .unmatched);
  always #8 clk = ~clk;

  assign res_valid = rq.size() > 0;
  assign res       = res_valid ? rq[0] : '0;
  always @(posedge clk) if (res_pop && rq.size() > 0) void'(rq.pop_front());

  always @(posedge clk) if (rst_n && ts_valid) begin
    longint got;
    got = longint'(ts_sec) * ONE + longint'(ts_fs);
    nts++;
    checks++;
    if (!has_res[ts_seq] || got != exp_ts[ts_seq] || ts_fs >= FS_W'(ONE)) begin
      failures++;
      $display("FAIL seq %0d got %0d expected %0d", ts_seq, got, exp_ts[ts_seq]);
    end
  end

  task automatic frame(input longint s, input longint c, input bit lane, input bit with_res);
    phase_res_t r;
    longint ka, kb, delta, t;
    logic signed [127:0] p;
    @(negedge clk);
    sec = SEC_W'(s); cycles = CYC_W'(c); sof = 1; sof_lane = lane;
    @(negedge clk) sof = 0;
    ka = longint'($urandom % 16000) - 2000;
    kb = longint'($urandom % 16000) - 2000;
    r.seq = SEQ_W'(nframes);
    r.k_a = K_W'(ka);
    r.k_b = K_W'(kb);
    r.d_a = DRIFT_W'(64'd16_000_000 * 64'd16_777_216 / 64'd16384 + 64'($urandom % 1000));
    r.d_b = DRIFT_W'(64'd16_000_000 * 64'd16_777_216 / 64'd9000 + 64'($urandom % 1000));
    p = 128'(ka) * 128'(r.d_a) - 128'(kb) * 128'(r.d_b);
    delta = longint'(p >>> 24) % TA;
    if (delta < 0) delta += TA;
    t = s * ONE + (c - 3) * TA + (lane ? 64'sd8_000_000 : 64'sd0) - delta
        - longint'(bitslide) * 800_000 - longint'(fixed_delay_fs);
    if (t < s * ONE) nborrow++;
    exp_ts[nframes % 4096] = t;
    has_res[nframes % 4096] = with_res;
    nframes++;
    if (with_res) begin
      repeat ($urandom % 4) @(negedge clk);
      rq.push_back(r);
    end else nskipped++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      longint c;
      c = (i % 7 == 0) ? longint'($urandom % 3) : longint'($urandom % CPS);
      frame(100 + i / 10, c, 1'($urandom % 2), (i % 13) != 5);
      repeat ($urandom % 5) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (nts != nframes - nskipped || unmatched != 16'(nskipped) || nborrow == 0) begin
      failures++;
      $display("FAIL %0d timestamps for %0d frames (%0d without result), unmatched %0d, borrows %0d",
               nts, nframes, nskipped, unmatched, nborrow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
