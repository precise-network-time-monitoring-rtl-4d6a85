// tb_tag_capture: two ddmtd_tag_counter instances, driven by slow-clock
// pulses with random periods, feed the capture block; starts of frame come
// at random cycles, often several per slow period. For every result the
// bench finds, from its own record of pulse and frame cycles, the first
// pulse of each channel at or after the frame and checks
//   k = pulse_cycle - frame_cycle + 1 - TAG_LAT
// (the +1 is the counter's registered value at the frame cycle), the
// sequence number, and the drift rates. Frames before d_valid are dropped
// and counted; the output is back-pressured at random.
`timescale 1ns/1ps
module tb_tag_capture;
  import pntm_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0, pa = 0, pb = 0, sof = 0, d_valid = 0, res_ready = 0;
  logic [TAG_W-1:0] cnt_a, tag_a, cnt_b, tag_b;
  logic tag_valid_a, tag_valid_b, res_valid;
  logic [1:0] epoch_a, epoch_b;
  logic [DRIFT_W-1:0] d_a = 48'd16_383_000_000, d_b = 48'd9_000_111_000;
  phase_res_t res;
  logic [15:0] drops;
  int checks = 0, failures = 0;
  int cyc = 0;
  int pa_cyc[$], pb_cyc[$];
  int sof_cyc [1024];
  int nres = 0, nsof = 0;

  ddmtd_tag_counter u_a (.clk_pll(clk), .rst_n, .pulse(pa), .cnt(cnt_a), .tag(tag_a), .tag_valid(tag_valid_a), .epoch(epoch_a));
  ddmtd_tag_counter u_b (.clk_pll(clk), .rst_n, .pulse(pb), .cnt(cnt_b), .tag(tag_b), .tag_valid(tag_valid_b), .epoch(epoch_b));
  tag_capture #(.DEPTH(32), .TAG_LAT(LAT)) dut (.clk_pll(clk), .rst_n, .sof,
    .cnt_a, .tag_a, .tag_valid_a, .epoch_a, .cnt_b, .tag_b, .tag_valid_b, .epoch_b,
    .d_a, .d_b, .d_valid, .res, .res_valid, .res_ready, .drops);

  always #5 clk = ~clk;
  // cycle c: the interval after rising edge c; signals driven at its
  // falling edge are sampled at edge c+1
  always @(posedge clk) cyc <= cyc + 1;


  always @(negedge clk) begin
    res_ready <= ($urandom % 4) != 0;
  end

  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    int s, ea, eb;
    s  = sof_cyc[res.seq[9:0]];
    ea = -1000;
    eb = -1000;
    for (int i = 0; i < pa_cyc.size(); i++) if (pa_cyc[i] >= s) begin ea = pa_cyc[i] - s + 1 - LAT; break; end
    for (int i = 0; i < pb_cyc.size(); i++) if (pb_cyc[i] >= s) begin eb = pb_cyc[i] - s + 1 - LAT; break; end
    nres++;
    checks++;
    if (int'(res.k_a) != ea || int'(res.k_b) != eb || res.d_a != d_a || res.d_b != d_b) begin
      failures++;
      $display("FAIL seq %0d: k_a %0d (exp %0d) k_b %0d (exp %0d)", res.seq, res.k_a, ea, res.k_b, eb);
    end
  end

  // slow-clock pulses, periods around 60 and 45 cycles
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (55 + int'($urandom % 10)) @(negedge clk);
      pa = 1; pa_cyc.push_back(cyc);
      @(negedge clk) pa = 0;
    end
  end
  initial begin
    @(posedge rst_n);
    repeat (17) @(negedge clk);
    forever begin
      repeat (40 + int'($urandom % 10)) @(negedge clk);
      pb = 1; pb_cyc.push_back(cyc);
      @(negedge clk) pb = 0;
    end
  end

  task automatic frame();
    @(negedge clk);
    sof = 1;
    sof_cyc[nsof] = cyc;
    nsof++;
    @(negedge clk) sof = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);
    frame();                                  // before calibration: dropped
    repeat (200) @(negedge clk);
    d_valid = 1;
    for (int f = 0; f < 300; f++) begin
      frame();
      repeat (2 + int'($urandom % 25)) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    checks++;
    if (nres != nsof - 1 || drops != 1) begin
      failures++;
      $display("FAIL %0d results for %0d frames, drops %0d", nres, nsof, drops);
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
