// tb_ddmtd_deglitcher: drives a sampled beat note with glitchy transitions
// (clk_in changed between clk_pll edges) and checks that exactly one pulse
// comes per rising transition, THRESH + 3 clk_pll cycles after the first
// high sample (none before the first falling edge), that the slow output follows both edges, and that short
// isolated glitches (shorter than THRESH) give no pulse.
`timescale 1ns/1ps
module tb_ddmtd_deglitcher;
  localparam int THR = 8;
  logic clk = 0, rst_n = 0, din = 0, slow, pulse;
  int checks = 0, failures = 0;
  int cyc = 0, first_hi = -1, pulses = 0, expected_pulses = 0;

  ddmtd_deglitcher #(.THRESH(THR)) dut (.clk_pll(clk), .rst_n, .clk_in(din), .slow, .pulse);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && pulse) begin
    pulses++;
    checks++;
    if (cyc - first_hi != THR + 3) begin
      failures++;
      $display("FAIL pulse %0d cycles after first high sample, expected %0d", cyc - first_hi, THR + 3);
    end
    checks++;
    if (!slow) begin failures++; $display("FAIL slow not high with pulse"); end
  end

  // drive one value for n cycles (changed after the falling edge)
  task automatic hold(input logic v, input int n);
    repeat (n) begin
      @(negedge clk);
      din = v;
    end
  endtask

  task automatic glitchy_edge(input logic v);
    // first sample of the new value, then random toggling, then stable
    @(negedge clk);
    din = v;
    if (v) first_hi = cyc + 1;   // sampled at the next rising edge
    for (int i = 0; i < 5; i++) hold(($urandom % 2) ? v : ~v, 1);
    hold(v, 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    hold(0, 40);
    for (int p = 0; p < 20; p++) begin
      glitchy_edge(1);
      if (p > 0) expected_pulses++;   // no pulse before the first falling edge
      hold(1, 20 + int'($urandom % 20));
      hold(0, 2);                     // isolated short glitch: ignored
      hold(1, 20);
      checks++;
      if (!slow) begin failures++; $display("FAIL slow low during high half"); end
      glitchy_edge(0);
      hold(0, 30 + int'($urandom % 20));
      checks++;
      if (slow) begin failures++; $display("FAIL slow high during low half"); end
      // isolated short glitch: ignored
      hold(1, 2);
      hold(0, 30);
    end
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("FAIL %0d pulses, expected %0d", pulses, expected_pulses);
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
