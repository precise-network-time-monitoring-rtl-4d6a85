// tb_ddmtd_tag_counter: random pulse spacing; checks that each period value
// equals the distance between pulses, that the first pulse gives none, that
// the epoch counts pulses modulo 4 and that cnt counts cycles since the
// last pulse.
`timescale 1ns/1ps
module tb_ddmtd_tag_counter;
  import pntm_pkg::*;
  logic clk = 0, rst_n = 0, pulse = 0;
  logic [TAG_W-1:0] cnt, tag;
  logic tag_valid;
  logic [1:0] epoch;
  int checks = 0, failures = 0;
  int last_gap = 0, npulse = 0;

  ddmtd_tag_counter dut (.clk_pll(clk), .rst_n, .pulse, .cnt, .tag, .tag_valid, .epoch);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (7) @(posedge clk);
    for (int p = 0; p < 60; p++) begin
      int gap;
      gap = 1 + int'($urandom % 300);
      @(negedge clk) pulse = 1;
      @(negedge clk) pulse = 0;
      npulse++;
      chk(tag_valid == (npulse > 1), "tag_valid after pulse");
      if (npulse > 1) chk(tag == TAG_W'(last_gap), $sformatf("tag %0d expected %0d", tag, last_gap));
      chk(epoch == 2'(npulse), "epoch");
      chk(cnt == 0, "cnt cleared");
      repeat (gap - 1) @(negedge clk);
      chk(cnt == TAG_W'(gap - 1), $sformatf("cnt %0d expected %0d", cnt, gap - 1));
      chk(!tag_valid || gap == 1, "tag_valid is one cycle");
      last_gap = gap + 1;   // pulse-to-pulse distance in cycles
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
