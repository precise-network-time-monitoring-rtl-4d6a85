// tb_ddmtd_averager: feeds random period values and checks the 100-period
// sums in mean mode, the single values in instantaneous mode and the
// restart of the running sum when the mode changes.
`timescale 1ns/1ps
module tb_ddmtd_averager;
  import pntm_pkg::*;
  logic clk = 0, rst_n = 0, use_mean = 1, tag_valid = 0;
  logic [TAG_W-1:0] tag = '0;
  logic [SUM_W-1:0] sum;
  logic [PER_W-1:0] periods;
  logic sum_valid;
  int checks = 0, failures = 0;
  longint exp_sum;
  int nres = 0;

  ddmtd_averager dut (.clk_pll(clk), .rst_n, .use_mean, .tag, .tag_valid, .sum, .periods, .sum_valid);

  always #5 clk = ~clk;

  task automatic feed(input int v);
    @(negedge clk);
    tag = TAG_W'(v);
    tag_valid = 1;
    @(negedge clk);
    tag_valid = 0;
    @(negedge clk);      // result registered
  endtask

  always @(posedge clk) if (rst_n && sum_valid) nres++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // mean mode: three windows of 100
    for (int w = 0; w < 3; w++) begin
      exp_sum = 0;
      for (int i = 0; i < 100; i++) begin
        int v;
        v = 16380 + int'($urandom % 10);
        exp_sum += v;
        feed(v);
        if (i < 99) chk(nres == w, "no result before 100 periods");
      end
      chk(nres == w + 1, "one result per 100 periods");
      chk(sum == SUM_W'(exp_sum), $sformatf("sum %0d expected %0d", sum, exp_sum));
      chk(periods == 100, "periods = 100");
    end
    // partial window, then switch to instantaneous
    for (int i = 0; i < 37; i++) feed(1000);
    @(negedge clk) use_mean = 0;
    @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      int v;
      v = 6000 + int'($urandom % 500);
      feed(v);
      chk(sum == SUM_W'(v) && periods == 1, "instantaneous value");
    end
    // back to mean: the sum restarts from zero
    @(negedge clk) use_mean = 1;
    @(negedge clk);
    nres = 0;
    exp_sum = 0;
    for (int i = 0; i < 100; i++) begin
      feed(16384 + i % 3);
      exp_sum += 16384 + i % 3;
    end
    chk(nres == 1 && sum == SUM_W'(exp_sum), "sum restarted after mode change");
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
