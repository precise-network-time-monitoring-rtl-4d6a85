// tb_drift_rate_calc: presents sums of N_A and N_B and compares d_a and d_b
// with the period relations worked out in real arithmetic:
//   f_PLL = f_A * N_A / (N_A + 1),  f_B = f_PLL * (N_B + 1) / N_B
//   d_a = T_PLL - T_A,  d_b = T_PLL - T_B   (fs, 24 fractional bits)
// for mean (100-period) and single-period inputs and clk_b both faster and
// nearly equal; the error must stay within 2 LSB + 1e-9 relative.
`timescale 1ns/1ps
module tb_drift_rate_calc;
  import pntm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [SUM_W-1:0] sum_a = '0, sum_b = '0;
  logic [PER_W-1:0] per_a = '0, per_b = '0;
  logic sum_valid_a = 0, sum_valid_b = 0;
  logic [DRIFT_W-1:0] d_a, d_b;
  logic d_valid;
  int checks = 0, failures = 0;

  drift_rate_calc dut (.clk_pll(clk), .rst_n, .sum_a, .per_a, .sum_valid_a,
                       .sum_b, .per_b, .sum_valid_b, .d_a, .d_b, .d_valid);
  always #5 clk = ~clk;

  task automatic check_case(input longint sa, input int pa, input longint sb, input int pb);
    real na, nb, ta, tpll, tb_, ea, eb, ga, gb;
    @(negedge clk);
    sum_a = SUM_W'(sa); per_a = PER_W'(pa); sum_valid_a = 1;
    sum_b = SUM_W'(sb); per_b = PER_W'(pb); sum_valid_b = 1;
    @(negedge clk);
    sum_valid_a = 0; sum_valid_b = 0;
    repeat (250) @(negedge clk);
    na   = real'(sa) / pa;
    nb   = real'(sb) / pb;
    ta   = 16.0e6;
    tpll = ta * (na + 1.0) / na;
    tb_  = tpll * nb / (nb + 1.0);
    ea   = (tpll - ta)  * 16777216.0;
    eb   = (tpll - tb_) * 16777216.0;
    ga   = real'(d_a);
    gb   = real'(d_b);
    checks++;
    if (!d_valid || (ga - ea) > 2.0 + ea * 1e-9 || (ea - ga) > 2.0 + ea * 1e-9 ||
        (gb - eb) > 2.0 + eb * 1e-9 || (eb - gb) > 2.0 + eb * 1e-9) begin
      failures++;
      $display("FAIL sa %0d sb %0d: d_a %0d (exp %f) d_b %0d (exp %f)", sa, sb, d_a, ea, d_b, eb);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (d_valid) begin failures++; $display("FAIL valid before data"); end
    check_case(100 * 16384, 100, 100 * 6200, 100);        // +100 ppm
    check_case(1638431, 100, 1000017, 100);
    check_case(16384, 1, 16000, 1);
    check_case(16385, 1, 15001, 1);
    check_case(100 * 256, 100, 100 * 203, 100);
    for (int i = 0; i < 10; i++)
      check_case(1638300 + longint'($urandom % 300), 100, 620000 + longint'($urandom % 900000), 100);
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
