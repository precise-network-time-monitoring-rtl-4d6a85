// tb_ddmtd: syntonized clocks with a known phase offset. clk_a and clk_b
// run at 16 ns, clk_b delayed by PHI; clk_pll at 16 ns * (N+1)/N. Checks
// that every slow period is N clk_PLL cycles (+-1), that the 4-period mean
// sums are 4*N (+-2) and that the measured phase (eq. 2) matches PHI
// within two DDMTD steps plus the N/(N+1) scale of the formula. Then the
// mode input is switched to single-period values and checked again.
`timescale 1fs/1fs
module tb_ddmtd;
  import pntm_pkg::*;
  localparam int unsigned N  = 64;
  localparam int unsigned TA = 16_000_000;
  localparam longint      TP = longint'(TA) * (N + 1) / N;
  localparam longint      PHI = 5_300_000;

  logic clk_a = 0, clk_b = 0, clk_pll = 0, rst_n = 0, use_mean = 1;
  logic [TAG_W-1:0] cnt_a, tag_a, cnt_b, tag_b, n_cycles;
  logic tag_valid_a, tag_valid_b, sum_valid_a, sum_valid_b, phase_valid;
  logic [1:0] epoch_a, epoch_b;
  logic [SUM_W-1:0] sum_a, sum_b;
  logic [PER_W-1:0] per_a, per_b;
  logic [31:0] phase_fs;
  int checks = 0, failures = 0;
  int n_tags = 0, n_sums = 0, n_phase = 0;

  ddmtd #(.N(N), .T_A_FS(TA), .THRESH(4), .AVG_M(4)) dut (.*);

  initial forever #(TA/2) clk_a = ~clk_a;
  initial begin #(PHI); forever #(TA/2) clk_b = ~clk_b; end
  initial forever #(TP/2) clk_pll = ~clk_pll;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(input longint a, input longint b, input longint tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  always @(posedge clk_pll) if (rst_n) begin
    if (tag_valid_a) begin n_tags++; chk(near(tag_a, N, 1), $sformatf("N_A %0d", tag_a)); end
    if (tag_valid_b) chk(near(tag_b, N, 1), $sformatf("N_B %0d", tag_b));
    if (sum_valid_a) begin
      n_sums++;
      chk(near(sum_a, per_a * N, 2) && (per_a == (use_mean ? 4 : 1)), $sformatf("sum_a %0d periods %0d", sum_a, per_a));
    end
    if (sum_valid_b) chk(near(sum_b, per_b * N, 2), $sformatf("sum_b %0d", sum_b));
    if (phase_valid && n_tags > 1) begin
      n_phase++;
      chk(near(phase_fs, PHI, 2 * TA / N + PHI / (N + 1)),
          $sformatf("phase %0d fs, expected %0d", phase_fs, PHI));
    end
  end

  initial begin
    repeat (3) @(posedge clk_pll);
    rst_n = 1;
    repeat (20 * N) @(posedge clk_pll);
    use_mean = 0;
    repeat (6 * N) @(posedge clk_pll);
    chk(n_sums >= 6 && n_phase >= 20, $sformatf("%0d sums %0d phases", n_sums, n_phase));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd1_000_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
