// ddmtd: dual-channel Digital Dual Mixer Time Difference phase detector.
//
// Both clk_a (the local reference, 62.5 MHz) and clk_b (the clock
// recovered from the received stream) are sampled by clk_pll, generated
// outside at N/(N+1) of the clk_a frequency. Each channel has a sampler and
// deglitcher (ddmtd_deglitcher), a counter of clk_PLL cycles per slow
// period (ddmtd_tag_counter) and an averager (ddmtd_averager). The
// counters' present values, their period values (N_A, N_B) with epochs,
// and the averaged sums are brought out for the PNTM capture logic.
//
// For syntonized inputs the block also gives the classic DDMTD phase: at
// every clk_BSlow edge, n_cycles is the number of clk_PLL cycles since the
// last clk_ASlow edge, and phase_fs = n_cycles * T_A / (N + 1) (eq. 2 of the
// method) in femtoseconds, computed with a constant step of 16 fractional
// bits. phase_valid pulses with each new value.
//
// All outputs are in the clk_pll domain. The structure follows the DDMTD
// block diagram; the constant-step conversion is this implementation's.
module ddmtd
  import pntm_pkg::*;
#(
  parameter int unsigned N       = 16384,
  parameter int unsigned T_A_FS  = 16_000_000,
  parameter int unsigned THRESH  = 2000,
  parameter int unsigned AVG_M   = 100
) (
  input  logic             clk_pll,
  input  logic             rst_n,
  input  logic             clk_a,
  input  logic             clk_b,
  input  logic             use_mean,
  // channel A (reference)
  output logic [TAG_W-1:0] cnt_a,
  output logic [TAG_W-1:0] tag_a,
  output logic             tag_valid_a,
  output logic [1:0]       epoch_a,
  output logic [SUM_W-1:0] sum_a,
  output logic [PER_W-1:0] per_a,
  output logic             sum_valid_a,
  // channel B (recovered receive clock)
  output logic [TAG_W-1:0] cnt_b,
  output logic [TAG_W-1:0] tag_b,
  output logic             tag_valid_b,
  output logic [1:0]       epoch_b,
  output logic [SUM_W-1:0] sum_b,
  output logic [PER_W-1:0] per_b,
  output logic             sum_valid_b,
  // syntonized DDMTD phase (eq. 2)
  output logic [TAG_W-1:0] n_cycles,
  output logic [31:0]      phase_fs,
  output logic             phase_valid
);
  localparam longint unsigned STEP_Q = (64'(T_A_FS) << 16) / (64'(N) + 64'd1);

  logic pulse_a, pulse_b, slow_a, slow_b;
  logic pulse_b_q;

  ddmtd_deglitcher #(.THRESH(THRESH)) u_dgl_a (
    .clk_pll, .rst_n, .clk_in(clk_a), .slow(slow_a), .pulse(pulse_a));
  ddmtd_deglitcher #(.THRESH(THRESH)) u_dgl_b (
    .clk_pll, .rst_n, .clk_in(clk_b), .slow(slow_b), .pulse(pulse_b));

  ddmtd_tag_counter u_cnt_a (
    .clk_pll, .rst_n, .pulse(pulse_a),
    .cnt(cnt_a), .tag(tag_a), .tag_valid(tag_valid_a), .epoch(epoch_a));
  ddmtd_tag_counter u_cnt_b (
    .clk_pll, .rst_n, .pulse(pulse_b),
    .cnt(cnt_b), .tag(tag_b), .tag_valid(tag_valid_b), .epoch(epoch_b));

  ddmtd_averager #(.M(AVG_M)) u_avg_a (
    .clk_pll, .rst_n, .use_mean, .tag(tag_a), .tag_valid(tag_valid_a),
    .sum(sum_a), .periods(per_a), .sum_valid(sum_valid_a));
  ddmtd_averager #(.M(AVG_M)) u_avg_b (
    .clk_pll, .rst_n, .use_mean, .tag(tag_b), .tag_valid(tag_valid_b),
    .sum(sum_b), .periods(per_b), .sum_valid(sum_valid_b));

  // Phase difference: clk_PLL cycles from the clk_ASlow edge to the
  // clk_BSlow edge, converted to time in the following cycle.
  always_ff @(posedge clk_pll) begin
    if (!rst_n) begin
      n_cycles    <= '0;
      pulse_b_q   <= 1'b0;
      phase_fs    <= '0;
      phase_valid <= 1'b0;
    end else begin
      pulse_b_q   <= pulse_b;
      phase_valid <= pulse_b_q;
      if (pulse_b) n_cycles <= pulse_a ? '0 : cnt_a + 1'b1;
      if (pulse_b_q) phase_fs <= 32'((64'(n_cycles) * STEP_Q) >> 16);
    end
  end
endmodule
