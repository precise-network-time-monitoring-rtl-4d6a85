// ddmtd_averager: averages the slow-clock period of one DDMTD channel.
//
// In mean mode (use_mean = 1) it adds M consecutive period values and then
// presents the sum with periods = M; the mean N is sum / periods, and the
// division is left to the drift-rate calculation so no precision is lost.
// In instantaneous mode every single period is presented with periods = 1.
// A change of use_mean restarts the running sum. sum_valid pulses for one
// cycle with each new result; sum and periods hold until the next.
//
// Averaging N_A and N_B over 100 slow periods, and the choice between mean
// and instantaneous values, follow the design description; presenting a
// sum instead of a quotient is this implementation's choice.
module ddmtd_averager
  import pntm_pkg::*;
#(
  parameter int unsigned M = 100
) (
  input  logic             clk_pll,
  input  logic             rst_n,
  input  logic             use_mean,
  input  logic [TAG_W-1:0] tag,
  input  logic             tag_valid,
  output logic [SUM_W-1:0] sum,
  output logic [PER_W-1:0] periods,
  output logic             sum_valid
);
  logic [SUM_W-1:0] acc;
  logic [PER_W-1:0] n;
  logic             mode_q;

  always_ff @(posedge clk_pll) begin
    if (!rst_n) begin
      acc       <= '0;
      n         <= '0;
      mode_q    <= 1'b1;
      sum       <= '0;
      periods   <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= 1'b0;
      if (mode_q != use_mean) begin
        mode_q <= use_mean;
        acc    <= '0;
        n      <= '0;
      end else if (tag_valid) begin
        if (!use_mean) begin
          sum       <= SUM_W'(tag);
          periods   <= PER_W'(1);
          sum_valid <= 1'b1;
        end else if (n == PER_W'(M - 1)) begin
          sum       <= acc + SUM_W'(tag);
          periods   <= PER_W'(M);
          sum_valid <= 1'b1;
          acc       <= '0;
          n         <= '0;
        end else begin
          acc <= acc + SUM_W'(tag);
          n   <= n + 1'b1;
        end
      end
    end
  end

  initial assert (M >= 1 && M < (1 << PER_W)) else $error("ddmtd_averager: M out of range");
endmodule
