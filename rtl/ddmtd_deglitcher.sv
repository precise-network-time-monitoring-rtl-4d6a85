// ddmtd_deglitcher: one DDMTD input channel, from the sampled clock to the
// clean slow-clock edge.
//
// The input clock (clk_A or clk_B) is sampled as data by clk_PLL, whose
// frequency is N/(N+1) of the nominal clock, so the sampled value is a beat
// note of period about N clk_PLL cycles. Near each transition of the beat
// note, jitter makes the samples toggle for a while. After two more
// synchronizer flops, the deglitcher takes the first sample that differs
// from its present output as the edge, then waits THRESH cycles: if the
// input still differs, the output changes (the edge is confirmed),
// otherwise the change is thrown away as a glitch. A rising transition of
// the output gives a one-cycle pulse, from the second rising transition
// after reset on (the first may close a slow period that began before
// reset, so no edge is reported until a falling transition has been seen).
// The edge is therefore reported a
// fixed LATENCY = THRESH + 3 clk_PLL edges after the sampling flop first
// saw it, whatever the glitches after that first sample.
//
// The sampling flop and the "deglitcher & pulse shaping" stage follow the
// DDMTD block diagram of the design; the confirm-after-THRESH rule and the
// default threshold are this implementation's choice. THRESH must be
// smaller than half the shortest slow period.
module ddmtd_deglitcher #(
  parameter int unsigned THRESH = 2000
) (
  input  logic clk_pll,
  input  logic rst_n,
  input  logic clk_in,     // clock under measurement, sampled as data
  output logic slow,       // deglitched slow clock (clk_ASlow / clk_BSlow)
  output logic pulse       // one clk_PLL cycle at each rising edge of slow
);
  localparam int unsigned CW = $clog2(THRESH + 1);

  logic          s0, s1, s2;   // sampling flop and synchronizer
  logic          busy;
  logic          armed;        // a falling transition has been seen
  logic [CW-1:0] cnt;

  always_ff @(posedge clk_pll) begin
    if (!rst_n) begin
      s0 <= 1'b0;
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s0 <= clk_in;
      s1 <= s0;
      s2 <= s1;
    end
  end

  always_ff @(posedge clk_pll) begin
    if (!rst_n) begin
      slow  <= 1'b0;
      pulse <= 1'b0;
      busy  <= 1'b0;
      armed <= 1'b0;
      cnt   <= '0;
    end else begin
      pulse <= 1'b0;
      if (!busy) begin
        if (s2 != slow) begin
          busy <= 1'b1;
          cnt  <= CW'(1);
        end
      end else if (cnt == CW'(THRESH)) begin
        busy <= 1'b0;
        if (s2 != slow) begin
          slow  <= s2;
          pulse <= s2 && armed;
          if (!s2) armed <= 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial assert (THRESH >= 1) else $error("ddmtd_deglitcher: THRESH must be at least 1");
endmodule
