// ddmtd_tag_counter: clk_PLL cycle counter of one DDMTD channel.
//
// cnt counts clk_PLL cycles since the last slow-clock edge (pulse) and is
// cleared by it. At each pulse after the first, tag takes the length of the
// period that just ended (cnt + 1, i.e. N_A or N_B, the value called Tag_A or
// Tag_B at the first edge after a start of frame) and tag_valid pulses for
// one cycle. epoch counts the pulses modulo 4, so a reader that froze cnt
// and epoch at some instant can later tell which period value belongs to
// the first edge after that instant. cnt saturates rather than wraps when
// no edge arrives.
//
// Counting clk_PLL cycles per slow period is what the design describes;
// the epoch, the saturation and the widths are this implementation's.
module ddmtd_tag_counter
  import pntm_pkg::*;
(
  input  logic             clk_pll,
  input  logic             rst_n,
  input  logic             pulse,
  output logic [TAG_W-1:0] cnt,
  output logic [TAG_W-1:0] tag,
  output logic             tag_valid,
  output logic [1:0]       epoch
);
  logic seen;

  always_ff @(posedge clk_pll) begin
    if (!rst_n) begin
      cnt       <= '0;
      tag       <= '0;
      tag_valid <= 1'b0;
      epoch     <= '0;
      seen      <= 1'b0;
    end else begin
      tag_valid <= 1'b0;
      if (pulse) begin
        cnt   <= '0;
        epoch <= epoch + 1'b1;
        seen  <= 1'b1;
        if (seen) begin
          tag       <= (cnt == '1) ? cnt : cnt + 1'b1;
          tag_valid <= 1'b1;
        end
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
