// time_counter: time of day in the clk_A domain.
//
// Two counters: cycles counts clk_A periods (16 ns at 62.5 MHz) within the
// second and wraps at CYCLES_PER_SEC, when sec advances and pps pulses for
// one cycle. The synchronization core (White Rabbit in the reference
// system) aligns the counters by loading set_sec / set_cycles with set;
// the loaded value is the time of the clk_A edge that samples set.
//
// The two counters and the 16 ns period follow the design description; the
// load interface, the widths and the pps output are this implementation's.
module time_counter
  import pntm_pkg::*;
#(
  parameter int unsigned CYCLES_PER_SEC = 62_500_000
) (
  input  logic             clk_a,
  input  logic             rst_n,
  input  logic             set,
  input  logic [SEC_W-1:0] set_sec,
  input  logic [CYC_W-1:0] set_cycles,
  output logic [SEC_W-1:0] sec,
  output logic [CYC_W-1:0] cycles,
  output logic             pps
);
  always_ff @(posedge clk_a) begin
    if (!rst_n) begin
      sec    <= '0;
      cycles <= '0;
      pps    <= 1'b0;
    end else if (set) begin
      sec    <= set_sec;
      cycles <= set_cycles;
      pps    <= 1'b0;
    end else if (cycles >= CYC_W'(CYCLES_PER_SEC - 1)) begin
      sec    <= sec + 1'b1;
      cycles <= '0;
      pps    <= 1'b1;
    end else begin
      cycles <= cycles + 1'b1;
      pps    <= 1'b0;
    end
  end
endmodule
