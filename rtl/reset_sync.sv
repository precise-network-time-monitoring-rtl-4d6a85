// reset_sync: asynchronous-assert, synchronous-release reset for one clock
// domain. rst_n_i may change at any time; rst_n_o goes low at once and goes
// high STAGES rising edges of clk after rst_n_i is released.
module reset_sync #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst_n_o
);
  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge rst_n_i) begin
    if (!rst_n_i) sr <= '0;
    else          sr <= {sr[STAGES-2:0], 1'b1};
  end

  assign rst_n_o = sr[STAGES-1];
endmodule
