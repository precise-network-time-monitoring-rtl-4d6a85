// udivider: sequential unsigned restoring divider.
//
// start loads dividend and divisor; one quotient bit is produced per clock,
// most significant first, so quotient is valid with done high DW cycles
// after start. busy is high in between; start is ignored while busy.
// Division by zero returns an all-ones quotient.
module udivider #(
  parameter int unsigned DW = 96,   // dividend and quotient width
  parameter int unsigned VW = 64    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient
);
  localparam int unsigned CW = $clog2(DW + 1);

  logic [DW-1:0] q;        // dividend bits shifted out, quotient bits in
  logic [VW:0]   rem;      // partial remainder, one bit wider than divisor
  logic [VW-1:0] dvs;
  logic [CW-1:0] cnt;
  logic [VW:0]   trial;

  assign trial = {rem[VW-1:0], q[DW-1]} - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      q        <= '0;
      rem      <= '0;
      dvs      <= '0;
      cnt      <= '0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          q    <= dividend;
          rem  <= '0;
          dvs  <= divisor;
          cnt  <= CW'(DW);
        end
      end else begin
        if (!trial[VW]) begin
          rem <= trial;
          q   <= {q[DW-2:0], 1'b1};
        end else begin
          rem <= {rem[VW-1:0], q[DW-1]};
          q   <= {q[DW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= (!trial[VW]) ? {q[DW-2:0], 1'b1} : {q[DW-2:0], 1'b0};
        end
      end
    end
  end
endmodule
