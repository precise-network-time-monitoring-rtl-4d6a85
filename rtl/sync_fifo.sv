// sync_fifo: single-clock first-in first-out buffer of DEPTH words of W
// bits, held in an array (a block RAM on an FPGA). The head word is shown
// on rd_data whenever rd_valid is high (first-word fall-through);
// rd_pop removes it. A push when full is ignored and flagged by full.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_pop
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign full     = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign rd_valid = (wp != rp);
  assign rd_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full)    wp <= wp + 1'b1;
      if (rd_pop && rd_valid) rp <= rp + 1'b1;
    end
  end

  initial assert (DEPTH == (1 << AW)) else $error("sync_fifo: DEPTH must be a power of two");
endmodule
