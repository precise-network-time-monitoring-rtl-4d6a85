// async_fifo: dual-clock first-in first-out buffer of DEPTH words of W bits.
//
// Classic Gray-coded pointer design: each side keeps a binary and a Gray
// pointer, the Gray pointer is passed through a two-stage synchronizer to
// the other side, and full/empty are judged against the synchronized copy
// (so both are pessimistic by the synchronizer delay, never wrong).
// The read side is first-word fall-through: rd_data is valid while
// rd_valid is high, rd_pop removes the word. DEPTH is a power of two.
module async_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_clk,
  input  logic         rd_rst_n,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_pop
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0]  wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side
  assign full    = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nx = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // Read side
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];
  assign rbin_nx  = rbin + (AW+1)'(rd_pop && rd_valid);

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  initial assert (DEPTH == (1 << AW) && AW >= 2) else $error("async_fifo: DEPTH must be a power of two, at least 4");
endmodule
