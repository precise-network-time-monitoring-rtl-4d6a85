// event_sync: carries single-cycle events, each with a W-bit payload, from
// one clock domain to another.
//
// The source side toggles a flag and holds the payload for every event; the
// destination side passes the flag through a SYNC-stage synchronizer and
// emits a one-cycle pulse, with the held payload, when it sees the flag
// change. Events must be spaced by more than SYNC+2 destination cycles,
// which holds for Ethernet starts of frame (one frame per 42 or more
// cycles at 62.5 MHz). Latency: one source edge plus SYNC or SYNC+1
// destination edges.
module event_sync #(
  parameter int unsigned W    = 1,
  parameter int unsigned SYNC = 2
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic         src_evt,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic         dst_evt,
  output logic [W-1:0] dst_data
);
  logic         tgl;
  logic [W-1:0] hold;
  logic [SYNC:0] sr;

  always_ff @(posedge src_clk) begin
    if (!src_rst_n) begin
      tgl  <= 1'b0;
      hold <= '0;
    end else if (src_evt) begin
      tgl  <= ~tgl;
      hold <= src_data;
    end
  end

  always_ff @(posedge dst_clk) begin
    if (!dst_rst_n) begin
      sr       <= '0;
      dst_evt  <= 1'b0;
      dst_data <= '0;
    end else begin
      sr      <= {sr[SYNC-1:0], tgl};
      dst_evt <= sr[SYNC] ^ sr[SYNC-1];
      if (sr[SYNC] ^ sr[SYNC-1]) dst_data <= hold;
    end
  end
endmodule
