// tag_capture: DDMTD side of the PNTM start-of-frame capture (clk_PLL domain).
//
// On each start of frame (sof, already brought into the clk_PLL domain) the
// present values of both DDMTD channel counters are frozen as Tag_ASoF and
// Tag_BSoF, together with each channel's edge epoch and a sequence number,
// and queued in a FIFO of DEPTH entries. Many frames can arrive in one slow
// period (262 us at the default size), and all of them wait for the same
// next edges, so the queue is needed to keep up with line rate.
//
// The period value of every slow-clock edge is kept in a four-entry history
// per channel, indexed by the epoch. The entry at the head of the queue is
// resolved once both channels have seen an edge after it: Tag_A and Tag_B
// are the period values of those first edges, and
//   k_a = Tag_A - Tag_ASoF - TAG_LAT,   k_b = Tag_B - Tag_BSoF - TAG_LAT
// are the clk_PLL cycles from the capture to the true clock alignment
// (TAG_LAT removes the sampler and deglitcher latency, so k may be
// negative when the frame fell inside that latency). The result, with the
// drift rates d_a and d_b in force, is offered on a valid/ready output.
// Frames that arrive before the first drift rates exist, or when the
// queue is full, are not queued but still use up a sequence number, which
// lets the clk_A side discard its matching entry; drops counts them.
// The head must be resolved within three slow periods of its edge.
//
// Capturing Tag_ASoF/Tag_BSoF at the SoF and waiting for the next DDMTD
// measurement follow the design description; the queue, the epoch history
// and the sequence numbers are this implementation's.
module tag_capture
  import pntm_pkg::*;
#(
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned TAG_LAT = 2003
) (
  input  logic               clk_pll,
  input  logic               rst_n,
  input  logic               sof,
  input  logic [TAG_W-1:0]   cnt_a,
  input  logic [TAG_W-1:0]   tag_a,
  input  logic               tag_valid_a,
  input  logic [1:0]         epoch_a,
  input  logic [TAG_W-1:0]   cnt_b,
  input  logic [TAG_W-1:0]   tag_b,
  input  logic               tag_valid_b,
  input  logic [1:0]         epoch_b,
  input  logic [DRIFT_W-1:0] d_a,
  input  logic [DRIFT_W-1:0] d_b,
  input  logic               d_valid,
  output phase_res_t         res,
  output logic               res_valid,
  input  logic               res_ready,
  output logic [15:0]        drops
);
  logic [SEQ_W-1:0] seq;
  logic [TAG_W-1:0] hist_a [4];
  logic [TAG_W-1:0] hist_b [4];
  logic [1:0]       wr_ep_a, wr_ep_b;   // epoch of the newest history entry

  sof_tags_t  push_e, head;
  logic       q_full, q_valid, q_pop, push;
  logic       ready_a, ready_b, out_free;
  logic [1:0] next_ep_a, next_ep_b;

  assign push_e = '{seq: seq, tag_a_sof: cnt_a, tag_b_sof: cnt_b,
                    epoch_a: epoch_a, epoch_b: epoch_b};
  assign push   = sof && d_valid;

  sync_fifo #(.W($bits(sof_tags_t)), .DEPTH(DEPTH)) u_q (
    .clk(clk_pll), .rst_n, .wr_en(push), .wr_data(push_e), .full(q_full),
    .rd_valid(q_valid), .rd_data(head), .rd_pop(q_pop));

  assign next_ep_a = head.epoch_a + 2'd1;
  assign next_ep_b = head.epoch_b + 2'd1;
  assign ready_a   = (wr_ep_a != head.epoch_a);
  assign ready_b   = (wr_ep_b != head.epoch_b);
  assign out_free  = !res_valid || res_ready;
  assign q_pop     = q_valid && ready_a && ready_b && out_free;

  always_ff @(posedge clk_pll) begin
    if (tag_valid_a) hist_a[epoch_a] <= tag_a;
    if (tag_valid_b) hist_b[epoch_b] <= tag_b;
  end

  always_ff @(posedge clk_pll) begin
    if (!rst_n) begin
      seq       <= '0;
      wr_ep_a   <= '0;
      wr_ep_b   <= '0;
      res       <= '0;
      res_valid <= 1'b0;
      drops     <= '0;
    end else begin
      if (sof) begin
        seq <= seq + 1'b1;
        if (!d_valid || q_full) drops <= drops + 1'b1;
      end
      // The epoch counts every edge, the history only edges with a period
      // value; both agree from the second edge on.
      if (tag_valid_a) wr_ep_a <= epoch_a;
      if (tag_valid_b) wr_ep_b <= epoch_b;

      if (res_valid && res_ready) res_valid <= 1'b0;
      if (q_pop) begin
        res.seq   <= head.seq;
        res.k_a   <= K_W'(signed'({1'b0, hist_a[next_ep_a]})) - K_W'(signed'({1'b0, head.tag_a_sof})) - K_W'(TAG_LAT);
        res.k_b   <= K_W'(signed'({1'b0, hist_b[next_ep_b]})) - K_W'(signed'({1'b0, head.tag_b_sof})) - K_W'(TAG_LAT);
        res.d_a   <= d_a;
        res.d_b   <= d_b;
        res_valid <= 1'b1;
      end
    end
  end

  // A result is never overwritten before it has been taken.
  assert property (@(posedge clk_pll) disable iff (!rst_n)
                   res_valid && !res_ready |=> $stable(res));
endmodule
