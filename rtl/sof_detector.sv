// sof_detector: passive start-of-frame detector on the 1 Gb/s receive path.
//
// It watches the decoded 16-bit PCS stream (two 8b/10b code-groups per
// 62.5 MHz clk_B cycle, the earlier one in bits 15:8) next to the data
// path, without delaying it. A frame starts with the Start_of_Packet
// delimiter /S/ (control code-group K27.7, 0xFB) and ends with
// End_of_Packet /T/ (K29.7, 0xFD). When /S/ appears in either lane while no
// frame is open, sof pulses for one clk_B cycle on the next edge and
// sof_lane tells which lane held it (0: bits 15:8, 1: bits 7:0; lane 1 is
// one byte time, 8 ns, later on the wire). rx_valid low (link down) closes
// any open frame. Latency: one clk_B edge.
//
// Detecting the start of frame by sniffing the stream comes from the design
// description; the use of /S/ and /T/ and the 16-bit interface are this
// implementation's choices.
module sof_detector (
  input  logic        clk_b,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic [15:0] rx_data,
  input  logic [1:0]  rx_k,       // rx_k[1] qualifies rx_data[15:8]
  output logic        sof,
  output logic        sof_lane
);
  localparam logic [7:0] K_S = 8'hFB;   // K27.7 /S/
  localparam logic [7:0] K_T = 8'hFD;   // K29.7 /T/

  logic in_frame;
  logic s0, s1, t0, t1;

  assign s0 = rx_k[1] && rx_data[15:8] == K_S;
  assign s1 = rx_k[0] && rx_data[7:0]  == K_S;
  assign t0 = rx_k[1] && rx_data[15:8] == K_T;
  assign t1 = rx_k[0] && rx_data[7:0]  == K_T;

  always_ff @(posedge clk_b) begin
    if (!rst_n) begin
      in_frame <= 1'b0;
      sof      <= 1'b0;
      sof_lane <= 1'b0;
    end else begin
      sof <= 1'b0;
      if (!rx_valid) begin
        in_frame <= 1'b0;
      end else if (!in_frame) begin
        if (s0 || s1) begin
          sof      <= 1'b1;
          sof_lane <= !s0;
          // a frame opened in lane 0 may be closed in lane 1 of this word
          in_frame <= !(s0 && t1);
        end
      end else if (t0 || t1) begin
        in_frame <= 1'b0;
        // /T/ in lane 0 may be followed by a new /S/ in lane 1
        if (t0 && s1) begin
          sof      <= 1'b1;
          sof_lane <= 1'b1;
          in_frame <= 1'b1;
        end
      end
    end
  end
endmodule
