// timestamp_calc: clk_A side of PNTM; builds the final packet timestamp.
//
// At each start of frame (sof, brought into the clk_A domain, with the byte
// lane of /S/) the seconds and cycles counters are frozen with a sequence
// number into a FIFO of DEPTH entries. The DDMTD result for the same frame
// (k_a, k_b and the drift rates d_a, d_b, from tag_capture through a
// clock-crossing FIFO) arrives later, after the next slow-clock edges. When
// both heads carry the same sequence number they are joined; if the numbers
// differ, the older entry has no partner (its frame was not measured) and
// is discarded and counted in unmatched.
//
// Three pipeline stages then compute
//   dPhi_main = k_a * (T_PLL - T_A),   dPhi_ts = k_b * (T_PLL - T_B)
//   delta     = (dPhi_main - dPhi_ts) mod T_A
// which is the time from the clk_B edge that sampled /S/ to the next clk_A
// edge (sub-cycle phase, 0 <= delta < T_A), and
//   ts = sec + (cycles - COARSE_LAT) * T_A + lane * 8 ns - delta - D_RX
//   D_RX = bitslide * 800 ps + fixed_delay_fs
// normalised to 0 <= ts_fs < 1 s. COARSE_LAT is the number of clk_A cycles
// between that next clk_A edge and the edge that froze the counters (the
// clock-crossing synchronizer and the register stages); with this value
// the result is the time of the clk_B edge at which the detector sampled
// /S/, minus D_RX. When that clk_B edge falls within the quantisation
// error (about one DDMTD step) of a clk_A edge, the counter capture and
// delta may disagree by one whole cycle.
//
// The drift-compensated sum follows equations 4 to 6 of the method; the
// sign is arranged so that the phase terms measure how far the clk_B edge
// precedes the clk_A edge. The reception delay (bitslide steps of one bit
// time at 1 Gb/s plus calibrated fixed SFP and circuit delays) is removed
// as described. The lane term, the sequence matching and the pipeline are
// this implementation's.
// Latency: three clk_A cycles from the pair to ts_valid.
module timestamp_calc
  import pntm_pkg::*;
#(
  parameter int unsigned T_A_FS         = 16_000_000,
  parameter int unsigned CYCLES_PER_SEC = 62_500_000,
  parameter int unsigned COARSE_LAT     = 3,
  parameter int unsigned DEPTH          = 512
) (
  input  logic             clk_a,
  input  logic             rst_n,
  // start of frame and time of day
  input  logic             sof,
  input  logic             sof_lane,
  input  logic [SEC_W-1:0] sec,
  input  logic [CYC_W-1:0] cycles,
  // DDMTD result
  input  phase_res_t       res,
  input  logic             res_valid,
  output logic             res_pop,
  // reception delay configuration
  input  logic [4:0]       bitslide,
  input  logic [31:0]      fixed_delay_fs,
  // timestamp
  output logic             ts_valid,
  output logic [SEQ_W-1:0] ts_seq,
  output logic [SEC_W-1:0] ts_sec,
  output logic [FS_W-1:0]  ts_fs,
  output logic [31:0]      ts_delta_fs,
  output logic [15:0]      unmatched
);
  localparam longint signed TA      = longint'(T_A_FS);
  localparam longint signed ONE_SEC = longint'(CYCLES_PER_SEC) * longint'(T_A_FS);
  localparam int unsigned   PW      = K_W + DRIFT_W + 1;

  logic [SEQ_W-1:0] seq;
  coarse_t          c_head, c_push;
  logic             c_valid, c_full, c_pop, pair;
  logic signed [SEQ_W-1:0] seq_diff;

  assign c_push = '{seq: seq, sec: sec, cycles: cycles, lane: sof_lane};

  sync_fifo #(.W($bits(coarse_t)), .DEPTH(DEPTH)) u_q (
    .clk(clk_a), .rst_n, .wr_en(sof), .wr_data(c_push), .full(c_full),
    .rd_valid(c_valid), .rd_data(c_head), .rd_pop(c_pop));

  assign seq_diff = signed'(c_head.seq - res.seq);
  assign pair     = c_valid && res_valid && (seq_diff == 0);
  assign c_pop    = c_valid && res_valid && (seq_diff <= 0);
  assign res_pop  = c_valid && res_valid && (seq_diff >= 0);

  // stage 1: drift products
  logic                 v1;
  coarse_t              c1;
  logic signed [PW-1:0] pa1, pb1;
  // stage 2: sub-cycle phase
  logic                 v2;
  coarse_t              c2;
  longint signed        delta2;
  longint signed        diff, dn;
  // stage 3: sum
  longint signed        frac, rx_delay;

  always_comb begin
    diff = longint'((pa1 - pb1) >>> DRIFT_FRAC);
    dn   = diff;
    if (dn < 0)   dn = dn + TA;
    if (dn < 0)   dn = dn + TA;
    if (dn >= TA) dn = dn - TA;
    if (dn >= TA) dn = dn - TA;
  end

  always_comb begin
    rx_delay = longint'(bitslide) * longint'(UI_FS) + longint'(fixed_delay_fs);
    frac     = (longint'(c2.cycles) - longint'(COARSE_LAT)) * TA
             + (c2.lane ? longint'(BYTE_FS) : 64'sd0)
             - delta2 - rx_delay;
  end

  always_ff @(posedge clk_a) begin
    if (!rst_n) begin
      seq         <= '0;
      unmatched   <= '0;
      v1          <= 1'b0;
      v2          <= 1'b0;
      c1          <= '0;
      c2          <= '0;
      pa1         <= '0;
      pb1         <= '0;
      delta2      <= '0;
      ts_valid    <= 1'b0;
      ts_seq      <= '0;
      ts_sec      <= '0;
      ts_fs       <= '0;
      ts_delta_fs <= '0;
    end else begin
      if (sof) seq <= seq + 1'b1;
      if ((c_pop || res_pop) && !pair) unmatched <= unmatched + 1'b1;

      v1 <= pair;
      if (pair) begin
        c1  <= c_head;
        pa1 <= PW'(res.k_a) * signed'(PW'({1'b0, res.d_a}));
        pb1 <= PW'(res.k_b) * signed'(PW'({1'b0, res.d_b}));
      end

      v2 <= v1;
      if (v1) begin
        c2     <= c1;
        delta2 <= dn;
      end

      ts_valid <= v2;
      if (v2) begin
        ts_seq      <= c2.seq;
        ts_delta_fs <= 32'(delta2);
        if (frac < 0) begin
          ts_sec <= c2.sec - 1'b1;
          ts_fs  <= FS_W'(frac + ONE_SEC);
        end else if (frac >= ONE_SEC) begin
          ts_sec <= c2.sec + 1'b1;
          ts_fs  <= FS_W'(frac - ONE_SEC);
        end else begin
          ts_sec <= c2.sec;
          ts_fs  <= FS_W'(frac);
        end
      end
    end
  end
endmodule
