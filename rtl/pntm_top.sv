// pntm_top: Precise Network Time Monitoring timestamper for one 1 Gb/s
// Ethernet receive port.
//
// Every received frame is timestamped at its start of frame with a
// resolution far below the 16 ns clock period, even though the sender's
// clock (clk_b, recovered from the stream) is not syntonized with the local
// reference (clk_a). The coarse part comes from the seconds and cycles
// counters (time_counter, clk_a domain), aligned by an external
// synchronization core. The sub-cycle part comes from a Digital Dual Mixer
// Time Difference (ddmtd): clk_a and clk_b are both sampled by clk_pll,
// N/(N+1) of the nominal frequency, giving slow beat clocks whose periods
// N_A and N_B (averaged over AVG_M periods in mean mode) measure the three
// frequencies. drift_rate_calc turns them into period differences per
// clk_PLL cycle. At a start of frame (sof_detector, clk_b domain) the DDMTD
// counters are frozen (tag_capture) and so are the time counters
// (timestamp_calc); after the next slow-clock edges, the clk_PLL cycles
// between the frame and those edges, times the period differences, give
// the clk_a to clk_b phase at the frame instant by linear interpolation.
// timestamp_calc joins both parts and removes the reception delay.
//
// Clock domains: clk_a (62.5 MHz reference, time counters and results),
// clk_b (62.5 MHz recovered receive clock, frame detection) and clk_pll
// (DDMTD offset clock from an external PLL). Events cross with
// event_sync, DDMTD results with async_fifo. rst_n is asynchronous and is
// released separately in each domain.
//
// Interface: rx_valid/rx_data/rx_k are the decoded 16-bit receive stream
// (earlier code-group in bits 15:8); time_set loads the time counters;
// use_mean selects mean (1) or single-period (0) N_A/N_B; bitslide and
// fixed_delay_fs give the reception delay. Each timestamp appears for one
// clk_a cycle on ts_valid as seconds (ts_sec) and femtoseconds within the
// second (ts_fs), with its frame number ts_seq and its sub-cycle phase
// ts_delta_fs. The classic syntonized DDMTD phase (n_cycles, phase_fs) is
// given in the clk_pll domain. Latency: up to one slow period (N clk_PLL
// cycles, 262 us at the default size) plus about ten cycles.
//
// Parameters default to the values of the reference design (N = 16384,
// 16 ns clock, 100-period mean); THRESH, the FIFO depth and COARSE_LAT are
// this implementation's.
module pntm_top
  import pntm_pkg::*;
#(
  parameter int unsigned N              = 16384,
  parameter int unsigned T_A_FS         = 16_000_000,
  parameter int unsigned CYCLES_PER_SEC = 62_500_000,
  parameter int unsigned AVG_M          = 100,
  parameter int unsigned THRESH         = 2000,
  parameter int unsigned DEPTH          = 512,
  parameter int unsigned COARSE_LAT     = 3
) (
  input  logic             clk_a,
  input  logic             clk_b,
  input  logic             clk_pll,
  input  logic             rst_n,
  // decoded receive stream (clk_b)
  input  logic             rx_valid,
  input  logic [15:0]      rx_data,
  input  logic [1:0]       rx_k,
  // time of day from the synchronization core (clk_a)
  input  logic             time_set,
  input  logic [SEC_W-1:0] time_set_sec,
  input  logic [CYC_W-1:0] time_set_cycles,
  output logic             pps,
  // configuration (static)
  input  logic             use_mean,
  input  logic [4:0]       bitslide,
  input  logic [31:0]      fixed_delay_fs,
  // timestamps (clk_a)
  output logic             ts_valid,
  output logic [SEQ_W-1:0] ts_seq,
  output logic [SEC_W-1:0] ts_sec,
  output logic [FS_W-1:0]  ts_fs,
  output logic [31:0]      ts_delta_fs,
  output logic [15:0]      unmatched,
  // DDMTD status (clk_pll)
  output logic             calibrated,
  output logic [15:0]      drops,
  output logic [TAG_W-1:0] n_cycles,
  output logic [31:0]      phase_fs,
  output logic             phase_valid
);
  logic rst_a_n, rst_b_n, rst_p_n;

  reset_sync u_rst_a (.clk(clk_a),   .rst_n_i(rst_n), .rst_n_o(rst_a_n));
  reset_sync u_rst_b (.clk(clk_b),   .rst_n_i(rst_n), .rst_n_o(rst_b_n));
  reset_sync u_rst_p (.clk(clk_pll), .rst_n_i(rst_n), .rst_n_o(rst_p_n));

  // ---- clk_a: time of day
  logic [SEC_W-1:0] sec;
  logic [CYC_W-1:0] cycles;

  time_counter #(.CYCLES_PER_SEC(CYCLES_PER_SEC)) u_time (
    .clk_a, .rst_n(rst_a_n), .set(time_set), .set_sec(time_set_sec),
    .set_cycles(time_set_cycles), .sec, .cycles, .pps);

  // ---- clk_b: start of frame
  logic sof_b, sof_lane_b;

  sof_detector u_sof (
    .clk_b, .rst_n(rst_b_n), .rx_valid, .rx_data, .rx_k,
    .sof(sof_b), .sof_lane(sof_lane_b));

  logic sof_a, sof_lane_a, sof_p, sof_lane_p;

  event_sync #(.W(1)) u_sync_a (
    .src_clk(clk_b), .src_rst_n(rst_b_n), .src_evt(sof_b), .src_data(sof_lane_b),
    .dst_clk(clk_a), .dst_rst_n(rst_a_n), .dst_evt(sof_a), .dst_data(sof_lane_a));

  event_sync #(.W(1)) u_sync_p (
    .src_clk(clk_b), .src_rst_n(rst_b_n), .src_evt(sof_b), .src_data(sof_lane_b),
    .dst_clk(clk_pll), .dst_rst_n(rst_p_n), .dst_evt(sof_p), .dst_data(sof_lane_p));

  // ---- clk_pll: DDMTD
  logic [TAG_W-1:0]   cnt_a, tag_a, cnt_b, tag_b;
  logic               tag_valid_a, tag_valid_b, sum_valid_a, sum_valid_b;
  logic [1:0]         epoch_a, epoch_b;
  logic [SUM_W-1:0]   sum_a, sum_b;
  logic [PER_W-1:0]   per_a, per_b;
  logic [DRIFT_W-1:0] d_a, d_b;

  ddmtd #(.N(N), .T_A_FS(T_A_FS), .THRESH(THRESH), .AVG_M(AVG_M)) u_ddmtd (
    .clk_pll, .rst_n(rst_p_n), .clk_a, .clk_b, .use_mean,
    .cnt_a, .tag_a, .tag_valid_a, .epoch_a, .sum_a, .per_a, .sum_valid_a,
    .cnt_b, .tag_b, .tag_valid_b, .epoch_b, .sum_b, .per_b, .sum_valid_b,
    .n_cycles, .phase_fs, .phase_valid);

  drift_rate_calc #(.T_A_FS(T_A_FS)) u_drift (
    .clk_pll, .rst_n(rst_p_n),
    .sum_a, .per_a, .sum_valid_a, .sum_b, .per_b, .sum_valid_b,
    .d_a, .d_b, .d_valid(calibrated));

  phase_res_t res_p, res_a;
  logic       res_valid_p, res_ready_p, res_full, res_valid_a, res_pop_a;

  tag_capture #(.DEPTH(DEPTH), .TAG_LAT(THRESH + 3)) u_tags (
    .clk_pll, .rst_n(rst_p_n), .sof(sof_p),
    .cnt_a, .tag_a, .tag_valid_a, .epoch_a,
    .cnt_b, .tag_b, .tag_valid_b, .epoch_b,
    .d_a, .d_b, .d_valid(calibrated),
    .res(res_p), .res_valid(res_valid_p), .res_ready(res_ready_p), .drops);

  assign res_ready_p = !res_full;

  async_fifo #(.W($bits(phase_res_t)), .DEPTH(16)) u_xfer (
    .wr_clk(clk_pll), .wr_rst_n(rst_p_n), .wr_en(res_valid_p), .wr_data(res_p), .full(res_full),
    .rd_clk(clk_a), .rd_rst_n(rst_a_n), .rd_valid(res_valid_a), .rd_data(res_a), .rd_pop(res_pop_a));

  // ---- clk_a: timestamp
  timestamp_calc #(.T_A_FS(T_A_FS), .CYCLES_PER_SEC(CYCLES_PER_SEC),
                   .COARSE_LAT(COARSE_LAT), .DEPTH(DEPTH)) u_ts (
    .clk_a, .rst_n(rst_a_n), .sof(sof_a), .sof_lane(sof_lane_a), .sec, .cycles,
    .res(res_a), .res_valid(res_valid_a), .res_pop(res_pop_a),
    .bitslide, .fixed_delay_fs,
    .ts_valid, .ts_seq, .ts_sec, .ts_fs, .ts_delta_fs, .unmatched);
endmodule
