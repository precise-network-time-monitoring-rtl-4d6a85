// pntm_pkg: widths, units and record types shared by the PNTM timestamper.
//
// Time is carried in femtoseconds (fs) so that the sub-picosecond DDMTD
// resolution (16 ns / 16385 = 0.98 ps) is not lost to rounding before the
// final sum. Drift rates (the period difference per clk_PLL cycle) are
// unsigned fixed point with DRIFT_FRAC fractional bits of a femtosecond.
// The 16 ns clock, N = 16384 and the 100-period average come from the
// design description; the widths, the sequence numbers and the record
// layout are choices of this implementation.
package pntm_pkg;

  // DDMTD counters: N_A, N_B and the tags (clk_PLL cycles per slow period).
  localparam int unsigned TAG_W      = 20;
  // Sum of up to 255 periods of TAG_W bits.
  localparam int unsigned SUM_W      = 28;
  // Number of periods in a sum (100 in mean mode, 1 in instantaneous mode).
  localparam int unsigned PER_W      = 8;
  // Drift rate: fs per clk_PLL cycle, DRIFT_FRAC fractional bits.
  localparam int unsigned DRIFT_FRAC = 24;
  localparam int unsigned DRIFT_W    = 48;
  // Signed cycle distance from the SoF capture to the next slow-clock edge.
  localparam int unsigned K_W        = 24;
  // Time of day: seconds, clk_A cycles within the second, fs within second.
  localparam int unsigned SEC_W      = 40;
  localparam int unsigned CYC_W      = 28;
  localparam int unsigned FS_W       = 52;
  // SoF sequence number, used to keep the two capture paths paired.
  localparam int unsigned SEQ_W      = 12;

  // One byte on a 1 Gb/s link lasts 8 ns; one bit (bitslide step) 800 ps.
  localparam longint unsigned BYTE_FS = 64'd8_000_000;
  localparam longint unsigned UI_FS   = 64'd800_000;

  // DDMTD counter values frozen at a start of frame (clk_PLL domain).
  typedef struct packed {
    logic [SEQ_W-1:0] seq;
    logic [TAG_W-1:0] tag_a_sof;   // Tag_ASoF
    logic [TAG_W-1:0] tag_b_sof;   // Tag_BSoF
    logic [1:0]       epoch_a;     // clk_ASlow edges seen before the SoF
    logic [1:0]       epoch_b;     // clk_BSlow edges seen before the SoF
  } sof_tags_t;

  // Result of the DDMTD side for one SoF, handed to the clk_A domain.
  typedef struct packed {
    logic [SEQ_W-1:0]      seq;
    logic signed [K_W-1:0] k_a;    // Tag_A - Tag_ASoF - pipeline latency
    logic signed [K_W-1:0] k_b;    // Tag_B - Tag_BSoF - pipeline latency
    logic [DRIFT_W-1:0]    d_a;    // T_PLL - T_A  (fs, fixed point)
    logic [DRIFT_W-1:0]    d_b;    // T_PLL - T_B  (fs, fixed point)
  } phase_res_t;

  // Seconds and cycles counters frozen at a start of frame (clk_A domain).
  typedef struct packed {
    logic [SEQ_W-1:0] seq;
    logic [SEC_W-1:0] sec;
    logic [CYC_W-1:0] cycles;
    logic             lane;        // byte lane of the /S/ code-group
  } coarse_t;

endpackage
