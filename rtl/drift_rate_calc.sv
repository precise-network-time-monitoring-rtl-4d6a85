// drift_rate_calc: per-cycle period differences of the non-syntonized DDMTD.
//
// With N_A = sum_a / per_a and N_B = sum_b / per_b (mean or single-period
// values from the averagers), the clock relations
//   f_PLL = N_A / (N_A + 1) * f_A        and     f_B = (N_B + 1) / N_B * f_PLL
// give the period lost per clk_PLL cycle against each input clock:
//   d_a = T_PLL - T_A = T_A / N_A
//       = T_A * per_a / sum_a
//   d_b = T_PLL - T_B = T_PLL / (N_B + 1)
//       = T_A * per_b * (sum_a + per_a) / (sum_a * (sum_b + per_b))
// Both are computed in femtoseconds with DRIFT_FRAC fractional bits by one
// shared sequential divider (udivider), d_a first, then d_b, and are
// published together (d_valid goes high after the first pair and stays
// high). A new pair is computed whenever either sum has been updated since
// the last computation started; one computation takes about 2 * 96 + 4
// clk_PLL cycles, far less than one slow period.
//
// The formulas follow equations 1 and 3 to 5 of the method. Using the sums
// directly, the fixed-point format and the single shared divider are this
// implementation's choices. T_A is the nominal clk_A period.
module drift_rate_calc
  import pntm_pkg::*;
#(
  parameter int unsigned T_A_FS = 16_000_000
) (
  input  logic               clk_pll,
  input  logic               rst_n,
  input  logic [SUM_W-1:0]   sum_a,
  input  logic [PER_W-1:0]   per_a,
  input  logic               sum_valid_a,
  input  logic [SUM_W-1:0]   sum_b,
  input  logic [PER_W-1:0]   per_b,
  input  logic               sum_valid_b,
  output logic [DRIFT_W-1:0] d_a,
  output logic [DRIFT_W-1:0] d_b,
  output logic               d_valid
);
  localparam int unsigned DW = 96;
  localparam int unsigned VW = 64;

  typedef enum logic [1:0] {IDLE, DIV_A, DIV_B} state_t;
  state_t state;

  logic [SUM_W-1:0] sa, sb;
  logic [PER_W-1:0] pa, pb;
  logic             have_a, have_b, pending;
  logic             div_start, div_busy, div_done;
  logic [DW-1:0]    dividend, quotient;
  logic [VW-1:0]    divisor;
  logic [DRIFT_W-1:0] d_a_new;

  // Operands, formed from the snapshot taken when a computation starts.
  always_comb begin
    if (state == DIV_B) begin
      dividend = DW'((128'(T_A_FS) * 128'(pb) * 128'(sa + SUM_W'(pa))) << DRIFT_FRAC);
      divisor  = VW'(64'(sa) * 64'(sb + SUM_W'(pb)));
    end else begin
      dividend = DW'((128'(T_A_FS) * 128'(pa)) << DRIFT_FRAC);
      divisor  = VW'(sa);
    end
  end

  udivider #(.DW(DW), .VW(VW)) u_div (
    .clk(clk_pll), .rst_n, .start(div_start), .dividend, .divisor,
    .busy(div_busy), .done(div_done), .quotient);

  logic [SUM_W-1:0] lat_sa, lat_sb;
  logic [PER_W-1:0] lat_pa, lat_pb;

  always_ff @(posedge clk_pll) begin
    if (!rst_n) begin
      state     <= IDLE;
      lat_sa    <= '0;
      lat_sb    <= '0;
      lat_pa    <= '0;
      lat_pb    <= '0;
      sa        <= '0;
      sb        <= '0;
      pa        <= '0;
      pb        <= '0;
      have_a    <= 1'b0;
      have_b    <= 1'b0;
      pending   <= 1'b0;
      div_start <= 1'b0;
      d_a       <= '0;
      d_b       <= '0;
      d_a_new   <= '0;
      d_valid   <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (sum_valid_a) begin
        lat_sa <= sum_a;
        lat_pa <= per_a;
        have_a <= 1'b1;
      end
      if (sum_valid_b) begin
        lat_sb <= sum_b;
        lat_pb <= per_b;
        have_b <= 1'b1;
      end
      if (sum_valid_a || sum_valid_b) pending <= 1'b1;

      unique case (state)
        IDLE: if (pending && have_a && have_b && !sum_valid_a && !sum_valid_b) begin
          sa        <= lat_sa;
          sb        <= lat_sb;
          pa        <= lat_pa;
          pb        <= lat_pb;
          pending   <= 1'b0;
          div_start <= 1'b1;
          state     <= DIV_A;
        end
        DIV_A: if (div_done) begin
          d_a_new   <= DRIFT_W'(quotient);
          div_start <= 1'b1;
          state     <= DIV_B;
        end
        DIV_B: if (div_done) begin
          d_a     <= d_a_new;
          d_b     <= DRIFT_W'(quotient);
          d_valid <= 1'b1;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
