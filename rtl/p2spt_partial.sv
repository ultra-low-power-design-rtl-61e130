// p2spt_partial: partial unit, the 2-staged periodic partial update decision.
//
// While a pass streams the freshly updated counters c(k) through the tap
// unit, this unit keeps the largest magnitude |c(k)| over the decision window
// k = DELTA_S .. DELTA_S+DELTA_L-1. When the last tap of the pass goes by it
// decides whether the error of this iteration n will update the coefficients
// in the next pass:
//     upd_en = (n % ALPHA == 0) && (max <= DELTA_B || n % BETA == 0)
// With ALPHA = 2 and BETA = 4 the coefficients adapt on every second sample
// while the window's counters are small and on every fourth once they have
// grown past DELTA_B. slow_mode reports the second case. Both outputs are
// registered and hold until the end of the next pass.
// The rule and ALPHA/BETA follow the published algorithm; the window
// (DELTA_S, DELTA_L) and threshold DELTA_B are this implementation's values.
module p2spt_partial #(
  parameter int unsigned TAPS    = 32,
  parameter int unsigned CW      = 7,
  parameter int unsigned DELTA_S = 0,
  parameter int unsigned DELTA_L = 8,
  parameter int unsigned DELTA_B = 32,
  localparam int unsigned AW     = $clog2(TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 b_valid,
  input  logic [AW-1:0]        b_tap,
  input  logic                 b_first,
  input  logic                 b_last,
  input  logic signed [CW-1:0] c_new,
  input  logic                 n_mod_a0,
  input  logic                 n_mod_b0,
  output logic                 upd_en,
  output logic                 slow_mode
);

  logic [CW-1:0] mx;
  logic [CW-1:0] mag;
  logic          in_win;
  logic [CW-1:0] mx_next;
  logic          slow;

  always_comb begin
    mag     = c_new[CW-1] ? CW'(-c_new) : CW'(c_new);
    in_win  = (int'(b_tap) >= int'(DELTA_S)) && (int'(b_tap) < int'(DELTA_S + DELTA_L));
    mx_next = b_first ? '0 : mx;
    if (in_win && mag > mx_next) mx_next = mag;
    slow    = (int'(mx_next) > DELTA_B);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx        <= '0;
      upd_en    <= 1'b0;
      slow_mode <= 1'b0;
    end else if (b_valid) begin
      mx <= mx_next;
      if (b_last) begin
        upd_en    <= n_mod_a0 && (!slow || n_mod_b0);
        slow_mode <= slow;
      end
    end
  end

endmodule
