// p2spt_tap: the single folded tap of the P2SPT echo canceller.
//
// Every cycle of a pass (b_valid) it handles one tap k, in the order
// k = 0..TAPS-1:
//   1. Update (sign-sign, partial): c' = bound(c + upd_en*sgn(e)*sgn(x_upd)),
//      where e is the error of the previous sample, x_upd = x(n-1-k) the
//      sample that error saw at tap k, and bound() clips c' to
//      +-(2^(2*NB)-1). c' goes back to the coefficient file (c_new).
//   2. Progressive coefficient: |c'| is split into NB base-4 digits p(i);
//      digit i contributes 0, 1, 2 or 4 (p = 0,1,2,3) times 2^-BASE_EXP[i].
//   3. Filter: the tap's sample x(n-k) (x_cur at tap 0, afterwards the
//      x_upd of the previous cycle, since x(n-k) = x((n-1)-(k-1))) is
//      extended by GUARD fraction bits and shifted once per digit; the
//      shifted words are added, negated for c' < 0, and accumulated.
// At the last tap the accumulator is truncated to XW bits (y = echo
// estimate), e = d - y is formed with saturation, its sign is kept for the
// next pass and out_valid pulses for one cycle. With GUARD >= max BASE_EXP
// every partial product is exact. There is no multiplier.
// The update, bound, digit coding and shift-add structure follow the
// published algorithm; the base exponents, GUARD and the saturation of y and
// e are this implementation's choices.
module p2spt_tap
  import p2spt_pkg::*;
#(
  parameter int unsigned TAPS     = 32,
  parameter int unsigned XW       = 12,
  parameter int unsigned CW       = 7,
  parameter int unsigned NB       = 3,
  parameter int unsigned BASE_EXP [NB] = '{9, 7, 5},
  parameter int unsigned GUARD    = 9,
  localparam int unsigned ACC_W   = XW + GUARD + $clog2(TAPS) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 b_valid,
  input  logic                 b_first,
  input  logic                 b_last,
  input  logic signed [CW-1:0] c_old,
  input  logic signed [XW-1:0] x_upd,
  input  logic signed [XW-1:0] x_cur,
  input  logic signed [XW-1:0] d_cur,
  input  logic                 upd_en,
  output logic signed [CW-1:0] c_new,
  output logic signed [XW-1:0] y_out,
  output logic signed [XW-1:0] e_out,
  output logic                 out_valid,
  output logic                 sat_hit
);

  localparam int CMAX = (1 << (2 * NB)) - 1;
  localparam logic signed [XW:0] YMAX = (XW+1)'((1 << (XW - 1)) - 1);
  localparam logic signed [XW:0] YMIN = -(XW+1)'(1 << (XW - 1));

  sgn_t                   e_sgn;     // sign of the previous error
  logic signed [XW-1:0]   x_hold;    // x_upd of the previous cycle
  logic signed [ACC_W-1:0] acc;

  sgn_t                    step;
  logic signed [CW:0]      c_sum;
  logic [CW-1:0]           mag;
  logic signed [XW-1:0]    x_tap;
  logic signed [ACC_W-1:0] x_ext;
  logic signed [ACC_W-1:0] pt_sum;
  logic signed [ACC_W-1:0] acc_next;
  logic signed [ACC_W-GUARD-1:0] y_wide;
  logic signed [XW-1:0]    y_sat;
  logic signed [XW:0]      e_wide;
  logic signed [XW-1:0]    e_sat;

  always_comb begin
    // 1. sign-sign partial update with bound
    step  = upd_en ? sgn_mul(e_sgn, sgn_of(x_upd[XW-1], x_upd == '0)) : SGN_ZERO;
    c_sum = (CW+1)'(c_old);
    unique case (step)
      SGN_POS: c_sum = c_sum + 1'b1;
      SGN_NEG: c_sum = c_sum - 1'b1;
      default: ;
    endcase
    sat_hit = 1'b0;
    if (c_sum > (CW+1)'(CMAX)) begin
      c_sum   = (CW+1)'(CMAX);
      sat_hit = 1'b1;
    end else if (c_sum < -(CW+1)'(CMAX)) begin
      c_sum   = -(CW+1)'(CMAX);
      sat_hit = 1'b1;
    end
    c_new = CW'(c_sum);
    mag   = c_new[CW-1] ? CW'(-c_new) : CW'(c_new);

    // 2./3. progressive power-of-two coefficient applied by shifting
    x_tap  = b_first ? x_cur : x_hold;
    x_ext  = ACC_W'(x_tap) <<< GUARD;
    pt_sum = '0;
    for (int i = 0; i < NB; i++) begin
      logic [1:0] p;
      p = mag[2*i +: 2];
      if (p != 2'd0)
        pt_sum = pt_sum + (x_ext >>> (BASE_EXP[i] - (int'(p) - 1)));
    end
    if (c_new[CW-1]) pt_sum = -pt_sum;
    acc_next = (b_first ? '0 : acc) + pt_sum;

    // output word and error, both saturated to XW bits
    y_wide = (ACC_W-GUARD)'(acc_next >>> GUARD);
    if (y_wide > (ACC_W-GUARD)'(YMAX))      y_sat = XW'(YMAX);
    else if (y_wide < (ACC_W-GUARD)'(YMIN)) y_sat = XW'(YMIN);
    else                                    y_sat = XW'(y_wide);
    e_wide = (XW+1)'(d_cur) - (XW+1)'(y_sat);
    if (e_wide > YMAX)      e_sat = XW'(YMAX);
    else if (e_wide < YMIN) e_sat = XW'(YMIN);
    else                    e_sat = XW'(e_wide);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_sgn     <= SGN_ZERO;
      x_hold    <= '0;
      acc       <= '0;
      y_out     <= '0;
      e_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (b_valid) begin
        x_hold <= x_upd;
        acc    <= acc_next;
        if (b_last) begin
          y_out     <= y_sat;
          e_out     <= e_sat;
          e_sgn     <= sgn_of(e_sat[XW-1], e_sat == '0);
          out_valid <= 1'b1;
        end
      end
    end
  end

  initial begin
    assert (CW >= 2 * NB + 1) else $fatal(1, "CW must hold +-(2^(2*NB)-1)");
    for (int i = 0; i < NB; i++)
      assert (BASE_EXP[i] >= 2 && BASE_EXP[i] <= GUARD)
        else $fatal(1, "each BASE_EXP must lie in 2..GUARD");
  end

endmodule
