// p2spt_aec: ultra-low-power acoustic feedback (echo) canceller for an
// in-the-ear hearing aid, using the P2SPT (partial & progressive signed
// power-of-two) adaptive algorithm on a fully folded datapath.
//
// Per 16 kHz sample n it computes the echo estimate y(n) = sum_k w(k) x(n-k)
// over TAPS = 32 past receiver samples x, and the cleaned microphone signal
// e(n) = d(n) - y(n). Each coefficient w(k) is derived from a 7-bit counter
// c(k) that moves by at most one step per update (sign-sign rule) and whose
// base-4 digits select powers of two, so no multiplier is used anywhere.
// Updates happen on every 2nd sample, or every 4th once the counters of the
// decision window are large (partial unit).
//
// Structure (all four blocks of the published architecture):
//   p2spt_ctrl    addresses and strobes, start-up clearing
//   p2spt_rf x2   32x12 input samples, 32x7 counter coefficients
//   p2spt_rf_start bypass for the sample written and read in the same cycle
//   p2spt_tap     the one tap: update, progressive coefficient, shift-add MAC
//   p2spt_partial partial-update decision
//
// Interface and timing: clk is the 512 kHz fold clock. After reset, ready
// rises after TAPS cycles (register files cleared). in_valid strobes a
// sample pair (x_in = signal sent to the receiver, d_in = microphone), at
// most one per TAPS cycles. The update of the coefficients with the previous
// error is folded into the same pass, ahead of each tap's filtering. y_out
// and e_out are registered with out_valid by the TAPS-th clock edge after the
// edge that takes in_valid, and hold until the next result, so at full rate
// a result leaves one cycle after the next sample has entered. upd_en and
// slow_mode show the partial unit's decision for the error just produced.
// bypass marks a cycle in which the start unit supplies the input-file read
// data; bound_hit marks a tap whose counter was clipped by the bound. Samples are two's complement Q1.11.
module p2spt_aec
  import p2spt_pkg::*;
#(
  parameter int unsigned TAPS     = TAPS_DEF,
  parameter int unsigned XW       = XW_DEF,
  parameter int unsigned CW       = CW_DEF,
  parameter int unsigned NB       = NB_DEF,
  parameter int unsigned BASE_EXP [NB] = '{9, 7, 5},
  parameter int unsigned GUARD    = 9,
  parameter int unsigned ALPHA    = 2,
  parameter int unsigned BETA     = 4,
  parameter int unsigned DELTA_S  = 0,
  parameter int unsigned DELTA_L  = 8,
  parameter int unsigned DELTA_B  = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] d_in,
  output logic                 out_valid,
  output logic signed [XW-1:0] y_out,
  output logic signed [XW-1:0] e_out,
  output logic                 upd_en,
  output logic                 slow_mode,
  output logic                 bypass,
  output logic                 bound_hit
);

  localparam int unsigned AW = $clog2(TAPS);

  // control
  logic          clr;
  logic [AW-1:0] clr_addr;
  logic          x_we, x_re, c_re;
  logic [AW-1:0] x_waddr, x_raddr, c_raddr;
  logic          b_valid, b_first, b_last;
  logic [AW-1:0] b_tap;
  logic          n_mod_a0, n_mod_b0;

  // sample registers: x_cur = x(n), d_cur = d(n) of the pass in progress
  logic signed [XW-1:0] x_cur, d_cur;

  // register files
  logic [XW-1:0] x_wdata, x_mem_q, x_rd;
  logic          x_bypass;
  logic          c_we;
  logic [AW-1:0] c_waddr;
  logic [CW-1:0] c_wdata, c_q;
  logic signed [CW-1:0] c_new;
  logic          sat_hit;

  p2spt_ctrl #(.TAPS(TAPS), .ALPHA(ALPHA), .BETA(BETA)) u_ctrl (
    .clk, .rst_n, .in_valid, .ready,
    .clr, .clr_addr,
    .x_we, .x_waddr, .x_re, .x_raddr,
    .c_re, .c_raddr,
    .b_valid, .b_tap, .b_first, .b_last,
    .n_mod_a0, .n_mod_b0
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cur <= '0;
      d_cur <= '0;
    end else if (in_valid && ready) begin
      x_cur <= x_in;
      d_cur <= d_in;
    end
  end

  // The previous sample x(n-1) enters the input file when sample n arrives.
  assign x_wdata = clr ? '0 : x_cur;

  p2spt_rf #(.DEPTH(TAPS), .WIDTH(XW)) u_x_rf (
    .clk, .we(x_we), .waddr(x_waddr), .wdata(x_wdata),
    .re(x_re), .raddr(x_raddr), .rdata(x_mem_q)
  );

  p2spt_rf_start #(.WIDTH(XW), .AW(AW)) u_start (
    .clk, .rst_n, .we(x_we), .waddr(x_waddr), .wdata(x_wdata),
    .re(x_re), .raddr(x_raddr), .mem_rdata(x_mem_q),
    .rdata(x_rd), .bypass(x_bypass)
  );

  assign bypass    = x_bypass;
  assign bound_hit = b_valid && sat_hit;

  assign c_we    = clr || b_valid;
  assign c_waddr = clr ? clr_addr : b_tap;
  assign c_wdata = clr ? '0 : c_new;

  p2spt_rf #(.DEPTH(TAPS), .WIDTH(CW)) u_c_rf (
    .clk, .we(c_we), .waddr(c_waddr), .wdata(c_wdata),
    .re(c_re), .raddr(c_raddr), .rdata(c_q)
  );

  p2spt_tap #(
    .TAPS(TAPS), .XW(XW), .CW(CW), .NB(NB), .BASE_EXP(BASE_EXP), .GUARD(GUARD)
  ) u_tap (
    .clk, .rst_n, .b_valid, .b_first, .b_last,
    .c_old(c_q), .x_upd(x_rd), .x_cur, .d_cur, .upd_en,
    .c_new, .y_out, .e_out, .out_valid, .sat_hit
  );

  p2spt_partial #(
    .TAPS(TAPS), .CW(CW), .DELTA_S(DELTA_S), .DELTA_L(DELTA_L), .DELTA_B(DELTA_B)
  ) u_partial (
    .clk, .rst_n, .b_valid, .b_tap, .b_first, .b_last, .c_new,
    .n_mod_a0, .n_mod_b0, .upd_en, .slow_mode
  );

endmodule
