// p2spt_ctrl: control unit of the folded echo canceller.
//
// The 32 taps are folded onto one tap unit, so one 16 kHz sample takes one
// pass of TAPS clock cycles at 512 kHz. The unit produces every address and
// strobe of that pass:
//   * in_write_ctl (x_waddr): a circular pointer into the input register
//     file. At the first cycle of a pass the previous sample is written at the
//     pointer, over the oldest sample; the pointer then moves on by one, which
//     "shifts" the delay line without moving any data.
//   * in_read_ctl (x_raddr = pointer - t): the reads of cycle t = 0..TAPS-1
//     return x(n-1-t), newest first. Cycle 0 reads the entry being written;
//     the start unit supplies that word.
//   * c_raddr = t for the coefficient file. The tap unit works one cycle
//     later (stage B, b_* outputs) and writes the updated counter back at
//     b_tap, so read and write never address the same entry.
//   * iteration counters modulo ALPHA and BETA for the partial unit; they
//     advance when the last tap of a pass leaves stage B.
//   * after reset, TAPS cycles that write zero to every entry of both files
//     (clr, clr_addr); ready rises afterwards.
// A pass starts on in_valid; a new in_valid may come TAPS cycles after the
// previous one at the earliest (checked by an assertion). The counter/pointer
// structure is this implementation's; the published design names the unit
// and its in_read_ctl / in_write_ctl signals without detailing them.
module p2spt_ctrl #(
  parameter int unsigned TAPS  = 32,
  parameter int unsigned ALPHA = 2,
  parameter int unsigned BETA  = 4,
  localparam int unsigned AW   = $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          ready,
  // start-up clearing
  output logic          clr,
  output logic [AW-1:0] clr_addr,
  // input register file
  output logic          x_we,
  output logic [AW-1:0] x_waddr,
  output logic          x_re,
  output logic [AW-1:0] x_raddr,
  // coefficient register file (read side; the write side follows stage B)
  output logic          c_re,
  output logic [AW-1:0] c_raddr,
  // tap-unit stage
  output logic          b_valid,
  output logic [AW-1:0] b_tap,
  output logic          b_first,
  output logic          b_last,
  // iteration number of the pass in stage B, modulo ALPHA / BETA, is zero
  output logic          n_mod_a0,
  output logic          n_mod_b0
);

  typedef enum logic {ST_INIT, ST_RUN} state_t;

  state_t                      state;
  logic [AW-1:0]               init_cnt;
  logic                        a_busy;     // stage A running cycles 1..TAPS-1
  logic [AW-1:0]               a_tap;      // stage A tap index while a_busy
  logic [AW-1:0]               wptr;       // in_write_ctl
  logic [$clog2(ALPHA+1)-1:0]  n_a;
  logic [$clog2(BETA+1)-1:0]   n_b;

  logic          start;
  logic          a_act;
  logic [AW-1:0] a_t;

  assign ready = (state == ST_RUN);
  assign start = ready && in_valid && !a_busy;
  assign a_act = start || a_busy;
  assign a_t   = start ? '0 : a_tap;

  assign clr      = (state == ST_INIT);
  assign clr_addr = init_cnt;

  assign x_we    = clr || start;
  assign x_waddr = clr ? init_cnt : wptr;
  assign x_re    = a_act;
  assign x_raddr = wptr - a_t;
  assign c_re    = a_act;
  assign c_raddr = a_t;

  assign n_mod_a0 = (n_a == '0);
  assign n_mod_b0 = (n_b == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_INIT;
      init_cnt <= '0;
      a_busy   <= 1'b0;
      a_tap    <= '0;
      wptr     <= '0;
      b_valid  <= 1'b0;
      b_tap    <= '0;
      b_first  <= 1'b0;
      b_last   <= 1'b0;
      n_a      <= '0;
      n_b      <= '0;
    end else begin
      if (state == ST_INIT) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == AW'(TAPS - 1)) state <= ST_RUN;
      end

      // stage A
      if (a_act) begin
        if (a_t == AW'(TAPS - 1)) begin
          a_busy <= 1'b0;
          wptr   <= wptr + 1'b1;
        end else begin
          a_busy <= 1'b1;
          a_tap  <= a_t + 1'b1;
        end
      end

      // stage B follows stage A by one cycle (register-file read latency)
      b_valid <= a_act;
      b_tap   <= a_t;
      b_first <= a_act && (a_t == '0);
      b_last  <= a_act && (a_t == AW'(TAPS - 1));

      // iteration counters advance when a pass leaves stage B
      if (b_valid && b_last) begin
        n_a <= (n_a == ($bits(n_a))'(ALPHA - 1)) ? '0 : n_a + 1'b1;
        n_b <= (n_b == ($bits(n_b))'(BETA - 1))  ? '0 : n_b + 1'b1;
      end
    end
  end

  // A sample may only arrive when the previous pass has issued all its reads.
  a_sample_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (ready && !a_busy))
    else $error("p2spt_ctrl: in_valid while not ready or inside a pass");

  initial begin
    assert (TAPS == (1 << AW)) else $fatal(1, "TAPS must be a power of two");
    assert (ALPHA >= 1 && BETA >= 1) else $fatal(1, "ALPHA and BETA must be at least 1");
  end

endmodule
