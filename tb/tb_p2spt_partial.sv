// tb_p2spt_partial: self-checking test of the partial-update decision.
// Random passes of TAPS counters are streamed in; the counters of the decision
// window are sometimes kept small and sometimes pushed past DELTA_B (also
// exactly to DELTA_B). After each pass upd_en and slow_mode are compared with
// (n % ALPHA == 0) && (max|c| <= DELTA_B || n % BETA == 0) worked out here.
module tb_p2spt_partial;
  localparam int TAPS = 32, CW = 7, DS = 0, DL = 8, DB = 32, AW = 5;
  localparam int ALPHA = 2, BETA = 4, NPASS = 400;
  logic clk = 0, rst_n = 0;
  logic b_valid = 0, b_first = 0, b_last = 0, n_mod_a0 = 0, n_mod_b0 = 0;
  logic [AW-1:0] b_tap = '0;
  logic signed [CW-1:0] c_new = '0;
  logic upd_en, slow_mode;
  int checks = 0, failures = 0, n_slow = 0, n_upd = 0;

  always #5 clk = ~clk;

  p2spt_partial #(.TAPS(TAPS), .CW(CW), .DELTA_S(DS), .DELTA_L(DL), .DELTA_B(DB)) dut (.*);

  initial begin : stim
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (upd_en || slow_mode) begin failures++; $display("FAIL: outputs after reset"); end
    for (int m = 0; m < NPASS; m++) begin
      int mx, lim;
      bit exp_upd, exp_slow;
      mx = 0;
      lim = ($urandom_range(0, 2) == 0) ? 63 : (($urandom_range(0, 3) == 0) ? DB : DB - 1);
      for (int t = 0; t < TAPS; t++) begin
        int v;
        if (t >= DS && t < DS + DL) v = int'($urandom_range(0, 2 * lim)) - lim;
        else                        v = int'($urandom_range(0, 126)) - 63;
        if (t >= DS && t < DS + DL && (v < 0 ? -v : v) > mx) mx = (v < 0 ? -v : v);
        b_valid = 1; b_tap = AW'(t); b_first = (t == 0); b_last = (t == TAPS - 1);
        c_new = CW'(v);
        n_mod_a0 = (m % ALPHA == 0); n_mod_b0 = (m % BETA == 0);
        @(negedge clk);
      end
      b_valid = 0; b_first = 0; b_last = 0;
      exp_slow = (mx > DB);
      exp_upd = (m % ALPHA == 0) && (!exp_slow || (m % BETA == 0));
      checks++;
      if (upd_en !== exp_upd || slow_mode !== exp_slow) begin
        failures++;
        if (failures < 10) $display("FAIL pass %0d max %0d: upd %0b/%0b slow %0b/%0b", m, mx, upd_en, exp_upd, slow_mode, exp_slow);
      end
      if (slow_mode) n_slow++;
      if (upd_en) n_upd++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      checks++;
      if (upd_en !== exp_upd || slow_mode !== exp_slow) begin failures++; $display("FAIL: decision not held"); end
    end
    checks++;
    if (n_slow == 0 || n_slow == NPASS || n_upd == 0) begin failures++; $display("FAIL: cases not covered"); end
    $display("slow passes %0d, update passes %0d", n_slow, n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPASS * (TAPS + 3) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
