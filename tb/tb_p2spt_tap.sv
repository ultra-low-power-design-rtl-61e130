// tb_p2spt_tap: self-checking test of the folded tap unit.
// Passes of TAPS cycles are driven directly with random counters (many near
// the bound +-63), random samples (including zero and full scale) and random
// update enables. Per cycle the written-back counter c_new and the clipping
// flag are checked; at the end of each pass y, e and out_valid are checked
// against a model that forms each coefficient as a number and multiplies,
// instead of shifting. The sign of e used by the next pass is checked through
// the counters of that pass.
module tb_p2spt_tap;
  localparam int TAPS = 32, XW = 12, CW = 7, NB = 3, GUARD = 9, CMAX = 63;
  localparam int BEXP [NB] = '{9, 7, 5};
  localparam int NPASS = 300;
  logic clk = 0, rst_n = 0;
  logic b_valid = 0, b_first = 0, b_last = 0, upd_en = 0;
  logic signed [CW-1:0] c_old = '0, c_new;
  logic signed [XW-1:0] x_upd = '0, x_cur = '0, d_cur = '0, y_out, e_out;
  logic out_valid, sat_hit;
  int checks = 0, failures = 0, n_sat = 0, n_ysat = 0;

  always #5 clk = ~clk;

  p2spt_tap #(.TAPS(TAPS), .XW(XW), .CW(CW), .NB(NB), .BASE_EXP('{9, 7, 5}), .GUARD(GUARD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int sgn(input int v);
    return (v > 0) ? 1 : (v < 0) ? -1 : 0;
  endfunction

  function automatic int clip(input longint v, input longint lo, input longint hi);
    return int'((v > hi) ? hi : (v < lo) ? lo : v);
  endfunction

  // coefficient value times 2^GUARD
  function automatic longint coef(input int c);
    int m;
    longint w;
    m = (c < 0) ? -c : c;
    w = 0;
    for (int i = 0; i < NB; i++) begin
      int p;
      p = (m >> (2 * i)) & 3;
      if (p != 0) w += longint'(1 << (p - 1)) * (longint'(1) << (GUARD - BEXP[i]));
    end
    return (c < 0) ? -w : w;
  endfunction

  function automatic int rnd_x();
    case ($urandom_range(0, 7))
      0: return 0;
      1: return 2047;
      2: return -2048;
      default: return int'($urandom_range(0, 4095)) - 2048;
    endcase
  endfunction

  initial begin : stim
    int e_prev;
    int xs [TAPS + 1];
    repeat (2) @(negedge clk);
    rst_n = 1;
    e_prev = 0;      // e_sgn resets to zero
    for (int m = 0; m < NPASS; m++) begin
      longint acc;
      int y, e, d;
      bit u;
      u = ($urandom_range(0, 2) != 0);
      // xs[0] = x(n), xs[k+1] = x(n-1-k)
      for (int k = 0; k <= TAPS; k++) xs[k] = rnd_x();
      d = rnd_x();
      acc = 0;
      for (int t = 0; t < TAPS; t++) begin
        int c0, c1;
        bit clipped;
        c0 = ($urandom_range(0, 3) == 0) ? (($urandom_range(0, 1) == 1) ? CMAX : -CMAX)
                                         : int'($urandom_range(0, 126)) - 63;
        b_valid = 1; b_first = (t == 0); b_last = (t == TAPS - 1);
        c_old = CW'(c0);
        x_upd = XW'(xs[t + 1]);
        x_cur = XW'(xs[0]);
        d_cur = XW'(d);
        upd_en = u;
        c1 = c0 + (u ? sgn(e_prev) * sgn(xs[t + 1]) : 0);
        clipped = (c1 > CMAX) || (c1 < -CMAX);
        c1 = clip(c1, -CMAX, CMAX);
        #1;
        check(c_new == CW'(c1) && sat_hit == clipped,
              $sformatf("pass %0d tap %0d c %0d -> %0d (model %0d)", m, t, c0, c_new, c1));
        if (clipped) n_sat++;
        acc += longint'(xs[t]) * coef(c1);
        @(negedge clk);
        // a pass must not produce a result before its last tap
        if (t != TAPS - 1) check(!out_valid, "no early out_valid");
      end
      b_valid = 0; b_first = 0; b_last = 0;
      begin
        longint q;
        q = acc / (longint'(1) << GUARD);
        if (acc < 0 && (acc % (longint'(1) << GUARD)) != 0) q -= 1;   // floor
        y = clip(q, -2048, 2047);
        if (y != q) n_ysat++;
        e = clip(longint'(d) - longint'(y), -2048, 2047);
      end
      check(out_valid && y_out == XW'(y) && e_out == XW'(e),
            $sformatf("pass %0d y %0d/%0d e %0d/%0d", m, y_out, y, e_out, e));
      e_prev = e;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    check(n_sat > 0, "bound clipping exercised");
    check(n_ysat > 0, "output saturation exercised");
    $display("clipped counters %0d, saturated outputs %0d", n_sat, n_ysat);
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
