// p2spt_aec_loop: closed-loop test harness for the echo canceller, shared by
// the end-to-end and workload testbenches (it is not a testbench itself).
//
// It runs one p2spt_aec at its default size (32 taps, 12-bit samples, 32
// clock cycles per sample) inside a model of the hearing-aid loop:
//   microphone   d(n) = s(n) + sum_j h(j) u(n-j)          (echo channel h)
//   receiver     u(n) = sat(4 * e(n - FWD))               (forward path, 12 dB)
//   canceller    x = u, d -> e = d - y
// The echo channel has 40 taps (2-sample acoustic delay, decaying
// oscillation, largest tap HPEAK_M / 1000). Every 3 ms (48 samples) its
// amplitude is redrawn within +-10 % and, with JITTER, its delay is moved by
// -1, 0 or +1 sample (Gaussian draw: 16 %, 68 %, 16 %). The source s is
// white noise (SRC = 0) or a voiced, speech-like signal (SRC = 1): noise
// plus a pitch pulse train at F0 (with vibrato) through a formant
// resonator, in syllables of about 200 ms separated by pauses.
//
// Per sample it checks y, e and the partial-update decision against a
// sample-level model of the P2SPT algorithm (bit exact, using a multiplier
// rather than shifts), and the latency of TAPS clock edges at the full rate
// of one sample every TAPS cycles. At the end it compares the mean square of
// e - s over the last quarter of the run with that of the same loop without
// canceller (output = d), and requires a reduction of at least MIN_DB. It
// counts bypass reads, counter clipping, enabled and skipped updates, and
// fast and slow partial-update rates; REQUIRE_ALL makes each of them
// required. Results go out on the ports; done rises at the end.
module p2spt_aec_loop #(
  parameter int    NSAMP  = 8000,
  parameter int    FWD    = 50,
  parameter int    SRC    = 0,
  parameter int    F0     = 120,    // pitch of the voiced source, Hz
  parameter int    SAMP   = 400,
  parameter int    HPEAK_M = 150,   // largest echo tap, in thousandths
  parameter int    MIN_DB = 6,      // required MSE reduction, dB
  parameter bit    JITTER = 1'b1,   // also move the echo channel by -1..+1 samples
  parameter bit    REQUIRE_ALL = 1'b1,
  parameter int unsigned SEED = 1,
  parameter string NAME   = "loop"
) (
  output bit done,
  output int checks,
  output int failures
);

  localparam int TAPS = 32, XW = 12, NB = 3, GUARD = 9;
  localparam int ALPHA = 2, BETA = 4, DS = 0, DL = 8, DB = 32;
  localparam int BEXP [NB] = '{9, 7, 5};
  localparam int HLEN = 40;
  localparam int CMAX = 63;
  localparam int RING = 512;     // history kept (> FWD, > pipeline depth)

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready, in_valid = 1'b0, out_valid, upd_en, slow_mode, bypass, bound_hit;
  logic signed [XW-1:0] x_in = '0, d_in = '0, y_out, e_out;

  always #5 clk = ~clk;

  p2spt_aec dut (
    .clk, .rst_n, .ready, .in_valid, .x_in, .d_in,
    .out_valid, .y_out, .e_out, .upd_en, .slow_mode, .bypass, .bound_hit
  );

  int n_bypass = 0, n_bound = 0, n_upd_on = 0, n_upd_off = 0, n_slow = 0, n_fast = 0;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (bypass)    n_bypass++;
    if (bound_hit) n_bound++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL [%s]: %s", NAME, what);
    end
  endtask

  // ---------------- sample-level model of the algorithm ----------------
  int c_m [TAPS];
  int xv_prev [TAPS];       // x(n-1-k) of the previous iteration
  int e_prev = 0;
  bit upd_prev = 1'b0;

  function automatic int sgn(input int v);
    return (v > 0) ? 1 : (v < 0) ? -1 : 0;
  endfunction

  function automatic int sat(input longint v, input int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    return int'((v > hi) ? hi : (v < lo) ? lo : v);
  endfunction

  // Coefficient of counter c, times 2^GUARD (an integer).
  function automatic longint coef(input int c);
    int m;
    longint w;
    m = (c < 0) ? -c : c;
    w = 0;
    for (int i = 0; i < NB; i++) begin
      int p, b;
      p = (m / (4 ** i)) % 4;
      b = (p == 0) ? 0 : (1 << (p - 1));
      w += longint'(b) * (64'sd1 <<< (GUARD - BEXP[i]));
    end
    return (c < 0) ? -w : w;
  endfunction

  function automatic longint floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q -= 1;
    return q;
  endfunction

  task automatic model_step(input int n, input int x, input int d,
                            output int y, output int e, output bit upd, output bit slow);
    int xv [TAPS];
    longint acc;
    int mx, a;
    acc = 0;
    mx = 0;
    for (int k = 0; k < TAPS; k++) begin
      if (upd_prev) begin
        c_m[k] += sgn(e_prev) * sgn(xv_prev[k]);
        if (c_m[k] > CMAX) c_m[k] = CMAX;
        if (c_m[k] < -CMAX) c_m[k] = -CMAX;
      end
    end
    xv[0] = x;
    for (int k = 1; k < TAPS; k++) xv[k] = xv_prev[k-1];
    for (int k = 0; k < TAPS; k++) acc += longint'(xv[k]) * coef(c_m[k]);
    y = sat(floor_div(acc, 64'sd1 <<< GUARD), XW);
    e = sat(longint'(d) - longint'(y), XW);
    for (int k = DS; k < DS + DL; k++) begin
      a = (c_m[k] < 0) ? -c_m[k] : c_m[k];
      if (a > mx) mx = a;
    end
    slow = (mx > DB);
    upd = ((n % ALPHA) == 0) && (!slow || ((n % BETA) == 0));
    xv_prev = xv;
    e_prev = e;
    upd_prev = upd;
  endtask

  // ---------------- acoustic loop ----------------
  real h0 [HLEN];
  real h  [HLEN];
  int  u_hist [HLEN];       // u(n-j), loop with canceller
  int  u2_hist [HLEN];      // u(n-j), loop without canceller
  int  e_ring [RING];
  int  e2_ring [RING];
  int  s_ring [RING];
  int  x_ring [RING];
  int  d_ring [RING];
  longint t_ring [RING];
  longint cycle = 0;
  int  n_in = 0, n_out = 0;
  bit  done_drive = 1'b0;
  real p_with = 0.0, p_without = 0.0;

  // Own generator (32-bit LCG) so that each run is reproducible.
  int unsigned rng = 32'h2545_F491 ^ (SEED * 32'h9E37_79B9);
  function automatic int unsigned rnd(input int unsigned lo, input int unsigned hi);
    rng = rng * 32'd1664525 + 32'd1013904223;
    return lo + ((rng >> 8) % (hi - lo + 1));
  endfunction

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 4; i++) s += real'(rnd(0, 100000)) / 100000.0 - 0.5;
    return s * 1.732;   // unit variance, roughly normal
  endfunction

  // Voiced source: white noise plus a pitch pulse train (with 5 Hz vibrato)
  // through one formant resonator, in syllables of 200 ms with 50 ms pauses.
  real phase = 0.0, r1 = 0.0, r2 = 0.0;
  function automatic int source(input int n);
    real f, ex, v, env, tsyl, fc, a1, a2;
    if (SRC == 0) return int'(rnd(0, SAMP * 2)) - SAMP;
    f = real'(F0) * (1.0 + 0.03 * $sin(2.0 * 3.14159265 * 5.0 * real'(n) / 16000.0));
    phase += f / 16000.0;
    ex = real'(int'(rnd(0, 2000)) - 1000) / 1000.0;
    if (phase >= 1.0) begin
      phase -= 1.0;
      ex += 3.0;
    end
    fc = 4.0 * real'(F0);                       // formant near 4 x pitch
    a1 = 2.0 * 0.9 * $cos(2.0 * 3.14159265 * fc / 16000.0);
    a2 = -0.81;
    v = ex + a1 * r1 + a2 * r2;
    r2 = r1;
    r1 = v;
    tsyl = real'(n % 4000) / 3200.0;
    env = (tsyl < 1.0) ? $sin(3.14159265 * tsyl) : 0.0;
    return int'(real'(SAMP) * 0.15 * env * v) + int'(rnd(0, 20)) - 10;
  endfunction

  initial begin
    for (int j = 0; j < HLEN; j++) begin
      h0[j] = (j < 2) ? 0.0 : real'(HPEAK_M) / 1000.0 * $pow(0.82, real'(j - 2)) * $cos(1.3 * real'(j - 2));
      h[j] = h0[j];
      u_hist[j] = 0;
      u2_hist[j] = 0;
    end
    for (int k = 0; k < TAPS; k++) begin c_m[k] = 0; xv_prev[k] = 0; end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      t_ring[n_in % RING] = cycle;   // the edge that takes the sample
      n_in++;
    end
  end

  // Driver: one sample every TAPS cycles. Sample n+1 enters before the
  // result of sample n leaves; the loop needs e only FWD samples later.
  initial begin : drive
    int u, s, d, cyc, sh;
    real echo, g;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(posedge clk); cyc++; end
    check(cyc == TAPS || cyc == TAPS - 1, $sformatf("ready after %0d cycles", cyc));

    for (int n = 0; n < NSAMP; n++) begin
      if (n % 48 == 0 && n > 0) begin
        g = 1.0 + 0.05 * gauss();
        if (g > 1.1) g = 1.1;
        if (g < 0.9) g = 0.9;
        sh = JITTER ? $rtoi($floor(0.5 * gauss() + 0.5)) : 0;
        if (sh > 1) sh = 1;
        if (sh < -1) sh = -1;
        for (int j = 0; j < HLEN; j++)
          h[j] = (j - sh >= 0 && j - sh < HLEN) ? h0[j - sh] * g : 0.0;
      end
      s = source(n);
      // loop with canceller
      if (n >= FWD) begin
        check(n - FWD < n_out, $sformatf("result %0d available in time", n - FWD));
        u = sat(4 * longint'(e_ring[(n - FWD) % RING]), XW);
      end else u = 0;
      for (int j = HLEN - 1; j > 0; j--) u_hist[j] = u_hist[j-1];
      u_hist[0] = u;
      echo = 0.0;
      for (int j = 0; j < HLEN; j++) echo += h[j] * real'(u_hist[j]);
      d = sat(longint'(s) + longint'($rtoi(echo)), XW);
      s_ring[n % RING] = s; x_ring[n % RING] = u; d_ring[n % RING] = d;
      // the same loop without canceller
      for (int j = HLEN - 1; j > 0; j--) u2_hist[j] = u2_hist[j-1];
      u2_hist[0] = (n >= FWD) ? sat(4 * longint'(e2_ring[(n - FWD) % RING]), XW) : 0;
      echo = 0.0;
      for (int j = 0; j < HLEN; j++) echo += h[j] * real'(u2_hist[j]);
      e2_ring[n % RING] = sat(longint'(s) + longint'($rtoi(echo)), XW);
      if (n >= NSAMP - NSAMP / 4) p_without += real'(e2_ring[n % RING] - s) ** 2;

      @(negedge clk);
      x_in = XW'(u);
      d_in = XW'(d);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      x_in = XW'($urandom);
      d_in = XW'($urandom);
      repeat (TAPS - 2) @(negedge clk);
    end
    done_drive = 1'b1;
  end

  // Monitor: compare every result with the model.
  always @(posedge clk) begin : monitor
    int y_ref, e_ref, i;
    bit upd_ref, slow_ref;
    if (rst_n && out_valid && n_out < NSAMP) begin
      i = n_out % RING;
      // out_valid seen at this edge was set by the previous one
      check(cycle - 1 - t_ring[i] == TAPS,
            $sformatf("sample %0d latency %0d", n_out, cycle - 1 - t_ring[i]));
      model_step(n_out, x_ring[i], d_ring[i], y_ref, e_ref, upd_ref, slow_ref);
      check(y_out == XW'(y_ref), $sformatf("sample %0d y %0d model %0d", n_out, y_out, y_ref));
      check(e_out == XW'(e_ref), $sformatf("sample %0d e %0d model %0d", n_out, e_out, e_ref));
      check(upd_en == upd_ref && slow_mode == slow_ref,
            $sformatf("sample %0d upd %0b/%0b slow %0b/%0b", n_out, upd_en, upd_ref, slow_mode, slow_ref));
      if (upd_en) n_upd_on++; else n_upd_off++;
      if (slow_mode) n_slow++; else n_fast++;
      e_ring[i] = int'(e_out);
      if (n_out >= NSAMP - NSAMP / 4) p_with += real'(int'(e_out) - s_ring[i]) ** 2;
      n_out++;
    end
  end

  initial begin : finish
    real db;
    wait (done_drive && n_out == NSAMP);
    repeat (2) @(posedge clk);
    db = 10.0 * $log10((p_without + 1.0) / (p_with + 1.0));
    $display("[%s] %0d samples, forward path %0d: output MSE vs source over the last quarter: without canceller %0.1f, with %0.1f (%0.1f dB lower)",
             NAME, NSAMP, FWD, p_without / real'(NSAMP / 4), p_with / real'(NSAMP / 4), db);
    check(db >= real'(MIN_DB), $sformatf("output MSE at least %0d dB below the loop without canceller", MIN_DB));
    $display("[%s] events: bypass=%0d bound=%0d upd_on=%0d upd_off=%0d slow=%0d fast=%0d",
             NAME, n_bypass, n_bound, n_upd_on, n_upd_off, n_slow, n_fast);
    check(n_bypass == NSAMP, "one bypass read per sample");
    if (REQUIRE_ALL) begin
      check(n_bound > 0, "bound clipping occurred");
      check(n_upd_on > 0 && n_upd_off > 0, "updates both enabled and skipped");
      check(n_slow > 0 && n_fast > 0, "both partial-update rates used");
    end
    done = 1'b1;
  end

endmodule
