// tb_p2spt_aec: end-to-end test of the echo canceller at its default size
// (32 taps, 12-bit samples, 7-bit counters, 32 clock cycles per sample).
// One closed hearing-aid loop (p2spt_aec_loop) with a white-noise source,
// a 50-sample forward path and 12 dB receiver gain, 8000 samples (0.5 s at
// 16 kHz). Every sample is checked bit exactly against a model of the
// algorithm, the latency and the full sample rate are checked, the output
// must be at least 6 dB closer to the source than without canceller, and
// every mechanism (bypass, bound clipping, skipped updates, both partial
// update rates) must occur.
module tb_p2spt_aec;
  bit done;
  int checks, failures;

  p2spt_aec_loop #(.NSAMP(8000), .FWD(50), .SRC(0), .NAME("white noise")) u_loop (
    .done, .checks, .failures);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(8000 * 32 * 10 + 100000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
