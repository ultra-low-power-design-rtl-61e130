// tb_p2spt_aec_workloads: the published evaluation runs of the echo
// canceller, each on its own canceller instance (default size: 32 taps,
// 12-bit samples, 32 clock cycles per sample) in its own closed hearing-aid
// loop (p2spt_aec_loop), all running side by side:
//   voices      man, woman, boy and girl for 12000, 18000, 20000 and 15000
//               samples, with a 50-sample forward path. The voices are
//               synthetic voiced signals with pitches 130, 260, 100 and
//               200 Hz (the boy lowest, the woman highest).
//   delays      the man's voice with forward paths of 100, 150 and 300
//               samples (the 50-sample case is the man's voice run above).
//   long voice  the man's voice for 700000 samples (about 44 s at 16 kHz)
//               with the echo channel changing every 3 ms throughout.
// Every sample of every run is checked bit exactly against the algorithm
// model, with latency and full rate. Each run must bring the output MSE
// over its last quarter well below that of the same loop without canceller:
// 6 dB for the voices and the long run, 3 dB for the longer forward delays
// (with a long delay the loop without canceller builds up its howl more
// slowly, so the ratio is smaller even though the residual error with
// canceller stays about the same at every delay, which is what that run is
// after). The long run must also see every mechanism: bypass reads, counter
// clipping, skipped updates and both partial-update rates. The echo channel
// peak is 0.1, strong enough that the loop without canceller howls with
// the 12 dB receiver gain.
module tb_p2spt_aec_workloads;
  localparam int N = 8;
  bit  done [N];
  int  checks [N], failures [N];

  p2spt_aec_loop #(.NSAMP(12000), .FWD(50), .SRC(1), .F0(130), .HPEAK_M(100), .MIN_DB(6), .REQUIRE_ALL(0),
                   .SEED(11), .NAME("man"))
    u_man   (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  p2spt_aec_loop #(.NSAMP(18000), .FWD(50), .SRC(1), .F0(260), .HPEAK_M(100), .MIN_DB(6), .REQUIRE_ALL(0),
                   .SEED(12), .NAME("woman"))
    u_woman (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  p2spt_aec_loop #(.NSAMP(20000), .FWD(50), .SRC(1), .F0(100), .HPEAK_M(100), .MIN_DB(6), .REQUIRE_ALL(0),
                   .SEED(13), .NAME("boy"))
    u_boy   (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  p2spt_aec_loop #(.NSAMP(15000), .FWD(50), .SRC(1), .F0(200), .HPEAK_M(100), .MIN_DB(6), .REQUIRE_ALL(0),
                   .SEED(14), .NAME("girl"))
    u_girl  (.done(done[3]), .checks(checks[3]), .failures(failures[3]));
  p2spt_aec_loop #(.NSAMP(12000), .FWD(100), .SRC(1), .F0(130), .HPEAK_M(100), .MIN_DB(3), .REQUIRE_ALL(0),
                   .SEED(11), .NAME("man, delay 100"))
    u_d100  (.done(done[4]), .checks(checks[4]), .failures(failures[4]));
  p2spt_aec_loop #(.NSAMP(12000), .FWD(150), .SRC(1), .F0(130), .HPEAK_M(100), .MIN_DB(3), .REQUIRE_ALL(0),
                   .SEED(11), .NAME("man, delay 150"))
    u_d150  (.done(done[5]), .checks(checks[5]), .failures(failures[5]));
  p2spt_aec_loop #(.NSAMP(12000), .FWD(300), .SRC(1), .F0(130), .HPEAK_M(100), .MIN_DB(3), .REQUIRE_ALL(0),
                   .SEED(11), .NAME("man, delay 300"))
    u_d300  (.done(done[6]), .checks(checks[6]), .failures(failures[6]));
  p2spt_aec_loop #(.NSAMP(700000), .FWD(50), .SRC(1), .F0(130), .HPEAK_M(100), .MIN_DB(6), .REQUIRE_ALL(1),
                   .SEED(7), .NAME("long voice"))
    u_long  (.done(done[7]), .checks(checks[7]), .failures(failures[7]));

  function automatic int total_checks();
    int s = 0;
    foreach (checks[i]) s += checks[i];
    return s;
  endfunction

  function automatic int total_failures();
    int s = 0;
    foreach (failures[i]) s += failures[i];
    return s;
  endfunction

  initial begin
    foreach (done[i]) wait (done[i]);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

  initial begin
    #(64'd700000 * 32 * 10 + 100000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures() + 1);
    $finish;
  end
endmodule
