// tb_p2spt_ctrl: self-checking test of the control unit.
// Checks the start-up clearing (TAPS cycles, every address once, then
// ready), and for passes started with gaps of TAPS cycles (full rate) and
// longer: the input-file write at the circular pointer on the first cycle,
// the read address pointer - t, the coefficient read address t, the stage-B
// strobes one cycle later, the pointer advancing once per pass, and the
// iteration flags n % ALPHA == 0 and n % BETA == 0 at the end of each pass.
module tb_p2spt_ctrl;
  localparam int TAPS = 32, ALPHA = 2, BETA = 4, AW = 5, NPASS = 40;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic ready, clr, x_we, x_re, c_re, b_valid, b_first, b_last, n_mod_a0, n_mod_b0;
  logic [AW-1:0] clr_addr, x_waddr, x_raddr, c_raddr, b_tap;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  p2spt_ctrl #(.TAPS(TAPS), .ALPHA(ALPHA), .BETA(BETA)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int cleared [TAPS];
    int ptr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < TAPS; i++) cleared[i] = 0;
    for (int i = 0; i < TAPS; i++) begin
      check(clr && x_we && !ready && x_waddr == clr_addr, $sformatf("clear cycle %0d", i));
      cleared[clr_addr]++;
      @(negedge clk);
    end
    check(ready && !clr, "ready after clearing");
    for (int i = 0; i < TAPS; i++) check(cleared[i] == 1, $sformatf("address %0d cleared once", i));

    ptr = x_waddr;
    for (int m = 0; m < NPASS; m++) begin
      in_valid = 1;
      #1;   // combinational outputs follow in_valid
      for (int t = 0; t < TAPS; t++) begin
        // stage A, cycle t of pass m
        check(x_re && c_re && x_raddr == AW'(ptr - t) && c_raddr == AW'(t),
              $sformatf("pass %0d cycle %0d read addresses %0d %0d", m, t, x_raddr, c_raddr));
        check(x_we == (t == 0) && (t != 0 || x_waddr == AW'(ptr)),
              $sformatf("pass %0d cycle %0d write", m, t));
        // stage B of the previous cycle
        if (t > 0)
          check(b_valid && b_tap == AW'(t - 1) && b_first == (t == 1) && !b_last,
                $sformatf("pass %0d stage B tap %0d", m, t - 1));
        @(negedge clk);
        in_valid = 0;
      end
      // last tap in stage B
      check(b_valid && b_tap == AW'(TAPS - 1) && b_last, $sformatf("pass %0d last tap", m));
      check(n_mod_a0 == (m % ALPHA == 0) && n_mod_b0 == (m % BETA == 0),
            $sformatf("pass %0d iteration flags %0b %0b", m, n_mod_a0, n_mod_b0));
      ptr = ptr + 1;
      // idle gap: none on even passes (full rate), a few cycles on odd ones
      if (m % 2 == 1) begin
        @(negedge clk);
        repeat ($urandom_range(0, 5)) begin
          check(!b_valid && !x_re && !x_we, "idle between passes");
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TAPS * (NPASS + 4) * 2) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
