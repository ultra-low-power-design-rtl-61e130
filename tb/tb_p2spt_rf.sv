// tb_p2spt_rf: self-checking test of the two-port register file.
// Random writes and reads, including reads of the entry written in the same
// cycle (which must return the old word) and reads with re low (which must
// hold the previous read data), are checked against a shadow array.
// The registered read latency of one cycle is checked on every read.
module tb_p2spt_rf;
  localparam int DEPTH = 32, WIDTH = 12, AW = 5;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expect_q;
  bit exp_valid = 0;
  int n_collide = 0;

  always #5 clk = ~clk;

  p2spt_rf #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    // fill every entry
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = WIDTH'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check the read issued in the previous cycle
      if (exp_valid) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d rdata %h expected %h", t, rdata, expect_q);
        end
      end
      we = ($urandom_range(0, 1) == 1);
      re = ($urandom_range(0, 3) != 0);
      waddr = AW'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom);
      wdata = WIDTH'($urandom);
      if (re) begin
        expect_q = shadow[raddr];     // old contents, even when written now
        exp_valid = 1;
        if (we && waddr == raddr) n_collide++;
      end
      // with re low the output must hold: expect_q unchanged
      if (we) shadow[waddr] = wdata;
    end
    checks++;
    if (n_collide == 0) begin failures++; $display("FAIL: no same-address read/write exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
