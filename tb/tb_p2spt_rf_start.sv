// tb_p2spt_rf_start: self-checking test of the register file start unit,
// connected to a p2spt_rf as in the canceller. Every read, including the read
// of the entry written in the same cycle, must return the newest word, one
// cycle after the read; the bypass flag must be high exactly for the reads
// of the entry written in the same cycle.
module tb_p2spt_rf_start;
  localparam int WIDTH = 12, AW = 5, DEPTH = 32;
  logic clk = 0, rst_n = 0;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, mem_rdata, rdata;
  logic bypass;
  int checks = 0, failures = 0, n_byp = 0;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expect_q;
  bit exp_byp, exp_valid = 0;

  always #5 clk = ~clk;

  p2spt_rf #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(mem_rdata));
  p2spt_rf_start #(.WIDTH(WIDTH), .AW(AW)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = WIDTH'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rdata !== expect_q || bypass !== exp_byp) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d rdata %h/%h bypass %0b/%0b", t, rdata, expect_q, bypass, exp_byp);
        end
      end
      we = ($urandom_range(0, 1) == 1);
      re = 1;
      waddr = AW'($urandom);
      raddr = ($urandom_range(0, 2) == 0) ? waddr : AW'($urandom);
      wdata = WIDTH'($urandom);
      if (we) shadow[waddr] = wdata;
      expect_q = shadow[raddr];        // newest word, including this cycle's write
      exp_byp = we && (waddr == raddr);
      if (exp_byp) n_byp++;
      exp_valid = 1;
    end
    checks++;
    if (n_byp == 0) begin failures++; $display("FAIL: bypass never exercised"); end
    $display("bypass reads: %0d", n_byp);
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
