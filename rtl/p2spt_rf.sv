// p2spt_rf: two-port register file, one write port and one read port.
//
// Stands in for the SRAM-type register file macros of the design (32 x 12 for
// the input samples, 32 x 7 for the counter coefficients). Replacing the tap
// delay line by such a file means that a new sample overwrites the oldest
// entry instead of moving every stored sample by one place.
//
// Timing: a write (we, waddr, wdata) takes effect at the rising edge. A read
// (re, raddr) is registered like an SRAM: rdata shows the entry one cycle
// later and holds it while re is low. A read of the entry that is written in
// the same cycle returns the old contents; the start unit (p2spt_rf_start)
// covers that case. The array has no reset, as an SRAM has none: the
// controller clears it after reset.
module p2spt_rf #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
