// p2spt_rf_start: register file start unit (bypass path).
//
// At the first access of every folded pass the controller stores the previous
// input sample into the input register file and reads the same entry in the
// same cycle. A two-port SRAM cannot return the word it is writing, so this
// unit remembers the written word and, one cycle later, when the memory's
// read data appears, substitutes it for the memory output. The sample is
// still written into the file, so later passes read it from memory.
//
// Interface: the write and read ports as seen by the file, and mem_rdata from
// it. rdata is valid in the cycle after the read, like the file's own rdata;
// bypass is high in that cycle when the bypass path is in use. The bypass
// idea is the published design's; detecting it by address comparison is this
// implementation's choice.
module p2spt_rf_start #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned AW    = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  input  logic [WIDTH-1:0] mem_rdata,
  output logic [WIDTH-1:0] rdata,
  output logic             bypass
);

  logic             byp_q;
  logic [WIDTH-1:0] byp_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byp_q      <= 1'b0;
      byp_data_q <= '0;
    end else if (re) begin
      byp_q <= we && (waddr == raddr);
      if (we && (waddr == raddr)) byp_data_q <= wdata;
    end
  end

  assign bypass = byp_q;
  assign rdata  = byp_q ? byp_data_q : mem_rdata;

endmodule
