// Population memory: a simple dual-port block RAM (one write port, one read
// port) of DEPTH words of DW bits. The selection unit keeps the parental and
// the offspring generation in two banks of one such memory, addressed by the
// top address bit, and uses two copies so that two individuals can be read in
// the same cycle. Write-first behaviour is not needed (reads and writes go to
// different banks) and is not provided.
//
// Timing: synchronous write; registered read, rdata holds the word addressed
// in the previous cycle.
module pop_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned DW    = 472,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
