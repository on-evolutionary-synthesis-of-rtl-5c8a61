// Fixed delay of LEN clock cycles (LEN >= 1) for a W-bit bus, built from a
// chain of registers. The genetic engine uses it to carry each chromosome
// alongside its evaluation in the VRC and the fitness unit.
module delay_line #(
  parameter int unsigned W   = 8,
  parameter int unsigned LEN = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] sr [LEN];

  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
  end

  assign q = sr[LEN-1];

endmodule
