// Pipelined adder tree: sums N unsigned IN_W-bit values, one register per
// tree level, so the sum of the operands presented at cycle t appears at
// t+LEVELS with LEVELS = clog2(N). Missing leaves of a non-power-of-two N are
// zero. Used by the fitness unit to add up the per-output errors.
module adder_tree #(
  parameter int unsigned N      = 32,
  parameter int unsigned IN_W   = 16,
  parameter int unsigned LEVELS = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned OUT_W  = IN_W + LEVELS
) (
  input  logic                      clk,
  input  logic [N-1:0][IN_W-1:0]    in,
  output logic [OUT_W-1:0]          sum
);

  localparam int unsigned LEAVES = 1 << LEVELS;

  // lvl[l] holds LEAVES >> l partial sums; level 0 is the (unregistered) input.
  logic [OUT_W-1:0] lvl [LEVELS+1][LEAVES];

  always_comb
    for (int i = 0; i < LEAVES; i++)
      lvl[0][i] = (i < N) ? OUT_W'(in[i]) : '0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < (LEAVES >> (l + 1)); i++) begin : g_add
      always_ff @(posedge clk) lvl[l+1][i] <= lvl[l][2*i] + lvl[l][2*i+1];
    end
    for (genvar i = (LEAVES >> (l + 1)); i < LEAVES; i++) begin : g_unused
      assign lvl[l+1][i] = '0;
    end
  end

  assign sum = lvl[LEVELS][0];

endmodule
