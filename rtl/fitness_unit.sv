// Fitness calculation unit.
//
// For every VRC output k the absolute difference to the desired product is
// formed; outputs whose mask bit is 0 contribute 0x0000 instead. The errors
// are summed by a pipelined adder tree, and a last stage turns the sum into a
// 32-bit fitness where higher is better:
//   error != 0 :  fitness = 0x80000000 - error
//   error == 0 :  fitness = 0x80000000 + wire_count
// so every functionally correct circuit beats every incorrect one, and among
// correct circuits the one with more CFBs used as wires (fewer components)
// wins. The absolute differences, the mask multiplexers, the adder tree and
// the constant 0x80000000 in the final stage follow the accelerator's fitness
// circuit; how the wire count enters the value is this design's reading of
// "the sum represents the size of phenotype which is utilized as a part of
// the fitness value".
//
// Timing: fully pipelined, one candidate per cycle; inputs at t give fitness
// at t+LAT, LAT = 2 + clog2(NOUT) (7 for 32 outputs). wire_count is sampled
// with the outputs at t.
module fitness_unit
  import mcm_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter int unsigned NOUT   = 32,
  parameter int unsigned WCNT_W = 6,
  parameter int unsigned FIT_W  = 32,
  parameter int unsigned LAT    = 2 + ((NOUT > 1) ? $clog2(NOUT) : 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [NOUT-1:0][W-1:0]  y,
  input  logic [NOUT-1:0][W-1:0]  desired,
  input  logic [NOUT-1:0]         mask,
  input  logic [WCNT_W-1:0]       wire_count,
  output logic                    out_valid,
  output logic [FIT_W-1:0]        fitness,
  output logic [FIT_W-1:0]        error
);

  localparam int unsigned TREE_LAT = LAT - 2;
  localparam int unsigned ERR_W    = W + TREE_LAT;

  logic [NOUT-1:0][W-1:0] diff_q;
  logic [ERR_W-1:0]       err_sum;
  logic [WCNT_W-1:0]      wc_d  [LAT-1];
  logic                   v_d   [LAT];

  // Stage 1: masked absolute differences.
  always_ff @(posedge clk)
    for (int k = 0; k < NOUT; k++)
      diff_q[k] <= !mask[k]       ? '0 :
                   (y[k] >= desired[k]) ? y[k] - desired[k] : desired[k] - y[k];

  adder_tree #(.N(NOUT), .IN_W(W), .LEVELS(TREE_LAT)) u_tree (
    .clk (clk),
    .in  (diff_q),
    .sum (err_sum)
  );

  // Wire count and valid travel with the candidate.
  always_ff @(posedge clk) begin
    wc_d[0] <= wire_count;
    for (int i = 1; i < LAT - 1; i++) wc_d[i] <= wc_d[i-1];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) v_d[i] <= 1'b0;
    end else begin
      v_d[0] <= in_valid;
      for (int i = 1; i < LAT; i++) v_d[i] <= v_d[i-1];
    end

  // Final stage.
  always_ff @(posedge clk) begin
    error   <= FIT_W'(err_sum);
    fitness <= (err_sum == '0) ? FIT_OFFSET + FIT_W'(wc_d[LAT-2])
                               : FIT_OFFSET - FIT_W'(err_sum);
  end

  assign out_valid = v_d[LAT-1];

  initial assert (ERR_W < FIT_W) else $error("fitness_unit: error sum too wide");

endmodule
