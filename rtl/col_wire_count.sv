// Phenotype-size counter for one column of the VRC.
//
// A comparator per CFB returns 1 when that CFB is configured as a wire, and
// the flags are summed. A wire costs nothing, so once a functionally perfect
// circuit is found the fitness rewards more wires, i.e. fewer adders,
// subtractors and shifters. Following the accelerator, this is evaluated
// while the column is being configured: the VRC adds each column's count to a
// running total that travels down the pipeline with the configuration.
// Purely combinational; CNT_W bits of count.
module col_wire_count
  import mcm_pkg::*;
#(
  parameter int unsigned ROWS  = 11,
  parameter int unsigned CNT_W = $clog2(ROWS + 1)
) (
  input  gene_t [ROWS-1:0] genes,
  output logic [CNT_W-1:0] count
);

  always_comb begin
    count = '0;
    for (int r = 0; r < ROWS; r++)
      count += CNT_W'(genes[r].fn == FN_WIRE);
  end

endmodule
