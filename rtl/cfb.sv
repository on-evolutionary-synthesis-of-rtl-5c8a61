// Configurable functional block (CFB), one element E[i,j] of the VRC.
//
// Two operand multiplexers pick either the circuit input x or one of the
// ROWS outputs of the preceding column. The block then computes one of four
// linear functions over W bits and registers the result:
//   ADD   a + b            SUB  a - b
//   SHIFT a << sel_b       WIRE a
// Arithmetic wraps modulo 2**W. The operand multiplexers, the four functions
// and the output register follow the CFB described for the accelerator; the
// use of the B select field as the shift distance and the mapping of select
// codes above ROWS to the input x are this design's choices.
//
// Timing: one cycle from x/prev/gene to y. No reset: the register holds data
// only, validity is tracked by the surrounding pipeline.
module cfb
  import mcm_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter int unsigned ROWS = 11
) (
  input  logic                   clk,
  input  logic [W-1:0]           x,
  input  logic [ROWS-1:0][W-1:0] prev,
  input  gene_t                  gene,
  output logic [W-1:0]           y
);

  logic [W-1:0] a, b, r;

  function automatic logic [W-1:0] pick(input logic [SEL_W-1:0] sel,
                                        input logic [W-1:0] xin,
                                        input logic [ROWS-1:0][W-1:0] col);
    if (sel != '0 && 32'(sel) <= ROWS) return col[sel - SEL_W'(1)];
    return xin;
  endfunction

  always_comb begin
    a = pick(gene.sel_a, x, prev);
    b = pick(gene.sel_b, x, prev);
    unique case (gene.fn)
      FN_ADD:   r = a + b;
      FN_SUB:   r = a - b;
      FN_SHIFT: r = a << gene.sel_b;
      FN_WIRE:  r = a;
    endcase
  end

  always_ff @(posedge clk) y <= r;

endmodule
