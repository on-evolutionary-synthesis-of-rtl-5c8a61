// Shared types and constants of the evolutionary MCM accelerator.
//
// A candidate circuit is a bitstream for the virtual reconfigurable circuit
// (VRC). Each configurable functional block (CFB) takes GENE_W bits:
//   [1:0]  function code (add, sub, shift, wire)
//   [5:2]  operand A select: 0 = input x, k = row k-1 of the previous column
//   [9:6]  operand B select, or the shift distance when the function is SHIFT
// The four functions are the ones of the CFB; the field order, the code
// values and the reuse of the B field as a shift distance are this design's
// choice, made so that an 11 x 4 grid (440 bits) fits the 512-bit
// configuration register.
package mcm_pkg;

  typedef enum logic [1:0] {
    FN_ADD   = 2'd0,
    FN_SUB   = 2'd1,
    FN_SHIFT = 2'd2,
    FN_WIRE  = 2'd3
  } cfb_fn_e;

  localparam int unsigned SEL_W  = 4;
  localparam int unsigned GENE_W = 2 + 2 * SEL_W;

  typedef struct packed {
    logic [SEL_W-1:0] sel_b;
    logic [SEL_W-1:0] sel_a;
    cfb_fn_e          fn;
  } gene_t;

  // Size of the configuration register array of the VRC.
  localparam int unsigned CONF_MAX_BITS = 512;

  // Fitness offset: fitness = OFFSET - error, or OFFSET + wires when error = 0.
  localparam logic [31:0] FIT_OFFSET = 32'h8000_0000;

endpackage
