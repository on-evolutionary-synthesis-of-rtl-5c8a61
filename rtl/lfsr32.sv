// 32-bit pseudo-random number generator (linear feedback shift register).
//
// Galois form of the maximal-length polynomial x^32 + x^22 + x^2 + x + 1
// (period 2**32 - 1). A plain LFSR moves one bit per clock, so consecutive
// outputs are nearly the same word shifted by one place; used as a random
// index or bit position, that repeats patterns from one candidate to the
// next. This generator therefore advances STEPS single-bit steps per clock
// (leap-forward, an XOR network), so that with STEPS = 32 every output word
// is made of fresh bits. Each instance gets its own non-zero SEED, so the
// many generators of the genetic engine are effectively uncorrelated. The
// accelerator uses LFSRs for all stochastic operations; the polynomial, the
// leap-forward and the seeding are this design's choice.
//
// Interface: the state advances on every clock with en = 1; q is the current
// state (registered). Synchronous to clk, asynchronous active-low reset to
// SEED.
module lfsr32 #(
  parameter logic [31:0] SEED  = 32'h1234_5678,
  parameter int unsigned STEPS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] q
);

  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] nxt;

  always_comb begin
    nxt = q;
    for (int i = 0; i < STEPS; i++)
      nxt = nxt[0] ? ((nxt >> 1) ^ TAPS) : (nxt >> 1);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= SEED;
    else if (en) q <= nxt;

  initial assert (SEED != '0 && STEPS > 0) else $error("lfsr32: SEED and STEPS must be non-zero");

endmodule
