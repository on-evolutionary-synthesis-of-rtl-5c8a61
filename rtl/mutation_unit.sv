// Mutation unit of the genetic engine.
//
// N_SAMP samplers each own two LFSRs. The first generator's value is
// compared with the probability register R: when it is higher, the sampler
// mutates one bit. The second generator picks which bit, scaled into
// 0..CH_W-1 as (rnd * CH_W) >> 32. The one-hot choices of all samplers are
// ORed into a mutation mask (zeros elsewhere) and the chromosome is XORed
// with it, so at most N_SAMP bits flip per offspring. With p the chance of a
// sampler firing, p = 1 - R / 2**32, the expected number of flipped bits is
// about N_SAMP * p; the host sets R to tune the mutation rate, also while the
// evolution runs.
//
// From the accelerator: samplers with two PRNGs each, comparison against R,
// XOR with a mask. This design's choices: the scaling of the position, the
// seeds, the keep input (a chromosome marked keep, the elite copy, passes
// unmutated) and that the generators advance once per valid input.
//
// Timing: one candidate per cycle, one cycle of latency.
module mutation_unit #(
  parameter int unsigned CH_W      = 440,
  parameter int unsigned N_SAMP    = 5,
  parameter logic [31:0] SEED_BASE = 32'h2545_F491
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_keep,
  input  logic [CH_W-1:0]  in_chrom,
  input  logic [31:0]      prob_r,
  output logic             out_valid,
  output logic [CH_W-1:0]  out_chrom,
  output logic             out_mutated
);

  localparam int unsigned POS_W = $clog2(CH_W);

  function automatic logic [31:0] seed_of(input int unsigned i);
    logic [31:0] s;
    s = SEED_BASE ^ (32'h9E37_79B9 * 32'(i + 1)) ^ (32'h85EB_CA6B * 32'(i >> 1));
    return (s == '0) ? 32'h1 : s;
  endfunction

  logic [N_SAMP-1:0][31:0] rnd_fire, rnd_pos;
  logic [CH_W-1:0]         mask;

  for (genvar i = 0; i < N_SAMP; i++) begin : g_samp
    lfsr32 #(.SEED(seed_of(2 * i))) u_fire (
      .clk (clk), .rst_n (rst_n), .en (in_valid), .q (rnd_fire[i])
    );
    lfsr32 #(.SEED(seed_of(2 * i + 1))) u_pos (
      .clk (clk), .rst_n (rst_n), .en (in_valid), .q (rnd_pos[i])
    );
  end

  always_comb begin
    logic [POS_W-1:0] pos;
    mask = '0;
    for (int i = 0; i < N_SAMP; i++) begin
      pos = POS_W'((64'(rnd_pos[i]) * 64'(CH_W)) >> 32);
      if (rnd_fire[i] > prob_r) mask[pos] = 1'b1;
    end
    if (in_keep) mask = '0;
  end

  always_ff @(posedge clk) begin
    out_chrom   <= in_chrom ^ mask;
    out_mutated <= |mask;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

endmodule
