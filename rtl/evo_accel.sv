// Evolutionary design accelerator for multiple constant multipliers (MCMs).
//
// Evolves, at one candidate circuit per clock, a circuit of adders,
// subtractors and shifters that multiplies an input x by up to NOUT given
// constants. Because such a circuit is a linear transform, evaluating it with
// the single input x = 1 checks it completely: its outputs must equal the
// constants themselves. The genetic engine is a closed pipeline loop:
//
//   selection_unit -> mutation_unit -> vrc -> fitness_unit -> selection_unit
//    (tournament)      (bit flips)    (COLS   (error and
//                                      stages) wire count)
//
// Every cycle one parent is chosen by a two-way tournament, mutated, loaded
// as configuration into the virtual reconfigurable circuit (VRC), evaluated
// with x = 1 and written back with its fitness into the offspring bank. The
// chromosome rides alongside its evaluation in a delay line. The loop issues
// continuously: when the loop latency exceeds the population size, the
// selections made before a generation is complete use the last complete
// generation (a generation gap of one), which keeps every stage busy.
//
// Host side (a PC in the accelerator; here plain ports): load the initial
// population with init_*, set the desired products, the output mask, the
// mutation register prob_r, elitism and the limits, pulse start, wait for
// done, read best_*. prob_r, elitism and the limits may change during a run.
//
// Follows the accelerator: the three units in a loop, a new candidate every
// cycle, the VRC size and data width, population in double-banked duplicated
// RAM, LFSR-driven stochastic operations. This design's choices: the
// generation-gap overlap, the chromosome encoding (see mcm_pkg), the run
// controller, and the host port layout.
//
// Latency of the loop: 2 (selection) + 1 (mutation) + COLS + fitness LAT.
module evo_accel
  import mcm_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter int unsigned X_W    = 8,
  parameter int unsigned COLS   = 4,
  parameter int unsigned ROWS   = 11,
  parameter int unsigned NOUT   = 32,
  parameter int unsigned POP    = 8,
  parameter int unsigned N_SAMP = 5,
  parameter int unsigned FIT_W  = 32,
  parameter int unsigned CH_W   = COLS * ROWS * GENE_W,
  parameter int unsigned IDX_W  = (POP > 1) ? $clog2(POP) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host: initial population
  input  logic                   init_we,
  input  logic [IDX_W-1:0]       init_idx,
  input  logic [CH_W-1:0]        init_chrom,
  // host: problem and settings
  input  logic [NOUT-1:0][W-1:0] desired,
  input  logic [NOUT-1:0]        mask,
  input  logic [31:0]            prob_r,
  input  logic                   elitism,
  input  logic [31:0]            max_gen,
  input  logic [31:0]            stag_limit,
  input  logic                   start,
  input  logic                   halt,
  // status and result
  output logic                   busy,
  output logic                   done,
  output logic [1:0]             stop_reason,
  output logic [31:0]            gen_count,
  output logic [31:0]            stag_count,
  output logic [31:0]            eval_count,
  output logic                   best_valid,
  output logic [CH_W-1:0]        best_chrom,
  output logic [FIT_W-1:0]       best_fit
);

  localparam int unsigned WCNT_W = $clog2(COLS * ROWS + 1);
  localparam int unsigned FIT_LAT = 2 + ((NOUT > 1) ? $clog2(NOUT) : 1);
  localparam int unsigned EVAL_LAT = COLS + FIT_LAT;
  localparam int unsigned LOOP_LAT = 3 + EVAL_LAT;

  logic                   restart, issue, gen_pulse, pipe_empty;
  logic                   sel_valid, sel_keep;
  logic [CH_W-1:0]        sel_chrom;
  logic                   mut_valid;
  logic [CH_W-1:0]        mut_chrom, eval_chrom;
  logic                   vrc_valid, fit_valid;
  logic [NOUT-1:0][W-1:0] vrc_y;
  logic [WCNT_W-1:0]      vrc_wc;
  logic [FIT_W-1:0]       fit;
  logic [$clog2(LOOP_LAT + 2)-1:0] inflight;

  evo_control #(.FIT_W(FIT_W), .CNT_W(32)) u_ctrl (
    .clk, .rst_n, .start, .halt, .max_gen, .stag_limit,
    .gen_pulse, .best_fit, .pipe_empty,
    .restart, .issue, .busy, .done, .stop_reason, .gen_count, .stag_count
  );

  selection_unit #(.CH_W(CH_W), .FIT_W(FIT_W), .POP(POP)) u_sel (
    .clk, .rst_n, .restart,
    .init_we, .init_idx, .init_chrom,
    .wr_valid (fit_valid), .wr_chrom (eval_chrom), .wr_fit (fit),
    .elitism, .sel_req (issue),
    .sel_valid, .sel_keep, .sel_chrom, .tour_a (), .tour_b (),
    .gen_pulse, .best_valid, .best_chrom, .best_fit
  );

  mutation_unit #(.CH_W(CH_W), .N_SAMP(N_SAMP)) u_mut (
    .clk, .rst_n,
    .in_valid (sel_valid), .in_keep (sel_keep), .in_chrom (sel_chrom),
    .prob_r,
    .out_valid (mut_valid), .out_chrom (mut_chrom), .out_mutated ()
  );

  // The accelerator evaluates every candidate with x = 1.
  vrc #(.W(W), .X_W(X_W), .COLS(COLS), .ROWS(ROWS), .NOUT(NOUT), .WCNT_W(WCNT_W)) u_vrc (
    .clk, .rst_n,
    .in_valid (mut_valid), .x (X_W'(1)), .cfg (mut_chrom),
    .out_valid (vrc_valid), .y (vrc_y), .wire_count (vrc_wc)
  );

  fitness_unit #(.W(W), .NOUT(NOUT), .WCNT_W(WCNT_W), .FIT_W(FIT_W)) u_fit (
    .clk, .rst_n,
    .in_valid (vrc_valid), .y (vrc_y), .desired, .mask, .wire_count (vrc_wc),
    .out_valid (fit_valid), .fitness (fit), .error ()
  );

  delay_line #(.W(CH_W), .LEN(EVAL_LAT)) u_chrom_dly (
    .clk, .d (mut_chrom), .q (eval_chrom)
  );

  // Candidates in flight between selection request and write-back.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + issue - fit_valid;

  assign pipe_empty = (inflight == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       eval_count <= '0;
    else if (restart) eval_count <= '0;
    else if (fit_valid) eval_count <= eval_count + 1'b1;

  a_no_init_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(init_we && busy))
    else $error("evo_accel: population loaded during a run");

endmodule
