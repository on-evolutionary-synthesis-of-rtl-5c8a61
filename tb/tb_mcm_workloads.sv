// Workload testbench: evolves the two multiple constant multipliers that fit
// the default 4-column x 11-row circuit grid, on evo_accel at its default
// size, with a population of 8, elitism and every one of the 5 samplers
// mutating (R = 0):
//   5 constants : 83, 221, 71, 387, 13 on outputs 0..4 (last column)
//   20 constants: 1 and the odd primes up to 71, placed by size on outputs
//                 of columns 1, 2 and 3 (small constants need fewer stages)
// Each run is started from a fresh random population and stops when the
// best fitness has not improved for a number of generations, or at a
// generation limit. Every 97th evaluated candidate is re-checked against an
// independent model, and so is the best circuit at the end; when the best
// circuit is correct it is also checked for a second input value
// (linearity). Whether a correct circuit was found within the budget, and
// with how many components, is reported: a run that finds none within its
// budget is reported as such, not counted as a failure, because the search
// is stochastic.
module tb_mcm_workloads;
  import mcm_ref_pkg::*;

  localparam int POP = 8, IDX_W = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init_we = 1'b0;
  logic [IDX_W-1:0] init_idx = '0;
  logic [CH_W-1:0] init_chrom = '0;
  logic [NOUT-1:0][W-1:0] desired = '0;
  logic [NOUT-1:0] mask = '0;
  logic [31:0] prob_r = '0, max_gen = '0, stag_limit = '0;
  logic elitism = 1'b1, start = 1'b0, halt = 1'b0;
  logic busy, done, best_valid;
  logic [1:0] stop_reason;
  logic [31:0] gen_count, stag_count, eval_count, best_fit;
  logic [CH_W-1:0] best_chrom;

  int checks = 0, failures = 0, sample = 0;
  word_t des_arr[NOUT];

  evo_accel dut (.*);

  always #5 clk = ~clk;

  initial begin
    #600000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && dut.fit_valid) begin
    longint err;
    sample++;
    if (sample % 97 == 0) begin
      checks++;
      if (fitness_of(dut.eval_chrom, des_arr, mask, err) !== dut.fit) failures++;
    end
  end

  task automatic run_problem(string name, int n, int consts[], int place[], logic [31:0] gens, logic [31:0] stag);
    logic [CH_W-1:0] c;
    longint err;
    int wires, comps;
    outs_t o;
    for (int k = 0; k < NOUT; k++) des_arr[k] = '0;
    mask = '0;
    for (int i = 0; i < n; i++) begin
      des_arr[place[i]] = word_t'(consts[i]);
      mask[place[i]] = 1'b1;
    end
    for (int k = 0; k < NOUT; k++) desired[k] = des_arr[k];
    for (int i = 0; i < POP; i++) begin
      for (int b = 0; b < CH_W; b++) c[b] = 1'($urandom);
      @(negedge clk);
      init_we = 1'b1; init_idx = IDX_W'(i); init_chrom = c;
    end
    @(negedge clk) init_we = 1'b0;
    max_gen = gens;
    stag_limit = stag;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (!best_valid || fitness_of(best_chrom, des_arr, mask, err) != best_fit) failures++;
    if (best_fit[31]) begin
      o = evaluate(best_chrom, word_t'(16'd77), wires);
      checks++;
      for (int i = 0; i < n; i++)
        if (o[place[i]] != word_t'(77 * consts[i])) begin
          failures++;
          break;
        end
      // components: blocks that are not wires and feed an output are not
      // traced here; report the fitness' own measure, blocks not used as wires
      comps = COLS * ROWS - int'(best_fit - 32'h8000_0000);
      $display("%s: correct circuit after %0d generations, %0d of %0d blocks not wires (stop reason %0d)",
               name, gen_count, comps, COLS * ROWS, stop_reason);
    end else begin
      $display("%s: no correct circuit in %0d generations, remaining error %0d",
               name, gen_count, 32'h8000_0000 - best_fit);
    end
  endtask

  initial begin
    int c5[] = '{83, 221, 71, 387, 13};
    int p5[] = '{0, 1, 2, 3, 4};
    // 20 constants: those reachable in two stages (x<<k +- x) on column 1
    // outputs 22..27, the next seven on column 2 outputs 11..17, the largest
    // seven on column 3 outputs 0..6
    int c20[] = '{1, 3, 5, 7, 17, 31, 11, 13, 19, 23, 29, 37, 41, 43, 47, 53, 59, 61, 67, 71};
    int p20[] = '{22, 23, 24, 25, 26, 27, 11, 12, 13, 14, 15, 16, 17, 0, 1, 2, 3, 4, 5, 6};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_problem("5 constants", 5, c5, p5, 32'd1500000, 32'd600000);
    run_problem("20 constants", 20, c20, p20, 32'd2500000, 32'd1000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
