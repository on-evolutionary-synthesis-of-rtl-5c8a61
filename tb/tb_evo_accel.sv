// End-to-end testbench of evo_accel at its default size (4 x 11 VRC, 32
// outputs, population 8, 5 samplers). Evolves a small multiple constant
// multiplier (3x, 5x, 7x on outputs 0..2) from a random initial population.
//
// Every candidate written back is re-evaluated here with an independent
// model and its fitness compared with the hardware's. The run controller is
// taken through all three ways a run ends (generation limit, stagnation,
// halt), and the testbench counts how often each mechanism occurred: bank
// swaps, tournament selections, elite copies, mutated offspring, fitness
// improvements, a functionally correct circuit, wire-count gains after it,
// and a change of the mutation register during a run. A mechanism that never
// occurs is a failure. It also checks one evaluation per clock while the
// pipeline is full and that the best circuit found multiplies another input
// value correctly too.
module tb_evo_accel;
  import mcm_ref_pkg::*;

  localparam int POP = 8;
  localparam int IDX_W = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init_we = 1'b0;
  logic [IDX_W-1:0] init_idx = '0;
  logic [CH_W-1:0] init_chrom = '0;
  logic [NOUT-1:0][W-1:0] desired = '0;
  logic [NOUT-1:0] mask = '0;
  logic [31:0] prob_r = '0, max_gen = '0, stag_limit = '0;
  logic elitism = 1'b0, start = 1'b0, halt = 1'b0;
  logic busy, done, best_valid;
  logic [1:0] stop_reason;
  logic [31:0] gen_count, stag_count, eval_count, best_fit;
  logic [CH_W-1:0] best_chrom;

  int checks = 0, failures = 0;
  word_t des_arr[NOUT];

  // mechanism counters
  int n_swap = 0, n_tour = 0, n_elite = 0, n_mut = 0, n_improve = 0;
  int n_perfect = 0, n_wire_gain = 0, n_prob_change = 0;
  int n_stop_gen = 0, n_stop_stag = 0, n_stop_halt = 0, n_full_rate = 0;

  evo_accel dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent check of every evaluated candidate.
  always @(negedge clk) if (rst_n && dut.fit_valid) begin
    longint err;
    logic [31:0] f;
    f = fitness_of(dut.eval_chrom, des_arr, mask, err);
    checks++;
    if (f !== dut.fit) begin
      failures++;
      if (failures < 10) $display("fitness %h, model %h", dut.fit, f);
    end
    if (err == 0) n_perfect++;
  end

  logic [31:0] last_best = '0;
  logic last_perfect = 1'b0;
  always @(negedge clk) if (rst_n) begin
    if (dut.gen_pulse) n_swap++;
    if (dut.sel_valid && !dut.sel_keep) n_tour++;
    if (dut.sel_valid && dut.sel_keep) n_elite++;
    if (dut.mut_valid && dut.u_mut.out_mutated) n_mut++;
    if (best_valid && best_fit > last_best) begin
      n_improve++;
      if (last_perfect) n_wire_gain++;
      last_best = best_fit;
      last_perfect = best_fit[31];
    end
  end

  // Throughput: while the loop is full, one evaluation per clock.
  int run_cycles = 0;
  always @(negedge clk) if (rst_n && dut.issue) run_cycles++;

  task automatic run(logic [31:0] mg, logic [31:0] sl, bit do_halt, int reason);
    int cyc = 0;
    int evals0;
    max_gen = mg;
    stag_limit = sl;
    run_cycles = 0;
    last_best = '0;
    last_perfect = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc == 2000) begin
        prob_r = 32'h4000_0000;   // change of the mutation rate on the fly
        n_prob_change++;
      end
      if (cyc == 2000 + 100) begin
        evals0 = int'(eval_count);
        repeat (50) @(negedge clk);
        cyc += 50;
        checks++;
        if (busy && dut.issue) begin
          if (int'(eval_count) - evals0 != 50) failures++;
          else n_full_rate++;
        end
      end
      if (do_halt && cyc == 500) begin
        halt = 1'b1;
        @(negedge clk) halt = 1'b0;
      end
    end
    checks++;
    if (int'(stop_reason) != reason || eval_count != run_cycles) begin
      failures++;
      $display("run ended with reason %0d (expected %0d), %0d evaluations for %0d issue cycles",
               stop_reason, reason, eval_count, run_cycles);
    end
    case (stop_reason)
      2'd1: n_stop_gen++;
      2'd2: n_stop_stag++;
      2'd3: n_stop_halt++;
      default: ;
    endcase
    prob_r = 32'h0;
  endtask

  task automatic count_mech(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never occurred: %s", what);
    end
    $display("  %-28s %0d", what, n);
  endtask

  initial begin
    int wires;
    longint err;
    outs_t o;
    logic [CH_W-1:0] c;
    for (int k = 0; k < NOUT; k++) des_arr[k] = '0;
    des_arr[0] = 16'd3; des_arr[1] = 16'd5; des_arr[2] = 16'd7;
    for (int k = 0; k < NOUT; k++) desired[k] = des_arr[k];
    mask = 32'h7;
    elitism = 1'b1;
    prob_r = 32'h0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // random initial population
    for (int i = 0; i < POP; i++) begin
      for (int b = 0; b < CH_W; b++) c[b] = 1'($urandom);
      init_we = 1'b1; init_idx = IDX_W'(i); init_chrom = c;
      @(negedge clk);
    end
    init_we = 1'b0;

    run(32'd4000, 32'd0, 1'b0, 1);     // generation limit
    checks++;
    if (!best_valid || !best_fit[31]) begin
      failures++;
      $display("no correct multiplier after 4000 generations, best %h", best_fit);
    end else begin
      // linearity: the circuit found with x = 1 is right for any x
      o = evaluate(best_chrom, word_t'(16'd1234), wires);
      checks++;
      if (o[0] != word_t'(3 * 1234) || o[1] != word_t'(5 * 1234) || o[2] != word_t'(7 * 1234)) failures++;
      checks++;
      if (fitness_of(best_chrom, des_arr, mask, err) != best_fit) failures++;
      $display("best circuit: %0d of 44 blocks used as wires", best_fit - 32'h8000_0000);
    end

    run(32'd100000, 32'd20, 1'b0, 2); // stagnation
    run(32'd100000, 32'd0, 1'b1, 3);  // halt

    $display("mechanisms:");
    count_mech(n_swap, "bank swaps");
    count_mech(n_tour, "tournament selections");
    count_mech(n_elite, "elite copies");
    count_mech(n_mut, "mutated offspring");
    count_mech(n_improve, "best fitness improvements");
    count_mech(n_perfect, "correct circuits evaluated");
    count_mech(n_wire_gain, "wire-count gains");
    count_mech(n_prob_change, "mutation rate changes");
    count_mech(n_full_rate, "full-rate windows");
    count_mech(n_stop_gen, "stops at generation limit");
    count_mech(n_stop_stag, "stops on stagnation");
    count_mech(n_stop_halt, "stops on halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
