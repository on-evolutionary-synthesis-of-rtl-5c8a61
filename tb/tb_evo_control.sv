// Self-checking testbench for evo_control. Plays the selection unit's
// generation pulses and best fitness by hand and checks: the restart pulse
// and issue enable after start, the generation and stagnation counters, the
// three ways a run ends (generation limit, stagnation, halt), that issuing
// stops at once and done waits until the pipeline is empty.
module tb_evo_control;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, halt = 1'b0, gen_pulse = 1'b0, pipe_empty = 1'b1;
  logic [31:0] max_gen = '0, stag_limit = '0, best_fit = '0;
  logic restart, issue, busy, done;
  logic [1:0] stop_reason;
  logic [31:0] gen_count, stag_count;
  int checks = 0, failures = 0;

  evo_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("failed: %s (gen=%0d stag=%0d reason=%0d)", what, gen_count, stag_count, stop_reason);
    end
  endtask

  task automatic begin_run();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    expect_true(restart && !issue && busy, "restart pulse");
    @(negedge clk);
    expect_true(!restart && issue && gen_count == 0, "issuing");
    pipe_empty = 1'b0;
  endtask

  task automatic generation(logic [31:0] fit);
    best_fit = fit;
    gen_pulse = 1'b1;
    @(negedge clk);
    gen_pulse = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic finish_run(int reason);
    int waited = 0;
    expect_true(!issue && busy && !done, "draining");
    repeat (5) @(negedge clk);
    expect_true(!done, "waits for pipeline");
    pipe_empty = 1'b1;
    while (!done && waited < 10) begin @(negedge clk); waited++; end
    expect_true(done && !busy && int'(stop_reason) == reason, "done with reason");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_true(!busy && !done && !issue, "idle after reset");

    // Generation limit.
    max_gen = 5; stag_limit = 0;
    begin_run();
    for (int g = 1; g <= 5; g++) begin
      expect_true(issue, "issuing before the limit");
      generation(32'(100 * g));
      expect_true(gen_count == 32'(g) && stag_count == 0, "generation count");
    end
    finish_run(1);

    // Stagnation.
    max_gen = 1000; stag_limit = 3;
    begin_run();
    generation(32'd50);
    generation(32'd50);
    expect_true(stag_count == 1, "one stagnant generation");
    generation(32'd60);
    expect_true(stag_count == 0, "improvement clears stagnation");
    for (int g = 1; g <= 3; g++) begin
      expect_true(issue, "issuing while improving");
      generation(32'd60);
      expect_true(stag_count == 32'(g), "stagnation count");
    end
    finish_run(2);

    // Halt.
    stag_limit = 0;
    begin_run();
    generation(32'd70);
    @(negedge clk) halt = 1'b1;
    @(negedge clk) halt = 1'b0;
    @(negedge clk);
    finish_run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
