// Self-checking testbench for fitness_unit (32 outputs of 16 bits). Feeds a
// new candidate every cycle: random outputs, desired values and masks, plus
// exact matches (error 0) so that the wire-count branch is exercised. The
// expected fitness is recomputed here and checked exactly LAT = 7 cycles
// after the input.
module tb_fitness_unit;
  localparam int unsigned W = 16, NOUT = 32, WCNT_W = 6, LAT = 7;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [NOUT-1:0][W-1:0] y, desired;
  logic [NOUT-1:0] mask;
  logic [WCNT_W-1:0] wire_count;
  logic out_valid;
  logic [31:0] fitness, error;
  int checks = 0, failures = 0, cycle = 0, n_perfect = 0;

  typedef struct { logic [31:0] fit; logic [31:0] err; int cycle; } exp_t;
  exp_t expq[$];

  fitness_unit #(.W(W), .NOUT(NOUT), .WCNT_W(WCNT_W)) dut (
    .clk, .rst_n, .in_valid, .y, .desired, .mask, .wire_count,
    .out_valid, .fitness, .error);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) failures++;
    else begin
      e = expq.pop_front();
      if (fitness !== e.fit || error !== e.err || cycle - e.cycle != LAT) begin
        failures++;
        if (failures < 10)
          $display("fit=%h exp=%h err=%0d exp=%0d lat=%0d", fitness, e.fit, error, e.err, cycle - e.cycle);
      end
    end
  end

  initial begin
    exp_t e;
    longint sum;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      sum = 0;
      mask = NOUT'($urandom);
      wire_count = WCNT_W'($urandom);
      for (int k = 0; k < NOUT; k++) begin
        desired[k] = W'($urandom);
        case (i % 3)
          0: y[k] = W'($urandom);
          1: y[k] = desired[k];
          default: y[k] = mask[k] ? desired[k] : W'($urandom);
        endcase
        if (i % 3 == 1 && k == (i % NOUT) && mask[k]) y[k] = desired[k] + W'(i % 5);
        if (mask[k]) sum += (y[k] > desired[k]) ? longint'(y[k] - desired[k]) : longint'(desired[k] - y[k]);
      end
      e.err = 32'(sum);
      e.fit = (sum == 0) ? 32'h8000_0000 + 32'(wire_count) : 32'h8000_0000 - 32'(sum);
      if (sum == 0) n_perfect++;
      e.cycle = cycle;
      expq.push_back(e);
      in_valid = 1'b1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_perfect == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
