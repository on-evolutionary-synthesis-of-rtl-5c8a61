// Self-checking testbench for mutation_unit (440-bit chromosome, 5
// samplers). Checks, one candidate per cycle and one cycle of latency:
// no bit flips when R is the largest value or the input is marked keep;
// 1..5 flips (almost always 5) when R = 0, also on an all-ones chromosome;
// a mean of about 2.5 flips when R = 2**31; and that flips land in both
// halves and the top end of the chromosome.
module tb_mutation_unit;
  localparam int unsigned CH_W = 440, N_SAMP = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_keep = 1'b0;
  logic [CH_W-1:0] in_chrom, out_chrom, prev_in;
  logic [31:0] prob_r;
  logic out_valid, out_mutated;
  int checks = 0, failures = 0;

  mutation_unit #(.CH_W(CH_W), .N_SAMP(N_SAMP)) dut (
    .clk, .rst_n, .in_valid, .in_keep, .in_chrom, .prob_r,
    .out_valid, .out_chrom, .out_mutated);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CH_W-1:0] rand_chrom();
    logic [CH_W-1:0] c;
    for (int i = 0; i < CH_W; i += 32) c[i +: 8] = 8'($urandom);
    for (int i = 0; i < CH_W; i++) if (i % 32 >= 8) c[i] = 1'($urandom);
    return c;
  endfunction

  // Apply one candidate, return the number of flipped bits and the mask.
  task automatic apply(input logic [CH_W-1:0] c, input logic keep,
                       output int flips, output logic [CH_W-1:0] m);
    @(negedge clk);
    in_chrom = c;
    in_keep = keep;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    m = out_chrom ^ c;
    flips = $countones(m);
    checks++;
    if (!out_valid || out_mutated != (flips != 0)) failures++;
  endtask

  initial begin
    int f, total;
    logic [CH_W-1:0] m, hit;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    prob_r = 32'hFFFF_FFFF;
    for (int i = 0; i < 300; i++) begin
      apply(rand_chrom(), 1'b0, f, m);
      checks++;
      if (f != 0) failures++;
    end

    prob_r = 32'h0;
    for (int i = 0; i < 300; i++) begin
      apply(rand_chrom(), 1'b1, f, m);
      checks++;
      if (f != 0) failures++;
    end

    total = 0;
    hit = '0;
    for (int i = 0; i < 1000; i++) begin
      apply((i % 2) ? '1 : rand_chrom(), 1'b0, f, m);
      hit |= m;
      total += f;
      checks++;
      if (f < 1 || f > N_SAMP) failures++;
    end
    checks++;
    if (total < 4900) begin
      failures++;
      $display("R=0: %0d flips in 1000 candidates", total);
    end
    checks++;
    if (hit[CH_W/2-1:0] == '0 || hit[CH_W-1:CH_W/2] == '0 || hit[CH_W-1:CH_W-16] == '0) failures++;

    prob_r = 32'h8000_0000;
    total = 0;
    for (int i = 0; i < 2000; i++) begin
      apply(rand_chrom(), 1'b0, f, m);
      total += f;
      checks++;
      if (f > N_SAMP) failures++;
    end
    checks++;
    if (total < 4600 || total > 5400) begin
      failures++;
      $display("R=2^31: %0d flips in 2000 candidates", total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
