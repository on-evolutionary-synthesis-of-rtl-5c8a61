// Self-checking testbench for lfsr32: the state sequence is compared with a
// reference computed here from the feedback polynomial
// x^32 + x^22 + x^2 + x + 1, applied 32 times per enabled clock (the
// generator's default leap-forward), the enable is checked to hold the state, and a
// short run is checked never to reach zero or repeat the seed.
module tb_lfsr32;
  localparam logic [31:0] SEED = 32'hCAFE_0001;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] q;
  int checks = 0, failures = 0;

  lfsr32 #(.SEED(SEED)) dut (.clk, .rst_n, .en, .q);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One step: shift right; when the bit shifted out is 1, toggle the bits
  // of the polynomial's terms x^32, x^22, x^2 and x^1 (bits 31, 21, 1, 0).
  function automatic logic [31:0] step(logic [31:0] s);
    logic out;
    out = s[0];
    s = {1'b0, s[31:1]};
    if (out) begin
      s[31] = ~s[31]; s[21] = ~s[21]; s[1] = ~s[1]; s[0] = ~s[0];
    end
    return s;
  endfunction

  initial begin
    logic [31:0] ref_q;
    @(negedge clk);
    checks++;
    if (q != SEED) failures++;
    rst_n = 1'b1;
    ref_q = SEED;
    for (int i = 0; i < 20000; i++) begin
      en = (i % 7) != 3;
      @(negedge clk);
      if (en) repeat (32) ref_q = step(ref_q);
      checks++;
      if (q !== ref_q || q == '0 || (i > 0 && en && q == SEED)) begin
        failures++;
        if (failures < 10) $display("i=%0d q=%h ref=%h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
