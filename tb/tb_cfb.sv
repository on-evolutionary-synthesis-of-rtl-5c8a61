// Self-checking testbench for cfb: drives random operand selects, functions
// and data, and compares the registered result one cycle later with a
// reference computed here from the function definitions.
module tb_cfb;
  import mcm_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned ROWS = 11;

  logic clk = 1'b0;
  logic [W-1:0] x;
  logic [ROWS-1:0][W-1:0] prev;
  gene_t gene;
  logic [W-1:0] y;
  int checks = 0, failures = 0;
  int fn_seen [4];

  cfb #(.W(W), .ROWS(ROWS)) dut (.clk, .x, .prev, .gene, .y);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] operand(int sel);
    if (sel >= 1 && sel <= ROWS) return prev[sel-1];
    return x;
  endfunction

  function automatic logic [W-1:0] model();
    int a, b, r;
    a = int'(operand(int'(gene.sel_a)));
    b = int'(operand(int'(gene.sel_b)));
    case (gene.fn)
      FN_ADD:   r = a + b;
      FN_SUB:   r = a - b;
      FN_SHIFT: r = a * (1 << int'(gene.sel_b));
      default:  r = a;
    endcase
    return W'(r);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_y;
    for (int i = 0; i < 2000; i++) begin
      x    = W'($urandom);
      for (int r = 0; r < ROWS; r++) prev[r] = W'($urandom);
      gene = gene_t'(10'($urandom));
      exp_y = model();
      fn_seen[int'(gene.fn)]++;
      @(posedge clk);
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10)
          $display("mismatch fn=%0d sa=%0d sb=%0d y=%h exp=%h", gene.fn, gene.sel_a, gene.sel_b, y, exp_y);
      end
    end
    for (int f = 0; f < 4; f++) begin
      checks++;
      if (fn_seen[f] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
