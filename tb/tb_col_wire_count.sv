// Self-checking testbench for col_wire_count: random column configurations,
// the count of WIRE function codes is recomputed here and compared. Also
// checks the all-wire and no-wire extremes.
module tb_col_wire_count;
  import mcm_pkg::*;

  localparam int unsigned ROWS = 11;

  gene_t [ROWS-1:0] genes;
  logic [3:0] count;
  int checks = 0, failures = 0;

  col_wire_count #(.ROWS(ROWS)) dut (.genes, .count);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int exp_cnt);
    #1;
    checks++;
    if (int'(count) != exp_cnt) begin
      failures++;
      $display("count=%0d expected %0d", count, exp_cnt);
    end
  endtask

  initial begin
    int n;
    for (int i = 0; i < 1000; i++) begin
      n = 0;
      for (int r = 0; r < ROWS; r++) begin
        genes[r] = gene_t'(10'($urandom));
        if (genes[r][1:0] == 2'd3) n++;
      end
      check(n);
    end
    for (int r = 0; r < ROWS; r++) genes[r] = '{sel_b: 4'd0, sel_a: 4'd0, fn: FN_WIRE};
    check(ROWS);
    for (int r = 0; r < ROWS; r++) genes[r] = '{sel_b: 4'd3, sel_a: 4'd1, fn: FN_SHIFT};
    check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
