// Self-checking testbench for vrc at its default size (4 columns x 11 rows,
// 32 outputs). A directed configuration builds 3x and 5x from shifts and
// adds; then a new random configuration and input enter every cycle and each
// result is compared, COLS cycles later, with a column-by-column evaluation
// of the same configuration done here. Also checks the running wire count
// and that results appear exactly COLS cycles after their input.
module tb_vrc;
  import mcm_pkg::*;

  localparam int unsigned W = 16, X_W = 8, COLS = 4, ROWS = 11, NOUT = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [X_W-1:0] x;
  gene_t [COLS-1:0][ROWS-1:0] cfg;
  logic out_valid;
  logic [NOUT-1:0][W-1:0] y;
  logic [5:0] wire_count;
  int checks = 0, failures = 0;

  typedef struct {
    logic [NOUT-1:0][W-1:0] y;
    int wires;
    int cycle;
  } exp_t;
  exp_t expq[$];
  int cycle = 0;

  vrc #(.W(W), .X_W(X_W), .COLS(COLS), .ROWS(ROWS), .NOUT(NOUT)) dut (
    .clk, .rst_n, .in_valid, .x, .cfg, .out_valid, .y, .wire_count);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] op(int sel, logic [W-1:0] xv, logic [W-1:0] col[ROWS]);
    if (sel >= 1 && sel <= ROWS) return col[sel-1];
    return xv;
  endfunction

  function automatic exp_t model(gene_t [COLS-1:0][ROWS-1:0] c, logic [X_W-1:0] xin);
    logic [W-1:0] cur[ROWS], nxt[ROWS], all[COLS][ROWS];
    logic [W-1:0] xv, a, b;
    exp_t e;
    xv = W'(xin);
    e.wires = 0;
    for (int r = 0; r < ROWS; r++) cur[r] = xv;
    for (int k = 0; k < COLS; k++) begin
      for (int r = 0; r < ROWS; r++) begin
        a = op(int'(c[k][r].sel_a), xv, cur);
        b = op(int'(c[k][r].sel_b), xv, cur);
        case (c[k][r].fn)
          FN_ADD:   nxt[r] = a + b;
          FN_SUB:   nxt[r] = a - b;
          FN_SHIFT: nxt[r] = W'(32'(a) << int'(c[k][r].sel_b));
          default:  begin nxt[r] = a; e.wires++; end
        endcase
      end
      cur = nxt;
      all[k] = nxt;
    end
    for (int o = 0; o < NOUT; o++) e.y[o] = all[COLS-1 - o / ROWS][o % ROWS];
    return e;
  endfunction

  always @(negedge clk) if (out_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      e = expq.pop_front();
      if (y !== e.y || int'(wire_count) != e.wires || cycle - e.cycle != COLS) begin
        failures++;
        if (failures < 10)
          $display("mismatch: wires=%0d exp=%0d latency=%0d y0=%h exp %h",
                   wire_count, e.wires, cycle - e.cycle, y[0], e.y[0]);
      end
    end
  end

  task automatic send(gene_t [COLS-1:0][ROWS-1:0] c, logic [X_W-1:0] xin);
    exp_t e;
    cfg = c;
    x = xin;
    in_valid = 1'b1;
    e = model(c, xin);
    e.cycle = cycle;
    expq.push_back(e);
    @(posedge clk);
  endtask

  initial begin
    gene_t [COLS-1:0][ROWS-1:0] c;
    x = '0;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // Directed: 3x and 5x.
    for (int k = 0; k < COLS; k++)
      for (int r = 0; r < ROWS; r++) c[k][r] = '{sel_b: 4'd0, sel_a: 4'(r + 1), fn: FN_WIRE};
    c[0][0] = '{sel_b: 4'd1, sel_a: 4'd0, fn: FN_SHIFT};
    c[0][1] = '{sel_b: 4'd2, sel_a: 4'd0, fn: FN_SHIFT};
    c[1][0] = '{sel_b: 4'd0, sel_a: 4'd1, fn: FN_ADD};
    c[1][1] = '{sel_b: 4'd0, sel_a: 4'd2, fn: FN_ADD};
    send(c, 8'd7);
    in_valid = 1'b0;
    repeat (COLS) @(posedge clk);
    #1;
    checks++;
    if (y[0] != 16'd21 || y[1] != 16'd35 || wire_count != 6'd40) begin
      failures++;
      $display("directed: y0=%0d y1=%0d wires=%0d", y[0], y[1], wire_count);
    end
    @(posedge clk);
    // Random, back to back.
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < COLS; k++)
        for (int r = 0; r < ROWS; r++) c[k][r] = gene_t'(10'($urandom));
      send(c, 8'($urandom));
    end
    in_valid = 1'b0;
    repeat (COLS + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
