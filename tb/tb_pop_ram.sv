// Self-checking testbench for pop_ram: random writes and reads against a
// reference array kept here; the read data must be the word addressed one
// cycle earlier, including a read of a word written in the same cycle
// (which returns the old contents).
module tb_pop_ram;
  localparam int unsigned DEPTH = 16, DW = 72, AW = 4;

  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  pop_ram #(.DEPTH(DEPTH), .DW(DW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_d;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = {8'(a), 64'({$urandom, $urandom})};
      ref_mem[a] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      raddr = AW'($urandom);
      we = 1'($urandom);
      waddr = (i % 5 == 0) ? raddr : AW'($urandom);
      wdata = {8'($urandom), 64'({$urandom, $urandom})};
      exp_d = ref_mem[raddr];
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== exp_d) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h exp %h", raddr, rdata, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
