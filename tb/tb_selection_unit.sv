// Self-checking testbench for selection_unit (16-bit chromosomes, population
// of 8). Loads an initial population, writes generations of offspring with
// known fitness while tournaments run, and keeps its own copy of both banks.
// Every selected individual is checked against the fitter of the two
// individuals the unit reports it compared (first on a tie), read from the
// model's parental bank; bank swaps, the best-individual register and the
// elite copy (one per 8 selections, marked keep) are checked too, as is the
// two-cycle selection latency.
module tb_selection_unit;
  localparam int unsigned CH_W = 16, FIT_W = 32, POP = 8, IDX_W = 3;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic init_we = 1'b0;
  logic [IDX_W-1:0] init_idx = '0;
  logic [CH_W-1:0] init_chrom = '0;
  logic wr_valid = 1'b0;
  logic [CH_W-1:0] wr_chrom = '0;
  logic [FIT_W-1:0] wr_fit = '0;
  logic elitism = 1'b0, sel_req = 1'b0;
  logic sel_valid, sel_keep, gen_pulse, best_valid;
  logic [CH_W-1:0] sel_chrom, best_chrom;
  logic [IDX_W-1:0] tour_a, tour_b;
  logic [FIT_W-1:0] best_fit;

  int checks = 0, failures = 0;
  logic [CH_W-1:0] m_chrom [2][POP];
  logic [FIT_W-1:0] m_fit [2][POP];
  int m_rd = 0, m_wcnt = 0, n_swaps = 0, n_elite = 0, n_sel = 0;
  logic [CH_W-1:0] m_best_chrom;
  logic [FIT_W-1:0] m_best_fit;
  logic m_best_valid = 1'b0;
  logic [POP-1:0] seen_a = '0;

  selection_unit #(.CH_W(CH_W), .FIT_W(FIT_W), .POP(POP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected selection, worked out from the model when the request's
  // tournament indices become visible (one cycle after the request).
  typedef struct { logic [CH_W-1:0] chrom; logic keep; } exp_t;
  exp_t expq[$];
  logic req_d = 1'b0;
  int issue_cnt = 0;
  logic elite_d = 1'b0;
  logic [CH_W-1:0] snap_chrom [POP];
  logic [FIT_W-1:0] snap_fit [POP];

  always @(negedge clk) begin
    exp_t e;
    if (sel_valid) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        e = expq.pop_front();
        n_sel++;
        if (sel_keep) n_elite++;
        if (sel_chrom !== e.chrom || sel_keep !== e.keep) begin
          failures++;
          if (failures < 10) $display("sel %h keep %0d, expected %h keep %0d", sel_chrom, sel_keep, e.chrom, e.keep);
        end
      end
    end
    if (req_d) begin
      seen_a[tour_a] = 1'b1;
      if (elite_d) begin
        e.chrom = m_best_chrom; e.keep = 1'b1;
      end else begin
        e.keep = 1'b0;
        e.chrom = (snap_fit[tour_a] >= snap_fit[tour_b]) ? snap_chrom[tour_a] : snap_chrom[tour_b];
      end
      expq.push_back(e);
    end
    req_d = sel_req;
    elite_d = sel_req && elitism && m_best_valid && (issue_cnt == 0);
    // parental bank as the memories will see it at the next clock edge
    for (int i = 0; i < POP; i++) begin
      snap_chrom[i] = m_chrom[m_rd][i];
      snap_fit[i] = m_fit[m_rd][i];
    end
    if (sel_req) issue_cnt = (issue_cnt + 1) % POP;
  end

  // Offspring writes update the model at the clock edge that performs them.
  always @(posedge clk) begin
    if (wr_valid) begin
      m_chrom[1-m_rd][m_wcnt] <= wr_chrom;
      m_fit[1-m_rd][m_wcnt] <= wr_fit;
      if (!m_best_valid || wr_fit >= m_best_fit) begin
        m_best_valid <= 1'b1;
        m_best_fit <= wr_fit;
        m_best_chrom <= wr_chrom;
      end
      if (m_wcnt == POP - 1) begin
        m_wcnt <= 0;
        m_rd <= 1 - m_rd;
        n_swaps <= n_swaps + 1;
      end else m_wcnt <= m_wcnt + 1;
    end
    if (init_we) begin
      m_chrom[m_rd][init_idx] <= init_chrom;
      m_fit[m_rd][init_idx] <= '0;
    end
  end

  int pulses = 0;
  always @(negedge clk) if (gen_pulse) pulses++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < POP; i++) begin
      init_we = 1'b1; init_idx = IDX_W'(i); init_chrom = CH_W'(16'hA000 + i);
      @(negedge clk);
    end
    init_we = 1'b0;
    // Tournaments on the initial population while generations are written.
    for (int g = 0; g < 40; g++) begin
      elitism = (g >= 20);
      for (int i = 0; i < POP; i++) begin
        sel_req = 1'b1;
        wr_valid = (g % 4) != 3 || i < 4;
        wr_chrom = CH_W'($urandom);
        wr_fit = (i == 2) ? 32'd1000 : 32'($urandom_range(0, 2000));
        @(negedge clk);
        // best register and banks are checked against the model
        checks++;
        if (best_valid !== m_best_valid || (m_best_valid && (best_fit !== m_best_fit || best_chrom !== m_best_chrom)))
          failures++;
      end
    end
    sel_req = 1'b0;
    wr_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    checks++;
    if (pulses != n_swaps || n_swaps < 20) begin
      failures++;
      $display("swaps %0d pulses %0d", n_swaps, pulses);
    end
    checks++;
    if (n_elite != 20 || seen_a != '1) begin
      failures++;
      $display("elite copies %0d (expected 20), indices seen %b", n_elite, seen_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
