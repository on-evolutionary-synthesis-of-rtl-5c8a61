// Selection unit of the genetic engine: tournament selection over a
// double-banked, duplicated population memory.
//
// The population (POP individuals, each a chromosome and its fitness) lives
// in two banks: the parents are read from one while the evaluated offspring
// are written into the other. When POP offspring have been written the banks
// swap and a new generation begins (gen_pulse). The memory is duplicated, both
// copies written together, so two individuals picked by two LFSRs can be read
// in the same cycle; the fitter of the two (the first on a tie) is the
// selected individual. A best-individual register keeps the fittest offspring
// seen so far (replaced also on equal fitness, letting the search drift over
// equally good circuits). When elitism is on, the first selection of every
// POP requests outputs the best individual instead, marked keep so that the
// mutation unit passes it unchanged.
//
// From the accelerator: the two banks, the duplicated memory, the comparator,
// the best-individual register and the elitism multiplexer. This design's
// choices: the tie rule, the >= update of the best register, when the elite
// copy is issued, the keep marking, and the host port that loads an initial
// population into the parental bank with fitness 0. restart (new run)
// empties the offspring bank and forgets the best individual; it leaves the
// parental bank, and whatever the host loaded there, in place.
//
// Timing: sel_req at cycle t gives sel_valid with the chosen individual at
// t+2; one request per cycle. Writes (offspring or host) take one cycle.
module selection_unit #(
  parameter int unsigned CH_W   = 440,
  parameter int unsigned FIT_W  = 32,
  parameter int unsigned POP    = 8,
  parameter int unsigned IDX_W  = (POP > 1) ? $clog2(POP) : 1,
  parameter logic [31:0] SEED_A = 32'hACE1_2468,
  parameter logic [31:0] SEED_B = 32'h1357_BDF1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  // host load of the initial population into the parental bank
  input  logic              init_we,
  input  logic [IDX_W-1:0]  init_idx,
  input  logic [CH_W-1:0]   init_chrom,
  // evaluated offspring
  input  logic              wr_valid,
  input  logic [CH_W-1:0]   wr_chrom,
  input  logic [FIT_W-1:0]  wr_fit,
  // selection
  input  logic              elitism,
  input  logic              sel_req,
  output logic              sel_valid,
  output logic              sel_keep,
  output logic [CH_W-1:0]   sel_chrom,
  output logic [IDX_W-1:0]  tour_a,
  output logic [IDX_W-1:0]  tour_b,
  // status
  output logic              gen_pulse,
  output logic              best_valid,
  output logic [CH_W-1:0]   best_chrom,
  output logic [FIT_W-1:0]  best_fit
);

  localparam int unsigned DW = FIT_W + CH_W;
  localparam int unsigned AW = IDX_W + 1;

  typedef struct packed {
    logic [FIT_W-1:0] fit;
    logic [CH_W-1:0]  chrom;
  } indiv_t;

  logic             rd_bank;
  logic [IDX_W-1:0] wr_cnt, issue_cnt;
  logic [31:0]      rnd_a, rnd_b;
  logic [IDX_W-1:0] idx_a, idx_b;
  logic             we;
  logic [AW-1:0]    waddr;
  indiv_t           wdata, rd_a, rd_b;
  logic             s1_valid, s1_elite;

  lfsr32 #(.SEED(SEED_A)) u_rnd_a (.clk(clk), .rst_n(rst_n), .en(sel_req), .q(rnd_a));
  lfsr32 #(.SEED(SEED_B)) u_rnd_b (.clk(clk), .rst_n(rst_n), .en(sel_req), .q(rnd_b));

  function automatic logic [IDX_W-1:0] scale(input logic [31:0] r);
    logic [63:0] p;
    p = 64'(r) * 64'(POP);
    return IDX_W'(p >> 32);
  endfunction

  assign idx_a = scale(rnd_a);
  assign idx_b = scale(rnd_b);

  // Shared write port of both copies.
  always_comb begin
    if (init_we) begin
      we    = 1'b1;
      waddr = {rd_bank, init_idx};
      wdata = '{fit: '0, chrom: init_chrom};
    end else begin
      we    = wr_valid;
      waddr = {~rd_bank, wr_cnt};
      wdata = '{fit: wr_fit, chrom: wr_chrom};
    end
  end

  pop_ram #(.DEPTH(2 * POP), .DW(DW)) u_mem0 (
    .clk (clk), .we (we), .waddr (waddr), .wdata (wdata),
    .raddr ({rd_bank, idx_a}), .rdata (rd_a)
  );

  pop_ram #(.DEPTH(2 * POP), .DW(DW)) u_mem1 (
    .clk (clk), .we (we), .waddr (waddr), .wdata (wdata),
    .raddr ({rd_bank, idx_b}), .rdata (rd_b)
  );

  // Bank control and best-individual register.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_bank    <= 1'b0;
      wr_cnt     <= '0;
      gen_pulse  <= 1'b0;
      best_valid <= 1'b0;
      best_fit   <= '0;
    end else begin
      gen_pulse <= 1'b0;
      if (restart) begin
        wr_cnt     <= '0;
        best_valid <= 1'b0;
      end else if (wr_valid && !init_we) begin
        if (32'(wr_cnt) == POP - 1) begin
          wr_cnt    <= '0;
          rd_bank   <= ~rd_bank;
          gen_pulse <= 1'b1;
        end else begin
          wr_cnt <= wr_cnt + 1'b1;
        end
        if (!best_valid || wr_fit >= best_fit) begin
          best_valid <= 1'b1;
          best_fit   <= wr_fit;
        end
      end
    end

  always_ff @(posedge clk)
    if (!restart && wr_valid && !init_we && (!best_valid || wr_fit >= best_fit))
      best_chrom <= wr_chrom;

  // Selection pipeline: stage 1 reads the memories, stage 2 compares.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      issue_cnt <= '0;
      s1_valid  <= 1'b0;
      s1_elite  <= 1'b0;
      sel_valid <= 1'b0;
      sel_keep  <= 1'b0;
      tour_a    <= '0;
      tour_b    <= '0;
    end else begin
      s1_valid <= sel_req;
      s1_elite <= sel_req && elitism && best_valid && issue_cnt == '0;
      if (restart) issue_cnt <= '0;
      else if (sel_req) issue_cnt <= (32'(issue_cnt) == POP - 1) ? '0 : issue_cnt + 1'b1;
      if (sel_req) begin
        tour_a <= idx_a;
        tour_b <= idx_b;
      end
      sel_valid <= s1_valid;
      sel_keep  <= s1_elite;
    end

  always_ff @(posedge clk)
    if (s1_elite)                sel_chrom <= best_chrom;
    else if (rd_a.fit >= rd_b.fit) sel_chrom <= rd_a.chrom;
    else                         sel_chrom <= rd_b.chrom;

  // A host load must not collide with an offspring write.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(init_we && wr_valid))
    else $error("selection_unit: init and offspring write collide");

endmodule
