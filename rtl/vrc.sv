// Virtual reconfigurable circuit (VRC) for multiple-constant-multiplier
// candidates.
//
// A grid of COLS columns by ROWS rows of CFBs. Every CFB reads the input x
// or any output of the column just before it, so a column is one pipeline
// stage and the candidate circuit has COLS stages. The configuration of a
// column is delayed by as many cycles as data take to reach it, so a new
// candidate can enter every cycle and the grid is reconfigured column by
// column as it moves through. The outputs are not configurable: output k is
// CFB row k%ROWS of column COLS-1-k/ROWS, i.e. the last column first, and
// the earlier columns' outputs are delayed so that all NOUT outputs belong to
// the same candidate. Alongside, the number of CFBs configured as wires is
// summed column by column (col_wire_count).
//
// From the accelerator: grid of CFBs, previous-column connectivity, one
// stage per column, 16-bit data, up to 32 outputs taken from CFBs with
// alignment registers, wire counting per column, 512-bit configuration limit.
// This design's choices: the order in which CFBs map to outputs, and that x
// is carried down the pipeline with the configuration (the accelerator feeds
// a constant x = 1, for which this makes no difference).
//
// Timing: cfg/x/in_valid at cycle t give y/wire_count/out_valid at t+COLS.
module vrc
  import mcm_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter int unsigned X_W    = 8,
  parameter int unsigned COLS   = 4,
  parameter int unsigned ROWS   = 11,
  parameter int unsigned NOUT   = 32,
  parameter int unsigned WCNT_W = $clog2(COLS * ROWS + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [X_W-1:0]               x,
  input  gene_t [COLS-1:0][ROWS-1:0]   cfg,
  output logic                         out_valid,
  output logic [NOUT-1:0][W-1:0]       y,
  output logic [WCNT_W-1:0]            wire_count
);

  localparam int unsigned CCNT_W = $clog2(ROWS + 1);

  // Per-stage copies of configuration, input, running wire count and valid.
  // Stage c feeds column c; stage 0 is the module input.
  gene_t [COLS-1:0][ROWS-1:0] cfg_s  [COLS];
  logic  [W-1:0]              x_s    [COLS];
  logic  [WCNT_W-1:0]         wc_s   [COLS+1];
  logic                       v_s    [COLS+1];
  logic  [ROWS-1:0][W-1:0]    col_y  [COLS];
  logic  [ROWS-1:0][W-1:0]    col_al [COLS];

  assign cfg_s[0] = cfg;
  assign x_s[0]   = W'(x);
  assign wc_s[0]  = '0;
  assign v_s[0]   = in_valid;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [ROWS-1:0][W-1:0] prev;
    logic [CCNT_W-1:0]      ccount;

    if (c == 0) begin : g_first
      assign prev = {ROWS{x_s[0]}};
    end else begin : g_next
      assign prev = col_y[c-1];
    end

    for (genvar r = 0; r < ROWS; r++) begin : g_row
      cfb #(.W(W), .ROWS(ROWS)) u_cfb (
        .clk  (clk),
        .x    (x_s[c]),
        .prev (prev),
        .gene (cfg_s[c][c][r]),
        .y    (col_y[c][r])
      );
    end

    col_wire_count #(.ROWS(ROWS)) u_wc (
      .genes (cfg_s[c][c]),
      .count (ccount)
    );

    always_ff @(posedge clk) wc_s[c+1] <= wc_s[c] + WCNT_W'(ccount);

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) v_s[c+1] <= 1'b0;
      else        v_s[c+1] <= v_s[c];

    if (c + 1 < COLS) begin : g_cfg_pipe
      always_ff @(posedge clk) begin
        cfg_s[c+1] <= cfg_s[c];
        x_s[c+1]   <= x_s[c];
      end
    end

    // Alignment: column c is ready at t+c+1, the outputs at t+COLS.
    localparam int unsigned DLY = COLS - 1 - c;
    if (DLY == 0) begin : g_nodly
      assign col_al[c] = col_y[c];
    end else begin : g_dly
      logic [ROWS-1:0][W-1:0] sr [DLY];
      always_ff @(posedge clk) begin
        sr[0] <= col_y[c];
        for (int d = 1; d < DLY; d++) sr[d] <= sr[d-1];
      end
      assign col_al[c] = sr[DLY-1];
    end
  end

  for (genvar k = 0; k < NOUT; k++) begin : g_out
    assign y[k] = col_al[COLS - 1 - k / ROWS][k % ROWS];
  end

  assign wire_count = wc_s[COLS];
  assign out_valid  = v_s[COLS];

  initial begin
    assert (NOUT <= COLS * ROWS) else $error("vrc: NOUT exceeds the number of CFBs");
    assert (COLS * ROWS * GENE_W <= CONF_MAX_BITS)
      else $error("vrc: configuration exceeds %0d bits", CONF_MAX_BITS);
    assert (ROWS < (1 << SEL_W)) else $error("vrc: ROWS too large for the select field");
  end

endmodule
