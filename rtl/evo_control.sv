// Run controller of the genetic engine.
//
// Starts an evolution run on start, counts generations (one per bank swap of
// the selection unit) and ends the run when the generation limit is reached,
// when the best fitness has not improved for stag_limit generations
// (0 disables this test), or when the host halts. It then stops issuing new
// selections, waits until every candidate in flight has been written back,
// and reports done with the reason. The stop criteria (stagnation of the
// best fitness, or the maximum number of generations) are the ones of the
// evolutionary algorithm; the halt input, the drain phase and the state
// encoding are this design's choices.
//
// Interface: issue is high while RUN, one selection per cycle. restart is a
// one-cycle pulse on start. The limits are sampled every cycle, so the host
// may change them during a run.
module evo_control #(
  parameter int unsigned FIT_W = 32,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             halt,
  input  logic [CNT_W-1:0] max_gen,
  input  logic [CNT_W-1:0] stag_limit,
  input  logic             gen_pulse,
  input  logic [FIT_W-1:0] best_fit,
  input  logic             pipe_empty,
  output logic             restart,
  output logic             issue,
  output logic             busy,
  output logic             done,
  output logic [1:0]       stop_reason,
  output logic [CNT_W-1:0] gen_count,
  output logic [CNT_W-1:0] stag_count
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;

  localparam logic [1:0] R_MAXGEN = 2'd1;
  localparam logic [1:0] R_STAG   = 2'd2;
  localparam logic [1:0] R_HALT  = 2'd3;

  state_e           state;
  logic [FIT_W-1:0] last_best;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state       <= S_IDLE;
      restart     <= 1'b0;
      stop_reason <= '0;
      gen_count   <= '0;
      stag_count  <= '0;
      last_best   <= '0;
    end else begin
      restart <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE:
          if (start) begin
            state       <= S_RUN;
            restart     <= 1'b1;
            stop_reason <= '0;
            gen_count   <= '0;
            stag_count  <= '0;
            last_best   <= '0;
          end
        S_RUN, S_DRAIN: begin
          if (gen_pulse) begin
            gen_count <= gen_count + 1'b1;
            if (best_fit > last_best) begin
              last_best  <= best_fit;
              stag_count <= '0;
            end else begin
              stag_count <= stag_count + 1'b1;
            end
          end
          if (state == S_RUN) begin
            if (halt) begin
              state <= S_DRAIN; stop_reason <= R_HALT;
            end else if (gen_count >= max_gen) begin
              state <= S_DRAIN; stop_reason <= R_MAXGEN;
            end else if (stag_limit != '0 && stag_count >= stag_limit) begin
              state <= S_DRAIN; stop_reason <= R_STAG;
            end
          end else if (pipe_empty) begin
            state <= S_DONE;
          end
        end
      endcase
    end

  assign issue = (state == S_RUN) && !restart;
  assign busy  = (state == S_RUN) || (state == S_DRAIN);
  assign done  = (state == S_DONE);

endmodule
