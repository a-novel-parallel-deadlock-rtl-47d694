// ddu_decide_cell: iteration control and the deadlock decision of the DDU.
//
// The decide cell ORs the reduce signals of all M row weight cells and N column
// weight cells into `reducible` (Algorithm 3.1, Step 1). After `start` it lets
// the matrix reduce one iteration per clock cycle (`step` high). The first
// iteration in which nothing is reducible ends the run (the UNTIL of Step 1),
// and Step 2 decides: if any row still holds an element, Lambda is not empty and
// a deadlock exists.
//
// Counting follows the document's worked examples: every evaluated iteration,
// including the final one that finds nothing to reduce, counts as one step, so
// the 2x3 example with a deadlock takes 2 steps and the one without takes 3.
//
// Interface:
//   start      pulse; ignored while busy. In the same cycle `load` tells the
//              matrix cells to take the allocation matrix.
//   busy       high from the cycle after start until the decision.
//   done       high from the decision until the next accepted start.
//   deadlock   valid while done.
//   steps      number of iterations of the last run, valid while done.
// Timing: with start accepted at clock edge 0, the decision is registered at
// edge `steps`, so done is seen `steps` cycles after start. The start/busy/done
// handshake and the reset are this design's choices.
module ddu_decide_cell #(
  parameter int unsigned M      = ddu_pkg::DDU_M,
  parameter int unsigned N      = ddu_pkg::DDU_N,
  parameter int unsigned STEP_W = $clog2(M + N + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [M-1:0]      row_reduce,
  input  logic [N-1:0]      col_reduce,
  input  logic [M-1:0]      row_nonempty,
  output logic              load,
  output logic              step,
  output logic              reducible,
  output logic              busy,
  output logic              done,
  output logic              deadlock,
  output logic [STEP_W-1:0] steps
);

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state_q;

  always_comb begin
    reducible = (|row_reduce) | (|col_reduce);
    load      = start && (state_q == S_IDLE);
    step      = (state_q == S_RUN);
    busy      = (state_q == S_RUN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      done     <= 1'b0;
      deadlock <= 1'b0;
      steps    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q  <= S_RUN;
          done     <= 1'b0;
          deadlock <= 1'b0;
          steps    <= '0;
        end
        S_RUN: begin
          steps <= steps + 1'b1;
          if (!reducible) begin
            state_q  <= S_IDLE;
            done     <= 1'b1;
            deadlock <= |row_nonempty;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Every reducing iteration empties at least one of the M + N rows and
  // columns, so a run ends after at most M + N + 1 iterations. (The document
  // states min(m, n); a chain of requests and grants leading into a cycle needs
  // more, one node per iteration, so the safe bound is checked here.)
  localparam int unsigned MAX_STEPS = M + N + 1;
  a_step_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                 step |-> (32'(steps) < MAX_STEPS));

endmodule
