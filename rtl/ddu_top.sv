// ddu_top: the deadlock detection unit as a peripheral of a multiprocessor SoC.
//
// The processors (through their real-time operating system) report every
// request, grant and release to the allocation-state matrix (rag_matrix). On
// `detect_start` the detection unit (ddu) copies that matrix in one cycle and
// reduces it, one iteration per clock, until it can decide whether a deadlock
// exists. Events may keep arriving during a run; the run works on the copy taken
// at its start. Placing the unit on the system bus beside the processors and
// hardware resources follows the document; the port-level interface below is
// this design's own and would sit behind a bus slave in an SoC.
//
// Interface:
//   ev_valid, ev_op, ev_proc, ev_res_mask, ev_error   allocation events (rag_matrix)
//   detect_start, busy, done, deadlock, steps          detection runs (ddu)
//   state      current allocation matrix
//   lambda     working matrix of the detection unit (after a run: the
//              elements that could not be reduced)
// Timing: an event is in `state` one cycle after it is presented, so a
// detect_start in the cycle after an event sees it. done follows detect_start
// by `steps` cycles.
module ddu_top
  import ddu_pkg::*;
#(
  parameter int unsigned M      = DDU_M,
  parameter int unsigned N      = DDU_N,
  parameter int unsigned PW     = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned STEP_W = $clog2(M + N + 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ev_valid,
  input  ev_op_t               ev_op,
  input  logic [PW-1:0]        ev_proc,
  input  logic [N-1:0]         ev_res_mask,
  output logic                 ev_error,
  input  logic                 detect_start,
  output logic                 busy,
  output logic                 done,
  output logic                 deadlock,
  output logic [STEP_W-1:0]    steps,
  output cell_t [M-1:0][N-1:0] state,
  output cell_t [M-1:0][N-1:0] lambda
);

  rag_matrix #(.M(M), .N(N), .PW(PW)) u_state (
    .clk        (clk),
    .rst_n      (rst_n),
    .ev_valid   (ev_valid),
    .ev_op      (ev_op),
    .ev_proc    (ev_proc),
    .ev_res_mask(ev_res_mask),
    .ev_error   (ev_error),
    .state      (state)
  );

  ddu #(.M(M), .N(N), .STEP_W(STEP_W)) u_ddu (
    .clk      (clk),
    .rst_n    (rst_n),
    .matrix_in(state),
    .start    (detect_start),
    .busy     (busy),
    .done     (done),
    .deadlock (deadlock),
    .steps    (steps),
    .lambda   (lambda)
  );

endmodule
