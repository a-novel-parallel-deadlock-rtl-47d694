// rag_matrix: the resource allocation state of the system, kept as the matrix
// M = [m_ij] that the deadlock detection unit works on.
//
// Row i is processor p_i, column j resource q_j; an element is r (p_i requests
// q_j), g (q_j is granted to p_i) or 0. The matrix is changed by events, one per
// clock: a processor requests, is granted, or releases a set of resources given
// as a bit mask, so several requests can be made at once (the document allows
// any number of requests per processor). A grant turns the element into g. A
// release clears the element, whether it held a request or a grant. Each
// resource has one unit, so at most one g may stand in a column: a grant of a
// resource held by another processor is refused, leaves the matrix unchanged
// for that resource and raises `ev_error` for one cycle, as does an event
// naming a processor that does not exist. A request for a resource the
// processor already holds is ignored. The event interface, its encoding and the
// refusal rule are this design's choices; the document gives only the matrix
// and the sequence of requests, grants and releases that change it.
//
// Timing: an event with ev_valid high is applied at the next rising edge;
// `state` is the register contents.
module rag_matrix
  import ddu_pkg::*;
#(
  parameter int unsigned M  = DDU_M,
  parameter int unsigned N  = DDU_N,
  parameter int unsigned PW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ev_valid,
  input  ev_op_t               ev_op,
  input  logic [PW-1:0]        ev_proc,
  input  logic [N-1:0]         ev_res_mask,
  output logic                 ev_error,
  output cell_t [M-1:0][N-1:0] state
);

  // Decoded event: which row it addresses, and whether that row exists.
  logic [M-1:0] row_sel;
  logic         proc_ok;
  logic         do_event;
  logic [N-1:0] held_by_other;   // resource granted to a processor other than ev_proc
  logic [N-1:0] grant_refused;
  cell_t [M-1:0][N-1:0] state_d;

  always_comb begin
    do_event = ev_valid && (ev_op != EV_NOP);
    proc_ok  = (32'(ev_proc) < M);
    for (int unsigned i = 0; i < M; i++) row_sel[i] = (32'(ev_proc) == i);
  end

  for (genvar j = 0; j < N; j++) begin : g_col
    logic [M-1:0] others_grant;
    for (genvar i = 0; i < M; i++) begin : g_row
      assign others_grant[i] = (state[i][j] == CELL_GRANT) && !row_sel[i];

      // Next value of element (i, j).
      cell_t nxt;
      always_comb begin
        nxt = state[i][j];
        if (do_event && row_sel[i] && ev_res_mask[j]) begin
          unique case (ev_op)
            EV_REQUEST: if (state[i][j] == CELL_ZERO) nxt = CELL_REQ;
            EV_GRANT:   if (!held_by_other[j]) nxt = CELL_GRANT;
            EV_RELEASE: nxt = CELL_ZERO;
            default:    ;
          endcase
        end
      end
      assign state_d[i][j] = nxt;
    end
    assign held_by_other[j] = |others_grant;
    assign grant_refused[j] = ev_res_mask[j] && held_by_other[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= '0;
      ev_error <= 1'b0;
    end else begin
      state    <= state_d;
      ev_error <= do_event && (!proc_ok || (ev_op == EV_GRANT && (|grant_refused)));
    end
  end

  // Each resource has a single unit: never more than one grant per column.
  for (genvar j = 0; j < N; j++) begin : g_one_grant
    logic [M-1:0] col_grants;
    for (genvar i = 0; i < M; i++) begin : g_bit
      assign col_grants[i] = (state[i][j] == CELL_GRANT);
    end
    a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col_grants));
  end

endmodule
