// ddu: the Deadlock Detection Unit, an M x N array that runs the parallel
// matrix-reduction deadlock detection algorithm one iteration per clock.
//
// Rows are processors p_1..p_M, columns resources q_1..q_N. Each matrix cell
// holds one element (r = request, g = grant, 0). A weight cell to the right of
// every row and one below every column OR the request and grant bits of their
// line and XOR the two results: a 1 marks a sink or source, and every element
// of that line is cleared at the next clock edge. All lines are tested in
// parallel in the same cycle. The decide cell in the corner repeats this until
// an iteration removes nothing; the unit then reports a deadlock if any element
// is left. This floorplan (matrix cells, a weight cell per row and column, one
// decide cell) is the document's; the start/busy/done interface is this
// design's choice.
//
// Interface:
//   matrix_in  allocation matrix, matrix_in[i][j] = m_ij, sampled on an accepted start
//   start      begin a detection run (ignored while busy)
//   busy/done/deadlock/steps  see ddu_decide_cell
//   lambda     the working matrix; after a run with a deadlock it holds exactly
//              the request and grant edges left in the unreducible part
// Timing: one reduction iteration per cycle; done rises `steps` cycles after
// start, where steps counts every iteration including the final one.
module ddu
  import ddu_pkg::*;
#(
  parameter int unsigned M      = DDU_M,
  parameter int unsigned N      = DDU_N,
  parameter int unsigned STEP_W = $clog2(M + N + 2)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  cell_t [M-1:0][N-1:0]      matrix_in,
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  output logic                      deadlock,
  output logic [STEP_W-1:0]         steps,
  output cell_t [M-1:0][N-1:0]      lambda
);

  logic load, step, reducible;

  // Bits of the matrix, arranged both ways for the row and column weight cells.
  logic [M-1:0][N-1:0] req_rc, grant_rc;   // [row][col]
  logic [N-1:0][M-1:0] req_cr, grant_cr;   // [col][row]

  logic [M-1:0] row_reduce, row_nonempty;
  logic [N-1:0] col_reduce, col_nonempty;

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      ddu_matrix_cell u_cell (
        .clk       (clk),
        .rst_n     (rst_n),
        .load      (load),
        .load_val  (matrix_in[i][j]),
        .step      (step),
        .row_reduce(row_reduce[i]),
        .col_reduce(col_reduce[j]),
        .req_bit   (req_rc[i][j]),
        .grant_bit (grant_rc[i][j])
      );
      assign req_cr[j][i]   = req_rc[i][j];
      assign grant_cr[j][i] = grant_rc[i][j];
      assign lambda[i][j]   = cell_t'({req_rc[i][j], grant_rc[i][j]});
    end
  end

  // Row weight cells (right of the array).
  for (genvar i = 0; i < M; i++) begin : g_row_weight
    logic any_req, any_grant;
    ddu_weight_cell #(.K(N)) u_weight (
      .req_bits  (req_rc[i]),
      .grant_bits(grant_rc[i]),
      .any_req   (any_req),
      .any_grant (any_grant),
      .reduce    (row_reduce[i]),
      .nonempty  (row_nonempty[i])
    );
  end

  // Column weight cells (below the array).
  for (genvar j = 0; j < N; j++) begin : g_col_weight
    logic any_req, any_grant;
    ddu_weight_cell #(.K(M)) u_weight (
      .req_bits  (req_cr[j]),
      .grant_bits(grant_cr[j]),
      .any_req   (any_req),
      .any_grant (any_grant),
      .reduce    (col_reduce[j]),
      .nonempty  (col_nonempty[j])
    );
  end

  ddu_decide_cell #(.M(M), .N(N), .STEP_W(STEP_W)) u_decide (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .row_reduce  (row_reduce),
    .col_reduce  (col_reduce),
    .row_nonempty(row_nonempty),
    .load        (load),
    .step        (step),
    .reducible   (reducible),
    .busy        (busy),
    .done        (done),
    .deadlock    (deadlock),
    .steps       (steps)
  );

endmodule
