// ddu_matrix_cell: one element m_ij of the DDU's working matrix (the set Lambda
// of Algorithm 3.1, one position of it).
//
// The cell stores the two-bit code of its element (request bit, grant bit). On
// `load` it takes the element of the allocation matrix. On every reduction step
// (`step` high) it clears itself when the weight cell of its row or the weight
// cell of its column reports that the row or column is reducible (a sink or a
// source); clearing the element is removing m_ij from Lambda. Row and column
// reductions of one step are decided from the same matrix and both apply, as in
// the document's Lambda = Lambda_column intersect Lambda_row.
//
// Interface: `req_bit` and `grant_bit` go to the row and column weight cells.
// Timing: load and clear both take effect at the next rising clock edge; the
// outputs are the register contents. An asynchronous active-low reset empties
// the cell; the reset is this design's choice.
module ddu_matrix_cell
  import ddu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,        // take load_val at the next edge
  input  cell_t load_val,
  input  logic  step,        // a reduction iteration is being evaluated
  input  logic  row_reduce,  // this cell's row is a sink or source
  input  logic  col_reduce,  // this cell's column is a sink or source
  output logic  req_bit,
  output logic  grant_bit
);

  cell_t val_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 val_q <= CELL_ZERO;
    else if (load)                              val_q <= load_val;
    else if (step && (row_reduce || col_reduce)) val_q <= CELL_ZERO;
  end

  assign req_bit   = val_q[1];
  assign grant_bit = val_q[0];

endmodule
