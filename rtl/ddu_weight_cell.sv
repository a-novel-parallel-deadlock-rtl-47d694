// ddu_weight_cell: reducibility test for one row or one column of the DDU matrix.
//
// The cell ORs the request bits and the grant bits of the K elements of its row
// (or column), giving a two-bit summary (any r, any g). The XOR of those two bits
// is 1 exactly when the line holds only requests or only grants, which is the
// document's sink/source condition: a processor row with only r's is a source,
// with only g's a sink; a resource column with only g is a source, with only r's
// a sink. A line of all zeros gives 0: it holds nothing to remove. The OR/XOR
// structure is the document's (Section 4, Example 3).
//
// Interface: `reduce` goes back to every matrix cell of the line and to the
// decide cell; `nonempty` (any element left) goes to the decide cell.
// Timing: purely combinational.
module ddu_weight_cell #(
  parameter int unsigned K = 50   // elements in the line
) (
  input  logic [K-1:0] req_bits,
  input  logic [K-1:0] grant_bits,
  output logic         any_req,
  output logic         any_grant,
  output logic         reduce,
  output logic         nonempty
);

  always_comb begin
    any_req   = |req_bits;
    any_grant = |grant_bits;
    reduce    = any_req ^ any_grant;
    nonempty  = any_req | any_grant;
  end

endmodule
