// tb_ddu_weight_cell: self-checking testbench of the row/column weight cell.
//
// For a 7-element line, random legal lines (each element r, g or 0) are
// applied and the outputs compared with a count-based model: the line is
// reducible when it holds requests but no grants or grants but no requests,
// and non-empty when it holds anything. Hand-picked lines from the document's
// Example 3 are included.
module tb_ddu_weight_cell;
  localparam int unsigned K = 7;
  logic [K-1:0] req_bits, grant_bits;
  logic any_req, any_grant, reduce, nonempty;
  int checks = 0, failures = 0;

  ddu_weight_cell #(.K(K)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(input logic [K-1:0] r, input logic [K-1:0] g);
    int nr = 0, ng = 0;
    req_bits = r; grant_bits = g;
    #1;
    for (int k = 0; k < K; k++) begin nr += r[k]; ng += g[k]; end
    check(any_req == (nr > 0) && any_grant == (ng > 0), "OR bits");
    check(reduce == ((nr > 0 && ng == 0) || (ng > 0 && nr == 0)),
          $sformatf("reduce for r=%b g=%b", r, g));
    check(nonempty == (nr + ng > 0), "nonempty");
  endtask

  initial begin
    // Example 3 columns of Table 1: {g, r}, {r, g}, {0, g}; rows {g r 0}, {r g g}.
    apply(7'b0000010, 7'b0000001);
    check(!reduce, "column q1 of Table 1 not reducible");
    apply(7'b0000000, 7'b0000010);
    check(reduce, "column q3 of Table 1 reducible");
    apply(7'b0000001, 7'b0000110);
    check(!reduce, "row p2 of Table 1 not reducible");
    apply('0, '0);
    check(!reduce && !nonempty, "empty line");
    for (int t = 0; t < 3000; t++) begin
      logic [K-1:0] r, g;
      r = '0; g = '0;
      for (int k = 0; k < K; k++)
        case ($urandom % (1 + t % 6))
          0: ;
          1: r[k] = 1'b1;
          2: g[k] = 1'b1;
          default: ;
        endcase
      apply(r, g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
