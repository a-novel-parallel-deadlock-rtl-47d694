// tb_ddu_matrix_cell: self-checking testbench of one matrix cell.
//
// Random sequences of load, step and row/column reduce inputs are applied and
// the cell's request and grant bits compared each cycle with a model: load
// takes the new element, a step with either reduce input clears it, anything
// else holds it. Reset must empty the cell.
module tb_ddu_matrix_cell;
  import ddu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load = 0, step = 0, row_reduce = 0, col_reduce = 0;
  cell_t load_val = CELL_ZERO;
  logic req_bit, grant_bit;
  int checks = 0, failures = 0;
  int n_clear = 0, n_hold = 0, n_load = 0;
  logic [1:0] model;

  ddu_matrix_cell dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check({req_bit, grant_bit} == 2'b00, "empty in reset");
    rst_n = 1;
    model = 2'b00;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load       = ($urandom % 4) == 0;
      step       = ($urandom % 2) == 0;
      row_reduce = ($urandom % 3) == 0;
      col_reduce = ($urandom % 3) == 0;
      case ($urandom % 3)
        0: load_val = CELL_ZERO;
        1: load_val = CELL_GRANT;
        default: load_val = CELL_REQ;
      endcase
      if (load) begin model = load_val; n_load++; end
      else if (step && (row_reduce || col_reduce)) begin
        if (model != 2'b00) n_clear++;
        model = 2'b00;
      end else if (model != 2'b00) n_hold++;
      @(posedge clk);
      #1;
      check({req_bit, grant_bit} == model,
            $sformatf("t=%0d cell %b, expected %b", t, {req_bit, grant_bit}, model));
    end
    check(n_clear > 50 && n_hold > 50 && n_load > 50, "all behaviours exercised");
    @(negedge clk);
    load = 1; load_val = CELL_REQ;
    @(negedge clk);
    load = 0;
    rst_n = 0;
    #1;
    check({req_bit, grant_bit} == 2'b00, "reset clears the cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
