// tb_ddu_decide_cell: self-checking testbench of the iteration control.
//
// A 3 x 4 decide cell is driven with scripted reduce and non-empty vectors in
// place of a matrix. Checked: load only on an accepted start, step high while
// busy, `reducible` as the OR of all reduce inputs, the run ending in the first
// iteration with nothing reducible, the step count including that iteration,
// the deadlock decision from the non-empty rows, and start being ignored
// during a run.
module tb_ddu_decide_cell;
  localparam int unsigned M = 3, N = 4;
  localparam int unsigned STEP_W = $clog2(M + N + 2);
  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] row_reduce = '0, row_nonempty = '0;
  logic [N-1:0] col_reduce = '0;
  logic load, step, reducible, busy, done, deadlock;
  logic [STEP_W-1:0] steps;
  int checks = 0, failures = 0;

  ddu_decide_cell #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Run with `nred` reducing iterations followed by one that reduces nothing,
  // ending with non-empty rows `ne`.
  task automatic run(input int nred, input logic [M-1:0] ne);
    @(negedge clk);
    start = 1; row_reduce = '0; col_reduce = '0; row_nonempty = '1;
    #1 check(load, "load on start");
    check(!step, "no step before run");
    @(negedge clk);
    start = 0;
    for (int k = 0; k < nred; k++) begin
      check(busy && step && !done, "busy and stepping");
      check(!load, "no load while running");
      row_reduce = M'($urandom);
      col_reduce = N'($urandom);
      if (row_reduce == '0 && col_reduce == '0) col_reduce[k % N] = 1'b1;
      if (k == 0) start = 1;     // must be ignored
      #1 check(reducible, "reducible");
      check(!load, "start ignored while busy");
      @(negedge clk);
      start = 0;
    end
    row_reduce = '0; col_reduce = '0; row_nonempty = ne;
    #1 check(busy && !reducible, "final iteration");
    @(negedge clk);
    check(done && !busy && !step, "done after final iteration");
    check(int'(steps) == nred + 1, $sformatf("steps %0d, expected %0d", steps, nred + 1));
    check(deadlock == (ne != '0), "deadlock decision");
    repeat (2) @(negedge clk);
    check(done && int'(steps) == nred + 1, "result held while idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done && !step && !load, "idle after reset");
    for (int t = 0; t < 60; t++)
      run(t % 8, ($urandom % 2) ? M'($urandom) : '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
