// tb_ddu_sizes: runs the detection unit at the array sizes 2x3, 5x5, 7x7 and
// 10x10 (50x50 is covered by tb_ddu_top) with random allocation matrices and,
// for square sizes, the slowest known case, a request chain running into a
// cycle (2k - 3 iterations). Each size is checked against the reference
// models; the largest iteration count seen per size is printed.
module tb_ddu_sizes;
  logic clk = 0, rst_n = 0;
  int c [4], f [4], ms [4];
  logic fin [4];
  int checks, failures;

  ddu_size_check #(.M(2),  .N(3))  u_2x3   (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .max_steps(ms[0]), .finished(fin[0]));
  ddu_size_check #(.M(5),  .N(5))  u_5x5   (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .max_steps(ms[1]), .finished(fin[1]));
  ddu_size_check #(.M(7),  .N(7))  u_7x7   (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .max_steps(ms[2]), .finished(fin[2]));
  ddu_size_check #(.M(10), .N(10)) u_10x10 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .max_steps(ms[3]), .finished(fin[3]));

  always #5 clk = ~clk;

  function automatic void total();
    checks = 0; failures = 0;
    for (int k = 0; k < 4; k++) begin checks += c[k]; failures += f[k]; end
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    total();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    total();
    $display("largest iteration counts: 2x3=%0d 5x5=%0d 7x7=%0d 10x10=%0d", ms[0], ms[1], ms[2], ms[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
