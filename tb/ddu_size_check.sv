// ddu_size_check: drives one detection unit of size M x N with random legal
// allocation matrices and, for square sizes of 3 and up, a request chain into
// a cycle, checking each run against the reference models (deadlock, iteration
// count, elements left, cycles from start to done). Used by tb_ddu_sizes to
// cover several array sizes in one simulation; reports its totals on
// `checks`/`failures` and raises `finished` at the end.
module ddu_size_check
  import ddu_pkg::*;
  import ddu_ref_pkg::*;
#(
  parameter int unsigned M    = 2,
  parameter int unsigned N    = 3,
  parameter int          RUNS = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   max_steps,
  output logic finished
);
  localparam int unsigned STEP_W = $clog2(M + N + 2);
  cell_t [M-1:0][N-1:0] matrix_in, lambda;
  logic start, busy, done, deadlock;
  logic [STEP_W-1:0] steps;

  ddu #(.M(M), .N(N)) u_ddu (.clk, .rst_n, .matrix_in, .start, .busy, .done,
                             .deadlock, .steps, .lambda);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (%0dx%0d): %s", M, N, what);
    end
  endtask

  task automatic run(const ref mat_t a, input string name);
    int ref_left, ref_st, cycles, left;
    bit ref_dead;
    ref_st   = ref_steps(a, M, N, ref_left);
    ref_dead = ref_has_cycle(a, M, N);
    @(negedge clk);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        matrix_in[i][j] = cell_t'(a[i][j]);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done && cycles < 4 * (M + N)) begin
      @(negedge clk);
      cycles++;
    end
    left = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (lambda[i][j] != CELL_ZERO) left++;
    check(deadlock == ref_dead, {name, ": deadlock"});
    check(int'(steps) == ref_st && cycles == ref_st, {name, ": steps and latency"});
    check(left == ref_left, {name, ": elements left"});
    if (ref_st > max_steps) max_steps = ref_st;
  endtask

  mat_t a;
  initial begin
    checks = 0; failures = 0; max_steps = 0; finished = 0;
    start = 0; matrix_in = '0;
    @(posedge rst_n);
    for (int t = 0; t < RUNS; t++) begin
      rand_matrix(a, M, N, 15 + (t % 6) * 12);
      run(a, $sformatf("random %0d", t));
    end
    if (M == N && M >= 3) begin
      tail_into_cycle(a, M);
      run(a, "chain into cycle");
      check(max_steps == 2 * M - 3, "chain is the slowest case seen");
    end
    finished = 1;
  end
endmodule
