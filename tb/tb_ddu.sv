// tb_ddu: self-checking testbench of the deadlock detection unit array.
//
// A 5 x 5 unit is given the document's worked examples (the 2 x 3 system of
// Table 1 with a deadlock, its variant of Table 2 without, and the 4 x 4
// allocation states of Table 5), an empty matrix, a request chain that runs
// into a cycle, and random legal matrices. For each run it checks the deadlock
// flag against a graph model that removes nodes without outgoing edges, the
// iteration count against a software run of the reduction, the number of
// elements left in the working matrix, and that done rises exactly `steps`
// cycles after start. A start pulse during a run must be ignored.
module tb_ddu;
  import ddu_pkg::*;
  import ddu_ref_pkg::*;

  localparam int unsigned M = 5;
  localparam int unsigned N = 5;
  localparam int unsigned STEP_W = $clog2(M + N + 2);

  logic clk = 0, rst_n = 0, start = 0;
  cell_t [M-1:0][N-1:0] matrix_in;
  logic busy, done, deadlock;
  logic [STEP_W-1:0] steps;
  cell_t [M-1:0][N-1:0] lambda;

  int checks = 0, failures = 0;

  ddu #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int count_left();
    int c = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (lambda[i][j] != CELL_ZERO) c++;
    return c;
  endfunction

  // Runs one detection on `a`; expected values come from the reference models
  // unless exp_steps >= 0 is given, which must also agree with them.
  task automatic run(const ref mat_t a, input string name, input int exp_steps = -1,
                     input int exp_dead = -1, input bit poke_start = 0);
    int ref_left, ref_st, cycles;
    bit ref_dead;
    ref_st   = ref_steps(a, M, N, ref_left);
    ref_dead = ref_has_cycle(a, M, N);
    if (exp_steps >= 0) check(ref_st == exp_steps, {name, ": reference step count"});
    if (exp_dead >= 0)  check(ref_dead == exp_dead[0], {name, ": reference deadlock"});
    @(negedge clk);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        matrix_in[i][j] = cell_t'(a[i][j]);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      if (poke_start && cycles == 2) start = 1;   // ignored: unit is busy
      check(busy, {name, ": busy during run"});
      @(negedge clk);
      start = 0;
      cycles++;
      if (cycles > 100) break;
    end
    check(!busy, {name, ": idle after run"});
    check(deadlock == ref_dead, {name, ": deadlock flag"});
    check(int'(steps) == ref_st, $sformatf("%s: steps %0d, expected %0d", name, steps, ref_st));
    check(cycles == ref_st, $sformatf("%s: done after %0d cycles, expected %0d", name, cycles, ref_st));
    check(count_left() == ref_left, {name, ": elements left in lambda"});
    check(deadlock == (count_left() != 0), {name, ": deadlock iff lambda not empty"});
  endtask

  mat_t a;
  int n_dead = 0;

  initial begin
    matrix_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");

    // Table 1: p1 = DSP, p2 = VSP; q1 = IcP, q2 = PCI, q3 = WI.
    clear_mat(a);
    a[0][0] = 2'b01; a[0][1] = 2'b10;
    a[1][0] = 2'b10; a[1][1] = 2'b01; a[1][2] = 2'b01;
    run(a, "table1", 2, 1);
    // Table 2: edge (p2, q2) removed.
    a[1][1] = 2'b00;
    run(a, "table2", 3, 0);

    // Table 5 at t1..t5, rows p1..p4 (MPC750-1..4), columns q1..q4 (FFT, MPEG, PCI, WI).
    clear_mat(a);
    a[0][0] = 2'b01; a[0][1] = 2'b01;                       // t1
    run(a, "t1", -1, 0);
    a[2][0] = 2'b10; a[2][2] = 2'b01;                       // t2
    run(a, "t2", -1, 0);
    a[1][0] = 2'b10; a[1][2] = 2'b10;                       // t3
    run(a, "t3", -1, 0);
    a[0][0] = 2'b00;                                        // t4
    run(a, "t4", -1, 0);
    a[1][0] = 2'b01;                                        // t5: deadlock in 2 steps
    run(a, "t5", 2, 1);

    clear_mat(a);
    run(a, "empty", 1, 0);

    tail_into_cycle(a, 5);
    run(a, "tail_into_cycle", 7, 1, 1);

    for (int t = 0; t < 400; t++) begin
      rand_matrix(a, M, N, 10 + (t % 5) * 15);
      if (ref_has_cycle(a, M, N)) n_dead++;
      run(a, $sformatf("random%0d", t));
    end
    check(n_dead > 20 && n_dead < 380, $sformatf("random mix has both outcomes (%0d deadlocked)", n_dead));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
