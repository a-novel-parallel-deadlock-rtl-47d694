// tb_ddu_top: end-to-end testbench of the deadlock detection peripheral at its
// default size (50 processors x 50 resources).
//
// Part 1 replays the four-processor, four-resource SoC example: MPC750-1 takes
// FFT and MPEG, MPC750-3 requests FFT and takes PCI, MPC750-2 requests FFT and
// PCI, MPC750-1 releases FFT, FFT goes to MPC750-2. A detection run follows
// every event; only the last state is deadlocked, and that run must take 2
// cycles, leaving exactly the four edges of the cycle.
// Part 2 plays random allocation traffic: processors request sets of
// resources, free requested resources are granted at once, held ones are
// released, and now and then everything is released. Detection runs are
// started at random, sometimes with events arriving while the unit is busy.
// Every run is checked against a graph model (deadlock), a software run of
// the reduction (steps, elements left) and the cycle count.
// Part 3 builds a request chain that runs into a cycle and must take
// 2 * 50 - 3 iterations.
// The testbench counts how often each mechanism occurred (row reduction,
// column reduction, multi-step run, deadlock, no deadlock, refused grant,
// start while busy, event during a run) and fails if one never did.
module tb_ddu_top;
  import ddu_pkg::*;
  import ddu_ref_pkg::*;

  localparam int unsigned M = DDU_M, N = DDU_N;
  localparam int unsigned PW = $clog2(M), STEP_W = $clog2(M + N + 2);

  logic clk = 0, rst_n = 0;
  logic ev_valid = 0;
  ev_op_t ev_op = EV_NOP;
  logic [PW-1:0] ev_proc = '0;
  logic [N-1:0] ev_res_mask = '0;
  logic ev_error, detect_start = 0, busy, done, deadlock;
  logic [STEP_W-1:0] steps;
  cell_t [M-1:0][N-1:0] state, lambda;

  ddu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  mat_t model;      // expected allocation state
  int n_row_red = 0, n_col_red = 0, n_multi = 0, n_dead = 0, n_live = 0;
  int n_refused = 0, n_start_busy = 0, n_ev_busy = 0, n_runs = 0;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count reductions as the unit performs them.
  always @(posedge clk) if (rst_n && busy) begin
    if (dut.u_ddu.row_reduce != '0) n_row_red++;
    if (dut.u_ddu.col_reduce != '0) n_col_red++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit state_matches();
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (state[i][j] != model[i][j]) return 0;
    return 1;
  endfunction

  function automatic bit held_by_other(int p, int j);
    for (int i = 0; i < M; i++) if (i != p && model[i][j] == 2'b01) return 1;
    return 0;
  endfunction

  // Drives one event for one cycle and updates the model (same rules as the
  // allocation matrix: requests mark free elements, grants of a resource
  // held elsewhere are refused, releases clear).
  task automatic send(input ev_op_t op, input int p, input logic [N-1:0] mask);
    bit refuse = 0;
    for (int j = 0; j < N; j++) if (mask[j]) begin
      case (op)
        EV_REQUEST: if (model[p][j] == 2'b00) model[p][j] = 2'b10;
        EV_GRANT:   if (held_by_other(p, j)) refuse = 1; else model[p][j] = 2'b01;
        EV_RELEASE: model[p][j] = 2'b00;
        default: ;
      endcase
    end
    ev_valid = 1; ev_op = op; ev_proc = PW'(p); ev_res_mask = mask;
    @(negedge clk);
    ev_valid = 0;
    check(ev_error == refuse, "ev_error");
    if (refuse) n_refused++;
    check(state_matches(), "allocation state");
  endtask

  // Detection run on the current state. With `traffic`, random events are sent
  // while the unit is busy; the result must still be that of the state at start.
  task automatic detect(input string name, input int exp_steps = -1, input int exp_dead = -1,
                        input bit traffic = 0);
    mat_t snap;
    int ref_left, ref_st, cycles, left;
    bit ref_dead;
    snap     = model;
    ref_st   = ref_steps(snap, M, N, ref_left);
    ref_dead = ref_has_cycle(snap, M, N);
    if (exp_steps >= 0) check(ref_st == exp_steps, $sformatf("%s: reference steps %0d, expected %0d", name, ref_st, exp_steps));
    if (exp_dead >= 0)  check(ref_dead == exp_dead[0], {name, ": reference deadlock"});
    detect_start = 1;
    @(negedge clk);
    detect_start = 0;
    cycles = 0;
    while (!done && cycles < 200) begin
      if (traffic && ($urandom % 3) == 0) begin
        if (($urandom % 4) == 0) begin
          detect_start = 1;
          n_start_busy++;
        end
        n_ev_busy++;
        send(EV_REQUEST, int'($urandom % M), N'(1) << ($urandom % N));
        detect_start = 0;
      end else begin
        @(negedge clk);
      end
      cycles++;
    end
    n_runs++;
    left = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (lambda[i][j] != CELL_ZERO) left++;
    check(deadlock == ref_dead, $sformatf("%s: deadlock %0b, expected %0b", name, deadlock, ref_dead));
    check(int'(steps) == ref_st, $sformatf("%s: steps %0d, expected %0d", name, steps, ref_st));
    check(cycles == ref_st, $sformatf("%s: done after %0d cycles, expected %0d", name, cycles, ref_st));
    check(left == ref_left, $sformatf("%s: %0d elements left, expected %0d", name, left, ref_left));
    if (deadlock) n_dead++; else n_live++;
    if (steps > 2) n_multi++;
  endtask

  task automatic release_all();
    for (int p = 0; p < M; p++) send(EV_RELEASE, p, '1);
  endtask

  initial begin
    clear_mat(model);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Part 1: q0 = FFT, q1 = MPEG, q2 = PCI, q3 = WI; p0..p3 = MPC750-1..4.
    send(EV_REQUEST, 0, N'('b0011)); send(EV_GRANT, 0, N'('b0011));   // e1
    detect("t1", -1, 0);
    send(EV_REQUEST, 2, N'('b0101)); send(EV_GRANT, 2, N'('b0100));   // e2
    detect("t2", -1, 0);
    send(EV_REQUEST, 1, N'('b0101));                                  // e3
    detect("t3", -1, 0);
    send(EV_RELEASE, 0, N'('b0001));                                  // e4
    detect("t4", -1, 0);
    send(EV_GRANT, 1, N'('b0001));                                    // e5
    detect("t5", 2, 1);
    check(lambda[1][0] == CELL_GRANT && lambda[1][2] == CELL_REQ &&
          lambda[2][0] == CELL_REQ && lambda[2][2] == CELL_GRANT && lambda[0][1] == CELL_ZERO,
          "t5: the cycle MPC750-2/FFT/MPC750-3/PCI is what remains");
    send(EV_GRANT, 2, N'('b0001));                                    // FFT is held: refused
    release_all();

    // Part 2: random traffic.
    for (int round = 0; round < 40; round++) begin
      for (int e = 0; e < 150; e++) begin
        automatic int p = int'($urandom % M);
        automatic logic [N-1:0] mask = '0;
        case ($urandom % 3)
          0: begin
            for (int k = 0; k < 1 + int'($urandom % 3); k++) mask[$urandom % N] = 1'b1;
            send(EV_REQUEST, p, mask);
          end
          1: begin  // grant the processor the requested resources that are free
            for (int j = 0; j < N; j++)
              if (model[p][j] == 2'b10 && !held_by_other(p, j)) mask[j] = 1'b1;
            if (($urandom % 10) == 0) mask[$urandom % N] = 1'b1;   // may be refused
            send(EV_GRANT, p, mask);
          end
          default: begin
            for (int j = 0; j < N; j++)
              if (model[p][j] == 2'b01 && ($urandom % 2) == 0) mask[j] = 1'b1;
            send(EV_RELEASE, p, mask);
          end
        endcase
        if (($urandom % 25) == 0) detect($sformatf("round %0d event %0d", round, e), -1, -1, ($urandom % 2) == 1);
      end
      detect($sformatf("round %0d end", round));
      if (round % 4 == 3) release_all();
    end

    // Part 3: chain into a cycle, 2 * 50 - 3 iterations.
    release_all();
    begin
      mat_t chain;
      tail_into_cycle(chain, M);
      for (int i = 0; i < M; i++) begin
        automatic logic [N-1:0] rq = '0, gr = '0;
        for (int j = 0; j < N; j++) begin
          if (chain[i][j] == 2'b10) rq[j] = 1'b1;
          if (chain[i][j] == 2'b01) gr[j] = 1'b1;
        end
        send(EV_GRANT, i, gr);
        send(EV_REQUEST, i, rq);
      end
      detect("chain into cycle", 2 * M - 3, 1);
    end

    $display("mechanisms: row_reductions=%0d column_reductions=%0d multi_step_runs=%0d deadlocks=%0d no_deadlocks=%0d refused_grants=%0d starts_while_busy=%0d events_during_run=%0d runs=%0d",
             n_row_red, n_col_red, n_multi, n_dead, n_live, n_refused, n_start_busy, n_ev_busy, n_runs);
    check(n_row_red > 0, "row reduction happened");
    check(n_col_red > 0, "column reduction happened");
    check(n_multi > 0, "multi-step run happened");
    check(n_dead > 1, "deadlock detected");
    check(n_live > 0, "no-deadlock result");
    check(n_refused > 0, "grant refused");
    check(n_start_busy > 0, "start while busy");
    check(n_ev_busy > 0, "events during a run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
