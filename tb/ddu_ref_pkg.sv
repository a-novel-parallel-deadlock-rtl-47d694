// ddu_ref_pkg: reference models used by the deadlock detection testbenches.
//
// A matrix is held as mat_t, up to MAXD x MAXD elements with the same codes as
// the design (2 = request, 1 = grant, 0 = none); rows are processors, columns
// resources.
//   ref_has_cycle  decides deadlock from the graph itself: it keeps removing
//                  nodes that have no outgoing edge left (request edges go from
//                  processor to resource, grant edges from resource to
//                  processor). A cycle exists exactly when some node can never
//                  be removed. This does not use the row/column test of the
//                  hardware.
//   ref_steps      counts the iterations of the row/column reduction,
//                  including the final one that removes nothing.
//   rand_matrix    a random legal matrix: at most one grant per column.
package ddu_ref_pkg;

  localparam int MAXD = 64;
  typedef logic [1:0] mat_t [MAXD][MAXD];

  function automatic void clear_mat(ref mat_t a);
    for (int i = 0; i < MAXD; i++)
      for (int j = 0; j < MAXD; j++)
        a[i][j] = 2'b00;
  endfunction

  function automatic bit ref_has_cycle(const ref mat_t a, input int m, input int n);
    bit alive_p [MAXD];
    bit alive_q [MAXD];
    bit changed;
    for (int i = 0; i < MAXD; i++) begin
      alive_p[i] = (i < m);
      alive_q[i] = (i < n);
    end
    do begin
      changed = 0;
      // A processor with no request to a live resource has no outgoing edge.
      for (int i = 0; i < m; i++) if (alive_p[i]) begin
        bit out_edge = 0;
        for (int j = 0; j < n; j++) if (alive_q[j] && a[i][j] == 2'b10) out_edge = 1;
        if (!out_edge) begin alive_p[i] = 0; changed = 1; end
      end
      // A resource not granted to a live processor has no outgoing edge.
      for (int j = 0; j < n; j++) if (alive_q[j]) begin
        bit out_edge = 0;
        for (int i = 0; i < m; i++) if (alive_p[i] && a[i][j] == 2'b01) out_edge = 1;
        if (!out_edge) begin alive_q[j] = 0; changed = 1; end
      end
    end while (changed);
    for (int i = 0; i < m; i++) if (alive_p[i]) return 1;
    for (int j = 0; j < n; j++) if (alive_q[j]) return 1;
    return 0;
  endfunction

  // Runs the reduction on a copy; `left` returns the number of elements left.
  function automatic int ref_steps(const ref mat_t a, input int m, input int n, output int left);
    mat_t w;
    bit   row_red [MAXD];
    bit   col_red [MAXD];
    bit   any;
    int   steps = 0;
    w = a;
    do begin
      any = 0;
      for (int i = 0; i < m; i++) begin
        bit hr = 0, hg = 0;
        for (int j = 0; j < n; j++) begin
          if (w[i][j] == 2'b10) hr = 1;
          if (w[i][j] == 2'b01) hg = 1;
        end
        row_red[i] = hr ^ hg;
        if (row_red[i]) any = 1;
      end
      for (int j = 0; j < n; j++) begin
        bit hr = 0, hg = 0;
        for (int i = 0; i < m; i++) begin
          if (w[i][j] == 2'b10) hr = 1;
          if (w[i][j] == 2'b01) hg = 1;
        end
        col_red[j] = hr ^ hg;
        if (col_red[j]) any = 1;
      end
      for (int i = 0; i < m; i++)
        for (int j = 0; j < n; j++)
          if (row_red[i] || col_red[j]) w[i][j] = 2'b00;
      steps++;
    end while (any);
    left = 0;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++)
        if (w[i][j] != 2'b00) left++;
    return steps;
  endfunction

  // density_pct: chance of an edge in each element; a column's grant goes to
  // one processor at random.
  function automatic void rand_matrix(ref mat_t a, input int m, input int n, input int density_pct);
    clear_mat(a);
    for (int j = 0; j < n; j++) begin
      int holder = -1;
      if (($urandom % 100) < density_pct) holder = int'($urandom % m);
      for (int i = 0; i < m; i++) begin
        if (i == holder) a[i][j] = 2'b01;
        else if (($urandom % 100) < density_pct) a[i][j] = 2'b10;
      end
    end
  endfunction

  // A chain p0 -> q0 -> p1 -> q1 -> ... that runs into a cycle of the last two
  // processors and resources (k x k matrix, k >= 3). Only the open end of the
  // chain can be reduced, one node per iteration, so the reduction takes
  // 2k - 3 iterations in all.
  function automatic void tail_into_cycle(ref mat_t a, input int k);
    clear_mat(a);
    for (int t = 0; t < k - 1; t++) begin
      a[t][t]     = 2'b10;  // p_t requests q_t
      a[t + 1][t] = 2'b01;  // q_t is held by p_(t+1)
    end
    // Close the cycle p(k-2) -> q(k-2) -> p(k-1) -> q(k-1) -> p(k-2).
    a[k - 1][k - 1] = 2'b10;  // p(k-1) requests q(k-1)
    a[k - 2][k - 1] = 2'b01;  // q(k-1) held by p(k-2)
  endfunction

endpackage
