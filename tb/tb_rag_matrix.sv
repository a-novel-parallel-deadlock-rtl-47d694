// tb_rag_matrix: self-checking testbench of the allocation-state matrix.
//
// A 4 x 4 matrix first replays the request/grant/release sequence of the
// four-processor, four-resource SoC example and is compared with the expected
// allocation matrix after every event. Then random events are applied and the
// matrix compared with a model after each one: a request marks free elements
// r, a grant marks g unless another processor holds the resource (then the
// event is refused with ev_error), a release clears the element, and an event
// for a processor index beyond the matrix is refused.
module tb_rag_matrix;
  import ddu_pkg::*;

  localparam int unsigned M = 4, N = 4, PW = 2;
  // PW = 2 covers exactly 4 processors, so an out-of-range test uses a
  // 3-processor instance as well.
  logic clk = 0, rst_n = 0;
  logic ev_valid = 0;
  ev_op_t ev_op = EV_NOP;
  logic [PW-1:0] ev_proc = '0;
  logic [N-1:0] ev_res_mask = '0;
  logic ev_error, ev_error3;
  cell_t [M-1:0][N-1:0] state;
  cell_t [2:0][N-1:0] state3;
  logic [1:0] model [M][N];
  cell_t [2:0][N-1:0] snap3;
  int checks = 0, failures = 0, n_refused = 0;

  rag_matrix #(.M(M), .N(N), .PW(PW)) dut (.*);
  rag_matrix #(.M(3), .N(N), .PW(PW)) dut3 (.clk, .rst_n, .ev_valid, .ev_op, .ev_proc,
                                            .ev_res_mask, .ev_error(ev_error3), .state(state3));

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

  task automatic compare(input string what);
    bit ok = 1;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (state[i][j] != model[i][j]) ok = 0;
    check(ok, {what, ": state matrix"});
  endtask

  // Apply one event to DUT and model; returns whether the model refuses it.
  task automatic ev(input ev_op_t op, input int p, input logic [N-1:0] mask,
                    input string what = "event");
    bit refuse = 0;
    for (int j = 0; j < N; j++) if (mask[j]) begin
      case (op)
        EV_REQUEST: if (model[p][j] == 2'b00) model[p][j] = 2'b10;
        EV_GRANT: begin
          bit other = 0;
          for (int i = 0; i < M; i++) if (i != p && model[i][j] == 2'b01) other = 1;
          if (other) refuse = 1; else model[p][j] = 2'b01;
        end
        EV_RELEASE: model[p][j] = 2'b00;
        default: ;
      endcase
    end
    @(negedge clk);
    ev_valid = 1; ev_op = op; ev_proc = PW'(p); ev_res_mask = mask;
    @(negedge clk);
    ev_valid = 0;
    check(ev_error == refuse, $sformatf("%s: ev_error %0b, expected %0b", what, ev_error, refuse));
    if (refuse) n_refused++;
    compare(what);
  endtask

  initial begin
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) model[i][j] = 2'b00;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare("reset");
    // SoC example: q0 = FFT, q1 = MPEG, q2 = PCI, q3 = WI; p0..p3 = MPC750-1..4.
    ev(EV_REQUEST, 0, 4'b0011, "e1 request");  ev(EV_GRANT, 0, 4'b0011, "e1 grant");
    check(state[0][0] == CELL_GRANT && state[0][1] == CELL_GRANT, "t1 matrix");
    ev(EV_REQUEST, 2, 4'b0101, "e2 request");  ev(EV_GRANT, 2, 4'b0100, "e2 grant");
    check(state[2][0] == CELL_REQ && state[2][2] == CELL_GRANT, "t2 matrix");
    ev(EV_REQUEST, 1, 4'b0101, "e3 request");
    check(state[1][0] == CELL_REQ && state[1][2] == CELL_REQ, "t3 matrix");
    ev(EV_GRANT, 1, 4'b0001, "FFT still held by p0");
    check(ev_error == 1'b1, "grant of a held resource refused");
    ev(EV_RELEASE, 0, 4'b0001, "e4 release");
    check(state[0][0] == CELL_ZERO, "t4 matrix");
    ev(EV_GRANT, 1, 4'b0001, "e5 grant");
    check(state[1][0] == CELL_GRANT && state[2][0] == CELL_REQ && state[1][2] == CELL_REQ, "t5 matrix");

    // Processor 3 exists in the 4-processor matrix but not in the 3-processor one.
    snap3 = state3;
    ev(EV_REQUEST, 3, 4'b1111, "request by p3");
    check(ev_error3 == 1'b1, "unknown processor refused");
    check(state3 == snap3, "3-processor matrix unchanged by refused event");

    for (int t = 0; t < 1500; t++) begin
      ev_op_t op;
      case ($urandom % 4)
        0: op = EV_NOP;
        1: op = EV_REQUEST;
        2: op = EV_GRANT;
        default: op = EV_RELEASE;
      endcase
      ev(op, int'($urandom % M), N'($urandom), $sformatf("random %0d", t));
    end
    check(n_refused > 20, "refusals exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
