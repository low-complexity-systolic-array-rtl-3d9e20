// tb_aop_seq -- unit test of the sequencer, with N = 7 and the array
// replaced by the testbench.
//
// For each operation it checks, cycle by cycle from the start pulse: busy,
// a one-cycle arr_clr right after start, then the 3N-cycle run with
// arr_f = {0, a} MSB first in cycles 0..N and 0 after, arr_c = 0,
// arr_t = 1 only in cycle 0, arr_s = 1 only in cycle N+2 and arr_b = b.
// The testbench drives random bits on arr_p; those of cycles 2N..3N-1 are
// p_{N-1}..p_0 and must appear on p when done pulses, 3N+2 cycles after
// the start cycle. Starts while busy must be ignored. Inputs change on
// the falling edge and outputs are checked just after.
module tb_aop_seq;

  localparam int N = 7;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start, busy, done;
  logic [N-1:0] a, b, p;
  logic         arr_clr, arr_f, arr_c, arr_s, arr_t, arr_p;
  logic [N-1:0] arr_b;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  aop_seq #(.N(N)) dut (.*);

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp, int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d %s: got %h expected %h", cyc, what, got, exp);
    end
  endtask

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic run_op(logic [N-1:0] x, logic [N-1:0] y);
    logic [N:0]   fa;
    logic [N-1:0] exp_p;
    fa = {1'b0, x};
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    #1;
    check("busy before start", N'(busy), '0, -2);
    @(negedge clk);
    start = 1'b0;
    a = ~x; b = ~y;          // operands must have been captured
    #1;
    check("clr", N'(arr_clr), N'(1), -1);
    check("busy", N'(busy), N'(1), -1);
    for (int t = 0; t < 3*N; t++) begin
      @(negedge clk);
      start = (t == 5);      // ignored: busy
      arr_p = 1'($urandom);
      if (t >= 2*N) exp_p[3*N-1-t] = arr_p;
      #1;
      check("clr",  N'(arr_clr), '0, t);
      check("busy", N'(busy), N'(1), t);
      check("done", N'(done), '0, t);
      check("f",    N'(arr_f), (t <= N) ? N'(fa[N-t]) : '0, t);
      check("c",    N'(arr_c), '0, t);
      check("t",    N'(arr_t), N'(t == 0), t);
      check("s",    N'(arr_s), N'(t == N + 2), t);
      check("b",    arr_b, y, t);
    end
    @(negedge clk);
    start = 1'b0;
    #1;
    check("done", N'(done), N'(1), 3*N);
    check("busy after done", N'(busy), '0, 3*N);
    check("p", p, exp_p, 3*N);
    @(negedge clk);
    #1;
    check("done pulse length", N'(done), '0, 3*N+1);
  endtask

  initial begin
    start = 1'b0; a = '0; b = '0; arr_p = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 30; k++) run_op(N'($urandom), N'($urandom));
    report();
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
  end

endmodule
