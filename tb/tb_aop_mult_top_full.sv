// tb_aop_mult_top_full -- aop_mult_top at its default size, N = 233 (the
// operand length used for the area/time comparison of this multiplier).
//
// x^234 + ... + x + 1 is not irreducible (234 is not prime), so at this
// size the circuit multiplies in the quotient ring GF(2)[x]/(AOP); the
// reference below is the same ring product: schoolbook multiplication and
// long division by the all-one polynomial. Runs corner operands and random
// ones, checks every product and the start-to-done latency of 3N+2
// cycles, and counts operations in which the wrap-around (S) path and the
// final reduction XOR changed the result.
module tb_aop_mult_top_full;

  localparam int N = 233;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start, busy, done;
  logic [N-1:0] a, b, p;
  int           checks, failures, n_wrap, n_reduce;

  always #5 clk = ~clk;

  aop_mult_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
    .busy(busy), .done(done), .p(p)
  );

  function automatic logic [N-1:0] ref_mul(logic [N-1:0] x, logic [N-1:0] y);
    logic [2*N-2:0] prod;
    logic [2*N-2:0] aop;
    prod = '0;
    for (int i = 0; i < N; i++)
      if (y[i]) prod ^= ((2*N-1)'(x) << i);
    aop = '0;
    for (int k = 0; k <= N; k++) aop[k] = 1'b1;
    for (int k = 2*N-2; k >= N; k--)
      if (prod[k]) prod ^= aop << (k - N);
    return prod[N-1:0];
  endfunction

  function automatic logic top_coeff(logic [N-1:0] x, logic [N-1:0] y);
    logic r = 1'b0;
    for (int i = 1; i < N; i++) r ^= y[i] & x[N-i];
    return r;
  endfunction

  function automatic logic wraps(logic [N-1:0] x, logic [N-1:0] y);
    for (int i = 2; i < N; i++)
      for (int k = N - i + 1; k < N; k++)
        if (y[i] && x[k]) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  task automatic run_op(logic [N-1:0] x, logic [N-1:0] y);
    int lat;
    logic [N-1:0] exp_p;
    exp_p = ref_mul(x, y);
    a     <= x;
    b     <= y;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    lat = 1;
    while (!done) begin
      @(posedge clk);
      lat++;
    end
    // done is high in the cycle 3N+2 cycles after the start cycle and is
    // seen at the end of it, at edge 3N+3 counted from the start edge.
    checks++;
    if (lat != 3*N + 3) begin
      failures++;
      $display("latency %0d, expected %0d", lat, 3*N + 3);
    end
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("a=%h\nb=%h\np=%h\nexpected %h", x, y, p, exp_p);
    end
    if (top_coeff(x, y)) n_reduce++;
    if (wraps(x, y))     n_wrap++;
  endtask

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    checks = 0; failures = 0; n_wrap = 0; n_reduce = 0;
    start = 1'b0;
    a = '0;
    b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_op('1, '1);
    run_op(N'(1), '1);
    run_op(N'(1) << (N-1), N'(1) << (N-1));
    for (int k = 0; k < 20; k++) run_op(rnd(), rnd());
    $display("wrap=%0d reduce=%0d", n_wrap, n_reduce);
    if (n_wrap == 0 || n_reduce == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    report();
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
  end

endmodule
