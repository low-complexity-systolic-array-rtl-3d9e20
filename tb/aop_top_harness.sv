// aop_top_harness -- self-checking driver for one aop_mult_top instance,
// used by tb_aop_mult_top to run several field sizes side by side.
//
// Runs OPS multiplications (a few fixed corner operands, then random ones)
// and compares every p with a reference computed here by schoolbook
// polynomial multiplication followed by long division by the all-one
// polynomial. It also checks the start-to-done latency (3N+2 cycles),
// that a start while busy is ignored, and that an operation can start in
// the cycle after done. The counters report how often each mechanism of
// the multiplier was exercised:
//   n_wrap   operations in which a held MSB wrapped into bit 0 of F^i and
//            met b_i = 1 (the S/M_f path changes the result)
//   n_reduce operations with c_n = 1 before reduction (the final XOR in
//            PE_{N-1} flips every product bit)
//   n_busy   ignored starts while busy
//   n_b2b    back-to-back operations
module aop_top_harness #(
  parameter int unsigned N   = 10,
  parameter int unsigned OPS = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_wrap,
  output int   n_reduce,
  output int   n_busy,
  output int   n_b2b,
  output logic finished
);

  logic         start, busy, done;
  logic [N-1:0] a, b, p;

  aop_mult_top #(.N(N)) dut (
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

  // Coefficient of x^N in the unreduced cyclic product (the value held in
  // PE_{N-1} before the final XOR) and whether the wrap path mattered.
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

  task automatic run_op(logic [N-1:0] x, logic [N-1:0] y, bit poke_busy);
    int lat;
    logic [N-1:0] exp_p;
    exp_p = ref_mul(x, y);
    a     <= x;
    b     <= y;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    lat = 1;
    if (poke_busy) begin
      @(posedge clk);
      lat++;
      a     <= rnd();
      b     <= rnd();
      start <= 1'b1;
      @(posedge clk);
      lat++;
      start <= 1'b0;
      checks++;
      if (!busy) begin
        failures++;
        $display("N=%0d: not busy while an operation runs", N);
      end
      n_busy++;
    end
    while (!done) begin
      @(posedge clk);
      lat++;
    end
    // lat counts clock edges from the one that samples start to the one
    // at whose end done is seen high: done is high in the cycle 3N+2
    // cycles after the start cycle, so it is seen at edge 3N+3.
    checks++;
    if (lat != 3*N + 3) begin
      failures++;
      $display("N=%0d: latency %0d, expected %0d", N, lat, 3*N + 3);
    end
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("N=%0d: a=%h b=%h p=%h expected %h", N, x, y, p, exp_p);
    end
    if (top_coeff(x, y)) n_reduce++;
    if (wraps(x, y))     n_wrap++;
  endtask

  initial begin
    logic [N-1:0] x, y;
    checks = 0; failures = 0;
    n_wrap = 0; n_reduce = 0; n_busy = 0; n_b2b = 0;
    finished = 1'b0;
    start = 1'b0;
    a = '0;
    b = '0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    @(posedge clk);
    run_op('0, '1, 0);
    run_op('1, '1, 0);
    run_op(N'(1), '1, 0);
    run_op('1, N'(1), 0);
    run_op(N'(1) << (N-1), N'(1) << (N-1), 0);
    for (int k = 0; k < OPS; k++) begin
      x = rnd();
      y = rnd();
      // every fourth operation starts right after the previous done
      if (k % 4 == 1) n_b2b++;
      else repeat (1 + $urandom_range(3)) @(posedge clk);
      run_op(x, y, (k % 5 == 2));
    end
    finished = 1'b1;
  end

endmodule
