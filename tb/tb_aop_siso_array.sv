// tb_aop_siso_array -- test of the serial-in serial-out systolic array at
// N = 5, the size of the worked dependence-graph example.
//
// The bit streams are driven directly (no sequencer): after a one-cycle
// clear, cycle t = 0 .. N carries f_{N-t}^{-1} ({0, A} MSB first) and
// c_{N-t}^{-1} (an (N+1)-bit initial accumulator C, random here, zero in
// some operations), T_in = 1 in cycle 0 and S_in = 1 in cycle N+2.
// Checked against references computed here from the ring arithmetic:
//   * the schedule of every node of the dependence graph: the input of
//     PE_i in cycle N + 2i - j is c_j^{i-1} and f_j^{i-1};
//   * the product: p_j in cycle 3N-1-j equals (A*B + C) reduced modulo
//     the all-one polynomial by long division.
// Inputs change on the falling edge and are checked just after.
module tb_aop_siso_array;

  localparam int N = 5;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         clr, f_in, c_in, s_in, t_in, p_out;
  logic [N-1:0] b;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  aop_siso_array #(.N(N)) dut (.*);

  function automatic logic [N:0] rotl(logic [N:0] v);
    return {v[N-1:0], v[N]};
  endfunction

  // (x + y) mod AOP for an N-bit product of x and y plus an (N+1)-bit z
  function automatic logic [N-1:0] ref_mac(logic [N-1:0] x, logic [N-1:0] y, logic [N:0] z);
    logic [2*N-2:0] prod;
    logic [2*N-2:0] aop;
    prod = (2*N-1)'(z);
    for (int i = 0; i < N; i++)
      if (y[i]) prod ^= ((2*N-1)'(x) << i);
    aop = '0;
    for (int k = 0; k <= N; k++) aop[k] = 1'b1;
    for (int k = 2*N-2; k >= N; k--)
      if (prod[k]) prod ^= aop << (k - N);
    return prod[N-1:0];
  endfunction

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic run_op(logic [N-1:0] x, logic [N-1:0] y, logic [N:0] z);
    logic [N:0]   fr [N+1];   // fr[i] = F^{i-1}
    logic [N:0]   cr [N+1];   // cr[i] = c^{i-1}
    logic [N-1:0] exp_p;
    fr[0] = {1'b0, x};
    cr[0] = z;
    for (int i = 1; i <= N; i++) begin
      fr[i] = rotl(fr[i-1]);
      cr[i] = cr[i-1] ^ (y[i-1] ? fr[i-1] : '0);
    end
    exp_p = ref_mac(x, y, z);
    @(negedge clk);
    clr = 1'b1;
    {f_in, c_in, s_in, t_in} = '0;
    b = y;
    for (int t = 0; t < 3*N; t++) begin
      @(negedge clk);
      clr  = 1'b0;
      f_in = (t <= N) ? fr[0][N-t] : 1'b0;
      c_in = (t <= N) ? cr[0][N-t] : 1'b0;
      t_in = (t == 0);
      s_in = (t == N + 2);
      #1;
      for (int i = 0; i < N; i++) begin
        int j = N + 2*i - t;
        if (j >= 0 && j <= N) begin
          checks += 2;
          if (dut.c_ch[i] !== cr[i][j] || dut.f_ch[i] !== fr[i][j]) begin
            failures++;
            $display("node (%0d,%0d) at cycle %0d: c=%b f=%b expected c=%b f=%b",
                     i, j, t, dut.c_ch[i], dut.f_ch[i], cr[i][j], fr[i][j]);
          end
        end
      end
      if (t >= 2*N) begin
        int j = 3*N - 1 - t;
        checks++;
        if (p_out !== exp_p[j]) begin
          failures++;
          $display("p_%0d in cycle %0d: got %b expected %b", j, t, p_out, exp_p[j]);
        end
      end
    end
  endtask

  initial begin
    {clr, f_in, c_in, s_in, t_in} = '0;
    b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_op('1, '1, '0);
    run_op(N'(1), N'(1) << (N-1), '0);
    for (int k = 0; k < 200; k++)
      run_op(N'($urandom), N'($urandom), (k % 2) ? (N+1)'($urandom) : '0);
    report();
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
  end

endmodule
