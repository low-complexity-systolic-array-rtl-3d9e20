// tb_aop_pe -- unit test of the processing element PE_i.
//
// Drives random f, c, b, S and T (and an occasional synchronous clear) and
// checks each cycle, against a cycle-level model kept here:
//   c_out = c_in xor (b and f_in), two cycles earlier   (D_c, D_c)
//   f_out = f_in one cycle earlier, or, while S_in = 1, the f_in of the
//           last cycle in which T_in was 1                (D_f, T_f, M_f)
//   s_out, t_out = s_in, t_in two cycles earlier         (D_s, D_t)
// Inputs change on the falling edge and outputs are checked just after.
module tb_aop_pe;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr, b_i, f_in, c_in, s_in, t_in;
  logic f_out, c_out, s_out, t_out;
  int   checks = 0, failures = 0;
  int   n_hold_used = 0;

  always #5 clk = ~clk;

  aop_pe dut (.*);

  // model state
  logic [1:0] mc, ms, mt;
  logic       mf, mhold;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    {clr, b_i, f_in, c_in, s_in, t_in} = '0;
    mc = '0; ms = '0; mt = '0; mf = 1'b0; mhold = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      clr  = ($urandom_range(99) == 0);
      b_i  = 1'($urandom);
      f_in = 1'($urandom);
      c_in = 1'($urandom);
      s_in = ($urandom_range(3) == 0);
      t_in = ($urandom_range(3) == 0);
      #1;
      check("c_out", c_out, mc[1]);
      check("s_out", s_out, ms[1]);
      check("t_out", t_out, mt[1]);
      check("f_out", f_out, s_in ? mhold : mf);
      if (s_in && mhold != mf) n_hold_used++;
      @(posedge clk);
      if (clr) begin
        mc = '0; ms = '0; mt = '0; mf = 1'b0; mhold = 1'b0;
      end else begin
        mc = {mc[0], c_in ^ (b_i & f_in)};
        ms = {ms[0], s_in};
        mt = {mt[0], t_in};
        mf = f_in;
        if (t_in) mhold = f_in;
      end
    end
    if (n_hold_used == 0) begin
      failures++;
      $display("held MSB never differed from the shifted bit");
    end
    report();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
  end

endmodule
