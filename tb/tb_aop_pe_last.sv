// tb_aop_pe_last -- unit test of the last processing element PE_{N-1}.
//
// Drives random f, c, b and T (and an occasional synchronous clear) and
// checks p_out = D_c xor hold each cycle against a model kept here, where
// D_c is c_in xor (b and f_in) of the previous cycle and hold is that same
// value from the last cycle in which T_in was 1. Inputs change on the
// falling edge; p_out is checked just before the next rising edge.
module tb_aop_pe_last;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr, b_i, f_in, c_in, t_in;
  logic p_out;
  int   checks = 0, failures = 0;
  int   n_flip = 0;

  always #5 clk = ~clk;

  aop_pe_last dut (.*);

  logic mc, mhold;

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    {clr, b_i, f_in, c_in, t_in} = '0;
    mc = 1'b0; mhold = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      clr  = ($urandom_range(99) == 0);
      b_i  = 1'($urandom);
      f_in = 1'($urandom);
      c_in = 1'($urandom);
      t_in = ($urandom_range(7) == 0);
      #1;
      checks++;
      if (p_out !== (mc ^ mhold)) begin
        failures++;
        $display("%t p_out: got %b expected %b", $time, p_out, mc ^ mhold);
      end
      if (mhold) n_flip++;
      @(posedge clk);
      if (clr) begin
        mc = 1'b0; mhold = 1'b0;
      end else begin
        mc = c_in ^ (b_i & f_in);
        if (t_in) mhold = mc;
      end
    end
    if (n_flip == 0) begin
      failures++;
      $display("held c_n never 1");
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
