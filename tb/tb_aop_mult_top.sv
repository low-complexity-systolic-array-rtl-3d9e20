// tb_aop_mult_top -- end-to-end test of the AOP multiplier.
//
// Runs aop_mult_top at four sizes at once: N = 4, 10 and 36, where the
// all-one polynomial is irreducible and the circuit is a GF(2^N)
// multiplier, and N = 5, the size of the worked example of the
// dependence graph and its schedule. Each instance gets corner operands
// and random ones, a start while busy and back-to-back starts (see
// aop_top_harness). Every mechanism counter must be non-zero.
module tb_aop_mult_top;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NI = 4;
  int   chk [NI], fail [NI], wrap [NI], red [NI], bsy [NI], b2b [NI];
  logic fin [NI];

  aop_top_harness #(.N(4),  .OPS(40)) h4  (.clk, .rst_n, .checks(chk[0]), .failures(fail[0]),
    .n_wrap(wrap[0]), .n_reduce(red[0]), .n_busy(bsy[0]), .n_b2b(b2b[0]), .finished(fin[0]));
  aop_top_harness #(.N(5),  .OPS(40)) h5  (.clk, .rst_n, .checks(chk[1]), .failures(fail[1]),
    .n_wrap(wrap[1]), .n_reduce(red[1]), .n_busy(bsy[1]), .n_b2b(b2b[1]), .finished(fin[1]));
  aop_top_harness #(.N(10), .OPS(60)) h10 (.clk, .rst_n, .checks(chk[2]), .failures(fail[2]),
    .n_wrap(wrap[2]), .n_reduce(red[2]), .n_busy(bsy[2]), .n_b2b(b2b[2]), .finished(fin[2]));
  aop_top_harness #(.N(36), .OPS(60)) h36 (.clk, .rst_n, .checks(chk[3]), .failures(fail[3]),
    .n_wrap(wrap[3]), .n_reduce(red[3]), .n_busy(bsy[3]), .n_b2b(b2b[3]), .finished(fin[3]));

  int checks, failures;

  task automatic report();
    checks = 0;
    for (int k = 0; k < NI; k++) begin
      checks   += chk[k];
      failures += fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int k = 0; k < NI; k++) begin
      $display("instance %0d: checks=%0d failures=%0d wrap=%0d reduce=%0d busy_start=%0d back_to_back=%0d",
               k, chk[k], fail[k], wrap[k], red[k], bsy[k], b2b[k]);
      if (wrap[k] == 0 || red[k] == 0 || bsy[k] == 0 || b2b[k] == 0) begin
        failures++;
        $display("instance %0d: a mechanism was never exercised", k);
      end
    end
    report();
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
  end

endmodule
