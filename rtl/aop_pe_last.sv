// aop_pe_last -- last processing element PE_{n-1} of the bit-serial AOP
// systolic multiplier, which also performs the modular reduction.
//
// It completes the last accumulation row,
//     c_j^{n-1} = c_j^{n-2} xor (b_{n-1} and f_j^{n-2}),
// registers the result in D_c, and reduces modulo the all-one polynomial
// with p_j = c_j^{n-1} xor c_n^{n-1} (since eta^n = 1 + eta + ... +
// eta^(n-1)). The bits arrive MSB first, so c_n^{n-1} comes first: while
// T_in = 1 it is captured in a hold register (the storage node behind the
// tri-state buffer T_f of the document's element), and from then on every
// following c_j^{n-1} leaves XORed with it as p_j, p_{n-1} first.
//
// Design choices of this implementation: D_c is an edge-triggered
// register, so p_j appears one cycle after the accumulate step of bit j;
// the hold register captures the same value D_c captures in the T_in cycle
// (c_n^{n-1}); rst_n and clr clear both registers.
//
// Timing: p_out is combinational from the two registers. It carries p_j
// in the cycle after the one in which c_j^{n-2} was at c_in.
module aop_pe_last (
  input  logic clk,
  input  logic rst_n,   // asynchronous clear, active low
  input  logic clr,     // synchronous clear before an operation
  input  logic b_i,     // operand bit b_{n-1}
  input  logic f_in,    // f_j^{n-2}, serial, MSB first
  input  logic c_in,    // c_j^{n-2}, serial, MSB first
  input  logic t_in,    // T_in: capture c_n^{n-1}
  output logic p_out    // product bit p_j, serial, MSB first
);

  logic c_q;      // D_c
  logic c_hold;   // node behind T_f: c_n^{n-1}
  logic c_new;

  assign c_new = c_in ^ (b_i & f_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q    <= 1'b0;
      c_hold <= 1'b0;
    end else if (clr) begin
      c_q    <= 1'b0;
      c_hold <= 1'b0;
    end else begin
      c_q <= c_new;
      if (t_in) c_hold <= c_new;
    end
  end

  assign p_out = c_q ^ c_hold;

endmodule
