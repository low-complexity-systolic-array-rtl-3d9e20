// aop_pe -- processing element PE_i (0 <= i <= n-2) of the bit-serial
// systolic multiplier for GF(2^n) defined by an all-one polynomial (AOP).
//
// Row i of the multiplication computes, one bit position j per clock,
//     c_j^i = c_j^{i-1} xor (b_i and f_j^{i-1})
// where F^{i-1} is the operand A cyclically shifted left i times inside an
// (n+1)-bit ring (eta^(n+1) = 1 for an AOP). The bits of C and F arrive
// most significant first (j = n down to 0), one per cycle.
//
// Structure (follows the element drawn in the document):
//   * an AND and an XOR form the partial-product accumulate;
//   * two registers (D_c) delay c by two cycles towards PE_{i+1};
//   * one register (D_f) delays f by one cycle, which realises the
//     cyclic shift by one position towards PE_{i+1};
//   * a hold register (the node behind tri-state buffer T_f in the
//     original circuit) captures the incoming MSB f_n^{i-1} while
//     T_in = 1;
//   * a 2:1 multiplexer (M_f) forwards the held MSB instead of the D_f
//     output while S_in = 1, supplying the wrapped-around bit 0 of F^i;
//   * two registers each (D_s, D_t) delay S and T by two cycles, so the
//     control pulses travel with the data.
// The AND gate uses the undelayed f input, T_f/M_f act on the current
// S_in/T_in, as in the document's element.
//
// Design choices of this implementation: the document's "D-latches" are
// edge-triggered registers with one cycle of delay each; the tri-state
// storage node is a register with load enable (T_in); rst_n (asynchronous)
// and clr (synchronous) both clear every register, the document requiring
// only that all storage is cleared before an operation starts.
//
// Timing: all outputs are registered except f_out, which is the
// multiplexer output (combinational from S_in).
module aop_pe (
  input  logic clk,
  input  logic rst_n,   // asynchronous clear, active low
  input  logic clr,     // synchronous clear before an operation
  input  logic b_i,     // operand bit b_i, static during an operation
  input  logic f_in,    // f_j^{i-1}, serial, MSB first
  input  logic c_in,    // c_j^{i-1}, serial, MSB first
  input  logic s_in,    // S_in: select the held MSB on f_out
  input  logic t_in,    // T_in: capture f_in as the held MSB
  output logic f_out,   // f_{j+1}^i to PE_{i+1}
  output logic c_out,   // c_j^i to PE_{i+1}, two cycles after c_in
  output logic s_out,   // S_in delayed by two cycles
  output logic t_out    // T_in delayed by two cycles
);

  logic       f_q;      // D_f
  logic       f_hold;   // node behind T_f: f_{n+1}^i
  logic [1:0] c_q;      // D_c, D_c
  logic [1:0] s_q;      // D_s, D_s
  logic [1:0] t_q;      // D_t, D_t
  logic       c_new;

  assign c_new = c_in ^ (b_i & f_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q    <= 1'b0;
      f_hold <= 1'b0;
      c_q    <= '0;
      s_q    <= '0;
      t_q    <= '0;
    end else if (clr) begin
      f_q    <= 1'b0;
      f_hold <= 1'b0;
      c_q    <= '0;
      s_q    <= '0;
      t_q    <= '0;
    end else begin
      f_q <= f_in;
      if (t_in) f_hold <= f_in;
      c_q <= {c_q[0], c_new};
      s_q <= {s_q[0], s_in};
      t_q <= {t_q[0], t_in};
    end
  end

  assign f_out = s_in ? f_hold : f_q;
  assign c_out = c_q[1];
  assign s_out = s_q[1];
  assign t_out = t_q[1];

endmodule
