// aop_siso_array -- serial-in serial-out (SISO) systolic array that
// multiplies two elements of GF(2^N) whose field polynomial is the all-one
// polynomial  x^N + x^(N-1) + ... + x + 1.
//
// Main idea: with an AOP, eta^(N+1) = 1, so multiplying by eta is a plain
// cyclic left shift of an (N+1)-bit vector. Row i of the dependence graph
// adds b_i * (eta^i * A) into an (N+1)-bit accumulator C; the last row
// reduces C to N bits with p_j = c_j xor c_N. Projecting the graph along i
// (projection vector [1 0]^T) gives one processing element per row; the
// schedule t(i,j) = N + 2i - j (schedule vector [2 -1]) streams the bits
// MSB first and skews neighbouring PEs by two cycles.
//
// Structure: N-1 elements aop_pe (PE_0 .. PE_{N-2}) in a chain followed by
// one aop_pe_last (PE_{N-1}). f, c, S and T pass from PE_i to PE_{i+1}
// only (local interconnect); b_i goes to PE_i in parallel.
//
// Interface and timing, counting the cycle in which the first bit enters
// as cycle 0 (the array must be cleared before, by rst_n or clr):
//   cycle t, 0 <= t <= N : f_in = f_{N-t}^{-1}, i.e. 0 in cycle 0, then
//                          a_{N-1} ... a_0;  c_in = c_{N-t}^{-1} (0 for a
//                          plain product; a non-zero (N+1)-bit C is added
//                          to the product before the reduction)
//   cycle 0              : t_in = 1 (hold MSB), otherwise 0
//   cycle N+2            : s_in = 1 (wrap MSB around), otherwise 0
//   cycle 3N-1-j         : p_out = p_j, 0 <= j <= N-1 (p_{N-1} in cycle
//                          2N, p_0 in cycle 3N-1)
// b must stay constant from cycle 0 to cycle 3N-2. The document's time
// instance t of each output bit is cycle t+1 here, because its D-latches
// are edge-triggered registers in this implementation.
module aop_siso_array #(
  parameter int unsigned N = 233   // field degree n (Table 2 of the source uses 233)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [N-1:0] b,       // operand B, parallel, b[i] to PE_i
  input  logic         f_in,    // operand A, serial, MSB first after a leading 0
  input  logic         c_in,    // initial accumulator C, serial, MSB first
  input  logic         s_in,    // S_in of PE_0
  input  logic         t_in,    // T_in of PE_0
  output logic         p_out    // product, serial, MSB first
);

  // Chain signals: index i is the input of PE_i.
  logic [N-1:0] f_ch, c_ch, s_ch, t_ch;

  assign f_ch[0] = f_in;
  assign c_ch[0] = c_in;
  assign s_ch[0] = s_in;
  assign t_ch[0] = t_in;

  for (genvar i = 0; i < N - 1; i++) begin : g_pe
    aop_pe u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .b_i   (b[i]),
      .f_in  (f_ch[i]),
      .c_in  (c_ch[i]),
      .s_in  (s_ch[i]),
      .t_in  (t_ch[i]),
      .f_out (f_ch[i+1]),
      .c_out (c_ch[i+1]),
      .s_out (s_ch[i+1]),
      .t_out (t_ch[i+1])
    );
  end

  aop_pe_last u_pe_last (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .b_i   (b[N-1]),
    .f_in  (f_ch[N-1]),
    .c_in  (c_ch[N-1]),
    .t_in  (t_ch[N-1]),
    .p_out (p_out)
  );

  // PE_{N-1} has no multiplexer, so the S pulse ends at PE_{N-2}.
  logic unused_s;
  assign unused_s = s_ch[N-1];

  initial begin
    assert (N >= 2) else $error("aop_siso_array: N must be at least 2");
  end

endmodule
