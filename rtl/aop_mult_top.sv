// aop_mult_top -- bit-serial systolic multiplier for GF(2^N) with an
// all-one field polynomial, with a parallel-word interface.
//
// Computes p = a * b mod (x^N + x^(N-1) + ... + x + 1). The arithmetic is
// done by aop_siso_array (N processing elements, 3N-cycle serial
// schedule), driven by the sequencer aop_seq, which serialises a, holds b,
// produces the T/S control pulses and collects the serial product. For an
// N for which the all-one polynomial is irreducible (N+1 prime and 2
// primitive modulo N+1, e.g. N = 4, 10, 12, 18, 28, 36) this is a field
// multiplication; for any other N it is the same product in the quotient
// ring, which the circuit computes just as well.
//
// Interface: pulse start for one cycle with a and b valid while busy is
// low. done pulses 3N+2 cycles later; p is valid from then until 2N+1
// cycles after the next start. start while busy is ignored.
// The array and its schedule follow the document; the handshake and the
// parallel registers are this design's own.
module aop_mult_top #(
  parameter int unsigned N = 233
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] p
);

  logic         arr_clr, arr_f, arr_c, arr_s, arr_t, arr_p;
  logic [N-1:0] arr_b;

  aop_seq #(.N(N)) u_seq (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .a       (a),
    .b       (b),
    .busy    (busy),
    .done    (done),
    .p       (p),
    .arr_clr (arr_clr),
    .arr_b   (arr_b),
    .arr_f   (arr_f),
    .arr_c   (arr_c),
    .arr_s   (arr_s),
    .arr_t   (arr_t),
    .arr_p   (arr_p)
  );

  aop_siso_array #(.N(N)) u_array (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (arr_clr),
    .b     (arr_b),
    .f_in  (arr_f),
    .c_in  (arr_c),
    .s_in  (arr_s),
    .t_in  (arr_t),
    .p_out (arr_p)
  );

endmodule
