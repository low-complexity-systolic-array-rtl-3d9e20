// aop_seq -- sequencer that runs one multiplication on aop_siso_array.
//
// The systolic array expects its operand A bit-serially (MSB first after a
// leading zero), operand B held in parallel, a one-cycle T pulse with the
// first bit and a one-cycle S pulse N+2 cycles later, and it delivers the
// product serially, MSB first, from cycle 2N to cycle 3N-1 (see
// aop_siso_array). This block produces exactly that schedule from a
// parallel request and turns the serial product back into a word.
//
// Operation: in IDLE a start pulse captures a and b and moves to CLEAR,
// which asserts clr to the array for one cycle (the array must be empty
// before it operates). RUN then lasts 3N cycles, counted by cnt = 0 ..
// 3N-1: cnt is the array's cycle number. The A shift register {0, a}
// shifts out one bit per cycle; t_out = 1 when cnt = 0 and s_out = 1 when
// cnt = N+2; c_out stays 0. While cnt >= 2N the bit on p_in is shifted
// into the product register from the right, so after cnt = 3N-1 it holds
// p_{N-1} .. p_0. done pulses for one cycle as the sequencer returns to
// IDLE; the word on p is then valid and stays so until 2N+1 cycles after
// the next start (the product register is also the deserialiser).
//
// The schedule follows the document's control description; the start/done
// handshake, the CLEAR state and the parallel registers are this design's
// own. A start while busy is ignored. Total time from start to done is
// 3N+2 cycles.
module aop_seq #(
  parameter int unsigned N = 233
) (
  input  logic         clk,
  input  logic         rst_n,
  // request side
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] p,
  // array side
  output logic         arr_clr,
  output logic [N-1:0] arr_b,
  output logic         arr_f,
  output logic         arr_c,
  output logic         arr_s,
  output logic         arr_t,
  input  logic         arr_p
);

  localparam int unsigned CW = $clog2(3 * N);

  typedef enum logic [1:0] {IDLE, CLEAR, RUN} state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  logic [N:0]    a_sh;
  logic [N-1:0]  b_q;
  logic [N-1:0]  p_sh;
  logic          last;

  assign last = (cnt == CW'(3 * N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      a_sh  <= '0;
      b_q   <= '0;
      p_sh  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            a_sh  <= {1'b0, a};
            b_q   <= b;
            state <= CLEAR;
          end
        end
        CLEAR: begin
          cnt   <= '0;
          state <= RUN;
        end
        RUN: begin
          a_sh <= {a_sh[N-1:0], 1'b0};
          if (cnt >= CW'(2 * N)) p_sh <= {p_sh[N-2:0], arr_p};
          if (last) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy    = (state != IDLE);
  assign p       = p_sh;
  assign arr_clr = (state == CLEAR);
  assign arr_b   = b_q;
  assign arr_f   = (state == RUN) & a_sh[N];
  assign arr_c   = 1'b0;
  assign arr_t   = (state == RUN) && (cnt == '0);
  assign arr_s   = (state == RUN) && (cnt == CW'(N + 2));

  // The control pulses of one operation are one cycle long and never
  // overlap; done only follows a run.
  a_t_s_exclusive: assert property (@(posedge clk)
    !(arr_t && arr_s));
  a_done_idle: assert property (@(posedge clk)
    done |-> !busy);

endmodule
