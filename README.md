# Bit-serial systolic multiplier for GF(2^n) with an all-one polynomial

This design multiplies two elements of the binary field GF(2^n). The field
is defined by the *all-one polynomial* (AOP)

    Q(x) = x^n + x^(n-1) + ... + x + 1 .

The product is computed by a linear systolic array of `n` small processing
elements (PEs). Operand A enters one bit per clock, operand B is applied in
parallel, and the product leaves one bit per clock. Each PE has one AND gate,
one XOR gate, at most one 2:1 multiplexer, a few one-bit registers, and
connections to its two neighbours only. This keeps the array small and
regular, which suits constrained devices: for example, an elliptic-curve
engine in an IoT node, where area matters more than speed.

The default size is `N = 233`. At this size the circuit has 233 PEs and
takes 3N = 699 array cycles per product.

## Why an all-one polynomial makes this cheap

Let `eta` be a root of Q. Then `eta^n = 1 + eta + ... + eta^(n-1)`.
Multiplying by `eta` once more gives

    eta^(n+1) = 1 .

So the computation can take place in an (n+1)-bit ring, where multiplying by
`eta` is just a **cyclic left rotation** of the n+1 bits. No reduction step
is needed at each shift. The product is built as

    F^(-1) = {0, A}                       (A padded to n+1 bits)
    F^(i)  = rotl(F^(i-1))                (= eta^(i+1) * A in the ring)
    C      = sum over i = 0..n-1 of  b_i * F^(i-1)     (n+1 bits, XOR sum)

Only at the very end is C reduced from n+1 to n bits. Because
`x^n = 1 + x + ... + x^(n-1)` (mod Q), the top bit folds onto every other
bit:

    p_j = c_j  XOR  c_n ,   j = 0 .. n-1 .

Bit by bit, row `i` of the computation does

    c_j^(i) = c_j^(i-1) XOR (b_i AND f_j^(i-1))        j = 0 .. n
    f_(j+1)^(i) = f_j^(i-1),   f_0^(i) = f_n^(i-1)     (the rotation)

with `c^(-1) = 0`.

## From the dependence graph to the array

The equations above form an `n x (n+1)` grid of nodes `(i, j)`. Each node is
one AND/XOR step:

- `c` flows down a column (from row i-1 to row i).
- `b_i` runs along row `i`.
- `f` moves diagonally from `(i-1, j)` to `(i, j+1)`.
- The bit leaving column `n` wraps around to column 0 of the next row.

The grid is projected along `i`, so that one PE executes all of row `i`. It
is scheduled with

    t(i, j) = n + 2i - j .

Inside a PE, bits are processed MSB first (j = n first, j = 0 last), one per
cycle. Each PE starts two cycles after its left neighbour. For n = 5, the
node times are:

| row i \ column j | 0  | 1  | 2  | 3  | 4 | 5 |
|------------------|----|----|----|----|---|---|
| 0                | 5  | 4  | 3  | 2  | 1 | 0 |
| 1                | 7  | 6  | 5  | 4  | 3 | 2 |
| 2                | 9  | 8  | 7  | 6  | 5 | 4 |
| 3                | 11 | 10 | 9  | 8  | 7 | 6 |
| 4                | 13 | 12 | 11 | 10 | 9 | 8 |

These times set the delay of each link:

- **c**: a node's successor in its column runs 2 cycles later, so `c` passes
  through two registers per PE.
- **f**: the diagonal successor `(i+1, j+1)` runs 1 cycle later, so `f`
  passes through one register per PE.
- **Wrap-around**: the bit that must wrap around (bit n of `F^(i-1)`) is the
  **first** bit PE_i sees. It is needed at column 0 of the next row, which is
  the **last** step of PE_(i+1). So each PE must keep that first bit for the
  whole operation and insert it at exactly the right moment. Two control
  pulses do this; understanding them is the key to the design:
  - **T** ("take"): the cycle in which a PE captures the first f bit in its
    hold register.
  - **S** ("select"): the cycle in which the PE's output multiplexer sends the
    held bit downstream instead of the delayed f stream.

  Both pulses travel down the chain through two registers per PE, so they
  stay aligned with the data.

The last PE, PE_(n-1), uses the same hold-with-T mechanism, with a different
purpose. Its first result is `c_n`, the bit to be folded. It keeps that bit
and XORs it onto every following result bit. As a result, the reduction costs
one register and one XOR gate in total.

## Blocks

| module           | role |
|------------------|------|
| `aop_pe`         | PE_i, i = 0 .. n-2: AND/XOR accumulate; two `c` registers; one `f` register; a hold register loaded by T; a 2:1 multiplexer controlled by S; two-stage delays for S and T |
| `aop_pe_last`    | PE_(n-1): last accumulate; one `c` register; hold register for `c_n`; output XOR |
| `aop_siso_array` | the chain of N-1 `aop_pe` and one `aop_pe_last`; serial in, serial out |
| `aop_seq`        | sequencer: captures A and B, clears the array, serialises A, makes the T/S pulses, collects the serial product into a word |
| `aop_mult_top`   | top level: `aop_seq` plus `aop_siso_array` |

### Serial array interface (`aop_siso_array`)

Cycles are counted from the cycle in which the first bit enters (cycle 0).
The array must be cleared beforehand, with `rst_n` or `clr`.

| cycle               | signal   | value |
|---------------------|----------|-------|
| 0 .. N              | `f_in`   | bit N-t of {0, A}: 0 first, then a_(N-1) .. a_0; 0 afterwards |
| 0 .. N              | `c_in`   | bit N-t of an (N+1)-bit initial accumulator; 0 for a plain product |
| 0                   | `t_in`   | 1 (0 in every other cycle) |
| N+2                 | `s_in`   | 1 (0 in every other cycle) |
| 0 .. 3N-2           | `b`      | held constant |
| 3N-1-j (2N .. 3N-1) | `p_out`  | p_j, MSB first |

If `c_in` is non-zero, the array computes `(A*B + C) mod Q`. The
sequencer always drives `c_in` to 0.

### Word interface (`aop_mult_top`)

1. While `busy` is low, pulse `start` for one cycle with `a` and `b` valid.
2. 3N+2 cycles later, `done` pulses for one cycle and `p` holds
   `a*b mod Q`.

Details:

- The cycle after `start`, `clr` clears every register in the array.
- The 3N-cycle run follows.
- `p` is the register that collects the serial output, so it stays valid
  until 2N+1 cycles after the next `start`.
- A `start` while `busy` is high is ignored.
- A new operation may start in the cycle after `done`.

## Size of the array

Array hardware for `n` PEs:

| element                                        | count            |
|------------------------------------------------|------------------|
| AND gates                                      | n                |
| XOR gates                                      | n + 1            |
| 2:1 multiplexers                               | n - 1            |
| pipeline registers (D_s, D_t, D_f, D_c)        | 7(n-1) + 1 = 7n - 6 |
| hold registers (one per PE)                    | n                |

The gate and register counts follow the source's cost figures for this
structure. The hold registers stand in for its n tri-state buffers.

The synchronous clear adds a 2:1 multiplexer in front of each register. The
sequencer adds:

- about 2N registers for the A shift register and the held B;
- N registers for the product;
- a counter of ceil(log2(3N)) bits.

## Where this RTL departs from the source description

**Edge-triggered registers.** The source draws its storage elements as
D-latches, but describes each one as a delay of one whole clock cycle. Here
every one of them is an edge-triggered flip-flop. This moves each output
bit one cycle later than the source's time instances: p_(n-1) appears in
cycle 2n instead of at time 2n-1, and p_0 in cycle 3n-1 instead of at time
3n-2. The latency is otherwise exactly the source's schedule: the internal
node times match the table above.

**Hold registers instead of tri-state buffers.** In the source, each PE keeps
its held bit on a node driven through a tri-state buffer enabled by T. Here
that node is a register with load enable T.

Two consequences follow:

- **PE_i hold register.** The hold register of PE_i loads the same f bit that
  the f register loads in the T cycle.
- **PE_(n-1) hold register.** In PE_(n-1), the hold register loads the value
  entering its `c` register, rather than the value leaving it. This is the
  same bit, `c_n`, one cycle earlier, so the T pulse that reaches PE_(n-1) in
  cycle 2n-2 is enough.

**Critical path.** The multiplexer output of PE_i feeds the AND gate of
PE_(i+1) without a register in between. In this register-level reading, the
longest path is therefore register → MUX → AND → XOR → register. The source
quotes AND + XOR as its critical path.

**Accumulate equation.** The source's bit-level equation for the accumulate
step can be read as `c XOR (b AND c)`. Its drawing of the PE and its
word-level derivation both give `c XOR (b AND f)`, which is what is
implemented.

**Clear and reset.** The source requires every storage element to be
cleared before an operation, but does not say how. This RTL has:

- an asynchronous active-low `rst_n`;
- a synchronous `clr`, which the sequencer raises for one cycle at each start.

**Sequencer and word interface.** The sequencer, the start/busy/done
handshake and the parallel registers are not part of the source. It
specifies only the serial array and the cycle at which each control pulse
must arrive.

**Default size N = 233 is a ring, not a field.** The source uses n = 233 to
compare costs. However, the all-one polynomial of degree n is irreducible
only when n+1 is prime and 2 generates the nonzero residues modulo n+1, and
234 is not prime. At N = 233 the circuit therefore multiplies in the
quotient ring GF(2)[x]/(Q), which it does correctly. Sizes that give true
fields include N = 4, 10, 12, 18, 28, 36, 52, 58, 60, 66, 82, 100, 106, 130,
138, 148, 162, 172, 178, 180, 196, 210, 226.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_aop_pe`            | random stimulus; each cycle, every output of PE_i is compared with a cycle-level model (two-cycle `c`/S/T delays, one-cycle `f` delay, hold on T, select on S, synchronous clear) |
| `tb_aop_pe_last`       | the same approach for PE_(n-1) and its output XOR |
| `tb_aop_siso_array`    | N = 5. Drives the serial streams directly. Checks that PE_i sees `c_j^(i-1)` and `f_j^(i-1)` in cycle `n+2i-j` for every node, and that p_j leaves in cycle 3n-1-j. Checks products, including a non-zero initial accumulator, against long division by Q |
| `tb_aop_seq`           | N = 7, with the testbench standing in for the array. Checks the clear cycle, the serial A stream, the T and S cycles, the held B, the product collection, the `done` timing and that a `start` while busy is ignored |
| `tb_aop_mult_top`      | end-to-end at N = 4, 10 and 36 (fields) and N = 5. Corner and random operands, latency, a `start` while busy, back-to-back operations. Counts operations in which the wrap-around path and the final fold changed the result; each count must be non-zero |
| `tb_aop_mult_top_full` | end-to-end at the default N = 233. Corner and 20 random operands, latency |

The reference product in the testbenches is a schoolbook polynomial product
followed by long division by Q. It does not use the rotation identity.

## Simulating

With Verilator 5, from the directory that contains `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        tb/tb_aop_mult_top.sv --top-module tb_aop_mult_top
    ./obj_dir/Vtb_aop_mult_top

Replace the file and top-module names to run any other testbench.

To change the size, set the parameter `N` on `aop_mult_top` (or on
`aop_siso_array`). Each operation takes 3N+2 cycles from `start` to `done`.
For a true field multiplier, choose N from the list above.
