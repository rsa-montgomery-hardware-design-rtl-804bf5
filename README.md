# Low-area bit-serial Montgomery multiplier (radix 2, RSA-1024)

RSA encryption and decryption are modular exponentiations, and an
exponentiation is a long chain of modular multiplications `A*B mod N` with
1024-bit numbers. Montgomery multiplication avoids the trial division by `N`:
it processes the multiplier one bit per clock cycle, adds `B` and/or `N` to a
running sum so that the sum is always even, and halves it. After all bits it
has computed `A*B*2^-(K+2) mod N`, and the extra power of two is absorbed by
keeping all values in the "Montgomery domain".

This RTL implements that loop with as little hardware as possible: one
partial-sum register, two operand multiplexers, a two-level adder and a
one-bit quotient circuit. It runs one iteration per clock and finishes a
1024-bit multiplication in 1026 iteration cycles. The default size is
`K = 1024`.

## The algorithm (Walter's variant)

With `K` the modulus length, an odd modulus `N < 2^K`, and inputs
`A, B < 2N`:

```
S = 0
for i = 0 .. K+1:                    // K+2 iterations
    q_i = (S[0] + A[i]*B[0]) mod 2   // quotient bit: makes the sum even
    S   = (S + A[i]*B + q_i*N) / 2
return S                             // S ≡ A*B*2^-(K+2) (mod N), S < 2N
```

This differs from the textbook radix-2 Montgomery loop in two ways:

- it runs two more iterations (`K+2` instead of `K`), and
- it has **no final subtraction** `if S >= N then S -= N`.

The two extra halvings are what make the subtraction unnecessary. If
`A, B < 2N`, then `S_final < A*B/2^(K+2) + N < 4N^2/(4*2^K) + N < 2N`. So the
result is again a valid input. A chain of multiplications, as in
square-and-multiply exponentiation, never needs a comparator or a
subtractor. Only at the very end of an exponentiation must one
conditional subtraction bring the value below `N`. That final step, and the
conversions into and out of the Montgomery domain, are outside this design.

The result is congruent to `A*B*2^-(K+2)`. It is not always the fully
reduced value: either `x` or `x+N` can come out, and both are below `2N`.

## Datapath

```
           A (shift reg) --A[i]--+------------------+
                                 |                  |
 S[0], B[0], A[i] -> Q_logic -- q_i                 |
                                 |                  v
   B ----------------------------|------------> M1: A[i] ? B : 0 --+
   N ----------------------------+------------> M2: q_i  ? N : 0 --|--+
                                                                   v  v
   S --------------------------------------> [ + ] ------------> [ + ]
   ^                                                               |
   +------------------ S <= sum >> 1  (shift register) <-----------+
                              |
                   END ------>R (output register)
```

| Module | Role |
|---|---|
| `operand_regs` | Registers A, B and N. A is a right-shift register: its LSB is `A[i]`. |
| `q_logic` | Quotient bit: `q = A[i] ? S[0]^B[0] : S[0]`. |
| `operand_select` | Multiplexers M1 (`A[i] ? B : 0`) and M2 (`q_i ? N : 0`). |
| `arithmetic_unit` | Two cascaded adders: `(S + M1) + M2`. |
| `s_shift_reg` | Partial sum S. It loads the adder result shifted right by one; this shift is the division by two. |
| `iteration_control` | IDLE → RUN (K+2 cycles) → END. Generates load, iteration enable and END. |
| `result_reg` | Output R. It loads S when END is high and pulses `done`. |
| `mont_mul` | Top module that wires the blocks above. |
| `mont_pkg` | Default size `DEFAULT_K = 1024` and the controller state type. |

### Why the quotient logic is a multiplexer

`q_i` only has to make `S + A[i]*B + q_i*N` even. `N` is odd, so `q_i` equals
the parity of `S + A[i]*B`, which depends only on the LSBs. When `A[i] = 0`
that parity is `S[0]`. When `A[i] = 1` it is `S[0] xor B[0]`. The circuit is
therefore a 2:1 multiplexer selected by `A[i]`, with an XOR on one input. It
has no multiplier and no wide logic.

### Register widths

These widths follow from the input ranges. They are this design's choice,
because none are given for the original architecture.

| Signal | Bits | Reason |
|---|---|---|
| A | K+2 | The loop reads bits 0 .. K+1 |
| B | K+1 | B < 2N < 2^(K+1) |
| N | K | N < 2^K |
| S | K+2 | If S < cN, the next S < (c+3)N/2; that bound settles at S < 3N < 2^(K+2) |
| adder output | K+3 | S + B + N < 6N < 2^(K+3) |
| R | K+1 | The result is below 2N |

The low bit of the adder output is zero in every iteration, and the top bit
of S is zero at END. Lint reports these bits as unused; they are dropped
on purpose.

## Interface and timing

`mont_mul #(parameter int unsigned K = 1024)`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | one-cycle request; sampled only while `busy` is low |
| `a` | in | K+2 | operand A, must be < 2N |
| `b` | in | K+1 | operand B, must be < 2N |
| `n` | in | K | modulus, must be odd |
| `busy` | out | 1 | high from the cycle after `start` until END |
| `done` | out | 1 | one-cycle pulse; `r` is valid from then on |
| `r` | out | K+1 | result, < 2N, held until the next END |

Cycle by cycle, counting the `start` cycle as 0:

- **Cycle 0:** the operands are loaded and S is cleared.
- **Cycles 1 .. K+2:** the iterations run. For K = 1024 that is 1026 cycles.
- **Cycle K+3:** END is high and R captures S.
- **Cycle K+4:** `done` is high.

The operand inputs are only read in cycle 0, and a `start` while `busy` is
high is ignored. The next operation may start in the cycle `done` is high.
A multiplication therefore takes K+4 cycles from start to done.

In simulation, assertions in `mont_mul` check three rules:

- N is odd at load.
- A and B are below 2N at load.
- Every iteration sum is even, so the shift loses no bit.

## Performance

The original architecture takes 1026 cycles for a 1024-bit multiplication in
the worst case, and it has no data-dependent cycle count. It reports a
4.00 ns clock (249.5 Mbit/s, 1024 bits / (1026 × 4 ns)) when synthesized for
low area. It reports a 1.13 ns clock (883.2 Mbit/s) when synthesized for
speed, in a 90 nm library. This RTL has the same 1026 iteration cycles,
plus one load cycle and one END cycle. Both adders here are plain `+`
operators. At 1027 bits, the reachable clock depends on the adder
architecture that synthesis picks.

## What follows the original design and what does not

Taken from the original design:

- the loop with K+2 iterations and no final subtraction;
- the one-bit quotient logic built around a 2:1 multiplexer on S[0], B[0]
  and A[i];
- M1 selected by A[i] and M2 selected by q_i;
- the two-level adder;
- the S register that stores the shifted sum;
- END gating the transfer of S into R;
- K = 1024.

Choices made here:

- all register widths;
- A as a shift register instead of a bit-indexed register;
- the IDLE/RUN/END controller with its counter;
- the `start`/`busy`/`done` handshake and the reset behaviour;
- plain carry-propagate adders;
- the assertions.

The original block diagram also shows a small gate in the path from A[i]
and q_i to M1. Its function is not identified, and it is not reproduced.
The multiplexer selects follow the stated routing (both zero → 0 and 0; both
one → B and N).

## Verification

Every testbench in `tb/` checks itself. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops after a fixed number of cycles
(a watchdog).

| Testbench | What it checks |
|---|---|
| `tb_mont_mul` | The whole multiplier at the default K = 1024. It runs corner cases (zero operands, operands at 2N−1, the smallest and largest moduli), 100 random multiplications, and chains of results fed back as operands. It checks that each result is exact and below 2N. It checks that there are exactly 1026 iteration cycles and that `done` comes K+4 cycles after start. It counts all four M1/M2 routing cases (0, B, N, B+N), END, and an ignored `start` while busy; any of these that never happens is a failure. |
| `tb_mont_mul_small` | 3000 back-to-back random multiplications at K = 16, each started in the cycle `done` of the previous one is high. |
| `tb_iteration_control` | At K = 1024: the RUN length, a one-cycle END, busy, and that `start` is ignored while busy. |
| `tb_q_logic` | All 8 input combinations against `(S0 + A·B0) mod 2`. |
| `tb_operand_select`, `tb_arithmetic_unit`, `tb_s_shift_reg`, `tb_operand_regs`, `tb_result_reg` | Each block against a model kept in the testbench, at K = 32. |

The reference model, `tb/mont_ref_pkg.sv`, does not replay the bit loop. It
computes the exact loop result in closed form:
`Q = (−A·B·N⁻¹) mod 2^(K+2)` and `S = (A·B + Q·N) / 2^(K+2)`. `N⁻¹` modulo
`2^(K+2)` is found by Newton's iteration `x ← x(2 − N·x)`. `Q` is the only
value below `2^(K+2)` that makes the numerator divisible by `2^(K+2)`.
Therefore it equals the quotient bits the hardware collects, and the
comparison is exact, not just modulo N.

To run, for example, the full-size test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mont_pkg.sv tb/mont_ref_pkg.sv tb/tb_mont_mul.sv --top-module tb_mont_mul
./obj_dir/Vtb_mont_mul
```

It finishes in well under a second. To lint the RTL, run
`verilator --lint-only -Wall -Irtl rtl/mont_pkg.sv rtl/mont_mul.sv`.

## Changing the size

`K` is the only parameter. It must be at least 2, and every width follows
from it. The testbenches take K from `mont_pkg::DEFAULT_K` or override it
locally, and `mont_ref` works for any K.
