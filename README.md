# Digit-serial squarer with a selectable radix

This RTL squares an unsigned N-bit number one digit at a time. The number is
read as n digits of radix β = 2^m, and each clock (or each group of clocks)
retires two digits of the 2N-bit square, least significant first. The digit
size m sets the trade-off:

- m = 1 is a bit-serial squarer.
- m = N is a fully parallel squarer.
- Values in between give a hybrid with n = N/m iterations.

Each iteration needs only a narrow digit multiply and a single add, so area
grows with m while latency falls with it.

Two units are provided:

| unit | module | radix | clocks per square | role |
|---|---|---|---|---|
| quaternary squarer | `sq4_squarer` | 4 (m = 2) | n = N/2 | the optimised circuit |
| general squarer | `sqr_radix_general` | 2^M, any M | 7n + 1 | step-by-step form of the algorithm for any digit size |

`squarer_top` places both side by side (`N = 64`, `GEN_M = 2` by default).

## The identity behind one iteration

Let the current operand be α. Let a0 be its lowest digit, and A = α − a0
(α with its low digit cleared). Write the low digit as an offset from half
the radix: r = a0 − β/2, which lies in −β/2 … β/2−1. Then

    α² = (A/β)²·β² + T1 + T2 + T3
    T1 = (A/β)·β² + (β/2)²        the digits of A/β followed by the digits β/4 and 0
    T2 = 2(A + β/2)·r              a long operand times one signed digit
    T3 = r²                        square of one digit

The first term is the square of the next operand A/β (one digit shorter),
shifted by two digits. So each iteration:

1. adds S = T1 + T2 + T3 (which equals a0·(2A + a0)) into a running sum;
2. retires the two lowest digits of that sum;
3. continues with A/β.

After n iterations the operand is zero and all 2n digits of the square have
been produced. With β = 2^m, forming A/β, β/2 and (β/2)² needs only wiring,
because they are shifts and constants. The only real arithmetic is the
single-digit products.

The residual r is never stored in signed form. Register R keeps the m-bit
digit a0, and r = a0 − β/2 is decoded where it is used.

## The quaternary circuit (`sq4_*`)

For β = 4, every case of a0 reduces T1 + T2 + T3 to a fixed bit pattern
around H = A/4 (the operand shifted right by two bits):

| a0 | r | left adder bus (2n+2 bits) | right adder bus | value |
|---|---|---|---|---|
| 0 | −2 | `0…0` | `0…0` | 0 |
| 1 | −1 | `{0, H, 001}` | `0…0` | 8H + 1 |
| 2 | 0 | `{H, 0100}` | `0…0` | 16H + 4 |
| 3 | +1 | `{H, 0100}` (T1) | `{0, H, 101}` (T2+T3) | 24H + 9 |

`sq4_term_logic` is two 4:1 multiplexers selected by a0 that drive these
buses. Only a0 = 3 needs a real addition. The datapath (`sq4_datapath`),
in order:

    alpha ─► sq4_operand_mux ─► sq4_term_logic ─► sq4_adder_array ─► sq4_accumulator ─► sq4_shift_reg ─► square
                  ▲       (2n)        │ left/right (2n+2)      (2n+3)      │ 4 bits           (2nm bits)
                  └──── A/β (2n) ─────┘                                     └ carry (2n-1) ┐
                                                                         ◄─────────────────┘

One iteration runs in each clock, through the whole chain.

### Why there is an accumulator with a carry

An iteration sum S is not two digits wide. It is as wide as the operand
(up to about 6·4^n). So the two digits an iteration retires are the low
4 bits of S plus whatever the earlier iterations left over.

`sq4_accumulator` adds S to the upper 2n−1 bits kept from the previous
total, sends the low 4 bits to the result register, and keeps the rest.
The total always fits in 2n+3 bits. After the last iteration the kept part
is zero, because α² fits in 2N bits.

The result register shifts right by 4 bits and inserts the new digits at its
top. Digits produced least significant first therefore end up in place, and
no left shifter is needed.

### Timing and handshake (`sq4_controller`)

- Present `alpha` with `start` while `ready` is high.
- Iteration 0 runs in that same cycle: the multiplexer passes `alpha` straight
  to the term logic, and the accumulator ignores the old carry.
- Iterations 1 … n−1 follow, using the operand fed back through the one
  operand register.
- `done` is high for one cycle, n cycles after the start cycle, with
  `square = alpha²`.
- `square` then holds until the next start.
- `start` is accepted again in the `done` cycle. Back-to-back squarings
  therefore give one result every n clocks, a throughput of f_clk / n.
- `start` while busy is ignored.

The operand register sits on the feedback path rather than after the
multiplexer, so no clock is spent loading.

## The general unit (`sqr_radix_general`)

This unit runs the algorithm as a sequence of register transfers, one step
per clock. Its registers are:

- AB: the operand
- RES: the result
- i: the iteration count
- R: the encoded residual
- ACC: the running sum
- T1, T2, T3: the three terms
- B2 = β/2 and B4 = (β/2)², both constants

The steps are:

    STEP 1  on start: i=0, RES=0, B2, B4, AB=alpha, ACC=0
    STEP 2  R = low digit of AB;  AB = AB >> M
    STEP 3  T1 = {AB,B4};  T2 = {AB,B2};  T3 = r*r
    STEP 4  T2 = T2 << 1;  ACC = (ACC >> 2M) + T1 + T3
    STEP 5  T2 = T2 * r
    STEP 6  ACC = ACC + T2
    STEP 7  RES = {ACC[2M-1:0], RES >> 2M};  i = i + 1
    STEP 8  i == n ? done : STEP 2

A square takes 7n + 1 clocks. T2·r and r·r are written as behavioural
multiplies: a 2^M-by-operand product and an M-bit square, which synthesis
maps as it likes. Any M ≥ 1 with N a multiple of M works. The testbench
covers M = 1, 2, 3, 4, 8 and 16.

## Where this RTL makes its own choices

The source description of this algorithm leaves some points open or states
them inconsistently. This RTL resolves them as follows:

- **Carry between iterations.** A literal reading of the step list starts
  each iteration's ACC from T1 + T3 and keeps only its two low digits. That
  loses the carry and gives wrong squares whenever S exceeds two digits.
  Both units here carry the upper part of the sum forward, as the
  quaternary datapath's accumulator feedback does. The general unit does
  this in STEP 4: `(ACC >> 2M)`.
- **T1 is `{AB, B4}`.** B4 already contains the zero low digit, so no extra
  zero digit is appended.
- **Iteration count is n**, not n/2. Each iteration retires 2 of the 2n
  result digits.
- **Register widths.** AB is N bits, not (n−1)m, because it first holds the
  whole squarand. i has one more bit than log2(n) so that it can reach n.
  ACC and T1–T3 are signed, N+2M+2 bits wide.
- **m is a build-time parameter** (`M`), not a run-time input.
- **Separate adders in the general unit.** STEP 4 and STEP 6 could share
  one adder because they run in different clocks. Here they are written as
  separate additions.
- **Digit select.** The quaternary term multiplexers are selected by the
  operand's least significant digit a0.
- **One clock per iteration** in the quaternary unit. This matches reported
  throughputs of one square per n clocks at 8, 16, 32 and 64 bits.
- **Not specified by the algorithm, chosen here:**
  - the start/ready/done handshake;
  - asynchronous active-low reset (`rst_n`) of every register;
  - clearing the result register only at reset, since n shifts overwrite it;
  - the adder and multiplier structures (behavioural `+` and `*`).
- **Operands are unsigned.** Signed squarands are not handled.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | squarand width in bits. Word sizes of 8, 16, 32 and 64 bits are the evaluated ones; the quaternary unit needs N even and ≥ 4. |
| `M` (`GEN_M` at the top) | 2 | digit size of the general unit |

A smaller squarand can be zero-extended into a wider unit. It then takes the
wider unit's n cycles. Building with `N` equal to the word size gives n = N/2
cycles per square.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Each compares against values computed
independently, mostly the simulator's own wide products.

- `tb_sq4_term_logic` checks that left + right equals a0·(2A + a0). It covers
  all 8-bit operands exhaustively and random 64-bit operands.
- `tb_sq4_squarer` covers all 8-bit squarands back to back and random 64-bit
  ones, and checks the n-cycle latency.
- `tb_sqr_radix_general` covers radix 2, 4, 8, 16, 256 and 65536 and
  checks the 7n + 1 latency. Radix 65536 is a 64-bit squarand taken as four
  16-bit digits.
- `tb_sq4_workloads` builds the quaternary squarer at 8, 16, 32 and 64 bits
  and streams 100 squares through each. It checks that each size takes
  4, 8, 16 and 32 clocks per square. These counts are the ratios of maximum
  clock frequency to throughput reported for the circuit at those sizes.
- `tb_squarer_top` runs the top at its default parameters. It counts and
  requires each mechanism:
  - all four a0 cases;
  - the adder array adding a non-zero right bus;
  - a non-zero carry kept in the accumulator;
  - a start in the done cycle;
  - a start ignored while busy;
  - negative, zero and positive residuals in the general unit.

Run one testbench with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/sq_pkg.sv tb/tb_squarer_top.sv --top-module tb_squarer_top -o sim
    ./obj_dir/sim

The package `rtl/sq_pkg.sv` holds the shared enums: the a0 cases and the
states of both controllers. It must be read first.

## Not included

The comparison design, a multiplier-based quaternary digit-serial squarer
from the literature, is not part of this RTL. The FPGA and standard-cell
area and frequency figures cannot be reproduced by simulation and are not
claimed here.
