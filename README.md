# Parallel self-timed adder (recursive, single-rail)

This adder does not propagate carries through a fixed ripple or prefix
network. It repeats one cheap step, a row of half adders, until no carries
are left. Every bit does its step at the same moment. Separate carry chains
therefore move forward in parallel, and the time one addition takes depends
on its operands: it is set by the longest carry chain in this particular
pair, not by the worst case. For random 32-bit operands that averages about
log2(32) steps. The hardware is only N multiplexer pairs, N half adders and
one wide NOR gate that detects completion. Its wiring is as regular as a
ripple-carry adder and it has no high-fan-out nets.

The RTL implements this adder as clocked, synthesizable SystemVerilog, 32
bits wide by default. It takes one recursion step per clock edge and signals
completion with a four-phase req/ack handshake.

## The recursion

Bit `i` holds a partial sum `S_i` and receives a carry `C_i` from bit `i-1`.

Selection phase (SEL = 0), from the operands:

    S_i     = A_i xor B_i
    C_{i+1} = A_i and B_i          C_0 = cin

Each further step (SEL = 1), in all bits at once:

    S_i'     = S_i xor C_i
    C_{i+1}' = S_i and C_i         C_0' = 0

The weighted sum `S + C` does not change from one step to the next, because
`S_i + C_i = S_i' + 2*C_{i+1}'`. Once every `C_i` is 0, `S` is the sum. A
carry moves up one bit per step and is absorbed where it meets a 0 in `S`.
The number of steps `k` is the length of the longest run of carry
propagation:

* `k = 0` when no bit generates a carry, for example `0x0F0F0F0F + 0xF0F0F0F0`.
* `k = N` in the worst case, for example `0xFFFFFFFF + 0 + cin`.
* For random operands `k` is about log2 N. The testbench measures an
  average of 4.3 over 2000 random 32-bit pairs.

The carry out of the top bit feeds no bit. The design collects it in a
sticky register. This register can be set at most once, because
`A + B + cin < 2^(N+1)`.

## Structure

```
             a[i] b[i]     S_i   C_i (from bit i-1)
               |   |        |     |
           +---v---v--------v-----v---+
   SEL --->|  pasta_sel_mux (2 x 2:1) |     SEL=0: (A_i,B_i)   SEL=1: (S_i,C_i)
           +-----------+--------------+
                    x,y|
           +-----------v--------------+
           |   pasta_half_adder       |     XOR -> S_i'   AND -> C_{i+1}'
           +-----------+--------------+
                       |
             S_i', C_{i+1}'  -> registers (clocked stand-in for the feedback loop)

   all C_i, SEL ---> pasta_completion: TERM = NOR(C_0..C_{N-1}, not SEL)
   req, TERM -----> pasta_ctrl: SEL, register enable, ack = TERM
```

| module | role |
|---|---|
| `pasta_adder` | top: N bit cells, S/C/carry-out registers, completion unit, controller |
| `pasta_bit_cell` | one bit: multiplexer pair followed by a half adder |
| `pasta_sel_mux` | chooses the operands (SEL=0) or the fed-back S_i and C_i (SEL=1) |
| `pasta_half_adder` | XOR and AND |
| `pasta_completion` | TERM, a wide NOR of all carries and of the inverted SEL |
| `pasta_ctrl` | SEL generation, four-phase handshake, step counter |
| `pasta_pkg` | default width (32) and controller state type |

### Completion detection

The addition is finished when no bit receives a carry, so TERM is the NOR of
`C_0 … C_{N-1}`. In silicon this is a single ratioed (pseudo-nMOS) NOR. Each
bit cell holds one pull-down, all in parallel, and one pull-up serves the
whole adder. That arrangement avoids a deep tree of gates despite the large
fan-in.

The inverted SEL is one more input of the NOR. While the operands are being
selected, the carry vector left over from the previous addition (or from
reset) may already be all zero. Without the SEL input, TERM could rise before
any real work is done.

In the RTL the NOR is a reduction OR. The carry out of the top bit is not an
input of the NOR, since it feeds no further step.

## Interface and timing

`pasta_adder #(N = 32, CW = $clog2(N+2))`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one recursion step per rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `req` | in | 1 | operands valid; hold until `ack` |
| `a`, `b` | in | N | operands |
| `cin` | in | 1 | carry in |
| `ack` | out | 1 | TERM: `sum`/`cout` are valid |
| `sum` | out | N | low N bits of `a + b + cin` |
| `cout` | out | 1 | carry out |
| `iterations` | out | CW | recursion steps `k` of the last addition |

The handshake is four-phase:

1. Drive `a`, `b` and `cin`, then raise `req`.
2. In the first cycle that samples `req`, SEL is low and the registers load
   `A^B` and the initial carries.
3. Starting in the next cycle, SEL is high and one step is taken per cycle.
4. `ack` rises `1 + k` cycles after `req` was first sampled.
5. `sum` and `cout` stay valid while `ack` is high.
6. Drop `req`. The controller returns to idle and `ack` falls on the next
   edge. `req` may already drop in the cycle where `ack` first appears.

The operands only need to be stable in the cycle that samples `req`.
Assertions check two rules: `req` may not be withdrawn before `ack`, and
TERM may never be high while SEL is low. A third assertion checks that the
recursion ends within N steps.

## Where this RTL departs from the asynchronous circuit

The circuit this design follows is self-timed. The half-adder outputs feed
straight back through the multiplexers, and the gate delays separate one
"wave" of the recursion from the next: the XOR is sized to match the delay
of the AND. A carry that has not yet arrived simply keeps the loop running,
and TERM ends the operation with no clock at all. A combinational loop whose
correctness relies on matched gate delays cannot be written as portable,
synthesizable RTL. This design therefore makes the following choices of its
own:

* Each wave is one clock edge, and `S` and `C` are held in registers between
  steps. The number of steps matches the number of asynchronous waves
  exactly. Wall-clock time becomes `(1 + k)` clock periods instead of
  `k` gate delays.
* A clocked three-state controller (IDLE, ITER, DONE) generates SEL and
  stops the registers once TERM is seen. The original circuit does not need
  to stop them: with all `C_i = 0`, the step leaves `S` unchanged.
* There is a carry-in, and a sticky carry-out register.
* There is an asynchronous active-low reset.
* An `iterations` output reports `k` so the data-dependent delay can be
  observed.

Not represented: the transistor-level parts. These are the transmission-gate
XOR, the pseudo-nMOS pull-up of the completion NOR with its static current
while it computes, and the two-metal standard-cell layout (270λ × 130λ per
bit).

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

```
verilator --binary --timing --assert -Irtl -Itb rtl/pasta_pkg.sv \
          tb/tb_pasta_adder.sv --top-module tb_pasta_adder
./obj_dir/Vtb_pasta_adder
```

Swap in the names for the other testbenches: `tb_pasta_selftimed`,
`tb_pasta_bit_cell`,
`tb_pasta_sel_mux`, `tb_pasta_half_adder`, `tb_pasta_completion` and
`tb_pasta_ctrl`.

* `tb_pasta_adder` runs the adder at its default 32 bits, with directed and
  2000 random additions. It compares `sum` and `cout` with integer
  addition, and `iterations` and the `ack` latency with a word-level model
  of the recursion. It also checks that `ack` stays low during selection
  and that the average step count stays below `2*log2 N`. It counts how
  often each case occurred: no carries, iterated additions, the full-length
  chain, carry in, carry out and several parallel chains. A case that never
  occurred counts as a failure.
* `tb_pasta_selftimed` runs the adder the way the asynchronous circuit
  does, with no clock and no registers. It closes 32 `pasta_bit_cell`
  instances into the feedback loop through a transport delay `D`, which
  stands for one matched XOR/AND delay, and watches `pasta_completion`.
  For 500 random and several directed additions it checks the sum and the
  carry out. It also checks that TERM rises exactly `k*D` after SEL, and
  never while SEL is low. This shows that the combinational cells, used
  unchanged, also work in the self-timed form.
* The bit cell, multiplexer and half-adder testbenches are exhaustive.
* The completion testbench covers every single-carry vector, both values of
  SEL and random vectors.
* The controller testbench scripts TERM for random recursion depths. It
  checks SEL, the register enable, the `ack` latency and the step counter
  cycle by cycle.

## Changing it

* Width: set `N`. Everything scales with it, and `CW` follows. The worst
  case takes `N + 1` cycles.
* To stand in for a faster asynchronous implementation, keep
  `pasta_bit_cell` and `pasta_completion`. Both are purely combinational.
  Replace the registers and `pasta_ctrl` with the self-timed loop and a
  request/TERM handshake.
