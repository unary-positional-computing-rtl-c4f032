# Unary positional arithmetic unit

Unary (stochastic-style) bit streams make arithmetic cheap: two streams are
multiplied by a single AND gate. They are also robust, because every bit is
worth the same, so one flipped bit moves the value by one unit. Their cost is
length. A value of `v` needs `v` bits, and an exact product of two `L`-bit
streams needs `L*L` clock steps. The *unary positional* (UP) representation
sits between unary and binary. It splits a number into `k` positions, as
binary does, but writes each position as a short unary stream of `n` bits:

    value = sum over p of  (number of ones in stream p) * n**p

Only the number of ones in a stream counts, not where they are. With `n = 8`
and `k = 3`, the streams `00011111 00000011 00001111` (most significant
first) hold 5, 2 and 4 ones, so they encode 5*64 + 2*8 + 4 = 340. One number
takes `n*k` bits. A stream may hold anywhere from 0 to `n` ones, so a value
can be written in several ways.

This RTL builds a two-input UP multiplier and adder around that idea, with
binary-to-UP and UP-to-binary converters at its edges. The defaults are
`N = 8` and `K = 3`. Operands are then 0..511 in binary form, and the result
has `2K = 6` positions.

## Files

| file | module | role |
|---|---|---|
| `rtl/upc_pkg.sv` | package | defaults `DEFAULT_N = 8`, `DEFAULT_K = 3`; `upc_op_e` (`OP_MUL`, `OP_ADD`) |
| `rtl/upc_carry_unit.sv` | `upc_carry_unit` | one result position: stacks ones, produces carries |
| `rtl/upc_operand_reg.sv` | `upc_operand_reg` | one operand position: N-bit rotate / parallel-load register |
| `rtl/upc_counter.sv` | `upc_counter` | modulo counter with a run-time limit, used three times |
| `rtl/upc_arith.sv` | `upc_arith` | the multiplier / adder datapath and its control |
| `rtl/upc_generator.sv` | `upc_generator` | binary to UP (thermometer code per base-N digit) |
| `rtl/upc_converter.sv` | `upc_converter` | UP to binary (weighted sum of ones counts) |
| `rtl/upc_top.sv` | `upc_top` | generators, `upc_arith` and converter together |

`N` must be a power of two, because the generator and converter treat base-N
digits as bit fields.

## Carry units: stacking ones

Each result position has its own carry unit (`upc_carry_unit`). It holds an
N-bit shift register in thermometer form, so that count `c` reads as
`0..01..1` with `c` ones. In a cycle where it is enabled, a 1 enters bit 0
and everything moves up one place. The enable is

    enable = (iterate & din) | carry_in

so a 1 arriving on `din` is stacked and a 0 is dropped. No adder is needed:
the register is the accumulator.

When bit `N-1` (the last bit) becomes 1, the register holds `N` ones, which
is one unit of the next position. That bit is the unit's `carry_out`. On the
next clock:

* the full unit reloads with `{N-1 zeroes, carry_in}`: it empties, but keeps
  a carry that arrives from below in the same cycle;
* the unit above sees `carry_in = 1`, so it stacks one extra 1;
* `iterate` is low in every unit, because it is the NOR of all carry outputs.
  No new product or sum bit enters anywhere. The counters and operand
  registers also hold, so the bit that was waiting is presented again next
  cycle.

So each carry costs one stall cycle. A carry that makes the unit above full
too ripples onward, one position and one stall cycle per step. A carry out
of the top position is dropped and sets the sticky `overflow` flag. When an
operation ends, every result stream holds 0..N-1 ones, because a full
register always carries. The result therefore has exactly one UP form.

## Multiplication: meeting every bit pair once

Take two streams with `ca` and `cb` ones. If every bit of one meets every
bit of the other exactly once at an AND gate, the AND gate outputs exactly
`ca*cb` ones. Fed into a carry unit, they form the exact product. `upc_arith`
applies this to every pair of positions.

* **2K register pairs.** Register `a[p]` holds position `p` of the
  multiplicand. Positions `K..2K-1` start at zero. Every `b[p]` register
  holds the *same* multiplier position `j`. AND gate `p` feeds carry unit
  `p`, so during pass `j` carry unit `p` collects `a(p-j)*b(j)` ones, at
  weight `N**(p-j) * N**j = N**p`. All positions work in parallel.
* **Bit pairing within a pass.** A pass has `N` rounds of `N` steps. The `a`
  registers rotate by one bit on every step. The `b` registers rotate on
  every step except the last step of a round. Round `r` therefore pairs bit
  `s` of `a` with bit `s-r` (mod N) of `b`. Over `N` rounds each of the
  `N*N` bit pairs meets exactly once.
* **Between passes.** After `N*N` steps the whole multiplicand moves up one
  register (`a[p] <= a[p-1]`, `a[0] <= 0`), and the next multiplier position
  is loaded into every `b` register. A K-entry store keeps the multiplier
  positions that have not been used yet. It is loaded at start and shifts by
  one entry per pass.
* **Sequencing.** Three chained `upc_counter`s advance only while `iterate`
  is high:
  * the bit counter (mod N);
  * the round counter (mod N);
  * the multiplier-position counter (mod K).

  Their widths are `log2 N`, `log2 N` and `log2 K`.

A multiplication takes `K*N*N` operand steps plus its stall cycles. That is
192 steps at the defaults. For comparison, exact multiplication of plain
unary streams covering the same range takes `N**(2K)` = 262144 steps.

## Addition

Addition skips the AND gates. Carry unit `p` first receives the `N` bits of
`a(p)` and then the `N` bits of `b(p)`: the two streams are simply
concatenated. Here the round counter counts only two rounds, and it selects
which operand is presented. Each operand position stays in its own register
pair. An addition takes `2N` steps plus its stalls.

## Interface and timing (`upc_arith`, `upc_top`)

* Pulse `start` for one cycle while `busy` is low, with `op`, `a_up` and
  `b_up` valid in that cycle. For `upc_top`, this includes `up_sel` and
  either `a_bin`/`b_bin` or `a_up_in`/`b_up_in`. The operands may change
  afterwards.
* `busy` is high from the cycle after `start` until the result is final.
* `stall` is high in every cycle in which a carry is being resolved.
* `done` pulses for one cycle. Counting clock edges from the edge that
  samples `start`, `done` is high after exactly `OPS + STALLS + 1` edges,
  where `OPS = K*N*N` (multiply) or `2N` (add) and `STALLS` is the number of
  cycles with `stall` high. The extra cycle lets carries left by the last
  step settle.
* `result` / `result_up` holds `2K` thermometer-coded streams. `result_bin`
  is their binary value. `overflow` is set if the true result does not fit
  in `2K` positions; the outputs then hold the result modulo `N**(2K)`.
  Outputs stay valid until the next `start`.

Stalls depend on the data. At the defaults, a multiplication typically adds a
few tens of stall cycles to its 192 steps. Reset `rst_n` is asynchronous and active
low. It empties all registers.

In `upc_top`, operands come either from the binary ports through
`upc_generator` (`up_sel = 0`) or directly as UP streams (`up_sel = 1`).
The generator writes each base-N digit as a thermometer code, so generated
streams hold at most `N-1` ones and binary operands never overflow. Direct
UP operands may use any arrangement of ones and up to `N` ones per stream.
For example, all-ones operands encode 584 at the defaults, and their product
overflows 6 positions.

## What follows the published design and what is added

These parts follow the published design:

* the representation;
* the carry unit, built from a shift / parallel-load register with ones
  stacked and zeroes dropped, a carry taken from the last bit, a reload with
  the incoming carry and `N-1` zeroes, and all other positions pausing
  during a carry;
* 2K register pairs feeding AND gates and 2K carry units in a carry chain;
* the three counters and their widths;
* shifting the multiplicand one position per multiplier position;
* addition by concatenation;
* the `K*N*N` step count of a multiplication.

These are choices of this RTL:

* the exact bit-rotation schedule, meaning which register holds at the end
  of a round;
* the assignment of roles to the three counters;
* the K-entry store for the multiplier positions;
* the start / busy / done handshake and the final drain state;
* the sticky overflow flag;
* the reset style and shift directions;
* the generator and converter circuits, whose cost but not structure was
  published;
* the binary-facing top level.

The published area estimate counts about `n` bits of storage beyond the
register pairs and carry units. This RTL holds the pending multiplier
positions in `K*N` flip-flops instead. At the defaults the unit has about
170 flip-flops.

Not covered:

* non-power-of-two `N`. The published complexity comparison plots `n` as a
  continuous axis from 2 to 16, but only 2, 4, 8 and 16 can be built here;
* inputs in bit-serial form. Operands are loaded in parallel.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=... failures=...` line.

| testbench | what it checks |
|---|---|
| `tb_upc_carry_unit` | random enables, carries and clears against a reference count. The register must be the thermometer code of the count; `carry_out` must be high exactly at `N` |
| `tb_upc_operand_reg` | random loads and rotations against a reference register |
| `tb_upc_counter` | random enables and clears at limits 8, 2 and 5 |
| `tb_upc_generator` | all 512 inputs at N=8, K=3 |
| `tb_upc_converter` | the 340 example, all-ones input, and 3000 random stream sets |
| `tb_upc_arith` | 155 random multiplications and additions on random UP operands (any placement of ones). Checks exact result, result form, overflow and exact latency, and requires that carries, rippling carries and overflow all occurred |
| `tb_upc_top` | end to end at the default parameters: binary and direct UP operands, with the same checks, and requires that every mechanism occurred (multiply, add, stall, ripple, multi-position multiplier, direct input, overflow) |
| `tb_upc_sweep` | 16 multipliers side by side for n = 2, 4, 8, 16 and k = 2, 4, 6, 8. Each gets exact products with 128-bit reference arithmetic and latency `k*n*n + stalls + 1`. It prints each size's latency; at n = 16, k = 8 the measured latency is about 2300 cycles against 2048 steps |

`upc_arith` also carries two assertions:

* no operand bit is accepted while a carry is pending;
* the position counter stays at zero during an addition.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/upc_pkg.sv tb/tb_upc_top.sv --top-module tb_upc_top -o sim
    ./obj_dir/sim

Replace `tb_upc_top` with any other testbench name. The package must come
first on the command line. To try another size, set `N` and `K` on
`upc_top` or `upc_arith`. `N` must be a power of two; any `K >= 1` works.
All testbenches finish in seconds.
