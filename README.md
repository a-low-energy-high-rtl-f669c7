# Add-and-shift multiplier with a dual-mode adder

An 8 x 8-bit unsigned sequential multiplier. It runs the schoolbook
algorithm one multiplier bit per round. In each round it tests one bit, adds the
multiplicand into the upper half of a shift register when that bit is 1, and
shifts the register right by one. Only one adder is needed, and it is used at most
once per round. That adder is a **dual-mode adder** with two structures for the
same addition:

* a plain 8-bit **ripple-carry adder**. It is the low-energy mode: it has the
  fewest gates and the least switching, but its carry must ripple through all
  eight cells, so it is slow. The controller gives it two clock cycles per
  addition.
* an 8-bit **carry-select adder**. It is the fast mode: the upper nibble is
  computed twice in parallel (for carry-in 0 and 1), and the low nibble's carry
  picks the right copy. The controller gives it one clock cycle per addition.

A mode input, sampled when an operation starts, decides which structure does the
additions of that operation. The adder that is not in use has its operands
forced to zero, so its internal nodes stay quiet.

## Block structure

```
            a_in ──► multiplicand_reg ──ra──┐
                                            ▼
   start, mode ──► mult_controller      dm2_adder ◄──rb──┐
   stop ◄────────   │ load/add/shift       │ c_out, add_out │
                    │ ▲ lsb                ▼                │
            b_in ──►└─┴──────────► multiplier_result ───────┘──► rc (product)
```

| module | role |
|---|---|
| `dm2_multiplier` | top level; wires the four units below |
| `mult_controller` | Moore state machine: load, test, add, shift, stop |
| `multiplicand_reg` | 8 D flip-flops holding the multiplicand (`ra`) |
| `multiplier_result` | 17-bit `temp_register`: multiplier, partial product, product |
| `dm2_adder` | dual-mode adder: picks the ripple-carry or the carry-select result |
| `carry_select_adder` | three 4-bit ripple-carry sections and a 2:1 multiplexer |
| `ripple_carry_adder` | N full adders in a chain (used at N = 8 and N = 4) |
| `full_adder` | one-bit full adder cell |
| `mult_pkg` | shared types: adder mode and controller state enums, default width |

All modules take a `WIDTH` parameter (8 by default; the ripple-carry adder calls
it `N`). The carry-select adder splits any even width into two halves.

## The result register and how the product forms

`multiplier_result` holds `temp_register[16:0]`:

* **load**: bits 7..0 take the multiplier `b_in`, bits 16..8 are cleared.
* **add**: a multiplexer replaces bits 16..8 with `{c_out, add_out}`, the sum of
  `rb = temp_register[15:8]` and the multiplicand. Bit 16 catches the carry.
* **shift**: the whole register moves right by one and a 0 enters bit 16. The
  carry from the last add moves down into bit 15.

The multiplier bits leave at the bottom (`lsb = temp_register[0]` is the bit the
controller tests next), while the partial product grows in from the top. After
eight rounds `rc = temp_register[15:0]` is the 16-bit product, and bit 16 is 0.

Example, 13 x 5 (b = 00000101):

```
load       0 00000000 00000101
r0 add     0 00001101 00000101    lsb=1: upper += 13
r0 shift   0 00000110 10000010
r1 shift   0 00000011 01000001    lsb=0: no add
r2 add     0 00010000 01000001    lsb=1: upper += 13
r2 shift   0 00001000 00100000
r3..r7     five more shifts
result     0 00000000 01000001  = 65
```

## Controller and timing

`mult_controller` is a Moore machine clocked on the rising edge. It raises one
command per cycle (an assertion checks this):

| state | command | next |
|---|---|---|
| `IDLE` | none | `INIT` when `start` (also latches `mode`, clears `stop`) |
| `INIT` | `load_cmd` | `TEST` |
| `TEST` | none | `lsb`=0: `SHIFT`; `lsb`=1: `ADD` (carry-select) or `ADD_WAIT` (ripple-carry) |
| `ADD_WAIT` | none | `ADD` after `SLOW_ADD_CYCLES-1` cycles (default 1) |
| `ADD` | `add_cmd` | `SHIFT` |
| `SHIFT` | `shift_cmd` | `TEST`, or `IDLE` with `stop` set after the 8th shift |

The cycles from the clock edge that sees `start` to the edge after which `stop`
is high are:

    2 + 2*WIDTH + popcount(b_in) * add_cycles

where `add_cycles` is 1 in carry-select mode and 2 in ripple-carry mode. For
8 bits this is 18 to 26 cycles in fast mode and 18 to 34 in low-energy mode.
`stop` stays high, and `rc` stays valid, until the next `start` is accepted.
`a_in` and `b_in` are read during the `INIT` cycle, the cycle after `start` is
seen. Reset is synchronous and active high.

### Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous reset, active high |
| `start` | in | 1 | begin a multiplication |
| `mode` | in | 1 | 0 = ripple-carry (low energy), 1 = carry-select (fast) |
| `a_in` | in | 8 | multiplicand |
| `b_in` | in | 8 | multiplier |
| `stop` | out | 1 | product ready |
| `rc` | out | 16 | product |

## What this RTL decides on its own

The reference design fixes the block diagram, the register layout, the adder
structures and the order initialise, test, add, shift. The following choices
are this design's own:

* **Where the adder mode comes from.** In a dual-mode adder a separate mode
  decision unit predicts which mode suits the next addition. No rule for that
  prediction is specified, so the mode is a top-level input. A decision unit can
  drive it without any change inside the multiplier.
* **How long each mode takes.** Dual-mode addition needs multi-cycle adds. Here
  the ripple-carry mode takes `SLOW_ADD_CYCLES = 2` cycles and the carry-select
  mode takes 1. In RTL both adders are combinational and give the same sum. The
  extra cycle models the timing budget of the slow adder at a clock period set by
  the fast one.
* **Idling the unused adder** by zeroing its operands.
* **Control details**: the 3-bit round counter, the `stop` flag behaviour, the
  synchronous reset, and the priority load > add > shift in the result register.
* **Full adder gates**: textbook sum = a^b^c, carry = majority.

Not modelled: dual-mode logic (gates that switch between static and dynamic
operation) is a transistor-level circuit style with no logic function of its
own, and the processor pipeline that a dual-mode adder is usually placed in
(instruction memory, register file) is outside the multiplier. Energy and delay
figures cannot be derived from this RTL.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_full_adder`, `tb_ripple_carry_adder` (N = 8 and N = 4),
  `tb_carry_select_adder`, `tb_dm2_adder`: exhaustive over all operands. The
  carry-select test also replays four operand pairs from a reference waveform,
  including the two precomputed upper-nibble sums. The dual-mode test also checks
  that the idle adder is isolated.
* `tb_multiplicand_reg`, `tb_multiplier_result`: random commands against a
  reference model.
* `tb_mult_controller`: compares the command sequence cycle by cycle with the
  expected sequence for random multipliers in both modes, and checks the latency
  formula.
* `tb_dm2_multiplier`: end to end at the default size. It runs all 65536
  operand pairs in both modes and checks the product and the exact cycle count.
  It counts adds, skipped adds, adder carry-outs, carry-select selections of the
  carry-in-1 section, and ripple-carry wait cycles, and fails if any of them
  never happened. It runs in a few seconds.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mult_pkg.sv \
          tb/tb_dm2_multiplier.sv --top-module tb_dm2_multiplier
./obj_dir/Vtb_dm2_multiplier
```

Replace the testbench name to run another one. `mult_pkg.sv` must be read
first. The other modules are found through `-y rtl`.
