# Modified dual-CLCG pseudorandom bit generator

A single linear congruential generator (LCG) is cheap in hardware but easy to predict. The
dual coupled-LCG (dual-CLCG) method hides the LCG states behind comparisons. It runs four
LCGs, `x`, `y`, `p` and `q`, and turns each pair into one bit by asking which of the two is
larger. In the original method a bit is only emitted when certain inequalities hold, so the
bit rate is irregular.

The *modified* dual-CLCG in this repository always emits a bit. The two comparison bits are

    B = (x > y)        C = (p > q)

and the output is whichever of them the least significant bit of `y` selects:

    z = y[0] ? C : B

The result is one pseudorandom bit on every clock edge, after one clock of latency. The
hardware is four shift-and-add LCGs, two magnitude comparators and a 2:1 multiplexer.

## The recurrences

All four generators share one form, each with its own shift `r` and increment `b`. Words are
`n` bits wide, so all arithmetic is modulo `2^n`:

    s(i+1) = ( (s(i) << r) + s(i) + b ) mod 2^n       = ( (2^r + 1) * s(i) + b ) mod 2^n

The multiplier is `2^r + 1`, so no multiplier is needed. The product is a fixed left shift,
which is just wiring, plus the word itself. Each LCG step is therefore one **three-operand
addition**: `(s << r) + s + b`.

Default constants, set in `mdclcg_pkg`:

| generator | shift r | multiplier 2^r+1 | increment b |
|-----------|---------|------------------|-------------|
| x         | 6       | 0x41             | 0x2B        |
| y         | 5       | 0x21             | 0x13        |
| p         | 4       | 0x11             | 0x17        |
| q         | 2       | 0x05             | 0x0B        |

The width is `n = 32`. The multipliers and the increments 0x13 and 0x17 come from the
reference design. The increments 0x2B and 0x0B were chosen for this implementation. They are
primes, as the method requires.
Every multiplier is 1 mod 4 and every increment is odd, so each LCG has the full period
`2^n` (Hull–Dobell theorem).

Because the `y` multiplier and increment are both odd, `y[0]` toggles on every step. With the
default constants the output therefore alternates strictly between a `B` bit and a `C` bit.
That follows from the constants, not from the RTL.

## Datapath of one LCG (`modified_lcg`)

```
 seed ──►┌─────┐  s(i)   ┌──────────┐
         │ 2:1 ├───┬────►│  << R    ├──┐
 start ─►│ mux │   │     └──────────┘  ▼
    ┌───►└─────┘   └─────────────────►(+)◄── B      three-operand adder
    │                                  │
    │                         low N bits
    │                            ┌─────▼─────┐
    └────────────────────────────┤ N-bit reg ├──► state = s(i+1)
                                 └───────────┘
```

* While `start` is high, the multiplexer feeds in the seed. Otherwise it feeds back the
  register.
* The register is loaded on every rising clock edge and has **no reset**. The only way to
  initialise it is to pulse `start`. Holding `start` high for several clocks reloads
  `f(seed)` each time.
* The adder's two top carry bits are dropped, which gives the `mod 2^n`.

## The three-operand adder (`three_operand_adder`)

This adder sets the critical path, so it is the one part of the design with a fixed internal
structure. It works in two stages:

1. **Carry-save row.** There are `N` independent full adders (`full_adder`). Bit `i` of the
   three operands gives a partial-sum bit `ps[i]` and a carry bit `cy[i]`, where the carry
   has weight `2^(i+1)`. Nothing propagates between bits, so this row has the delay of one
   full adder whatever `N` is.
2. **Ripple-carry stage.** An `N`-bit chain of full adders adds `{0, ps[N-1:1]}` to `cy`,
   which lines the carry word up one place to the left. `ps[0]` is the bottom bit of the
   result, the chain's `N` sum bits come next, and its carry-out is the top bit.

The output is the exact `N+2`-bit sum, since three `N`-bit words can need `N+2` bits. The LCG
keeps the low `N` bits. The ripple stage grows linearly with `N`. It is the part to replace
(for example with a prefix adder) if `N` must grow and timing is tight.

Worked example at 5 bits: `10011 + 11001 + 01011`. The row gives `ps = 00001` and
`cy = 11011`, and `ps + (cy << 1) = 110111`, which is 55. The adder's testbench checks this
vector.

## Comparators and output selection

* `magnitude_comparator` is an unsigned `a > b`. Equal inputs give 0. The method defines
  the bit only for `>` and `<`, so this tie rule is an implementation choice.
* `bit_select_mux` outputs `B` when its select is 0 and `C` when it is 1. The top level
  connects the select to bit 0 of the `y` register.

Comparator operand order, as in the reference: `x`/`y` feed the first comparator and `p`/`q`
the second, with the first operand on the `a` ("greater") side.

## Top level (`modified_dual_clcg`) and timing

| port           | dir | width | meaning                                   |
|----------------|-----|-------|-------------------------------------------|
| `clk`          | in  | 1     | rising-edge clock                         |
| `start`        | in  | 1     | high at a clock edge: load the seeds      |
| `x0 y0 p0 q0`  | in  | N     | seeds                                     |
| `zi`           | out | 1     | pseudorandom bit                          |

```
clk     _/‾\_/‾\_/‾\_/‾\_/‾\_
start   ‾‾‾‾\_______________        (sampled at the first edge)
regs    ??? | s1 | s2 | s3 |        s1 = f(seed)
zi      ??? | z0 | z1 | z2 |        one bit per clock
```

`zi` is combinational from the four state registers. It is valid from the first clock edge
at which `start` is high, and a new bit follows after every later edge. Before the first
`start`, `zi` is meaningless, because the registers have no reset.

Parameters: `N`, `R1..R4` and `B1..B4`. The RTL asserts `1 <= R < N`. Other
configurations, such as a 4-bit generator, are made by overriding them. The default build
has 131 I/O bits and 128 flip-flops.

## How far this can be trusted, and where it departs from the reference

* **Follows the reference:** the recurrences, the shift-and-add form of each LCG, the
  `start` seed multiplexer, the carry-save three-operand adder, the two comparators, the
  `y[0]` output selection, the port list and the 32-bit width.
* **Choices of this implementation:**
  * the increments of the `x` and `q` generators (0x2B and 0x0B);
  * the tie rule of the comparators;
  * no reset;
  * the `N+2`-bit adder output;
  * full-adder gates written as XOR and majority;
  * the comparator written as a behavioural `>`.
* **Not reproduced:** the reference's published output waveform for seeds 1, 2, 3, 4. Its
  bit sequence depends on the two increments chosen here and was not matched. The
  testbench runs these seeds but checks against its own reference model, not that waveform.
* The reference's timing, power and area figures (FPGA LUTs, mW, ns) and statistical test
  results are not reproduced here.
* An LCG modulo `2^n` has short-period low bits. Bit 0 of `y` has period 2. Only the
  comparisons use the full words. This generator is a lightweight bit source, not a vetted
  cryptographic RNG.

## Files

| file | contents |
|------|----------|
| `rtl/mdclcg_pkg.sv` | default width, shifts and increments |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/three_operand_adder.sv` | carry-save row plus ripple-carry adder |
| `rtl/modified_lcg.sv` | one LCG: seed mux, shift, adder, register |
| `rtl/magnitude_comparator.sv` | `a > b` |
| `rtl/bit_select_mux.sv` | output 2:1 multiplexer |
| `rtl/modified_dual_clcg.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_modified_dual_clcg_4bit` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. It also has a
watchdog that counts a failure if the run hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mdclcg_pkg.sv \
    tb/tb_modified_dual_clcg.sv --top-module tb_modified_dual_clcg -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, with the testbench's name in place of
`tb_modified_dual_clcg`. `-Irtl` lets Verilator find the modules by file name.

* `tb_modified_dual_clcg` runs the default 32-bit design end to end. It compares every
  output bit with a reference model that uses real multiplications. It starts from seeds
  1, 2, 3, 4, then restarts five times with random seeds, once holding `start` high for
  several clocks: about 24 000 bits in all. It checks the one-clock latency. It confirms
  that every mechanism occurs: a seed load, held `start`, `B` selected, `C` selected, and
  for each selection a cycle in which `B` and `C` differ. It also checks that ones make up
  45–55 % of the output.
* `tb_modified_dual_clcg_4bit` runs a 4-bit instance (shifts 3/2/3/2, increments
  11/3/7/13) for all 256 pairs of `x0` and `y0`. It checks every bit, and checks that the
  output repeats with period 16.
* The leaf testbenches check the full adder and the output multiplexer exhaustively. The
  adder is checked exhaustively at 5 bits and with corner and random vectors at 32 bits.
  The comparator gets equal, adjacent and random pairs. The LCG is checked against its
  recurrence, including held `start`, a seed change while running, and restarts.
