# Modified dual-CLCG pseudorandom bit generator

This is a pseudorandom bit generator (PRBG) that gives one bit per clock. It
runs four linear congruential generators (LCGs) side by side, compares them in
pairs, and lets one LCG's low bit choose which comparison becomes the output
bit. The aim is a generator that is cheap in hardware and yet hard to predict
from its output. Every multiplication is a shift plus an add. The output needs
two comparators and a 2:1 multiplexer. A bit is ready one clock after seeding,
and a new bit follows on every later clock.

The word size defaults to 32 bits. The RTL is parameterised and has also been
simulated at 8 and 16 bits.

## The algorithm

Each LCG uses a multiplier of the form `2^r + 1`:

```
x[i+1] = (2^r1 * x[i] + x[i] + b1) mod 2^N
y[i+1] = (2^r2 * y[i] + y[i] + b2) mod 2^N
p[i+1] = (2^r3 * p[i] + p[i] + b3) mod 2^N
q[i+1] = (2^r4 * q[i] + q[i] + b4) mod 2^N

B[i] = x[i+1] > y[i+1]
C[i] = p[i+1] > q[i+1]
Z[i] = B[i]  if y[i+1] is even
       C[i]  if y[i+1] is odd
```

The older "dual-CLCG" generator combines `B` and `C` with a gate and only
gives a bit on some clocks. The modified scheme gives a bit on every clock: it
uses the least significant bit of `y` to choose one of the two comparisons.

Default constants (`dual_clcg_pkg`):

| LCG | word | shift r | multiplier 2^r+1 | increment b |
|-----|------|---------|------------------|-------------|
| 1   | x    | 6       | 65               | 43          |
| 2   | y    | 5       | 33               | 19          |
| 3   | p    | 4       | 17               | 23          |
| 4   | q    | 2       | 5                | 59          |

Every multiplier is 1 mod 4 and every increment is odd. So each LCG has the
full period `2^N` (Hull–Dobell), and the output bit stream repeats after at
most `2^N` bits. With all-zero seeds the four words begin
`43, 19, 23, 59` → `2838, 646, 414, 354` → `184513, 21337, 7061, 1829`. The
testbenches check these reference values.

## Hardware structure

```
            +-------------- modified_lcg (x4) ---------------+
 seed ----->|MUX|--s--+--(<< r)--+                             |
 start ---->|   |     +----------+--> three_operand_ppa --> REG-+--> word
            |   |<-------------------- (+ b) ------------- feedback
            +-----------------------------------------------------+

 x,y --> magnitude_comparator --> cout1 (B) --+
 p,q --> magnitude_comparator --> cout2 (C) --+--> MUX(sel = y[0]) --> zi
```

| module                 | role |
|------------------------|------|
| `modified_dual_clcg`   | top: four LCGs, two comparators, the output multiplexer |
| `modified_lcg`         | one LCG: seed/feedback mux, shift by `R`, three-operand adder, N-bit register |
| `three_operand_ppa`    | `(a + b + c) mod 2^W`: carry-save stage plus a parallel-prefix adder |
| `magnitude_comparator` | unsigned `a > b` |
| `dual_clcg_pkg`        | default word size, shifts and increments |

### The three-operand adder

The adder sets the critical path. Each LCG step adds three N-bit words:
`s << r`, `s` and the constant `b`. A ripple-carry adder after the carry-save
stage has a delay that grows linearly with N. `three_operand_ppa` does it in
two steps instead:

1. **Carry-save stage.** One full adder per bit reduces the three words to a
   sum word `ps = a ^ b ^ c` and a carry word `cs = maj(a, b, c)`. The
   identity is `a + b + c = ps + 2*cs`. The carry out of the top bit is
   dropped, because the result is taken mod 2^W.
2. **Parallel-prefix adder.** It adds `ps` and `cs << 1`. Bit-level
   generate/propagate pairs are merged in a Kogge–Stone tree of `log2(W)`
   levels. After level `l`, the pair at bit `k` covers the bits
   `k-2^l+1 .. k`. The carry into bit `k` is the final group-generate of
   bit `k-1`.

The source this design follows names only a "three-operand parallel-prefix
adder" and gives no internal structure. The Kogge–Stone tree is this design's
own choice: it has the shortest logic depth of the common prefix networks.
You can swap in a sparser tree (Brent–Kung, Han–Carlson) inside
`three_operand_ppa` without changing any interface.

### Comparators and output multiplexer

`magnitude_comparator` returns `a > b` on unsigned words: the most
significant bit where the words differ decides. The defining equations do not
cover equal words. Here, equal words give 0, so `B = 0` when `x == y` and
`C = 0` when `p == q`. The multiplexer select is `y[0]`, the low bit of the
already-updated `y` word.

## Interface and timing (`modified_dual_clcg`)

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `clk`           | in  | 1     | clock; all registers update on the rising edge |
| `start`         | in  | 1     | when high, each LCG's input mux takes the seed instead of its own register |
| `x0 y0 p0 q0`   | in  | N     | seeds |
| `zi`            | out | 1     | pseudorandom bit |

- On a rising edge with `start` high, each register loads `f(seed)`, the
  seed's first successor. It does not load the seed itself.
- `zi` is combinational from the four registers. It is valid right after that
  edge (one clock of initial latency), and each later edge with `start` low
  gives the next bit.
- If `start` stays high, each edge reloads `f(seed)`, so the output holds
  still. Pulsing `start` again reseeds the generator at any time.
- There is no reset. Until the first edge with `start` high, the state and
  `zi` are undefined. Use a one-cycle `start` pulse as the initialisation.
- The design has 4·32 + 3 = 131 I/O pins and 128 flip-flops at N = 32.

Parameters: `N` (word size, default 32), `R1..R4` (shifts, default 6, 5, 4,
2) and `B1..B4` (increments, default 43, 19, 23, 59). Each shift must satisfy
`1 <= R < N`. An elaboration-time assertion in `modified_lcg` checks this.
Keep the increments odd and the shifts at 2 or more if you want the full
period. `three_operand_ppa` needs `W >= 2`.

## How far it follows the source, and where it departs

These points follow the published description:
- the four-LCG recurrence;
- the shift-and-add form of the multipliers;
- the seed mux controlled by START in front of each LCG, and the n-bit
  registers;
- the two comparators and the output mux selected by `y[i+1][0]`;
- the 32-bit ports (`x0, y0, p0, q0, clk, start, Zi`);
- the use of a three-operand parallel-prefix adder.

The shift and increment constants come from the reference simulation of the
design. The LCG reference sequences above also come from it.

These points are this design's own choices:
- **Inside the adder:** the carry-save stage and the Kogge–Stone tree.
- **Comparator structure** and the **equal-words → 0** rule.
- **No reset.** The reference port list has none.
- **`start` loads `f(seed)`.** The register takes the seed's successor, as
  drawn (mux → adder → register).
- **Output selection.** One of the prose descriptions of the method mentions
  an XOR gate at the output. This design follows the defining equation and
  the block diagram, which both use a multiplexer.

The generator is also described with a carry-save three-operand adder
followed by a ripple-carry adder ("CS3A"). That variant serves as the slower
baseline and is not included here. It would differ only inside the adder.

Statistical quality (for example the NIST SP 800-22 test suite) has not been
measured on this RTL. The end-to-end testbench checks only that the share of
ones lies between 45 % and 55 %. None of this is a cryptographic security
claim: LCG-based generators with known constants and short words are
predictable.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench                   | what it checks |
|-----------------------------|----------------|
| `tb_three_operand_ppa`      | 32- and 8-bit adders against `+`: corner cases (all ones, full carry runs) and 4000 random triples |
| `tb_magnitude_comparator`   | 4-bit exhaustive; 32-bit corners, equal words, one-bit differences, random |
| `tb_modified_lcg`           | reference sequences of all four LCG configurations from seed 0; 200 random steps against a multiply-based model; `start` held high; full period 256 at N = 8 |
| `tb_modified_dual_clcg`     | the top at its default parameters: the first bit one clock after `start`, then a bit per clock compared with a model (about 20,000 bits, seven reseeds), an `x == y` case, coverage of both mux choices where `B != C`, and the share of ones |
| `tb_dual_clcg_word_sizes`   | the top at N = 8 (three seeds, bit stream periodic in 256) and N = 16 (2^16 + 100 bits) against a model |

Every testbench has a cycle watchdog. To run one with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/dual_clcg_pkg.sv tb/tb_modified_dual_clcg.sv --top-module tb_modified_dual_clcg
./obj_dir/Vtb_modified_dual_clcg
```

Replace the last file and the top name to run another testbench. Each run
takes well under a second.
