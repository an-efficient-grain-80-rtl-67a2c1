# Grain-80 keystream generator with register balancing and unrolling

This is a synthesizable SystemVerilog core for the Grain-80 stream cipher (Grain
v1, from the eSTREAM hardware portfolio). It takes an 80-bit key and a 64-bit IV
and produces a keystream. Two ideas make it faster than the textbook one-bit-per-clock
circuit:

* **Register balancing.** The feedback polynomials and the output function are
  evaluated one clock early and held in five small register sets, R0 to R4. The
  loop that updates the shift registers is then reduced to one XOR of
  flip-flop outputs.
* **Unrolling.** The register sets, the polynomials and the output function are
  instantiated U times. The shift registers advance U cells per clock, so the
  core produces U keystream bits per clock. U can be 1, 2, 4, 8 or 16. The
  default is 16.

The keystream is bit-exact Grain v1 at every U. Simulation checks it against a
bit-serial reference model and against the published all-zero test vector.

## The cipher in brief

The state is two 80-bit shift registers: the LFSR `l` and the NFSR `n`. Cell `k`
holds bit `i+k` at time `i`, so cell 0 is the oldest bit. Each step computes:

```
f  = l0 ^ l13 ^ l23 ^ l38 ^ l51 ^ l62                      (LFSR feedback)
g  = l0 ^ n0 ^ n9 ^ n14 ^ n21 ^ n28 ^ n33 ^ n37 ^ n45 ^ n52 ^ n60 ^ n62
     ^ n63n60 ^ n37n33 ^ n15n9 ^ n60n52n45 ^ n33n28n21 ^ n63n45n28n9
     ^ n60n52n37n33 ^ n63n60n21n15 ^ n63n60n52n45n37 ^ n33n28n21n15n9
     ^ n52n45n37n33n28n21                                  (NFSR feedback)
h  = x1 ^ x4 ^ x0x3 ^ x2x3 ^ x3x4 ^ x0x1x2 ^ x0x2x3 ^ x0x2x4 ^ x1x2x4 ^ x2x3x4
     with x0 = l3, x1 = l25, x2 = l46, x3 = l64, x4 = n63
z  = n1 ^ n2 ^ n4 ^ n10 ^ n31 ^ n43 ^ n56 ^ h              (keystream bit)
```

Both registers shift down by one. `f` enters the LFSR at cell 79 and `g` enters
the NFSR at cell 79. Key setup works as follows:

1. The NFSR takes the key.
2. The LFSR takes the IV in cells 0 to 63 and ones in cells 64 to 79.
3. The cipher runs 160 steps. In each step `z` is XORed into both feedback bits
   and nothing is output.

After that, every step outputs `z`.

## Register balancing: R0 to R4

In a direct implementation the critical path starts at the state flip-flops.
It runs through the deepest AND/XOR tree (`g`, with a six-input monomial) and
ends back at cell 79. Here the same trees are fed by the registers' **next
state**, and their results are registered:

| register | holds | sum |
|---|---|---|
| R0 | `f` | f = R0 |
| R1 | `l0`, the linear NFSR taps, the three quadratic monomials of `g` | g = R1 ^ R2 |
| R2 | the eight monomials of degree 3 to 6 of `g` | |
| R3 | the linear part of `z`: n1, n2, n4, n10, n31, n43, n56, n63, l25 | z = R3 ^ R4 |
| R4 | the eight non-linear monomials of `h` | |

So in every clock R0 to R4 describe the *current* state. The feedback bit is
`R0 ^ (mix & (R3 ^ R4))` for the LFSR and `R1 ^ R2 ^ (mix & (R3 ^ R4))` for
the NFSR. Only one or two XOR levels lie between flip-flops on that path.

This works because the highest tap is cell 64. For U = 1 the next state's cells
0 to 65 are the current cells 1 to 66, which are already in flip-flops. The
new bit does not enter any tree in the clock that produces it.

The registers are updated on every clock, whether the core loads, shifts or
holds. They therefore can never disagree with the state. After reset the state
is all zeros, and every term of an all-zero state is 0, which matches the reset
value of R0 to R4.

## Unrolling

Copy `j` (j = 0 … U-1) of each register set evaluates its terms on the state
advanced `j` steps. In that view cell `k` is cell `k+j`. Per clock:

* the shift registers move down by U;
* the U new bits enter at cells 80-U … 79, with copy 0 (the earliest) lowest;
* `ks_o` carries the U keystream bits.

The highest tap of copy `j` is cell `64+j`. It stays inside the 80-cell
register only while `j ≤ 15`, which is why U is at most 16. Initialisation
takes 160/U clocks, so U must divide 160. The core accepts U = 1, 2, 4, 8 and 16
and stops elaboration for any other value.

For U > 1 the later copies' taps reach into the U bits fed back in the same
clock. Those bits are part of the next-state vector that feeds the register
sets, so the result stays exact. Each new bit is one XOR away from the R
flip-flops, so the path lengthens only by that XOR.

## Interface and timing (`grain80`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `init` | in | 1 | while high, load `key` and `iv`; initialisation starts when it falls |
| `key` | in | 80 | key; `key[79]` is k0 |
| `iv` | in | 64 | IV; `iv[63]` is IV0 |
| `ks_o` | out | U | keystream bits of this clock; `ks_o[U-1]` is the earliest |
| `ks_valid` | out | 1 | `ks_o` is keystream |
| `ks_counter` | out | 7 | keystream bits delivered so far, saturating at 80 |
| `done` | out | 1 | the first 80 bits have been delivered |
| `ks_output` | out | 80 | those 80 bits, z0 in bit 79 |

The sequence runs as follows:

1. Hold `init` high for one or more clocks. The values sampled on the last of
   those clocks are used.
2. Drop `init`. The core then runs 160/U initialisation clocks with `ks_valid`
   low. That is 10 clocks at U = 16 and 160 clocks at U = 1.
3. `ks_valid` then rises and stays high. Every clock delivers U new bits.
   `done` rises after 80/U keystream clocks and `ks_output` is then complete.

The keystream continues for as long as `init` stays low. Raising `init` at any
point, even in the middle of initialisation, starts over.

The throughput is U bits per clock. The core has no stall input: the
keystream is free-running.

Key and IV are written most significant bit first. Published Grain v1 test
vectors list key, IV and keystream bytes with bit 0 of byte 0 as the first bit.
To use them, reverse each vector into this order. For the all-zero key and IV,
the first 80 keystream bits packed that way are `de e9 31 cf 16 62 a7 2f 77 d0`.

## Files

| file | content |
|---|---|
| `rtl/grain_pkg.sv` | sizes, and the five register-set functions with an offset argument for the unrolled copies |
| `rtl/grain_lfsr.sv` | LFSR: IV load, shift by U, feedback XOR |
| `rtl/grain_nfsr.sv` | NFSR: key load, shift by U, feedback XOR |
| `rtl/grain_register_sets.sv` | R0 to R4 × U, computed from the next state |
| `rtl/grain_ctrl.sv` | control: IDLE / INIT / STREAM state machine, the 160/U round counter, `ks_counter`, `done` |
| `rtl/grain_ks_out.sv` | the 80-bit `ks_output` collector |
| `rtl/grain80.sv` | top level |
| `tb/grain_ref_pkg.sv` | bit-serial Grain v1 reference model and the all-zero test vector |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_grain80_unroll` |
| `tb/grain80_unroll_lane.sv` | one core at a given U with its checker, used by `tb_grain80_unroll` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_grain80` tests the top at its default U = 16. It runs the all-zero test
  vector, twelve random keys and IVs, loads held for several clocks, a restart
  in the middle of initialisation and restarts while streaming. Every run
  checks:
  * the initialisation length;
  * every keystream bit;
  * `ks_valid`, `ks_counter` and `done`;
  * `ks_output`.
* `tb_grain80_unroll` runs U = 1, 2, 4, 8 and 16 side by side. For each factor
  it checks the keystream against the model and the test vector, and checks
  that exactly U bits come out per clock.
* The module testbenches check each block against its own model:
  * shift-register contents cell by cell;
  * every register-set copy against the reference functions on the shifted
    state;
  * the control schedule clock by clock;
  * the output word against a bit queue.

Each testbench has also been run against a deliberately broken version of
its module and catches it. Examples are an initialisation one clock short, or
R2 left out of `g`.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/grain_pkg.sv tb/grain_ref_pkg.sv \
          tb/tb_grain80.sv --top-module tb_grain80
./obj_dir/Vtb_grain80
```

Replace `tb_grain80` with any other testbench. Verilator finds the modules it
needs in `rtl/` and `tb/` through the include paths.

To change the unrolling factor, set `U` on `grain80`.

## Departures and limits

* **Key/IV loading.** The key and IV load in parallel in one clock while `init`
  is high. The published architecture's simulation shows them shifted in one
  bit per clock (`key_i`, `iv_i`). It also states that initialisation takes
  160/U clocks and that the latency is one clock, which the parallel load
  matches.
* **Published equations.** The published R1 to R4 equations and the printed
  output function contain inconsistencies: the same monomial in R1 and R2,
  a tap set applied to the wrong register, and misnumbered taps. This core
  follows the Grain v1 definition, which the published work states it was
  validated against. The table above gives the split into R0 to R4. The
  R0/R3/R4 contents match the published ones shifted by one cell. The R1/R2
  boundary (linear and quadratic terms against higher-degree terms) is this
  core's choice.
* **When `h` is fed back.** The published update rule `l79 = f + h`,
  `n79 = g + h` is applied with `h` (the keystream bit) only during the 160
  initialisation rounds, as Grain v1 requires.
* **`ks_counter` counts bits, not clocks.** At U = 1 the two are the same. At
  U = 16 the counter steps by 16 and reaches 80 after 5 clocks.
* **Control logic.** Its structure (three states and an 8-bit round counter)
  is a choice made here. Only its behaviour is specified.
* **What simulation cannot confirm.** The published implementation reports
  542.7 MHz on an Artix-7 FPGA at every U, which gives 8.69 Gbps at U = 16.
  It also reports 99 to 1121 slices and 87 to 130 mW. Simulation cannot
  confirm clock frequency, area or power. Only the rate of U bits per clock and
  the 160/U-clock initialisation are verified here.
* **No encryption datapath.** The core produces the keystream only. XORing it
  with data is left to the user.
