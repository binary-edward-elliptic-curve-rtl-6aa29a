# Ed25519 point-multiplication core (Montgomery ladder, projective coordinates)

This core computes an Ed25519 public key: it multiplies the curve's base point
G by a 256-bit secret scalar K. The result comes out both in projective form
(X:Y:Z) and in affine form (x, y). It works on the twisted Edwards curve

    -x^2 + y^2 = 1 + d x^2 y^2     over GF(p),  p = 2^255 - 19

The design has three main ideas:

* **Projective coordinates.** Point addition and doubling need only field
  multiplications, additions and subtractions. The one expensive modular
  inversion is done once, at the very end, to return to affine (x, y).
* **Montgomery ladder.** Every key bit costs one point addition and one point
  doubling, run in parallel. The sequence of operations, and so the timing
  and power profile, does not depend on the key bits. This resists simple
  power analysis.
* **Few arithmetic units, reused heavily.** The point adder shares 5
  multipliers between its 12 multiplications and 1 squaring. The point
  doubler does the same with 4 multipliers. Every addition anywhere in the
  core goes through one kind of elementary adder: a radix-4
  carry-look-ahead tree.

For the test key in `tb/tb_ecc_core.sv`, the ladder takes **133 111 clock
cycles** (255 steps × 522 cycles + 1). The affine conversion brings the total
to about 133 600 cycles.

## Hierarchy

```
ecc_core                      top: ladder, then conversion to affine
├── ecpm                      Montgomery ladder over key bits 254..0
│   ├── point_add             Q1 + Q2: 5 mod_mult_r4, 1 mod_add, 1 mod_addsub
│   └── point_double          2Q:      4 mod_mult_r4, 2 mod_add, 2 mod_sub
└── proj_to_affine            x = X/Z, y = Y/Z: 1 mod_inv, 2 mod_mult_r4
        mod_mult_r4           radix-4 interleaved modular multiplier (130 cycles)
        └── mult_r4_precomp   A, 2A, 3A
        mod_inv               binary extended-Euclid inverter
        mod_add / mod_sub / mod_addsub   modular add / subtract (2 cycles)
        cla_adder             carry-look-ahead adder (cla_block_a/b/c cells)
ecc_pkg                       widths, p, d, G, 2G, point_t
```

Every sequential unit has the same handshake:

* `start` is a one-cycle pulse. The operands need to be valid only in that
  cycle.
* `done` is a one-cycle pulse. The result is valid in the same cycle.
* The result stays on the output until the unit's next operation ends.
* A multi-cycle unit may be started only while it is idle. The point adder
  may also be started in its `done` cycle. Each unit checks this rule with
  an immediate assertion.

Reset is synchronous and active high (`reset`). All field elements are
256-bit `fe_t`, and points are the packed struct `point_t {x, y, z}`.

| unit | cycles from start to done |
|---|---|
| `mod_add`, `mod_sub`, `mod_addsub` | 2 |
| `mod_mult_r4` | 130 (= n/2 + 2) |
| `mod_inv` | depends on the operand: about 355 on average, at most about 2n |
| `point_double` | 264 |
| `point_add` | 522, also when restarted back to back |
| `ecpm` | 133 111 |
| `proj_to_affine` | inverter time + 130 (about 490) |

## The elementary adder (`cla_adder`)

The adder is a carry-look-ahead tree built from three cells:

* **A cell (one per bit):** generate `g = a·b`, propagate `p = a⊕b`, and the
  sum `s = a⊕b⊕c` once the bit's carry `c` is known.
* **C cell:** merges four (g, p) pairs into a group pair. It also returns the
  carry into each of the four sub-groups, given the carry into the group.
* **B cell:** the same operation for two pairs.

Four bits under one C cell make a 4-bit adder. Four of those under another C
cell make 16 bits, and so on up to 256 bits. Generate and propagate travel up
the tree, and the carries travel back down.

The core also needs 257-bit adders (modular add/subtract, which keep a sign
bit) and 258-bit adders (multiplier and inverter, whose partial results reach
7p). For these, the extra bits are attached on the most significant side with
B cells, each merging one more bit with the group below it. Subtraction is
`a + ~b + 1`.

Each cell is written as separate continuous assignments. This keeps the
upward (g, p) path and the downward carry path out of one process, so a
simulator does not see a combinational loop.

## Modular addition and subtraction

* **`mod_add`:** S1 = a + b and S2 = S1 − p. The output is S1 if S2 is
  negative, otherwise S2.
* **`mod_sub`:** S1 = a − b and S2 = S1 + p. The output is S2 if S1 is
  negative, otherwise S1.
* **`mod_addsub`:** does either operation with the same two adders, selected
  by `as` (1 = subtract). Five multiplexers choose b or ~b, choose +p or −p
  for the correction, pick the corrected or uncorrected result for each mode,
  and finally pick the mode.

All three register their operands on `start`, compute in the next cycle, and
register the result together with `done`. The operands must already be
reduced (below p).

## Radix-4 modular multiplier (`mod_mult_r4`)

This is the block that sets the speed of the whole core. It is an interleaved
multiplier: it scans B from the top, two bits per clock, and keeps the partial
result D reduced modulo p at every step.

1. **`start`:** the precomputation stage registers A. The shift register T is
   loaded with `{B, 2'b01}`; the trailing `01` is an end marker. D is
   cleared.
2. **Precomputation cycle:** A, 2A and 3A = A + 2A are captured into
   registers. This keeps the 3A adder out of the iteration loop.
3. **128 iterations,** one per clock:
   ```
   E  = 4·D + {0, A, 2A, 3A}[T[257:256]]      E < 7p, 258 bits
   q  = E[257:255]                             0..6
   R1 = E − q·p                                constants p..6p
   D  = (R1 − p ≥ 0) ? R1 − p : R1             final check
   T  = T << 2
   ```
   The loop ends when the marker has left T[255:0] (an OR over those bits).

Why three MSBs plus one check is enough: p = 2^255 − 19 is just below a power
of two, so q = ⌊E / 2^255⌋ is almost the true quotient. The remainder
E − q·p = (E mod 2^255) + 19q lies in [0, 2^255 + 114). That is below 2p, so
one conditional subtraction of p finishes the reduction. Without the check,
results close to p come out wrong, but only for rare operands. The testbench
includes such operands on purpose.

`done` comes 130 cycles after `start`. The output register is D itself.

## Point addition (`point_add`)

The unified projective addition formula is:

    X3 = Z1Z2 (Z1²Z2² − dX1X2Y1Y2)(X1Y2 + Y1X2)
    Y3 = Z1Z2 (Z1²Z2² + dX1X2Y1Y2)(X1X2 + Y1Y2)
    Z3 = (Z1²Z2² + dX1X2Y1Y2)(Z1²Z2² − dX1X2Y1Y2)

It is evaluated in five levels on five multipliers (m0..m4), one modular adder
(ad) and one adder/subtractor (as):

| level | m0 | m1 | m2 | m3 | m4 | ad | as |
|---|---|---|---|---|---|---|---|
| L1 | A = Z1Z2 | C = X1X2 | D = Y1Y2 | X1Y2 | Y1X2 | | |
| L2 | B = A² | C·D | | | | X1Y2 + Y1X2 | C + D |
| L3 | | | E = d·CD | T1 = A·(X1Y2+Y1X2) | T2 = A·(C+D) | | |
| L4 | | | | | | G = B + E | F = B − E |
| L5 | X3 = T1·F | Y3 = T2·G | Z3 = F·G | | | | |

A is kept in a register from L1 to L3. Every other value waits in the output
register of the unit that produced it until a later level reads it.

A small FSM runs the levels:

* It starts all units of a level in the same cycle.
* It records each unit's `done` in sticky flags.
* When the flags of all units in the level are set (one AND per level), it
  starts the next level in that same cycle.

So no cycle is lost between levels. The total is four multiplier levels of
130 cycles plus one 2-cycle addition level, 522 cycles in all.

When `done` is high, the block also accepts a new `start` in that same cycle
and goes straight into L1. The ladder uses this to run additions back to back.

## Point doubling (`point_double`)

The doubling formula is:

    X2 = 2X1Y1 (Y1² − X1² − 2Z1²)
    Y2 = (X1² − Y1²)(X1² + Y1²)
    Z2 = (Y1² − X1²)(Y1² − X1² − 2Z1²)

It runs in four levels on four multipliers, two adders and two subtractors:

| level | operations |
|---|---|
| L1 | C = X², D = Y², H = Z², P = XY |
| L2 | F = D − C, N = C − D, S = C + D, 2H = H + H |
| L3 | J = F − 2H, 2P = P + P (F saved in a register) |
| L4 | X2 = 2P·J, Y2 = N·S, Z2 = F·J |

That is 130 + 2 + 2 + 130 = 264 cycles. The doubler needs no back-to-back
restart, because in the ladder it always finishes long before the adder.

## The ladder (`ecpm`)

The ladder keeps two points, with Q2 = Q1 + G at all times. The top key bit
is taken to be 1, so the ladder starts from Q1 = G and Q2 = 2G. Both are
stored constants in `ecc_pkg`; 2G is the projective value that the doubling
formula gives for G. The ladder then walks key bits 254 down to 0. For each
bit it runs Q1 + Q2 on the point adder and, in parallel, doubles Q2 (bit = 1)
or Q1 (bit = 0). When both are finished, the results are steered back:

    k_i = 1:  Q1 ← Q1 + Q2,  Q2 ← 2·Q2
    k_i = 0:  Q2 ← Q1 + Q2,  Q1 ← 2·Q1

**Turnaround.** The steered values (new Q1 and Q2) are combinational
functions of the adder and doubler output registers and of the current bit.
They drive the inputs of both units directly. The next step therefore starts
in the very cycle the adder reports `done`. The doubler's input is picked
with the *next* bit, k_{i−1}; the multipliers inside both units capture their
operands on that edge. As a result, each ladder step costs exactly the
point-addition latency, with no Q1/Q2 registers between steps. After bit 0,
Q1 goes into the result register, and `done` follows one cycle later:
255 × 522 + 1 = 133 111 cycles.

Bit 255 of `k` is not read. A key whose top bit is 0 gives (k + 2^255)·G. In
Ed25519 the scalar is normally clamped so that bit 254 is set; callers must
supply a key with bit 255 set (or shift the key accordingly) if they need
exactly k·G.

## Inverter and affine conversion (`mod_inv`, `proj_to_affine`)

`mod_inv` runs the binary extended Euclidean algorithm on four registers.
They start as q = b, r = p, s = 1, t = 0, and keep the invariants s·b ≡ q and
t·b ≡ r (mod p). Each clock does one combined step:

* **q and/or r even:** each even one is halved. Its companion (s or t) is
  halved modulo p: x/2 if x is even, (x + p)/2 if x is odd.
* **Both odd:** the smaller of q and r is subtracted from the larger. The
  companions are subtracted modulo p. Both differences are halved at once,
  since the difference of two odd numbers is even.

The step ends when q < 2, and then s = b⁻¹. s and t stay in [0, p) all the
time, so no final reduction is needed. For b = 0, which has no inverse, the
output is 0.

The step count depends on the operand: about 355 for random operands, and up
to about 2n = 512 in the worst case (for example b = p − 1).

`proj_to_affine` registers X and Y and starts the inverter on Z. The
inverter's `done` starts two multipliers, X·Z⁻¹ and Y·Z⁻¹, and their `done` is
the block's `done`.

## How far to trust it, and where it departs from the original design

The following results were checked in simulation:

* For the test key used in the testbenches, the projective ladder output
  equals a published reference result bit for bit: X, Y and Z, not only the
  affine point.
* The ladder takes the expected 133 111 cycles.
* A second, random key matches an independent model of the ladder written in
  the testbench.
* The modular addition and multiplication reproduce published test vectors.
* Every unit is checked against wide-integer reference arithmetic, including
  edge operands.
* The cycle counts of the multiplier (130), point addition (522), point
  doubling (264) and ladder (133 111) equal the figures of the original
  design.

The following are this implementation's own choices or departures:

* **Operation schedules.** The original design's schedules for point addition
  and doubling were not available. The tables above were written to fit its
  stated unit counts and latencies. Point addition needs one holding register
  instead of three, and point doubling one instead of four.
* **Level sequencing.** Levels are sequenced by ANDing the units' done
  signals. The original's optimized FSM counts cycles instead and raises done
  one cycle early. Both reach 522 cycles per back-to-back step. This block
  also takes 522 cycles for a single isolated addition, where 523 was
  reported for the original.
* **Multiplier reduction.** The multiple of p is selected first and then
  subtracted with one adder, instead of six parallel subtractors followed by
  a result multiplexer. The result is the same.
* **Inverter speed.** The inverter follows the same algorithm but does not
  reproduce the original's two-stage pipelined datapath. It is slower: about
  355 cycles on average and up to about 512, against a stated maximum of
  n + n/4 = 320. Because of this, ladder plus conversion takes about
  133 600 cycles instead of 133 561.
* **Add/subtract timing.** The two-cycle latency has `done` arriving with the
  registered result.
* **Not included:**
  * the radix-2 multiplier and the point units built on it, which were a
    slower alternative;
  * the DSP-based carry-select adder, an FPGA-only replacement for the CLA;
  * the undocumented `shift` input of the multiplier.
* **Timing closure.** No synthesis timing was checked. Critical paths are
  expected in the multiplier (two 258-bit adders plus multiplexers per cycle)
  and the inverter (up to three adders in series).

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops; a watchdog counts a failure if the
test hangs. The shared reference arithmetic is in `tb/ecc_tb_pkg.sv`.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_ecc_core \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/ecc_pkg.sv tb/ecc_tb_pkg.sv tb/tb_ecc_core.sv
./obj_dir/Vtb_ecc_core
```

Replace `tb_ecc_core` with any other testbench name.

`tb_ecc_core` runs the whole core at full size, twice, about 267 000 cycles in
all; it finishes in about 10 seconds. Besides checking results, it counts the
mechanisms it exercised and fails if any count is zero:

* ladder steps with k_i = 1;
* ladder steps with k_i = 0;
* back-to-back restarts of the point adder;
* steps where the doubler finished first;
* inverter subtraction steps;
* inverter halving-only steps.

`tb_ecpm` checks the ladder alone with the same published result. The unit
testbenches run in well under a second each.

## Changing it

Everything is fixed to Ed25519. p, d, G and 2G are in `ecc_pkg`. The
multiplier's reduction (three MSBs, at most one extra subtraction) relies on p
being just below 2^255. Another 255-bit pseudo-Mersenne prime with a small
offset would work with new constants. A general prime would need a different
reduction.

`cla_adder` takes any `WIDTH` ≥ 4. The field width `N` in the package is 256
throughout.
