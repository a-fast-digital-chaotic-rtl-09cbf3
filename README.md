# MVLM: a keyed chaotic sequence generator built from Variational Logistic Maps

This is synthesizable SystemVerilog for a pseudo-random keystream generator
built on a digital chaotic map, the **Variational Logistic Map (VLM)**. It
produces one 32-bit word per clock cycle from a 128-bit key.

A classical logistic map `x <- g*x*(1-x)` is a poor base for a digital
cipher. It is chaotic only for `g` near 4, it has many parameter "windows"
with short periodic orbits, and at finite precision its orbits collapse into
short cycles. The VLM changes the map in two ways:

* It keeps the **middle** bits of every product rather than the top bits.
  This removes the windows, spreads the output evenly over (0,1) and lets
  every bit of `gamma` act as key material.
* It XORs every output with the word of a maximal-length LFSR. This puts a
  hard lower bound of `2^Q - 1` on the cycle length.

Four 32-bit VLMs coupled in a ring, with a 128-bit LFSR, form the **MVLM**.
Its output cycle is at least `2^128 - 1` long. A key-initialization procedure
turns a 128-bit key into the internal state.

## The map

Every value is a Q-bit unsigned fraction in (0,1). Bit `Q-1` weighs 1/2 and
bit 0 weighs `2^-Q`. The usual mathematical notation numbers bits from the
MSB: `x[1]` is the MSB and `x[Q]` the LSB. So `x[k]` is RTL bit `Q-k`. The
comments use both, and always say which one they mean.

With `A = ceil(Q/2)` and `alpha = 2^A`:

```
p             = floor_Q( (alpha * gamma * x) mod 1 )
VLM(gamma, x) = floor_Q( (alpha * p * (1 - x)) mod 1 )
```

`floor_Q` keeps the Q most significant fraction bits. For the 32-bit map the
product `gamma*x` has 64 fraction bits. Multiplying by `2^16` and taking
`mod 1` drops its top 16 bits, and `floor_32` drops its bottom 16 bits. So
`p` is simply **bits [47:16] of the 64-bit integer product**. The second
product is cut the same way. Both mod and floor are bit selections and cost
no logic. Because the top 16 product bits are never used, synthesis can
prune each multiplier to about a 24x32 array, smaller than the 32x32 array
of a classical logistic map.

Why the middle bits? The top bits of a product depend on few partial
products, and the bottom bits are nearly a product of the operands' low
bits. The middle bits depend on the most partial products, so a one-bit
change of an input reaches them most often, and their distribution is the
flattest.

Two rules on the inputs make the map well-behaved. The
**zero detector** (`vlm_zero_detector`) applies them:

1. `gamma`'s two LSBs are forced to 0. Then `alpha^2 * gamma` (which is the
   32-bit integer value of gamma) is a multiple of four. That is the
   condition under which the underlying real-valued map is chaotic. The
   smallest usable gamma is therefore `2^-30`.
2. A zero input is replaced by `2^-30` (RTL value 4). Zero is a fixed point
   of the map. This rule is stated for gamma. This design applies it to x as
   well, because a single comparator is said to check both. Without it, an
   output of exactly 0 would lock the map at 0. This does happen: starting
   from `gamma = 0.609375`, `x0 = 0.21875`, the very first output is 0.

`vlm_core` is the combinational datapath of one step: zero detector, first
truncating multiplier (`vlm_trunc_mult`), the subtractor `1 - x` (formed as
`2^Q - x`, which fits because x is never 0), and the second truncating
multiplier.

## Scrambling

`scrambled_vlm` is the basic generator, one map with one LFSR of the same
width:

```
xbar(i+1) = VLM(gamma, xbar(i)) xor n(i)        n(i+1) = L_x(n(i))
```

The scrambled value is the output, and it is also the map's next input. So
the LFSR disturbs the trajectory on every step, before it can settle into a
short loop. The 32-bit LFSR uses `x^32+x^31+x^30+x^29+x^28+x^22+1`, which is
primitive. All LFSRs here (`mvlm_lfsr`) are Fibonacci registers that shift
**left** one bit per cycle. The feedback bit enters at bit 0.

## The four-VLM ring (`mvlm`)

```
          n[127:96]        n[95:64]         n[63:32]         n[31:0]
              |                |                |                |
  +->[x0]-VLM1-(+)->[x1]-VLM2-(+)->[x2]-VLM3-(+)->[x3]-VLM4-(+)--+--> T --> seq
  |                                                              |
  +--------------------------------------------------------------+
     [xi] = input register of VLM i+1, with its own gamma register
```

* VLM `i` (numbered 1..4 above, 0..3 in the RTL) reads its own input
  register and its own gamma register.
* Its output is XORed with a 32-bit slice of the 128-bit LFSR word `n`.
  VLM 1 gets the most significant slice.
* The result is written into the input register of the next VLM. The last
  VLM's result closes the ring and is also the output.

**Timing.** Every register sits at a VLM input, so the ring is a
four-stage loop. Every clock edge moves all four values one VLM further and
steps the LFSR once. The critical path is one VLM: two multipliers and a
subtractor. It does not grow with the number of VLMs, and the generator
delivers a full word every cycle whatever `M` is. Four values circulate in
the ring at once. Each passes through all four maps, each with a different
gamma and noise slice, before it comes back.

Read literally, the algebraic definition of the coupled system chains all
four maps in one iteration. That would put eight multipliers in one
combinational path. This design instead follows the register placement of
the published datapath and its constant clock rate for one to four maps.

The **output function T** selects the middle `OUT_W` bits of the last VLM's
scrambled output. With the default `OUT_W = 32` that is the whole word. With
`OUT_W = 8` it is RTL bits [19:12], the middle byte. Fewer bits per cycle
reveal less of the trajectory.

## Key initialization

This is the least obvious part of the design. It takes
`2*Q*M = 256` cycles after the key is loaded. Its purpose is to make every
internal value (four gammas, four initial states, the LFSR seed) depend on
every key bit in a nonlinear way.

**Load** (the cycle `start` is high). `KEY[1]` is the key's first bit,
`key[127]`. The four VLMs (i = 1..4) are loaded as follows:

| register | value                       | e.g. i = 1               |
|----------|-----------------------------|--------------------------|
| gamma_i  | bit `[i]` set, `KEY[16i-15 : 16i]` in the low half | `{0x8000, KEY[1:16]}` |
| x_i      | `KEY[16i+49 : 16i+64]` in the high half, zeros below | `{KEY[65:80], 0x0000}` |
| n        | `KEY`                       |                          |

So the gammas take the first 64 key bits and the states take the last 64.
The one set bit in each gamma's high half makes the gammas distinct and
never zero.

**Step 1** (128 cycles, `phase = 1`). The ring runs exactly as in
generation, scrambled and with the LFSR stepping. In addition, every cycle
each gamma shifts right by one bit, and the LSB of its own VLM's output
(before scrambling) becomes gamma's new MSB. After 128 cycles the
gammas have been rewritten by the chaotic trajectory. Every key bit has also
travelled the length of the 128-bit LFSR.

**Step 2** (128 cycles, `phase = 2`). The gammas are frozen. The ring runs
**without** scrambling. The LFSR does not step. Instead, the MSB of the last
VLM's output is shifted into its LSB each cycle. After 128 cycles the LFSR
holds 128 bits taken from the chaotic trajectory (`n_reg`). The first bit
collected is the MSB. This becomes the generator's noise seed, so the LFSR
seed no longer depends linearly on the key. The design collects `n_reg` in
the LFSR register itself rather than in a separate 128-bit register and
copying it.

**Generation** (`phase = 3`). The ring runs scrambled with the final gammas,
the states left by step 2 and the new seed. `seq_valid` is high and `seq`
carries a new word every cycle.

```
clock edge:   0        1 .. 128         129 .. 256        257 ...
start:        1        0                0                 0
phase:        0/any -> 1 (step 1)       2 (step 2)        3 (run)
seq_valid:    0        0                0                 1 1 1 ...
```

`mvlm_key_init_ctrl` sequences the phases. It is a 7-bit counter and a 2-bit
phase register. `start` is accepted in any phase, so a new key can be loaded
at any time.

## Interface of `mvlm`

| port        | dir | width   | meaning |
|-------------|-----|---------|---------|
| `clk`       | in  | 1       | clock; all registers on the rising edge |
| `rst_n`     | in  | 1       | asynchronous active-low reset; design goes to idle |
| `start`     | in  | 1       | one-cycle pulse: take `key` on this edge and begin key initialization |
| `key`       | in  | Q*M     | the key; `key[Q*M-1]` is its first bit |
| `seq`       | out | OUT_W   | output word; combinational from the ring registers |
| `seq_valid` | out | 1       | generation phase: `seq` is a new word every cycle |
| `phase`     | out | 2       | 0 idle, 1 key-init step 1, 2 step 2, 3 generating |

| parameter | default | meaning |
|-----------|---------|---------|
| `Q`       | 32      | precision of each map, in bits (even) |
| `M`       | 4       | number of coupled maps (1 .. Q/2); key and LFSR are Q*M bits |
| `OUT_W`   | 32      | bits per cycle delivered by the output function |
| `LX_TAPS` | x^128+x^126+x^101+x^99+1 | LFSR feedback taps, bit e-1 set for term x^e |

For another `Q*M` you must supply `LX_TAPS` for a primitive polynomial of
that degree. The default only truncates the 128-bit one. For `M` maps the
key layout generalizes: gamma_i takes key half-word `i` and x_i takes key
half-word `M+i`, counting Q/2-bit half-words from the key's MSB.

At the published operating point (100 MHz in a 0.18 um process) the
generator gives 3.2 Gbit/s for any M from 1 to 4.

## Top level and the single-VLM generator

`chaotic_generator_top` places the two generators side by side. They share
only the clock and reset. The `mvlm_*` ports are those of `mvlm`. The
`svlm_*` ports are those of a separate `scrambled_vlm`, the smaller generator:
one 32-bit map and one 32-bit LFSR, about a quarter of the four-VLM
generator, also at one word per cycle. It has no key schedule: gamma, the
initial state and the LFSR seed are loaded directly.

`scrambled_vlm` has its own small interface. A `load` pulse stores `gamma_in`,
`x0_in` and `n0_in`. Each cycle with `enable` high it takes one step. `xbar`
is the registered output word, and `valid` rises after the first step.
Loading an all-zero LFSR seed turns the scrambling off: the LFSR stays at
zero, and the block iterates the plain map `x <- VLM(gamma, x)`. This is
handy for studying the map itself.

## Where this RTL makes its own choices

These points are not fixed by the source description of the generator.
They are choices of this design, and you can change them:

* The 128-bit LFSR polynomial `x^128+x^126+x^101+x^99+1`. It is primitive,
  but any primitive polynomial of degree 128 fits the design. Outputs depend
  on this choice, so they will not match another implementation bit for bit
  unless it uses the same polynomial.
* The Fibonacci form of every LFSR.
* A register at each VLM input (a four-stage ring) rather than one long
  combinational chain per iteration (see the timing discussion above).
* The zero detector also replaces a zero `x`, not only a zero `gamma`.
* `n_reg` is the LFSR register itself.
* The step-1 gamma feedback bit is the LSB of the VLM output before
  scrambling.
* The `start` / `seq_valid` / `phase` handshake, the idle state after reset,
  the reset values, and the combinational (unregistered) `seq`.
* Not handled: the 2^-128 chance that step 2 leaves an all-zero LFSR seed.
  An all-zero seed would stop the LFSR. If you need a guarantee, force one
  bit of the seed.

## Files

| file | contents |
|------|----------|
| `rtl/mvlm_pkg.sv` | phase enum, LFSR tap constants |
| `rtl/vlm_zero_detector.sv` | gamma LSB masking and zero replacement |
| `rtl/vlm_trunc_mult.sv` | multiplier keeping product bits [2Q-A-1 : Q-A] |
| `rtl/vlm_core.sv` | one combinational VLM step |
| `rtl/mvlm_lfsr.sv` | loadable left-shifting Fibonacci LFSR with external shift-in |
| `rtl/scrambled_vlm.sv` | single VLM with LFSR scrambling |
| `rtl/mvlm_key_init_ctrl.sv` | phase sequencer for key initialization |
| `rtl/mvlm.sv` | the four-VLM generator |
| `rtl/chaotic_generator_top.sv` | top level: four-VLM generator and single scrambled VLM side by side |
| `tb/vlm_ref_pkg.sv` | reference models of the map and the LFSR, from the arithmetic definitions |
| `tb/mvlm_monitor.sv` | cycle-accurate model of `mvlm` that checks its ports every cycle |
| `tb/mvlm_checker.sv` | drives an `mvlm` of any size through several keys, checked by the monitor |
| `tb/tb_*.sv` | self-checking testbenches, listed below |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a cycle-count watchdog.

* `tb_vlm_zero_detector`, `tb_vlm_trunc_mult`: corner cases and random
  operands against integer arithmetic.
* `tb_vlm_core`: golden values computed with exact rational arithmetic at 32
  and 16 bits, the first eight states of the trajectory from
  `gamma = 0.609375`, `x0 = 0.21875`, and thousands of random operands
  checked against the reference model.
* `tb_mvlm_lfsr`: a 4-bit instance must have period 15 and visit every
  non-zero state. The 32-bit instance is compared with a bit-serial model
  under random load, shift-in, step and hold.
* `tb_scrambled_vlm`: every output word is compared with the model, with
  random pauses and a start from x0 = 0.
* `tb_mvlm_key_init_ctrl`: exact phase lengths, and restarts in any phase.
* `tb_mvlm`: the whole generator at its default size against a
  cycle-accurate model of load, step 1, step 2 and generation. It checks
  that the first word arrives exactly 257 edges after `start`, that keys 0
  and 1 (one bit apart) give different sequences, and that key load, gamma
  feedback, `n_reg` collection, generation, the zero detector and a restart
  each happen.

* `tb_chaotic_generator_top`: the top level at its default parameters.
  Both generators run at the same time. The four-VLM generator is checked
  by `mvlm_monitor` through five keys, including a restart during step 2
  and one during generation. The scrambled VLM is checked word by word with
  random pauses. Every mechanism listed above must occur at least once.
* `tb_mvlm_sizes`: generators with one, two, three and four coupled maps,
  and the four-map generator with an 8-bit output function. Each is checked
  against the model, including the `2*Q*M + 1` start-to-first-word latency.
* `tb_scrambled_vlm_precision`: scrambled maps of 16, 20, 24 and 32 bits,
  each with its own primitive LFSR, plus the plain (unscrambled) map
  against exact reference values.
* `tb_scrambled_vlm_cycle`: checks the cycle-length guarantee exhaustively
  on 8- and 10-bit scrambled maps. Once past its transient, the joint state
  (x, n) must repeat with a period that is a multiple of `2^q - 1`. The
  measured periods are 510 and 1023. The unscrambled 8-bit map from the same
  start falls into a cycle of length 3.
* `tb_mvlm_stats`: statistical spot checks.
  - The fraction of ones of a scrambled VLM with `gamma = 0x10001000` over
    3.2 Mbit is 0.5001.
  - The SP800-22 frequency (monobit) test on 10^6 bits of the four-VLM
    generator gives `|S|/sqrt(n) = 0.67`; the pass limit is 2.576.
  - The cross-correlation of the sequences for keys 0 and 1 is below 0.02
    for lags -5..5.

  The full SP800-22 and TestU01 suites need 10^8 to 10^11 output words,
  far beyond RTL simulation. Run them on words dumped from a fast model, or
  from the hardware.

To run one testbench with Verilator (5.x), from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/mvlm_pkg.sv tb/vlm_ref_pkg.sv tb/tb_mvlm.sv --top-module tb_mvlm
./obj_dir/Vtb_mvlm
```

Each testbench finishes in well under a second. The RTL is lint-clean under
`verilator --lint-only -Wall` apart from two kinds of intentional
unused-bit warnings: the discarded low product bits in `vlm_trunc_mult`,
and gamma's two LSBs, which the zero detector masks off.
