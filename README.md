# 32-bit unsigned multipliers built from CLA, carry select and error tolerant adders

A 32 x 32 -> 64-bit unsigned multiplier can be built as a chain of 32 adders.
Each adder handles one bit of the multiplier. The speed, area and accuracy of the
multiplier then depend almost entirely on which adder sits in that chain. This RTL
builds the same adder-chain multiplier three times, each with a different adder:

| variant | adder in every stage | product |
|---|---|---|
| CLAA multiplier | carry look-ahead adder, 4-bit look-ahead groups | exact |
| CSLA multiplier | carry select adder, 4-bit blocks | exact |
| ETA multiplier  | error tolerant adder, 16 exact high bits + 16 carry-free low bits | approximate |

The design also includes a sequential shift-and-add multiplier. It runs the same
algorithm one step per clock and takes 32 clocks per product. The top module
`mult32_top` holds all four multipliers side by side. Each has its own ports.

## The algorithm: shift-and-add

Think of a 64-bit product register. Its lower half starts as the multiplier `b`
and its upper half starts at zero. The algorithm repeats 32 times:

1. If the register's LSB is 1, add the multiplicand `a` to the upper half. The add
   yields a 33-bit value: the carry, then 32 sum bits.
2. Shift that 33-bit value and the lower half right by one place. The carry enters
   the MSB, and the bit that drops out of the bottom is discarded.

After 32 steps the register holds `a * b`.

### Unrolled in space: `array_multiplier`

Stage `i` of the combinational multiplier is step `i` of the algorithm:

```
upper[0] = 0
stage i:  {c, s}  = upper[i] + a                (one W-bit adder)
          kept    = b[i] ? {c, s} : {0, upper[i]}
          prod[i] = kept[0]                      (the bit shifted out)
          upper[i+1] = kept[W:1]
prod[2W-1:W] = upper[W]
```

The module has no registers. Its critical path runs through all 32 adders, so the
adder's carry path is repeated 32 times along it. That is why the adder choice
matters. The lower product bits come out of the early stages. The upper half comes
out of the last adder. The adder is picked with the `KIND` parameter, which takes
`mult_pkg::ADD_CLAA`, `ADD_CSLA` or `ADD_ETA`. The default is `ADD_CSLA`.

### Unrolled in time: `shift_add_multiplier`

This module has these registers:

- `M`, which holds the multiplicand;
- `A`, the upper half of the product register;
- `Q`, the lower half, loaded with the multiplier;
- a step counter.

A single adder computes `A + M`. The control logic looks at `Q[0]` to decide
whether that sum is kept. It then shifts `{carry, A, Q}` right by one in the same
clock.

Handshake:

- `start` is sampled while the module is idle. It loads the operands and clears `A`.
- `busy` stays high for the 32 steps.
- `done` pulses for one cycle exactly 32 clocks after the edge that took `start`.
  `prod = {A, Q}` is then valid and holds until the next start.
- A `start` that arrives while `busy` is high is ignored.
- `rst_n` is an asynchronous, active-low reset.

Two assertions check the handshake: `done` never overlaps `busy`, and `done` lasts a
single cycle.

The classic drawing of this machine has a separate carry flip-flop `C`. Here the
adder carry goes straight into `A`'s MSB during the same step, so `C` would always
read zero between steps and is not built.

## The three adders

All three are combinational. `adder_select` builds one of them for a given `KIND`,
with its carry-in tied to 0.

### Carry look-ahead adder (`cla4`, `claa`)

`cla4` is a 4-bit group. It forms `G_i = a_i & b_i` and `P_i = a_i ^ b_i`. It then
writes each carry `C1..C4` as a flat sum of products of G, P and `C0`, so nothing
ripples inside the group. `S_i = P_i ^ C_i`.

`claa` chains eight of these groups. The carry ripples from one group to the next,
one group per step. There is no second level of look-ahead.

### Carry select adder (`csla`, `ripple_carry_adder`)

- The lowest 4 bits are one 4-bit ripple-carry adder fed by `cin`.
- Each higher 4-bit block has two ripple-carry adders running in parallel: one
  assumes carry-in 0 and the other assumes carry-in 1.
- When the real carry arrives from the block below, one 2:1 mux picks the block's
  sum and another picks its carry-out.

After the first block, the carry passes through one mux per block instead of
through four full adders. `BLK` (default 4) sets the block size.

### Error tolerant adder (`eta_adder`)

This is the only part of the design that does not compute an exact result. The
operands are split at bit `L` (default 16):

- **Accurate part**, bits `W-1..L`: an ordinary ripple-carry adder with carry-in 0.
  Its carry-out is the adder's `cout`.
- **Inaccurate part**, bits `L-1..0`: no carry is made at all. The bits are scanned
  from bit `L-1` downwards. While the two input bits are `00`, `01` or `10`, the sum
  bit is `a ^ b`. At the first position where both bits are 1, that bit and every
  bit below it are set to 1. No carry passes into the accurate part.

In hardware the scan is a prefix OR running from the MSB down. A "control unit"
computes `ctl[i] = |(a[L-1:i] & b[L-1:i])`. The "carry-free addition block" then
computes `sum[i] = ctl[i] | (a[i] ^ b[i])`. Only the accurate part has a carry
chain, and it is `W-L` bits long.

Worked example with W=8 and L=4: 183 + 109.

- Accurate part: `1011 + 0110 = 10001`.
- Inaccurate part: `0111` and `1101` first meet a 1/1 pair at bit 2, so the result
  is `1111`.
- Result: `1_0001_1111` = 287, against the exact 292.

Error measures:

- The overall error is `OE = |exact - approx|`.
- The accuracy is `ACC = (1 - OE/exact) * 100 %`.
- For one addition, the error is always below `2^L`. A dropped carry is worth
  `2^L`, but setting the lower bits to 1 wins back most of it.

In the ETA multiplier every one of the 32 additions makes this kind of error. The
errors add up in the low half of the product and, through the shifts, in the carry
into the upper half. Over 20,000 random 32-bit operand pairs, the bit-exact
reference model gives a mean ACC of about 99.996 % and a worst case of about
91.8 %. The RTL matches that model bit for bit.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `array_multiplier`, `shift_add_multiplier` | `W` | 32 | operand width (product is 2W) |
| | `KIND` | `ADD_CSLA` | adder type |
| | `L` | W/2 | ETA split, used only when `KIND == ADD_ETA` |
| `claa` | `W` | 32 | must be a multiple of 4 |
| `csla` | `W`, `BLK` | 32, 4 | W must be a multiple of BLK |
| `eta_adder` | `W`, `L` | 32, 16 | `1 <= L < W` |
| `ripple_carry_adder` | `W` | 4 | |
| `mult32_top` | `W` | 32 | width of all four multipliers |

## Where this RTL makes its own choices

These points were decided here, because the description this design is based on
does not fix them:

- **32-bit CLA.** Only the 4-bit look-ahead equations are given. The 32-bit adder is
  built from eight 4-bit groups that ripple into each other, with no second-level
  look-ahead.
- **32-bit carry select adder.** The arrangement is given only for 8 bits, with
  4-bit blocks. The 32-bit adder repeats the same 4-bit block seven times above the
  lowest one.
- **ETA split and conventional adder.** The ETA split point and the type of its
  "conventional" adder are not specified. This design uses an equal 16/16 split, as
  in the equal split of the 8-bit example, and a ripple-carry adder.
- **ETA multiplier.** It is the same adder-chain multiplier with the ETA in every
  stage. A modified Booth multiplier that uses the ETA only for its MSB-side
  additions is mentioned as an alternative, but it is not described, so it is not
  built.
- **Sequential multiplier interface.** The clocking and handshake (one step per
  clock, start/busy/done, asynchronous reset) are this design's own.
- **Side-by-side top.** Putting all four multipliers next to each other in one top
  is meant for comparison and testing. A real product would keep one of them.

Reported FPGA results for this family of designs give about 98.5 ns (CLAA) and
99.5 ns (CSLA) worst-case combinational delay for the 32-bit array multiplier. They
give 2957 and 2039 logic elements respectively on a Cyclone II device, and
about 95 ns and 2021 elements for the ETA version. Those results come from a
different implementation of the same structure. This RTL has not been timed or
placed on an FPGA.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_ripple_carry_adder`, `tb_cla4`: exhaustive over all 4-bit operand pairs and
  both carry-ins. The ripple-carry adder also gets random 16-bit pairs.
- `tb_claa`, `tb_csla`: corner cases, including full-length carry chains, plus 5000
  random pairs, all compared against integer addition. Each also counts block
  carries of both values.
- `tb_eta_adder`: the 183 + 109 = 287 example, then all 65,536 pairs of 8-bit
  operands with a 4/4 split, then 5000 random 32-bit pairs. Results are compared
  with a step-by-step model of the procedure in `tb/mult_ref_pkg.sv`. The testbench
  also checks that the error stays below `2^L`.
- `tb_array_multiplier`: all three adder kinds at 32 bits, on three reference
  operand pairs, corner cases and 3000 random pairs. One reference pair is
  3782682799 x 1404927549 = 5314395273443529651. CLAA and CSLA must be exact. ETA
  must match the reference shift-and-add with ETA additions. An 8-bit instance is
  also checked exhaustively.
- `tb_shift_add_multiplier`: checks the product, the 32-cycle latency, `busy`, the
  single-cycle `done`, and that a start while busy is ignored. It runs 306 products
  each for the CSLA and ETA adder versions.
- `tb_mult32_top`: runs the whole top at its default parameters. It applies 207
  operand pairs to all four multipliers. It counts each mechanism and fails if any
  one never happened:
  - a stage that adds and a stage that passes;
  - a carry select block choosing carry 1 and carry 0;
  - the ETA "set lower bits to 1" rule firing;
  - an exact ETA product and an approximate one;
  - a start ignored while busy.

All testbenches pass. Each one was also run against a deliberately broken copy of
its module, and each caught the fault.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mult_pkg.sv tb/mult_ref_pkg.sv tb/tb_mult32_top.sv --top-module tb_mult32_top
./obj_dir/Vtb_mult32_top
```

To run a different testbench, change the last file and `--top-module`. For lint
only, use `verilator --lint-only -Wall -Irtl -y rtl rtl/mult_pkg.sv rtl/<module>.sv`.
The testbenches use `$urandom` and plain delays. Every testbench finishes in
seconds.

Lint gives two notes. One is `SYNCASYNCNET`: `rst_n` is used both as the flops'
asynchronous reset and as the `disable iff` of the handshake assertions. The other
is an unused package constant in modules that do not need it.

## Files

- `rtl/mult_pkg.sv`: the `adder_kind_e` enum and `MULT_W`.
- `rtl/full_adder.sv`, `rtl/ripple_carry_adder.sv`: FA cell and ripple-carry adder.
- `rtl/cla4.sv`, `rtl/claa.sv`: carry look-ahead group and 32-bit CLA adder.
- `rtl/csla.sv`: carry select adder.
- `rtl/eta_adder.sv`: error tolerant adder.
- `rtl/adder_select.sv`: builds one of the three adders for a given `KIND`.
- `rtl/array_multiplier.sv`: combinational adder-chain multiplier.
- `rtl/shift_add_multiplier.sv`: sequential multiplier.
- `rtl/mult32_top.sv`: the four multipliers side by side.
- `tb/mult_ref_pkg.sv`: reference models for ETA addition and shift-and-add
  multiplication.
- `tb/tb_*.sv`: one testbench per module.
