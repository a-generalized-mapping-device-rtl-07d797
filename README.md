# A general-purpose bit-mapping unit for a micro-programmed computer

Computers spend much of their micro-code moving bits around: shifting,
masking, unpacking a character from a word, splitting a floating-point word
into exponent and fraction, or converting between the formats of two
machines. Each of these jobs usually has its own wiring in the datapath, and
anything that wiring does not cover costs a loop of single-place shifts.

This design replaces all of that with one unit. A **mapping** is any boolean
matrix `T` that says which input bit feeds which output bit:

```
b_j = OR over i of ( a_i AND t_ji )
```

One map can rotate, shift with sign extension, mask, reverse, pick out a
field, or scatter one bit into several places. The unit holds 512 such maps
and applies the selected one in a fixed time, whatever the map does. The RTL
here is the unit itself plus its connection to CIRRUS, an 18-bit
micro-programmed computer. The unit has 36 inputs and 18 outputs. It sits
beside the adder, takes both adder operands as its input, and its result
goes into one of the adder's result registers.

```
          m (18) ─┬──────────────► add_logic ──► a ──┐
          r (18) ─┼─┬────────────►   (+ & | ^)       │   lower_regs
                  │ │                                ├──► N, Z (18 each)
                  └─┴─► {m,r} ─► mapping_unit ─► q ──┘       │
                                   ▲ 512 maps, 36x18           │ low 9 bits
                                   │                           │
                                   L ◄── map_select_reg ◄──────┘  (load from N or Z, +1)
  control word C1..C36 ┐
  timing pulses W..    ├─► map_sup_control ─► T_q clear, T_map, T_L, K_L
                       ┘
  Z:N (36) ─► shift_detector ─► shift length for normalisation
```

## The mapping unit

Computing `b_j` directly from the address and the data would need a gate
network of several thousand gates for each of the 512 maps. The unit splits
the problem in two instead.

1. **Decode the address into a whole matrix (`map_store`).** The store works
   like a read-only memory in which one address line yields a full 36 x 18 bit
   matrix. The original hardware does this with one drive wire per map,
   threaded through a grid of transformers at exactly the crossings where the
   map has a 1. Here it is a memory array `mem[512][36][18]` that is read
   whole in one clock. Row `i` of a map is the set of outputs that input bit
   `i` drives.
2. **Apply the matrix (`switch_matrix`).** Each crossing of input line `a_i`
   and output line `b_j` has a switch that is closed when `t_ji = 1`. An
   output with no closed switch reads 0. If several switches on one output
   are closed, the output is their OR. The RTL is the plain AND/OR form of
   that.
3. **Capture the result (`q`).** The output flip-flops can only be set. They
   are cleared at the start of each micro-instruction (`T_q clear`), and a
   mapping then ORs the switch outputs into them. Two mappings with no clear
   between them therefore give the OR of both results. That is a feature:
   two 18-bit halves can be merged this way.

The store has a write port (`prog_en`, `prog_addr`, `prog_row`,
`prog_pattern`) that writes one 18-bit row at a time. It stands in for the
wiring of the physical store, which would be fixed at manufacture. There is no
reset, so the store must be written before use.

An optional extra input that is always 1 (`CONST_ONE = 1`, stored as row
`N_IN`) lets a map inject constant ones into the output. The CIRRUS unit is
built without it (the default is 0), but the 8 x 8 test instance uses it.

### Timing of one mapping (`map_local_control`)

The unit runs its own short sequence once it is started:

| clock after `t_map` | step | effect |
|---|---|---|
| 0 (the `t_map` edge) | load | input buffers capture `a_in` |
| 1 | decode | store read at `sel_addr` |
| 2 | drive | `q <= q | b` |
| 3 | valid | `q_valid = 1`, `busy = 0` |

`sel_addr` is sampled one clock after `t_map`. So a selection register loaded
on the same edge as `t_map` is already in use. A `t_map` that arrives while
the unit is busy is ignored, and an assertion reports it. `t_q_clear` clears
`q` and `q_valid`. The three-clock latency is a choice of this design. The
original unit is an analog circuit that aims at about 0.1 µs per map, which
is no longer than one adder operation.

## Fitting the unit into CIRRUS (`cirrus_map_top`)

The host is not built here (see the last section). Its control word, timing
pulses and adder operands are ports of the top.

**Where the data comes from.** The unit's 36 inputs are the two adder operands
`{m, r}`, with `m` as the upper half. An 18-bit job uses one half and leaves
the other half unused: the operand there is zero, or no row of the map uses
it. A 36-bit job (a double-length shift) uses both halves and needs two maps,
one for each 18-bit half of the result.

**Where the result goes.** The lower-register selector used to have an input
for "adder result shifted left one place". That input now carries `q`, since
any left shift can be done by a map. `N` or `Z` takes one of these:

- the adder result `a`;
- the mapping result `q`;
- `a` shifted right one place, for `N` only;
- a double-length right shift in which the carry enters `Z` from the top and
  the low bit of `a` enters `N` from the top;
- an 18-bit literal from the control word.

**Which map (`map_select_reg`).** The 9-bit register `L` holds the address of
the map. It is loaded from the low 9 bits of `N` or of `Z` when the upper
registers are set. It can be stepped by one after a mapping, which lets a
36-bit job use maps `x` and `x + 1` with no address arithmetic. The count
wraps modulo 512, and a load wins over a step in the same clock.

**When (`map_sup_control`).** The strobes come from these equations. A prime
marks an inverted bit, and `Ck` is bit k of the control word:

```
T_q clear = W_da
T_map     = W1(RP)·C1'C2'C3  +  W3·C21  +  W_R·C1'C2C3
T_L       = W1(RP)·C24
L source  = Z if C25 else N
K_L       = W2(R)·C1'C2'C27  +  W4·RT'·C27
```

The three terms of `T_map` start the unit at different points, depending on
the kind of instruction:

- `W1(RP)·C1'C2'C3`: register-only instructions, as the upper registers are
  set.
- `W_R·C1'C2C3`: register-store instructions, once the store read is done.
- `W3·C21`: main-store instructions, when `C21` is set.

The `W` pulses come from the host's timing chain. Here each is a one-clock
strobe in the `timing_t` struct. A `w_low` strobe is added to mark the moment
when `N` and `Z` are set.

**One micro-instruction, as the top's testbench drives it:**

1. `w_da`: `q` is cleared.
2. `w1_rp`: `L` may be loaded, and the mapping starts, with `{m, r}` captured.
3. Wait for `q_valid`.
4. `w_low`: `N` or `Z` takes `q` (or `a`).
5. `w2_r` / `w4`: `L` may be stepped.

An assertion in the top reports any attempt to store `q` before it is valid.

### Control-word fields this design had to choose

The mapping-unit equations above are the source's own. The positions of the
other fields, listed below, were worked out from a micro-program simulator and
are less certain. If your control-word layout differs, change the functions in
`map_pkg` and the `sel` assignment in the top.

| field | bits | values |
|---|---|---|
| instruction type | C1..C3 | 000 MP, 001 FA, 010 AXY, 011 AY, 100 SJ, 101 SR, 110 AX, 111 JP |
| adder function | C25..C27 | C26 = 0 add; C26 = 1: C27 → XOR, else C25 → AND, else OR |
| lower-register select | C34..C36 | 0 N←a, 1 N←q, 2 N←a>>1, 3 hold, 4 Z←a, 5 Z←q, 6 Z:N←a>>1 (double), 7 none |
| SR literal | {C10..C13, C20..C33} | 18-bit value; C36 = 1 loads it, C34 picks Z over N |

In this layout C25 and C27 serve both the adder and the `L` control. A
micro-instruction that loads `L` from `Z` or steps `L` therefore also fixes
part of its adder function, and micro-code must be written with that in mind.

## The normalisation shift detector (`shift_detector`)

A signed fraction is normalised when its sign bit differs from the next bit.
The shift it needs is the position of the first pair of adjacent bits that
differ. The detector works as follows:

- An XOR on every adjacent pair gives its difference signal.
- An inhibit chain from the most significant end lets only the first
  difference through, so the result is one-hot.
- An encoder turns that one-hot signal into the shift length.

The length can load `L` (through `N`), so two maps normalise a 36-bit value in
one step. `none` is set when no pair differs: the value is zero, or minus zero
in one's complement.

In two's complement, one case needs care: a value of the form `11…1100…0`. By
the first-difference rule it would be shifted to `100…0`, which is -1, when it
should go to `1100…0` (-1/2). With `RADIX_COMPLEMENT = 1` the detector spots
that pattern and shifts one place less. The source does not cover the
all-ones word. This design treats it as the same pattern with no zeros: the
shift is `WIDTH - 2` and `none = 0`. The six-bit shift length is plain binary.
In the top, the detector watches the 36-bit double-length result `Z:N`, with
`Z` as the upper half.

## Writing maps

Row `i` of map `s` is written with `prog_addr = s`, `prog_row = i`, and
`prog_pattern` set to the output bits that input bit `i` drives. Input bit `i`
is bit `i` of `{m, r}`: bits 35..18 are `m` and bits 17..0 are `r`. Some
useful maps:

- **Left shift of a 36-bit value `{m, r}` by `k`:**
  - map `2k` gives the upper result half: row `i` drives bit `i + k - 18`
    when that lies in 0..17;
  - map `2k + 1` gives the lower half: row `i` drives bit `i + k` when that
    lies in 0..17.

  All 36 distances take 72 of the 512 maps.
- **Arithmetic right shift of `r` by `k`:**
  - row `i` drives bit `i - k`;
  - the sign row (17) also drives the top `k` bits;
  - the rows of `m` are empty, a null map over that half.
- **Character `k` of six 6-bit characters:** row `35 - 6k - 5 + b` drives bit
  `b`, for `b` in 0..5. The character index can be the low part of a
  character address.
- **A 9-bit field of a half-word into the top nine bits:** the adder then
  works on the field alone. Its carry falls off the top, so the field wraps at
  9 bits without disturbing its neighbour. A packing map puts two such fields
  back into one word.
- **Floating-point word (fraction in bits 35..8, exponent in 7..0):**
  - one map passes `m` through as the upper fraction half;
  - a second keeps bits 17..8 and leaves eight zeros below them;
  - a third copies the exponent and lets its sign row drive bits 17..7, which
    sign-extends it.

  After the exponent is updated, one more map takes the lower fraction half
  from `m` and the exponent from `r` and rebuilds the lower word.
- **Overflow portion of a left shift by `k`:** two further maps gather bits
  `35-k..35` of the operand. If their OR is nonzero, the shift overflows: a
  bit is lost or the sign changes.

## Files

| file | what it is |
|---|---|
| `rtl/map_pkg.sv` | sizes, control-word type `creg_t` (bits numbered 1..36), enums, timing struct, field-decode functions |
| `rtl/switch_matrix.sv` | crosspoint array, `N_IN` x `N_OUT` |
| `rtl/map_store.sv` | 2^`ADDR_W` transfer matrices, whole-matrix read, row write |
| `rtl/map_local_control.sv` | load / decode / drive / valid sequence |
| `rtl/mapping_unit.sv` | the complete unit: input buffer, store, switches, output buffer |
| `rtl/map_select_reg.sv` | selection register `L` |
| `rtl/map_sup_control.sv` | strobe equations |
| `rtl/add_logic.sv` | 18-bit add / AND / OR / XOR with carry |
| `rtl/lower_regs.sv` | `N`, `Z` and their selector |
| `rtl/shift_detector.sv` | normalisation shift length |
| `rtl/cirrus_map_top.sv` | everything above wired together |

The defaults are the CIRRUS sizes: 36 x 18 maps, 512 of them, an 18-bit word
and a 36-bit shift detector. The store is 331,776 bits. Synthesis tools keep
it as a memory.

## Simulating

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
ends. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/map_pkg.sv tb/cirrus_map_top_tb.sv \
          --top-module cirrus_map_top_tb -Mdir obj && obj/Vcirrus_map_top_tb
```

Replace the testbench name to run another one. `-Wno-fatal` is needed because
Verilator warns about the control word's ascending range `[1:36]`. That range is
deliberate: it keeps bit `c[k]` equal to control bit `Ck`.

| testbench | what it checks |
|---|---|
| `switch_matrix_tb` | worked rotation, sign-extension and masking examples on 8 x 8, random 36 x 18 against a reference |
| `map_store_tb` | all 512 maps written and read back, one-clock read, hold, rewriting one row |
| `map_local_control_tb` | step order, three-clock latency, clear, return to idle |
| `mapping_unit_tb` | worked examples with constant injection on 8 x 8; 300 random full-size maps with latency; OR accumulation; clear; a 4 x 4 unit running a bit-reversal map on every input |
| `map_select_reg_tb` | load from N / Z, step, wrap at 511, load over step |
| `map_sup_control_tb` | every combination of instruction type, pulses and C21/C24/C25/C27 against the equations |
| `add_logic_tb` | all functions, carries, corner cases |
| `lower_regs_tb` | every selector input and the literal path |
| `shift_detector_tb` | all 8-bit words for both variants, random and structured 36-bit words, against a shift-until-normalised reference |
| `cirrus_map_top_tb` | full-size end-to-end run (see below) |
| `map_workloads_tb` | on a full-size unit with the adder: character extraction (6 x 6-bit and 4 x 8-bit), 9-bit quarter-word add, copy and negate, the floating-point word (28-bit fraction, 8-bit exponent) split into its fixed-point parts and put together again, and 36-bit left shifts of every distance with overflow detection (two data maps plus two maps that gather the bits pushed out, ORed and tested for zero) |

`cirrus_map_top_tb` runs the top at its default sizes. It takes about half a
minute, build included. It writes 512 maps and then runs, as micro-
instructions:

- 36-bit left shifts for every distance, using two maps and a step of `L`;
- the same shift started by each of the three `T_map` terms;
- 18-bit arithmetic right shifts with `L` loaded from `N`;
- random maps;
- all four adder functions;
- the double-length right shift;
- literals;
- a full normalisation loop: the detector's length is turned into a map
  address by adding, then moved through `N` into `L`, then two maps are run.

It counts 16 mechanisms and fails if any of them never occurs. The mechanisms
include: `L` loaded from `N` and from `Z`; `L` stepped by `W2` and by `W4`;
each `T_map` start; `q` into `N` and into `Z`; each adder function; the double
shift; the literal; and the -1/2 case.

## How far to trust it, and where it departs from the source

- **Taken from the source:**
  - the mapping formula;
  - the two-part store-plus-switch structure and the set-only output buffer;
  - the 36 x 18 x 512 sizes;
  - the strobe equations;
  - `L` loaded from `N`/`Z` and stepped by one;
  - `q` replacing the left-shift input of the lower-register selector;
  - the difference-and-inhibit shift detector with its two's-complement
    correction.

  The testbenches check this design against its own models. The worked
  matrix examples come from the source.
- **Chosen here:**
  - the clocked timing: three clocks per map, and one-clock `W` strobes;
  - the control-word positions in the table above;
  - the reset values (all zero);
  - the `L` wrap and priority;
  - the store's write port;
  - the binary shift-length encoding;
  - the handling of the all-ones word;
  - the `Z:N` connection of the detector;
  - the carry-out flip-flop `G_o`, which every add loads, including one
    that sets neither `N` nor `Z`.
- **One worked example in the source is off by one bit.** A constant-injection
  example prints 11101011. Its own matrix gives 11111011, and the testbench
  expects 11111011.
- **Outputs driven by several inputs:** the source costs its switch array on
  the assumption that this never happens. The RTL gives the OR.
- **Not modelled:**
  - the host's control unit, its sequencer, and the stores that feed `m` and
    `r`;
  - the extra 19th bits of the host's registers;
  - the analog drive and sense circuits of the physical store.

  The top brings all the host signals out as ports.
