# Low power BIST for a multiplier-accumulator datapath

Most of the power a processor or DSP datapath burns goes into its multiplier.
During built-in self-test it gets worse. A classical pseudorandom pattern
generator (an LFSR) changes about half of the multiplier's input bits on
every clock, and that activity ripples through the whole array.

This design tests a multiplier-accumulator pair with deterministic patterns
in which **at most one multiplier operand bit changes from one test vector to
the next**. The patterns are built from an 8-bit Gray counter. Its high bits
are repeated across the X operand and its low bits across the Y operand, and
the operands are reloaded one slice at a time. A repeated pattern like this
exercises every cell of a regular multiplier array the same way, so a small
set of patterns still tests the whole array. Loading one slice at a time
spreads each one-bit counter change out over many vectors. The datapath's
own accumulator compacts the products into a signature, so no separate
response analyser is needed.

The RTL is parameterised SystemVerilog (IEEE 1800-2017). It is synthesizable
apart from the assertions, and it is written for 16-bit operands.

## Block structure

```
                    lp_bist_datapath
 bist_start ──► bist_controller ──clr/run──► lp_tpg ───────────────┐ x, y
                    │   ▲ last                 ├ gray_counter (8 bit) │
                    │   └──────────────────────├ enable_generator     ▼
                    │                          └ slice_reg x NE    ┌─────┐
 a_in, b_in ────────┼──────────────────────────────────────────►  │ mux │ test_mode
                    │                                              └──┬──┘
                    │                                     op_x, op_y  ▼
                    │                       csa_multiplier  or  booth_wallace_multiplier
                    │ acc_en/clr                                      │ product (2N)
 mac_en, acc_clr ───┴────────────────► mac_accumulator (cla_adder or brent_kung_adder)
                                                                      │
                                                                  acc_out (signature)
```

| file | what it is |
|---|---|
| `rtl/lp_bist_pkg.sv` | architecture enums, slice widths per multiplier |
| `rtl/lp_bist_datapath.sv` | top: operand multiplexer, multiplier, accumulator, self-test logic |
| `rtl/lp_tpg.sv` | the low power test pattern generator |
| `rtl/gray_counter.sv` | W-bit Gray code counter |
| `rtl/enable_generator.sv` | one-hot ring producing the slice load enables |
| `rtl/slice_reg.sv` | one operand slice register (EN/D/Q) |
| `rtl/csa_multiplier.sv`, `rtl/full_adder.sv` | carry-save array multiplier |
| `rtl/booth_wallace_multiplier.sv` | radix-4 Booth encoded Wallace tree multiplier |
| `rtl/cla_adder.sv` | two-level carry lookahead adder |
| `rtl/brent_kung_adder.sv` | Brent-Kung parallel prefix adder |
| `rtl/mac_accumulator.sv` | accumulator register plus the selected adder |
| `rtl/bist_controller.sv` | self-test sequencer |

## The pattern generator (`lp_tpg`)

This block is the heart of the design. Its parameters are the operand width
`N` and the pattern widths `XSW` (for X) and `YSW` (for Y). The Gray counter
is `XSW+YSW` = 8 bits wide in both configurations.

* **Operand slices.** X is split into `NX = ceil(N/XSW)` slice registers and Y
  into `NY = ceil(N/YSW)` slice registers. Every X slice is loaded with the
  counter's high `XSW` bits and every Y slice with its low `YSW` bits. Once a
  code has been loaded everywhere, `X[i] = gray[YSW + i mod XSW]` and
  `Y[i] = gray[i mod YSW]`. A top slice narrower than the pattern (which
  happens with 3- and 5-bit patterns on 16 bits) takes the low bits of the
  pattern.
* **Enable generator.** A one-hot ring raises exactly one load enable per
  clock while `run` is high. The order is E1..E`NY` for the Y slices (least
  significant first), then the X slices in the same order. In the cycle of
  the last enable it also steps the Gray counter. That clock edge copies the
  old code into the last slice and moves the counter to the next code. The
  next cycle starts loading the new code at E1.
* **Why only one bit changes.** Consecutive Gray codes differ in a single
  bit, which lies in either the X or the Y pattern. Each slice reload
  therefore changes that one bit, if the slice contains it, or nothing.
  About half of all loads change no bit at all.
* **Test length.** One test is `2^(XSW+YSW) x (NX+NY)` vectors. The default
  (N = 16, 4-bit patterns, 8 slices) gives 256 x 8 = 2048 = 256·N/2. The
  Booth configuration (3-bit X, 5-bit Y: 6 + 4 slices) gives 2560. `last` is
  high in the cycle of the final load. At that point the counter is wrapping
  back to 0 and the ring is back at E1.

Slice widths per multiplier come from `lp_bist_pkg`:

* carry-save array: 4-bit X and 4-bit Y patterns
* Booth Wallace tree: 3-bit X and 5-bit Y patterns

## The datapath and a self-test (`lp_bist_datapath`)

**Normal mode.** The multiplier sees `a_in` and `b_in` directly. On a clock
with `mac_en` high, the accumulator adds the product. `acc_clr` clears the
accumulator and wins over `mac_en`.

**Self-test.** A one-cycle `bist_start` in normal mode begins a self-test,
and `test_mode` rises. While the test runs, `a_in`, `b_in`, `mac_en` and
`acc_clr` are ignored. The controller steps through these states:

| state | cycles | what happens |
|---|---|---|
| CLEAR | 1 | pattern generator (counter, ring, slice registers) and accumulator cleared |
| RUN | `NVEC` | one slice load per clock; the accumulator adds the product of the vector loaded on the previous edge (the first add is 0 x 0) |
| DRAIN | 1 | the product of the final vector is added; `bist_done` is high |
| IDLE | | `test_mode` low, `acc_out` holds the signature until the accumulator is used again |

From the `bist_start` edge to `bist_done` there are `NVEC + 2` clock edges:
2050 at the defaults and 2560 + 2 with the Booth multiplier. The signature
can be read on the cycle after `bist_done`. Because the generator is cleared
at every start, every test produces the same signature.

The signature is the sum of all products modulo `2^AW` (`AW = 2N = 32`). The
accumulator's adder is part of the circuit under test, so it is exercised
during the test as well. Reference signatures for a fault-free 16-bit
datapath are `32'hfc000200` (carry-save array) and `32'hfb000280` (Booth
Wallace tree). They do not depend on which adder is used. The testbench works
them out independently with a reference model.

## Arithmetic units

The multipliers and adders are the units under test. Parameters select one
multiplier and one adder:

* `MULT_ARCH`: `MULT_CSA` (default) or `MULT_BWM`
* `ADD_ARCH`: `ADD_CLA` (default) or `ADD_BKA`

All of them are unsigned and purely combinational.

* **`csa_multiplier`**: AND-gate partial products and `N-1` rows of full
  adders. Carries go straight down to the next row in carry-save form. A
  ripple-carry merging row at the bottom produces the upper half of the
  product.
* **`booth_wallace_multiplier`**: the Y operand, zero-extended, is recoded
  into radix-4 digits in {-2..+2}, giving `N/2+1` partial-product rows.
  Negative digits invert their row, and the "+1" of each negation goes into
  one extra row. A word-level Wallace tree of 3:2 carry-save adders reduces
  the rows to two: for N = 16 that is 10 → 7 → 5 → 4 → 3 → 2. A behavioural
  `+` adds the final two rows.
* **`cla_adder`**: per-bit generate and propagate, 4-bit groups (`GW`), and
  a second level that computes the carry into every group directly from the
  group signals.
* **`brent_kung_adder`**: a standard Brent-Kung prefix network with an
  up-sweep and a down-sweep; `W` must be a power of two. The carry-in is
  folded into bit 0.

## Choices made in this RTL

The following are this design's own choices, not given by the scheme:

* **Reset and clear.** There is an asynchronous active-low reset. The
  pattern generator also has a synchronous clear, so every test starts from
  all-zero operands.
* **Enable order.** Which enable loads which slice, including the "Y first"
  order, is this design's choice.
* **Narrow slices.** The rule for the narrower top slice in the 3/5-bit
  configuration is this design's own.
* **Operands.** Operands are unsigned.
* **Accumulator.** It is 2N bits wide and compacts by plain modulo addition.
  That is cheap but aliases more easily than a MISR (a multiple-input
  signature register). No fault simulation was done with this RTL, so fault
  coverage figures for the scheme (about 100% for the array multiplier and
  99.9% for the Booth multiplier) are not reproduced here.
* **Sequencing.** The controller's states and the `bist_start`/`bist_done`
  handshake are this design's own.
* **Multiplier and adder internals.** The internal structure of each
  multiplier and adder is a textbook form of the named architecture. The
  scheme names these units only by type.

The power figures that motivate the scheme (roughly a 4x lower average
power per vector pair than a 500-vector LFSR test, in a 0.8 µm cell library)
depend on gate-level power analysis. This RTL does not measure them. The
LFSR generator used as the comparison point is not part of the design.

## Verification

Each module except the one-bit `full_adder` cell has a self-checking
testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* **Multipliers and adders** are checked against the `*` and `+` operators:
  corner cases and random operands at 16/32 bits, and exhaustively at 8 bits.
* **`tb_lp_tpg`** runs the 4/4-bit and 3/5-bit generators side by side. It
  compares every vector with a reference model (`tb/lp_tpg_model_pkg.sv`),
  checks the one-bit-change property, and checks test lengths of 2048 and
  2560.
* **`tb_lp_bist_datapath`** runs four datapaths side by side, one for each
  multiplier/adder pair. The first has every parameter at its default. The
  test does the following:
  * interleaves normal multiply-accumulate traffic with two complete
    self-tests;
  * checks every test vector, the cycle count and the signature;
  * checks that the signature is repeatable;
  * counts each mechanism (mode switches, loads that change a bit and loads
    that do not, Gray code advances, final loads, done pulses, accumulations
    and clears) and fails if any of them never happened.
* **`tb_lp_bist_datapath_full`** uses the top with no parameter overrides.
  It runs one full 2048-vector self-test with every vector checked, between
  two stretches of normal traffic.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lp_bist_pkg.sv tb/lp_tpg_model_pkg.sv tb/tb_lp_bist_datapath.sv \
    --top-module tb_lp_bist_datapath -o sim
./obj_dir/sim
```

Replace the testbench name to run any other block's test. A full-size
self-test is about 2000 cycles and takes well under a second.

Each package must be listed before the modules that import it: the RTL
package first, then the testbench model package.
