# HMuM: a field-programmable logic array with registered feedback

A programmable logic array (PLA) computes any set of Boolean functions
written as sums of products: an AND plane forms product terms from the inputs
and their complements, and an OR plane adds chosen products into each output.
This design makes both planes field-programmable through a single serial scan
chain, and adds a bank of feedback flip-flops so that outputs can be fed back
as inputs. With the feedback in use the array becomes a small reconfigurable
state machine: counters, shift registers and simple game controllers fit in
the same silicon as a seven-segment decoder.

This RTL models a small chip of that kind (originally drawn for a 0.6 µm
CMOS process in a 40-pin package) at the level of its configuration cells,
in synthesizable SystemVerilog.

| Size | Value |
|---|---|
| Inputs `din` | 8 |
| Product terms | 16 |
| Outputs `dout` | 16 |
| Feedback paths (outputs 7..0 to inputs 7..0) | 8 |
| Configuration bits | 2·8·16 + 16·16 + 8 = **520** |

## Data path

```
            din[7:0]                        feedback select (8 scan bits)
               │                                   │
               ▼                                   ▼
        ┌─────────────┐  ins[7:0]  ┌──────────┐ products ┌─────────┐  dout[15:0]
        │  muxslice   ├───────────►│ andblock ├─────────►│ orblock ├──────┬──────►
        └─────▲───────┘            └──────────┘  [15:0]  └─────────┘      │
              │ state[7:0]                                                │
        ┌─────┴─────────┐◄────────────────── dout[7:0] ───────────────────┘
        │ feedbackflops │  (logic clock, synchronous reset)
        └───────────────┘
```

* **muxslice**: for each input k, choose `din[k]` or the registered
  `dout[k]`, under control of feedback-select bit k.
* **andblock**: 8 rows (one per input) × 16 product columns. Each crossing
  is a `singleand` cell holding two bits: "pull the product down if the input
  is 1" and "pull it down if the input is 0". A product column is high only
  if nothing pulls it down, so it is the AND of the literals selected for it.
  An unprogrammed column is constantly 1; a column with both bits set for one
  input is constantly 0.
* **orblock**: 8 rows (one per pair of products, odd product first) × 16
  output columns. Each crossing is a `doubleor` cell holding one bit per
  product; output j is the OR of the products whose bit is set in column j.
* **feedbackflops**: 8 two-phase flops on the logic clock that register
  `dout[7:0]`. `reset` clears them at the next logic clock and leaves the
  configuration alone.

`dout` is purely combinational from `din` and the feedback state. Only the
feedback flops hold state between logic clocks.

### Bit lines and how they are modelled

In silicon every product and output column is a pseudo-nMOS NOR: a weak
pull-up holds the column high, and every programmed cell whose input is high
pulls it down through two series nMOS transistors. The OR plane follows its
NOR with an inverting buffer.

The RTL keeps the cell structure but not the wired bit line. Each
`configpull` cell reports a pulldown request `pd = a & stored_bit`. The block
that owns the column takes the NOR of all requests on it. The pull-up
devices, the clock buffers and the pad ring have no logic function beyond
this and are not modelled.

## The configuration chain

All 520 programmable bits are one shift register on the configuration clock:

```
configD ─► andblock (256) ─► orblock (256) ─► feedback select (8) ─► configQ
```

Each ph2/ph1 pulse pair moves the chain by one place. After 520 shifts the
first bit shifted in sits next to `configQ`. Meanwhile the previous
configuration comes out on `configQ`, which lets the chain be read back and
its length checked. The configuration bits have no reset.

### Bit map

Positions are counted from `configD` (position 0 is the first flop, and it
receives the last bit shifted in). The bit for position p must therefore be
shifted in at step 519 − p.

| Positions | Meaning |
|---|---|
| `32·k + 2·(15−m)` | product m is 0 when input k is 1 (product requires input k = 0) |
| `32·k + 2·(15−m) + 1` | product m is 0 when input k is 0 (product requires input k = 1) |
| `256 + 32·(m/2) + 2·(15−j) + 0`, m odd | product m is included in output j |
| `256 + 32·(m/2) + 2·(15−j) + 1`, m even | product m is included in output j |
| `512 + k` | input k takes the registered `dout[k]` instead of `din[k]` |

Here k is the input (0–7), m the product (0–15) and j the output (0–15).
The last feedback-select bit, input 7, is the cell that drives `configQ`.

Literal encoding of an AND-plane crossing (requires-0 bit, requires-1 bit):

| Bits | Product needs |
|---|---|
| 0 0 | don't care |
| 1 0 | input = 0 |
| 0 1 | input = 1 |
| 1 1 | never true (product forced to 0) |

The OR plane is chained by product pair, not by output. Row i carries
products 2i+1 and 2i. Within a row the chain visits output 15 first, then
output 14, and so on down to output 0. Tools that write the OR-plane bits one
output at a time produce a different order and must be adapted. See
"Departures and open points".

### Writing a configuration

`tb/pla_tb.sv` contains a small encoder that turns a human-readable table
into the 520 bits. The table has one literal string per product (leftmost
character = input 7; `1`, `0`, `x`, or `n` for never), one product-selection
string per output (leftmost = product 15) and eight feedback bits. It shows
how to shift the bits in (`load`) and contains the reference evaluator used
as the golden model. For example, the 7-bit shift register is:

* product 15−i = "input 7−i is 1", for i = 0..7;
* output 7−i = product 15−(i−1), for i = 1..7;
* feedback selected on inputs 6..0.

## Clocking

There are two independent two-phase clocks:

* `configPh1`/`configPh2` shift the configuration chain;
* `logicPh1`/`logicPh2` clock the feedback flops.

Every register is a `flop`: a master latch that is transparent while ph2 is
high, followed by a slave latch that is transparent while ph1 is high. Data
is sampled when ph2 falls and appears when ph1 rises. **The two phases of a
clock must never be high together.** With overlapping phases a value races
through both latches, and along the chain through many of them. Phases
should be driven as `ph2` pulse, gap, `ph1` pulse, gap; the testbenches use 5
time units for each.

Keep the logic clock idle while configuring. During configuration the
products change with every shift, so any logic clock would register garbage.

`reset` is active high and synchronous to the logic clock. It is applied
through a multiplexer in front of the master latch, so the state becomes
zero after the next `logicPh2`/`logicPh1` pair. Assert it for one logic clock
after loading a configuration that uses feedback.

A logic cycle therefore looks like this:

1. apply `din`;
2. read `dout` (combinational);
3. pulse `logicPh2`: the master samples `dout[7:0]`, or zero under reset;
4. pulse `logicPh1`: the state, and with it `dout`, moves on.

The feedback path is a loop through latches:
`dout` → feedback latches → multiplexer → planes → `dout`. Lint and synthesis
tools report it as a combinational loop. Because the phases do not overlap,
a closed latch always breaks the loop. Static timing analysis needs the
latches declared as timing breakpoints.

## Module hierarchy

```
pla                      top; chip pins: configPh1/2, configD, configQ, din, dout,
│                        logicPh1/2, reset
├─ muxslice              feedback multiplexers
├─ andblock              AND plane, 8 × androw
│   └─ androw            16 × singleand
│       └─ singleand     2 × configpull (input / complement on one product line)
├─ orblock               OR plane, 8 × orrow
│   └─ orrow             16 × doubleor
│       └─ doubleor      2 × configpull (two products on one output line)
├─ shiftreg              8 feedback-select bits at the end of the chain
└─ feedbackflops         8 resettable two-phase flops on the logic clock
configpull               one scan flop + pulldown request
flop                     master/slave latch pair
hmum_pkg                 sizes (N_IN, N_PROD, N_OUT, N_FB) and chain length
```

Every level takes its sizes as parameters. The defaults are the sizes of the
chip. `N_PROD` must be even, because the OR plane pairs products, and `N_FB`
may not exceed `N_IN` or `N_OUT`. Changing the sizes changes the bit map
above in the obvious way: replace 16 and 32 by `N_PROD`, `N_OUT` and their
doubles.

Synthesized at the default size, the design has 1056 latches (two per
configuration bit, two per feedback bit). It also has 512 AND gates for the
pulldown requests, plus the column NORs and multiplexers.

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each ends
by printing `TB_RESULT checks=N failures=M` and has a watchdog.

* `flop_tb`: sampling on the ph2 fall, holding through changes outside ph2,
  and update only on ph1.
* `configpull_tb`: two chained cells. It checks the shift, rejection of a
  glitch between the phases, and that the pulldown is `a & bit`.
* `singleand_tb`, `doubleor_tb`: all four codes of a cell.
* `androw_tb`, `andblock_tb`, `orrow_tb`, `orblock_tb`: random
  configurations against a reference that uses the bit map above. They also
  check the scan output while loading.
* `shiftreg_tb`, `muxslice_tb`, `feedbackflops_tb` (including reset).
* `pla_tb`: the whole chip at full size. It loads 14 configurations through
  `configD` and checks each previous configuration as it comes out of
  `configQ`. It runs these workloads:
  * seven-segment decoder;
  * 7-bit shift register built from feedback, with fixed vectors;
  * hexadecimal counter with seven-segment, Gray-code and binary outputs,
    including reset and wrap-around;
  * 3-to-8 decoder;
  * 8-input AND, NOR, OR and NAND;
  * 2-input AND/OR/NAND/NOR;
  * 2-, 3- and 4-input XOR/XNOR;
  * six random configurations with random feedback and resets.

  Outputs are compared both with a behavioural evaluation of each table and,
  where possible, with values computed directly (arithmetic, Gray code, a
  fixed segment table). At the end the testbench counts how often each
  mechanism occurred: loads, read-back, combinational cycles, feedback
  cycles, resets, wrap-arounds and never-true literals. A mechanism that
  never occurred counts as a failure.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/hmum_pkg.sv tb/pla_tb.sv \
          -y rtl --top-module pla_tb
./obj_dir/Vpla_tb
```

Replace `pla_tb` with any other testbench name. The full-size `pla_tb`
finishes in well under a second.

The simulation is two-state. The configuration latches start at arbitrary
values, as on silicon, until a configuration has been shifted in.

## Capacity: what fits

| Function | Products | Outputs | Feedback | Fits |
|---|---|---|---|---|
| seven-segment decoder | 16 | 7 | 0 | yes |
| 7-bit shift register | 8 | 7 | 7 | yes |
| 4-bit counter + 7-seg + Gray + binary | 16 | 15 | 4 | yes |
| 3-to-8 decoder | 8 | 8 | 0 | yes |
| 8-input OR and NAND (one literal per product) | 16 | 2 | 0 | yes |
| 4-input XOR and XNOR (minterms) | 16 | 2 | 0 | yes |

The limit is almost always the 16 products. Any function of the fed-back
state can be built from one-hot state products, as the counter does, as long
as there are at most 16 states and the outputs share those products.

## Departures and open points

* **OR-plane chain order.** The RTL chains the OR plane by product pair,
  following the circuit's cell arrangement. An older configuration assembler
  wrote the OR plane one output at a time. The bit map above is the one this
  RTL implements.
* **AND-plane row order.** Here the chain enters the AND plane at the row of
  input 0 and leaves it after the row of input 7. The configuration tooling of
  the original chip agrees with this. Its drawings could also be read the
  other way round. If a bitstream from elsewhere does not work, reverse the
  rows, which means replacing k by 7 − k in the bit map.
* **Reset polarity.** The chip's pin is `reset`. Its core schematic names the
  net `resetb`, which suggests an inversion in the pad ring. Here `reset` is
  active high at the top and clears the feedback flops.
* **Legacy 8-output tables.** Configurations written for an 8-output version
  of the array map onto outputs 7..0. The upper outputs are left unselected,
  so they read 0. The seven-segment and shift-register tests use this
  mapping.
* **Not modelled.** The pull-up loads of the bit lines (folded into the
  NOR), the clock inverters and buffers (the latches use the phase signals
  directly), the pad ring, and any circuit-level timing. The circuit was
  characterised for a 150 ns clock period, with operation limited to about
  6 MHz by the slow pull-ups. Nothing in this RTL represents that limit.
* **Demo controller.** The microcontroller that clocks the chip, loads
  configurations and drives buttons and LEDs is outside this RTL; the
  testbenches take its role.
