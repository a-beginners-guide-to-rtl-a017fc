# SVXII silicon-strip readout chip in SystemVerilog

The SVXII reads out 128 strips of a silicon detector at a collider. Each strip
has its own charge integrator and a 32-cell analog pipeline. The pipeline keeps
recent collisions while the trigger decides whether to keep one. It also has its
own Wilkinson A/D converter. When a trigger arrives, the chip:

- stops sampling;
- digitizes the stored cell of every strip at once;
- keeps only the strips whose value is over a threshold (optionally with their
  neighbours, or all strips);
- puts them on an eight-bit bus shared by a daisy chain of chips.

Only 15 digital pads control the whole chip. Most pads change meaning with the
operating mode.

This repository holds the digital core of the chip as synthesizable RTL, plus
two behavioural models for the analog sections:

- the integrator and pipeline;
- the ramp generator and comparators.

Together they simulate a full cycle: parameter download, acquisition,
digitization and readout.

## Contents

| File | Role |
|---|---|
| `rtl/svx2_pkg.sv` | mode encoding, control-word and parameter structs, Gray code functions |
| `rtl/svx2_chip.sv` | top level: one chip, pad multiplexing per mode |
| `rtl/svx2_mode_ctrl.sv` | mode register under the CHNG-MD strobe |
| `rtl/svx2_wt_reg.sv` | write-through register: BUS0..7 to internal real-time controls |
| `rtl/svx2_param_sr.sv` | 182-bit serial parameter register and 54-bit shadow register |
| `rtl/svx2_test_inject.sv` | per-channel test pulse switches |
| `rtl/svx2_pipe_ctrl.sv` | pipeline write/read ring counters, depth offset, switch controls |
| `rtl/svx2_gray_counter.sv` | common A/D Gray code counter with programmable stop value |
| `rtl/svx2_chan_latch.sv` | per-channel counter latch and threshold compare |
| `rtl/svx2_neighbor.sv` | readout selection: hits, neighbours, read-all, across chip edges |
| `rtl/svx2_sparse_fifo.sv` | sparsification: packs the tagged channels into a queue |
| `rtl/svx2_readout.sv` | bus readout sequence and daisy-chain priority |
| `rtl/svx2_frontend_model.sv` | behavioural: integrator, test charge, analog pipeline |
| `rtl/svx2_ramp_comp_model.sv` | behavioural: A/D ramp and comparators |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_svx2_chip` runs a six-chip system end to end, `tb_svx2_chain10` a ten-chip download and readout |

## Clocking and pads

The real chip runs entirely off its differential CLK pad. CLK means something
different in each mode:

- serial clock in Initialize;
- pipeline clock in Acquire;
- counter clock in Digitize;
- readout clock in Readout.

This implementation instead runs on one fast, free-running system clock `clk`.
`clk` samples every pad through an input register. CLK edges are found by
comparing two successive samples, so CLK must stay in each level for at least
two `clk` periods. Everything the chip does on a CLK edge happens one or two
`clk` cycles after that edge. `rst_n` is a power-on reset.

Bidirectional pads are split into `_in`, `_out` and `_oe`:

- BUS0..7 drive only in Readout.
- BN and TN only ever pull low in Digitize (open-drain hit lines).
- TN drives both levels as the serial output in Initialize.
- BN drives both levels as the priority output in Readout.

The board supplies the pull resistors and wires the bus. In the testbench these
are modelled as follows:

- BN of chip *k* and TN of chip *k+1* share one line.
- Outside Readout the line has a pull-up.
- In Readout it is pulled low at TN, so a high BN wins.

## Modes

`{MODE1, MODE0}` selects the mode:

| Code | Mode |
|---|---|
| 00 | Initialize |
| 01 | Acquire |
| 11 | Digitize |
| 10 | Readout |

A new code is taken when CHNG-MD falls. While CHNG-MD is high, the
write-through bus is frozen.

### The write-through bus

In Initialize, Acquire and Digitize, BUS0..7 are inputs. Each line drives one
internal control signal directly. Each control signal keeps its last level
whenever its mode is not the current one, and while CHNG-MD is high.

| Line | Initialize | Acquire | Digitize |
|---|---|---|---|
| BUS0 | PA-RST | PA-RST | PA-RST |
| BUS1 | – | CAL-INJECT | RREF-SEL |
| BUS2 | ACQ | ACQ | ACQ |
| BUS3 | PIPE-SREF | PIPE-SREF | PIPE-SREF |
| BUS4 | CNTR-RST | CNTR-RST | CNTR-RST |
| BUS5 | RAMP-RST | RAMP-RST | RAMP-RST |
| BUS6 | COMP-RST | COMP-RST | COMP-RST |
| BUS7 | SR-LOAD | – | FIFO-RST |

BUS1 and BUS7 are shared between two signals, so those signals hold their levels
across the modes in which they are not connected. The original chip leaves
CAL-INJECT, RREF-SEL and FIFO-RST undefined until their modes have been used
once. Here the power-on reset gives them known levels:

- PA-RST, CNTR-RST, RAMP-RST, COMP-RST and FIFO-RST start high.
- All other signals start low.

## Parameter download (Initialize)

BN shifts into a 182-bit register on each rising CLK edge. The register output
goes to TN on each falling edge. Bit 1 therefore appears on TN after the 182nd
falling edge. The chips of a chain form one long shift register: ten chips take
1820 bits, and the frame for the first chip in the chain goes in first.

Lowering SR-LOAD does two things:

- The upper 54 bits are copied into a shadow register. The shadow register
  follows the shift register while SR-LOAD is high.
- Both pipeline pointers are initialized.

The test mask has no shadow register. Shifting the chain a second time brings
every bit back out on TN for verification.

| Bits | Field |
|---|---|
| 1–128 | test mask, bit *n* = channel *n* |
| 129 | test polarity |
| 130 | pipeline select (analog; not used by the models) |
| 131–136 | preamp bandwidth, binary-weighted capacitors, 131 = smallest |
| 137–143 | chip ID, 137 = MSB |
| 144–149 | spare |
| 150 | Read Neighbor |
| 151 | Read All |
| 152 | ramp polarity |
| 153 | comparator polarity |
| 154–158 | pipeline depth, 154 = MSB |
| 159–166 | threshold, Gray code, 159 = MSB |
| 167–174 | counter modulo (stop value), Gray code, 167 = MSB |
| 175–182 | ramp trim, 175 = largest capacitor |

Four bits set the chip up for the sign of the detector charge:

| Input charge | 129 test | 130 pipeline | 152 ramp | 153 comparator |
|---|---|---|---|---|
| positive | 1 | 0 | 0 | 0 |
| negative | 0 | 1 | 1 | 1 |

The bandwidth and ramp-trim bits drive analog capacitor arrays. They leave the
chip as the `bw_ctrl` and `ramp_trim` ports.

## Acquisition: the analog pipeline

Each channel has 32 sampling capacitors. Two one-hot ring counters select
among them:

- the **write ring** picks the capacitor that follows the integrator now;
- the **read ring** picks the capacitor to digitize.

SR-LOAD sets the write ring to cell 0 and the read ring *depth* cells behind it.
From then on both rings rotate together on every rising CLK edge while ACQ is
high. The read ring therefore always points at the sample taken *depth*
intervals ago. Depth 0 means the most recent sample.

While CLK is high, switch Sd clears the newly selected capacitor. A cell thus
holds only the charge of its own interval (double-correlated sampling).
Lowering ACQ, for example on a trigger, freezes both rings. The cell under the
read ring is then presented to the comparator.

The remaining switches are controlled as follows:

- Sa (preamp reset) follows PA-RST.
- SR (reference sample) follows PIPE-SREF.
- Sb/Sc (into the pipeline) are closed while ACQ is high.
- Se (pipeline to comparator) is closed while ACQ is low.

These switch levels leave the chip on `analog_sw`.

A test pulse is injected on a channel when two conditions hold:

- CAL-INJECT rises;
- the channel's mask bit is set.

The charge sign follows the test polarity bit.

`svx2_frontend_model` stands in for the integrator and the capacitors:

- Charge is an integer in A/D counts.
- `det_q[c]` is added to the cell under the write ring when `det_strobe` is
  high.
- A test pulse adds ±16 counts.
- The comparator sees the stored charge with its sign inverted, as the real
  chain of inverting stages does.

## Digitization: a 128-channel Wilkinson converter

All channels share one ramp and one 8-bit Gray code counter. The counter
counts on **both** edges of CLK, so a 53 MHz clock gives 106 M counts/s. Gray
code is used because in silicon each channel latches the counter value
asynchronously, the moment its comparator flips. With only one bit changing per count, a latch
can never catch a half-changed value.

The host drives the conversion through the bus signals:

1. Raise COMP-RST and RAMP-RST with RREF-SEL = 1 (RAMP-REF). This zeroes the
   comparators against the pedestal level.
2. Lower COMP-RST, then lower RREF-SEL. Selecting RAMP-PED moves the ramp's
   starting point a little away from the signal side, so no comparator flips
   at the start.
3. Lower RAMP-RST to start the ramp.
4. A few edges later, lower CNTR-RST. The counter starts from 0.

Each channel latches the counter when its comparator output flips. The
comparator-polarity bit decides which direction counts as "flipped", so
negative and positive input charges behave alike.

The counter stops when its Gray value equals the programmed modulo, so the
modulo is the last count reached: `10000000` (Gray for 255) gives the full 256
counts, `01000000` gives 128 and `00100000` gives 64. At that
moment, every channel that has not latched takes the modulo value. A channel
is a **hit** when its latched value is strictly greater than the threshold,
with both compared as binary numbers.

The ramp/comparator model works in the same counts as the front-end model.
The ramp steps one count per counter edge. With the counter released two
edges after the ramp, a charge of *s* counts latches *s* + 1. A charge of the
wrong polarity leaves its comparator flipped from the start and latches 0.

## Which channels are read

Two parameter bits select the readout:

| Read Neighbor | Read All | Channels read out |
|---|---|---|
| 0 | 0 | hits only |
| 1 | 0 | hits and the channels on either side of each hit |
| – | 1 | every channel, once the counter has reached its stop value |

Neighbours continue across chip boundaries. In Digitize:

- a hit on channel 1 pulls TN low;
- a hit on channel 128 pulls BN low.

These lines connect to the adjacent chips. With Read Neighbor set, a low TN
tags channel 1 and a low BN tags channel 128.

## Sparsification

While FIFO-RST is high, the sparsification block holds the tag pattern. When
FIFO-RST falls, a priority encoder moves the lowest-numbered tagged channel
into a queue on every `clk`, together with its latched value. This "collapses"
the tagged channels into a dense list. FROUT is high while the collapse is
running or data are waiting.

All chips of a chain collapse at the same time. The host must wait for the
collapse to end before entering Readout: at most 128 `clk` cycles.

## Readout and the priority chain

In Readout, TN is the active-low priority input and BN is the active-low
priority output. A chip starts sending when its TN is low and CLK is low. TN is
only looked at from the second `clk` of Readout, after the chip above has had
time to drive its BN high. The chip then sends bytes on every half cycle of
CLK:

| CLK level | Byte |
|---|---|
| first low | `1` & chip ID (BUS7 = 1 marks the ID byte) |
| next high | status, always `00000000` |
| low | data of the next channel: its latched Gray value |
| high | address of that channel: `0` & (channel − 1) |

The data and address pair repeats for every queued channel, lowest channel
first. After the last address, or right after the status byte when the chip
has nothing to send, the chip:

- drives BN low, which hands the priority to the next chip;
- releases the bus.

A chain of chips therefore produces one continuous stream of bytes:

```
ID1 ST1 D A D A ... ID2 ST2 ID3 ST3 D A ...
```

Data are left in Gray code. Converting them back is up to the receiver.

## Departures from the original chip description

The following points follow readings or choices of this implementation. They
are not taken from the original description:

- **One system clock.** All pad timing is sampled by `clk`. The real chip is
  clocked by its pads directly. The differential PECL clock receiver is not
  modelled.
- **Bandwidth field.** The register map gives 6 bandwidth bits (131–136). A
  block diagram of the chip shows 7 lines. The 6-bit map is followed.
- **Half-cycle order of ID and status.** One passage puts the chip ID on the
  first low level of CLK. Another puts it on the high part. This design uses
  low for ID, then high for status.
- **Hit compare.** "Exceeds the threshold" is implemented as strictly greater.
  Threshold and modulo are read as Gray-coded values.
- **Power-on reset.** Every control latch has a reset value. The original leaves
  CAL-INJECT, RREF-SEL and FIFO-RST undefined until first use.
- **Latch clear.** The channel latches are cleared by CNTR-RST. The original
  does not say what clears them.
- **Sb, Sc, Se.** Their control (from ACQ) is a choice of this design.
- **Collapse time.** The original sparsification FIFO is asynchronous and
  quotes 0.8–1.3 µs for the collapse. Here it is synchronous logic that moves
  one channel per `clk`.
- **Analog behaviour.** The following are not modelled:
  - preamp bandwidth, ramp trim and Pipeline Select;
  - integrator and pipeline saturation;
  - gains, noise and comparator offsets;
  - the exact RAMP-PED voltage, modelled as 2 counts.

  The integrator is not reset by PA-RST in the model. This does not change
  stored values, because each cell stores only the charge of its own interval.
- **Pull resistors** on TN/BN belong to the board model, not the chip.
- **Bias, supply, reference and detector pads** have no logic function and are
  not part of the RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, with
a watchdog. With Verilator 5 run from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/svx2_pkg.sv tb/tb_svx2_chip.sv \
          --top-module tb_svx2_chip -o sim
./obj_dir/sim
```

The package is named first; `-y rtl` lets Verilator find every module by its
file name. Replace `tb_svx2_chip` by any other testbench to run that one.
`--assert` turns on the assertions in the readout controller and the
sparsification block. They check three rules:

- an entry is taken only from a non-empty queue;
- data are never sent before the collapse has delivered them;
- a chip drives the bus only while it holds the priority.

`tb_svx2_chip` builds a chain of six chips at full size: 128 channels and 32
cells each. It runs one complete cycle:

1. Download all 6 × 182 parameter bits, then read them back through TN.
2. SR-LOAD.
3. Acquire 47 intervals: background charge in every interval, the event and the
   test pulses in interval 40, and a pipeline depth of 7, so the read pointer
   has wrapped.
4. Digitize.
5. Collapse.
6. Read out until the last chip's BN falls.

The byte stream is compared with a reference computed independently in the
testbench. Each mechanism must occur at least once, and is counted:

- test pulse;
- pointer wrap;
- neighbour tags inside a chip and across chips, in both directions;
- saturation at the modulo;
- Read All;
- negative input polarity;
- an empty chip;
- the priority hand-over.

It runs in well under a second.

`tb_svx2_chain10` checks the chain length used as the sizing example for the
download: ten chips and 1820 serial bits.

1. Bit 1 must reach the first chip's TN exactly after the 1820th falling edge.
2. All bits are read back and compared.
3. Each chip's codes are checked after SR-LOAD.
4. Every threshold is above its counter range, so no channel hits. The readout
   must then give the ten ID/status pairs in ten clock cycles.

The module testbenches use small parameter values where that helps, for
example 8 channels for the latch. They check against independent reference
models, mostly with random stimulus.
