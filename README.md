# 5R4W register file with read/write timing separation

This is a 64-word × 74-bit register file with five read ports and four write
ports. All nine ports can be used in every clock cycle. It is built around
three ideas that keep its timing reliable at high clock rates:

1. **Read/write timing separation.** Reads start on the rising clock edge
   and writes on the falling edge. A read and a write never use the storage
   array in the same half-cycle, so they do not conflict, even when they
   address the same word.
2. **Far-word-line error detection.** The two longest word lines (words 31
   and 63) are the first to be written wrongly when a word line rises late.
   Each of them has a replica row next to the control block. Reading one of
   these words compares it with its replica and raises an error flag on a
   mismatch.
3. **Phase-locked output hold.** Each read port has a precharged output
   stage. It captures the read data at the end of the read half-cycle and
   holds it across the next rising edge, so precharge or bit-line glitches
   cannot flip it.

The word-line decoders are *pre-enabled*. The port enable is merged into
the address lines before decoding, so a disabled port cannot raise a word
line, and no enable driver is needed on each word line.

The RTL models the logic and cycle timing of a full-custom circuit
originally drawn at transistor level in a 7-nm FinFET process. That circuit
reaches 3.8 GHz. The electrical side is not modelled: transistor sizing,
leakage, noise margins, drive buffers, layout, area and power. What is
modelled is what each block does, and on which clock edge.

## Clocking: one cycle, two half-cycles

Cycle *n* runs from rising edge *n* to rising edge *n+1*.

```
            rising n        falling n        rising n+1      falling n+1
clk     ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________
read    latch raddr/ren --> RWL up, bit lines --> capture into OUT (held)
write                       latch waddr/wen/wdata --> WWL up --> array updated
rdata                                        |<-- read n valid ----------->
```

- **High half (read).** At the rising edge the read decoders latch their
  addresses and enables. The read word lines select one word per port. The
  two local bit lines of each bit carry the data, one per array half. At
  the falling edge the output stage captures the data and the error flag.
- **Low half (write).** At the falling edge the write decoders latch the
  write addresses and enables, and the data latch takes the write data.
  The write word lines are high during the low half. The cells hold the
  new data at the next rising edge.

Three results follow:

- A write sampled at falling edge *n* is visible to a read sampled at
  rising edge *n+1*. A read always sees every earlier write.
- A read never sees a write that starts later. A word read in one cycle and
  overwritten in the next returns its old value.
- The read data of the read sampled at rising edge *n* are valid from
  falling edge *n* to falling edge *n+1*. Sample them at rising edge *n+1*.
  Seen from a rising-edge pipeline, this is a one-cycle synchronous read.

Several write ports may write the same word in one cycle. The
highest-numbered port wins. The original circuit does not say how this case
is handled; this ordering is this design's choice.

## Port summary (`regfile_5r4w`)

| port | dir | width | sampled / valid |
|---|---|---|---|
| `clk` | in | 1 | rising edge: reads; falling edge: writes |
| `rst_n` | in | 1 | asynchronous, active low |
| `raddr[5]`, `ren[5]` | in | 6, 1 | rising edge |
| `rdata[5]`, `rerr[5]` | out | 74, 1 | falling edge to falling edge |
| `waddr[4]`, `wen[4]`, `wdata[4]` | in | 6, 1, 74 | falling edge |
| `far_fail_mask` | in | 74 | used at the rising edge that completes a write |

- A read port with `ren = 0` keeps its last output.
- Reset clears the latched enables and sets every `rdata` to all ones, the
  precharged default. `rerr` goes to 0. The storage array is not reset.
- `far_fail_mask` is a fault-injection input, not part of the original
  circuit. Bits set in it are lost when a write hits word 31 or 63. This
  reproduces what a late far word line does, so the error detection can be
  exercised in simulation. Tie it to zero in normal use.
- Parameters: `WORDS` (64), `W` (74), `NRD` (5), `NWR` (4). `WORDS` must be
  a power of two and at least 4.

## Inside the blocks

### Pre-enabled decoder (`rf_decoder`, `rf_predecoder`, `rf_main_decoder`)

There is one decoder per port. Read ports latch on the rising edge
(`FALL_EDGE = 0`) and write ports on the falling edge (`FALL_EDGE = 1`).
Decoding has four steps:

1. **Latch.** The address and enable are latched at the port's edge.
   Input changes during the rest of the cycle cannot move a word line.
2. **Predecode.** `rf_predecoder` turns each address bit into an in-phase
   line `a_t` and an inverse line `a_c`, both ANDed with the enable. With
   the port disabled, every line is low.
3. **Main decode, stage 1.** `rf_main_decoder` decodes the low half of the
   address bits and the high half separately. For 64 words, that gives two
   groups of eight one-hot lines.
4. **Main decode, stage 2.** It ANDs one line of each group into each of
   the 64 word lines.

A disabled port thus produces no word line at all. No per-word-line enable
gate is needed. Assertions in `rf_decoder` check that a port never raises
more than one word line, and none while it is disabled.

The original circuit merges the clock, the enable and the address in the
predecoder. In this model the clock is represented by the latching edge.
A word line therefore stays up for a full period, not a half-period. This
does not change any result, because the array commits writes, and the
output stage captures reads, only at their own edges. The even split of
address bits between the two stage-1 groups is this design's choice.

### Storage array (`rf_array`)

The 64 words are split into two halves of 32 word lines. The halves sit
left and right of the central control block, as mirror images.

- **Write.** Each write port has its own word lines and data. Writes are
  committed at the rising edge.
- **Read.** Each read port has its own read word lines. The cell's read
  path is isolated from its storage node, so reads never disturb the data.
  Each half drives a precharged local read bit line per bit and per port:
  - `lbl_t` for words 0–31, `lbl_b` for words 32–63;
  - a line stays at 1 unless the selected cell stores 0;
  - an unselected half leaves its line at 1.

### Far-word-line check (`rf_mirror_check`)

Word lines 31 and 63 end farthest from the central data-control block. A
late word-line edge corrupts them before any other word, so only they are
checked. Each has a replica row placed next to the control block. The
replica is written with the same latched data, in the same cycle, with the
same port priority.

When a read port selects word 31 or 63, its bit-line data are compared with
the replica. A mismatch raises `err` for that port, which `rf_precharge_out`
holds next to the data as `rerr`. `rerr = 1` means the last write to that
word line failed, so other writes in the same conditions are suspect too.
What to do about it, such as writing again or lowering the clock, is left
to the user. Reads of any other word give `rerr = 0`.

A far word that has never been written may flag an error, because neither
the row nor its replica is reset.

### Output stage with phase-locked hold (`rf_precharge_out`)

There is one stage per read port. Its output node is precharged to 1, and
a 0 on either half's bit line pulls it to 0, so `out = lbl_t & lbl_b`.

The hold clock `CTRL_CLK` is built from the latched read enable and the
block select (the top address bit, which chooses the half). While it is
active, the stage captures at the falling edge. Otherwise it keeps its
value. The read result therefore stays stable across the next rising edge
while the bit lines are precharged again. The hold is modelled as a
falling-edge register, and idle ports keep their last value; both are this
design's choices.

## How far the model can be trusted

The following match the original circuit:

- the port counts, sizes and split-array organisation;
- the edge assignment of reads and writes;
- the single-word-line replica check on words 31 and 63;
- the enable-fused two-stage decoding;
- the precharged, AND-merged output held by a clock gated with enable and
  block select.

The following are this design's own choices, because the original is
silent on them:

- write-port priority on a shared word;
- reset behaviour;
- the idle-port hold;
- the grouping of the address bits in the main decoder;
- the `far_fail_mask` fault model.

Not represented at all:

- the 10-transistor cell's leakage and noise-margin improvements;
- the transistor-level feedback of the precharge stage;
- drive buffers, layout and electrical timing.

The RTL has no notion of 3.8 GHz or of clock jitter. It performs one access
per port per cycle. At 3.8 GHz that gives the original's bandwidth:

- read: 5 × 3.8 G = 19 G words/s;
- write: 4 × 3.8 G = 15.2 G words/s;
- per port: 74 bit × 3.8 GHz = 35.15 GB/s.

## Files

| file | content |
|---|---|
| `rtl/rf_pkg.sv` | default sizes |
| `rtl/regfile_5r4w.sv` | top level |
| `rtl/rf_decoder.sv` | latched pre-enabled decoder |
| `rtl/rf_predecoder.sv` | enable-fused predecoder |
| `rtl/rf_main_decoder.sv` | two-stage static decoder |
| `rtl/rf_data_latch.sv` | write data latch |
| `rtl/rf_array.sv` | split storage array and local bit lines |
| `rtl/rf_mirror_check.sv` | replica rows and comparators |
| `rtl/rf_precharge_out.sv` | output merge and hold |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_regfile_formats.sv`, `tb/rf_format_harness.sv` | end-to-end check at the 32×32, 32×64, 64×32 and 64×64 formats |

## Simulation

Each testbench checks against its own reference model. It prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a
testbench that hangs and counts that as a failure. To run one with
Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Wall -Wno-fatal \
  -y rtl -Irtl rtl/rf_pkg.sv tb/tb_regfile_5r4w.sv \
  --top-module tb_regfile_5r4w -o sim
./obj_dir/sim
```

`tb_regfile_5r4w` runs the full-size design, with default parameters, for
4000 cycles of random traffic on all nine ports. Addresses are biased
toward a few words and toward words 31 and 63. It checks every read's data,
error flag and one-cycle latency, and that each of these cases occurs:

- a read of a word written in the same cycle;
- a read followed by an overwrite in the next cycle;
- two write ports writing the same word;
- all nine ports active at once;
- idle read ports holding their output;
- clean reads of words 31 and 63;
- detected far-word-line write errors.

It finishes in well under a second.

`tb_regfile_formats` runs the same end-to-end check on four smaller
configurations of the design: 32×32, 32×64, 64×32 and 64×64 (words × bits).
Each one is set through the `WORDS` and `W` parameters. To compile it, add
`-y tb`.
