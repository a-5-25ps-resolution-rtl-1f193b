# DSP-adder time-to-digital converter

A time-to-digital converter (TDC) measures when an asynchronous edge arrived,
to a resolution far finer than the clock period. This design uses the 48-bit post-adder
of the Xilinx 7-series DSP48E1 block as the delay line. The adder is set to compute
`all ones + carry-in`. A rising carry-in then clears the 48 result bits one after
another, and the carry cascade hands the transition on to the next DSP. Twenty DSPs in a
row give 960 taps, about 11 ns, which is more than one period of the 120 MHz sampling
clock. At each clock edge the taps are captured. How far the transition got tells how long
before the edge the trigger arrived.

An adder makes a poor ruler on its own. The 47 bins inside a DSP are tiny (about 5.2 ps
each). The hop from one DSP to the next is about 308 ps, and some neighbouring bins switch
in the wrong order. The design deals with this in two steps. Both follow the publication
"A 5.25ps-resolution TDC on FPGA using DSP blocks":

1. **Population count instead of priority encoding.** The code is the number of taps
   passed, not the position of the furthest one. Bins that switch out of order then still
   give distinct codes.
2. **Equivalent coding line.** Four identical lines are started about a quarter of a DSP
   apart by short CARRY4 delay chains, and their four counts are added. While one line
   crosses its fine bins, the others sit still inside their large bins. So the sum keeps
   stepping in fine increments everywhere. The publication reports an average bin of
   5.25 ps for this configuration (27 ps worst case) and 3.70 ps with eight lines.

## Signal path

```
hit ─┬─ offset_chain (0 CARRY4) ─ dsp_delay_line (20 x dsp48e1_adder) ─ bin_sync ─ pop_counter ─┐
     ├─ offset_chain (2 CARRY4) ─ dsp_delay_line ─ bin_sync ─ pop_counter ─────────────────────┤
     ├─ offset_chain (4 CARRY4) ─ dsp_delay_line ─ bin_sync ─ pop_counter ─────────────────────┼─ ecl_summer ─┐
     └─ offset_chain (6 CARRY4) ─ dsp_delay_line ─ bin_sync ─ pop_counter ─────────────────────┘              │
                                      line 0 therm ─ priority_encoder ─────────────────────────────────────────┤
                                      line 0 bin 0 (hit detect), coarse_counter ─────────────── tag_builder ──┴─ readout ─ byte stream
```

| module | role |
|---|---|
| `dsp48e1_adder` | simulation model of one DSP48E1 post-adder, with the delay of each result bit |
| `dsp_delay_line` | `NDSP` adders in the delay-line set-up, chained by carry cascade |
| `carry4` | simulation model of the CARRY4 carry element (65 ps) |
| `offset_chain` | `N_C4` CARRY4s in series: the start offset of one line |
| `bin_sync` | two flip-flop levels on every tap, then inversion |
| `pop_counter` | number of ones in a captured line (2-stage pipeline) |
| `priority_encoder` | highest set tap + 1 (2-stage pipeline), kept for comparison |
| `ecl_summer` | sum of the line counts (1 stage) |
| `coarse_counter` | free-running clock-cycle count |
| `tag_builder` | trigger detection, code selection, tag assembly |
| `readout` | 16-tag FIFO and byte serialiser towards the host link |
| `tdc_top` | all of the above |
| `tdc_pkg` | sizes, `code_mode_e`, `tag_t`, nominal delays |

## The delay element

The DSP48E1 settings that make the adder a delay line are:

| setting | value | effect |
|---|---|---|
| OPMODE X (`[1:0]`) | `00` | X = 0 |
| OPMODE Y (`[3:2]`) | `10` | Y = hard-wired all ones |
| OPMODE Z (`[6:4]`) | `000` | Z = 0 |
| ALUMODE | `0000` | P = Z + X + Y + CIN |
| CARRYINSEL | `000` first DSP, `010` others | fabric carry-in (the trigger) / carry cascade |
| pipeline registers | all bypassed, including P | P and the carry cascade are asynchronous |

The P register has to stay off. In this block the carry cascade goes through the same
register as P, so using it would stop the transition at every DSP boundary. Capture is
therefore done in fabric flip-flops (`bin_sync`). Before the trigger P is all ones.
After it, P is all zeros and the carry out is 1. When the trigger falls, the line recovers
the same way.

**Bin structure in the model.** Tap `k` of a DSP changes `5.21 ps × rank(k)` after that
DSP's carry-in. The carry cascade leaves 553 ps after it. So taps 0..47 fill the first
245 ps and the last bin of every DSP lasts about 308 ps. Half of each DSP's delay sits in
one bin. These are the publication's average figures. The real spread is not modelled:
74 ps standard deviation from DSP to DSP, and a wide spread of bin widths.

**Out-of-order bins.** On the device, the capture flip-flop of bin i+1 can resolve before
that of bin i, so bin i is skipped by a priority encoder. The model reproduces this inside
each 4-bit carry-lookahead group: bits 1 and 2 switch in the order 0, 2, 1, 3
(`LOOKAHEAD_SWAP = 1`). A captured word can then look like `…0101` instead of `…0011`.
The priority encoder returns the same code for `0101` and `0111`. The population count
returns 2 and 3. Which bins are affected on a real device is unknown. The swap pattern is
only there to show the effect.

## Equivalent coding line

Line `i` starts `C4_STEP × i` CARRY4s after line 0, i.e. 0, 130, 260 and 390 ps with the
default `C4_STEP = 2` and 65 ps per CARRY4. That is close to a quarter of the 553 ps DSP
period. Take a trigger that arrives Δ before the clock edge. Each line contributes the
number of its bins with arrival time below Δ minus its offset. As Δ grows by 5 ps, the
line that is inside its fine bins gains about one count. Any line inside its 308 ps bin
gains nothing. At least one line is always in its fine region, because the offsets span
the large bins. So the sum has no large steps left. Its range is 0..3840. On the device, the
publication found 2557 codes in use within one clock period.

The summed code is monotonic in Δ, but not linear. To turn codes into time, calibrate
them on the device with a code-density test. Feed triggers that have no relation to the
clock and build a histogram of the codes. The width of code `c` is its share of the hits
times the clock period. Histogramming is left to the host.

## Codes, tags and timing

`mode` (type `code_mode_e`) selects what goes into the tag's fine field:

| mode | fine code | range |
|---|---|---|
| `MODE_PRIO_SINGLE` (0) | highest set tap of line 0, plus 1 | 0..960 |
| `MODE_POP_SINGLE` (1) | set taps of line 0 | 0..960 |
| `MODE_ECL` (2) | sum of set taps over all lines | 0..3840 |

Keep `mode` fixed while triggers arrive. It is sampled when a tag leaves `tag_builder`.

A trigger is recognised when tap 0 of line 0, which has no offset, is 1 in one capture
and was 0 in the one before. That capture is decoded. The captures after it show a
saturated line and carry no information. The trigger must stay high until line 0 has
filled (about 11 ns), and then low for at least two clock periods so that tap 0 is seen
low again. The last tap of a line must not be reached within one clock period, or the
code saturates. With 20 DSPs there is about 2.7 ns of margin.

`tag_t` is 32 bits: `{coarse[18:0], fine[12:0]}`. Count the capturing clock edge as the
first. Then `tag_valid` is high for one cycle after the fifth edge: two capture levels,
two encoder stages, one summing stage. `coarse` is the coarse counter value from three
cycles earlier, so it advances exactly with the capturing edge. The fine code counts
backwards from that edge: a larger code means an earlier trigger.

`readout` stores tags in a 16-entry FIFO and sends each as 4 bytes on
`tx_data/tx_valid/tx_ready`, least significant byte first. A byte moves on a clock edge
where `tx_valid && tx_ready`. The stream stands in for the byte-wide USB parallel link
(Digilent DPTI) that the publication uses. That link is outside this RTL. A tag that
arrives while the FIFO is full is discarded and counted in `dropped`, which saturates at
65535.

## Models and synthesis

`dsp48e1_adder` and `carry4` are simulation models with `#` delays (1 ps time unit,
1 fs precision). Both compute the right logic, so they can be read by synthesis, but
synthesis drops the delays and the result is no longer a delay line. To build the converter
on a device:
- instantiate the vendor `DSP48E1` and `CARRY4` primitives with the settings above;
- place each line's DSPs in one column with the capture flip-flops next to them;
- stop the tools from treating the asynchronous taps as timing paths.

The remaining modules (`bin_sync` onwards) are plain synthesizable RTL. In the models,
a DSP walks its bits in order in one process. A new carry-in edge that arrives while the
previous one is still rippling (within 553 ps) is applied only after it.

## Parameters

| where | parameter | default | note |
|---|---|---|---|
| `tdc_top` | `NLINES` | 4 | 8 gives the publication's second configuration (with `C4_STEP = 1`) |
| `tdc_top` | `NDSP` | 20 | DSPs per line; 960 taps |
| `tdc_top` | `C4_STEP` | 2 | CARRY4s added per line offset |
| `tdc_top` | `FIFO_DEPTH` | 16 | tags (power of two) |
| `dsp48e1_adder` | `SMALL_BIN_PS`, `DSP_DELAY`, `LOOKAHEAD_SWAP` | 5.21, 553.0, 1 | model only |
| `carry4` | `STAGE_PS` | 16.25 | model only |
| `tdc_pkg` | `COARSE_W` / `FINE_W` | 19 / 13 | tag split; `FINE_W` must hold `NLINES × 960` |

## Simulation

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/tdc_pkg.sv tb/tdc_top_tb.sv --top-module tdc_top_tb
./obj_dir/Vtdc_top_tb
```

`tdc_top_tb` runs the full-size converter with its default parameters. It fires 1640
triggers at random times (300 priority-encoder, 300 single-line population count,
1040 summed). It computes the expected taps of every line from the nominal delays and
checks each code exactly. It also checks latency, the coarse count and the byte stream.
It requires each of these to occur at least once:
- every mode;
- a capture where the priority encoder and the population count disagree;
- a summed code where one line is in its large bin and another in its fine bins;
- a stalled host link;
- a FIFO overflow with the right drop count.

It then sweeps the trigger time in fine steps and looks at the codes as a
code-density test would:

| sweep | range, step | result with the nominal delays |
|---|---|---|
| priority encoder, line 0 | 0–600 ps, 2.6 ps | 14 of 57 codes never appear |
| population count, line 0 | 0–600 ps, 2.6 ps | no missing code; widest bin 306.8 ps |
| sum of 4 lines | 1000–1700 ps, 1 ps | widest bin 6.0 ps (the test requires < 27.04 ps) |

The whole run takes about 40 s.

`tdc_top_8line_tb` runs the eight-line configuration (`NLINES = 8`, `C4_STEP = 1`) with
random triggers only, without the sweeps. There the summed codes go past 4095, so the
13-bit fine field is needed. It also takes about 40 s.

The block testbenches check the DSP model's arithmetic and per-bit timing, the CARRY4 logic and 65 ps delay, the 390 ps offset of a 6-CARRY4 chain, the
2-cycle capture, both encoders against reference scans, the summer, the counter's wrap,
the tag alignment in all modes, and FIFO order and drops.

The testbenches check the RTL against the nominal delay figures. They show that the
logic does what is described. They cannot show how a placed design on silicon will
behave.

## Choices beyond the publication

The publication gives the delay-line set-up, the line length and count, the CARRY4
offsets, the two capture levels, the population count and the summing. This design adds:
- **Decoders and coarse counter.** The pipelining of the encoders, the structure of the
  population counter (per-DSP counts, then a sum) and the coarse counter (width, reset,
  wrap) are this design's own. The publication only names the coarse counter.
- **Priority encoder code.** It reports position + 1, so an in-order line gives the same
  number from both decoders.
- **Tags and modes.** Trigger detection from tap 0 of line 0, the tag layout and the
  run-time mode select are this design's own. The three decoders were measured
  separately in the publication.
- **Readout.** The FIFO, byte order and drop policy are this design's own.
- **Line offsets.** The offsets are a quarter of a DSP. One passage of the publication
  speaks of a quarter of a "delay line", but the CARRY4 numbers it gives (2 × 65 ps
  against 550 ps) only make sense per DSP. The publication quotes both 550 ps and
  553 ps per DSP. The model uses the measured mean, 553 ps.
- **Eight-line offsets.** For eight lines the publication gives no offset. `C4_STEP = 1`
  (65 ps, about an eighth of a DSP) is a suggestion.
- **Delay model.** Every DSP and every small bin is the same in the model. Metastability
  is not modelled.
