# Velocity-selective ENG recorder: digital system in SystemVerilog

Nerve signals (electroneurogram, ENG) can be sorted by how fast they travel along the
nerve, which tells fibre types (and so the organs they serve) apart. A cuff with a row
of electrodes sees the same action potential pass under electrode after electrode.
Delay every channel by the travel time expected for one velocity and add the channels:
signals moving at that velocity add up coherently, others smear out. Sweeping the delay
gives a velocity spectrum. This method is called velocity-selective recording (VSR).

The system here is an implant in two parts:

* an **electrode unit (EU)** next to the cuff. It amplifies ten dipole channels,
  digitises them with five interleaved 10-bit ADCs and sends each ten-sample set over a
  thin cable.
* a **monitoring unit (MU)** further away. It receives the samples and runs the VSR
  processing (delay, add, filter, rectify, threshold, sub-sample) on a small fixed-point
  processor, the **signal processing unit (SPU)**.

The raw back channel carries about 3.7 Mbit/s, far too much for a transcutaneous radio
link. The SPU reduces it to a handful of velocity results, output at a sub-sampled rate.

This repository holds the digital logic of both units, a reference model of the SPU,
and self-checking testbenches. The analogue front end, the ADCs, the command link from
the MU to the EU and the radio link are not here (see *What is outside the RTL*).

## Structure

```
                    link_clk (3 MHz)                        MU system clock (48 MHz)
 ADCs, S&H  <-->  +-----------------------+   DDR data   +------------------------------------+
 (ports)          | eu_digital            | -----------> | mu_backchannel_rx   (cable mux,    |
                  |  eu_acq_control       |  6 Mbit/s    |   DDR sampling, deserialiser,     |
                  |  eu_serialiser        |              |   parity check)                   |
                  +-----------------------+              |        | one channel word at a time|
                            ^                            |        v                           |
                            |  link_clk                  | spu                                |
                            +--------------------------- |  spu_sequencer   spu_imem          |
                                  mu_link_clkgen         |  spu_addr_offset spu_sample_mem    |
                                                         |  spu_alu  --> out_valid/data/tag   |
                                                         +------------------------------------+
```

`eng_vsr_top` wires one EU to the MU. It has `N_EU` = 3 cable inputs on the MU
multiplexer: input 0 is the built EU, and the others arrive on `ext_dout`. `vsr_pkg`
holds the shared constants, the opcode enum and the instruction struct.

| file | role |
|---|---|
| `rtl/vsr_pkg.sv` | frame and instruction constants, `opcode_e`, `instr_t`, parity function |
| `rtl/eu_acq_control.sv` | per-frame sample/convert sequence for the five ADCs |
| `rtl/eu_serialiser.sv` | 111-bit frame builder and DDR line driver |
| `rtl/eu_digital.sv` | EU digital part (the two blocks above) |
| `rtl/mu_link_clkgen.sv` | link clock divider and mid-phase sampling strobes |
| `rtl/mu_backchannel_rx.sv` | cable multiplexer and serial-in/parallel-out receiver |
| `rtl/spu_*.sv`, `rtl/spu.sv` | the signal processing unit |
| `rtl/eng_vsr_top.sv` | the whole system |

## The back channel

Every `FRAME_CYCLES` = 90 link clocks, `eu_acq_control` takes one sample set:

1. It puts the sample-and-holds into hold (`sh_hold`).
2. It selects the even channel of each pair (`ch_sel` = 0) and starts all five ADCs.
3. It latches each result as the ADC's `done` pulse arrives.
4. It switches to the odd channels and does the same again.
5. It releases the hold and hands the set to the serialiser.

ADC *k* converts channels 2*k* and 2*k*+1. Conversion and transmission never overlap,
which keeps switching noise away from the analogue front end. The state register is a
one-hot token.

The acquisition control also drives the tri/dipole multiplexers (`tri_sel`). These
choose whether the channels carry dipole signals (single differential) or tripole
signals (double differential). A mode request on `tripole` takes effect only when a set
starts, so no set mixes the two kinds.

With a 3 MHz link clock the frame period gives 33.3 kS/s per channel and 66.7 kS/s per
ADC.

Frame on the wire, bit 0 first:

```
 1 | ch0 d0..d9 p | ch1 d0..d9 p | ... | ch9 d0..d9 p | 0 (pad)
 start   11 bits        11 bits              11 bits
```

* The data bits are sent LSB first.
* Each *p* is an even parity bit over its ten data bits.
* The frame is 111 bits, sent as 56 bit pairs.

The serialiser sends the first bit of a pair while the link clock is high and the
second while it is low (`dout = clk ? q_hi : q_lo`). This gives 6 Mbit/s from 3 MHz. The
line is low when idle, so the first `1` starts a frame.

The MU generates the link clock itself (`mu_link_clkgen`, system clock / `LINK_DIV`).
It therefore knows where each bit sits. It registers the line once and takes a bit a
quarter period into each phase (`stb_hi`, `stb_lo`). `mu_backchannel_rx` searches for the
start bit, then shifts in ten words. Each word goes out as soon as it is complete
(`s_valid`, `s_ch`, `s_data`), with `parity_err` when its parity fails. A failed word is
still delivered and counted in `err_count`. `set_done` comes with the tenth word.

## The signal processing unit

### Programming model

The SPU has one 32-bit accumulator, a 1024-word data memory of 16-bit words and a
program of up to 1024 instructions. It has no branches. The program runs from address 0
on every new sample set and stops at `HALT`. Each run therefore takes the same time, and
sub-sampling is done by masking rather than by branching.

Instruction word (29 bits, `instr_t`): `{op[2:0], k[15:0], field[9:0]}`.
*field* is a data address, or a second constant for `CMP` and a tag for `OUTPUT`.
In the table, *m* is the data word at address *field* and *k* is signed Q1.15.

| op | code | effect |
|---|---|---|
| `NOP` | 0 | nothing |
| `READ` | 1 | acc += m·k |
| `MAX` | 2 | acc = m·k if m·k > acc |
| `WRITE` | 3 | m = acc >>> 15, truncated to 16 bits |
| `ABS` | 4 | acc = \|acc\| |
| `CMP` | 5 | acc = (acc > k<<15) ? field<<15 : 0 |
| `OUTPUT` | 6 | if (ring & k) ≠ 0: out_data = acc >>> 15 (16 bits), out_tag = field |
| `HALT` | 7 | stop until the next sample set |

Fixed point: a memory word times a Q1.15 constant leaves 15 fraction bits in the
accumulator. `WRITE`, `OUTPUT` and the `CMP` threshold all work in memory-word units.
Arithmetic wraps.

There is no "clear" instruction. `CMP` with k = 0x7FFF and field = 0 sets the
accumulator to 0 for any value up to 2³⁰ − 2¹⁵, and the demonstration programs use it that way.

### Sample-relative addressing

This is the idea that makes delay lines cheap. The data memory is split into 32 blocks
of `BLOCK` = 32 words, and addresses in a program are relative to the newest block:

* word *c* (0..9) of block *n* is channel *c*'s sample from *n* sets ago, at address
  *c* + 32·*n*;
* words 10..31 of each block are free for the program's own variables. A variable
  written at address *w* in this run is found at *w* + 32 in the next run. So a filter's
  previous output is one `READ` away, and an IIR stage needs no explicit shifting.

`spu_addr_offset` implements this with one base register:
physical = base + address, mod 1024.

Each `set_done` moves the base back by 32. New samples are written through memory
port A to physical base − 32 + *c*, which is the block that becomes block 0. A running
program sees that block as block 31 (addresses 992..1023). **A program must not read
the sample words 0..9 of block 31**, because they are being overwritten during the run.
Samples are therefore directly readable up to 30 periods back. *Delays longer than the
memory* below shows how to reach further back. Variable words of block 31 are safe. Samples are stored as two's
complement: the offset-binary ADC code with its MSB inverted, sign-extended.

Example: delay channel 3 by 2.25 sample periods, with linear interpolation:

```
READ  k=0.75*32768  field=3+32*2     ; 3/4 of the sample 2 sets ago
READ  k=0.25*32768  field=3+32*3     ; 1/4 of the sample 3 sets ago
```

### Output masking

`spu_sequencer` holds a one-hot 16-bit ring counter that rotates on every sample set.
The first run after reset sees bit 0. `OUTPUT` fires only when its 16-bit constant has a
1 where the ring has its 1:

* mask `0x1111` outputs every fourth set;
* mask `0x4444` outputs at the same rate, two sets later;
* mask `0xFFFF` outputs on every set.

Down-sampling by 2, 4, 8 or 16, with staggered phases to smooth the output rate, needs no
branching.

### Pipeline and timing

There are two stages:

* **stage 1:** `spu_imem` has a synchronous read and fetches the instruction at `pc`.
* **stage 2:** the fetched instruction reads its operand from `spu_sample_mem` port B
  (an asynchronous read), executes in `spu_alu`, and a `WRITE` stores at the end of the
  cycle.

The next instruction sees the stored word, so the pipeline has no hazards. After
`set_done` the sequencer resets `pc` to 0 and puts a bubble (a NOP) into stage 2 while
the first instruction is fetched. A program of *L* words ending in `HALT` keeps `running`
high for *L*+1 cycles. `out_valid`, `out_data` and `out_tag` are registered one cycle
after the `OUTPUT` executes.

Budget: with `LINK_DIV` = 16 the SPU clock gives 16·90 = 1440 cycles per sample set. A
program longer than that is still running when the next set arrives. The program then
restarts and the sticky `overrun` flag is set.

The program is loaded through `prog_we/prog_addr/prog_data`. Load it while the SPU is
halted, for example with `run` low.

### A demonstration program

`tb/tb_spu_ref_pkg.sv` (`build_vsr`) builds a four-velocity program of 97 instructions.
For each velocity it does the following:

1. Clear the accumulator, then add the ten channels, each delayed by
   (9 − *c*)·*d* quarter-samples with interpolation.
2. Store the sum.
3. Rectify it (`ABS`) and store the result.
4. Smooth it: y = ¼·|s| + ¾·y₋₁, with y₋₁ read from the previous block.
5. Output y every fourth set and a `CMP` detection bit on the other phase.

A final `MAX` over the four envelopes is output on every set. This covers each step of
the VSR chain: delay, add, filter, rectify, threshold and sub-sampled output.

### Delays longer than the memory

Slow fibres need long delays. At 15 m/s, with a 3.5 mm electrode pitch and 33.3 kS/s,
adjacent channels are 7.8 sample periods apart. Across nine channels the first channel
must therefore be delayed by 62 periods, but the sample words only hold 30.

A variable word ages with its block, and that is enough to extend the history. Each
run, the program copies a channel's sample from block 30 into a free word *E1*:

```
CMP   k=0x7FFF field=0          ; acc = 0
READ  k=0x8000 field=c+32*30    ; acc = -x(30), exact: 0x8000 is -1.0
WRITE field=E1                  ; E1 in block n now holds -x(30+n)
```

Reading *E1* + 32·*n* then gives −*x*(30+*n*) for *n* up to 31, since only words 0..9
of block 31 are being refilled. The delay-and-add uses a negated constant for it.
Chains can be deeper:

* copying *E1* of block 31, negated, into a word *E2* reaches 92 periods;
* a third level reaches 123 periods.

Each level costs one variable word per channel that needs it, and three instructions per
run.

`build_ivs` in `tb/tb_spu_ref_pkg.sv` builds a velocity-spectrum program that uses this.
It has the following size:

* 16 velocities, 15 to 75 m/s in 4 m/s steps, over nine channels;
* 63 sample periods of history;
* all 32 words of each block: 10 samples, 6 chain words and 16 peak-hold words;
* 369 instructions, 370 cycles per set.

Each velocity's peak `|sum|` is output once per 16 sets on its own ring phase, so
exactly one word leaves per set.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_EU` (top, rx) | 3 | cables on the MU multiplexer |
| `LINK_DIV` | 16 | system clock / link clock |
| `FRAME_CYCLES` | 90 | link clocks per sample set |
| `DMEM_DEPTH` | 1024 | data memory words (the 10-bit address field fixes it) |
| `IMEM_DEPTH` | 1024 | program words |
| `BLOCK` | 32 | words per sample block |

These widths are fixed in `vsr_pkg`:

* `ACC_W` = 32, the accumulator;
* `WORD_W` = 16, the data memory word;
* `FRAC` = 15, the fraction bits of the constant;
* `RING_W` = 16, the ring counter;
* `N_CH` = 10, `N_ADC` = 5, `SAMPLE_W` = 10.

## What follows the original system and what was chosen here

These parts follow the original design:

* ten channels, five interleaved 10-bit ADCs, >33 kS/s per channel;
* the frame of a start bit and ten LSB-first samples, each with its own parity bit;
* the 6 Mbit/s DDR back channel;
* the SPU block structure (program memory, sequencer, address offsetting, dual-port
  sample memory, arithmetic unit with accumulator);
* the 3/16/10-bit instruction format and the instruction list with its semantics;
* the 32-bit accumulator and 32-word blocks with sample-relative, wrap-around
  addressing;
* the 16-bit one-hot output ring and the two-stage pipeline.

These are this design's own choices:

* the opcode numbering, the Q1.15 scaling, the `CMP` direction and scaling, and the
  `OUTPUT` tag;
* the 16-bit data words, the offset-binary to two's-complement conversion, and the
  1024-word program memory with its load port;
* the bubble on restart: the sequencer inserts the pipeline-filling NOP itself;
* overrun handling and the ring counter's reset phase;
* even parity, the pad bit, the idle-low line and which phase carries which bit;
* the clock divider, the 48 MHz system clock and mid-phase sampling;
* the ADC start/done handshake, the channel pairing 2k/2k+1 and the 90-cycle frame
  timer;
* taking a tri/dipole mode change only at the start of a set;
* delivering and counting samples with bad parity;
* asynchronous active-low reset everywhere.

Known departures and limits:

* The smallest output rate is one 16-bit word per 16 sets, which is 33 kb/s for each
  result. The few kb/s that a transcutaneous link carries needs further decimation
  after the SPU.
* The original names nine instructions but lists eight, and a 3-bit opcode holds eight.
  The eight listed ones are implemented.
* The original says both that the program runs for each received sample and that
  processing starts once all ten samples of a set are in. This design starts the program
  once per set, with `set_done`.
* The per-channel rate is given as "in excess of 33 kS/s", and elsewhere as 30, 34 and
  about 35 kS/s. The 90-cycle frame at 3 MHz gives 33.3 kS/s.
* A later remedy for cable crosstalk is not included. It would delay output switching by
  50–80 ns.
* The frame is described as 110 bits, which equals ten samples with parity. The start
  bit is sent in addition, so 111 bits go on the wire.
* Samples stay in the memory for 32 sample periods, and 30 of those are directly
  readable. Longer delays are built in software, as described in *Delays longer than
  the memory* above. The original does not say how its processor reached the slow end
  of its velocity range.
* The EU's "token shift register" clocking, a low-noise scheme that clocks registers from
  a travelling token, is represented only by the one-hot acquisition state. All flops
  here run on the ordinary link clock.
* The DDR line driver selects with the clock (`clk ? q_hi : q_lo`). That is fine in RTL
  and simulation; a chip would use a glitch-free output cell.

## What is outside the RTL

These parts have no RTL here:

* **Analogue front end:** nerve amplifiers, tripole/dipole switch, sample-and-holds and
  channel multiplexers.
* **ADCs:** the five ADCs are library parts. `tb/adc_model.sv` is a behavioural
  stand-in, and the controls and results are top-level ports.
* **MU-to-EU command link:** a four-level signal carrying clock, sync and commands,
  with a triple-threshold receiver in the EU. Its coding is not specified, so the link
  clock is wired directly. Acquisition and the tri/dipole mode are set by the `run` and
  `tripole` inputs.
* **Command and address decoders** of both units.
* **Power circuitry and the radio link.**

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_spu_alu` | 50 000 random instructions against an integer model: accumulator, write-back, halt, masked output |
| `tb_spu_sequencer` | programs of random length execute exactly 0..L−1, run takes L+1 cycles, ring rotation, overrun |
| `tb_spu_addr_offset` | a sample stored before set *s* is found at c + 32·age for 31 sets, across wrap-around |
| `tb_spu_sample_mem`, `tb_spu_imem` | random traffic against array models |
| `tb_spu` | 70 sets through the demonstration program against `tb_spu_ref_pkg` (a block-rotating model that shares no code with the RTL): every output word, run length, detections, matched-velocity peak, overrun |
| `tb_spu_ivs` | the velocity-spectrum program above (pulses at 20, 42 and 14 m/s must peak at 19, 43 and 15 m/s, one output per set); 30 simultaneous delay-and-add outputs (20 to 78 m/s, 663 instructions, a 30 m/s pulse must peak at 30 m/s); a 20 m/s pulse summed with delays for 10, 20 and 30 m/s (94 periods of history, three chain levels). 1200 runs against the model, each fitting the set period |
| `tb_eu_acq_control` | set every 90 cycles, right channel from the right ADC, starts only in hold, `run` gating, tri/dipole mode taken only at set start |
| `tb_eu_serialiser` | frame layout, parity, LSB-first order, 56 cycles per frame, line idle low, ignored reload |
| `tb_eu_digital` | EU with ADC models, independently decoded line, quiet line during conversion, frame spacing |
| `tb_mu_link_clkgen` | period, duty cycle, strobe placement |
| `tb_mu_backchannel_rx` | three cables with noise on unselected ones, random gaps, bad parity words, error count |
| `tb_eng_vsr_top` | whole system at default parameters (see below) |

`tb_eng_vsr_top` runs everything with default parameters. It goes through these phases:

1. It runs 32 zero-valued sets with a memory-clearing program, so that no memory word
   is undefined.
2. It runs 45 sets of a travelling test spike through the demonstration program. That
   is more than one trip round the circular memory, and the set period is checked at
   44·1440 system cycles.
3. It switches the cable multiplexer to a testbench-driven cable for three frames, one
   of them with a corrupted parity bit.
4. It returns to the EU for 12 more sets and switches from dipole to tripole mode half-way
   through. The select must change only between sets.
5. It removes the `HALT` to provoke an overrun.

Every SPU output is compared with the reference model fed with the ADC codes. The test
counts sub-sampled outputs, threshold detections, parity errors, overruns, mode switches
and memory wrap-around, and fails any mechanism that never occurred. It also checks that the
velocity channel matched to the spike has the largest envelope peak.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/vsr_pkg.sv tb/tb_spu_ref_pkg.sv tb/tb_eng_vsr_top.sv --top-module tb_eng_vsr_top
./obj_dir/Vtb_eng_vsr_top +verilator+rand+reset+2
```

Swap in another testbench name as needed. The testbenches pass with randomised initial
state (`+verilator+rand+reset+2`). Testbenches that do not use the SPU model can leave
out `tb/tb_spu_ref_pkg.sv`.
