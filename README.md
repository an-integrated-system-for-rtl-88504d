# PADDI: a reconfigurable cluster of data-path processors

Real-time DSP kernels such as filters, video pipelines and speech front ends
are usually mapped onto hard-wired clusters of data paths that follow the
signal flow graph. PADDI is a programmable replacement for such clusters.
A chip holds eight 16-bit execution units (EXUs) joined by a crossbar. Each
EXU carries a tiny local instruction store, the *nanostore*, with eight
words. An external sequencer broadcasts one 3-bit address per clock, and
every EXU decodes it through its own nanostore. The eight EXUs therefore run
eight different operations in lockstep, a VLIW word split across the chip.
Data moves between EXUs, and in and out of four input and four output
channels, over a crossbar that can be reconfigured every cycle. A program
that fits in eight words runs at one result per EXU per clock: at 25 MHz
that is 200 M operations per second and 400 MB/s of channel I/O.

This repository holds synthesizable SystemVerilog for the chip, with a
self-checking testbench for every block and an end-to-end testbench that
boots the whole chip from a modelled EPROM.

## Structure

```
              ga[2:0] (global address, from the external sequencer)
                 |
   +-------------+-----------------------------------------------+
   | per EXU i = 0..7:                                           |
   |   exu_ctl (F, D stages) -- nanostore 8 x 53 -- exu (E stage) |
   |                                                |            |
   |   crossbar: EXU results + in_ch[0..3] -> EXU register files |
   |             EXU results -> out_ch[0..3] (O-stage registers) |
   |             flags (static routes) -> interrupt inputs       |
   |                                                             |
   |   config_unit: EPROM boot FSM -> serial configuration chain |
   +-------------------------------------------------------------+
```

| file | block |
|---|---|
| `rtl/paddi_pkg.sv` | sizes, opcodes, instruction word `instr_t`, static settings `exu_cfg_t` |
| `rtl/paddi_chip.sv` | the chip (top) |
| `rtl/exu.sv` | execution unit: two register files, shifter, adder, result mux, flag, pipeline register |
| `rtl/exu_regfile.sv` | six-register file with scan register and delay-line mode |
| `rtl/log_shifter.sv` | logarithmic arithmetic right shifter, 0..7 places |
| `rtl/csel_adder.sv` | carry-select adder |
| `rtl/nanostore.sv` | 8 x 53-bit instruction store, serially loaded |
| `rtl/exu_ctl.sv` | fetch/decode stages and interrupt vectoring |
| `rtl/crossbar.sv` | data and flag routing |
| `rtl/config_unit.sv` | boot FSM |
| `rtl/cfg_shreg.sv` | segment of the configuration chain (static EXU settings) |

## The EXU

Each EXU has two register files, A and B, with six 16-bit registers each
(R1..R6, addresses 0..5). Each file has one read port and one write port.
The B operand passes through an arithmetic right shifter (x1 to x1/128).
It is inverted for subtraction and then enters a carry-select adder with A.
A result multiplexer chooses the sum, a saturation value, A, or the shifted
B:

| op | result | flag |
|---|---|---|
| `OP_ADD` / `OP_SUB` | A ± (B>>s), wrapping | held |
| `OP_ADDS` / `OP_SUBS` | A ± (B>>s), saturating | held |
| `OP_CMP` | A − (B>>s) | A ≥ B>>s |
| `OP_MAX` / `OP_MIN` | max / min of A and B>>s | A ≥ B>>s |
| `OP_PASSA` / `OP_PASSB` | A / B>>s | held |

Because every operation sees the shifted B, shift-and-add is one
instruction. A compiler uses this to build fixed-coefficient multiplies
from chained shift/add steps. The static `is_signed` bit sets the number
system for saturation and comparison:

- In two's complement mode, results clamp to 7FFF or 8000.
- In unsigned mode, results clamp to FFFF or 0000.

The shifter always fills with the sign bit.

Each register file is written at the clock edge. The value comes either
from the crossbar source the instruction names, or from the EXU's own
result when the `fb_a`/`fb_b` bit is set, which is how an accumulator is
built. R6 of each file is the *scan register*. It sits in the configuration
chain, so a program can preload a constant into it. When a file is set up as
a delay line (`del_a`/`del_b`), every write shifts R1→R5, so reading Rk gives
the value written k writes ago. R6 stays a constant in this mode.

The output pipeline register is optional (static `opreg`). When it is
used, the result reaches the crossbar one instruction later, which breaks
the long path from register file to adder to crossbar to register file.
The instruction's `latch` bit loads it.

### Linking two EXUs into a 32-bit data path

EXU pairs (0,1), (2,3), (4,5) and (6,7) can be joined by setting the `link`
bit of the odd member. The even EXU becomes the low half and the odd EXU the
high half. Three kinds of signal cross between them:

- the low half's adder carry out goes up into the high half;
- the high half's unshifted B goes down as the low half's shifter fill;
- the high half's result selection (sum, A, B, +sat, −sat) and its A ≥ B
  go down to the low half.

So the pair computes 32-bit add, subtract, saturation, compare, max, min and
shift exactly. Both halves must be given the same opcode and shift amount in
each nanostore word. Saturation and compare follow the high half's
`is_signed`.

## Pipeline and timing

Every instruction goes through four one-clock stages:

| stage | where | what |
|---|---|---|
| F | `exu_ctl` | latch the global address `ga` |
| D | `exu_ctl` + `nanostore` | read the word (or an interrupt vector) into the instruction register |
| E | `exu` | register read, shift, add, select, register-file write, flag |
| O | `paddi_chip` | output channel registers at the pads |

An address driven on `ga` in cycle n therefore drives `out_ch` in cycle n+3.
A value produced in E is in the receiving EXU's register file in the next
cycle. A new instruction enters every cycle.

### Local branches (interrupts)

This is the least obvious part of the design. Any EXU can redirect any
other EXU on the chip:

1. Each EXU has two interrupt inputs. Their flag sources are chosen at
   set-up time (`fsw1`, `fsw2`) from the eight EXU flags and the two
   `ext_flag_in` pins.
2. If the instruction now in E has interrupt enable 1 (or 2) set, and the
   flag on that input is high, the D stage reads the nanostore at IV1 (or
   IV2) instead of at the fetched address. IV1 wins if both fire. IV1 and
   IV2 are nanostore addresses in the static settings.
3. Flags are registered at the end of E. An EXU that sets its flag in
   cycle n therefore redirects the instruction decoded in cycle n+1. The
   instruction after the enabling one is already decoded and runs as the
   single delay slot.
4. A vector replaces exactly one instruction. The global address stream
   resumes after it.
5. Flags from another chip pass through one more register at the pins,
   which adds one delay slot.

`int_taken[i]` reports each vector taken.

### Global branches

EXU flags leave the chip on `flag_out`. The external sequencer may look at
them and change the address it broadcasts. If it answers in the cycle after
the flag is set, the address it then drives is latched by F one cycle
later. The two instructions already fetched are the two delay slots.

## Instruction word

The word is 53 bits, packed MSB first as in `paddi_pkg::instr_t`:

| bits | field | meaning |
|---|---|---|
| 4 | `op` | operation (`op_e`) |
| 3 | `shamt` | shift of B, 0..7 |
| 4+4 | `xsrc_a`, `xsrc_b` | crossbar source of the A / B file input: 0..7 EXU results, 8..11 input channels, others zero |
| 1+1 | `fb_a`, `fb_b` | file takes this EXU's own result instead |
| 1+3+3 | `we_a`, `wa`, `ra` | A file write enable, write address, read address |
| 1+3+3 | `we_b`, `wb`, `rb` | same for B |
| 1 | `latch` | load the output pipeline register |
| 1+2 | `oe`, `obus` | drive output channel `obus` |
| 2 | `ien` | interrupt enables 1, 2 |
| 16 | `rsvd` | unused |

Routing is *receiver controlled*: an EXU chooses where its inputs come
from. A sender only chooses whether to drive an output channel and which
one. If two EXUs drive the same channel in one cycle, the lowest-numbered
one wins and an assertion reports the clash. The word width and the set of
fields follow the source architecture. The exact layout and encodings are
this implementation's own.

## Configuration

All set-up state forms one shift register that moves one bit per clock
while `cfg_en` is high. It runs from `cfg_si` (or the boot FSM) through
EXU0 and on to EXU7, and ends at `cfg_so`. Within an EXU the order is:

1. nanostore words 0..7;
2. static settings `exu_cfg_t` (19 bits: `iv1`, `iv2`, `fsw1`, `fsw2`,
   `is_signed`, `link`, `del_a`, `del_b`, `opreg`);
3. scan register A;
4. scan register B.

One EXU is 475 bits, and one chip is 3800 bits, or 475 bytes. The first bit
shifted in ends up farthest from the input. To build a stream, concatenate
the chip as `{EXU7, ..., EXU0}`, with each EXU as `{scanB, scanA, static,
word0, ..., word7}`, and send it MSB first. `make_rom` in
`tb/tb_paddi_chip.sv` does exactly this.

In master mode (`master`=1) the boot FSM reads a byte-wide EPROM after
reset:

- bytes 0..1 hold the payload length N, high byte first;
- bytes 2..N+1 hold the payload.

Each byte takes one address cycle, one data cycle and eight shift cycles.
`rom_data` is sampled one full cycle after `rom_addr` changes. One chip
boots in 4 + 10 × 475 = 4754 cycles. Further chips can be chained as
slaves. Connect `cfg_so`/`cfg_en_out` of one chip to `cfg_si`/`cfg_en_in`
of the next, tie `master` low, and make the EPROM image cover all chips.
After `cfg_done`, a `start` pulse begins execution, and the sequencer then
supplies an address every cycle.

## Where this implementation departs from, or adds to, the source architecture

These come from the source architecture:

- eight EXUs;
- four input and four output channels of 16 bits;
- six registers per file, one of them a scan register, usable as a delay
  line;
- an 8-word nanostore, 53-bit words and a 3-bit global address;
- the operation set, the carry-select adder, the logarithmic shifter, the
  a ≥ b flag and the optional pipeline register;
- 16/32-bit linking;
- dynamic data routing and static flag routing;
- the four-stage pipeline;
- two interrupt vectors with one delay slot, one extra delay slot between
  chips, and two delay slots for global branches;
- serial configuration with boot from EPROM.

These are this implementation's choices:

- the instruction and configuration encodings;
- saturation values, and which operations set the flag (CMP, MAX, MIN);
- that R6 is the scan register, and the delay-line shift order;
- IV1 priority, and a vector replacing exactly one instruction;
- lowest-index priority on output channels, modelled as a multiplexer
  rather than tri-state drivers;
- which EXU pairs can be linked, and the signals between them;
- the EPROM format, with a clock enable instead of a generated boot clock;
- two external flag inputs;
- input channels entering the crossbar unregistered.

The nanostore is an array of flip-flops written only through the chain. A
real implementation would use an SRAM macro. The external sequencer, the
boot EPROM, memories and converters of a system are not part of the chip.
The testbench models the sequencer and the EPROM.

## Fit of the published filter examples

One chip offers 8 EXUs, 8 instruction words and 6 + 6 registers per EXU.
The published mappings use the following resources, which fit in EXUs and
words:

| example | EXUs | cycles |
|---|---|---|
| biquad | 2 | 5 |
| 6th-order band-pass IIR | 8 | 8 |
| 7th-order high-pass IIR | 4 | 8 |
| 11-tap FIR | 5 | 8 |

Register use for these mappings is not known. The published 21-tap
Hamming low-pass FIR needs at least 10 EXUs, so it takes two chips. The
fully pipelined versions of most examples need 16 to 50 EXUs.

The hand-mapped filters in the testbenches use:

| filter | EXUs | cycles per sample |
|---|---|---|
| biquad | 2 | 5 |
| 6th-order IIR | 6 | 8 |
| 7th-order high-pass IIR | 8 | 8 |
| 11-tap FIR | 4 | 8 |
| 21-tap FIR | 4 + 4 on two chips | 8 |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_csel_adder` | random and corner additions against `+` |
| `tb_log_shifter` | all shift amounts, sign fill and link fill |
| `tb_exu_regfile` | scan load/readback, random traffic, delay line |
| `tb_nanostore` | serial load, readback, shift-out |
| `tb_exu_ctl` | F/D timing, run gating, IV1/IV2 selection against a model |
| `tb_crossbar` | random routing of data, channels and flags |
| `tb_config_unit` | EPROM boot stream and cycle count, slave pass-through |
| `tb_exu` | every operation in 16-bit and linked 32-bit form against reference arithmetic, plus accumulation, pipeline register and one-cycle issue |
| `tb_paddi_chip` | the whole chip at full size (see below) |
| `tb_paddi_filters` | a shift-add biquad on 2 EXUs (5 cycles per sample), 6th- and 7th-order IIR cascades of such sections on 6 and 8 EXUs (8 cycles per sample) and an 11-tap shift-add FIR on 4 EXUs (8 cycles per sample), booted from EPROM; outputs, sample period and latency |
| `tb_paddi_two_chips` | one EPROM booting a master and a daisy-chained slave; data from chip to chip; interrupt delay on-chip (one slot) and chip-to-chip (two slots); global branch after two delay slots |
| `tb_paddi_fir21` | a 21-tap shift-add FIR split over a master and a slave chip (8 cycles per sample): taps 0..10 on the first, taps 11..20 and the final sum on the second; outputs, period and latency |
| `tb_paddi_scan` | slave-mode loading through the pins, a program overwriting a scan register, full chain read back through `cfg_so` |

`tb_paddi_chip` runs four random eight-EXU programs:

- EXUs 6 and 7 are linked;
- interrupt vectors, flag routes, delay lines, pipeline registers and
  scan constants are random;
- each program is booted through the EPROM model;
- a sequencer in the testbench steps through words 0..5 and takes a global
  branch on EXU 0's flag.

A cycle-level reference model of the architecture is compared every cycle on
the output channels, valid bits, flags and interrupt-taken signals. The
testbench counts each mechanism and fails if any never occurred:

- interrupts from on-chip and from off-chip flags;
- global branches;
- saturation;
- delay-line writes;
- pipeline-register use;
- feedback writes;
- input-channel reads;
- EXU-to-EXU transfers;
- output words;
- linked operations.

This test shares its operation semantics with the RTL's specification, so
it shows that the RTL matches the architecture described here, not that this
description matches the original chip bit for bit.

`tb_paddi_filters` shows how programs are written for this machine. The
original filter mappings and their coefficients are not available, so the
filters in it are mapped by hand with coefficients chosen for the
example:

- Biquad: w[n] = x[n] + w[n−1]/2 − w[n−2]/4 and y[n] = w[n] + w[n−2]/2 +
  w[n−1]/8. EXU0 computes w. Both EXUs keep w[n−1] and w[n−2] in a B file
  run as a delay line, and EXU1 forms y.
- 6th-order IIR: three biquad sections in cascade on EXU pairs (0,1), (2,3)
  and (4,5). Every section runs the same five-word schedule, shifted by four
  words per section modulo the 8-cycle period. The first EXU of a section
  therefore takes the previous section's output in the cycle that output is
  computed. The output appears 12 cycles after the input.
- 7th-order high-pass IIR: the same three sections followed by a
  first-order section on EXUs 6 and 7, w = x + w1/2 and y = w − w1. It runs
  the biquad schedule with the zero scan register R6 read in place of w2.
  The output appears 16 cycles after the input.
- FIR: 11 taps of ±2^−s. Two EXUs hold five taps each in delay-line B files
  and accumulate shift-add terms from the zero constant in R6. A third EXU
  holds the last tap and adds one partial sum, and a fourth adds the rest
  and drives the output.

`tb_paddi_fir21` splits a 21-tap FIR over two chips booted from one
EPROM. The first chip runs the 11-tap schedule for taps 0..10. It drives its
partial sum on one output channel and the sample delayed by 10 on another.
The second chip keeps the delayed samples in two more delay lines and
accumulates taps 11..20. It adds the first chip's partial sum and drives
y[n] 9 cycles after x[n] enters.

Their comments give the word-by-word schedules. The IIR mappings trade EXUs
for one uniform schedule per section. The published mappings are tighter:
they use 4 EXUs for the 7th-order filter, where this one uses 8.

To run one testbench with plain Verilator (from the repository root):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/paddi_pkg.sv tb/tb_paddi_chip.sv --top-module tb_paddi_chip -o sim
./obj_dir/sim
```

All testbenches finish in well under a second. `tb_paddi_chip` uses the
chip at its default size.
