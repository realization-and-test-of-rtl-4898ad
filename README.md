# CARLOS 2.0 readout core: two-channel lossless compression and packing

CARLOS 2.0 sits on the front-end board of a silicon drift detector (ALICE Inner
Tracking System). It takes the digitised samples of two half-detectors, two
8-bit samples per 40 MHz clock, and sends them as one stream of 16-bit words,
one word per clock, ready for serialisation onto an optical link. Along the
way it does three things:

* compresses each sample without loss into a 4, 7 or 10-bit code, so that the
  small values typical of detector data cost fewer bits;
* packs the codes of each channel into 15-bit words and queues them, because
  the code can locally be longer than the sample and the output is shared
  between the channels;
* frames every event as a packet: trigger information in front, the two
  channels' data interleaved, the event count at the end.

A command unit reached over JTAG selects the operating mode, and a built-in
self test (BIST) drives both channels with pseudo-random data and checks the
output with a 16-bit signature. The result is read back on `tdo`: `FF` for a
good chip, `55` for a faulty one.

This RTL is a SystemVerilog reconstruction of the chip from its published
description. The block structure, widths, buffer sizes, packet structure,
command states, BIST size and result codes come from that description. The code
table, bit layouts, handshakes, JTAG instruction set and LFSR polynomials were
not published. They are choices made here and are marked as such below and in
each file's header.

## Block structure

```
            +---------+   +--------+   +-----------+
 ch_data[0] | encoder |-->| barrel |-->| fifo32x15 |--+
            +---------+   +--------+   +-----------+  |   +--------+
 ch_data[1] | encoder |-->| barrel |-->| fifo32x15 |--+-->|        |
            +---------+   +--------+   +-----------+      | outmux |--> data_out[15:0]
 TTC bus -->| ttc_rx_if |-->| fifo_trigger 15x12 |------->|        |
            +-----------+   +--------------------+        +--------+
 trigger_in --> trigger_if --> trigger_busy          event_counter ^
 tck/tms/tdi --> jtag_tap --> cmcu --> mode, pipeline reset, BIST start
 pattern_gen --> (replaces ch_data in BIST)   signature <-- data_out
```

| Module | Block | Role |
|---|---|---|
| `carlos_pkg` | | widths, word formats, command and instruction codes |
| `carlos_encoder` | encoder | 8-bit sample to a 4/7/10-bit prefix code, 1 cycle |
| `carlos_barrel` | barrel | codes to 15-bit words, end-of-event flush, 2 cycles |
| `carlos_fifo` | fifo32x15, fifo_trigger15x12 | flip-flop FIFO with any depth |
| `carlos_channel` | channel | encoder + barrel + fifo32x15 + event-closed flag |
| `carlos_ttc_rx_if` | ttc_rx_interface | TTC receiver words into the trigger FIFO |
| `carlos_trigger_if` | trigger_interface | trigger line synchroniser, pending events, busy |
| `carlos_event_counter` | event_counter | counts transmitted packets |
| `carlos_outmux` | outmux | packet builder and channel interleaver |
| `carlos_jtag_tap` | JTAG port | IEEE 1149.1 TAP, command and result registers |
| `carlos_cmcu` | cmcu | IDLE / RESET_PIPE / BIST / RUN |
| `carlos_pattern_gen` | pattern generator | 200 BIST vectors |
| `carlos_signature` | signature maker | 16-bit MISR and pass/fail |
| `carlos_top` | whole core | wiring, input throttling, source selection |

## The variable-length code

The published description gives only the code's properties: 4 to 10 bits and
lossless. The table used here is a three-class prefix code:

| Sample value | Code | Length |
|---|---|---|
| 0 .. 7 | `0` + value[2:0] | 4 |
| 8 .. 39 | `10` + (value - 8)[4:0] | 7 |
| 40 .. 255 | `11` + value[7:0] | 10 |

Codes are sent MSB first. Any other prefix code with lengths between 4 and 10
drops into `carlos_encoder` without changing the rest of the design. If you
change the table, also change the reference functions in `tb/carlos_tb_pkg.sv`
and the BIST signature (see below).

## Packing into 15-bit words (barrel)

The barrel is the hardest part of the chip to follow. It holds a partly filled
word (`hold`, left-aligned) and the number of bits in it (`fill`, 0..14). Each
new code of length L is placed right behind those bits in a 30-bit window:

```
cat = {hold, 15'b0} | ({code left-aligned, 20'b0} >> fill)
```

* If `fill + L < 15`, the window's upper half becomes the new `hold`.
* If `fill + L >= 15`, the upper half is a complete word and is sent. The
  lower half keeps the bits of the code that did not fit, and `fill` becomes
  `fill + L - 15`. A code broken this way loses no bits.
* If the code is the last one of the event, the upper half is sent even if it
  is not full, with its unused low bits at 0. If that code both completed a
  word and left a remainder, two words go out on consecutive clocks: the full
  word, then the padded remainder. `out_last` marks the final word.

Example: with `fill = 12`, a 7-bit code `1000011` completes the word with `100`
and leaves `0011` as the first 4 bits of the next word.

Timing: an input register stage, then the packing stage with its registered
output. The word completed by a code leaves two clocks after the code enters.
The flush of a two-word end of event occupies one extra clock, and no code of
the next event may arrive in that clock (an assertion checks this). The chip
level guarantees it, because a new event is only accepted after the previous
one has been sent.

## Channel FIFOs and input throttling

Each channel queues its words in a 32 x 15 flip-flop FIFO. The output gives
each channel one clock in two, that is 15 bits every 2 clocks. A channel
receiving a sample every clock therefore keeps up only while its codes average
7.5 bits or less. Since the codes are 4, 7 or 10 bits, sustained large values
fill the FIFO. The published description leaves open what happens then. Here
the core has an input handshake:

* a sample pair is taken in a clock where `in_valid` and `in_ready` are both 1,
  and `in_last` marks the last pair of an event;
* `in_ready` is 0 outside RUN;
* `in_ready` is 0 while either FIFO holds more than 27 words (`FIFO_DEPTH - 5`).
  This leaves room for the up to three words still inside the encoder and
  barrel pipeline;
* `in_ready` is 0 from the last pair of an event until that event's packet has
  been sent. The next event's data therefore never mix with the current one.

Both channels share `in_valid`, `in_last` and `in_ready`, because the two
half-detectors are read out together. Any FIFO overflow, which the throttling
should make impossible, sets the sticky `error` output.

## Output packet

One 16-bit word per clock while a packet is sent. `data_valid` qualifies each
word, `data_first` marks the first header word and `data_last` the last footer
word.

| Words | Content | Layout |
|---|---|---|
| 3 header words | trigger record of the event | `{1, evcnt[2:0], trigger word k}`, k = 0, 1, 2 |
| 2N data words | channel 0, channel 1, channel 0, ... one clock each | `{0, 15-bit word}` |
| | a channel with nothing to send in its clock | `16'h8000` (dummy) |
| 2 footer words | event count | `{4'hF, evcnt[11:0]}`, `{4'hF, ~evcnt[11:0]}` |

These parts follow the published description:

* the three header words taken from the trigger FIFO;
* the fair alternation between the channels;
* the dummy word, with its flag bit set and all other bits at 0;
* the even number of data words;
* the two footer words carrying the event count.

The exact header and footer layouts are this design's own. Data words always
have bit 15 at 0, so dummies, headers and footers can be told apart from data.
`evcnt` is the 12-bit event counter: it starts at 0 after RESET_PIPE and
advances when a packet has been sent.

A packet starts when three conditions hold. The mode is RUN (or BIST). The
trigger FIFO holds the event's three words (in BIST no trigger words are needed
and zeros are sent). Each channel FIFO holds data or has closed its event. The
data phase ends before a channel-0 clock once both channels have closed the
event and emptied their FIFOs. A channel "closes" an event when the barrel has
written that event's last word.

To recover the samples, collect the even and odd data words of a packet
separately, drop the dummies, and parse the codes MSB first until the event's
sample count is reached. Padding bits are zeros and are never more than 14.
`decode_words` in `tb/carlos_tb_pkg.sv` does exactly this.

## Trigger path

`carlos_ttc_rx_if` expects the TTC receiver's 12-bit bus with three strobes per
event, in this order:

* `bcnt_str`: bunch counter;
* `evcnt_l_str`: event counter, low half;
* `evcnt_h_str`: event counter, high half.

Each strobed word is written to the 15 x 12 trigger FIFO, which holds five
events' records. A strobe out of order, or a word arriving when the FIFO is
full, sets `error`. The strobe interface follows the TTC receiver chip and was
not published for CARLOS.

`carlos_trigger_if` synchronises the asynchronous `trigger_in` line and counts
events that have been triggered but not yet sent. It raises `trigger_busy` at
five such events, or when not in RUN. A trigger that arrives while busy sets
`error`. The published description only names this block, so its behaviour is
a design choice built around the five-event buffer.

## Command unit, JTAG and self test

The core powers up in IDLE. Commands are written through JTAG:

| JTAG IR (3 bits) | Data register |
|---|---|
| `001` CMD | 2-bit command, applied at Update-DR: 0 IDLE, 1 RESET_PIPE, 2 BIST, 3 RUN |
| `010` RESULT | 8-bit BIST result, LSB first: `00` not run/running, `FF` pass, `55` fail |
| `111` and others | 1-bit bypass |

* IDLE: nothing is computed, and inputs and triggers are refused.
* RESET_PIPE: an internal reset holds every pipeline register cleared.
* BIST and RUN are accepted only from RESET_PIPE, so they always start from a
  clean pipeline. Other commands are ignored.
* The usual sequence is RESET_PIPE, BIST, read RESULT, then RESET_PIPE, RUN.

The TAP is the standard 16-state controller. Its pins are sampled with the
40 MHz clock, so `tck` must be at most a quarter of the chip clock. This keeps
the core in a single clock domain, and is a design choice. There is no `trst_n`:
five `tck` cycles with `tms` high reset the TAP.

In BIST, the pattern generator sends 200 vectors as one event, at the same time
to both channels and throttled like normal input. The vectors come from a
16-bit LFSR (x^16 + x^14 + x^13 + x^11 + 1, seed `ACE1`); channel 0 gets the
low byte and channel 1 the high byte. The signature register folds every word
of the resulting packet into a 16-bit MISR with the same polynomial:
`sig <= {sig[14:0], sig[15]^sig[13]^sig[12]^sig[10]} ^ word`. At the last
footer it compares the result with `SIG_EXPECTED`, and the result register
becomes `FF` or `55`. The 200 vectors, the 16-bit signature and the two codes
are from the description. The generator, the polynomial and what is compacted
are design choices.

`SIG_EXPECTED = 16'hA8A4` is the signature of the 263-word packet of a
fault-free run. It was obtained in simulation with a separate model of the
MISR, on a packet that the testbench also decodes and checks against a model of
the pattern generator. Recompute it whenever the code table, the packet format,
the generator or the BIST length changes: `tb_carlos_top` prints it.

## Parameters of `carlos_top`

| Parameter | Default | Meaning |
|---|---|---|
| `FIFO_DEPTH` | 32 | words per channel FIFO (published size) |
| `TRIG_DEPTH` | 15 | trigger FIFO words (published size) |
| `MAX_EVENTS` | 5 | events buffered before `trigger_busy` (published) |
| `BIST_VECTORS` | 200 | BIST vectors (published) |
| `SIG_EXPECTED` | `16'hA8A4` | expected BIST signature (see above) |

`rst_n` is a synchronous, active-low power-on reset. The clock is 40 MHz in
the original chip; nothing in the RTL depends on the frequency except the
`tck`-to-`clk` ratio.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_carlos_encoder`: all 256 values against the code table, 1-cycle latency.
* `tb_carlos_barrel`: random code streams against a bit-queue model. Checks
  exact words, zero padding, `out_last`, the 2-cycle latency, split codes and
  two-word flushes.
* `tb_carlos_fifo`, `tb_carlos_fifo_trigger`: both sizes against a queue
  model, including overflow and underflow.
* `tb_carlos_channel`: random events decoded back to samples.
* `tb_carlos_outmux`: packet format, interleaving and dummies, with modelled
  FIFOs.
* `tb_carlos_ttc_rx_if`, `tb_carlos_trigger_if`, `tb_carlos_event_counter`,
  `tb_carlos_jtag_tap`, `tb_carlos_cmcu`, `tb_carlos_pattern_gen`,
  `tb_carlos_signature`: each block's rules.
* `tb_carlos_top`: the whole core at its default parameters. It runs BIST over
  JTAG (decodes the BIST packet and expects `FF`), then 40 events in RUN with
  triggers sent up to five ahead. Every packet is decoded and compared with
  what was sent. It also requires each of these to happen at least once: input
  stalls, dummy words, split codes, padded end words, `trigger_busy`, several
  buffered trigger records, a BIST pass and the mode changes. Finally it
  forces a stuck-at-1 bit into channel 1 and runs BIST again, which must
  report `55`.
* `tb_carlos_workloads`: the acquisition runs the original chip was tested
  with, through the whole core at its default parameters.
  - JTAG configuration, then two events of 1024 sample pairs.
  - One event of 49152 pairs of uniformly random samples. This is the worst
    case for the code: 61870 clocks, with the input stalled about one clock
    in five.
  - One event of 49152 pairs of gaussian-like samples: 49167 clocks, with no
    stall.
  - 83000 short events, so the 12-bit event counter wraps 20 times.
  Every packet is decoded and compared. The run takes a few seconds.

`tb/carlos_tb_pkg.sv` holds the reference encoder and the decoder (the inverse
of a channel) shared by the testbenches.

Simulating with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_carlos_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/carlos_pkg.sv tb/carlos_tb_pkg.sv tb/tb_carlos_top.sv
./obj_dir/Vtb_carlos_top
```

Replace `tb_carlos_top` by any other testbench name. `tb_carlos_top` finishes
in well under a second.

## What is not here

* The I/O pads, the radiation-tolerant cell library and the package. The
  original chip has 84 used pads out of 100 on a PGA100. These are physical
  parts with no logic to describe.
* The receiver board and the data link chain after the chip: the FPGA
  receiver board, the source and destination interface units, the optical
  link and the PC acquisition card. Their logic was not published.
* The original chip's exact code table, header/footer bit layout, JTAG
  instruction codes, LFSR polynomials and input handshake. These were not
  published; the choices described above replace them. Data produced by this
  RTL is therefore not bit-compatible with data from the original chip.
