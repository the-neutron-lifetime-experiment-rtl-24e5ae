# IF-DAQ signal detection unit and UCF link in SystemVerilog

This design is the FPGA firmware of one readout card of the PENeLOPE
neutron-lifetime experiment. The card is a signal detection unit (SDU). It
digitizes 96 avalanche photodiode channels, finds proton pulses in each
channel with a floating threshold, and ships every pulse as a small frame
over one serial link. The link runs the Unified Communication Framework
(UCF): one 8b/10b lane that carries three kinds of traffic at once:

- a fixed-latency timing protocol (TCS);
- prioritised user protocols (USP) for event data and slow control;
- a veto path for back pressure.

The far end of the link is a UCF master, which stands in for the
concentrator card that collects the SDUs.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). The parameter
defaults are the numbers of the real system:

- 48 dual ADCs, giving 96 channels;
- 12 processing units of 8 channels each;
- a 100 MHz processing clock;
- a 62.5 MHz link clock.

## Structure

```
ifdaq_top
├── sdu                        one SDU card (clk_sys 100 MHz, clk_ucf 62.5 MHz)
│   ├── adc_emulator           optional test source in place of the ADCs
│   ├── ltc1407_readout        serial read-out of 48 LTC1407 dual 12-bit ADCs
│   ├── fifo_async  x48        decoupling FIFOs, one per ADC
│   ├── processing_unit x12    8 channels each, one sample per clock
│   │   ├── pedestal_calc      running pedestal and sigma^2 per channel
│   │   ├── delay_fifo         per-channel sample delay
│   │   ├── pedestal_sub       baseline subtraction of direct and delayed stream
│   │   ├── signal_detect      trigger and event window
│   │   └── frame_gen          per-channel frame FIFOs and descriptors
│   ├── channel_mux            round-robin frame collection, header insertion
│   ├── fifo_async             UCF FIFO, 100 MHz -> 62.5 MHz, 512 words
│   └── ucf_core (slave)       ucf_tx, enc8b10b, dec8b10b, ucf_rx
├── ref_clock_change           reference clock choice of the SDU transceiver
└── ucf_core (master)          concentrator end, with elastic_buffer
```

`ucf_pkg` holds the link word constants, the stream struct `axis_t`
(valid, data, keep, last) and the processing configuration struct `pu_cfg_t`.

## The sample path

### ADC read-out

All 48 converters share one serial clock, SCLK, which is the system clock
divided by two (50 MHz). They also share one conversion signal. Each
converter has its own data line.

A frame is 34 SCLK periods long:

- conversion pulse in SCLK period 0;
- channel 1 in SCLK periods 3 to 14, MSB first;
- channel 2 in SCLK periods 19 to 30.

The data line is sampled on the system clock edge at which SCLK rises. The
bit positions inside the frame are this design's reading of the converter
timing.

This gives one sample per channel every 68 system clocks, or 1.47 MS/s. The
samples of each converter go into a small dual-clock FIFO as a {B, A} pair.

### Processing units: many channels through one pipeline

A processing unit serves eight channels (four converters). It handles one
sample of some channel per clock, and every stage keeps per-channel state
in small arrays indexed by the channel number that travels with the sample.

A round-robin scanner picks a non-empty converter FIFO. It issues
channel A in that clock and channel B in the next, popping the FIFO with B.

The pipeline has four registered stages:

1. **pedestal_calc**
   - Running sums per channel over N = 2^avg_pow samples:
     - `Psum += S - P`, then `P = Psum >> avg_pow`;
     - `Ssum += (S-P)^2 - sigma2`, then `sigma2 = Ssum >> avg_pow`.
   - After reset, a channel first averages N samples for P and then N more
     samples of (S-P)^2 for sigma2. Only then is it *ready*.
   - The sums freeze while the channel is inside an event.
   - The sums also freeze for any single sample above the trigger threshold.
     Without this, the first samples of a pulse, which arrive before the
     trigger fires, raise sigma2 so far that the pulse never crosses the
     threshold. With N = 4096 one 1500-count sample adds about 550 to sigma2.
   - `delay_fifo` runs alongside this stage. It delays the samples of each
     channel by `delay` samples of that channel.
2. **pedestal_sub** subtracts the pedestal from the direct sample and from
   the delayed sample. Both results are 16-bit signed.
3. **signal_detect**
   - A sample is *above* when `diff > factor * sigma2`. The multiple applies
     to the mean quadratic deviation itself, not to its square root.
   - After `nmb_samples` consecutive samples above threshold, the channel
     triggers.
   - The trigger opens an event window of `nmb_samples_fr` samples, starting
     with the trigger sample.
   - `pause[ch]` is high while the window is open. It freezes stage 1.
4. **frame_gen** stores the *delayed* samples of the window, two per 32-bit
   word. The earlier sample is in the low half.
   - Each channel has a 64-word FIFO and four frame descriptors. A
     descriptor holds the trigger time stamp and the word count.
   - If the FIFO or the descriptors cannot take a whole frame, the event is
     dropped and counted.
   - If the channel or the whole card is vetoed, the event still pauses the
     pedestal but makes no frame, and it is counted as vetoed.

The delay therefore sets how many samples before the trigger point appear
in the frame.

The configuration, typical values in brackets, is:

- `delay` (5);
- `factor` (5);
- `nmb_samples` (3);
- `nmb_samples_fr` (30);
- `avg_pow` (12).

It is one `pu_cfg_t` input shared by all units.

### Frames on the link

`channel_mux` scans all 96 channels round-robin. For each complete frame
it writes these words into the UCF FIFO:

| word | content |
|------|---------|
| 0 | `32'h0000_0000` |
| 1 | `{channel[7:0], 8'h00, total words[15:0]}` |
| 2 | time stamp of the trigger, in 100 MHz clocks since reset |
| 3.. | samples, two signed 16-bit values per word |

The final word carries `last`. With `nmb_samples_fr = 30` a frame is 18
words.

## The UCF link

### Words

Every link word is 32 bits plus four K-character flags. Bytes are numbered
from the least significant byte, and byte 0 is sent first. The control
words are:

| word | value (byte 3..0) | K flags |
|------|-------------------|---------|
| alignment | FC DC BC DC | 1111 |
| polarity | 45 67 BC DC | 0011 |
| constant header | DC DC BC DC | 1111 |
| idle / filler | 01 FC BC DC | 0111 |
| TCS start | A6 DC A6 DC | 0101 |
| end of frame | A3 DC BC DC | 0111 |
| clock correction | FC FC BC DC | 1111 |
| USP start | id 5C BC DC | 0111 |
| veto | v[15:0] 5C DC | 0011 |

Data bytes without `keep` are sent as K28.0 and come out as zero bytes with
`keep` low. The 8b/10b coder uses the standard tables, starts with negative
running disparity, and is registered, with one clock in each of the encoder
and decoder.

### Initialization and polarity

After reset, both ends go through these steps:

1. Each end sends alignment words until its own receiver has seen four
   words with `DC BC` in the low bytes, and for at least `CYCLES_MIN`
   words.
2. Each end sends polarity words until its receiver has seen four clean
   ones.
3. Each end sends the constant header and then its 32-bit constant. The
   receiver stores the far end's constant.

A swapped differential pair inverts every bit. An inverted K28.5 or K28.6
is still the same comma in the other disparity, so lock still works, but
the data bytes `45 67` arrive corrupted. The receiver then toggles its
input inversion and restarts the link.

Several rules keep the two ends from waiting on each other:

- A restart of a receiver also restarts its own transmitter.
- A receiver that sees idle words, or an unexpected constant header, while
  it is still checking polarity restarts.
- A receiver that sees only alignment words for 200 words in the polarity
  phase restarts.
- A running receiver that sees an alignment word restarts.

`link_up` means that both directions are initialized.

### Priority and nesting

Each clock the transmitter sends the first of these that applies:

1. **TCS.** A TCS frame may start in any word slot, even inside a USP
   frame. Its start word leaves one clock after `tcs_i.valid`, so its
   latency is fixed.
2. **Veto.** Four veto words, with bits 63:48 first, are sent whenever the
   local veto vector changes.
3. The end word of a finished USP frame.
4. **Clock correction.** The slave sends one every `CC_INTERVAL` (1000)
   words.
5. **USP start.** A channel may open a frame when its index is above every
   open channel. Higher channels interrupt lower ones, and the receiver
   resumes the lower frame when the higher one ends.
6. A data word of the highest open USP channel.
7. Idle, which also fills a frame whose source has no data ready.

A USP channel that the far end has vetoed is neither opened nor served.
The veto is the back-pressure mechanism.

In the SDU, USP 0 carries event data and USP 1 carries slow control, so a
control message can cut into a long data frame.

### Receiving, and the master's elastic buffer

The receiver holds each data word back until the next word or the end word
arrives, so that `last` falls on the final data word. An end word closes
the TCS frame if one is open, and otherwise the highest open USP frame.

The slave decodes in the link clock, which in hardware is recovered from
the master's data. The master receives in the slave's clock. Its decoded
words therefore cross into its own clock through `elastic_buffer`:

- The buffer is a 16-entry dual-clock FIFO with Gray pointers.
- It drops an incoming clock-correction word when more than half full.
- It repeats one at its output when running low.
- `bufstatus` reports `101` for underflow and `110` for overflow, following
  the transceiver convention.

### Reference clock

`ref_clock_change` picks the SDU transceiver's reference clock code from a
per-transceiver table (index `generate_id`):

- a default code;
- a code used once an external generated clock reports lock, while
  `use_gen_clock` is set.

It falls back to the default code when lock is lost. Every change pulses a
16-clock reset that re-initializes the SDU's link end.

## Top level

`ifdaq_top` connects one SDU to a master end.

The serial lane is modelled by the two 40-bit parallel symbol buses. The
inputs `invert_m2s` and `invert_s2m` flip one direction to model a swapped
pair.

Both ends share `clk_ucf`, as the slave runs on the recovered clock. The
ports bring out:

- the concentrator-side data, control and TCS streams;
- the SDU-side control and TCS streams;
- the veto vector;
- the link status and error counts;
- the event counters of the SDU: triggers, frames made, vetoed, dropped
  and sent;
- the number of pulses the emulator produced.

## Verification

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | covers |
|-----------|--------|
| `tb_enc8b10b` | known code words, disparity of 12,000 random symbols, round trip through the decoder |
| `tb_dec8b10b` | both disparities, inverted commas, invalid symbols, random round trip |
| `tb_ucf_core` | master and slave back to back: initialization, constants, TCS example frame with partial keep, TCS start latency of one clock, USP frame nested with a higher channel and a TCS frame, clock correction, veto stop and release, swapped pair |
| `tb_elastic_buffer` | reader 1 % slower and 1 % faster: data intact, clock-correction words dropped or repeated, overflow and underflow status |
| `tb_fifo_async` | unrelated clocks, random enables, full and empty |
| `tb_delay_fifo` | interleaved channels, two delays |
| `tb_ref_clock_change` | table rows 0, 4 and 6, lock and loss, reset pulse length |
| `tb_ltc1407_readout` | against a behavioural converter model, 68-clock frame period |
| `tb_pedestal_calc` | pedestal and sigma^2 of eight channels against a reference model, spikes excluded, pause, two averaging lengths |
| `tb_signal_detect` | trigger and event window of eight channels against a reference model, random settings |
| `tb_ifdaq_top` | end to end at full size (see below) |

`tb_ifdaq_top` runs the whole top at its default parameters. The emulator
generates random pulses on all 96 channels. Both lane directions start
inverted. The test checks every frame that reaches the concentrator:

- header word 0 is zero;
- the channel is valid;
- the length field matches the received length;
- time stamps rise within each channel;
- no frame comes from the permanently vetoed channel 5.

Meanwhile the test drives:

- TCS frames to the SDU;
- control frames in both directions, including one that cuts into a data
  frame;
- a back-pressure veto that must stop the data;
- a card veto;
- a reference clock switch that re-initializes the link.

At the end, the frames received must equal the frames the SDU sent. Each
of these mechanisms is counted and must occur at least once. The only
setting reduced is the pedestal length, 2^6 instead of 2^12 samples, which
is a run-time input. The test runs in under a minute.

`pedestal_calc` and `signal_detect` have their own tests with a reference
model. The rest of the processing chain (`pedestal_sub`, `frame_gen`,
`processing_unit`, `channel_mux`, `adc_emulator`, `sdu`) is checked only
through `tb_ifdaq_top`. `ucf_tx` and `ucf_rx` are checked through
`tb_ucf_core`.

To run a testbench with Verilator:

```
verilator --binary --timing -y rtl -y tb -Irtl rtl/ucf_pkg.sv tb/tb_ifdaq_top.sv --top-module tb_ifdaq_top
./obj_dir/Vtb_ifdaq_top
```

## Choices beyond the source description

- **Alignment word.** The description has two spellings of the alignment
  word. The `FCDCBCDC` form is used.
- **K-character flags.** The flags of the TCS start and end words are not
  given. Only the `DC` and `BC` bytes are marked as K.
- **USP start word.** The USP identifier sits in the top byte of the start
  word.
- **Veto frame.** The veto frame layout (four words, 16 bits each) and the
  clock-correction interval are this design's choices.
- **Frame header.** The source text for the SDU frame header breaks off.
  The header above (zero word, channel and length word, time stamp) is this
  design's completion.
- **Pedestal.** The two-phase start-up of the pedestal, and the exclusion
  of above-threshold samples from the pedestal sums, are this design's.
- **Reference clock table.** The printed reference-clock table has one row
  fewer than its declared size. The missing last row is taken as 000/000.
- **Elastic buffer errors.** The master reports elastic buffer errors but
  does not re-initialize on them.
- **Transceiver.** The serializer, PLL, clock recovery and equalizers of a
  real transceiver are outside the RTL.
- **Missing functions.** The time tag, the control and monitoring
  registers, and the concentrator's event handling are not described in
  enough detail to build. They appear only as stream ports.

## Capacity

- **Channels and processing units.** 96 channels in 12 units of 8 need
  11.8 M samples/s per unit. A unit takes 100 M samples/s.
- **Event rate.** At 10 kHz events per channel, the highest rate the
  system was stress-tested with, the SDU produces
  96 × 10 kHz × 18 words = 17.3 M words/s. The link carries 62.5 M words/s.
- **ADC sample rate.** The 34-period serial frame limits each converter to
  1.47 MS/s, under its 3 MS/s rating.
- **Line rate.** The link core moves 40 code bits per clock. That is
  2.5 Gb/s at 62.5 MHz, and 5 Gb/s needs a 125 MHz link clock.

## Not included

The design has no RTL for the following:

- analog front end and bias supplies;
- the ADC chips themselves (the emulator replaces them in tests);
- voltage distribution and its I2C/1-Wire control;
- time tag module;
- concentrator card, including the 14-SDU collection;
- transceiver hard IP;
- TDC;
- MSADC cards;
- DDR event builder;
- carrier boards;
- slow-control PLCs.
