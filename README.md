# ADF trigger front end: digitize, filter and ship calorimeter energies every 132 ns

This RTL implements the digital logic of a level-1 calorimeter trigger front
end of the kind built for the D0 Run IIb upgrade. A calorimeter pulse lasts about 800 ns, six
times longer than the 132 ns between beam crossings. The trigger still needs
one transverse-energy value per channel for every crossing. The ADF board
("ADC and filter") therefore samples each channel four times per crossing.
It runs a short FIR filter over the samples. A 3-point peak detector then
assigns the energy to the crossing where the filtered pulse peaks, and a
calibration table turns the peak into an 8-bit energy. The 32 energies of a
board leave on three identical Channel Link buses, because each trigger
algorithm board needs data from three ADF boards.

Three more pieces complete the system:

- the **SCLD**, a card that distributes the experiment's timing signals to
  the ADF crates;
- a **Channel Link tester**, which captures link traffic or counts bit
  errors in a pseudo-random pattern;
- **raw-data readout**: after a level-1 accept, the unfiltered samples of the
  triggering event go out in spare bits of the same links.

The top module `adf_test_system` wires these together the way they sit on the
bench: SCLD → ADF board (crate master) → link 0 → tester. Links 1 and 2 are
brought out as ports, to the trigger boards. The tester talks to a PC over
a serial line.

## Clocking: one clock, three rates

Everything runs on one 60.56 MHz clock, the Channel Link bus clock. A
crossing is exactly 8 clocks. `adf_timing` counts the phase `0..7` and
restarts at each crossing marker from the SCLD. It derives:

| rate | period | strobe | used by |
|---|---|---|---|
| 30.28 MHz | 2 clocks | `adc_stb` (even phases), `adc_idx` = phase/2 | ADC sample capture, raw buffer |
| 15.14 MHz | 4 clocks | every second ADC sample (`dec_sel`) | FIR filter, peak detector |
| 7.57 MHz | 8 clocks | `bc_stb` (phase 0) | energies, link frames, history |

The ADC, filter, crossing and link rates are the board's own. Using one
clock with enables, instead of separate clock domains, is a simplification
made here.

## The channel pipeline (`adf_channel`)

```
ADC 10b ─► raw_buffer ─► fir_filter ─► peak_detector ─► et_lut ─► 8-bit Et
  30 MHz   live/capture/   8 taps,       3-point, one      shift, clamp
           playback 512    15 MHz        value/crossing    0..1023, table
                 │              │                │
                 └──────────────┴── history_buffer (samples, filter outputs, Et)
```

**Decimation or combination.** The filter keeps one sample of each pair
(`dec_sel` picks samples 0 and 2 of a crossing, or 1 and 3). So it makes
two outputs per crossing: slot 0 and slot 1. With `combine` set, the filter
input is instead the kept sample plus the sample before it, so every ADC
sample contributes. The input is then 11 bits.

**FIR.** The filter computes `y[n] = Σ coef[k]·x[n−k]` over 8 taps. `x` is
the unsigned filter input and the coefficients are signed 8-bit, set per
channel. The result is exact, 22 bits signed (|y| ≤ 8·2046·128 < 2^21). In
bypass, `y` is `x` itself.

**Peak detector and crossing assignment.** This is the subtle part. The
detector keeps `y[n]` only if `y[n] > y[n−1]` and `y[n] ≥ y[n+1]`, so
the decision for `y[n]` waits for `y[n+1]`. The strict/non-strict pair
makes a flat top count once, at its first point. Two neighbouring outputs
can never both be peaks, so at most one of a crossing's two outputs is
non-zero, and that value becomes the crossing's value. With the detector
off (`pk_en = 0`), the crossing value is the output of slot `slot_sel`.
The result is one value per crossing either way. With the detector on, a
clean pulse produces a non-zero energy in one crossing and zeros around it.

**Calibration table.** The crossing value is shifted right arithmetically by
`shift` (0–15) and clamped to 0..1023, so negative values clip to 0. It
then addresses a 1024 × 8 RAM loaded over the bus.

**Latency through the channel**, in 60.56 MHz clocks from an ADC strobe:

| stage | clocks |
|---|---|
| raw buffer | 1 |
| filter | 1 |
| peak detector | 1, plus the wait for the next filter output (4) when on |
| table | 1 |

The link framer puts a crossing's energies into the frame that starts at
the next `bc_stb`, and word 0 of that frame appears 2 clocks later. A kept
sample can also have to wait for its crossing's other slot. The system
test measures the bypass path: an ADC step reaches word 0 of a link frame
22 clocks (363 ns) later, and the test requires fewer than 24 clocks. The
original board needs 400 ns for the whole path with the filter bypassed,
including the analog stage, the ADC pipeline, the serializer and the
cable. The frame's last word leaves 7 clocks after word 0, 29 clocks
(479 ns) after the step. This design's digital path alone therefore takes
longer than the original board's whole bypass path. A
board that must meet the figure would need to:

- start the frame as soon as the energies are ready instead of at a fixed
  phase;
- drop the input register stages.

**Raw buffer (512 words).** The buffer has three modes:

- `BUF_LIVE` passes the ADC samples through.
- `BUF_CAPTURE` also stores 512 consecutive samples after a capture-start
  pulse, then stops and reports done. The stored waveforms are used to fit
  filter coefficients off-line.
- `BUF_PLAYBACK` feeds the filter from the buffer at the normal sample
  rate, looping over 512 words. This lets a known input series run through
  the real filter logic and be compared with a software model.

**History buffer (256 crossings).** Each crossing writes one record: the four
raw samples of the last complete crossing, the two filter outputs and the
energy. `freeze` stops writing so the records can be read slowly. A second
read port serves the raw readout.

## Link frame format (`link_framer`)

Each crossing is one 8-word frame of 36-bit words. The Channel Link bus is
48 bits wide; bits 47:36 are 0.

| word | bits 31:0 | bit 35 | bits 34:32 |
|---|---|---|---|
| 0 | Et ch 3,2,1,0 (ch 0 in bits 7:0) | 1 (frame marker) | {raw valid, 0, 0} |
| 1 | Et ch 7..4 | 0 | raw[15:13] |
| 2 | Et ch 11..8 | 0 | raw[12:10] |
| 3 | Et ch 15..12 | 0 | raw[9:7] |
| 4 | Et ch 19..16 | 0 | raw[6:4] |
| 5 | Et ch 23..20 | 0 | raw[3:1] |
| 6 | Et ch 27..24 | 0 | {raw[0], 0, 0} |
| 7 | Et ch 31..28 | 0 | 0 |

Bit 35 is set only in word 0, so a receiver can find frames without any
other alignment. The energies use 256 of the 288 bits; the sideband carries
one 16-bit raw-readout word per crossing: `{first-of-event, channel[4:0],
sample[9:0]}`. This layout is this design's own.

In **PRBS mode** the framer sends a PRBS-23 stream (x^23 + x^18 + 1) instead,
36 new bits per clock, with the earliest bit in bit 35. Writing the
inject-error bit inverts bit 0 of one word.

## Raw-data readout after a level-1 accept (`raw_readout`)

When the SCLD has `raw_fetch_en` set, it turns every level-1 accept into a
`raw_fetch` command. The ADF board then:

1. Takes the history record `lookback` crossings before the current write
   pointer as the first crossing of the event.
2. For `nbc` crossings, reads that record from all 32 channels at once.
3. Pushes 4 words per channel into a 1024-word FIFO.
4. The framer pops one word per crossing into the sideband.

With the defaults (2 crossings) an event is 256 words, or 256 crossings
(34 µs) on the link. A fetch that arrives while one is running is dropped
and counted (status register bits 31:16). The lookback must cover the
trigger latency. The sequencer spends 1 clock per word plus 1 per record,
so an event is in the FIFO about 260 clocks (33 crossings) after the
fetch. The oldest record it needs is `lookback` crossings old, so the
256-record history is not overwritten meanwhile.

## Synchronisation: SCLD and crate distribution

`scld` registers the signals from the serial command link receiver mezzanine
(`bc_marker`, `l1_accept`, `init`). It sends them to `N_CRATES` outputs (5
on the full card, 1 on the single-channel version), with a per-crate enable.
It adds `raw_fetch` as described above and counts accepts. The card has no
VME interface, so its settings are input pins.

In each crate, the ADF board cabled to the SCLD (strap `is_master`)
re-drives the bundle on spare backplane lines (`bp_sync_out`,
`bp_sync_oe`). The other boards take it from `bp_sync_in`.

## Channel Link tester (`cl_tester`)

- **Capture.** After `arm`, the tester stores the next 2048 received 36-bit
  words, either at once or from the next frame marker.
- **Bit error test.** A `sync` command seeds the tester's PRBS-23 generator
  from the word just received: a word of 23 or more bits holds the whole
  generator state. The tester then predicts every following word, compares
  bit by bit, and counts bit errors, errored words and words checked. The
  word counter is 64 bits, so multi-day runs do not wrap it.

**PC link (`uart_bridge`).** The PC reaches the tester's registers over
RS232: 8 data bits, no parity, 1 stop bit, 115200 baud by default
(`CLK_DIV` = 526 clocks per bit). Each command is a short byte sequence,
multi-byte fields MSB first:

- write: `'W'` (0x57), a 2-byte address, then 4 data bytes;
- read: `'R'` (0x52) and a 2-byte address. The bridge answers with 4 data
  bytes.

Bytes that are not a command are skipped, so the PC can resynchronise by
sending a few zeros. A byte with a bad stop bit is discarded. The real
tester also has a parallel-port option, which is not built here.

## Register maps

**ADF board local bus** (`adf_board`). Addresses are 20-bit word addresses.
Read data comes one clock after the address.

- `addr[19] = 0`: channel `addr[18:14]`, region `addr[13:12]`:
  - region 0: registers.
    - Words 0–7: coefficient k (signed, bits 7:0).
    - Word 8: control. Bit 0 bypass, 1 peak detector on, 2 `dec_sel`,
      3 `slot_sel`, 7:4 shift, 9:8 raw-buffer mode (0 live, 1 capture,
      2 playback), 10 `combine`.
  - region 1: raw buffer, 512 words.
  - region 2: calibration table, 1024 words.
  - region 3: history, 4 words per record:
    - word 0: samples 1 and 0;
    - word 1: samples 3 and 2;
    - word 2: filter output 0;
    - word 3: {Et, filter output 1 in 24 bits}.
- `addr[19] = 1`: board registers.
  - 0x00: link mode (bit 0: 1 = PRBS), freeze history (bit 1).
  - 0x01: lookback; 0x02: crossings per event.
  - 0x03: pulses. Bit 0 capture start, 1 inject link error, 2 load
    pedestal DACs.
  - 0x04: status. Bit 0 a capture completed, 1 readout busy, 2 DAC loader
    busy, 31:16 dropped fetches.
  - 0x40+c: pedestal code of channel c.

**Pedestal DACs** (`dac_loader`). There are 4 octal serial DACs with shared
`sclk` and `cs_n` and one data line each. A frame is 16 bits,
`{input[3:0], code[11:0]}` with inputs 0–7, MSB first. Data is stable at the rising
`sclk` edge, and `cs_n` is high for one bit time between frames. Channel c goes to DAC c/8,
input c%8. The DAC part is unspecified; adapt this module to the real one.

**Tester registers** (`cl_tester`, reached through the serial commands).

- `addr[12] = 1`: capture memory, entry `addr[11:1]`, low or high half.
- Otherwise:
  - 0: control. Mode, arm, trigger on marker, sync, clear.
  - 1: status.
  - 2: frames captured.
  - 3: bit errors.
  - 4 and 6: words checked, low and high halves.
  - 5: errored words.

## What follows the original board and what is this design's own

These follow the original board:

- 32 channels per board with 10-bit samples at 30.28 MHz.
- An 8-tap FIR at 15.14 MHz with per-channel coefficients.
- A 3-point peak detector that can be turned off.
- A calibration table producing 8-bit energies.
- A 512-sample buffer used for both capture and playback.
- History buffers that can be read slowly.
- Raw-sample readout on command after a level-1 accept.
- 36 of 48 bits of a 60.56 MHz Channel Link bus, three identical links.
- SCLD fan-out to 5 crates, or 1 on the single-channel version.
- A tester with 2048-frame capture and pseudo-random bit-error counting,
  controlled from a PC over RS232.
- Forced-error injection.

These are this design's own choices:

- The single clock.
- Merging the board's four FPGAs into one design.
- The local bus and all register maps.
- Coefficient width, decimation and pair-sum rules, exact peak rule, crossing-value rule,
  table addressing (shift and clamp), history depth and record layout.
- The frame layout and sideband.
- The PRBS polynomial.
- The raw-readout word format, FIFO and drop rule.
- The DAC serial protocol.
- The RS232 byte format, rate and command protocol.
- The sync bundle contents and the master strap.

Not included: the analog input stage, the ADCs and DACs themselves, the
Channel Link serializer and deserializer, the VME bridge, and the SCLR
mezzanine. The SCLD of the original system also fans out the reference
clock to the crates; here the clock is a common input of every module, and
only the synchronous signals travel through the SCLD. The RTL sees their digital sides as ports. The later production
board, which drops most of the filtering, is not modelled; this is the
prototype's full-function design.

## Files

- `rtl/adf_pkg.sv`: constants and shared types (`sync_t`, `sclr_t`,
  `chan_cfg_t`, modes).
- Per-channel datapath: `raw_buffer`, `fir_filter`, `peak_detector`,
  `et_lut`, `history_buffer`, and `adf_channel`, which chains them.
- Board: `adf_timing`, `raw_readout`, `link_framer`, `prbs_gen`,
  `dac_loader`, and `adf_board`, which contains all of these plus the 32
  channels.
- System: `scld`, `cl_tester`, `uart_bridge` (the tester's PC link), and
  the top, `adf_test_system`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

The test methods:

- **Channel and system tests.** These compute the expected energies with
  their own model of decimation, FIR, peak detector and table.
- **`tb_adf_test_system`.** This runs the whole chain at full size: all 32
  channels, full memories, default parameters. It checks filtered, bypassed,
  pair-summing and playback channels against the model. It makes every mechanism happen
  at least once and counts each: capture, freeze, pedestal load, raw fetch,
  dropped fetch, crate masking, backplane drive, PRBS lock, forced error and
  tester capture. It talks to the tester only over the RS232 line, and it
  measures the bypass latency (see above).
- **`tb_adf_desktop`.** This runs the board with `NCH = 1`, the desktop
  card. It uses the same addresses as the 32-channel board and checks the
  frames, the raw fetch and the PRBS stream.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_adf_test_system \
  -y rtl -y tb +libext+.sv rtl/adf_pkg.sv tb/tb_adf_test_system.sv --Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another test. The full-system test takes
about half a minute to build and run. Parameters worth changing:

- `adf_board #(.NCH(1))` gives the single-channel desktop version.
- `scld #(.N_CRATES(1))` gives the single-channel SCLD.
- `raw_readout #(.FIFO_DEPTH())` sets the raw-readout FIFO size.
- `cl_tester #(.DEPTH())` sets the tester capture depth.
- Package constants such as `HIST_DEPTH` set the history depth.
