# Hybrid DS/FFH spread-spectrum transceiver in one FPGA

This design is a low-rate radio link for utility-meter reading that is meant
to survive jamming. It combines two spread-spectrum methods:

- **Direct sequence (DS).** Each byte rides on one 63-chip pseudo-noise code sequence.
- **Fast frequency hopping (FFH).** The carrier moves to a new channel after every single code
  sequence, several times per byte.

Each byte is also sent three times on three channels that are far apart. The
receiver takes a 2-of-3 vote, so a jammer that blocks one channel costs nothing.

Two ideas make the radio practical:

1. **Bits are carried by the code's timing, not by carrier phase.** A byte is
   encoded as a *rotation* (start offset) of the code. After every hop, the
   antenna, filters and terrain give the carrier an unknown phase. Because the
   receiver only asks "which rotation correlates best?", it never needs that
   phase. There is no Costas loop and no phase tracking.
2. **The receiver is software-defined and listens to every channel at
   once.** The whole 12.5–35 MHz intermediate-frequency band is sampled at
   100 MHz. It is mixed down digitally on all ten channels in parallel. The
   packet preamble can therefore be found on whichever channel is not jammed.

Transmitter and receiver share one 100 MHz clock and one bank of ten
look-up-table oscillators. The design ends at the converters: a 16-bit D/A
output and a 14-bit A/D input. A host loads and unloads bytes through two FIFOs.

## Signal plan

| Item | Value |
|---|---|
| System / sample clock | 100 MHz |
| Chip rate | 1.25 Mchip/s (80 clocks per chip) |
| Code length | 63 chips, m-sequences: I code x^6+x+1, Q code x^6+x^5+x^2+x+1 |
| Hop length | one code sequence = 5040 clocks = 50.4 µs (19,841 hops/s) |
| Channels | ten, at 12.5 + 2.5·k MHz (k = 0..9); only k = 0..7 are used |
| Redundancy | every byte sent 3 times (a *triplet* of hops) |
| Packet | 4 blank preamble bytes (12 hops) + `PKT_BYTES` data bytes (default 32) |
| Throughput | 100 MHz / 5040 / 3 × 8 bit = 52,910 bit/s |

The top two channels are left unused. With a double-balanced mixer in the
analog front end, a single jammer's harmonics can land on both 12.5 MHz and
32.5 MHz.

**Hop pattern.** Triplet number `trip` and copy `rep` (0..2) select channel
`(trip + 3·rep) mod 8`. The three copies of a byte are therefore at least two
channels (5 MHz) apart, so one narrow jammer cannot hit two of them. The
pattern moves by one channel per triplet. The first eight hops of every packet
land on eight different channels. The receiver relies on that fact (see
*Finding the packet*). The mapping is in `hop_sequencer`. Its inverse (channel
→ preamble hop number) is in the same module.

**Oscillators.** Every channel frequency is a multiple of 2.5 MHz = 100 MHz/40.
Each `local_osc` is therefore a 40-entry sine table, indexed by a modulo-40
phase that steps by 5 + k per clock. The result is exact, with no phase drift.
All ten oscillators reset together and stay mutually coherent. The table is
`round((2^15−1)·sin(2πn/40))`, computed at elaboration.

## Code-phase-shift keying (the modulation)

A hop carries one byte `{a, b}`: high nibble `a`, low nibble `b`.

- The in-phase branch sends the I code started 2·a chips late, taken cyclically
  within the hop.
- The quadrature branch sends the Q code started 2·b chips late.

Only every other rotation is used, so neighbouring symbols are two chips
apart. A correlation peak that falls between two chips then cannot be
mistaken for the neighbouring symbol. Of the 31 even rotations, 16 are used
per code. That gives 4 bits per code and 8 bits per hop.

The Q branch is also delayed by half a chip (40 clocks, cyclic within the
hop). This is offset QPSK: I and Q never change sign at the same instant, so
the envelope stays nearly constant.

Preamble hops are simply byte 0x00: both codes at zero rotation.

`ds_code_rom` turns (code, chip index, nibble) into a chip. The codes are
generated by a 6-bit Fibonacci LFSR from state `000001` in a package function
(`hss_pkg::mls_code`), so no table file is needed.

## Transmitter

```
tx FIFO → tx_controller → cpsk_modulator → rc_shaper (I, Q) → tx_upconverter → dac
                 │                                                  ▲
                 └── hop_sequencer → channel ── local_osc bank ─────┘
```

- **`byte_fifo`** (256 bytes, first-word-fall-through) holds the host's data.
- **`tx_controller`** starts a packet on `tx_start`. It counts clock-in-chip,
  chip, copy and triplet. It sends 12 blank hops, then pops one byte per
  triplet and sends it three times. An empty FIFO sends zeros.
- **`cpsk_modulator`** looks up, for the current clock, the current and
  previous chip of the rotated I code and of the half-chip-late Q code.
- **`rc_shaper`** makes the waveform.
  - Where two chips differ, the output follows a raised-cosine edge
    `AMP·cos(π(t+1)/80)` across the 80 clocks of the chip.
  - Where they are equal, the output stays flat at ±AMP.
  - This removes the hard chip edges and the spectral sidebands they cause.
- **`tx_upconverter`** forms `dac = (I·cos − Q·sin) >> 15` with the oscillator
  of the current channel. The channel number is delayed to match the
  pipeline.

From a hop boundary to the first sample of that hop on `dac` takes three clocks.

## Receiver front end: ten channels at once

`rx_channelizer` runs once per channel (ten instances):

1. I/Q mixers with that channel's oscillator.
2. Four square-window (boxcar) FIR low-pass filters in series, each 40 taps.
   They are built in `boxcar_fir` as a circular buffer plus a running sum.
3. Decimation by 40, to **2 samples per chip** (126 samples per hop).

Each 40-tap boxcar has its nulls at multiples of 2.5 MHz. The neighbouring
channels, and the 2·f mixer image, therefore fall in nulls. The four stages
together give steep enough rejection with integer arithmetic only. In the
testbench, an adjacent-channel tone comes out about 65 dB below an
on-channel one.

At 2 samples per chip, even sample positions fall on I-chip centres. Odd
positions fall on Q-chip centres, because Q is half a chip late.

## Finding the packet (preamble detection and hop recovery)

This is the hardest part of the design, and the part where most of its
own choices sit. The receiver has no timing reference at all. It must find
out both *when* hops begin and *where in the hop pattern* the packet is.

### Sliding preamble correlators

`preamble_correlator` runs on every channel. It keeps the last 126 I and Q
samples. At every sample it correlates the even positions with the
zero-rotation I code:

- `C_I`, `C_Q` = sum of the code chip × sample, over the 63 even positions.
- `metric = |C_I| + |C_Q|`. This is large whenever a whole preamble hop
  fills the window, whatever the carrier phase.
- `energy` = running sum of `|i| + |q|` over the same window. It measures
  how strong the signal on that channel is.

### Detector

The front end has no AGC, so a fixed threshold would not work. The
threshold therefore scales with the signal strength.

`preamble_detector` compares all used channels each sample. A channel *hits*
when both of these hold:

- `metric·16 > THR·energy` (THR = 3);
- `energy > MIN_E`, which ignores silence.

A hit does **not** yet mean sync. While a hop is only partly inside the
window, the ratio can already pass the test even though the timing is wrong.
So a hit opens a **peak search** that lasts one hop (126 samples) over all
channels. The largest metric in that search marks the sample where a
complete preamble hop ends.

When the search closes, the peak is tested again against the energy of its
own window. Then one of two things happens:

- The peak passes. `sync` pulses, carrying the peak's channel and its *age*:
  the number of samples since the peak.
- The peak fails. `reject` pulses and the search starts over.

### Hop number from the channel

The first eight hops of a packet use eight different channels. The channel
the peak was found on therefore tells `rx_controller` which preamble hop it
was. From that hop and the peak's age, the controller knows:

- the current hop number;
- the sample position within the hop.

So one correlator peak is enough to lock onto the whole hop pattern.

### Rejecting false syncs

The hop ends at the peak. A data hop that happens to have zero rotation
looks exactly like a preamble hop. So do shifted codes, partly. Such a hop
can produce a sync in the middle of a packet.

The controller checks the remaining preamble hops, which must decode as
0x00. Two consecutive non-blank preamble hops prove the sync false, and the
controller returns to search. One non-blank hop is tolerated, because a
jammed channel can cause it. Consecutive hops never share a channel.

## Reading the data (data correlator and vote)

After sync, `rx_controller` tracks hops of 126 samples and selects the one
channel each hop is on. It feeds only *whole* hops to the `data_correlator`.

`data_correlator` is the multiply-and-integrate bank:

- 16 rotations × 2 codes × 2 carrier phases = 64 accumulators.
- Even samples go to the I-code accumulators; odd samples go to the Q-code
  accumulators.
- At the end of the hop, every rotation scores `|acc_I| + |acc_Q|`. This
  score does not depend on the carrier phase.
- The best I rotation gives the high nibble and the best Q rotation the low
  nibble. A tie goes to the lower rotation.

Each group of three hop results goes through `majority_vote`, a bitwise 2-of-3
vote with a disagreement flag. The voted byte is written to the receive FIFO.
After `PKT_BYTES` bytes, `rx_pkt_done` pulses and the receiver searches again.

## Top level: `hss_transceiver`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 100 MHz clock, synchronous active-high reset |
| `hop_en` | in | 1 | 1: hop over channels 0–7; 0: stay on 12.5 MHz (no-hopping test mode) |
| `tx_wr`, `tx_wdata`, `tx_full` | in/in/out | 1/8/1 | write port of the 256-byte transmit FIFO |
| `tx_start` | in | 1 | pulse while idle to send one packet |
| `tx_busy`, `tx_hop` | out | 1 | packet in progress; first clock of each hop |
| `rx_rd`, `rx_rdata`, `rx_empty`, `rx_full` | in/out | 1/8/1/1 | read port of the 256-byte receive FIFO (first-word-fall-through) |
| `dac` | out | 16 signed | transmit IF samples, one per clock |
| `adc` | in | 14 signed | receive IF samples, one per clock |
| `rx_synced` | out | 1 | receiver is locked to a packet |
| `rx_pkt_done` | out | 1 | pulse: all bytes of a packet stored |
| `rx_vote_fix` | out | 1 | pulse: the three copies of a byte disagreed |
| `rx_sync_reject` | out | 1 | pulse: a peak or a sync was rejected |
| `rx_peak_search` | out | 1 | the detector is in a peak search |

Parameters, with defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `PKT_BYTES` | 32 | data bytes per packet |
| `TXBUF_DEPTH`, `RXBUF_DEPTH` | 256 | FIFO depths |
| `THR` | 3 | detection threshold, in sixteenths of the energy |
| `MIN_E` | 4096 | minimum window energy for a hit |
| `PEAK_WIN` | 126 | peak-search length in samples |

The timing constants (chip length, code length, channel plan) are in
`hss_pkg`.

### Sizing notes

- A 32-byte packet is 108 hops = 5.44 ms.
- A 256-byte packet is 780 hops. The link handles it with `PKT_BYTES = 256`,
  and the FIFOs are already deep enough.
- The receiver runs 10 channelizers and 10 preamble correlators in parallel.
  Each correlator holds 126 samples of both phases, so most of the storage
  is in those.

## Where this design follows the description and where it chooses

**Follows the description:**

- 100 MHz clock; 14-bit A/D and 16-bit D/A.
- 1.25 MHz chip rate; 63-chip codes; separate I and Q codes in offset QPSK.
- Data as code rotation, using every other position and 16 of them per code.
- 8 bits per sequence; three copies voted 2-of-3.
- Four blank preamble bytes.
- Ten channels from shared table oscillators; the top two channels unused.
- Triplets on well-separated channels.
- Raised-cosine shaping.
- Four square-window FIR low-pass stages.
- Phase-independent I/Q correlation.
- A preamble threshold that follows the signal strength.
- A simple multiply-and-integrate data correlator.
- Listening on one channel after sync.
- A 32-byte packet.
- The no-hopping mode at 12.5 MHz.

**This design's own choices:**

- The code polynomials and LFSR seed.
- Rotation = 2 × nibble, with high nibble on I.
- The exact hop pattern `(trip + 3·rep) mod 8`.
- Decimation to 2 samples per chip.
- The widths and shifts.
- The ratio form of the threshold, the hop-long peak search and the final
  test.
- Recovering the hop number from the sync channel.
- The blank-preamble check that rejects false syncs.
- A fixed packet length with a start pulse.
- FIFO depths and handshake.
- Reset behaviour.

"Early-late voting" is read as picking the strongest of the rotations. There
is no continuous code-tracking loop, because both ends share one crystal and
a packet lasts only milliseconds.

The preamble detector searches the eight used channels, not all ten. The two
unused channels never carry a preamble.

## Not included

- The A/D and D/A converters.
- The analog RF front end: mixers to 902–928 MHz, amplifiers, SAW filters,
  and an AGC, which is kept off.
- The host microcomputer and its Ethernet/RS-232 links.

Their digital signals are ports of the top. Packet-level sensitivity and
jamming margins in dBm depend on that analog hardware and are not modelled.
No error-correcting code is used, matching the described system.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ds_code_rom`, `tb_local_osc`, `tb_hop_sequencer` | codes against an independent LFSR, sine values, channel plan and its inverse, triplet separation |
| `tb_byte_fifo`, `tb_majority_vote`, `tb_boxcar_fir` | against reference models |
| `tb_rc_shaper`, `tb_cpsk_modulator`, `tb_tx_upconverter`, `tb_tx_controller` | waveform values, code rotation and Q offset, packet framing and hop timing (5040 clocks) |
| `tb_rx_channelizer` | bit-exact model, plus on-channel vs adjacent-channel tone |
| `tb_preamble_correlator`, `tb_preamble_detector` | metric/energy against a model; hit, peak search, age and reject |
| `tb_data_correlator`, `tb_rx_controller` | all symbols recovered; hop tracking, the vote, false-sync rejection |
| `tb_hss_transceiver` | end-to-end loopback, `PKT_BYTES = 4` |
| `tb_hss_full` | the same at default parameters (32-byte packet) |
| `tb_hss_256` | one 256-byte packet |

In the loopback test, the D/A output goes back into the A/D through a
channel model. The model applies:

- an odd delay (777 clocks);
- 1/8 gain;
- noise;
- a strong tone that replaces the signal on one channel.

The test checks:

- every received byte;
- the hop period;
- the packet length.

It also counts, and requires at least once:

- a sync;
- a peak search;
- a corrected vote;
- a rejected false sync;
- a packet in each hop mode.

### Running a simulation with Verilator

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/hss_pkg.sv tb/tb_hss_transceiver.sv --top-module tb_hss_transceiver -Mdir obj
./obj/Vtb_hss_transceiver
```

Replace the testbench name to run any other testbench. Run times on a
desktop machine:

| Testbench | Run time |
|---|---|
| `tb_hss_transceiver` | a few seconds |
| `tb_hss_full` | about 5 s |
| `tb_hss_256` | about 30 s |

Adding `+verilator+rand+reset+2` to the run line starts all unreset state
at random values. The testbenches ignore outputs while reset is asserted.

## Known limits

- **Detection threshold.** `THR` and `MIN_E` were tuned in simulation
  against the noise and jamming model above, not against real hardware.
  Setting preamble thresholds is the weakest point of this kind of receiver.
- **False syncs.** A false sync on a data hop is caught only after two
  preamble hops. Until then, the receiver is busy with the wrong timing.
- **One packet at a time.** The receiver follows one packet at a time. A
  second transmitter using the same codes and pattern is not separated.
