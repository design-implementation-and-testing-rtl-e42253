# Digital baseband receiver for a spread-spectrum telesensing link

A small sensor chip measures a temperature and sends it as a short packet
every few seconds. Each bit of the packet is spread over 63 chips of a
pseudo-noise (PN) code and sent on a cheap 915 MHz FSK radio. The radio's
receiver gives back only a stream of demodulated chips. It carries no clock,
and the chips are noisy, drift in rate and sometimes gain or lose a chip.
This receiver recovers the chip timing and then the bit timing, despreads
the data, and finds and checks the packets. Good packets are buffered until
a host computer reads them.

The whole receiver is digital and small: about 270 flip-flops plus a
960-bit packet buffer. It needs no carrier or code-phase loop. Timing is
recovered twice with the same trick. A shift register holds slightly more
history than one symbol. It is compared with the expected pattern in three
windows one position apart. The window that matches best moves the next
symbol boundary one position earlier or later.

## Signal chain

```
 demod ─► poldec ─► despreader ─► protocol_remover ─► packet_detector ─► acq_proc ─► host
         (chips)    (bits, track)   (differential      (preamble, ID,     (error check,
                                     decoding)          words)             FIFOs, DRDY)
 clk ─► clk_div (sample enable)      opcon (reset release, load of settings)
```

| Module | Job |
|---|---|
| `clk_div` | Divides the master clock by 8. The result is the sample rate: 5 samples per chip. |
| `opcon` | Releases the system clear after master reset. Then it gives one load strobe that captures the thresholds and the PN reference. |
| `poldec` | Polarity decoder. It turns the oversampled chip stream into one chip polarity per chip and keeps in step with the transmitter's chip rate. |
| `despreader` | 63-chip sliding correlator. It finds the code phase, keeps bit timing, decides each bit, and runs the search, pretrack and track modes. It flags missed bits and missed detects. |
| `protocol_remover` | Undoes the transmitter's differential encoding, so the data survive an inverted chip stream. |
| `packet_detector` | Finds the two sync words and checks the transmitter ID. It packs bits into 10-bit words and hands the packet over in acquire mode. |
| `acq_proc` | Acquisition processor: `packet_error`, a temporary FIFO, the 96-word data FIFO and `fifo_ctrl`. |
| `dsss_rx` | Top level. |

`dsss_pkg` holds the shared constants, the dither enum and the PN code
generator.

## One clock, many enables

The receiver runs on a single clock, `clk`, which is 8 times the sample rate.
The sample, chip and bit timings that the chain derives are one-cycle enables:

| Enable | Rate | Made by |
|---|---|---|
| `smp_en` | clk / 8 | `clk_div` |
| `dpn_tick` | one per recovered chip, every 4, 5 or 6 samples | `poldec` |
| `dsp_tick` | one per despread bit, every 62, 63 or 64 chips | `despreader` |
| `bit_vld` | `dsp_tick` one cycle later | `protocol_remover` |

The recovered clocks also exist as levels, so they can be watched:
`smpclk`, `dpnclk` (high for the first part of the chip) and `dspclk` (high
for the first 32 chips of a bit). No flip-flop is clocked by them. A
receiver built with derived clocks has to route a data-dependent clock, the
despread clock, as ordinary logic, and this design avoids that.

At nominal rate a chip is 40 clocks and a bit is 63 × 40 = 2520 clocks. A
packet of 8 words is 80 bits, about 202,000 clocks.

## Polarity decoder: chip timing

A 7-bit shift register takes one sample per `smp_en`. Three 5-sample windows
overlap in it:

- A is samples 0-4, the newest.
- B is samples 1-5.
- C is samples 2-6, the oldest.

Each window's magnitude is how strongly its five samples agree: the count of
ones or the count of zeros, whichever is larger.

A sample counter rolls over at the end of each chip. At the roll, the chip
polarity `spda` is taken from the best window, and the next chip's length
is set:

| Best window | Meaning | Next chip | Dither |
|---|---|---|---|
| B (or a tie) | boundary where expected | 5 samples | nominal |
| A, newest | boundary came late | 6 samples | long |
| C, oldest | boundary came early | 4 samples | short |

A transmitter whose chip rate is slightly off is followed one sample at a
time. `dpn_tick` marks each new chip.

## Despreader: bit timing and track

This is the part that decides whether a packet is received at all.

**Correlation.** Each chip shifts into a 63-bit register. The register is
XORed with the PN reference and the ones are counted, giving c mismatching
chips. The magnitude is max(c, 63 − c). A large c means the inverted code
was sent, which is data bit 1. The magnitudes and polarities of the last
three chip positions are kept as windows A (oldest), B and C (newest).

**Bit clock and dither.** A segment counter counts chips. At the roll point
the best window gives the bit and moves the next boundary:

| Best window | Next bit period | Roll point |
|---|---|---|
| B (or a tie) | 63 chips | 62 |
| A | 62 chips | 61 |
| C | 64 chips | 63 |

Count 64 always rolls. So a chip gained or lost in the radio link is absorbed
in the next bit.

**Modes.** Four thresholds are involved:

- `DSMBTH` (50): bit threshold
- `DSMDTH` (62): detect threshold
- `DSTKTH` (2): detections needed for track
- `DSNTTH` (15): misses tolerated in track

The modes work as follows:

- **Search.** Outside pretrack the correlator is checked at every chip. The
  first time the best magnitude exceeds `DSMBTH`, pretrack is set and the
  segment counter restarts. That puts the bit boundary on the correlation
  peak. Without this the segment counter would free-run at an arbitrary
  phase and never see the peak.
- **Pretrack.** Each bit period whose peak exceeds `DSMDTH` counts as a
  detection. When the count exceeds `DSTKTH`, track is set. A period that
  fails `DSMDTH` before then drops back to search.
- **Track.** A period below `DSMDTH` counts as a miss and a good one clears
  the count. When the count exceeds `DSNTTH`, track and pretrack are dropped.
  In track, a period below `DSMBTH` raises `mbit` (missed bit) and one below
  `DSMDTH` raises `mdet` (missed detect). The packet error logic counts these
  flags.
- `dpack`, the despread bit, is forced to 0 outside pretrack.

With `DSMDTH` at 62, a detection needs at most one chip error in 63. A
missed detect is therefore a bit that was probably still decided right but
with little margin. A missed bit (below 50, at least 13 chip errors) is a
bit that may be wrong.

**Why "largest window".** The windows are not compared in a chain
(A > B ≥ C). The off-peak correlation of a Gold code is not monotonic. One
chip off the peak the magnitude can be anywhere from 32 to 39, so
after a slip B is often below both A and C. The chain test then misses the
slip, and the bit timing walks off the peak. Picking the largest of the
three windows catches every one-chip slip in simulation.

**PN code.** The default `PN_CODE` is a 63-chip Gold code. `gold63()` in
`dsss_pkg` builds it by XORing two 6-stage m-sequences. They come from the
preferred pair x⁶+x+1 and x⁶+x⁵+x²+x+1, both seeded with 000001. Bit i is
chip i, which is sent first. Its worst off-peak value is 39 of 63, well
below the thresholds. Any 63-bit code can be passed as a parameter.

## Differential decoding

The transmitter sends enc[k] = d[k] XOR enc[k−1], starting from 1. The
protocol remover outputs d[k] = enc[k] XOR enc[k−1]. An inversion of the
whole chip stream therefore costs at most one bit. The track and missed
flags are registered with the data.

## Packet format and detection

A packet is eight 10-bit words, each sent LSB first:

| Word | Value |
|---|---|
| RF sync | `333h` |
| Frame sync | `01Fh` |
| Sequence counter | free |
| Transmitter ID | `005h` (ID of this receiver, `UID` = 101) |
| Temperature | data |
| Data 1-3 | data |

The detector only runs while the despreader is in track. It keeps the last
20 decoded bits. When they equal {frame sync, RF sync}, it collects the next
two words. If the second of them is the expected ID, acquire mode (`acq`)
starts, and the sequence counter and the ID are written to the temporary
FIFO (`pkdwr`, with `pkda`). Then each of the four data words is written as
it completes. After the sixth word, `pkwwr` strobes the word count `pkwc`.
If track is lost during the data, `pkwwr` comes early with the short count.
The detector then waits for `clacq` from the acquisition processor before it
searches again. A wrong ID sends it back to search.

## Acquisition processor

- **`packet_error`** counts `smbit` and `smdet` over the bits of the packet
  while `acq` is high. It saturates at 63. At `pkwwr` it judges the packet
  bad if missed bits > `PKMBTH` (3), missed detects > `PKMDTH` (3) or word
  count < `PKWCTH` (6). The verdict `pkst` (1 = bad) comes one cycle later.
- **Temporary FIFO** (6 × 10). It holds the packet being judged.
- **Data FIFO** (96 × 10 = 16 packets). It holds accepted packets for the
  host.
- **`fifo_ctrl`** acts on the verdict:
  - A bad packet is cleared from the temporary FIFO.
  - A good packet is moved word by word into the data FIFO.
  - Either way, `clacq` then returns the detector to search.
- **Host side.** When the data FIFO becomes full, `drdy` rises. Until the
  FIFO is empty again, `clacq` is held, so no packet is accepted. The host
  pulses `host_rd` once per word. It may be asynchronous: it goes through a
  two-flop synchronizer, and each rising edge pops one word into the `dout`
  register. If the FIFO stays full for `OVR_LIMIT` (100) bit times, `ovr`
  rises to say that packets are being lost. It clears when the FIFO has been
  emptied.

Both FIFOs are `packet_fifo`. It is a single-clock, show-ahead array FIFO
with a clear input and assertions against overflow and underflow.

## Parameters of `dsss_rx`

| Parameter | Default | Meaning |
|---|---|---|
| `PN_CODE` | Gold code above | despreading reference, bit i = chip i |
| `DSMBTH` | 50 | bit threshold (missed bit below) |
| `DSMDTH` | 62 | detect threshold (missed detect below, track needs it) |
| `DSTKTH` | 2 | detections beyond which pretrack becomes track |
| `DSNTTH` | 15 | misses beyond which track is lost (0-15) |
| `UID` | 3'b101 | low bits of the accepted transmitter ID |
| `PKMBTH`, `PKMDTH` | 3, 3 | missed bits / detects tolerated per packet |
| `PKWCTH` | 6 | words a packet must have |
| `DATA_PKTS` | 16 | data FIFO size in packets of 6 words |
| `OVR_LIMIT` | 100 | bit times full before `ovr` |

The thresholds are captured on the load strobe after reset, so they could
become pins again without touching the datapath.

## Where this design departs from the original receiver

- **Clocking.** One clock with enables replaces the derived sample, chip and
  bit clocks. The host read clock is synchronized instead of clocking the
  FIFO directly.
- **Window choice.** Both timing loops pick the largest window, as the
  original described it, not the chained comparison its logic used (see
  above).
- **Preamble check.** Both sync words must match, not only the frame sync.
- **Miss counter.** It is 5 bits wide, so that "more than 15 misses" can
  happen with `DSNTTH` = 15.
- **Overflow counter.** It is 7 bits, enough to reach 100.
- **Missed bits and missed detects.** They are counted once per decoded bit,
  not on edges of the flags.
- **Packet output.** It is written word by word as words complete. The
  original staged them through a two-word pipeline.
- **FIFOs.** They are plain arrays instead of vendor FIFO macros. The
  temporary FIFO is one packet deep.
- **PN code.** The PN code of the original link is unknown, so a Gold code
  is the default.
- **Omitted.** A monitor multiplexer and programmable threshold pins, which
  the original's final version had dropped.

Not part of this RTL: the sensor chip, the two radio chips and the host
software. The testbench's `tx_model` stands in for the first three.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dsss_pkg.sv tb/tb_dsss_rx.sv --top-module tb_dsss_rx -Mdir obj -o sim
./obj/sim
```

Replace `tb_dsss_rx` with any other testbench name.

`tb_dsss_rx` runs the whole receiver at its default parameters. It takes a
few seconds of simulation time. `tx_model` spreads and
differentially encodes packets, and can add chip-rate drift, chip errors and
inserted or dropped chips. The test counts, and requires at least once, each
of the following:

- long and short dither in both timing loops
- track acquired
- good packets, and bad packets from missed detects and from missed bits
- a packet cut short by loss of track
- a rejected ID
- DRDY, and a packet dropped with OVR
- a full host read-out of 96 words, compared word for word in order
- recovery afterwards

It also checks the bit period in track against 2520 clocks.

`tb_error_rate` is a long run, also at default parameters. It sends 1024
packets with random data and a random chip-rate offset for each packet.
Random chip errors go into the data bits, each bit getting either 1 chip in
error (tolerated), 2-13 (missed detect) or 14-17 (missed bit). That gives a
packet-drop rate of roughly 20%. Each packet's verdict follows from the
injected errors, so every verdict is checked. A host process reads the FIFO
each time DRDY rises and compares every word. At the end the test prints the
incorrect-word count for each channel, which must be zero, and the
dropped-packet rate. It takes a few minutes of wall time.

The unit testbenches check each block against a reference model written in
the testbench:

- `clk_div`: phase and duty of the enable
- `opcon`: the reset and load sequence
- `poldec`: every chip's polarity under drift and single-sample glitches,
  and the dither direction
- `despreader`: acquisition, slips both ways, the value and the missed-bit
  and missed-detect flags of every bit under random chip errors, and loss
  of track
- `protocol_remover`: random streams
- `packet_detector`: good and bad IDs, truncation, clear
- `packet_error`: random flag counts
- `packet_fifo`: random traffic against a queue
- `fifo_ctrl`: verdicts, DRDY, OVR and host reads
- `acq_proc`: the same, with real FIFOs
