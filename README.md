# OOK visible-light link for vehicle headlights

This is the FPGA logic of a vehicle-to-vehicle visible-light link. A car's LED
low-beam headlight carries data by on-off keying (OOK). A '1' drives the LED
brighter than its DC bias and a '0' drives it dimmer. A photodetector on the
car in front picks up the light.

The logic has two paths:

- **Transmit.** It takes a frame that the on-chip processor has placed in
  block RAM and turns it into a stream of 14-bit DAC samples at 100 Msps.
- **Receive.** It takes the 16-bit ADC samples of the photodetector signal and
  finds frames in them. It writes each good frame into block RAM for the
  processor.

With a 100 MHz clock and 25 samples per bit, the line rate is 4 Mbit/s. That
rate suits a headlight whose modulation bandwidth is only about 2.3 MHz.

In a vehicle, each path runs on its own board: the transmit path in the
following car, the receive path in the leading one. The top module
`vlc_transceiver` holds both paths, each with its own ports. A board can use
either one, and a testbench can close the optical loop outside the module.

What is not here:

- the processor software that moves UDP packets between Ethernet and the
  frame RAMs;
- the DAC and ADC modules and their vendor cores;
- the bias tee, the LED, the photodetector and the optics.

## Frame format

| byte position | field          | value / meaning                                   |
|---------------|----------------|---------------------------------------------------|
| 0             | header         | `1101_1011` (0xDB)                                |
| 1, 2          | payload length | number of data bytes, 0 … 1450, high byte first   |
| 3 … 3+L-1     | payload        | L data bytes                                      |
| 3+L           | footer         | `1010_0101` (0xA5)                                |

The 1450-byte limit keeps a frame inside the 1500-byte Ethernet MTU of the
packets it carries. The largest frame is 1454 bytes. Each frame RAM
(`frame_bram`) holds exactly one frame of that size.

Bytes go on the air most significant bit first. The header and the footer
read the same in either bit order, so the bit order only matters for the
length and payload bytes.

## Transmit path

```
processor ──write──▶ frame_bram ──read──▶ tx_frame_reader ──valid/ready──▶ ook_modulator ──▶ dac_code[13:0]
                      (TX frame)           (byte fetch)                    (bit × 25 samples)
```

1. The processor writes the complete frame, header through footer, into the
   transmit RAM through `tx_wr_*`. It then pulses `tx_start`.
2. `tx_frame_reader` first reads the two length bytes. If the length is above
   1450, it pulses `tx_len_error` and sends nothing. Otherwise it fetches
   bytes 0 to L+3 one at a time and offers each one to the modulator.
3. `ook_modulator` shifts each byte out MSB first. It holds every bit for 25
   clock cycles and puts out one DAC code per cycle: +2460 for a '1' and −2460
   for a '0'.
   - These codes are about ±1.5 V on a ±5 V, 14-bit DAC. That is the middle
     of the 820…4100 range (0.5 to 2.5 V) that keeps the LED in its linear
     region.
   - The bias tee after the DAC adds the LED's DC current, so the codes swing
     around zero.
   - Between frames, the output rests at the '0' code.

**Timing.**

- The modulator takes its next byte in the last sample of the current byte.
  The reader has that byte ready about 200 cycles early, so a frame goes out
  as an unbroken stream of exactly (L+4)·8·25 cycles.
- The first header sample reaches `dac_code` a few cycles (under 10) after
  `tx_start`.
- `tx_done` pulses when the footer has been handed to the modulator. The
  footer is then still on the air for 200 cycles (`tx_active` stays high).
- After `tx_done`, the processor may load the next frame. This design has one
  transmit buffer, so it must not be rewritten before `tx_done`.

## Receive path

```
adc_sample[15:0] ──▶ envelope_threshold ──level──▶ rx_bit_sync ──bits──▶ rx_frame_fsm ──write──▶ frame_bram ──read──▶ processor
                     (4-sample mean, > 0)          (mid-bit sampling)    (header/len/payload/footer)   (RX frame)
```

This is the part that needs the most care. The receiver has no clock from
the transmitter and no preamble. It only knows that bits are 25 samples long,
and it must find frames in a noisy, band-limited signal.

### Envelope and threshold (`envelope_threshold`)

Each ADC sample is added to a running sum of the last 2^AVG_LOG2 samples
(4 by default). The sum is shifted down to give the envelope. The envelope is
then compared with a fixed `THRESHOLD`: above it the sample is a '1', at or
below it a '0'.

The window is short next to the 25-sample bit. It removes sample-to-sample
noise but does not smear one bit into the next.

The default threshold is 0, midway between the two levels of the AC signal.
If the receiver's front end has a DC offset (daylight on a DC-coupled
photodetector), set `THRESHOLD` to that offset.

### Bit recovery (`rx_bit_sync`)

A phase counter runs from 0 to 24.

- It restarts at 0 on every change of the thresholded level, which is the
  start of a new bit.
- At phase 12, the middle of the bit, the current level is put out as one
  recovered bit.
- In a run of equal bits there are no edges, so the counter wraps on its own
  and yields one bit every 25 samples.
- `resync` pulses when an edge arrives anywhere other than the expected bit
  boundary, meaning the timing was just corrected.

With no edges, a 25-sample bit period keeps up with the transmitter as long
as the two clocks drift by less than about 12 samples over a run of equal
bits. Noise near an edge only moves the phase by a sample or two, and the
next clean edge corrects that.

### Frame state machine (`rx_frame_fsm`)

| state        | on each recovered bit                                   | leaves when                                                                                                   |
|--------------|---------------------------------------------------------|---------------------------------------------------------------------------------------------------------------|
| `RX_HUNT`    | shift the bit into an 8-bit window                      | the window is `1101_1011`: write the header to address 0 and go to `RX_LEN`                                   |
| `RX_LEN`     | collect 16 bits; write the two bytes to addresses 1 and 2 | length > 1450: **drop** (`DROP_LENGTH`), back to `RX_HUNT`; length 0: go to `RX_FOOTER`; otherwise go to `RX_PAYLOAD` |
| `RX_PAYLOAD` | collect bytes and write them from address 3 on          | L bytes have arrived: go to `RX_FOOTER`                                                                       |
| `RX_FOOTER`  | collect one byte and write it after the payload         | it is `1010_0101`: `frame_valid`, with `frame_len` = L. Anything else: **drop** (`DROP_FOOTER`). Either way, back to `RX_HUNT` |

A dropped candidate is a *false detection*. A header pattern can show up by
chance inside data or noise. A damaged length field can make the receiver
expect the footer in the wrong place. The receiver then expects the footer
exactly L bytes after the length field, so a mismatch between the length
field and the number of bytes actually sent shows up as a wrong footer.

After a frame or a drop, the search window is cleared. The hunt starts again
on the bits that follow, so a real frame right behind a false header is still
found. While a frame is being received, header patterns inside the payload
are ignored.

**Timing.**

- Each recovered bit is handled in the cycle it arrives, and each completed
  byte is written to the RAM on the next cycle.
- `frame_valid` and `drop` are one-cycle pulses. They come about half a bit
  (roughly 15 cycles) after the last footer bit reaches the ADC, plus
  whatever delay the analog channel adds.
- The receive RAM is overwritten by the next candidate frame. The processor
  should copy the frame out before the next header arrives: at 4 Mbit/s, the
  shortest frame takes 8 µs.

## Processor interface

| signal                                     | dir | meaning                                                   |
|--------------------------------------------|-----|-----------------------------------------------------------|
| `tx_wr_en`, `tx_wr_addr[10:0]`, `tx_wr_data[7:0]` | in  | write the frame into the transmit RAM            |
| `tx_start`                                 | in  | one-cycle pulse: send the stored frame                   |
| `tx_busy`, `tx_done`, `tx_len_error`       | out | reader busy; frame handed over; length refused           |
| `tx_active`, `tx_bit`                      | out | modulator on the air, and the bit being sent             |
| `dac_code[13:0]` (signed)                  | out | one DAC sample per clock                                 |
| `adc_sample[15:0]` (signed)                | in  | one ADC sample per clock                                 |
| `rx_rd_addr[10:0]` → `rx_rd_data[7:0]`     | in/out | read the receive RAM, data one cycle after the address |
| `rx_frame_valid`, `rx_frame_len[15:0]`     | out | a good frame is in the receive RAM, with its payload length |
| `rx_header_found`, `rx_drop`, `rx_drop_reason` | out | header seen; candidate dropped, and why          |
| `rx_resync`, `rx_envelope`, `rx_level`, `rx_state` | out | observation of the receiver                  |

Everything runs on one clock with an active-low asynchronous reset `rst_n`.
The RAM contents are not reset.

## Parameters (`vlc_transceiver`)

| parameter         | default | note                                                                       |
|-------------------|---------|----------------------------------------------------------------------------|
| `SAMPLES_PER_BIT` | 25      | 4 Mbit/s at 100 MHz. 10 gives 10 Mbit/s and 5 gives 20 Mbit/s, beyond the LED's bandwidth |
| `MAX_PAYLOAD`     | 1450    | payload limit. It also sets the RAM depth (`MAX_PAYLOAD + 4`)              |
| `ONE_CODE`, `ZERO_CODE` | +2460, −2460 | DAC codes for '1' and '0'; pick them to suit the LED's linear region |
| `AVG_LOG2`        | 2       | envelope window of 2^AVG_LOG2 samples                                      |
| `THRESHOLD`       | 0       | decision threshold on the envelope, in ADC codes                           |

The fixed numbers of the link are in `vlc_pkg`: header, footer, the
1450-byte limit, 25 samples per bit, and the 14-bit and 16-bit converter
widths. The package also holds the receiver's state and drop-reason enums.

## Design choices beyond the published link

These parts of the published link are followed:

- the frame format and the 1450-byte limit;
- byte-by-byte reading from block RAM;
- 25 samples per bit at 100 Msps;
- the code ranges for '1' and '0';
- envelope detection with a fixed threshold;
- a header-hunting state machine that writes every byte to block RAM;
- the two false-detection rules.

These are this design's own choices:

- **Exact DAC codes** (±2460). The published range is 820…4100 in magnitude.
- **Bit order** (MSB first) and **length byte order** (high byte first).
- **Idle level** ('0' code between frames).
- **Envelope detector form** (a 4-sample moving average) and **threshold**
  (0).
- **Bit timing recovery** (edge-aligned counter, mid-bit sampling). The
  published receiver does not say how it finds bit boundaries.
- **Transmit-side length check** (`tx_len_error`).
- **RAM layout.** The whole frame, header first, goes into a single
  1454-byte buffer in each direction. There is no double buffering and no
  acknowledge from the processor.
- **Processor handshake.** `tx_start` and `tx_done` on the transmit side,
  `rx_frame_valid` on the receive side.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`.

| testbench                 | what it shows                                                                                       |
|---------------------------|-----------------------------------------------------------------------------------------------------|
| `tb_frame_bram`           | every address of the 1454-byte RAM is written and read back; one-cycle latency; a read during a write returns the old byte |
| `tb_tx_frame_reader`      | frames of 0, 1, 7, 100, 300 and 1450 bytes come out byte-exact under random back-pressure; lengths 1451 and 0xFFFF are refused |
| `tb_ook_modulator`        | the DAC code is compared every cycle with a reference model; 20 back-to-back bytes take exactly 4000 cycles (4 Mbit/s) |
| `tb_envelope_threshold`   | the envelope and level are compared every cycle with a 4-sample moving-average model                |
| `tb_rx_bit_sync`          | 3000 bits with ±1 sample of jitter per bit are recovered without error, and the timing is corrected |
| `tb_rx_frame_fsm`         | good frames (0, 1, 30, 60 and 1450 bytes, one with header patterns in its payload); wrong footer; short frame; lengths 1451 and 0xFFFF; a good frame right after a dropped candidate |
| `tb_vlc_transceiver`      | the whole link at default parameters, DAC looped to ADC through a channel model. Covers good, empty and 1450-byte frames, back-to-back frames, a bad footer, a length refused by the transmitter, a length dropped by the receiver, and timing corrections. Each frame's on-air time is checked against (L+4)·200 cycles |
| `tb_vlc_packet_stream`    | streams of 1450-byte frames at three noise levels, reporting packet loss, bit error ratio, drops and payload rate for each. At the lowest level, 40 frames must arrive without loss or bit errors at more than 3.9 Mbit/s of payload (3.97 measured). At the highest level, frames must be lost and false detections reported. After an idle time of one largest frame, the link must work again |

The two system testbenches share a behavioural channel model,
`tb/optical_channel.sv`. It does four things:

- multiplies the DAC code by 4;
- applies a first-order low-pass (y += (x − y)/8 per sample, a corner of
  about 2 MHz, close to the headlight's bandwidth);
- adds uniform noise of a chosen amplitude, against a received swing of
  ±9840;
- clips to the ADC's range.

Noise stands in for distance only loosely. The model checks the logic, not
the optical link: daylight, beam pattern and the receiver optics are not
modelled. In runs of 8 frames with this model, the link was error-free at
±7000 codes of noise and lost every frame at ±9000.

Running a testbench with plain Verilator, for example the system test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vlc_pkg.sv tb/tb_vlc_transceiver.sv \
          --top-module tb_vlc_transceiver -o sim
./obj_dir/sim
```

`-Irtl -Itb` lets Verilator find each module in `rtl/<name>.sv` or
`tb/<name>.sv`. The package must come first on the command line. The unit
testbenches and the system test each run in under a second. The
packet-stream test simulates about 19 million cycles, which takes about
10 s.

## Limits and what to check before use

- **Threshold.** The receiver uses a fixed threshold. It works for a signal
  centred on `THRESHOLD`. A strong, changing daylight offset on a DC-coupled
  detector needs a different `THRESHOLD`, or an adaptive one, which this
  design does not have.
- **False locks.** The receiver has no preamble and no way to leave a
  candidate early. A header pattern inside a payload can come up while the
  receiver is out of step, for example after a frame lost to noise. If the
  length that follows it looks valid (≤ 1450), the receiver waits up to a
  full frame for that candidate's footer. It can then miss the header of the
  next frame, so one lost frame can cost the next one too when frames follow
  closely. An idle gap as long as the largest frame (about 2.9 ms) always
  brings the receiver back to the hunt.
- **No error detection beyond the footer.** Bit errors inside the payload are
  not detected. The footer and the length check only catch framing errors.
- **Single buffers.** There is one frame buffer in each direction. Throughput
  relies on the processor reloading the transmit RAM and emptying the receive
  RAM within the gaps described above.
- **Converter interfaces.** `dac_code` and `adc_sample` are plain signed
  samples, one per clock. Adapting them to a particular converter core (data
  format, valid signals, clock crossing) is left to the integration.
