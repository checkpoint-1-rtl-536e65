# AC97 record-and-playback audio for the LM4549A codec

This design records audio from a microphone and plays it back through an
LM4549A AC97 codec on an FPGA board. One button starts a recording. A second
button plays the recording back. Switches set the speaker volume, the
microphone gain and the two mutes.

The design is mostly about the codec's serial link, the AC link. The codec
makes the 12.288 MHz bit clock. Data moves in 256-bit frames, 48 000 of them
per second, on one wire in each direction. A sync wire marks where each frame
starts. The FPGA has to build every outgoing frame bit by bit:

- register writes that set the volumes and the sample rate;
- 20-bit PCM samples to play.

It also has to take apart every incoming frame:

- the codec-ready flag;
- the codec's requests for samples;
- the recorded samples.

A second difficulty is reset. The codec stops the bit clock while it is held
in reset, so that reset cannot be timed with the bit clock.

The RTL follows the EECS150 checkpoint handout "Checkpoint 1: AC97 Audio"
(called *the handout* below). Where the handout says what a block must do
but not how, the simplest circuit that does it was written. Those choices are
listed in [Where this design goes beyond the handout](#where-this-design-goes-beyond-the-handout).

## Block structure

```
                 Clock (27 MHz), Reset
                          |
  +-----------------------v------------------- ac97_controller ---------+
  |  local_reset_gen --> AP_RESET_ (to codec), AudioReset                |
  |                                                                     |
  |  ac97_bit_count --sync------------------------+                     |
  |        |  tx_load/slot, rx_capture/slot, req  |      io_register    |
  |        v                                      +--> [ ] --> AP_SYNC  |
  |  control --tag--> ac97_tx_shift (mux + >>) -----> [ ] --> AP_SDATA_OUT
  |     ^   ^                                                           |
  |     |   +------- ac97_rx_shift (<<) <-------------- [ ] <-- AP_SDATA_IN
  +-----|---|-----------------------------------------------------------+
        |   | CMD_InRequest / CMD_InValid, {CMD_AIn, CMD_DIn}
        |   +--- full_volume_control  <-- SpeakerVolume/Mute, MicVolume/Mute
        | PCM_InRequest / PCM_InValid / PCM_DIn,  PCM_OutValid / PCM_DOut
        +--- record_playback <--> audio_fifo (16 bit x 32768)
                  ^ RecordButton (SW2), PlayButton (SW3)
```

| module | role |
|---|---|
| `audio_top` | The top level. It wires the system together and brings out the codec pins, switches, buttons and four status lines. |
| `ac97_controller` | The AC link controller and its control logic: codec ready, requests to its sources and the frame tag. |
| `ac97_bit_count` | The frame bit counter (0..255) and the decoders for sync, slot loads, slot captures and the request cycle. |
| `ac97_tx_shift` | The slot multiplexer and the 20-bit output shift register. |
| `ac97_rx_shift` | The 20-bit input shift register and the holding registers for slots 0, 1, 3 and 4. |
| `io_register` | One flip-flop per link signal, meant for the FPGA's I/O blocks. |
| `local_reset_gen` | Makes the codec reset from the 27 MHz clock and a register reset for the bit-clock domain. |
| `full_volume_control` | The rotating list of codec register writes. |
| `record_playback` | Decides which samples go into the FIFO and which come out. |
| `audio_fifo` | A single-clock 16-bit FIFO with registered read. |
| `ac97_pkg` | Shared frame constants, slot positions, register addresses and field helpers. |

Everything except the reset generator runs on `AudioClock`, which is the
codec's `AP_BIT_CLOCK`.

## The AC97 frame and its timing

### Frame layout

A frame has 256 bit times. It starts with a 16-bit tag, slot 0. Twelve
20-bit slots follow (16 + 12 x 20 = 256). Every slot is sent MSB first. This
design uses these slots:

| slot | out (FPGA to codec) | in (codec to FPGA) |
|---|---|---|
| 0 tag | bit 15 frame valid, bits 14/13 slot 1/2 valid, bits 12/11 slot 3/4 valid, bits 10..0 zero | bit 15 codec ready, bits 12/11 slot 3/4 valid |
| 1 | bit 19 = 0 (write), bits 18:12 register address, rest zero | bits 11/10: slot-request for slots 3/4, active low |
| 2 | bits 19:4 register data | not used |
| 3 | left sample in bits 19:4, bits 3:0 zero | left recorded sample; its bits 3:0 are dropped |
| 4 | right sample in bits 19:4, bits 3:0 zero | right recorded sample; its bits 3:0 are dropped |
| 5..12 | zero | ignored |

### One counter times everything

`ac97_bit_count` runs a counter *n* from 0 to 255 on every rising edge of the
bit clock. While the counter reads *n*, the output shift register shows
outgoing frame bit *n*. The other timing is derived from that:

- **Slot loads.** A slot is loaded on the cycle before its first bit. Slot 0
  loads at *n* = 255. Slot *s* loads at *n* = 15 + 20(*s*-1).
- **Sync.** Sync is high on *n* = 255 and 0..14: 16 of the 256 cycles. It
  rises in the same cycle that slot 0 is loaded.
- **Pin timing.** Sync and the data bit both pass through the same
  `io_register` stage, so at the pins they are both one cycle later. The codec
  first samples sync high on the rising edge at which the FPGA starts
  driving slot-0 bit 15. It samples sync high on each of the 16 edges on
  which a tag bit leaves. It samples the data on the following falling edges.
  This is exactly how the codec recognises the start of a frame. Changing the
  sync timing by one cycle shifts every slot the codec decodes.
- **Incoming bits.** The codec answers from the edge on which it first sees
  sync. Its bit *k* then passes the input `io_register`. So incoming frame bit
  *k* is at the controller when the counter reads *k* + 2 (`RX_DELAY`).
  Incoming slot *s* is complete, and captured, at *n* = 17 + 20*s* (modulo
  256).
- **Codec ready.** The codec-ready bit is in the input register on the second
  edge with sync high, and in the shift register on the third edge.

### Requests and answers

On *n* = 250 the controller asks its two sources for data for the next frame:

- `CMD_InRequest` asks for the next register write. It is raised on every
  frame once the codec is ready.
- `PCM_InRequest` asks for the next sample to play. It is raised only when
  the last incoming slot 1 asked for slots 3 and 4.

A source answers with a one-cycle `*_InValid` and its data during
*n* = 251..254. The cycle right after the request is the normal case.
Assertions in `ac97_controller` flag an answer outside that window. If an
answer arrives, the held data goes out in the next frame and the tag marks
the slots valid. If none arrives, those slots are sent empty and marked
invalid.

### Variable sample rate

The codec is switched to variable-rate audio at 4 kHz, while frames still
run at 48 kHz. So the codec

- asks for a playback sample only on every 12th frame, and
- tags recorded samples valid only on every 12th frame.

The controller follows those bits. The rest of the design therefore sees one
request and one recorded sample every 12 x 256 bit clocks.

### Before the codec is ready

Until the codec-ready bit of an incoming tag is 1, every outgoing frame is
all zero and no requests are made. Sync keeps running, because the codec
needs it to send the frames that carry the ready bit.

## Reset across a clock that stops

`local_reset_gen` times the codec reset with the free-running 27 MHz
`Clock`. `Reset` is synchronous to `Clock`. A pulse on `Reset` starts this
sequence:

1. **Register reset.** `LocalRegReset` (`AudioReset`) is raised first. It is
   raised asynchronously, because the bit clock may already be stopped.
2. **Codec reset.** Four `Clock` cycles later, `LocalClockReset` is raised.
   It drives `AP_RESET_` low.
3. **Reset length.** `LocalClockReset` stays high for
   ceil(`lrcycles` x `clockfreq` / `localclockfreq`) `Clock` cycles. With the
   defaults that is ceil(13 x 27 / 12.288) = 29 cycles = 1.074 us, at least
   the 1 us the codec needs.
4. **Clock restart.** Eight more `Clock` cycles pass.
5. **Register reset release.** `AudioReset` is released by a two-flip-flop
   synchronizer on the bit clock. It can only fall after the bit clock is
   running again. Every bit-clock register therefore sees reset for at least
   two edges.

These are the only asynchronous paths in the design. The `io_register`
flip-flops have no reset. They keep whatever they held when the clock
stopped, and they take their first reset values on the first edge after the
clock restarts.

## Register writes: `full_volume_control`

Each `CMD_OutRequest` is answered one cycle later with a one-cycle
`CMD_OutValid` and the next entry of a nine-entry list. The list repeats, so
a switch change reaches the codec within nine frames (under 0.2 ms).

| reg | name | value |
|---|---|---|
| 2Ah | extended audio control | 0001h: variable-rate audio on |
| 2Ch | PCM DAC rate | `SAMPLE_RATE` (4000) |
| 32h | PCM ADC rate | `SAMPLE_RATE` (4000) |
| 1Ah | record select | 0000h: microphone on both channels |
| 02h | master volume | {`SpeakerMute`, 2'b0, *a*, 3'b0, *a*}, *a* = 31 - `SpeakerVolume` |
| 04h | line level volume | same as 02h |
| 18h | PCM out volume | same as 02h |
| 10h | line in volume | same as 02h |
| 1Ch | record gain | {`MicMute`, 3'b0, *g*, 4'b0, *g*}, *g* = `MicVolume`[4:1] |

How the switch values map onto the register fields:

- The codec's 5-bit volume fields are attenuations or falling gains: 0 is the
  loudest. The speaker volume is inverted so that a larger switch value is
  louder.
- The 4-bit record gain rises with its value: 0 dB to +22.5 dB. It takes the
  top four bits of the microphone volume.

## Recording and playback

`record_playback` synchronises the two buttons to the bit clock and acts on
their rising edges.

**Record (SW2).** The FIFO is emptied, and every recorded sample is stored
until the FIFO is full. Only the left channel, `PCM_DOut[31:16]`, is stored.
Recording then stops by itself.

**Play (SW3).** Each `PCM_InRequest` pops one sample. The sample is answered
one cycle later in both halves of `PCM_DIn`, so playback is mono. The first
request that finds the FIFO empty ends playback and is not answered. Pressing
play during a recording ends the recording.

The default FIFO holds 32768 samples: 8.19 s at 4 kHz in 512 Kbit of memory.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `clockfreq` | 27 000 000 | top, controller, reset gen | `Clock` frequency in Hz |
| `localclockfreq` | 12 288 000 | same | bit clock frequency in Hz |
| `lrcycles` | 13 | same | codec reset length in bit-clock periods |
| `SAMPLE_RATE` | 4000 | top, volume control | value written to the DAC and ADC rate registers |
| `FIFO_DEPTH` | 32768 | top (`DEPTH` in `audio_fifo`) | FIFO size in samples; must be a power of two |

The frame constants in `ac97_pkg` (256, 16, 20, the request cycle 250 and the
answer window up to 254) belong to the AC97 format and are not meant to be
changed.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ac97_pkg.sv tb/tb_audio_top.sv \
          --top-module tb_audio_top -o sim && ./obj_dir/sim
```

Replace `tb_audio_top` with any testbench name.

| testbench | what it exercises |
|---|---|
| `tb_audio_top` | The whole system with a 16-sample FIFO. It goes through reset, codec configuration, recording to full, playback to empty, a switch change and a second reset while the link is running. It counts each of these mechanisms and fails if one never happens. |
| `tb_audio_top_full` | The whole system at its default parameters. It records 200 samples (0.05 s), plays them back and checks every sample. It runs in a few seconds. |
| `tb_ac97_controller` | The controller with scripted command and PCM sources. It checks reset width, codec-ready gating, sync length, the frame format, sample order and the 48 kHz and 4 kHz rates. |
| `tb_ac97_bit_count`, `tb_ac97_tx_shift`, `tb_ac97_rx_shift`, `tb_io_register` | The link pieces, against the frame layout written out independently. |
| `tb_local_reset_gen` | The reset ordering and widths, with a local clock that stops during reset. |
| `tb_full_volume_control` | The register values for random switch settings, and the answer timing. |
| `tb_audio_fifo`, `tb_record_playback` | FIFO behaviour against a queue model; record, play, full, empty and the button interplay. |

`tb/lm4549a_model.sv` is a behavioural model of the codec's AC link, used by
the controller and system testbenches. It is not synthesizable. It does the
following:

- drives the bit clock, stops it during reset and returns its registers to
  their defaults;
- finds frames from sync the way the real chip does;
- sends codec-ready after three frames;
- sends counting test samples whose low four bits are not zero;
- sets its slot-request and valid bits from its own rate registers;
- decodes every outgoing frame into its register file and a sample queue;
- counts protocol errors: short reset, wrong sync length, early or malformed
  frames, and PCM that was not requested.

The model encodes this design's reading of the AC link. It has not been
checked against the real chip.

## Where this design goes beyond the handout

The handout gives the interfaces of the controller, the volume control and
the reset generator. It also gives the frame format, the sync rule, the
codec-ready rule, the PCM bit handling and the register map. It suggests the
block structure shown above. The following were chosen here.

**Taken from the AC'97 standard, not from the handout:**

- the slot 1/2 layout of a register write;
- the slot-request bits in incoming slot 1;
- left in slot 3 and right in slot 4;
- the need to set the VRA bit (register 2Ah) before the rate registers take
  effect;
- record-select code 0 meaning the microphone.

**Handshake timing.** The request cycle (250), the answer window (251..254)
and one-cycle valid pulses are this design's choice. The handout gives only
the signal names.

**Codec ready timing.** The handout places the codec-ready bit in shift
register bit 0 on the second edge with sync high. Here it is in the I/O
register on that edge and in the shift register on the third, because the
I/O register sits in front of the shift register.

**Volume mapping.**

- The handout's "speaker to all outgoing levels, mic to record gain" is
  applied with line-in volume counted as outgoing.
- The speaker value is inverted into the attenuation fields.
- The 5-bit mic value is halved into the 4-bit record gain.

**Reset generator.** The original reset generator was supplied as finished
code that the handout does not print. This one is written from its port
description. `lrcycles` = 13 comes from the 1 us requirement. The 4- and
8-cycle margins are arbitrary.

**Audio buffer.**

- The depth (32768) is derived from "roughly 8 seconds" of 16-bit samples at
  4 kHz.
- The FIFO is single-clock. The handout's block diagram hints at a second
  clock domain (an Ethernet PHY clock) next to the buffer for later work;
  nothing of it is built.

**Record/playback behaviour.** Clearing at record, stopping at full or empty
and play ending a recording are this design's choices. Buttons are
synchronised but not debounced.

**Not built.** The codec itself (mixers, converters, its register file) is an
external chip. Only its link behaviour is modelled, and only for simulation.
Register reads, slots 5..12 and the PC-beep path (`AP_PC_BEEP` is tied low)
are not used.
