# Guitar effects hardware: an AC'97 sound controller with FSL playback

An electric guitar feeds the line input of an LM4549A AC'97 codec. The codec
digitizes it and streams stereo samples to an FPGA. A soft processor reads
the samples and applies one of four effects: clean, hard-clipping
distortion, polynomial waveshaping or echo. Two switches choose the effect.
The processor then sends the results back to the codec for playback.

This repository holds the FPGA hardware that carries the audio:

- the **OPB AC97 sound controller**, which is the codec's AC-link master.
  It has a record FIFO, codec register access, a status register with the
  two switch bits, and the LED outputs;
- the **FSL FIFO**, a 2024-entry Fast Simplex Link queue that carries
  processed samples from the processor to the controller.

The processor, its OPB bus and the effect software are not part of the RTL.
Their signals are ports of the top module, `guitar_fx_top`. The testbenches
model the processor and the codec.

The structure follows the original project: the block diagram, the
controller's clock domains and data paths, the status-register bit
positions, the record slots, the FSL depth and the switch/LED wiring. A
number of details were never specified there. They are filled in here with
AC'97 and OPB conventions or simple choices, and are listed under
"Decisions made here".

## Signal flow

```
          guitar -> codec ADC                                   codec DAC -> amp
                        |  SDATA_IN                    SDATA_OUT  ^
                        v                                          |
   +-------------------- opb_ac97_controller ----------------------------------+
   |  BIT_CLK domain (ac97_link)          |  system / OPB clock domain          |
   |                                      |                                    |
   |  S2P slots 3,4 --rec pair--> [handshake] --> record_fifo --> opb_ac97_regs <--OPB--> processor
   |  S2P slots 1,2 --status----> [handshake] --> "register access finished"   |
   |  P2S slots 1,2 <--command--- [handshake] <-- codec address/data regs      |
   |  P2S slots 3,4 <--play pair- [handshake] <-- playback fetcher <-- fsl_fifo <--FSL-- processor
   +---------------------------------------------------------------------------+
   switches -> LEDs (direct) and -> status bits 2, 1 (synchronized)
```

The processor's main loop:

1. Read the status register and take `(status & 6) >> 1` as the effect
   number.
2. Read two samples (left, then right) from the record data register. A read
   of zero means the FIFO was empty, so read again.
3. Process both samples.
4. Write both results to the FSL FIFO with blocking puts.

Playback consumes one stereo pair per AC-link frame (48 kHz with a
12.288 MHz BIT_CLK). The blocking put therefore paces the loop once the FSL
FIFO is full.

## The AC-link: frames, slots and timing

This is the part of the design that decides whether any audio moves at all.
`ac97_link` runs on the codec's BIT_CLK.

A frame is 256 bits: a 16-bit tag followed by twelve 20-bit slots. A
free-running 8-bit counter gives the position of the bit now on the wire.

| slot | bits     | controller -> codec             | codec -> controller                 |
|------|----------|---------------------------------|-------------------------------------|
| tag  | 0-15     | 15 frame valid, 14..11 slot 1-4 valid | 15 codec ready, 14..11 slot valid |
| 1    | 16-35    | bit 19 read, 18:12 register index | 18:12 index of returned register |
| 2    | 36-55    | 19:4 write data                 | 19:4 register read data             |
| 3    | 56-75    | 19:4 playback left              | 19:4 record left                    |
| 4    | 76-95    | 19:4 playback right             | 19:4 record right                   |
| 5-12 | 96-255   | zero                            | ignored                             |

- **SYNC** is high from bit 255 of one frame through bit 14 of the next:
  16 bit times, starting one bit before the tag. The codec sees it rise on a
  falling edge, and both sides start the tag on the next rising edge.
- **Edges**: output bits change just after the rising edge of BIT_CLK.
  SDATA_IN is captured on the falling edge, into one flip-flop, and shifted
  into the collectors on the next rising edge.
- **Serializers**: four parallel-to-serial registers (`ac97_p2s`) hold the
  tag, the register address, the write data and playback. One playback
  register serves both slot 3 and slot 4: it is reloaded at the start of
  each. A multiplexer picks the register for the current bit.
- **Collectors**: three serial-to-parallel registers (`ac97_s2p`) gather the
  incoming tag, the status slots 1 and 2, and the record slots 3 and 4. Each
  word is taken one bit after its slot ends.
- **Record capture.** A stereo pair goes to the record path only when the
  incoming tag marks **both slot 3 and slot 4 valid**.
  - The original controller first sampled slots 4 and 5 and was moved to
    slots 3 and 4.
  - It then still saw a spurious zero sample every three or four samples.
    The original software had to skip those.
  - The tag check makes sure that frames without a sample never enter the
    FIFO.
- **Register access.** One command at a time, and only once the codec
  reports ready.
  - A write goes out in slots 1 and 2 of the next frame. It counts as
    finished when that frame ends.
  - A read goes out in slot 1 and finishes when a later frame returns the
    same register index in slot 1. Slot 2 then holds the data.
  - There is no timeout: a codec that never answers leaves "register access
    finished" low.
- **Playback.** A one-pair buffer on the link side is sent in slots 3 and 4
  of the next frame, with their tag bits set. The buffer is freed when the
  right sample is loaded. Without a buffered pair, slots 3 and 4 are marked
  invalid and carry zeros.

## Two clock domains

BIT_CLK (12.288 MHz nominal) and the system/OPB clock (27 MHz in the
original system) are treated as unrelated.

- **Word crossings.** Every transfer of a word uses `cdc_handshake`:
  1. The source captures the word into a holding register and flips a
     request toggle.
  2. The destination synchronizes the toggle with two flip-flops. It
     delivers the word while its `dst_ready` is high, and flips an
     acknowledge toggle.
  3. The source stays busy until the acknowledge toggle comes back.

  There are four such crossings: command, response, record pair and
  playback pair. A frame lasts more than 500 system clocks, and a crossing
  takes about a dozen cycles, so no crossing limits throughput.
- **Level crossings.** Codec ready and the two switches cross through
  two-flop synchronizers (`bit_sync`).
- **Reset.** BIT_CLK stops while the codec is in reset, so the link, the
  serializers and the handshake registers use an asynchronous reset.
  - That reset comes from `reset_sync`: it asserts at once and releases two
    BIT_CLK edges after reset ends.
  - The controller drives `AC97Reset_n` low for `RESET_CYCLES` system clocks
    after system reset, about 1.2 us at 27 MHz.
  - The flip-flops whose values the other domain reads have power-up values
    (FPGA initialization): the handshake toggles, the reset synchronizer and
    the link's `codec_ready`/`rsp_valid`/`rec_valid`. Nothing crosses in
    the time before BIT_CLK first runs. Verilator reports these as
    PROCASSINIT warnings, on purpose.

## Register map (OPB slave)

Offsets are from `C_BASEADDR`. Bit numbers here are LSB = 0. The OPB
documentation numbers bits from the MSB, so its bit [31] is bit 0 here.

| offset | access | content |
|--------|--------|---------|
| +4  | R  | record sample in bits 15:0. Each read pops one sample: left, then right. Reads 0 when the FIFO is empty. |
| +8  | R  | status: 7 record overrun (sticky), 6 play underrun (always 0), 5 codec ready, 4 register access finished, 3 out data exists (the FSL FIFO holds playback data), 2 switch 1, 1 switch 2, 0 playback buffer full |
| +12 | W  | control: bit 1 clears the record FIFO and the overrun flag |
| +16 | RW | codec address: bits 6:0 register index, bit 7 = 1 read, 0 write. A write starts the access and clears bit 4 of the status register. |
| +20 | RW | codec data: write = data for the next register write; read = result of the last register read |

The original map defines +4, +8 and +12 and their bits. The layout of +16
and +20 is this design's own.

Each transfer is acknowledged (`Sl_xferAck`) one cycle after `OPB_select`
is seen for an address in `[C_BASEADDR, C_HIGHADDR]`. Read data is on
`Sl_DBus` only in that cycle, because the OPB data bus is an OR of all
slaves. Byte enables are ignored.

To write codec register A with value D:

1. Write D to +20.
2. Write A to +16.
3. Poll +8 until bit 4 is set.

To read codec register A:

1. Write `0x80 | A` to +16.
2. Poll bit 4 of +8.
3. Read the value from +20.

## Record FIFO, playback path and FSL FIFO

### `record_fifo`

- Holds 16-bit words, 32 by default (16 pairs).
- A pair is written as two words, left first.
- A pair that does not fit whole is dropped, and the sticky overrun flag is
  set. Left and right therefore never get out of step.
- The original controller stopped working properly after an overrun until it
  was reset. This one keeps working, and only the flag waits for the clear.

### Playback fetcher (in `opb_ac97_controller`)

- Pops two words from the FSL FIFO's slave side: left, then right.
- Holds the pair. Status bit 0 reads 1 while the pair waits.
- Hands the pair to the link through the playback handshake.

With the link's one-pair buffer and the handshake register, up to three
pairs are in flight beyond the FSL FIFO.

### `fsl_fifo`

- A single-clock, first-word-fall-through FIFO of `DEPTH` = 2024 entries.
- Each entry is a 16-bit data word plus the FSL control bit.
- Pointers wrap at DEPTH, which does not have to be a power of two.
- The master side is written with `FSL_M_Write`. The processor waits on
  `FSL_M_Full`, which is how a blocking put behaves.
- The slave side shows the oldest entry while `FSL_S_Exists` is high and
  pops it on `FSL_S_Read`.
- At 2024 entries the FIFO buffers about 21 ms of stereo audio.

## Switches and LEDs

The two switches drive the two LEDs directly. After synchronization they
also appear in status bits 2 (switch 1) and 1 (switch 2), so software gets
the effect number with `(status & 6) >> 1`. In the top module,
`Switches[1]` is switch 1, so that number equals `Switches`.

## Decisions made here

These points were not fixed by the original design:

- AC-link conventions: tag layout, SYNC timing, slot bit positions, the
  edges used, and the rule that a register write finishes when its frame
  ends.
- Record samples are taken only from frames that mark slots 3 and 4 valid.
- Record FIFO: 32 words, reads 0 when empty, drops whole pairs on overrun and
  keeps running afterwards.
- The codec address/data registers at +16/+20 and their layout. "Register
  access finished" resets to 1.
- Status bit 0 ("playback FIFO full") reports the controller's playback
  holding register. Status bit 3 ("out data exists") is `FSL_S_Exists`.
- FSL data width is 16 bits: the playback path carries 16-bit samples, and
  a 32-bit processor word would be narrowed to it. The control bit is
  stored but not used by the controller.
- Base address `0x7D000000`, codec reset length of 32 system clocks, and
  handshake-based clock crossings.
- OPB single-cycle acknowledge; byte enables and `OPB_seqAddr` are ignored;
  `Sl_errAck`, `Sl_retry` and `Sl_toutSup` are tied low.

Not built:

- The MicroBlaze, the OPB bus arbiter, the effect software and the codec
  itself.
- The codec's analog paths, mixer, digital loopback mode and variable-rate
  audio. The controller assumes the fixed 48 kHz rate, where every frame
  carries a sample.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `guitar_fx_top`, `opb_ac97_controller`, `opb_ac97_regs` | `C_BASEADDR`, `C_HIGHADDR` | `0x7D000000`, `0x7D0000FF` | OPB address window |
| `guitar_fx_top`, `fsl_fifo` | `FSL_DEPTH` / `DEPTH` | 2024 | FSL FIFO entries |
| `fsl_fifo` | `DWIDTH` | 16 | FSL data width |
| `guitar_fx_top`, `opb_ac97_controller`, `record_fifo` | `REC_DEPTH` / `DEPTH` | 32 | record FIFO words |
| `guitar_fx_top`, `opb_ac97_controller` | `RESET_CYCLES` | 32 | codec reset length in system clocks |
| `ac97_p2s`, `ac97_s2p` | `WIDTH` | 20 | slot width |

Frame and slot constants, register offsets, status bit positions and the
shared types (`stereo_t`, `codec_cmd_t`, `codec_rsp_t`) are in
`rtl/guitar_fx_pkg.sv`.

## Files

- `rtl/guitar_fx_top.sv`: top level, the FSL FIFO and the controller.
- `rtl/opb_ac97_controller.sv`: clock domains, crossings, playback fetcher,
  codec reset, switches and LEDs.
- `rtl/ac97_link.sv`, `rtl/ac97_p2s.sv`, `rtl/ac97_s2p.sv`: the AC-link.
- `rtl/opb_ac97_regs.sv`: the OPB slave and registers.
- `rtl/record_fifo.sv`, `rtl/fsl_fifo.sv`, `rtl/sync_fifo.sv`: FIFOs.
- `rtl/cdc_handshake.sv`, `rtl/bit_sync.sv`, `rtl/reset_sync.sv`: clock
  domain crossing helpers.
- `tb/tb_*.sv`: one self-checking testbench per block.
- `tb/lm4549_model.sv`: behavioural model of the codec's AC-link and
  register file. Its record samples follow `left = 1 + k*0x26AE`,
  `right = left ^ 0xA5A4`, so any reordered or lost sample is detectable.
  It can skip a sample every N frames.
- `tb/opb_master_bfm.sv`: an OPB master model.

## Simulating

The package has to come first on the command line; everything else is
found through `-y`. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/guitar_fx_pkg.sv tb/tb_guitar_fx_top.sv --top-module tb_guitar_fx_top \
    --Mdir obj_top -o sim
obj_top/sim
```

For another block, replace `tb_guitar_fx_top` with its testbench. Every
testbench ends by printing `TB_RESULT checks=N failures=M`. Each one has a
watchdog that counts a failure if the test hangs.

`tb_guitar_fx_top` runs the top at its default parameters, with a
processor model that runs the effect loop:

- It initializes codec registers 02h, 10h, 1Ah, 1Ch, 20h and 18h, and reads
  back 1Ah and the vendor ID.
- It lets the record FIFO overrun, then clears it.
- It fills the FSL FIFO until a put blocks.
- It cycles through all four effects, entering echo twice.

Every pair that reaches the codec's DAC is compared, in order, with what the
processor queued. Every record pair is checked against the codec model's
sequence. The test counts each mechanism and fails if any never happened:

- codec ready wait;
- empty-FIFO zero reads;
- overrun and clear;
- FSL full stall;
- frames with no playback data;
- mode switches and echo-buffer clears.

The test finishes in well under a minute.

## How far to trust it

Verified here in simulation:

- The block tests cover:
  - frame period (256 bits) and SYNC width (16 bits);
  - register write and read round trips;
  - record order, with frames that carry no sample skipped;
  - one playback pair per frame;
  - every register and status bit;
  - FIFO order, full, overrun and clear;
  - FSL full at exactly 2024 entries.
- The top-level test keeps BIT_CLK and the system clock unrelated (41 ns
  and 18.5 ns half periods). It passes when flip-flops start at random
  values (`+verilator+rand+reset+2` at run time, with `--x-initial unique`
  at build time).
- Each block testbench was also run against a copy of the block with one
  deliberate bug, and failed.

Not verified:

- Operation against a real LM4549A. The codec model follows the AC'97 frame
  format as described above, not the datasheet's exact timing.
- Timing closure on an FPGA.
- Software effect parameters, such as the clipping level and waveshaping
  curve. Those exist only in the testbench.
