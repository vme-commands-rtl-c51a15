# VME test-board FPGA for ABC/ABCD front-end chips

This is the control FPGA of a VME test board for ABC/ABCD silicon-strip readout chips
and modules. A crate computer drives the board through ordinary VME reads and writes.
The board's address space has no registers in the usual sense. Instead, address bits
8..4 of every access select one of 32 **commands**, and the data word carries that
command's arguments. Through these commands the computer can:

- read a status word;
- store test vectors and simulation vectors and play them out;
- fill and read back hit histograms for two readout streams;
- drain a resynchronisation FIFO;
- set DACs and the board clock synthesizer;
- send control sequences (resets, register loads, channel masks, triggers) to the
  chips under test;
- start bursts of calibration strobes and triggers.

The FPGA sits behind a Cypress VME interface: a CY960 bus controller and CY964
address/data transceivers. It therefore also has to configure the transceivers'
address comparators at power-up, and it has to answer the CY960's local-bus
handshake.

All RTL is SystemVerilog-2017 in `rtl/`, one module per file. Each module has a
self-checking testbench in `tb/`.

## How a VME access reaches the FPGA

1. **Start-up (`svic_init`).** After reset the FPGA loads the CY964 comparators. It
   drives the compare value `{board_addr, 24'h0}` onto the local data bus, selects
   the compare register with `vme_xcvr_lds = 1` and pulses `vme_xcvr_strobe_n` low. It
   then writes the mask register with all zeros in the same way (`lds = 0`). A mask
   bit of 0 means "compare this bit". `vme_xcvr_mwb_n` is held high. When both
   writes are done, `vme_xcvr_lds` follows the CY960's `svic_lds`, the bus is
   released and local-bus accesses are enabled. Each write takes
   `SETUP_CYC + STROBE_CYC + HOLD_CYC` clocks (2 + 4 + 2 by default).
2. **Region decode.** CY964 number 3 compares address bits 31..24 and reports a
   match on `vcomp_n[3]`. The FPGA returns this as `svic_region = {~vcomp_n[3], 3'b000}`.
   Region 8 is the only one the CY960 is set up to accept, and it raises chip
   select 0.
3. **Local-bus slave (`local_bus_slave`).** An access starts when at least one
   `svic_cs` bit and at least one `svic_dbe` bit are high together for two
   consecutive clocks. Address, data and `svic_r_w_n` are then latched.
   - A write is acknowledged on the next edge (`svic_lack_n` low). The command
     itself runs after the acknowledge, so software must not assume that a write
     has finished when the bus cycle ends.
   - A read waits until the addressed block returns data. The slave drives the data
     onto `ldata_o` (`ldata_oe` high) and pulls LACK* low one clock later, so the
     data is valid before the acknowledge. If CS/DBE drop while the read is still
     waiting, the access is abandoned.

   LACK* and the data drive are held until CS/DBE drop. The local bus is assumed to
   be synchronous to the FPGA clock, so there are no synchronisers on its inputs.
4. **Command decode (`cmd_decoder`).** Bits 8..4 of the address give the command
   code. The decoder produces a one-hot `wr_stb[code]` or `rd_stb[code]` pulse and
   passes on the write data. Reads are answered as follows:
   - code 0x00: the status word, one clock later;
   - codes 0x04 and 0x0d: the histogram or FIFO data, when it arrives;
   - any other code: 0 at once, so that no bus cycle can hang.

   The board-address check on bits 31..24 is done by the transceivers, not repeated
   in the FPGA.

The FPGA data bus is split into `ldata_i`, `ldata_o` and `ldata_oe`. The tri-state
pad belongs to the pin level.

## Command map

| code | access | command | data fields | block |
|------|--------|---------|-------------|-------|
| 00 | read | status | `{15'b0, BUSY, 16'hFACE}` | cmd_decoder |
| 01 / 02 | write | reset test / simulation vector counter | – | vector_memory |
| 03 | write | clear histogram memory | – | hist_memory |
| 04 | read | histogram word, pointer++ | `[31:16]` stream A, `[15:0]` stream B | hist_memory |
| 05 | write | set histogram base, pointer to its start | `[7:0]` base | hist_memory |
| 06 | write | send test vector (plays both vector memories) | – | vector_memory |
| 07 / 08 | write | write test / simulation vector word, counter++ | `[17:0]` | vector_memory |
| 09 | write | reset ReSync FIFO | – | resync_fifo |
| 0a | write | set DAC | `[9:0]` value, `[22:19]` output, `[18:16]` device | dac_loader |
| 0b / 0c | write / read | ADC convert / read | not implemented; read returns 0 | – |
| 0d | read | ReSync FIFO word | `[16:0]` word, `[17]` 1 = not empty | resync_fifo |
| 0e | write | start trigger burst | – | trigger_sequencer |
| 0f | write | set frequency | `[8:0]` M, `[10:9]` N, `[13:11]` T | freq_loader |
| 10 | write | trigger-to-trigger delay | `[15:0]` clocks | trigger_sequencer |
| 11 | write | triggers per burst | `[15:0]` | trigger_sequencer |
| 12 / 13 | write | soft reset / BC reset, all chips | – | chip_cmd_gen |
| 14 | write | configuration register | `[21:16]` chip, `[15:0]` data | chip_cmd_gen |
| 15 | write | reset mask-register pointer | – | mask_register |
| 16 | write | 32 bits into the mask register, pointer++ | `[31:0]` | mask_register |
| 17 | write | send the mask register to a chip | `[21:16]` chip | chip_cmd_gen |
| 18 / 19 | write | strobe delay / threshold and cal amplitude | `[21:16]` chip, `[15:0]` data | chip_cmd_gen |
| 1a | write | enable data taking | `[21:16]` chip | chip_cmd_gen |
| 1b | write | select register | `[0]` ABC/ABCD select, `[1]` strobe enable | trigger_sequencer |
| 1c | write | hard reset | not implemented, no effect | – |
| 1d / 1e | write | bias DAC / trim DAC | `[21:16]` chip, `[15:0]` data | chip_cmd_gen |
| 1f | write | strobe-to-trigger delay | `[7:0]` clocks | trigger_sequencer |

`vme_pkg` defines all 32 codes as the enum `cmd_e`.

**BUSY** (status bit 16) is the OR of every block that may still be working on an
earlier command:

- trigger burst in progress;
- chip command line sending;
- histogram clear;
- vector playback;
- DAC or synthesizer load.

Commands that arrive while their target is busy are dropped, so software should poll
BUSY between commands that take time.

## Chip control sequences and trigger bursts

This is the part of the design that most needs care.

**The command line (`chip_cmd_gen`).** All control sequences go to the chips as
serial frames on `chip_cmd`: one bit per clock, MSB first, and 0 when idle. Frames
come from two sources:

- **VME commands 0x12–0x1e.** The chip address comes from bits 21..16 and the
  register data from bits 15..0. The mask comes from `mask_register`.
- **The trigger sequencer.** It sends level-1 triggers and calibration strobes.

The generator takes one frame at a time. A frame of n bits appears on the line on
the n clocks after it is accepted, and `busy` covers exactly those clocks. When both
sources request in the same clock, the sequencer wins. A VME command that arrives
while a frame is being sent is dropped.

**The frame patterns are placeholders.** The board only lists which sequences exist.
Their bit patterns are set by the front-end chip's own specification. `vme_pkg`
therefore holds patterns in that chip family's style, collected in `FR_*`,
`frame_field()` and `frame_len()`:

| frame | bits |
|-------|------|
| trigger | `110` |
| soft reset | `1010100` |
| BC reset | `1010010` |
| register load | header `1010111`, then 8-bit command field, 6-bit chip address, then 16 data bits (128 for the mask, none for enable and calibration strobe) |

Check these three places against the chip specification before using the design with
real chips. The rest of the generator does not depend on the patterns. The
calibration strobe is sent to broadcast address 0x3F.

**Trigger bursts (`trigger_sequencer`).** Command 0x0e sends `ntrig` triggers. Each
trigger is preceded by a calibration strobe when select-register bit 1 is set. Both
delays are counted in FPGA clocks, from the first bit of one frame to the first bit
of the next:

- calibration strobe → its trigger: `s2t` (register 0x1f);
- trigger → next strobe, or next trigger when strobes are off: `t2t` (register 0x10).

A delay shorter than the preceding frame plus one idle clock is stretched to that
length, because the line carries one frame at a time. With the placeholder frames
the minimum spacings are 22 clocks after a strobe and 4 clocks after a trigger.
Measuring from frame start to frame start is this design's reading of "delay in
clock cycles".

**Mask register (`mask_register`).** The channel mask has 128 bits, one per channel.
Software resets the pointer with 0x15, writes four words with 0x16 (word 0 lands in
bits 31..0) and sends the mask to a chip with 0x17.

## Board functions

- **Vector memories (`vector_memory`, two instances, 1024 × 18).** Each write stores
  a word at the counter and increments it. A counter reset starts a new vector.
  "Send test vector" plays back the words written since the last counter reset on
  `tv_data`/`tv_valid`. It plays the simulation vector on `sv_data`/`sv_valid` in
  the same clocks. Output is one word per clock, and the first word comes two clocks
  after the command strobe.
- **Histogram (`hist_memory`, 32768 × 32).** A word holds two saturating 16-bit
  counts: stream A in the upper half and stream B in the lower half. A hit on
  channel c is counted at address `{base, c}`, so the 8-bit base selects one of 256
  histograms of 128 channels each, for example the points of a threshold scan.

  The memory is single-ported and serves one access per clock, in this priority:
  1. Clear: 32768 clocks, with BUSY high.
  2. VME read: data one clock after the read is served. A read that arrives during a
     hit update waits for it.
  3. Hit increment: a two-clock read-modify-write, so at most one hit every two
     clocks. Hits use a valid/ready handshake (`hit_valid`, `hit_ready`).

  Writing the base also moves the read pointer to the start of that histogram.
- **ReSync FIFO (`resync_fifo`, 512 × 17).** A dual-clock FIFO. Words are written on
  the chip-data clock `dclk` and read over VME on the FPGA clock. The pointers cross
  the clock boundary in Gray code through two-flop synchronisers.
  - A read returns `{14'b0, 1, word}` and removes the word, or 0 when the FIFO is
    empty.
  - Words written while the FIFO is full are dropped and counted (`overflow`,
    internal).
  - The reset command is carried into the write domain by a handshake. The FIFO
    reads as empty until both pointers have restarted.
- **DACs (`dac_loader`).** A 14-bit frame `{output address, value}` is shifted MSB
  first on `dac_sclk`/`dac_sdi`, with data stable around the rising clock edge. The
  selected device's `dac_cs_n` is low for the whole frame, and the device latches the
  value when the select rises. One frame takes `14·2·SER_HALF` clocks.
- **Clock synthesizer (`freq_loader`).** The word `{T, N, M}` is shifted out with T2
  first and M0 last, followed by a `synth_load` pulse of `2·SER_HALF` clocks. This is
  the usual programming interface of serially set PLL synthesizers.

## Outside the FPGA

These parts connect to the design through top-level ports and are not modelled in
`rtl/`:

- the CY960 controller and CY964 transceivers;
- the CY960 configuration PROM;
- the DACs;
- the clock synthesizer;
- the ADC, which is not implemented on the board;
- the chips under test.

The chip-data decoder that turns the chips' readout into hits is also outside. Its
data format belongs to the chip specification. Its results enter through `hit_*`
(into the histogram) and `fifo_*` (into the ReSync FIFO).

The CY960 inputs LDEN*, PREN*, SWDEN* and STROBE are not used by this design and have
no ports. `svic_lirq_n` is held high because interrupts are not used.

## Choices not fixed by the board description

How far to trust the design. The command set, the field positions in the data word,
the status word, the start-up load of the transceivers and the local-bus handshake
follow the board's description closely. The following choices are this design's own:

| item | choice |
|------|--------|
| clocking | one FPGA clock shared with the local bus; the FIFO write side on `dclk` |
| CY964 load | `lds = 1` selects compare; strobe timing 2 / 4 / 2 clocks |
| LACK* release | when CS/DBE drop |
| memory depths | vector memories 1024, FIFO 512, histogram 256 × 128 bins |
| histogram | bins addressed by `{base, channel}`; counts saturate |
| chip frames | bit patterns are placeholders (see above); 16 data bits per register load; 128-bit mask |
| delays | measured frame start to frame start |
| DAC and synthesizer | serial formats as described above |
| busy targets | commands that arrive while their block is busy are dropped |
| simulation vectors | played out in step with the test vectors |

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| abcd_test_fpga | `VEC_DEPTH` | 1024 | words per vector memory |
| abcd_test_fpga | `FIFO_DEPTH` | 512 | ReSync FIFO depth |
| abcd_test_fpga | `SER_HALF` | 2 | half period of the DAC and synthesizer serial clocks, in FPGA clocks |
| hist_memory | `CH_BITS`, `BASE_BITS` | 7, 8 | channel and base widths; depth is `2**(CH_BITS+BASE_BITS)` |
| svic_init | `SETUP_CYC`, `STROBE_CYC`, `HOLD_CYC` | 2, 4, 2 | transceiver register-load timing |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. The end-to-end test runs the top at its default sizes. It plays the CY960,
the transceiver comparators, the DACs, the synthesizer and a decoder of the chip
command line. It issues every command of the map above and counts each mechanism
(bus reads and writes, BUSY, vector words, histogram clear and hits, FIFO words and
empty reads, DAC and synthesizer loads, every frame type). It fails if any of them
never happened.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_abcd_test_fpga \
    -y rtl -y tb +libext+.sv -Irtl rtl/vme_pkg.sv tb/tb_abcd_test_fpga.sv
./obj_dir/Vtb_abcd_test_fpga
```

A single block is run the same way, with its testbench as the top module, for example
`--top-module tb_hist_memory tb/tb_hist_memory.sv`. The simulator is two-state, so
all state that is read is reset. The block testbenches shrink memories through
parameters where that shortens the run.

## Files

- `rtl/vme_pkg.sv`: command codes, access and request types, placeholder chip frames.
- `rtl/abcd_test_fpga.sv`: top level.
- `rtl/svic_init.sv`, `rtl/local_bus_slave.sv`, `rtl/cmd_decoder.sv`: the VME access path.
- `rtl/vector_memory.sv`, `rtl/hist_memory.sv`, `rtl/resync_fifo.sv`,
  `rtl/dac_loader.sv`, `rtl/freq_loader.sv`, `rtl/serial_shifter.sv`: board
  functions.
- `rtl/mask_register.sv`, `rtl/trigger_sequencer.sv`, `rtl/chip_cmd_gen.sv`: chip
  control.
- `tb/tb_<module>.sv`: one testbench per module (`serial_shifter` is covered by the DAC and synthesizer tests); `tb/tb_abcd_test_fpga.sv` is the
  end-to-end test.
