# FEB v2 front-end board firmware

The FEB v2 board reads out a detector plane of resistive strips. Six 16-channel
PETIROC ASICs discriminate the strip signals, and three FPGAs timestamp the
trigger edges with 34-channel TDCs. Each strip is read at both ends, so every
FPGA covers 16 strips. The middle FPGA concentrates the data of all three and
sends it to the back end over a GBT optical link: one 112-bit uplink frame per
25 ns LHC bunch crossing. The same link carries downlink frames with fast
controls (BC0, Resync, flush, mute) and slow-control requests for the
registers of the three FPGAs.

This repository holds synthesizable SystemVerilog for the digital part of that
firmware. It covers:

- the link protocol;
- slow control;
- the TDCs with their calibration;
- the readout filters;
- the concentrator;
- the I2C registers for the e-link settings.

It also has a self-checking testbench for every module. Parts that are not
logic of this board are not modelled; the ports where they connect are
brought out instead. These parts are:

- the TDC delay lines;
- the GBTX and GBT-SCA chips;
- the PETIROC ASICs;
- the vendor flash and remote-update IP;
- the inter-FPGA serial transceivers;
- the PLLs.

## Clocks and top level

`feb_v2_top` contains the three FPGAs (`feb_fpga`, index 0 = left, 1 = middle,
2 = right), the downlink decoder `gbt_rx_ctrl`, the `data_concentrator` and the
`uplink_builder`.

**Clocks**

- All bus-side logic runs on one 120 MHz clock, `clk`.
- `frame_stb` is high in one cycle out of three. It marks the 40 MHz GBT frame: one downlink frame is taken and one uplink frame is produced per strobe.
- The TDC capture flops run on `clk_tdc` at 400 MHz.
- The calibration oscillator `cal_clk` is treated as asynchronous.

**Resets:** `rst` and `rst_tdc` are synchronous and active high. One reset serves all three FPGAs. The staggered reset release of the real board is sequencing outside this logic.

The left and right FPGAs reach the middle one through serial links. They are
modelled as `LINK_LAT` register stages on the 32-bit data buses. The
slow-control replies of the side FPGAs are direct connections.

Package `feb_pkg` holds the shared types:

- `sc_req_t`: the slow-control bus request;
- `fc_t`: the fast controls;
- `tdc_word_t`: a TDC word, `{dev[1:0], ch[5:0], ts[23:0]}`;
- the readout slot and concentrator record structs;
- the slave base addresses;
- the readout priority table.

## Downlink frames and fast controls

A downlink frame is 80 bits. It is split into five 16-bit groups, G4 (bits
[79:64]) down to G0. G4 is the header:

| bits | field |
|---|---|
| 15 | Resync |
| 14 | BC0 |
| 13 | ResetSCPath |
| 12 | FlushDataPath |
| 11 | MuteROCChannels |
| 10:3 | MiscCtrl |
| 2:0 | FPGASel, one bit per FPGA (bit 0 = left) |

`gbt_rx_ctrl` ignores every frame until the GBTX has raised RxDataValid
once. It then raises TxDataValid.

- **Resync, BC0, ResetSCPath and Flush** become one-cycle pulses.
- **Mute** is a level. It holds VAL_EVT low on all six ASICs, so no new triggers are made while data already in the pipeline keeps flowing.
- **Flush** clears every FIFO and buffer that holds TDC data, in all three FPGAs and the concentrator.
- **BC0 and Resync** are also looped back as pulses into TDC channels 32 and 33 of every FPGA. They are timestamped like hits.

The back end is expected to run each LHC orbit the same way. After the useful
part of the orbit it:

1. mutes the ASICs;
2. lets the pipeline drain;
3. flushes whatever is left;
4. sends BC0 to rebase all timestamps;
5. unmutes.

The 16-bit coarse counter at 400 MHz wraps after 163.8 µs. An orbit lasts
89.1 µs, so timestamps taken relative to BC0 never wrap within one orbit.

## Slow control

Each FPGA has an internal bus with a 16-bit address and 16-bit data. The
address is split in two:

- `addr[15:8]` selects a slave;
- `addr[7:0]` selects a register.

A request lasts one cycle. The addressed slave returns registered read data
on the next cycle and every other slave drives zero, so the answers are OR-ed.

`sc_frame_decoder` turns the G3..G0 payload of the frames that select this
FPGA into bus operations.

- **Request frame:**
  - G3 = `{reserved, WrReq, Burst[7:0]}`.
  - G2 = start address.
  - G1, G0 = first two write words.
- **Transfer length:** Burst+1 words, so 1 to 256.
- **Writes longer than two words:** continue in payload frames of four words each. The next frame after the last word is a request again.
- **Frames for other FPGAs:** may be interleaved.

`sc_master` plays each operation word by word with an incrementing address.
It queues read data in a 256-word reply FIFO, so the largest burst fits.
ResetSCPath aborts the operation and empties both FIFOs.

Slaves and bases:

| base | module | content |
|---|---|---|
| 0x00 | `sc_gen_slave` | 16 scratch registers, FPGA ID, firmware revision, 64-bit chip ID |
| 0x01/0x02 | `petiroc_ctrl` | top / bottom ASIC configuration, reset, stage control, bitflip counter |
| 0x03 | `tdc_ctrl` | TDC enable, calibration and measure-enable commands, injection mode, data counters, BC0 options |
| 0x04-0x25 | `tdc_core` | calibration LUT of each channel (read only) |
| 0x26 | `flash_ctrl_slave` | serial flash CSR and 32-word memory bursts |
| 0x27 | `remote_update_slave` | remote update CSR port |
| 0x28 | `ts_corr` | per-channel 24-bit timestamp offsets |
| 0x29 | `dp_ctrl_slave` | readout and concentrator settings |

The register maps are listed in the first comment of each module.

## TDC and calibration

`tdc_core` timestamps 34 channels:

- channels 0-31 are the PETIROC triggers, or injected test signals;
- channel 32 is the BC0 loopback;
- channel 33 is the Resync loopback.

**Capture.** A 16-bit coarse counter runs at 400 MHz. On a rising edge, the
coarse count and the 8-bit code of the delay line are captured in the
`clk_tdc` domain. A toggle flag, synchronised with two flip-flops, hands the
stable capture register to the bus clock. The timestamp is 24 bits: the
coarse count, then the calibrated fine time in units of 2.5 ns / 256. A
channel must not see two edges within about four bus cycles.

**Calibration** uses the code-density method:

1. A calibration request connects the channel to `cal_clk`, which is uncorrelated with `clk_tdc`.
2. The channel histograms 2^`CAL_LOG2` (4096) fine codes.
3. It turns the histogram into a LUT. Code *i* maps to the centre of its bin on the cumulative distribution, `(sum(h[0..i-1]) + h[i]/2) * 256 / N`.

Channels are calibrated one after another. The "DNL done" and "LUT done" bits
appear in `tdc_ctrl`, and the LUTs can be read back but not written. Until its
LUT exists, a channel passes its raw code through.

**Test signals.** `tdc_injection`, selected by the injection-mode register,
provides four modes:

- a 1 kHz square wave on all channels;
- a pulse on channels 0-31 a set number of cycles after each BC0;
- an external-trigger pulse to the ASICs on each BC0;
- an external-trigger pulse to the ASICs on each Resync.

## Readout chain

`tdc_readout` filters the 34 timestamps of one FPGA and puts them, one 32-bit
word per cycle, on the FPGA's data bus. The stages, in order:

1. **`ts_corr`:** subtracts the raw time of the last BC0 (optional) and a per-channel offset. A BC0 updates the reference for the hits that follow it, and its own word can be suppressed.
2. **`retrig_mitig`:** each channel has a leaky counter, +1 per hit and -1 every `dec_time` cycles. When it passes the threshold, the owning ASIC is muted for `mute_time` cycles. A readout overflow mutes both ASICs of the FPGA.
3. **`dead_time_filter`:** drops a hit that comes less than `dead_time` cycles after the previous accepted hit of the same channel.
4. **`pair_filter`:** strip *s* has its direct end on channel 15-*s* and its return end on 16+*s*. For an enabled strip, the first end is held until the second arrives. `diff = direct - return` must lie in `[diff_min, diff_max]`, or both ends are dropped. An end that waits too long is dropped.
5. **`readout_buffer`:** every channel has a holding register. A fixed priority (Resync, BC0, then strip ends with even strips first) feeds a 64-entry FIFO. Anything older than the maximum time disparity is dropped. That includes entries still held and the FIFO head. This bounds the latency through the readout.

The stages add 6 cycles of latency, plus queueing time. Each drop in the
buffer raises that FPGA's readout-overflow flag in the uplink header. Flush
empties every stage.

## Concentrator and uplink frames

`data_concentrator` (middle FPGA) works in four steps:

1. **Delay** (`delay_buffer`): delays the middle bus by a programmable 0-63 cycles, so it lines up with the buses that crossed a link.
2. **Clustering** (`strip_cluster`, one per bus): joins a direct end and the return end that follows it into one 48-bit strip record. The record holds the strip ID `fpga*16+s`, the direct timestamp, and the 16-bit difference. Single-channel words can be removed per bus. BC0 and Resync words are never removed.
3. **Merging** (`frame_merger`): takes up to three records per cycle, round-robin over the buses.
4. **Queueing** (`frame_queue`): keeps at most `max_size` frames. Beyond that the oldest is dropped and the frame-overflow flag is raised.

An uplink frame is 112 bits, G6..G0. Data slots are:

- A = G3:G2;
- B = G1:G0;
- C = G6:G5.

A strip record puts its difference in G6 (slot A) or G5 (slot B), so a frame
holds either three channel records or two records at least one of which is a
strip. The G4 header:

| bits | field |
|---|---|
| 15 | Resync seen |
| 14 | BC0 seen |
| 13 | frame overflow |
| 12:10 | readout overflow, FPGA 0/1/2 |
| 6 | SCFrame |
| 5:4 | IsStrip, slots A/B (data frame) |
| 2:0 | DataValid, slots A/B/C (data frame) |
| 5:0 | DataValid, words N and N+1 of FPGA 0/1/2 (SC frame) |

`uplink_builder` sends one frame per strobe. It chooses the first that
applies:

1. a queued data frame, because data always has priority;
2. otherwise, a slow-control frame with up to two reply words per FPGA (FPGA 0 in G3/G2, FPGA 1 in G1/G0, FPGA 2 in G6/G5);
3. otherwise, a header-only frame.

## PETIROC configuration

`petiroc_ctrl` holds the 664-bit configuration of one ASIC as 42 registers.
A load shifts the bits out MSB first on a slow serial clock (2×`SR_DIV`
cycles per bit). At the same time it samples the bits that the ASIC shifts
back, which are the previous content.

- The read-back bits are stored in their own registers.
- After the first load, each bit that differs from what was written last time counts as a bitflip.
- A periodic reload with a 48-bit period can repair upsets.
- A reset request pulses `sr_rstb` low.
- Stage-off and digital-reset controls go straight to the ASIC pins.
- During a load or reset the ASIC's VAL_EVT is held low.

## Flash and remote update

`flash_ctrl_slave` and `remote_update_slave` turn slow-control registers into
Avalon-MM transactions on the vendor flash and remote-update IP, through the
`avl_csr_master` helper.

- **Flash memory port:** bursts of up to 32 words, with a 64-register write buffer and a 64-register read buffer. A whole 32-word write (69 bus words) or read request (70 words) fits in one slow-control burst.
- **Remote update:** a 4-word write at 0x2600 performs a CSR write. A 3-word write at 0x2602 starts a CSR read, and its result lands in 0x2681/0x2682.

## E-link settings over I2C

Some link settings cannot travel over the GBT link, because the link needs
them to work. The GBT-SCA reaches the three FPGAs on a shared I2C bus for
these. `i2c_fpga_slave` answers device address `0x20 | fpga_id`. It holds
8-bit registers at 8-bit addresses:

| address | content | reset |
|---|---|---|
| 0x00 | [0] e-link loopback, [1] uplink debug pattern, [2] pattern toggle, [3] TDC-bus pattern injection, [4] SC-bus pattern injection | 0x00 |
| 0x01-0x0E | uplink pattern of e-links 0-13 | 0xAB |
| 0x0F | [0] start automatic word alignment (one-cycle pulse, reads 0) | 0x00 |
| 0x10/0x11 | Rx bitslip [2:0] and "use it" [4], banks 7A / 4A | 0x13 |
| 0x12 | Tx bitslip of the uplink e-links | 0x04 |
| 0x13 | [0] force the transceivers into locked mode | 0x00 |
| 0x20 | automatic alignment result (read only) | - |

**Protocol**

- **Write:** START, address+W, register address, data bytes, STOP.
- **Read:** first write the register address. Then send a repeated START and address+R, and read bytes until the master sends NACK.
- **Auto-increment:** the register pointer advances after each byte.

**Timing.** SCL and SDA are oversampled in the 120 MHz clock. The slave
samples SDA on rising SCL edges and changes its open-drain output a few
cycles after falling edges. In the top, the three `sda_oe` outputs are OR-ed
onto the one bus.

The settings leave the FPGA on `elink_cfg`. The transceiver logic that acts
on them is not part of this RTL.

## Simulation

Every module in `rtl/` has a testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. Two testbenches cover the whole design:

- **`tb_feb_v2_top`** runs the whole design with a short calibration and a fast 1 kHz divider. It goes through:
  - slow-control readback;
  - ASIC loading;
  - calibration;
  - injection;
  - BC0 correction;
  - clustering;
  - pair rejection;
  - dead time;
  - retrigger muting;
  - mute and flush;
  - readout and frame overflow;
  - an I2C write of e-link settings.

  It checks that each of these happened.
- **`tb_feb_v2_top_full`** uses every default parameter. It checks:
  - slow-control readback;
  - a 256-word burst read, the largest transfer;
  - BC0 loopback;
  - hits reaching the uplink within 100 bus cycles.

`tb/petiroc_model.sv` is a behavioural shift-register model of the ASIC's
configuration register, for testbenches only.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_feb_v2_top -Irtl -Itb \
    rtl/feb_pkg.sv tb/tb_feb_v2_top.sv
./obj_dir/Vtb_feb_v2_top
```

With `-Irtl -Itb`, Verilator finds the other modules by file name. Replace the
testbench name to run any other test; `tb_feb_v2_top_full` takes about 20 s.

## Departures and choices

The field layouts, register maps and reset values, and the order of the
readout stages, are taken from the specification. The following are this
design's own choices:

- **Header bits:**
  - the bit order inside the downlink and uplink headers;
  - the length of the fast-control pulses.
- **TDC:**
  - the code-density calibration algorithm and its 4096-sample histogram;
  - the 16+8-bit timestamp split.
- **Filters:**
  - the leaky-counter retrigger detector;
  - the strip-to-channel mapping (direct end on 15-*s*, return end on 16+*s*);
  - the pair filter, which accepts either end first;
  - the holding registers and stale-entry drop in the readout buffer.
- **Merging:** round-robin merging, emitting partly filled frames at once, and dropping the oldest queued frame.
- **Interfaces:**
  - the PETIROC serial timing;
  - the Avalon-MM handshakes assumed for the vendor flash and remote-update IP.
- **Board links:** the inter-FPGA links are modelled as fixed register delays.

Not built:

- the inter-FPGA byte-order correction;
- the staggered per-FPGA reset release.

Also this design's choice:

- the I2C device address of the FPGAs (`0x20 | fpga_id`);
- register auto-increment on the I2C slave.

Unused statistics outputs (drop counters, mute counts, fill levels) are left
open at the top. The specification defines no register for them.
