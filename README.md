# CPV-4 upper-tier emulator and test-system firmware

CPV-4 is a 3D-integrated SOI pixel sensor prototype for a collider vertex
detector. Two chips are stacked and joined pixel by pixel with micro bumps:

- The lower tier holds the sensing diode and the analog amplifier/comparator
  of every pixel.
- The upper tier holds the pixel logic and the readout of a 128 x 128 array.
  Its pixels are 21.04 um x 17.24 um.

Testing such a chip takes a firmware and a DAQ that already work. This
SystemVerilog provides both halves for a single FPGA:

- **An emulator of the upper-tier chip** (`cpv4_upper`): the same pixel
  logic, the same AERD readout tree and the same interface pins as the
  chip, all running on the FPGA clock.
- **The readout firmware** that drives that interface: pixel configuration,
  test pulses, Strobe/Read timing, and hit collection. The DAQ PC reaches it
  over IPbus.

In `cpv4_test_system` the firmware talks to the emulator inside the FPGA.
With the real chip attached, the same interface signals would go out to
pins instead.

## How a hit is stored: the pixel

Each pixel (`cpv4_pixel`) is a short chain of storage elements:

```
Dout ─────────────┐
                  OR ─► Latch_1 ──rising edge──► Hit DFF ─► Latch_2 ─► State_out
Pulse_d ─AND─ Latch_P    (G = !Freeze,            (D = !Latch_M,  (holds while
                          cleared while            cleared by      Sync is high)
                          Strobe is low)           GRST or Sync)
Latch_M, Latch_P: loaded from Cnfg_data while Colsel AND Rowsel_M / Rowsel_P
```

- **Latch_M** is the mask. A masked pixel (Latch_M = 1) loads 0 into the
  hit flip-flop, so it never reports a hit.
- **Latch_P** enables the electronic test pulse for this pixel.
- **Strobe** sets the working mode. In *continuous* mode Strobe stays high
  and every edge of Dout (or of an enabled pulse) is taken. In *trigger*
  mode, Latch_1 is held cleared outside the Strobe window, so only signals
  present inside the window are recorded.
- **Freeze** stops Latch_1 from following its input while a pixel is being
  read. A signal that arrives during a read is taken once Freeze ends, if it
  is still high then.
- **Sync** resets the hit of the pixel being read. Latch_2 keeps
  State_out (and so the address) steady until Sync falls.

The AND/OR gates in this sketch are how this design models the pixel; the
chip's exact gate types are not specified.

In the chip these are real latches and an asynchronously clocked DFF. In
this RTL they are all registers on one clock:

- The DFF's clock becomes an edge detector on Latch_1.
- Latch_2 becomes a register. A transparent Latch_2 would close a
  combinational loop State_out → AERD tree → Sync → State_out, which the
  chip closes asynchronously.
- A Dout edge at cycle t therefore shows on State_out at t+3.

## How hits are read: the AERD tree

The readout is built from one 4-input cell, the AERD (Asynchronized Encoder
Reset Decoder, `aerd`). It has three jobs:

- It ORs its four input states into a Valid for the level above.
- It encodes the highest-priority set input (the lowest index) as a 2-bit
  address.
- It passes the Sync coming down from above only to that winning input.

`aerd_tree` cascades LEVELS of these cells. Level 0 gives address bits
[1:0], level 1 gives bits [3:2], and so on. Sync travels down the winning
path only, so exactly one pixel is reset per read.

The array is organised as follows:

- **Double column** (`cpv4_double_column`): two 128-pixel columns share one
  4-level tree (256 inputs), which gives `Addr[7:0]`.
- **Priority order** inside a double column snakes across the pair: row 0
  left, row 0 right, row 1 left, and so on. The in-column address is
  therefore `{row[6:0], side}`, with side 0 for the even (left) column.
- **End of column** (`cpv4_upper`): a 3-level tree over the 64 double-column
  Valids gives `Addr[13:8]` and the chip's Valid. It grants one double
  column, which drives the shared `Addr[7:0]` bus.

The pixel at column `c`, row `r` therefore has the address

```
Addr[13:0] = { c[6:1], r[6:0], c[0] }
```

and the array is read in increasing address order.

### One read

The firmware raises Read. `cpv4_readout_ctrl` turns Read into Freeze and
Sync with a delay line of DELAY cycles (4 by default):

```
Read    ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______________
Freeze  _____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________   Read OR Read delayed
Sync    _________/‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________   Read AND Read delayed
Addr    ==== A0 (held) ===============X== A1 ==
```

- Freeze starts before Sync and ends after it, so no new hit can change the
  winner while a pixel is being reset.
- Addr stays on the pixel being read for the whole Read.
- Sync falls one cycle after Read. One cycle later, Addr and Valid move
  to the next hit pixel.
- When the last pixel has been read, Valid falls.

## The firmware

### Chip control (`chip_ctrl`)

The chip control generates the three timing signals of the chip interface.
All its parameters are in FPGA clock cycles; 100 MHz is assumed, so
1 us = 100 cycles.

| parameter      | meaning                                                        | reset value |
|----------------|----------------------------------------------------------------|-------------|
| Operation_mode | continuous (Strobe always high) or trigger                      | continuous  |
| Pulse_Num      | pulses sent per start command                                   | 1           |
| Pulse_Width    | length of each Pulse_d                                          | 300 (3 us)  |
| Pulse_Period   | rising edge to rising edge                                      | 1000 (10 us)|
| Strobe_Delay   | pulse rising edge to Strobe rising edge (trigger mode)          | 250 (2.5 us)|
| Strobe_Width   | Strobe length (trigger mode)                                    | 60 (0.6 us) |
| Read_Delay     | Valid rising to the first Read (at least 2 cycles)              | 20 (0.2 us) |
| Read_Width     | Read length                                                     | 220 (2.2 us)|
| Read_Period    | Read start to Read start while Valid stays high                 | 400 (4 us)  |

- The address is sampled on the first cycle of each Read and passed on to
  the data package.
- Reads are separated by at least 3 idle cycles whatever Read_Period says,
  because the emulator needs two cycles after Read falls to present the
  next address.

### Configuration path (`sync_fifo` as WFIFO, `cfg_fifo_ctrl`)

The DAQ writes one 32-bit word per pixel setting into the WFIFO:

| bits  | field                                      |
|-------|--------------------------------------------|
| 6:0   | row                                        |
| 13:7  | column                                     |
| 14    | value                                      |
| 15    | target: 0 = Latch_M (mask), 1 = Latch_P (pulse enable) |

The FIFO control applies one word every 9 cycles:

1. Two cycles drive the selects (`Col_sel`, and `Row_selm` or `Row_selp`)
   and `Cnfg_data`.
2. Four cycles assert `cnfg_wr_m` or `cnfg_wr_p`.
3. Two cycles hold the selects.

Between words all selects rest at 7F.

The chip interface carries the row and column selects as 7-bit numbers.
This design adds the two write enables, `cnfg_wr_m` and `cnfg_wr_p`, so that
an idle bus writes nothing; the emulator decodes the selects only while an
enable is high.

### Hit words (`data_package`, `sync_fifo` as RFIFO)

Each address read from the chip becomes a 64-bit word:

| bits  | field                                                |
|-------|------------------------------------------------------|
| 13:0  | Addr                                                 |
| 15:14 | 0                                                    |
| 63:16 | timestamp: clock cycles since reset, at the read     |

When the RFIFO (4096 words) is full, new words are dropped and counted
rather than stalling the readout.

### IPbus (`ipb_fabric`, `ipb_addr_decode`, three slaves)

The bus follows the IPbus slave bus: 32-bit address/data, strobe/write from
the master, and ack/err back. The master holds strobe until it sees ack or
err.

- The fabric decodes address bits [6:5] to pick a slave, and bits [4:0]
  select a register inside it.
- Any other address is answered with err.
- Each slave answers one cycle after the strobe.

| address    | slave | registers |
|------------|-------|-----------|
| 0x00-0x1F  | 0, global (`ipb_slave_global`) | 0: write bit 0 = system reset pulse (clears slaves 1 and 2 and the emulator), bit 1 = GRST pulse to the pixels; read = pulses active. 1: scratch |
| 0x20-0x3F  | 1, DAC70004 (`ipb_slave_dac`)  | 0: write sends the 32-bit word as one serial frame (SYNC_n low, MSB first, DAC samples on falling SCLK); read = last frame. 1: bit 0 busy, [31:16] frames sent. A write while busy gets err |
| 0x40-0x5F  | 2, CPV-4 (`ipb_slave_cpv4`)    | 0 CTRL: [0] trigger mode, [1] readout enable, [2] write 1 = start pulses. 1-8: the timing parameters in the order of the table above (Pulse_Num, Pulse_Width, Pulse_Period, Strobe_Delay, Strobe_Width, Read_Period, Read_Delay, Read_Width). 9: WFIFO push (err if full). 10/11: RFIFO head word, low then high; reading 11 pops. 12 STATUS: [0] WFIFO empty, [1] WFIFO full, [2] RFIFO empty, [3] RFIFO full, [4] configuration busy, [5] pulses busy, [6] Valid, [31:16] RFIFO count. 13: dropped hits. 14: configuration words applied. 15: Reads issued. 16: WFIFO count |

A typical run, as the DAQ would do it:

1. Push pixel words to 0x49 (WFIFO).
2. Write the timing registers.
3. Write CTRL = 0b110: start, readout on, continuous mode.
4. Poll STATUS, and while the RFIFO is not empty read 0x4A then 0x4B.
5. Decode column `((a>>8)<<1) | a[0]` and row `(a>>1) & 127` from each
   address `a`.

## Module map

| module | role |
|--------|------|
| `cpv4_pkg` | shared constants, mode enum, timing/config/hit/IPbus structs, register offsets |
| `cpv4_pixel` | one pixel |
| `aerd`, `aerd_tree` | AERD cell and its cascade |
| `cpv4_double_column` | 2 x 128 pixels + 4-level tree |
| `cpv4_readout_ctrl` | Read → Freeze/Sync |
| `cpv4_upper` | the emulated chip: select decoders, 64 double columns, end-of-column tree |
| `sync_fifo` | WFIFO / RFIFO |
| `cfg_fifo_ctrl` | WFIFO → configuration bus |
| `chip_ctrl` | Pulse_d, Strobe, Read generation and address capture |
| `data_package` | hit words |
| `ipb_addr_decode`, `ipb_fabric` | IPbus routing |
| `ipb_slave_global`, `ipb_slave_dac`, `ipb_slave_cpv4` | slaves 0, 1, 2 |
| `cpv4_test_system` | top: fabric, slaves and emulator |

These parts are outside the RTL:

- The UDP/Ethernet engine acting as IPbus master: its bus is the top's
  `ipb_in`/`ipb_out`.
- The lower tier's analog front end: its outputs are the top's `dout`
  inputs, one per pixel, indexed `col*128 + row`.
- The DAC70004 chip itself: only its serial pins come out.

## What is the chip's and what is this design's

These parts follow the chip and its test system:

- the pixel's latch structure;
- the 4-input AERD with priority ordering, 4 levels in the column and 3 at
  the end of column, and the 14-bit address split;
- the interface signals (Cnfg_data, Col_sel, Row_selm, Row_selp, Pulse_d,
  Strobe, Read, Valid, Addr[13:0], GRST);
- the meaning of the timing parameters, and their values at reset;
- the three-slave IPbus structure with WFIFO, RFIFO and read register.

These are this design's own choices:

- **Clocking.** Everything is synchronous to one clock. The asynchronous
  chip behaviour becomes registers, with the latencies given above.
- **Address bit order inside a double column.** `{row, side}` is a reading
  of the snake-shaped priority order; the bit assignment is not specified.
- **Read → Freeze/Sync network.** The OR/AND-with-delay form and DELAY = 4
  are this design's.
- **Configuration write enables** `cnfg_wr_m`/`cnfg_wr_p`, and the WFIFO word
  layout.
- **Register map, hit-word layout, FIFO depths, reset pulse lengths.**
- **Clock frequency.** 100 MHz is assumed; Pulse_Period defaults to 10 us,
  as no value is given.
- **Pulse enable polarity.** Latch_P = 1 enables the test pulse and
  Latch_M = 1 masks, as the pixel schematic implies.
- **Reset of the configuration latches.** They are cleared by the FPGA
  reset, which the chip's pixel does not have.
- **DAC frame format.** The DAC slave sends the DAC's 32-bit serial word
  unchanged; what the words contain (channel, level) is up to software.

## Simulating

Every testbench is self-checking, prints `TB_RESULT checks=N failures=M`,
and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cpv4_upper \
    -y rtl -y tb +libext+.sv rtl/cpv4_pkg.sv tb/tb_cpv4_upper.sv
./obj_dir/Vtb_cpv4_upper
```

| testbench | what it covers |
|-----------|----------------|
| `tb_cpv4_pixel` | hit latency, mask, select gating, pulse, Strobe window, Freeze, Sync hold, GRST |
| `tb_aerd`, `tb_aerd_tree` | exhaustive / random priority, address, Sync and grant routing at 3 and 4 levels |
| `tb_cpv4_double_column` | reduced column: snake order, masks, address hold during Sync |
| `tb_cpv4_readout_ctrl` | Freeze/Sync waveform against Read, cycle by cycle |
| `tb_cpv4_upper` | 8 x 8 chip: ordering, masks, pulse, trigger gating, Freeze, GRST |
| `tb_sync_fifo`, `tb_cfg_fifo_ctrl`, `tb_chip_ctrl`, `tb_data_package` | firmware blocks; chip_ctrl timing measured edge by edge |
| `tb_ipb_fabric`, `tb_ipb_slave_global`, `tb_ipb_slave_dac`, `tb_ipb_slave_cpv4` | IPbus routing and slaves (`ipb_master_bfm` is the bus driver) |
| `tb_cpv4_test_system` | whole system at 8 x 8 through IPbus: hit map over three pulses, trigger mode, RFIFO overflow, GRST, system reset, DAC frame, bus error |
| `tb_full_array_readout` | full-array readout in trigger mode with the fast emulator timing (0.2 us Read every 0.4 us), every pixel hit, the host draining the RFIFO while the chip is read: every address once and in order, nothing dropped, Strobe and Read timing exact |
| `tb_cpv4_test_system_full` | whole system at the full 128 x 128 size with all defaults: 14 pulse-enabled pixels, one masked, one pulse, hit map over 16384 pixels, 2.2 us Read width and 4 us Read period |

The array size is set by `DC_LEVELS`/`EOC_LEVELS` (`cpv4_upper`) or
`DC_LVL`/`EOC_LVL` (top):

- rows = 4^DC / 2
- columns = 2 · 4^EOC

So (2, 1) gives an 8 x 8 array for fast tests. In a reduced array the
address keeps the layout `{double column, row, side}`, with narrower fields.

`tb_full_array_readout` runs at 32 x 32 with a 256-word RFIFO. Setting its
`DCL`, `EOCL` and `RF` localparams to 4, 3 and 4096 runs the same test at
full size: 16384 hits, every one received in order, none dropped. That run
takes about 820 000 cycles and roughly 10 minutes of Verilator time.

The full 128 x 128 array is about 82 000 flip-flops (five per pixel). It
builds in Verilator in a few minutes, and a complete configure-pulse-read
cycle simulates in seconds.
