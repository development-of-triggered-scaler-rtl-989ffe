# Triggered scaler for miss-trigger detection

A trigger that goes missing once a day, or a fake pulse from a failing
optical converter, is very hard to find in an accelerator with hundreds of
trigger receivers. The triggered scaler makes such faults visible. It is a
four-channel pulse counter whose counting bins follow the accelerator's
timing system instead of a free-running clock: each bin is one 25 Hz rapid
cycle, and one set of bins covers one whole machine cycle. After every
machine cycle the module holds, for each channel, the count history of that
cycle, cell by cell, ready to be compared with what it should have been.

The design follows the triggered scaler built for the J-PARC accelerators:
four inputs, a dual memory-buffer of 2 x 192 cells x 16 bit per input, a
counting side (FPGA_1 in the original) and a checking side (FPGA_2), and a
register map seen by the control-system CPU. Everything the original leaves
open (bus protocol, error bits, synchronisers, corner cases) is this RTL's
own choice and is listed under [Departures and own choices](#departures-and-own-choices).

## Timing model: bins, cells and pages

Two reference signals drive the module:

* **S**, the start of a machine cycle (every 2480 ms or 5200 ms at J-PARC);
* **Trig**, the start of every rapid cycle (25 Hz, i.e. every 40 ms).

A *reference edge* is a rising edge of S or Trig. The time between two
reference edges is a *bin*. Each channel counts its input pulses during the
bin; at the next reference edge the counts of all four channels are written
into the same cell of the active page and the counters restart.

```
 S+Trig      Trig      Trig            Trig        S+Trig
   |  cell 0  | cell 1  | cell 2 ...    | cell n-1   |  cell 0 (other page)
   |<- bin 0->|<-bin 1->|               |<-bin n-1 ->|
   page P is filled ...................................  page P is frozen,
                                                          page !P fills
```

* Trig moves the cell pointer (`triggerNow`) to the next cell.
* S moves it to cell 0 of the other page (`pageNow` toggles). The page just
  left is frozen: it holds the last complete machine cycle until the S after
  next, and the CPU or the checker can read it while counting continues.
* A 2480 ms machine cycle uses 62 cells, a 5200 ms one 130 cells, out of
  192.
* When S and Trig arrive in the same clock cycle (the normal case: S falls
  on a 25 Hz tick) they are one reference edge, and that Trig is the first
  one of the new machine cycle.
* `triggerInCycle` is latched at each S: the number of Trig edges of the
  machine cycle just ended, counting a Trig that came together with its
  opening S. It equals the number of cells used.
* Nothing is counted before the first S after reset.
* A pulse that arrives in the same clock cycle as a reference edge is
  counted in the new bin.

Two error conditions of the counting process go to `errStatus`:

* bit 0, cell overflow: a Trig arrived while the pointer was on cell 191.
  That Trig still closes cell 191, but the bins that follow until the next S
  have no cell and are dropped.
* bit 1, count saturation: a channel reached 65535 pulses in one bin. The
  cell holds 65535.

Both bits stay set until the CPU writes a 1 to them.

Cells beyond the last one used in a machine cycle keep what an earlier cycle
left there. Only cells `0 .. triggerInCycle-1` of the frozen page are
meaningful.

## Miss-trigger detection

Three kinds of faults are of interest, shown here on the four injection-kicker
pulses K1..K4 that normally appear as four successive cells holding 1:

* **miss trigger**: a pulse disappears (a 1 becomes 0);
* **irregular trigger**: an unexpected pulse appears (a 0 becomes 1);
* **double trigger**: a pulse is counted twice (a 1 becomes 2), for example
  because of a bad cable termination.

Two kinds of check exist:

* **Rapid-cycle check, in hardware** (`miss_trigger_detector`): for a channel
  that must stay silent, any non-zero cell is a miss-trigger. At each S, once
  the closing cell is written, the checker reads cells
  `0 .. n-1` of the frozen page (n = cells used) of all four channels in
  parallel, one cell per clock. Each enabled channel (register 12) with a
  non-zero cell gets its sticky flag set (register 15, the `miss_flag`
  outputs, `err_any`). A 192-cell page is checked in 194 clocks, long before
  the next cell is written 40 ms later.
* **Slow-cycle check, in software**: comparing a frozen page with a reference
  pattern (such as K1..K4) needs machine parameters and belongs to the
  control-system software. The hardware supports it with the frozen page,
  `pageSet` and `triggerInCycle`. `tb/tb_jparc_cycles.sv` shows such a
  comparison finding each of the three fault kinds.

## Register map

The CPU sees a 10-bit word-addressed space of 16-bit registers, through a
simple synchronous bus: one access per clock; `bus_rd` or `bus_wr` with
`bus_addr`/`bus_wdata`; read data on `bus_rdata` with `bus_rvalid` one clock
after `bus_rd`.

| Address | Name | Access | Contents |
|---|---|---|---|
| 9 | pageNow | R | page being filled, 0 or 1 |
| 10 | triggerNow | R | cell being filled, 0..191 |
| 11 | pageSet | R/W | page the waveforms are read from, 0 or 1 (reset 0) |
| 12 | detEnable | R/W | bit c: check channel c+1 in the rapid-cycle check (reset 0) |
| 14 | errStatus | R, W1C | bit 0 cell overflow, bit 1 count saturation |
| 15 | missFlags | R, W1C | bit c: channel c+1 had a non-zero cell |
| 16 | triggerInCycle | R | Trig edges in the previous machine cycle |
| 33..224 | wf ch1 | R | cells 0..191 of channel 1, page pageSet |
| 289..480 | wf ch2 | R | channel 2 |
| 545..736 | wf ch3 | R | channel 3 |
| 801..992 | wf ch4 | R | channel 4 |

Cell k of channel c (0-based) is at `33 + 256*c + k`. Other addresses read 0
and ignore writes. Addresses 9, 10, 11, 14, 16 and the waveform windows are
those of the original module; 12 and 15 are this design's additions. W1C:
writing a 1 to a bit clears it.

## Structure

```
 s_in, trig_in, ch_in[3:0]
        |
   edge_sync x6            two-flop synchroniser + rising-edge pulse
        |
   counting_logic          bin counters, cell pointer, page switch,      (FPGA_1)
        |                  pageNow / triggerNow / triggerInCycle / errStatus
        | wr_en, wr_page, wr_cell, wr_data[4]
   memory_buffer x4        2 x 192 x 16 bit, 1 write + 2 read ports
        |            \
        | port A      \ port B
   register_interface  miss_trigger_detector   rapid-cycle check      (FPGA_2)
        |                   |
   CPU bus               miss_flag, check_done
```

| File | Contents |
|---|---|
| `rtl/scaler_pkg.sv` | sizes, register addresses, errStatus bits, bus structs |
| `rtl/edge_sync.sv` | input synchroniser and edge detector |
| `rtl/counting_logic.sv` | counting side: bins, pointer, pages, status |
| `rtl/memory_buffer.sv` | one channel's dual memory-buffer |
| `rtl/miss_trigger_detector.sv` | checking side: scan of the frozen page |
| `rtl/register_interface.sv` | CPU register map |
| `rtl/triggered_scaler.sv` | top level |

### Timing of one page switch

With the S edge seen by the counting logic in clock 0 (two to three clocks
after the S input rises, through the synchroniser): clock 1 carries the write
of the closing cell, and `pageNow`, `triggerNow` and `triggerInCycle` show the
new values; clock 2 `cycle_done` starts the checker; for a page of n cells
`check_done` pulses in clock n+4 with the flags updated.

## Parameters

`triggered_scaler`, `counting_logic`, `miss_trigger_detector` and
`register_interface` take `N_CH` (4), `N_CELLS` (192) and `CNT_W` (16);
`memory_buffer` takes `N_CELLS` and `CNT_W`. The defaults are the original
module's. The register map assumes at most 4 channels and at most 223 cells
(the waveform window of a channel ends at offset 255), and the cell index is
8 bits wide (`CELL_W`).

The clock frequency is free. Each input pulse must be high for at least one
clock and low for at least one clock; the fastest signal measured at J-PARC,
the ring RF at about 191 kHz (7648 counts per 40 ms), needs a clock above
0.4 MHz, so any FPGA clock is ample.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/scaler_pkg.sv \
    rtl/edge_sync.sv rtl/counting_logic.sv rtl/memory_buffer.sv \
    rtl/miss_trigger_detector.sv rtl/register_interface.sv \
    rtl/triggered_scaler.sv tb/tb_triggered_scaler.sv \
    --top-module tb_triggered_scaler -o sim
./obj_dir/sim
```

Swap the last testbench and `--top-module` for the others. The modules are
two-state clean: everything that is read is reset or initialised.

| Testbench | What it checks |
|---|---|
| `tb_edge_sync` | one pulse per rising edge with a fixed two-clock latency, for random high/low widths down to one clock |
| `tb_counting_logic` | 8-cell, 8-bit version: written cells and counts, pointer and page, triggerInCycle, overflow, saturation, errStatus clear, input before the first S, `cycle_done` timing |
| `tb_memory_buffer` | both read ports against a reference array, one-clock latency, read-during-write, initial zeros |
| `tb_miss_trigger_detector` | flags only for enabled channels with a non-zero cell among the used cells, scan time n+2, sticky flags and clear, random pages |
| `tb_register_interface` | every register, every waveform window boundary on both pages, clear pulses, unused addresses |
| `tb_triggered_scaler` | whole design at full size: 62-, 130- and 194-bin cycles, frozen page read while counting, miss flag and clear, overflow, saturation; counts each mechanism and fails if one never occurred |
| `tb_jparc_cycles` | whole design at full size with J-PARC-like signals: K1..K4, RF counts 7429 / 7608 / 7609 / 7648, a 25 Hz trigger; the three miss-trigger kinds found by comparison with the reference, a fake pulse found by the rapid-cycle check |

All of them pass. The longest, `tb_jparc_cycles`, runs about six seconds.

## Departures and own choices

The original module is described at the level of its function and register
list. The following are choices of this RTL:

* What a cell holds: the pulses of one bin, written at the edge that ends the
  bin. S and Trig in the same clock are one edge.
* `triggerInCycle` counts Trig edges from one S (including a Trig that came
  with it) to the next.
* The meaning and encoding of `errStatus` bits, saturation instead of
  wrap-around, dropping bins after cell 191, and write-1-to-clear.
* The rapid-cycle check runs once per machine cycle on the frozen page, with
  a per-channel enable; registers 12 and 15 are new. The slow-cycle
  comparison with a reference is not in hardware.
* The original uses two FPGAs and a PLC backplane bus; here the two sides are
  modules in one clock domain and the bus is a plain synchronous register
  bus. A bridge to a real backplane would drive `bus_*`.
* Each channel's buffer has a second read port for the checker (two block
  RAMs with the same contents on an FPGA).
* Inputs are taken as asynchronous levels and counted on rising edges after
  a two-flop synchroniser. Any input shaping, discriminators or connectors of
  the real module are not modelled.
* Buffers start at zero; the rest of the state has a synchronous active-low
  reset.

The timing system that sends S and Trig, the CPU module and its control
software are outside this design.
