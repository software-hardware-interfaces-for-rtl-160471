# GNS custom hardware: the glue between the navigation and tracking processors

The GPS Navigation Subsystem (GNS) of the TIMED spacecraft has two Mongoose V processors. The
**navigation processor (NP)** handles commands, telemetry and the navigation solution. The
**tracking processor (TP)** drives the GPS Tracker ASIC (GTA). The two processors share
nothing but a small amount of custom logic:

* two dual-port RAMs: one between the NP and the spacecraft's Command and Data Handling
  computer (C&DH), one between the NP and the TP;
* two small FPGAs (Actels) that hold resets, reset causes, interrupts and discrete control bits;
* the address decoding of each processor bus.

This RTL describes that custom logic as seen from the processors' software: every register,
strobe address, interrupt and memory window of the published software/hardware interface. The
processors, their memory chips, the tracking core of the GTA and the PCI link to the C&DH are
outside the RTL. Their signals are ports of `gns_top`.

The central idea is that **software controls almost everything by writing to an address**. The
data written is ignored. A write to `0x1C10.B466` resets the NP. A write to `0x1C10.CB40` lets the
TP touch the GTA. A write to `0x1C20.0004` interrupts the NP. Only a few registers can be read:
the Reset Cause Register, the PCI Actel status register and the GTA's registers.

## Block map

```
                 NP bus                                         TP bus
                   |                                              |
            np_addr_decode                                  tp_addr_decode
   +-------+-------+--------+---------+----------+      +--------+-------+--------+
   |       |       |        |         |          |      |        |       |        |
 Flash   SRAM  reset_actel pci_actel pci_buffer np_tp_buffer   SRAM  reset_actel gta_host_if
 (ext)   (ext)  (NP page)             |  (port A) (port B)--------+   (TP page)  (gated by
                   |                  |                                          gta_io_en)
             watchdog_timer      C&DH port
             reset_cause_reg
```

| Module | What it is |
|---|---|
| `gns_top` | Wires everything together: decoders, read-data multiplexers, GTA access gate, interrupt vectors |
| `np_addr_decode`, `tp_addr_decode` | Address windows of each processor, including the "DRAM" error range |
| `reset_actel` | Reset Actel: resets, watchdog, cause register, GTA I/O enable, NP<->TP interrupts, Flash and test-point flip-flops |
| `watchdog_timer` | NP watchdog inside the Reset Actel |
| `reset_cause_reg` | 16-bit Reset Cause Register |
| `pci_actel` | The NP's view of the PCI Actel: status register and two interrupt latches |
| `pci_buffer` | 8 KB NP <-> C&DH dual-port RAM, with an interrupt when the C&DH writes its 1PPS word |
| `np_tp_buffer` | 8 KB NP <-> TP dual-port RAM; the lower half is read-only to the TP |
| `gta_host_if` | Register interface of the GTA: 14 control/status registers and 16 registers per channel for 12 channels |
| `dpram` | Generic true dual-port RAM used by both buffers |
| `gns_pkg` | Bus request type, device enum, every strobe address and cause bit, GTA register structs |

## Memory maps

Every address ignores its top three bits, because the processor uses them for user/kernel and
cached/uncached space. The reset vector `0xBFC0.0000` is therefore decoded as `0x1FC0.0000`.

**Navigation processor**

| Window | Device | Width | Notes |
|---|---|---|---|
| `0x0000.0000-0x0FFF.FFFF` | none (DRAM not fitted) | - | any access resets the NP, cause bit 0 |
| `0x1000.0000-0x101F.FFFF` | SRAM, 2 MB | 32 | bits 21-26 not decoded: the window repeats up to `0x17FF.FFFF` |
| `0x1C10.0000-0x1C10.FFFF` | Reset Actel, NP page | 16 | see below |
| `0x1C18.0000-0x1C18.000F` | PCI Actel | 16 | |
| `0x1D20.0000-0x1D20.1FFF` | PCI buffer | 16 | |
| `0x1D28.0000-0x1D28.1FFF` | NP/TP buffer | 16 | |
| `0x1F00.0000-0x1F3F.FFFF` | Flash, 4 MB | 32 | bits 22-23 not decoded, so the NP boots from Flash at `0x1FC0.0000` |

**Tracking processor**

| Window | Device | Width | Notes |
|---|---|---|---|
| `0x0000.0000-0x0FFF.FFFF` | none | - | any access disables GTA I/O, cause bit 10 |
| `0x1000.0000-0x101F.FFFF` | SRAM, 2 MB | 32 | bits 21-26 not decoded |
| `0x1C20.0000-0x1C20.FFFF` | Reset Actel, TP page | 16 | |
| `0x1D30.0000-0x1D37.FFFF` | GTA registers | 16 | only while GTA I/O is enabled |
| `0x1FC0.0000-0x1FC0.1FFF` | NP/TP buffer | 16 | holds the TP's reset vector and boot code |

Any other address selects nothing: writes are dropped and reads return 0.

## Reset Actel

The Reset Actel is where most of the design's behaviour lives. All of its functions are write
strobes, except one readable register.

### Resets

| NP reset cause | How it arises | Length | Cause bit |
|---|---|---|---|
| DRAM access | NP request into `0x0000.0000-0x0FFF.FFFF` | pulse | 0 |
| GNS reset | `gns_rst` from the C&DH | while held | 1 |
| Watchdog | no write to `0x1C10.794C` for `WDT_CYCLES` clocks | pulse | 2 |
| NP initiated | write `0x1C10.B466` | pulse | 3 |
| IEM master reset | `master_rst` | while held | 4 |
| EDAC double error | `np_edac_derr` | pulse | 5 |
| Console reset | `console_rst` from the ground support equipment | while held | 6 |

A pulse lasts `RST_PULSE_CYCLES` clocks. The TP is reset by the master reset and by an NP write
to `0x1C10.B468`. An NP reset never resets the TP in hardware: NP software is expected to reset
the TP itself after it restarts. The watchdog count is held at zero while the NP is in reset.

### Reset Cause Register (read at `0x1C10.0000`)

| Bits | Meaning | Cleared by |
|---|---|---|
| 6:0 | NP reset causes (table above) | NP write `0x1C10.B464` |
| 7 | GTA I/O disabled by master reset | NP write `0x1C10.B46E` |
| 8 | GTA I/O disabled by TP software (`0x1C20.0002`) | same |
| 9 | GTA I/O disabled by NP software (`0x1C10.CB42`) | same |
| 10 | GTA I/O disabled by a TP DRAM-range access | same |
| 11 | GTA I/O disabled by a TP EDAC double error | same |
| 13 | NP being held in reset (live) | - |
| 14 | console enabled (live) | - |
| 12, 15 | reserved, read 0 | - |

The flags are sticky. Only a clear strobe or the logic's own power-on reset (`por_n`) removes
them, so they survive the processor reset they explain. If a cause and a clear arrive in the
same clock, the cause wins.

### GTA I/O access

One flip-flop, `gta_io_en`, decides whether the TP can reach the GTA registers. It protects the
register that steers the 1PPS from stray TP writes. Only the NP can set it, by writing
`0x1C10.CB40`. Five events clear it: the master reset, an NP write to `0x1C10.CB42`, a TP write
to `0x1C20.0002`, a TP DRAM-range access, and a TP EDAC double error. Each event records its
cause bit. While `gta_io_en` is 0, the NP's INT[4] is asserted. TP requests to the GTA window
are dropped, and a read returns 0. If a disable and the enable meet in the same clock, the
disable wins.

### Other strobes

| Address | Function |
|---|---|
| NP `0x1C10.B46C` / TP `0x1C20.0000` | raise / acknowledge TP INT[5-0] (NP to TP) |
| TP `0x1C20.0004` / NP `0x1C10.B46A` | raise / acknowledge NP INT[5-7] (MIC-delayed) |
| NP `0x1C10.7876` / `7874` | set / clear GTA reset (clears all GTA registers) |
| NP `0x1C10.CB4A` / `CB48` | Flash write enable on / off |
| NP `0x1C10.CB4E` / `CB4C` | Flash reset on / off |
| NP `0x1C10.787A`/`7878`, `787E`/`787C` | NP test points 1, 2 set / clear |
| TP `0x1C20.000A`/`0008`, `000E`/`000C` | TP test points 1, 2 set / clear |

The Flash interrupt INT[5-8] has no acknowledge. It rises when the Flash busy line falls (an
erase or program has finished). It falls when busy rises again (the next operation starts).

## Interrupts

| Processor | Line | Source | Acknowledge |
|---|---|---|---|
| NP | INT[2] | rising edge of the GTA steered 1PPS | write PCI Actel `0x1C18.000A` |
| NP | INT[4] | GTA I/O disabled (level) | re-enable GTA I/O |
| NP | INT[5-2] | C&DH wrote PCI buffer word `0x0FFF` (byte `0x1FFE`) | write PCI Actel `0x1C18.0008` |
| NP | INT[5-7] | TP write `0x1C20.0004` | write `0x1C10.B46A` |
| NP | INT[5-8] | Flash operation done | none (clears on next operation) |
| TP | INT[2] | GTA accumulator interval clock (AIC) | GTA `BA+12` with bit 2 set |
| TP | INT[4] | GTA measurement interval clock (MIC) | GTA `BA+12` with bit 3 set |
| TP | INT[5-0] | NP write `0x1C10.B46C` | write `0x1C20.0000` |
| TP | INT[5-1] | rising edge of the GTA steered 1PPS | GTA `BA+12` with bit 4 set |

Each interrupt is a latch. It stays high until acknowledged, and an event in the acknowledge
clock wins over the acknowledge. On `np_int`, `np_int_exp`, `tp_int` and `tp_int_exp`, bit *j*
of the `_exp` vector is expansion interrupt INT[5-*j*]. The other sources are inside the
processors: timers, FPU, UARTs, access violations and EDAC errors. The funnelling of the
expansion interrupts into INT[5] is also done there, so those bits are 0 here.

The one-per-second cycle works as follows:
1. The GTA's steered 1PPS interrupts both processors and goes out to the C&DH as `gns_1pps`.
2. Within 15 ms the C&DH writes its input data and then buffer word `0x0FFF`, which raises
   INT[5-2].
3. The first 250 ms after INT[5-2] are for writing the PCI buffer. The rest of the second is for
   reading it.

The hardware does not enforce these windows. Software keeps them.

## PCI Actel (NP view)

| Offset | Access | Content |
|---|---|---|
| `0x6` | read | bit 5 Flash busy, bit 6 IEM ID (0 = IEM A, 1 = IEM B) |
| `0x8` | write | acknowledge INT[5-2] (PCI buffer) |
| `0xA` | write | acknowledge INT[2] (GTA 1PPS) |

The interface description also lists `0x1C18.0008` as the 1PPS acknowledge and `0x1C18.000A` as
the PCI buffer acknowledge, which is the reverse of the table above. The table follows the
register definitions. The two constants `PA_PCIBUF_ACK` and `PA_PPS_ACK` in `gns_pkg` are the
only place to change if the hardware turns out to be wired the other way. The other five
registers belong to the PCI master (the C&DH). They are not built and read 0.

## Buffers

Both buffers are 4096 x 16-bit true dual-port RAMs (`dpram`). Reads are read-first, with one
clock of latency. If both ports write the same word in the same clock, the NP side wins.

* `pci_buffer`: the NP uses it at `0x1D20.0000`. The C&DH side is a plain synchronous word
  port, because the PCI target logic is not part of this design. Software lays out two buffer
  sets in it: attitude, telecommand, unpacketized data, six 131-word packets, time words, and
  the four interrupt words at the top. Only word `0x0FFF` is wired to an interrupt.
* `np_tp_buffer`: the NP sees it at `0x1D28.0000` and the TP at `0x1FC0.0000`. The TP may write
  only the upper 4 KB (words `0x800-0xFFF`). The lower half is the TP's "pseudo non-volatile"
  memory: the NP loads the TP's boot code and application there and then resets the TP. A
  refused TP write changes nothing and pulses `tp_wr_refused`.

## GTA register interface

`gta_host_if` holds the processor side of the GTA's 206 registers. Word index = address bits
8:1, with base BA = `0x1D30.0000`.

* BA+0 to BA+26 hold the 14 control/status registers. At BA+0 to BA+8 the same address writes
  a setting (antenna tracker selects, code select, NCO clears) and reads a status value (MIC
  divider, 1PPS-to-MIC offset, tracker data latch, AGC). `corr_config` (BA+10) and
  `timing_config` (BA+12) are write-only. BA+14 is unused. `pps_div_*` and `aux_decode1-4`
  (BA+16 to BA+26) read back what was written.
* Channel *x* (1 to 12) starts at BA + 32*x. It has six write registers (carrier and code NCO
  phase increments, C/A code SV phase, epoch accumulate) and twelve read values (NCO phases,
  code phase, epoch and cycle counts, and the I/Q early/prompt/late accumulators). Entries
  TA+24 to TA+30 are unassigned. The register list prints the channel base as BA + 16*x. That
  cannot be right: each channel has 16 registers (32 bytes), and a 16-byte stride would overlap
  the control registers. The 32-byte stride is used.

Writes go out to the tracking core on `ctrl_wr` / `ch_wr`, with each field at its map width.
Read values come in on `ctrl_rd` / `ch_rd`. The tracking core itself (NCOs, correlators,
accumulators, interval clocks, 1PPS steering) has its own specification and is not here.

## Bus and timing

This design uses its own abstraction of the processor bus, `gns_pkg::bus_req_t`:
`{valid, we, addr[31:0], wdata[31:0]}`, with one request per clock while `valid` is high.
Writes act at that clock edge. Read data comes out on `np_rdata` / `tp_rdata` one clock later,
with `np_rvalid` / `tp_rvalid`. External Flash and SRAM get a combinational chip select
(`np_flash_cs`, `np_sram_cs`, `tp_sram_cs`), and must return their word on `*_ext_rdata` in the
next clock. 16-bit devices use data bits 15:0 and read back with the upper half 0. Everything
runs on one clock, and all inputs must already be synchronous to it. The Mongoose V bus cycle,
its wait-state segments (SPEC0 to SPEC3) and any synchronisers are left to whoever fits this
logic to the real processors.

## Choices not fixed by the interface description

* `RST_PULSE_CYCLES` (16) and `WDT_CYCLES` (1,000,000) are placeholders. The required watchdog
  rate and the clock frequency are not given. Set them from the real clock.
* The master reset clears every Actel flip-flop and interrupt and disables GTA I/O. It does not
  clear the cause flags: it sets bits 4 and 7.
* Both processors use the same DRAM error range, `0x0000.0000-0x0FFF.FFFF`. The TP's range is
  printed as `0x0000.0000-0xFFFF.FFFF`, which would cover every address.
* The TP page of the Reset Actel is decoded as a full 64 KB window, like the NP page.
* The GTA access gate blocks TP reads as well as writes.
* Set-versus-clear priorities, reset values of the discrete flip-flops, and read-0 for
  undecoded addresses are all this design's choices.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one prints
`TB_RESULT checks=N failures=M`.

* The decoders are checked against hand-written address tables: window edges, rollover, and the
  ignored top bits. They are also checked with 20,000 random addresses around every window edge,
  against a reference that states the map as plain address ranges.
* The buffers are checked against a reference array under random two-port traffic. The test
  also checks the PCI buffer's interrupt event in every clock and counts refused writes.
* `reset_actel` is checked strobe by strobe. The test keeps its own expected cause register and
  measures reset pulse lengths and the watchdog period. A random phase then drives every strobe
  address, error input and external reset at random. It compares every output in every clock
  with a separately written reference model. `pci_actel` and `watchdog_timer` get the same kind
  of random phase.
* `gta_host_if` has every register written and read at its map address.
* `tb_gns_top` runs the whole design at its default parameters. It steps through a compressed
  second of operation: boot image load and TP boot, GTA enable and channel programming,
  AIC/MIC, MIC-delayed data transfer, NP-to-TP interrupt, 1PPS, C&DH attitude and packet
  exchange, Flash done and Flash reset, test points, the GTA reset, every GTA disable cause,
  and every NP reset cause. It also starves the watchdog for its full 1,000,000-clock period.
  It counts 29 mechanisms and fails if any never happened. It runs in a few seconds.
* `tb_pci_exchange` runs two complete once-per-second exchanges with the C&DH through
  `gns_top`, one on each buffer set. It first checks that the software's buffer layout tiles the
  8 KB exactly: 46 fields, including the reserved words. It then moves every field: 1063 input
  words to the NP and 854 output words back to the C&DH each second. It also checks that
  INT[5-2] rises two clock edges after the C&DH writes word `0x0FFF`.

To simulate with Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gns_pkg.sv tb/tb_gns_top.sv --top-module tb_gns_top -o sim
./obj_dir/sim
```

Replace `tb_gns_top` with any other testbench to run that block alone. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/gns_pkg.sv rtl/<module>.sv --top-module <module>`.
Verilator's warnings about unused address bits in the decoders are expected: those bits are
undecoded on purpose.
