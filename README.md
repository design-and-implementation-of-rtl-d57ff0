# FPGA programmable logic controller

A programmable logic controller (PLC) normally runs its ladder-diagram program
on a microprocessor, one instruction after another, so its response time is
bounded by the length of the program and the speed of the processor. This
design moves the ladder into an FPGA and shows both ways of doing that:

* **Parallel execution.** A fixed ladder is translated into gates. Every rung
  is its own small circuit and all coils follow the switches at gate speed,
  with no scan at all.
* **Sequential execution.** A small programmable ladder processor scans a program
  from on-chip block RAM. Each element takes two clock cycles, so the largest
  program (16 rungs of 7 elements) scans in 224 cycles, 2.24 µs at 100 MHz.
  A new program can be loaded without reconfiguring the FPGA.

Around the ladder logic are the parts a small controller needs. A host-bus
interface lets a PC load programs and switch between program and run mode.
A source selector lets each of four devices be driven either by the ladder
(field switches) or by an operator at a PC. A 9600-baud serial link lets that
PC switch the devices and watch their state.

```
 SW1..SW14 ──┬──────────────► ladder_fig2 ──HWS1..4──► hw_sw_select ──► COMP1..4 (devices)
             │                (parallel)               ▲   │   ▲            FB1..4, HWSEL, SWSEL
             │                                    SWS1..4  │   SEL
             │                                         │   FB
             │              rxd ─► uart_rx ─► gui_link ◄───┘
             │              txd ◄─ uart_tx ◄──┘
             ▼
        scan_engine (+ data_mem) ◄── prog_mem ◄── isa_decoder ◄──► ISA host bus
             │                                       ▲
             └──── plc_q[15:0] ──────────────────────┘ (readback)
```

## Ladder logic in hardware

A relay ladder draws control logic as power flowing from a left rail, across
rungs, into coils on the right. Contacts in series on a rung form a logical
AND. A normally open contact passes flow when its bit is 1, and a normally
closed one when its bit is 0. Vertical links between adjacent rungs OR their
flows together. A group of rungs joined this way is a *network*, and it drives
one coil. Coils are state bits: later rungs can read them back as contacts.

### The example ladder (`ladder_fig2`)

The reference application controls four devices from 14 switches. There is a
lamp and a fan on mains power and an LED and a motor on a DC supply:

| Coil  | Equation                                   |
|-------|--------------------------------------------|
| Lamp  | SW1 · ¬SW2 · (SW3 + SW4) · ¬SW5            |
| Fan   | SW6 · ¬SW7 · (SW8 + SW9) · ¬SW10           |
| LED   | SW11 · ¬SW12                               |
| Motor | SW13 · ¬SW14                               |

SW2 and SW7 act as stop push-buttons (normally closed) and SW3 and SW8 as start
push-buttons (normally open). SW5, SW10, SW12 and SW14 are normally closed
contacts. The coils are not latched. `ladder_fig2` is these four equations as
combinational logic. `sw[0]` is SW1.

### The programmable scan engine (`scan_engine`, `prog_mem`, `data_mem`)

**Program format.** A program is `RUNGS × ELEMS_PER_RUNG` (16 × 7 = 112)
element words of 9 bits. Word `r*7 + e` is slot `e` of rung `r`. A word is
`{op[2:0], addr[5:0]}` (`plc_pkg::instr_t`):

| op | name | effect (p = rung flow, s = network sum)       |
|----|------|-----------------------------------------------|
| 0  | NOP  | empty slot, flow passes                       |
| 1  | XIC  | normally open contact: p = p & bit[addr]      |
| 2  | XIO  | normally closed contact: p = p & ~bit[addr]   |
| 3  | OTE  | coil: bit[addr] = s \| p, then s = 0          |
| 4  | LNK  | vertical link to the next rung: s = s \| p    |

Codes 5 to 7 act as NOP. The flow `p` restarts at 1 at the first slot of
every rung. The sum `s` carries across rungs until an OTE uses it, and it is
cleared at the start of every scan. A parallel branch such as
`SW1 · ¬SW2 · (SW3 + SW4) · ¬SW5` is written as two rungs. The first ends in
LNK and the second ends in OTE:

```
rung 0:  XIC 0  XIO 1  XIC 2  XIO 4  LNK
rung 1:  XIC 0  XIO 1  XIC 3  XIO 4  OTE 16      (output 0 = Lamp)
```

A rung can hold several OTEs (several coils driven from one rung). A rung
with no contacts before its OTE drives the coil with a constant 1. A rung with
neither LNK nor OTE has no effect.

**Data image.** `data_mem` holds 64 bits. Bits 0–15 are the input image,
bits 16–31 the output image (coils) and bits 32–63 internal relays. An OTE
can write any bit. One written into the input image is overwritten at the
start of the next scan.

**Timing.** Every element takes two cycles. In the *fetch* cycle the program
counter addresses `prog_mem`, a block RAM with registered read. In the
*execute* cycle the word is decoded, the operand bit is read combinationally
from `data_mem` (distributed RAM), and the flow, sum or coil is updated. A
rung therefore takes 2·m cycles and a scan 2·m·n cycles, 224 at the defaults.
No cycles are spent on I/O:

* In the first fetch cycle of a scan, the 16 inputs are copied into the input
  image. The output port `outputs` takes the output image of the scan that has
  just ended in that same cycle.
* `scan_done` pulses for one cycle at the end of every scan, and the outputs
  change on the next clock edge. `scan_count` counts scans.
* A change on an input shows on the outputs after one to two scans. That is at
  most 449 cycles, 4.5 µs at 100 MHz.

**Modes.** With `run = 0` (program mode) the engine sits at element 0, the
output port is 0 and the program memory can be written. When `run` rises the
first scan starts at once. The outputs stay 0 until that scan has finished.
The data image is kept across mode changes, so internal relays survive. Reset
clears it.

The program shape is set by the package parameters `RUNGS` and
`ELEMS_PER_RUNG`. The 224-cycle largest scan fixes only their product (112).
16 × 7 is this design's choice.

## Hardware or software control (`hw_sw_select`)

Each of the four devices (channel 1 Lamp, 2 Fan, 3 LED, 4 Motor) is driven
by `COMPn = HWSn·SEL + SWSn·¬SEL`. This is two AND gates, an OR gate and a
shared inverter per channel. `HWSn` is the ladder coil. `SWSn` is the software
switch set from the PC. `FBn` is a copy of `COMPn` that the PC monitors.
`HWSEL` (= SEL) and `SWSEL` (= ¬SEL) show which source is active. SEL = 1
selecting the hardware path is a choice; swap `hws` and `sws` to reverse it.
In `plc_top` the HWS inputs come from the parallel ladder.

## Host interface (`isa_decoder`)

The host reaches the PLC over an 8-bit ISA I/O window at `BASE_ADDR` (0x300):

| offset | access | contents |
|--------|--------|----------|
| +0 | R/W | bit 0: run (1) / program (0) |
| +1 | R/W | program address (element index) |
| +2 | R/W | program word, bits 7..0 |
| +3 | R/W | bit 0: program word bit 8. A write stores the word at the program address and increments the address (program mode only). |
| +4 | R   | scan-engine outputs 7..0 |
| +5 | R   | scan-engine outputs 15..8 |
| +6 | R   | `{000, HWSEL, FB4..FB1}` |
| +7 | R   | scan counter, low byte |

To load a program: write 0 to +0, write the start address to +1, then for
every word write +2 followed by +3. Write 1 to +0 to run.

Bus cycles are asynchronous to the PLC clock. IOW#, AEN, SA and SD pass
together through a two-flop delay line. A write is committed on the
synchronised rising edge of IOW#, using the address and data sampled in the
last clock of the strobe. The strobe must therefore last at least two PLC
clocks. Writes with AEN high are ignored. Reads are decoded combinationally
from the live bus, as on a simple ISA card. `sd_oe` enables the board's data
bus driver. The data bus is split into `sd_in`, `sd_out` and `sd_oe`.

## PC serial link (`uart_rx`, `uart_tx`, `gui_link`)

The link runs at 9600 baud with 8 data bits, no parity and 1 stop bit, LSB
first. Both UARTs take `CLK_HZ` and `BAUD` parameters. The byte protocol:

| PC → PLC | meaning |
|----------|---------|
| `0xA0 \| s` | set SWS4..SWS1 to `s[3:0]` |
| `0x50` | request a status report |

| PLC → PC | meaning |
|----------|---------|
| `{100, HWSEL, FB4..FB1}` | status report |

A report is also sent unprompted whenever FB or HWSEL changes. Triggers that
arrive while a report is being sent merge into one later report that carries
the newest state. Other received bytes are ignored. The receiver checks the
start bit at mid-bit and samples each bit at its middle. A frame with a low
stop bit is dropped.

## Where this design goes beyond its source

The sources of this design give the following: the FPGA-based PLC, the
example ladder, the four-channel HWS/SWS selector with its gate types and
signal names, and program and run modes. They also say that block RAM holds
the program and distributed RAM the data, that each rung costs 2·m cycles and
that the largest program scans in 2.24 µs at 100 MHz. The host link is an ISA
bus and the operator link is RS232 at 9600 8-N-1.

These parts are this design's own:

* the element set and encoding
* the 16 × 7 program shape and the 64-bit data map
* when I/O is sampled and updated within a scan, and program-mode behaviour
* the ISA register map, base address and synchronisation
* the serial byte protocol
* SEL polarity

The contact types of the example ladder were read from its drawing. SW2/SW7
as normally closed and SW3/SW8 as normally open push-buttons is the least
certain reading. The contact drawn right of each coil is treated as part of
the rung's series path. `ladder_fig2` is the only place that reading lives.

Two connections in `plc_top` are this design's reading of the system:
* The parallel ladder, not the scan engine, feeds HWS1..4.
* The scan engine reads the same 14 switches and has its own 16-bit output
  port.

Not included: analog inputs (A/D), board-level I/O conditioning, and reset
and power circuits. The configuration flash and JTAG port belong to the FPGA
vendor. The PC program is not included either; that includes its time-of-day
timers, which switch devices by sending commands.

## Files

| file | contents |
|------|----------|
| `rtl/plc_pkg.sv` | opcodes, instruction word, sizes, data map |
| `rtl/prog_mem.sv` | program block RAM, write port + registered read |
| `rtl/data_mem.sv` | 64-bit data image, bit read/write, parallel input load |
| `rtl/scan_engine.sv` | sequential ladder processor (instantiates `data_mem`) |
| `rtl/ladder_fig2.sv` | example ladder as parallel logic |
| `rtl/hw_sw_select.sv` | four-channel hardware/software selector |
| `rtl/isa_decoder.sv` | ISA host interface and registers |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 8-N-1 serial receiver and transmitter |
| `rtl/gui_link.sv` | serial command decoder and status reporter |
| `rtl/plc_top.sv` | the whole controller |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_plc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/plc_pkg.sv tb/tb_plc_top.sv
obj_dir/Vtb_plc_top
```

Replace `tb_plc_top` with any other testbench name. The package must be
listed first.

`tb_plc_top` runs the whole controller at its default parameters. The test
goes in four stages:

1. It loads a 112-word program over the ISA bus. The program is the example
   ladder plus a seal-in relay.
2. It runs 60 random switch settings. The scan engine, the parallel ladder and
   an independent model must agree, and the devices must follow the ladder
   while SEL = 1. Every scan period is checked to be 224 cycles.
3. It drives the GUI protocol over a real 9600-baud line: set commands,
   unprompted reports and a query.
4. It reads the status back over ISA and returns to program mode.

It counts how often each of these mechanisms happened and fails if one never
did. The run takes about 14 ms of simulated time and a few seconds of wall
time.

The unit testbenches do the following:

* `tb_scan_engine` runs 300 scans of a program with branches, a seal-in, coil
  read-back and six random rungs against a reference interpreter.
* `tb_ladder_fig2` and `tb_hw_sw_select` are exhaustive.
* The UART testbenches run at 16 clocks per bit.

## Resource notes

The default build holds 112 × 9 bits of block RAM, 64 bits of data image and
about 280 flip-flops. Most of the flip-flops are the UART counters and the
ISA synchroniser. Resizing the program means changing `RUNGS` and
`ELEMS_PER_RUNG` in `plc_pkg`. The scan period follows as 2 × RUNGS ×
ELEMS_PER_RUNG. Growing the data image beyond 64 bits widens `addr`, and so
the instruction word and the ISA program-word registers. Those registers carry
only 9 bits as written.
