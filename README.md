# PDFP: a programmable look-up table for the RF frequency of an accelerator

In a synchrotron the RF cavities must track the magnetic field: as B rises,
the revolution frequency rises, and the RF frequency has to follow. The PDFP
(Programmable Digital Frequency Program) does this with a table rather than
a formula. It counts the B-up and B-down pulses of the field measurement,
uses the count as an address into a table of frequency words, and puts the
addressed word, optionally plus a correction word from a second connector,
on its output connector. Several tables are held at once; trigger inputs
switch between them or clear the counter at precise moments of the cycle.

The PDFP sits in a NIM crate and has no bus of its own. A VME module, the
PDFP-CTRL, configures it over a 10 Mbit/s serial link: the host writes 32-bit
command words into the controller, which queues them and sends them to the
PDFP. Words coming back from the PDFP (status, and copies of its input and
output connectors) are stored in memory on the controller where the host can
read them.

This repository holds synthesizable SystemVerilog for both modules and the
link between them, with a self-checking testbench for each part.

## Structure

```
pdfp_top
├── pdfp_ctrl            VME controller
│   ├── ctrl_vme_regs    VME slave, registers, interrupter
│   ├── sync_fifo        256 x 32 command FIFO
│   ├── serial_tx        link transmitter  ──► to the PDFP
│   ├── serial_rx        link receiver     ◄── from the PDFP
│   └── ctrl_rx_mem      returned words: status, 128 kWord memory, DPRAM port
└── pdfp_nim             look-up table module
    ├── serial_rx        link receiver
    ├── pdfp_cmd         command decoder, mode register
    ├── pulse_sync       synchronisers for B pulses, triggers, strobe
    ├── trigger_table    eight action entries
    ├── b_counter        B up/down counter
    ├── lut_mem          table memory and fill pointer
    ├── out_adder        table word (+ correction) to the output connector
    ├── pdfp_reply       status / input copy / output copy words, reply queue
    │   └── sync_fifo
    └── serial_tx        link transmitter
```

`pdfp_pkg` holds the link word layout, command and reply codes, the trigger
entry and status structs.

## The link and its words

Every word is 32 bits. The top four bits C3..C0 say what it is.

Controller to PDFP (commands), parameter in D26..D00:

| C3..C0 | Command | Parameter |
|---|---|---|
| 0 | send a status word back | ignored |
| 1 | clear the PDFP's receiver error flag RxEP | ignored |
| 2 | set the table fill pointer | word address; table *n* starts at *n* × 0x20000 |
| 3 | write a table word at the fill pointer, then increment it | data (low 16 bits used) |
| 5 | set mode | D00 = 1: output = table + correction (reset value); D00 = 0: table only. D01 is stored, unused |
| 8 | write a trigger table entry | see below |

PDFP to controller (replies): bit 27 is DIR (1 = caused by a B-down pulse),
D26..D00 data.

| C3..C0 | Reply | Where it goes in the controller |
|---|---|---|
| 0 | status: D07 RxEP, D06 MERR, D05 BOF, D04..D00 table in use | ctrl register bits D07..D00, sets Stat |
| 6 | copy of the correction input connector | receive memory at the pointer; pointer then moves |
| 7 | copy of the output connector | front-panel dual-port RAM port (`dp_we`, `dp_data`, `dp_dir`) |

Line format (this design's choice; only the rate and word size are fixed by
the PDFP-CTRL description): idle high, start bit 0, D31 first through D00, an
odd parity bit, stop bit 1. Each bit is `CLKS_PER_BIT` clocks (default 4, for
a 40 MHz clock and 10 Mbit/s), so a word takes 35 bit times, 3.5 µs. The
receiver synchronises the line, samples each bit in its middle, and rejects a
frame whose parity is wrong or whose stop bit is low. The two modules may run
on unrelated clocks of nominally equal frequency; with 4 clocks per bit the
mismatch must stay well under 1.4 %.

Example command words:

| Word | Effect |
|---|---|
| `0x00000000` | request status |
| `0x10000000` | clear RxEP |
| `0x80000060` | now: select table 0, clear and disable the B counter |
| `0x80001020` | at trigger 1: select table 0, enable the B counter |
| `0x80002021` | at trigger 2: select table 1 |
| `0x20020000` | fill pointer to the start of table 1 |
| `0x37ffffff` | write 0xFFFF into table 1 word 0; pointer now 0x20001 |

## The PDFP

### B counter and table lookup

`b_counter` is 17 bits wide, one table's worth. B-up pulses count up, B-down
pulses count down (both at once cancel). Running past either end wraps and
sets the sticky overflow flag BOF. A trigger action with BCLR set zeroes the
counter and stops it; the next action with BCLR clear starts it again (it
runs after reset).

`lut_mem` holds `NBANKS` tables of 0x20000 words back to back. The read
address is `{table, count}`; the word appears a clock later and `out_adder`
registers the output a clock after that. With the front-panel synchroniser
(three clocks), the output connector shows the new word five clocks after a
B pulse edge. MERR is high while the selected table number is `NBANKS` or
more; the fill pointer does not affect it. Fills at pointers beyond the
memory are dropped.

The correction word on the input connector is used as it is, without
synchronisation; it should be stable around the clock edges that use it.
The sum wraps at 16 bits.

### Trigger table

Command 8 writes an entry. Its parameter field:

| D14..D12 | D10 | D09 | D08 | D07 | D06 | D05 | D04..D00 |
|---|---|---|---|---|---|---|---|
| entry T2..T0 | IB | OB | IS | OS | BCLR | TS | TB |

* Entry 0 acts as soon as it is written: BCLR clears and stops the counter
  (or, clear, starts it), TS selects table TB. Its IB, OB, IS, OS bits stay
  in force and are the only send-back settings; they are ignored in other
  entries.
* Entries 1..6 are armed for trigger inputs 1..6; each trigger pulse
  performs its entry's BCLR/TS action. A trigger with no entry written does
  nothing. Triggers arriving together are queued and served one per clock,
  lowest number first.
* Entry 7 is stored but nothing fires it.

### Replies

With IB (OB) set in entry 0, every counted B pulse sends a code-6 (code-7)
word with the input (output) connector value and DIR. The output copy is
taken after the output has settled on the new count. IS and OS do the same
on each strobe pulse, with DIR = 0. With both bits of a pair set, the input
copy goes first. Each kind of word has one holding slot and the slots feed a
16-word queue (`QDEPTH`) in front of the transmitter; since a word takes
3.5 µs on the line, B pulses faster than that for long enough lose words
(`lost` pulses inside `pdfp_reply`).

## The PDFP-CTRL

### Register map (VME short I/O space)

Base address from seven jumpers on A15..A09 (`base_jumpers`, a 1 for an
installed jumper); 0x2800 is `base_jumpers = 7'h14`. Address modifiers 0x29
and 0x2D. All registers take 16-bit transfers; the fifo register also takes
one 32-bit (D32, LWORD* low) write at offset 0, with D31..D16 on `vme_dh_i`.

| Offset | Name | Write | Read |
|---|---|---|---|
| 0 | fifo (high) | D31..D16 of the next command word | 0 |
| 2 | fifo (low) | D15..D00; pushes the whole word into the FIFO | 0 |
| 4 | ctrl | D0 FEIE, D1 FHIE, D2 TxR, D3 RxR, D4 PCLR, D5 BCLR, D6 CDE | D13 Stat, D12 FF, D11 FH, D10 FE, D09 TxEERR, D08 RxEV, D07..D00 last status |
| 6 | base | D7 enable, D4..D0 = A23..A19 of the memory window | 0 |
| 8 | ivec | interrupt vector | 0 |
| 0xa | ilvl | interrupt level 1..7 (0 = off) | 0 |

Write-side bits: TxR resets the link transmitter and clears TxEERR, RxR
resets the receiver and clears RxEV, PCLR zeroes the receive pointer; these
three act once and are not stored. CDE lets the DIR bit of returned words
step the pointer down. BCLR does nothing in this design: it is meant to clear
the PDFP's counter over the link, but no link word for that is known (use a
trigger table entry with BCLR instead).

Read-side bits: Stat is set by each status word that arrives and cleared by
reading ctrl. RxEV is set by a bad frame from the PDFP. TxEERR is set by a
write to a full FIFO; that word is lost. FE, FH (256/2 words or more) and FF
are the FIFO flags. The status byte is valid only after a status request has
had time to travel both ways, about 8 µs.

A host writes a command word as two 16-bit transfers, high half first, or
as one D32 transfer. It should check FF before writing; the link drains one
word per 3.5 µs.

### Receive memory (VME standard space)

With base D7 set, a 512 kbyte window at A23..A19 = base D4..D0 (address
modifiers 0x39, 0x3A, 0x3D, 0x3E). Word *w* of the window reads word *w* of
the 128 kWord receive memory (the upper half of the window aliases the lower).
The top eight words of the window, byte offsets 0x7FFF0..0x7FFFE, read the
receive pointer (its low 16 bits). The window is read-only: writes are
acknowledged and ignored. Each code-6 word is stored at the pointer, then
the pointer increments, or decrements if CDE is set and the word's DIR is 1.
With OB or IB and CDE set, the memory thus holds one word per B position as
the field ramps up and down.

### Bus timing and interrupts

AS* and DS* pass through two-flop synchronisers; address, AM, WRITE* and
data must be stable while DS* is low. DTACK* goes low three clocks after DS*
for registers and five for a memory read, and stays low until DS* rises.
Undecoded addresses get no DTACK*; the bus timer ends such cycles.

The interrupter raises IRQ at level ilvl when the FIFO becomes empty while
FEIE is set, or when FH changes while FHIE is set. The request stays until
an IACK cycle for that level with IACKIN* low, which returns ivec on
D07..D00. IACK cycles for other levels pass IACKIN* on to IACKOUT*.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `DATA_W` | 16 | top, nim, ctrl | width of table words, connectors, DPRAM port |
| `NBANKS` | 4 | top, nim, lut_mem | number of 0x20000-word tables actually present |
| `FIFO_DEPTH` | 256 | top, ctrl | command FIFO depth |
| `MEM_WORDS` | 0x20000 | top, ctrl | receive memory size |
| `CLKS_PER_BIT` | 4 | everywhere | clocks per link bit; must match at both ends |
| `QDEPTH` | 16 | nim | reply queue depth |

The table number field has five bits, so up to 32 tables can be addressed;
how many exist depends on the memory fitted. `NBANKS = 4` (8 Mbit) is this
design's choice.

## How far to trust it, and where it departs

The PDFP description this RTL is built from is a user's reconstruction of
existing hardware, so several points are open, and here settled as follows:

* **Link framing and error detection** are chosen here (parity and stop bit).
  A design meant to talk to original hardware would need the real format.
* **Table word width** is 16 bits. The fill command carries up to 27 data
  bits, but the controller stores 16-bit words; a wider output needs only
  `DATA_W` raised (and `ctrl_rx_mem` keeps the low 16 bits in memory).
* **Memory window size**: the receive memory is 128 kWord while the VME
  window spans 256 kWord; the pointer is placed at the top of the window.
* **Strobe**: entry 0 holds the strobe settings; entry 7's purpose is
  unknown and it never fires.
* **ctrl BCLR** sends nothing (see above). **TxEERR** is taken to mean FIFO
  overrun.
* **Interrupt from FE** is edge-triggered (FIFO becoming empty).
* **D32 access** is built for the fifo register only, where the original
  hardware provides it but it was never put to use.
* BOF is cleared by a BCLR action; the counter wraps; the adder wraps.

Everything is tested in simulation only; nothing has been run against the
original modules.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M` and stops; it has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -Itb +libext+.sv \
    rtl/pdfp_pkg.sv tb/tb_pdfp_top.sv --top-module tb_pdfp_top
./obj_dir/Vtb_pdfp_top
```

(`-y rtl` finds the other modules by file name; replace `tb_pdfp_top` by
any other testbench). The testbenches use
two include files: `tb/vme_tasks.svh`, the VME master bus cycles, and
`tb/link_tasks.svh`, an independent model of one end of the serial link.

`tb_pdfp_top` runs the whole system at the default parameters, with the two
modules on clocks 0.5 % apart: it loads 340 table words through the FIFO, 40 of them by D32 writes
(filling it, polling FF, taking the FIFO-empty interrupt), arms the trigger
table with the example words above, ramps B up 150 steps and down 120 with
the correction input changing at every step, and checks the output
connector, the controller's receive memory and pointer, and the DPRAM port
after every step; then strobe replies, a table switch, a mode switch, and
status with MERR and BOF. It counts each of these events and fails if one
never happened. It takes a few seconds.

`tb_pdfp_workload` runs the full sizes. It loads a whole table of 0x20000
words by D32 writes, holding off while FH is set. It then steps B through
every table position, checking the output after each step. The B pulses
are 150 PDFP clocks apart, just over one reply word on the link, so each
pulse can return the correction input. Those replies fill the whole
128 kWord receive memory, which is then read back over VME. It takes
about half a minute.

The Verilator lint reports remaining warnings for unused signals (spare
status bits, the unused mode bit D01, diagnostic outputs such as `act_src`
and `lost`) and for reset nets used by both flops and assertions; they are
intended.
