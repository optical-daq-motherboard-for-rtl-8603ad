# ODMB firmware in SystemVerilog

The Optical DAQ MotherBoard (ODMB) is the readout and control hub of one ME1/1
cathode strip chamber. It sits between the chamber's front-end boards (seven
DCFEBs, one OTMB and one ALCT), the trigger distribution (the CCB, which sends
L1As and LCTs), the data acquisition (a DDU over an optical link, and a PC over
Gigabit Ethernet) and a VME crate controller. Its work comes in three parts:

* **Trigger:** decide, for every Level-1 Accept (L1A), which boards should send
  data. A DCFEB is asked only if it saw a local charged track (LCT) a fixed
  latency earlier. The answer goes out as one L1A_MATCH bit per board.
* **Readout:** collect the packets the boards send back, build one DDU packet
  per L1A, and wrap a copy into an Ethernet frame for the PC.
* **Control:** give VME access to everything: JTAG chains to the DCFEBs and to
  the ODMB's own FPGA, configuration registers, monitoring counters, test
  FIFOs that capture every data stream, low-voltage monitoring and
  front-end power switches.

This repository holds synthesizable RTL for all of the logic above, a test
bench for every block, and an end-to-end test bench of the whole board logic
at full size. Optical transceivers, the DCFEB data receivers, the PLL and the
low-voltage monitoring board are not modelled; their signals are ports of the
top module `odmb_top`.

## Clocks and reset

* `clk` runs at 40 MHz, one bunch crossing (25 ns) per cycle. All VME,
  trigger and readout logic runs on it.
* `clk80` runs at 80 MHz and must be phase-aligned with `clk`. Only the
  calibration pulse generator runs on it, which gives 12.5 ns delay steps.
* `clk_ddu` and `clk_pc` are the link clocks. Here they only drive the LED 1
  and LED 3 heartbeats. The DDU and PC word streams leave on `clk`.
* `rst` is a synchronous power-on reset.
* A soft reset comes from push button PB0 or from ODMB_CTRL[8]. It lasts 17
  cycles and resets every block except the VME protocol block and the front
  panel. While it runs, the LEDs blink for about 3 s.

## VME access

A VME cycle carries a 16-bit offset address: `{device[3:0], command[11:0]}`.
`vme_command` works as follows:

1. It passes AS*, DS* and WRITE* through two-flop synchronisers.
2. It takes the address and data once AS* and DS* are both low.
3. It sends the addressed device a one-cycle `strobe`, together with a
   `vme_cmd_t` request `{write, cmd, wdata}`.
4. It waits for that device's one-cycle `dtack` and its `rdata`.
5. It holds DTACK* low, with the read data on the bus, until DS* rises.

Two cases are answered with data 0 so that the bus can never hang:

* a device number that has no device;
* a device that has not answered within `TIMEOUT` cycles (4096). This happens
  when the strobe reached the device during a soft reset.

| Device | Module | Function |
|---|---|---|
| 1 | `cfebjtag` | JTAG to the seven DCFEBs |
| 2 | `odmbjtag` | JTAG to the ODMB's own FPGA |
| 3 | `vmemon` + `odmb_counters` | ODMB_CTRL, DCFEB_CTRL, TP_SEL, LOOPBACK, DIFFCTRL; monitoring counters at 3YZC |
| 4 | `vmeconfregs` | delays, KILL mask, CRATEID, firmware version (4024 reads 0101) |
| 5 | `testfifos` | thirteen test FIFOs |
| 8 | `lvdbmon` | LV monitoring ADCs and front-end power switches |
| F | `emergency_jtag` | bit-by-bit JTAG at FFFC |

Bits that the register map marks as auto-reset do two things: they appear as
one-cycle pulses, and they read back as 0. Those bits are ODMB_CTRL[8] and
DCFEB_CTRL[4:0].

## JTAG sequencing (devices 1 and 2)

The hardest part of the VME side is the JTAG shifting. The helper
`jtag_master` does it for both devices.

**Command format.** A command `dYcc` shifts Y+1 bits of the write data
(Y = 0..F), least significant bit first. The two low hex digits `cc` select
the TMS framing:

| cc | Framing |
|---|---|
| 00 | no header or tailer |
| 04 | header only |
| 08 | tailer only |
| 0C | header and tailer |
| 1C | instruction shift; always has both |
| 18 | TAP reset |

**TMS sequences.**

* Data header: TMS = 1, 0, 0. This goes Run-Test/Idle → Select-DR →
  Capture-DR → Shift-DR.
* Instruction header: TMS = 1, 1, 0, 0.
* Tailer: raises TMS on the last shifted bit, then gives TMS = 1 (Update),
  then TMS = 0 (back to Run-Test/Idle).
* Reset: five clocks with TMS = 1, then one with TMS = 0.

A long register is shifted in pieces. The first piece has a header only, the
middle pieces have no framing, and the last piece has a tailer only.

**Reading TDO.** TDO is sampled on each rising TCK of a shifted bit. It enters
a 16-bit register at bit 15 and moves down one place per bit. After a 16-bit
shift, the first bit out is therefore in bit 0. Reading `dY14` returns this
register.

**Example: DCFEB usercode.** The sequence to read a DCFEB's 32-bit usercode:

| Step | Command | Data | What it does |
|---|---|---|---|
| 1 | `W 1020` | `4` | select DCFEB 3 |
| 2 | `W 191C` | `3C8` | shift the 10-bit instruction |
| 3 | `W 1F04` | — | first 16 bits, header only |
| 4 | `R 1F14` | — | read the low half |
| 5 | `W 1F08` | — | last 16 bits, tailer only |
| 6 | `R 1F14` | — | read the high half |

**TCK.** A TCK period is `2*TCK_HALF` clk cycles, which is 10 MHz by default.
A JTAG write is acknowledged only when its whole sequence has ended.

**DCFEB chain (device 1).** TCK goes only to the DCFEBs chosen in the select
register. TMS and TDI are shared by all seven. The TDO seen is the OR of the
selected DCFEBs' TDO lines.

**Emergency path.** `emergency_jtag` gives bit-by-bit access at FFFC. A write
sets TMS = bit 0 and TDI = bit 1, then gives one TCK pulse. A read returns TDO
in bit 0.

## Trigger and L1A_MATCH

`trgcntrl` picks where the L1A and the seven LCTs come from, using
ODMB_CTRL[9]:

* 0: from the CCB.
* 1: from the internal generator, which is the calibration LCT. In this mode,
  each delayed LCT also produces the L1A.

**Matching.** Each LCT passes through a 160-entry shift register. The tap
sits at 96 + LCT_L1A_DLY crossings, which is 2400 + 25·LCT_L1A_DLY ns. An L1A
matches DCFEB *i* only if DCFEB *i* had an LCT exactly that many crossings
earlier; there is no window. The OTMB (bit 8) and the ALCT (bit 9) match
every L1A.

**Test L1A.** PB1 or DCFEB_CTRL[4] sends a test L1A, which matches all seven
DCFEBs.

**Masks.**

* KILL[9:1] removes single boards from L1A_MATCH.
* ODMB_CTRL[11] blocks the L1A.
* ODMB_CTRL[12] blocks all L1A_MATCHes.

**Timing and counter.** `l1a` and `l1a_match` appear one cycle after the L1A
input. The 24-bit L1A_COUNTER counts the L1As sent. DCFEB_CTRL[1] (resync)
clears it.

## Calibration pulses

`calibtrg` runs on `clk80` and acts on the rising edge of each request:

* **INJPLS** (request DCFEB_CTRL[2]) follows after INJ_DLY fast cycles,
  i.e. 12.5 ns steps.
* **EXTPLS** (request DCFEB_CTRL[3]) follows after EXT_DLY fast cycles.
* **Calibration LCT** to all DCFEBs: it needs CAL_MODE (ODMB_CTRL[4]) and any
  CAL_TRGEN bit (ODMB_CTRL[3:0]). It follows the pulse chosen by CAL_TRGSEL
  (ODMB_CTRL[5]: 0 = INJPLS, 1 = EXTPLS) by 2·CALLCT_DLY + 2 fast cycles. It
  lasts two fast cycles so that the 40 MHz logic sees it exactly once.

With internal triggering selected, this LCT comes back through the LCT delay
as an L1A with a matching L1A_MATCH. One VME write therefore takes the whole
board through a calibration event.

## Readout: DDU packet and PC frame

**Board packets.** Every board sends its packet as 18-bit words; bit 17 marks
the last word. When ODMB_CTRL[7] = 1, all nine sources are `dummy_data_gen`
instances. Each answers an L1A_MATCH with an 8-word packet
`{last, 0, board, word index, packet number}`.

**Buffering.** `ddu_builder` holds:

* one 2048-word data FIFO per board, with a count of the whole packets in it;
* a 16-entry event queue of `{L1A_COUNTER, L1A_MATCH}`.

**DDU packet.** For the oldest event, the builder waits until every matched
board has a whole packet. It then sends the packet as 16-bit words, each
marked by `ddu_valid`:

| Words | Content |
|---|---|
| 9xxx ×4 | L1A number [11:0], L1A number [23:12], match mask, CRATEID |
| Axxx ×4 | A000 … A003 |
| board data | ALCT, then OTMB, then DCFEB 1…7, for the matched boards only |
| Fxxx ×4 | L1A number [11:0], total word count, F002, F003 |
| Exxx ×4 | E000 … E003 (`ddu_last` on the final one) |

**Throughput.** Board words are read one every two cycles. The FIFO read is
registered, and the last-word flag of each word is checked before the next
read.

**PC frame.** `pc_builder` stores each whole DDU packet and wraps it:

1. four header words;
2. the packet;
3. zero words to pad the frame to at least 32 words;
4. four trailer words: the packet's word count, then FFFD, FFFE, FFFF.

## Test FIFOs and monitoring counters

**Test FIFOs.** `testfifos` keeps thirteen 2048×18 FIFOs (36 kb each) that
capture, in parallel with the normal data path:

* the seven DCFEB streams;
* the OTMB and ALCT streams;
* the PC TX and RX streams;
* the DDU TX and RX streams.

They are read over VME: `5Z00` reads one word and `5Z0C` reads the word
count. A read returns bits 15:0, two cycles after the strobe. A full FIFO
drops words, and an empty one reads as 0.

**Loopback.** While LOOPBACK (register 3100) is nonzero, the DDU RX and PC
RX FIFOs are filled differently. They take the DDU and PC streams that the
board transmits, instead of what the link receivers deliver. This stands in
for the internal loopback of the links, which lie outside this RTL. The
register value also goes out on the `loopback` port for the transceivers.

**Monitoring counters.** `odmb_counters` answers `R 3YZC` with the following
values. All counters are 16 bits and wrap.

| YZ | Value |
|---|---|
| 3A / 3B | L1A_COUNTER, high and low parts |
| 21–29 | L1A_MATCHes per board |
| 31–37 | crossings between a DCFEB's last LCT and the L1A |
| 41–49 | packets stored per board |
| 4A / 4B | packets sent to DDU / PC |
| 51–59 | packets shipped per board |
| 61–67 | good-CRC packets per DCFEB (from the `rx_good_crc` port) |
| 71–77 | LCTs per DCFEB |
| 78 / 79 | OTMB / ALCT packets waiting |

## Low-voltage monitoring and power

`lvdbmon` (device 8) has three jobs:

* **ADC selection:** `W 8020` selects one of seven ADCs.
* **Conversion:** `W 8000` sends an 8-bit control byte, MSB first, and clocks
  back a 16-bit result that `R 8004` returns.
* **Power switches:** `W 8010` switches the power of DCFEBs 1–7 (bits 6:0)
  and the ALCT (bit 7). These switches start all on.

## Front panel

| LED | Meaning |
|---|---|
| 1 | heartbeat from the DDU clock |
| 3 | heartbeat from the PC clock |
| 5 | heartbeat from the internal clock |
| 7 | PLL locked |
| 9 | CCB triggers selected |
| 11 | real data selected |
| 2, 4, 6, 8, 10 | L1A_COUNTER bits 0–4 |
| 12 | lit for a while after each VME command, and while PB1 is held |

PB0 starts the soft reset and PB1 sends a test L1A. Both buttons are
synchronised and act on the press edge.

## Test points

`test_points` drives the logic test points, registered one cycle after their
sources; `tp[k]` is TPk.

| Test points | Signal |
|---|---|
| TP6, 8, …, 18 and TP33–39 | LCT of DCFEB 1–7 |
| TP7, 9, …, 19 | L1A_MATCH of DCFEB 1–7 |
| TP20 | L1A |
| TP21, TP31 | DDU data valid |
| TP22 / TP23 | OTMB / ALCT data valid |
| TP29 / TP30 | DCFEB 1 / DCFEB 2 data valid |
| TP32 | PC data valid |

TP27, TP28, TP41 and TP42 are selectable. Each has a 4-bit field of TP_SEL
(register 3020): bits [3:0] for TP27, [7:4] for TP28, [11:8] for TP41 and
[15:12] for TP42. The field value picks one of sixteen signals:

| Value | Signal |
|---|---|
| 0 | L1A |
| 1 | last DDU word |
| 2 | last PC word |
| 3 | soft reset |
| 4 | VME command seen |
| 5 | PB1 L1A |
| 6 | test-L1A request |
| 7 | resync |
| 8–14 | delayed LCT of DCFEB 1–7 |
| 15 | LEDs blinking |

TP40 (LCT error) and TP24–26 are driven low.

## Where this design departs from, or adds to, the board description

The register map, the JTAG command set and sequences, the delay formulas, the
FIFO sizes, the LED meanings and the DDU/PC packet framing follow the ODMB
V01-01 firmware description. The following points are this design's own
choices:

* **Internal device bus.** A one-cycle strobe and dtack. The VME time-out
  answers with data 0.
* **L1A_MATCH.** A DCFEB matches only on exact coincidence, with no window.
  The OTMB and ALCT match every L1A.
* **Internal L1A.** In internal mode, the L1A is made from each delayed LCT.
* **Calibration controls.** The calibration LCT goes to all DCFEBs when any
  CAL_TRGEN bit is set. The pulse widths and the fixed 25 ns in the LCT delay
  are also this design's.
* **Stored-only registers.** OTMB_DLY, PUSH_DLY and ALCT_DLY are stored and
  read back but steer nothing, because their use is not defined.
* **Dummy data.** ODMB_CTRL[7] selects dummy data for the OTMB and ALCT as
  well as for the DCFEBs. The dummy packet format is invented.
* **Packet contents.** The contents of the DDU header and trailer words,
  other than their leading digits, are this design's. So are the Ethernet
  header and trailer words and the padding placed before the trailer.
* **Test FIFO reads.** Test FIFO reads return 16 of the 18 bits. Several
  DCFEB FIFOs selected at once read the lowest one.
* **Loopback.** The loopback into the RX test FIFOs is made in front of the
  FIFOs. Modes 1 and 2 behave the same.
* **Test points.** The TP_SEL coding and its list of signals are this
  design's. TP40 is not driven, because its error condition is not defined.
* **ADC protocol.** The ADC count, the serial protocol and the power-on
  state of the switches are assumptions.
* **Ports in place of missing parts.** The following are not implemented and
  appear only as ports:
  * the optical receivers and their CRC check (`rx_data`, `rx_dv`,
    `rx_good_crc`);
  * the DDU and PC serial links (`ddu_*`, `pc_*`, `loopback`, `diffctrl`);
  * the dummy LVMB (`lvmb_dummy`);
  * the PLL (`pll_locked`).

## Simulating

Every test bench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The package must be
compiled first. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/odmb_pkg.sv tb/tb_ddu_builder.sv --top-module tb_ddu_builder
./obj_dir/Vtb_ddu_builder
```

The other modules are found through `-Irtl` and `-Itb`. Replace
`tb_ddu_builder` with any test bench in `tb/`:

* one per block: `tb_vme_command`, `tb_cfebjtag`, `tb_odmbjtag`,
  `tb_emergency_jtag`, `tb_vmemon`, `tb_odmb_counters`, `tb_vmeconfregs`,
  `tb_testfifos`, `tb_lvdbmon`, `tb_trgcntrl`, `tb_calibtrg`,
  `tb_front_panel`, `tb_dummy_data_gen`, `tb_ddu_builder`, `tb_pc_builder`,
  `tb_test_points`;
* `tb_odmb_top`, which runs the complete board at its default parameters
  (2048-word FIFOs, 40 MHz timing). It drives everything through real VME
  cycles:
  * usercode reads through both JTAG chains, against the behavioural TAP in
    `tb/jtag_tap_model.sv`;
  * a CCB LCT followed by a matched L1A and the resulting DDU packet and PC
    frame;
  * test L1As with KILL and kill-L1A;
  * a full calibration event in internal mode;
  * counter reads, a test FIFO read, an ADC conversion, emergency JTAG, PB1,
    resync and soft reset;
  * loopback into the RX FIFOs;
  * TP_SEL routing and the fixed test points.

  It counts every mechanism and fails if any one never happened. It runs in
  about ten seconds.

`tb_testfifos_capacity` runs the test FIFOs at their full 2048-word depth. It
writes 2100 words into two FIFOs, checks that 2048 are kept, and reads them
all back over VME.

Block test benches shrink FIFO depths or clock rates through parameters to
stay short. The top-level one and `tb_testfifos_capacity` do not.
