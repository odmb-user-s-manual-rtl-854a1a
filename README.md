# ODMB slow-control and trigger firmware

The ODMB (Optical DAQ MotherBoard) sits in each ME1/1 crate of the CMS muon
endcap. It collects data from seven cathode front-end boards (DCFEBs), the
trigger motherboard (OTMB) and the anode board (ALCT), and sends it over two
optical links: one to the DDU and one to a PC over Gigabit Ethernet. Operators
reach everything on the board through one VME address space. The space is split
into nine "devices" chosen by the top address nibble, plus one special address.

This repository holds SystemVerilog for the board's control side. That covers:

- the VME-to-JTAG masters for the DCFEBs and for the FPGA itself;
- the discrete-logic JTAG port;
- the control and configuration registers;
- L1A / L1A_MATCH distribution, with its kill and pedestal modes;
- the calibration pulse delays;
- the 13 test FIFOs;
- the PRBS link tests;
- the front end of the flash (BPI) interface;
- readout of the FPGA's internal ADC and of the low-voltage monitoring board (LVMB);
- the front-panel buttons and LEDs.

The event builder, which formats DDU packets and Ethernet frames, is not in
this repository: the text this design follows gives the names of its packets
but not its logic. Its strobes, data words and link words are brought out as
ports of the top module `odmb_top`.

The firmware version is V01-05. `R 4024` returns `0105`. The FPGA's JTAG
USERCODE is `0105DBDB`.

## The command bus

The VME slave itself is not modelled. Every block instead sees the same
single-cycle command and answers on its own response port:

- command (`odmb_pkg::vme_cmd_t`): `valid`, `we`, `addr[15:0]`, `data[15:0]`;
- response (`vme_rsp_t`): `ack`, `data[15:0]`.

A device reacts only when `addr[15:12]` is its own number. It acknowledges
on the cycle after the command, except for the slow operations listed next.

- **JTAG shifts and resets.** These acknowledge in the cycle after the last TCK step.
- **LVMB control byte.** This acknowledges after the serial transfer.
- **Discrete-logic JTAG write.** This acknowledges after its TCK pulse.

`odmb_top` ORs all responses together, and an assertion checks that at most one
device answers at a time. A command to a device number nobody owns is
acknowledged with data 0, so a bus master built on this port can never hang.
A real VME slave would raise DTACK on `ack` and put `data` on the bus.

| Address | Device |
|---|---|
| `1xxx` | DCFEB JTAG (seven chains) |
| `2xxx` | FPGA JTAG chain |
| `3xxx` | ODMB/DCFEB control, counters (`R 3YZC`) |
| `4xxx` | configuration registers, firmware version |
| `5xxx` | test FIFOs |
| `6xxx` | BPI flash interface (front end) |
| `7xxx` | FPGA system-monitor ADC |
| `8xxx` | low-voltage monitoring board |
| `9xxx` | PRBS link tests |
| `FFFC` | discrete-logic JTAG to the FPGA |

## JTAG masters (devices 1 and 2)

Both devices are `jtag_vme` instances around one `jtag_engine`. The low address
bits encode the operation, and address bits 11:8 (`Y`) give the number of
bits to shift **minus one**. So `W 1F04` shifts 16 bits and `W 191C` shifts a
10-bit instruction.

| Command | Action |
|---|---|
| `W dY00` | shift Y+1 data bits, TAP stays in Shift-DR before and after |
| `W dY04` | TMS header (Idle → Select-DR → Capture-DR → Shift-DR: TMS 1,0,0), then shift |
| `W dY08` | shift, last bit with TMS=1, then Update-DR → Idle (TMS 1,0) |
| `W dY0C` | header and tailer |
| `W dY1C` | instruction shift, always with header (TMS 1,1,0,0) and tailer |
| `W d018` | TAP reset: five TCK with TMS=1, one with TMS=0, ends in Run-Test/Idle |
| `R d014` | last 16 TDO bits |
| `W/R 1020`, `1024` | DCFEB chain select, bit n-1 = DCFEB n (device 1 only) |

The split into header-only and tailer-only commands lets software read a
32-bit register in two 16-bit pieces without leaving Shift-DR. For example,
to read the USERCODE:

1. `W 291C 3C8` loads the instruction.
2. `W 2F04 0` shifts the low half; `R 2014` then returns `DBDB`.
3. `W 2F08 0` shifts the high half; `R 2014` then returns `0105`.

Details that a user needs:

- Data goes out LSB first.
- Each TDO bit enters the TDO register at bit 15, and the older bits move
  down. After a 16-bit shift, bit 0 holds the first bit read. After a
  shorter shift the bits sit at the top of the register.
- TCK is low for `TCK_HALF` clock cycles and then high for `TCK_HALF`
  cycles. The default of 2 gives 10 MHz from 40 MHz.
- TMS and TDI change on the falling edge of TCK. TDO is sampled on the
  rising edge.
- An operation of n TCK steps takes n·2·`TCK_HALF` cycles, plus about two
  cycles for the command and the acknowledge.
- Only the selected DCFEB chains receive TCK. Their TDO lines are ORed, so
  select one chain at a time when reading.
- The select register resets to "none".

## Discrete-logic JTAG (`FFFC`)

On the board, a small piece of discrete logic lets VME reach the FPGA's JTAG
pins even when the FPGA is unprogrammed. `emergency_jtag` models that
logic:

- A write drives TMS from data bit 0 and TDI from data bit 1, gives one TCK
  pulse, and then acknowledges.
- A read returns TDO in bit 0 and does not clock TCK.

Software therefore walks the TAP one state per write. Reading the 32-bit
USERCODE takes about 50 writes and 32 reads. `tb_emergency_jtag` performs
exactly that walk against a TAP model.

## Control registers and the `R 3YZC` counters (device 3)

`ctrl_dev` holds five registers:

- `ODMB_CTRL` (3000);
- `DCFEB_CTRL` (3010);
- the test-point select `TP_SEL` (3020);
- the transceiver `LOOPBACK` code (3100);
- the TX swing `DIFFCTRL` (3110).

`R 3120` returns the seven DCFEB DONE bits.

Bits documented as "auto-reset" become one-cycle pulses and read back as 0.
These are `ODMB_CTRL[8]` (firmware reset) and all of `DCFEB_CTRL`:

| Bit | Pulse |
|---|---|
| 0 | reprogram DCFEBs |
| 1 | resync L1A_COUNTER |
| 2 | INJPLS |
| 3 | EXTPLS |
| 4 | test L1A + L1A_MATCH to all DCFEBs |
| 5 | LCT request |
| 6 | external trigger request |
| 7 | optical transceiver reset |

`ODMB_CTRL` mode bits:

| Bits | Meaning |
|---|---|
| 3:0, 4, 5 | CAL_TRGEN, CAL_MODE, CAL_TRGSEL |
| 7 | 0 = real DCFEB data, 1 = dummy data |
| 9 | L1A/LCT source: 0 = CCB, 1 = internal |
| 10 | 0 = real LVMB, 1 = dummy LVMB |
| 11 | kill L1A |
| 12 | kill L1A_MATCH |
| 13 | DCFEB pedestal mode (L1A_MATCH to every DCFEB on every L1A) |
| 14 | OTMB pedestal mode (OTMB data requested on every L1A) |

`R 3YZC` reads a monitoring value chosen by the byte YZ. `odmb_counters`
computes these values:

| YZ | Value |
|---|---|
| 3F | L1A_COUNTER[15:0] |
| 21-29 | L1A_MATCHes sent to DCFEB 1-7, OTMB, ALCT |
| 31-37 | clk cycles from the last LCT of DCFEB n to the following L1A (saturating) |
| 41-49 | packets stored per board |
| 4A, 4B | packets sent to DDU, to PC |
| 51-59 | packets shipped per board |
| 61-67 | DCFEB packets with good CRC |
| 71-77 | LCTs per DCFEB |
| 78, 79 | OTMB / ALCT packets available |
| 5A | last CCB command: CMD[5:0], EVTRST (bit 6), BXRST (bit 7) |
| 5B | last CCB data byte |
| 5C, 5D | toggle bits of eleven CCB signals and of the CCB reserved lines |

All counters are 16 bits wide and wrap around. The inputs behind rows 41-79
come from the event builder as one-cycle strobes.

## Configuration (device 4)

`config_dev` holds these registers:

- `LCT_L1A_DLY[5:0]` (total delay 2400 ns + 25 ns per step);
- `OTMB_DLY`, `PUSH_DLY`, `ALCT_DLY`;
- `INJ_DLY` and `EXT_DLY` (12.5 ns steps);
- `CALLCT_DLY` (25 ns steps);
- `KILL[9:1]` (bit 9 ALCT, bit 8 OTMB, bits 7:1 DCFEBs), which reads back in
  bits 9:1;
- `CRATEID[6:0]`;
- the number of words the dummy boards generate;
- the firmware version (`R 4024`).

Some of these registers are used inside this design:

- `LCT_L1A_DLY` sets the LCT-to-L1A latency used for DCFEB matching.
- `KILL` feeds the trigger logic.
- `INJ_DLY`, `EXT_DLY` and `CALLCT_DLY` feed the calibration pulse
  generator.

The OTMB/ALCT/push delays, the crate ID and the dummy word count belong
to the event builder, so they are only brought out on the `cfg` port.

## Trigger distribution

`trigger_ctrl` builds the L1A sent to the boards:

- The L1A is the CCB's L1A, or the internal one when `ODMB_CTRL[9]` is set.
- `ODMB_CTRL[11]` removes it.
- A test L1A (`DCFEB_CTRL[4]` or push button PB1) always adds one.

A DCFEB is matched to an L1A when its raw LCT arrived exactly
2400 ns + 25 ns × `LCT_L1A_DLY` earlier, which is 96 + `LCT_L1A_DLY` clock
cycles. `lct_l1a_match` does this. It keeps a 159-cycle history of each raw LCT
line (`ev_lct`) and looks up the tap for the current delay whenever the
selected L1A source fires. There is no window: an L1A one cycle early or late
finds no match.

L1A_MATCH for DCFEB 1-7, OTMB and ALCT is built in this order:

1. Start from the LCT matches, ORed with any match requests from the event
   builder (`match_in`). The OTMB and ALCT matches come only from `match_in`.
2. Replace the DCFEB matches by the L1A in DCFEB pedestal mode, and the OTMB
   match in OTMB pedestal mode.
3. Clear the matches of killed boards, or all of them with `ODMB_CTRL[12]`.
4. On a test L1A, force all seven DCFEB matches.

The 24-bit L1A_COUNTER counts L1As and is cleared by the resync pulse.
All outputs are registered, so they lag their inputs by one clock.

## Calibration pulses

`calib_pulse` runs on an 80 MHz clock, `clk80`, which must be phase-locked to
the 40 MHz `clk`.

- An INJPLS or EXTPLS request leaves `INJ_DLY` or `EXT_DLY` steps of 12.5 ns
  later, plus one fixed clk80 cycle. Each pulse lasts 25 ns.
- In calibration mode (`ODMB_CTRL[4]`), each pulse is followed by a
  calibration LCT strobe `cal_lct`. The strobe comes `CALLCT_DLY` × 25 ns
  after the pulse, plus one fixed clk80 cycle.

Linking `CALLCT_DLY` to the pulses in this way is this design's reading of
that register.

## Test FIFOs (device 5)

Thirteen 2048 × 18 first-word-fall-through FIFOs (`test_fifo`) record copies
of the traffic:

- DCFEB 1-7, OTMB and ALCT data, as the boards deliver it;
- the words sent on the PC and DDU links;
- the words received on the PC and DDU links, outside PRBS tests. These make
  loopback tests possible.

| Command | Action |
|---|---|
| `R 5000` / `R 500C` | one word / word count of the selected DCFEB FIFO |
| `W/R 5010` | DCFEB FIFO selection, 1-7 (resets to 1) |
| `W 5020` | clear DCFEB FIFOs, one bit per DCFEB |
| `R 5Z00` / `R 5Z0C` / `W 5Z20` | read / count / clear FIFO Z: 1 PC TX, 2 PC RX, 3 DDU TX, 4 DDU RX, 5 OTMB, 6 ALCT |

A read returns the low 16 bits of the word. An empty FIFO reads 0.
A full FIFO drops further writes.

The documented capacity is "2,000 18-bit words (36 kb)". This design takes
36 kb literally: 2048 words. At that size a FIFO holds two DCFEB events,
three OTMB events or four ALCT events.

## PRBS link tests (device 9)

`W 9000 N` tests the DDU link and `W 9100 N` the PC link. Each sends N
sequences of the PRBS 2^7-1 pattern (x^7 + x^6 + 1), 16 bits per clock
cycle, in place of the link's normal words. Because 16 and 127 share no
factor, one sequence is 127 words, 16 full periods of the pattern.

The checker works as follows:

- It takes its state from the first word that comes back, so any link
  latency is accepted.
- It predicts every following word and counts each word that differs. The
  count stops at FFFF.
- The test ends when N·127 words have returned, or `TIMEOUT` cycles after the
  last word was sent.

`R 900C` or `R 910C` returns the error count of the last test.

## Flash interface (device 6) — front end only

`bpi_dev` provides the VME side of the flash-programming interface:

- a 1024-word command FIFO (`W 602C`);
- parse disable and enable (`6024`, `6028`);
- a 1024-word read-back FIFO with a word count (`6030`, `6034`);
- a status register (`6038`);
- a 32-bit timer (`603C` low half, `6040` high half);
- a reset (`6020`).

The status register has these fields:

| Bits | Meaning |
|---|---|
| 0 | parsing enabled |
| 1, 2 | command FIFO empty, full |
| 3, 4 | read-back FIFO empty, full |
| 5 | engine busy |
| 15:8 | engine status byte |

The timer counts clock cycles while parsing is enabled and the engine has
work.

The engine that interprets the commands and drives the flash bus is
**not** built, because its command language is not specified. It connects
through a valid/ready command port (`bpi_cmd*`), a read-back port (`bpi_rb*`),
`bpi_busy`, `bpi_status` and `bpi_rst`.

## Monitoring (devices 7 and 8)

**FPGA ADC.** `sysmon_dev` keeps the latest 12-bit result of each of nine
channels of the FPGA's internal ADC. `R 7000` returns the FPGA temperature.
`R 7100` to `R 7170` return the board voltages and the two thermistors.
Software converts the raw value:

- FPGA temperature: T = R·503.975/4096 − 273.15 °C.
- Voltages: V = R/2048 × nominal voltage.

**LVMB.** `lvmb_dev` talks to the seven ADCs of the low-voltage monitoring
board over a serial bus.

- The ADC to use is selected with `W 8020` (0-6).
- `W 8000` lowers that ADC's chip enable, sends the control byte MSB first,
  and clocks in a 16-bit result. `R 8004` then returns the result.
- `W 8010` sets the power-on bits: bit 7 for the ALCT and bits 6:0 for
  DCFEB 7..1.
- `R 8018` returns the board's power status. In dummy-LVMB mode it returns
  the power-on register instead.

The serial format is this design's assumption: 8 bits out, 16 bits in, data
sampled on the rising edge of SCLK, and SCLK at clk/16.

## Front panel: LEDs, buttons and reset

`led_ctrl` drives the twelve firmware LEDs:

| LED | Shows |
|---|---|
| 1 | 4 Hz, divided from the DDU link clock |
| 3 | 2 Hz, divided from the PC link clock |
| 5 | 1 Hz, divided from the ODMB clock |
| 7 | on = normal data taking, off = DCFEB pedestal mode |
| 9 | on = external (CCB) triggers, off = internal |
| 11 | on = real data, off = dummy data |
| 2, 4, 6, 8, 10 | L1A_COUNTER bits 0-4 |
| 12 | on for 0.1 s after each VME command, and while PB1 is held |

The two push buttons behave as follows:

- **PB0** causes a firmware reset.
- **PB1** sends a test L1A with L1A_MATCH to all DCFEBs.

Both buttons pass through two-flop synchronisers and act on the press edge.

A firmware reset comes from PB0 or from `ODMB_CTRL[8]`:

- It holds `soft_rst` for 16 cycles. This clears every register and FIFO in
  the design except the LED logic and the discrete-logic JTAG, which only
  the power-on `rst` clears.
- For about 3 s the twelve LEDs then blink at six different rates. LED
  pairs follow successive bits of a free-running counter.

The clock rates of the LED dividers are parameters of `led_ctrl`:

- `CLK_HZ`: the 40 MHz ODMB clock;
- `DDU_CLK_HZ`: the DDU link clock, assumed 80 MHz;
- `PC_CLK_HZ`: the PC link clock, assumed 62.5 MHz.

## Clocks and reset

| Clock | Rate | Used for |
|---|---|---|
| `clk` | 40 MHz | everything except the items below |
| `clk80` | 80 MHz, phase-locked to `clk` | calibration pulses |
| `ddu_clk`, `pc_clk` | link clocks | LEDs 1 and 3 only |

`rst` is synchronous and active high. Every register has a defined reset
value. All registers except those named above reset to 0.

## Departures and assumptions

The source text gives the command map and the meaning of each register. For
most blocks it does not give their internals, so the internals here are
the simplest logic that produces the documented behaviour. The main choices
are these:

- **Shift count.** The `Y` field is the bit count minus one, as the
  documented USERCODE examples require. The TDO register fills from bit 15
  downward.
- **JTAG timing.** The TCK rate, the acknowledge timing and the LVMB serial
  format are choices made here.
- **TMS sequences.** The JTAG master uses the same TMS sequences that the
  documented discrete-logic walk uses.
- **LCT-to-L1A gap.** The gap counters count 40 MHz clock cycles, which are
  bunch crossings. The gap is measured from the LCT strobe to the L1A
  *leaving* the trigger logic, so it includes that block's one register
  stage.
- **Counter widths.** L1A_COUNTER is 24 bits wide. The `R 3YZC` counters are
  16 bits wide.
- **CCB snapshots.** The bit order of the CCB snapshot values follows the
  order in which the signals are documented.
- **LCT matching.** DCFEB matching needs an exact coincidence, with no
  window. The formula in the source names the register `DCT_L1A_DLY`; it is
  read here as `LCT_L1A_DLY`.
- **LED 7.** It follows only the DCFEB pedestal bit, not the OTMB pedestal
  bit.
- **Not built:**
  - the internal L1A generator (`int_l1a` is an input);
  - the dummy-data generators;
  - the event builder, including the OTMB and ALCT data matching that
    uses `OTMB_DLY`, `ALCT_DLY` and `PUSH_DLY`;
  - the test-point multiplexer behind `TP_SEL`;
  - the BPI flash engine;
  - the transceivers, the VME bus cycle and the FPGA's ADC hard block.

  These parts connect through ports of `odmb_top`.

## Simulating

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.
`tb/tb_odmb_top.sv` runs the complete design at its default parameters and
takes about 15 s. It exercises the following, among others, and fails if
any of them never happens:

- every device;
- a DCFEB and an FPGA USERCODE read;
- the discrete-logic walk;
- LCT-L1A matching, kills and pedestal modes;
- test L1As;
- a resync;
- both PRBS tests, one of them with injected errors;
- test FIFO writes, reads, counts and clears, including the DDU loopback;
- flash command flow;
- LVMB transfers;
- calibration pulses;
- a firmware reset with LED blinking.

`tb/jtag_tap_model.sv` is a behavioural IEEE 1149.1 TAP. It has a 10-bit
instruction register, the USERCODE instruction `3C8`, and bypass for every
other instruction. It stands in for the DCFEBs and the FPGA.

Build and run any testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/odmb_pkg.sv rtl/*.sv tb/jtag_tap_model.sv tb/tb_odmb_top.sv \
    --top-module tb_odmb_top
./obj_dir/Vtb_odmb_top
```

Replace `tb_odmb_top` with any other `tb/tb_*.sv` to run that block's test.
`-Wno-fatal` keeps Verilator's width and unused-signal lint warnings from
stopping the build. The block testbenches shrink some parameters to stay
fast: FIFO depth, TCK and SCLK rates, clock rates and blink length. The
top-level test uses none of those overrides.
