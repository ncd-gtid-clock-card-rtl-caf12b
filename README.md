# NCD GTID / clock card — RTL

The Neutral Current Detector (NCD) of the SNO experiment has its own data
acquisition, separate from SNO's main electronics. To put NCD events on the
same time line as the rest of the detector, this card keeps a local copy of
SNO's **global trigger ID (GTID)**. The master trigger card (MTC/D) broadcasts
the GTID over a four-line *time bus*, and the card follows it pulse by pulse.
When an NCD event arrives, the card asks the MTC/D for a global trigger. The
GTID of that trigger is then frozen in a register for the host to read over
VME.

The card also keeps a 48-bit count of the 16 MHz VME clock. This gives a time
stamp when no MTC/D is running, for example on a test bench.

This repository holds the logic of the card's programmable chip, written as
synthesizable SystemVerilog:

- a VME A16/D16 slave;
- the register map;
- the time-bus receiver;
- the GTID counter;
- the VME clock counter;
- the event/status logic;
- LED pulse stretchers.

The analog parts are not here: the ECL, NIM and TTL receivers and drivers,
and the connectors. The top module's ports carry the logic levels after those
receivers.

## The GTID and the time bus

The GTID is 24 bits: a lower 16-bit half and an upper 8-bit half. Three
time-bus lines keep the card's copy equal to the MTC/D's:

| line | what the card does on its leading edge |
|---|---|
| GTRIG | GTID + 1. The count is *latched* on the trailing edge. |
| SYNCLR | Checks that the lower half is `FFFF`. If not, it flags *Count Error*. It then clears the lower half and carries one into the upper half. |
| SYNCLR24 | Clears the upper half. This wins over a carry in the same clock. |

The fourth line, PED, is a calibration pedestal. The NCD does not use it.

Rollover is the subtle part. The MTC/D does not let the lower half wrap by
itself. Take the GTRIG that moves the count from `FFFE` to `FFFF`. While that
GTRIG is still high, the MTC/D sends SYNCLR. The check finds `FFFF`, so there
is no error. The lower half goes to `0000` and the upper half steps. The
trailing edge of GTRIG then latches `uu+1:0000`. In short, that trigger's ID is
the first of the new 64 K block.

If a SYNCLR arrives when the lower half is anything other than `FFFF`, the
card has lost step with the MTC/D, and the Count Error status bit is set.

Some cases are never produced by a working MTC/D, and the RTL defines its own
behaviour for them:

- A GTRIG from `FFFF` with no SYNCLR wraps the lower half and carries, like a
  plain 24-bit counter.
- GTRIG and SYNCLR edges in the same clock: the increment is applied first,
  and the check sees the incremented value.
- A load from VME overrides any time-bus event in the same clock.

All time-bus lines and front-panel inputs are asynchronous. Each one goes
through a two-flop synchroniser (`sync2`) before edge detection, so an
external edge is seen two clocks later. Pulses must be longer than one clock
(62.5 ns).

### Software time-bus commands

Without an MTC/D, the host can make time-bus pulses by writing to 20h–26h.
`timebus_rx` does not inject these as bare events. It shapes each one as a
real pulse on an internal copy of the line, ORed with the synchronised
external line. The software pulse then goes through the same edge logic as a
real one:

- Software GTRIG is high for `SOFT_GT_LEN` = 4 clocks. It gives an increment
  one clock after the write strobe and a latch edge 4 clocks later.
- Software "GTRIG and SYNCLR" places a SYNCLR pulse strictly inside the GTRIG
  pulse. The order is then increment → check/clear/carry → latch, as at a real
  rollover.

## NCD events and the latch point

There are two event sources:

- **MUX event**: a rising edge on the NCD MUX trigger input (`mux_trig`).
- **Shaper ADC event**: a rising edge on the shaper cards' daisy-chained
  enable/disable line (`mb_in`, the "shaper lockout" input). It counts only
  while *Multiboard Output Enable* is set. The same bit gates the line on to
  the next board: `mb_out = mb_in & mb_enable`. This path is combinational.

Each accepted event edge sends a 4-clock pulse on `ncd_gt_out`. This is the
trigger request to the MTC/D.

The **first** GTRIG trailing edge after an event does three things:

- it sets *Valid NCD GT Clock*;
- it copies the live GTID into the GTID register;
- it copies the live VME clock count into the VME clock register.

Later GTRIGs leave both registers alone, so the host cannot be overtaken
while it reads. *NCD GT Event Reset* clears the MUX, Shaper and Valid bits and
re-arms the latch. An event edge in the same clock as that reset is kept.

The intended host loop is:

1. Poll Status until bit 0 or bit 1 is set.
2. Let the MTC/D send GTRIG, or write Software GTRIG.
3. Poll until bit 2 (Valid) is set.
4. Read the GTID at 14h and 16h, and the clock at 18h, 1Ah and 1Ch if wanted.
5. Write 08h (NCD GT Event Reset).

*Count Error* is sticky. The status read that returns it clears it. Register
Reset does not clear it.

## Register map (base 7000h, AM 29h or 2Dh, 16-bit words)

| offset | read | write |
|---|---|---|
| 00 | – | Register Reset: clears the VME clock counter and register, the GTID register, the MUX/Shaper/Valid bits and both enables. It does **not** clear the GTID counter. |
| 02 | – | Fast Clear: accepted, no function |
| 08 | – | NCD GT Event Reset |
| 0A | – | Multiboard Output Enable = D<0> |
| 0C | – | VME Clock Counter Enable = D<0> |
| 0E | – | VME Clock Counter Reset |
| 10 | Board ID: `{rev[4:0], type[2:0]=5, serial[7:0]}` | – |
| 12 | Status: bit 0 MUX event, 1 Shaper event, 2 Valid NCD GT Clock, 3 Count Error, 4 clock counter enabled | – |
| 14 | GTID register <15:0> | load GTID counter <15:0> |
| 16 | GTID register <23:16> (in D<7:0>) | load GTID counter <23:16> from D<7:0> |
| 18 / 1A / 1C | VME clock register <15:0> / <31:16> / <47:32> | load that third of the VME clock counter |
| 20 | – | Software GTRIG |
| 22 | – | Software SYNCLR |
| 24 | – | Software GTRIG and SYNCLR |
| 26 | – | Software SYNCLR24 |
| 28 | – | Test latch: GTID counter → GTID register |
| 2A | – | Test latch: VME clock counter → VME clock register |

Reads at unused offsets return 0. Reads always return the *latched*
registers, never the live counters. To see a live count, write a test latch
first.

The VME clock counter adds one per 16 MHz clock while it is enabled. The upper
word therefore steps every 2^32 / 16 MHz = 268.4 s. The whole counter wraps
after about 204 days.

Software time-bus commands and test latches change the card's GTID. If they
are used during a run with the MTC/D, the card goes out of step with it.

## Block structure

```
gtid_card_top
├── vme_slave          A16/D16 handshake -> one-clock rd_stb / wr_stb + offset
├── reg_decoder        register map, command strobes (gtid_pkg::cmd_t), enable bits
├── timebus_rx         sync + software pulse shaping + edge detect (uses sync2)
├── gtid_counter       24-bit GTID counter, count-error check, GTID register
├── vme_clock_counter  48-bit clock counter and register
├── event_status       MUX/shaper capture, Valid + latch pulse, Count Error, ncd_gt_out, mb_out (uses sync2)
└── led_stretch x4     MTC/D GT, SYNCLR, NCD GT, SYNCLR24 LEDs (0.1 s hold)
```

`gtid_pkg` holds the widths, the register offsets (`reg_off_e`), the board
types, the status bit positions and the command bundle. All logic runs on one
clock, the 16 MHz VME clock. `sysreset_n` (VME SYSRESET*) is an asynchronous
reset of everything. It is the only way the GTID counter is cleared apart from
SYNCLR and SYNCLR24.

### VME timing

AS* and DS* are synchronised. The access strobe comes 3 clocks after DS*
falls. DTACK* goes low one clock later, with the read data already on
`vme_d_out` and `vme_d_oe` high. DTACK* is released about 3 clocks after DS*
rises. The data bus is split into `vme_d_in`, `vme_d_out` and `vme_d_oe`. The
board's transceivers and its open-collector DTACK* driver are outside this
logic.

## Choices made in this RTL

The card's specification defines the register map, the counter widths and the
time-bus rules. The points below are this implementation's own reading or
choice:

- **Upper GTID step.** The upper half steps on SYNCLR (a carry from clearing
  the lower half), not only on a natural wrap of the lower half. This is what
  the card showed on the bench: "GTRIG and SYNCLR" clears the lower half and
  increments the upper.
- **Latch point.** The VME clock count is latched together with the GTID, at
  the GTRIG trailing edge that validates the event. It is not latched at the
  event's arrival.
- **Register Reset.** It clears the three event bits, as specified. An early
  prototype was reported not to.
- **Count Error.** It is cleared by reading it, the behaviour observed on the
  prototype. The specification does not say how it is cleared.
- **Upper-half load.** A load of the upper GTID half takes D<7:0>.
- **Board serial.** The serial number defaults to 40, taken as decimal.
  `BOARD_SERIAL` and `BOARD_REV` are parameters.
- **Fixed widths and window.** Pulse widths (`SOFT_GT_LEN`, `NCD_GT_LEN`), the
  LED hold time (`LED_HOLD` = 1,600,000 clocks) and the 64-byte address window
  are not specified.
- **VME cycles.** Only D16 word cycles are supported. Byte strobes are treated
  as a word access, and LWORD* is ignored.
- **No correlation logic.** Correlating MUX and shaper events that are close in
  time was never defined for the card, so nothing is built for it. Each source
  simply sets its own bit.

## Simulating

Each block has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gtid_pkg.sv tb/tb_gtid_card_top.sv \
          --top-module tb_gtid_card_top -Mdir obj -o sim && obj/sim
```

Replace the testbench name to run another block.

`tb_gtid_card_top` runs the whole card at its default parameters through the
host's VME cycles:

- MUX and shaper events, with triggers from the bus and from software;
- the rollover with no error, and an out-of-step SYNCLR with an error;
- SYNCLR24 from the bus and from software;
- the VME clock rate: exactly 5000 counts between two test latches 5000 clocks
  apart;
- loads, resets and Register Reset;
- the multiboard gate and the LEDs.

It counts each of these mechanisms and fails if one never occurred. It takes
about 1.8 M clocks, which is a few seconds. The unit testbenches check the
following:

- `gtid_counter`: 5000 random clocks against a model that treats the count as
  one 24-bit number.
- `vme_slave`: latency, DTACK* and rejection of wrong base, AM and IACK
  cycles.
- `reg_decoder`: every offset.
- `timebus_rx`: event order and latency.
- `event_status`: the latch-once rule and the clear rules.
- `led_stretch`: the hold time.
