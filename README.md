# Precise timestamp generator for network monitoring

A packet monitor on a 10 Gbit/s Ethernet link sees a minimum-size packet
roughly every 67 ns, and wants to stamp each one with a time that is
distinct from its neighbours, monotonic and tied to UTC to within about a
microsecond. Host operating system clocks cannot do that. This design keeps
the time in hardware: a wide fixed-point register advances by a programmable
increment on every cycle of a clock derived from a 10 MHz temperature
compensated crystal, and host software steers the increment so that the
register stays locked to the pulse-per-second (PPS) output of a GPS
receiver. The time is read by the host through an atomic snapshot register,
and streamed to a second card (the one that handles the packets) over a
narrow cable of twelve wires.

The RTL is SystemVerilog (IEEE 1800-2017) and was developed with Verilator 5
and the slang front end of Yosys.

## How time is kept

The **Real Time Register (RTR)** is 96 bits:

| bits   | meaning                                                    |
|--------|------------------------------------------------------------|
| 95..64 | whole seconds since 1970-01-01 00:00:00 UTC (Unix time)    |
| 63..0  | binary fraction of the second, LSB = 2^-64 s               |

Every SCLK cycle the 40-bit **increment register (INCR)** is added to RTR;
a carry out of the fraction simply advances the seconds. To accumulate one
second in `f` cycles, INCR must be `2^64 / f`. For the default SCLK of
100 MHz this is `0x2A_F31D_C461` (the reset value), so from zero RTR reads
`0x..._002A_F31D_C461` after one cycle and `0x..._0055_E63B_88C2` after two.
Because the quotient is not an integer and the crystal is not perfect, RTR
drifts; the regulator described below corrects INCR.

Why 40 bits for INCR rather than 64: `2^64/f` fits 40 bits for any clock
above 16.8 MHz, and a 40-bit increment moves the exported timestamp (see
below) by at most 256 units of 2^-32 s per cycle. That bound is what lets
the cable protocol report low-byte overflows with a single one-cycle pulse.

The exported **timestamp** is the upper 64 bits of RTR: 32 bits of seconds
and the top 32 bits of the fraction (LSB about 232 ps). Its true resolution
is one SCLK period, 10 ns at 100 MHz. The extra 32 fraction bits inside RTR
are there so that the increment can be set with fine frequency resolution:
one INCR LSB is about 5.4e-12 of relative frequency at 100 MHz.

Example: 2008-01-01 00:00:00 UTC is 1199145600 s, so RTR is loaded with
`4779_8280 0000_0000 0000_0000`.

## Disciplining the clock to PPS

```
  PPS (GPS) --> [sync 2FF] --> rising edge --> PPSR := RTR
                                                 |
  host software:  err   = PPSR.fraction read as a signed number (seconds)
                  drift = drift + err * Ci            (Ci = 2^-18)
                  adj   = -drift - err * Cp            (Cp = 2^-8)
                  INCR  = INCR * (1 + adj)      every minute or so
```

The rising edge of PPS marks the start of a UTC second, so the fraction
part of the value captured into the **PPS register (PPSR)** is the clock's
phase error at that instant: a small positive number means the clock is
ahead, a number just under 2^64 (negative when read as signed) means it is
behind. The proportional-integral regulator itself is software running on
the host (or on the card's microcontroller); the hardware supplies the
capture, a sticky "new capture" flag, and an increment register that can be
rewritten without glitching the adder (the low word is staged, the write of
the high word commits both halves in one cycle). The regulator is not in
the RTL; the end-to-end testbench performs one step of it through the
registers. The gains above are tuned values for one particular crystal.
Applying `adj` as a relative change of INCR, as in the sketch, is this
design's reading of how the correction is used.

The PPS input passes through a two-flip-flop synchroniser. If PPS rises
between clock edges E0 and E1, PPSR receives the RTR value produced at
edge E2, so the sample is taken 1 to 2 SCLK periods (10 to 20 ns at
100 MHz) after the true edge. That offset is not subtracted in hardware;
software may subtract 1.5 periods on average.

The clock's own **PPS output** is decoded from RTR: it is high while the top
three fraction bits are zero, i.e. for the first 125 ms of every second of
RTR (parameter `PPS_WIDTH_BITS`).

Initial time: software loads RTR once (from NTP, a GPS time message or the
host clock) to within a second; the regulator then pulls the fraction in.

## Reading the time from the host

RTR changes every cycle, and a 64-bit timestamp needs two 32-bit bus reads,
so reading RTR directly would mix halves of different times. Writing 1 to
`CTRL` copies the upper 64 bits of RTR into the host copy of the **Timestamp
Register (TSR)** in one cycle; the host then reads `TSR_FRAC` and `TSR_SEC`
at leisure.

All registers sit on a simple synchronous 32-bit register bus in the SCLK
domain (`rtl/reg_bank.sv`). A PCI target or a microcontroller interface is
expected in front of it; neither is part of this RTL.

| address | name      | access | content                                            |
|---------|-----------|--------|----------------------------------------------------|
| 0x00    | INCR_LO   | R/W    | read: INCR[31:0]; write: stage the low word        |
| 0x04    | INCR_HI   | R/W    | read: INCR[39:32]; write: INCR := {wdata[7:0], staged low} |
| 0x08    | RTR_F0    | W      | stage RTR fraction[31:0]                           |
| 0x0C    | RTR_F1    | W      | stage RTR fraction[63:32]                          |
| 0x10    | RTR_SEC   | W      | RTR := {wdata, F1, F0} (load, one cycle)            |
| 0x14    | CTRL      | W      | bit 0 = 1: snapshot RTR[95:32] into TSR            |
| 0x18    | TSR_FRAC  | R      | snapshot fraction (2^-32 s units)                  |
| 0x1C    | TSR_SEC   | R      | snapshot seconds                                   |
| 0x20    | PPSR_F0   | R      | PPSR fraction[31:0]                                |
| 0x24    | PPSR_F1   | R      | PPSR fraction[63:32]                               |
| 0x28    | PPSR_SEC  | R      | PPSR seconds                                       |
| 0x2C    | STATUS    | R/W1C  | bit 0: new PPS capture (write 1 clears); bit 1: link in Init mode |

Bus timing: `bus_wr` or `bus_rd` (never both) with `bus_addr`/`bus_wdata`
for one cycle; a write acts at that clock edge, read data comes back one
cycle later with `bus_rvalid`. Unmapped reads return 0.

## The timestamp cable

The second card needs the full 64-bit timestamp every cycle but the cable
has only an 8-bit data bus. The link relies on the fact that the timestamp
changes slowly and predictably: its upper 56 bits only ever step by one.

| wire         | direction       | meaning                                  |
|--------------|-----------------|------------------------------------------|
| REFCLK       | PTM -> external | SCLK, the clock of all other wires       |
| TS_DATA[7:0] | PTM -> external | low timestamp byte, or an Init byte      |
| TS_DV        | PTM -> external | TS_DATA carries an Init byte             |
| PPTSF        | PTM -> external | the low byte overflowed this cycle       |
| INIT         | external -> PTM | request for the whole timestamp          |

**Fast mode** (default): every cycle TS_DATA is the low byte of the
timestamp and TS_DV is low. PPTSF is high for one cycle whenever the upper
56 bits changed. At 100 MHz the low byte (256 x 232 ps = 59.6 ns) wraps
about every 6 cycles. The receiver keeps its own upper 56 bits, adds one on
each PPTSF, and takes the low byte straight from the wire.

**Init mode**: the receiver cannot know the upper bits on its own, so after
reset (and whenever it is asked to resynchronise, e.g. after the host has
loaded RTR) it pulses INIT. On the rising edge of INIT the transmitter
freezes the current timestamp T0 and sends its eight bytes, least
significant first, on eight consecutive cycles with TS_DV high, then falls
back to Fast mode on its own. Eight cycles is long enough for the real
timestamp to overflow its low byte again, so PPTSF keeps running during the
transfer. The receiver counts the PPTSF pulses of beats 1 to 7 (the pulse
in beat 0 is already contained in T0) and at the eighth byte sets its upper
part to `T0[63:8] + count`. The next Fast beat supplies the live low byte,
and from then on `ts_valid` is high.

```
cycle     ...  n    n+1  n+2  ...  n+7  n+8  n+9
TS_DV          1    1    1         1    0    0
TS_DATA        B0   B1   B2        B7   lo   lo     (Bk = byte k of T0)
PPTSF          *    p1   p2        p7   .    .      (* already in T0)
upper56                              T0[63:8]+p1+..+p7, then +PPTSF
```

Timing through the whole chain: the external card's `ext_ts` in a cycle
equals the upper 64 bits of RTR three cycles earlier (one register in the
Timestamp Register, one in the transmitter, one in the receiver).

A host load of RTR makes the timestamp jump; the receiver cannot see a jump
and must be told to resynchronise (`ext_resync`). Changing INCR needs no
resynchronisation.

## Files

| file | block |
|------|-------|
| `rtl/ptm_pkg.sv`     | shared types (`rtr_t`, `ts_t`, link mode), widths, register map |
| `rtl/ptm_top.sv`     | top: clock, reset, all blocks, cable between transmitter and receiver |
| `rtl/freq_mult.sv`   | behavioural model of the x N clock multiplier (not synthesizable) |
| `rtl/incr_reg.sv`    | INCR with atomic two-word update |
| `rtl/rtr.sv`         | RTR and its adder, host load |
| `rtl/pps_capture.sv` | PPS synchroniser, edge detect, PPSR, capture flag |
| `rtl/ts_reg.sv`      | Timestamp Register: live copy for the link, held copy for the host |
| `rtl/pps_gen.sv`     | PPS output decoded from RTR |
| `rtl/ts_link_tx.sv`  | cable transmitter (Fast/Init) |
| `rtl/ts_link_rx.sv`  | cable receiver for the external card |
| `rtl/reg_bank.sv`    | register bus decoder and read multiplexer |
| `tb/tb_<block>.sv`   | self-checking testbench of each block |
| `tb/tb_ptm_top.sv`   | end-to-end test of the top at default parameters |
| `tb/tb_ptm_packets.sv` | workload: minimum-size packets at 10 and 1 Gbit/s stamped on the external card |
| `tb/tb_ptm_sclk_configs.sv`, `tb/ptm_cfg_check.sv` | the top at SCLK = 60, 80 and 100 MHz side by side |

`ptm_top` parameters: `MULT` (10, SCLK = MULT x 10 MHz), `INCR_RESET`
(`2^64/100e6`; change it together with `MULT`), `SYNC_STAGES` (2),
`PPS_WIDTH_BITS` (3). All logic runs on SCLK; `rst_n` is asynchronous and
internal reset is released two SCLK cycles after the multiplier locks.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops
itself; a watchdog counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ptm_pkg.sv tb/tb_ptm_top.sv --top-module tb_ptm_top -Mdir obj_top
./obj_top/Vtb_ptm_top
```

The same command with `tb_rtr`, `tb_ts_link_rx` and so on runs a block
test; Verilator finds the other modules in `rtl/` by file name. The end-to-end test
runs at the default parameters in a few seconds. It sets the clock to
2008-01-01, checks snapshots, the PPS output, a PPS capture, the PPTSF rate
(INCR/2^40 per cycle, one pulse per ~60 ns), one regulator step, and the
external card's timestamp every cycle. It also counts each of these
mechanisms and fails if any never happened.

`tb_ptm_packets` feeds back-to-back minimum-size packets (84-byte slots:
67.2 ns at 10 Gbit/s, 672 ns at 1 Gbit/s) arriving off the clock grid, and
checks that every packet gets a larger stamp than the one before and that
stamp differences match the arrival gaps within one SCLK period, also
across a second boundary.

`tb_ptm_sclk_configs` builds the top three times, with `MULT` = 6, 8 and 10
and `INCR_RESET` = round(2^64/SCLK) = `0x47_9531_9CA2`, `0x35_AFE5_3579`
and `0x2A_F31D_C461`, and checks for each that the timestamp keeps real
time over 20 us, that PPTSF pulses INCR/2^40 times per cycle, and that the
external card stays in step.

## What to trust, and what is this design's own choice

Taken from the architecture: the 96-bit RTR with its 32/64 split, the
40-bit INCR and its nominal value `2^64/f_SCLK` (the architecture also
describes the increment as a 64-bit number; the 40-bit width is used here,
zero-extended into the adder, which loses nothing for clocks above
16.8 MHz), the 64-bit timestamp as the
upper RTR bits, the atomic snapshot for the host, capture of RTR on the PPS
edge as the regulator's error, a PPS output driven from RTR, the clock
multiplier, and the cable signals with the Fast/Init protocol, overflow
strobe and the receiver's duties.

Choices of this design, where the architecture is silent: the register bus
and map, staging of INCR and RTR writes, the reset scheme and reset values,
the PPS synchroniser depth and its uncompensated latency, the 125 ms PPS
output pulse, the split of the Timestamp Register into a live and a held
copy, least-significant-byte-first Init order with exactly eight beats,
INIT edge detection, the receiver's INIT generation, valid flag and overflow
counting. REFCLK is assumed to be SCLK itself. The architecture also links
the PPS register to the Timestamp Register without giving that link a
purpose; here the Timestamp Register is loaded from RTR only.

Not included: the PCI and microcontroller interfaces (replaced by the
register bus), the PI regulator (host software; one step is modelled in
`tb/tb_ptm_top.sv`), GPS time-message parsing for initialisation, and
anything on the host or on the packet-processing card beyond the timestamp
receiver. `freq_mult` is a simulation model; in an FPGA use the vendor's
clock manager. The 60 and 80 MHz settings need only a different `MULT` and
`INCR_RESET`; they are simulated for 20 us each, not over whole seconds.
