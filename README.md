# Plank controller: 6-bit phase computation for an active phased array

An active phased array steers its beam by giving every transmit/receive
module (TRM) its own phase shift. Instead of sending each TRM its phase, the
beam steering chain sends each *plank controller* (PLKC) just two numbers, the
azimuth and elevation phase gradients, and the plank controller works out the
6-bit phase of each of its 32 TRMs, corrects it with a stored per-TRM phase
error and sends the results to the modules over a serial link.

This repository holds synthesizable SystemVerilog for one plank controller
running from a 100 MHz clock. It follows the phase computation published in
"FPGA Based Phase Computation for Active Phased Array Radar (APAR)" and fills
in the parts that paper leaves open (link framing, flash port, FIFO, control)
with simple choices of its own, listed below.

```
 radar controller --> beam steering unit (ABCU) --> PLKC 0 ... PLKC n    (this RTL: one PLKC)
                                                       |
                                                       +--> TRM 0 ... TRM 31
```

## The arithmetic

The gradients arrive already multiplied by 10, so one unit is 0.1 degree:
PA* = 10 * PA and PB* = 10 * PB, each a signed 16-bit number. For the TRM
at column `m` (the plank number, a 6-bit strap) and row `n`:

```
product = m*PA* + n*PB*                  signed, fits 23 bits
r       = product mod 3600               0 .. 3599 tenths of a degree
phase   = round(4*r / 225) mod 64        one LSB = 56.25 tenths = 5.625 degrees
out     = (phase + dphi) mod 64          dphi = stored phase error, 6 bits
```

How each step is done in hardware:

* **mod 3600.** The divider works on unsigned numbers, so the engine divides
  `|product|` by 3600 and, when the product was negative and the remainder
  is not zero, replaces the remainder `r` by `3600 - r`. That gives the true
  modulo for both signs.
* **Quantisation.** Dividing by 56.25 directly would need a fraction, so
  numerator and denominator are both scaled by 4: the second division is
  `4r / 225`. The quotient is rounded to the nearest step (one is added when
  twice the remainder is at least 225), and 64 wraps to 0.
* **Compensation.** The phase error is added modulo 64.

Worked example (TRM 0 of plank 17): PA* = 10944, PB* = 1065, n = 1.
product = 17*10944 + 1065 = 187113; 187113 mod 3600 = 3513 (351.3 degrees);
4*3513 / 225 = 62.45, which rounds to 62 = 0x3E.

**TRM positions.** TRM `k` (k = 0..31) is placed at `n = 1 + 2k`, i.e. rows
1, 3, 5, ..., 63, which is how an array symmetric about its centre line is
usually indexed. With that rule and rounding to nearest, the example
gradients give exactly the 32 phases the original design recorded in
hardware: 3e 24 0a 30 16 3c 22 08 2d 13 39 1f 05 2b 11 36 1c 02 28 0e 34 1a
00 25 0b 31 17 3d 23 09 2e 14. Consecutive rows (n = k + 1) or truncation
do not reproduce them. Both rules are parameters of `plkc_phase_engine`
(`N_FIRST`, `N_STEP`, `ROUND_NEAREST`) in case a different array numbering is
wanted.

## Datapath and schedule (`plkc_phase_engine`)

The design trades time for area as the original did: **one multiplier and one
divider** serve all 32 TRMs.

* `plkc_mult`: registered 16 x 6 multiplier, signed gradient times unsigned
  index, 23-bit result, 1-clock latency (stands in for a vendor multiplier
  core).
* `plkc_divider`: restoring divider, 23-bit dividend, 12-bit divisor, one
  quotient bit per clock, 23 clocks per division.

A beam runs in two passes:

1. `m*PA*` is formed once. Then for each TRM: multiply `n*PB*`, add,
   divide by 3600, correct the sign and keep the remainder in that TRM's own
   12-bit register.
2. For each TRM: divide 4 times its remainder by 225, round, add the phase
   error at the head of the FIFO, pop it and write `phase_out[k]`.

Each TRM costs 26 clocks per pass, so a beam takes
`1 + 32*2*26 = 1665` clocks (16.65 us at 100 MHz) from the clock edge that
takes `start` to `done`, as long as the phase errors are in the FIFO in time.
If the FIFO is empty when a TRM reaches compensation, pass 2 waits.
`phase_out` registers change one at a time, TRM 0 first.

## Phase error path (`plkc_flash_reader`, `plkc_perr_fifo`)

The per-TRM phase errors live in an external flash. Each command carries a
16-bit flash address; the reader fetches 32 consecutive words from there,
keeps the low 6 bits and pushes them into a 32-entry FIFO in TRM order. It
runs in parallel with pass 1 (832 clocks), so a flash that answers within
about 24 clocks per word never stalls the engine.

Flash read port (this design's own, meant to sit in front of whatever flash
controller the board uses): `flash_req` rises with `flash_addr`; both hold
until the cycle in which `flash_ack` is high, when `flash_data` (8 bits) is
taken. One read is outstanding at a time, and a read is only issued when the
FIFO has room. An assertion checks the hold rule.

## Links

**Command link in** (`plkc_cmd_rx`), up to 50 Mbps: clock, active-low frame
select and one data line, data sampled on the rising link clock, MSB first.
A frame is exactly 48 bits: PA* (16), PB* (16), flash address (16). The
three signals are synchronised into the 100 MHz domain with two flops each
and the link clock is edge detected, so the link clock may be at most half
the system clock and each level must last at least one system clock. A frame
of any other length is discarded and pulses `cmd_frame_err`. The command is
valid about 3 clocks after the frame ends. A command that arrives while a
beam is still being computed is dropped and pulses `cmd_dropped`.

**TRM link out** (`plkc_trm_tx`), 20 Mbps: one shared link clock and frame
select for all TRMs plus one data line per TRM; all 32 phases go out in
parallel in one 6-bit frame, MSB first. A bit lasts 5 system clocks: data
changes with the clock low, the clock rises 3 clocks later (the TRM samples
there) and falls at the end of the bit. The frame select is low for 30
clocks, then a 5-clock gap follows. LVDS buffers are outside this RTL.

End to end, from the end of a command frame to the end of the TRM frame,
takes about 1700 clocks, 17 us.

## Top level (`plkc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock, asynchronous active-low reset |
| `plank_m` | in | 6 | this controller's plank number `m` |
| `cmd_sclk`, `cmd_cs_n`, `cmd_mosi` | in | 1 | command link |
| `flash_req`, `flash_addr` | out | 1, 16 | flash read request |
| `flash_ack`, `flash_data` | in | 1, 8 | flash read response |
| `trm_sclk`, `trm_cs_n` | out | 1 | TRM link clock and frame select |
| `trm_mosi` | out | 32 | one data line per TRM |
| `phase_out` | out | 32 x 6 | computed phases, for observation |
| `beam_busy`, `beam_done` | out | 1 | beam in progress; pulse when all phases are written |
| `cmd_frame_err`, `cmd_dropped` | out | 1 | rejected frame; command ignored because busy |

Shared widths and constants (16-bit gradients, 6-bit indices and phases,
23-bit product, 3600, 4, 225, 32 TRMs) are in `rtl/plkc_pkg.sv`.

## What follows the original design and what does not

Taken from the original: the phase formula and its scaling by 10, division
by 3600 with the sign correction for negative products, the second division
as 4r/225, compensation with a stored phase error of at most 6 bits, one
multiplier and one divider shared by all TRMs, remainders kept per TRM,
16-bit gradients, 16 x 6 multiplications, a 23-bit product and dividend, 32
TRMs, a 100 MHz clock, 50 Mbps in, 20 Mbps SPI-style out, a FIFO for the
flash data.

This design's own choices:

* TRM rows `n = 1 + 2k` and rounding to nearest, chosen because they
  reproduce the original's recorded results (see above). The original text
  calls `n` simply the TRM number.
* The original quotes 20 Mbps for SPI links between controller levels and
  50 Mbps for the gradients into the PLKC; the receiver here is built for
  50 Mbps and works at any lower rate.
* Divider method: the original uses an unspecified "time optimised"
  divider; this one is a plain 1-bit-per-clock restoring divider.
* Compensation is an addition; the sign convention of the stored error is
  not known.
* Frame formats of both links, the flash port, FIFO depth, reset, and the
  policy of dropping commands while busy.
* All 32 TRMs of a plank share one link clock; each has its own data line.

Not included: the radar controller and beam steering unit that compute the
gradients (host software in the original), the flash device itself, the
TRM-side controllers, the analog 6-bit phase shifters and the LVDS I/O.

## Size

Generic synthesis of `plkc_top` gives about 1060 flip-flop bits, a 192-bit
FIFO memory and one multiplier. That is more registers than the original
Virtex-5 implementation reported (702 slice registers, 417 LUTs, one
DSP48E), mostly because this version keeps 32 x 12-bit remainder registers
and separate 32 x 6-bit link shift registers next to the 32 x 6-bit phase
registers.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_plkc_top` | full-size end to end: serial commands in, flash model with random wait states, 32 TRM lines decoded; the example beam must give the 32 recorded phases; random beams against an integer model; latency; FIFO stalls, rejected and dropped commands, sign correction, rounding, wrap-around are each made to happen |
| `tb_plkc_phase_engine` | the 32 recorded phases, random and extreme gradients, exact run length, stalls |
| `tb_plkc_divider` | example divisions, edge and random operands, 23-clock latency |
| `tb_plkc_mult` | products incl. extremes, one result per clock |
| `tb_plkc_cmd_rx` | 50 Mbps frames, short and long frames rejected |
| `tb_plkc_perr_fifo` | random traffic against a queue model, full and empty |
| `tb_plkc_flash_reader` | order, addresses, 6-bit truncation, back-pressure |
| `tb_plkc_trm_tx` | all 32 lines decoded, bit period, frame length, load during a frame |

`tb/flash_model.sv` is a behavioural flash used by the reader's testbench.

Run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_plkc_top \
    -y rtl -y tb +libext+.sv rtl/plkc_pkg.sv tb/tb_plkc_top.sv
./obj_dir/Vtb_plkc_top
```

The end-to-end test runs at the default size (32 TRMs) in well under a
second.
