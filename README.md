# AVLS: an FPGA that tunes its own voltage, clock and logic

A chip's supply voltage and clock are usually fixed with a safety margin wide
enough for the slowest part, the hottest day and the lowest supply. Most parts,
most of the time, could run faster or at a lower voltage than that. Adaptive
Voltage and Logic Scaling (AVLS) removes the margin on an FPGA by measuring it
instead of assuming it. Three knobs are moved together:

* **voltage**: the FPGA core supply (VCCINT) comes from a regulator whose
  output is trimmed by an SPI digital potentiometer. The FPGA writes that
  potentiometer itself.
* **frequency**: the user clock comes from a DCM_ADV (a Virtex-5 digital clock
  manager). Its multiplier and divider are rewritten at run time through the
  DCM's dynamic reconfiguration port (DRP).
* **logic**: the user logic is a partially reconfigurable region. A bigger or
  smaller variant of the same function (for example a motion-estimation
  engine with 1, 3 or 6 execution units) is loaded from external SRAM through
  the internal configuration access port (ICAP). A wide variant can meet a
  throughput target at a low clock and a low voltage. A narrow one needs a
  high clock and a high voltage, but less area.

The part that makes it safe is a set of **in-situ timing detectors** on the
critical paths of the user logic (100 paths by default). Each detector is a
flip-flop pair. The second flip-flop sees the path's result a little later
than the real one, so it misses the clock edge *before* the real flip-flop
does. The controller raises the clock step by step until a detector fires,
then backs off one step. Whatever the voltage, temperature or silicon, the
clock ends just under the point where the logic would start to fail.

This repository holds the controller (the "AVLS IP") and the detector
flip-flops as synthesizable SystemVerilog. It also holds testbenches, with
behavioural stand-ins for the parts outside the fabric: the DCM, the voltage
board, the SRAM, the ICAP, the system monitor and the user logic.

## Block map

```
            req (bitstream?, voltage code)
                     |
              +-------------+   lsu_start/irq   +-----+  SRAM  -> ICAP
              |  avls_mgmt  |------------------>| lsu |-------------------->
              |  (sequence) |   vsu_set/done    +-----+
              |             |------------------>| vsu |--- SPI ----------> potentiometer
              |             |   search/track    +-----+
              |             |------------------>| fsu |--- DRP/reset/LOCKED -> DCM_ADV
              +-------------+                   +-----+        |
                                                 |  ^ fire     | user_clk (gated)
                                          clear  v  |          v
                                            +--------------+  ok[99:0]  +---------+
                                            | verification |<-----------| ntc_ff  | x100
                                            +--------------+            | (canary)|
                                                                        +---------+
         monitor: system-monitor DRP reads + status  ---> UART 115200 8N1 ---> host
```

| file | role |
|---|---|
| `rtl/avls_pkg.sv` | widths, DRP addresses, ROM entry and request types, state encoding |
| `rtl/avls_top.sv` | the whole IP plus the detector bank |
| `rtl/avls_mgmt.sv` | management unit: runs one request end to end |
| `rtl/lsu.sv` | logic scaling unit: SRAM to ICAP streamer |
| `rtl/vsu.sv` | voltage scaling unit: SPI write of the potentiometer code |
| `rtl/fsu.sv` | frequency scaling unit: DCM programming and the frequency search |
| `rtl/freq_rom.sv` | table of DCM multiplier/divider pairs, computed at elaboration |
| `rtl/verification.sv` | AND of all detectors, sticky flag, clock-domain crossing |
| `rtl/ntc_ff.sv` | one in-situ detector (main flip-flop + late flip-flop) |
| `rtl/monitor.sv` | periodic status frame to a host PC |
| `rtl/uart_tx.sv` | 8N1 serial transmitter |

There are two clock domains. `clk` is the fixed management clock (100 MHz
assumed). `user_clk` is the scaled clock from the DCM. Only the detector
flip-flops and the first half of `verification` run on `user_clk`.

## The detectors (`ntc_ff`)

Each protected path end point gets a detector with inputs `d` (the path
result, feeding the real flip-flop `q`) and `d_late` (the same signal after
extra routing delay, feeding a detection flip-flop). `ok` is high while both
flip-flops hold the same value. When the clock period shrinks toward the path
delay, the late copy is the first to be sampled too early. `ok` then drops
while `q` is still correct. That is the warning.

The extra delay is a physical property of placement and routing. RTL cannot
create it, so `d_late` is a port: in the FPGA it is the path output through a
longer route, and in simulation the silicon model supplies it. The detector's
`ok` is active-high. The verification unit therefore reduces all 100 flags with
an AND, and any detector that fires pulls the result low.

## Observation windows across two clocks (`verification`)

The frequency search asks one question per step: "did any detector fire
during the last window?" Answering it across the two clocks is the subtle part
of the design.

* In the user domain, `&det_ok` is registered. A **sticky** flag is set on any
  cycle where that AND was low.
* The management side starts a window with `clear`. This toggles a request
  bit. The user side synchronises the toggle, resets the sticky flag, and then
  **masks** the next two user cycles. Those cycles can still carry results of
  the clock setting that was just left, because the DCM is stopped and
  restarted between windows. The user side then toggles an acknowledge back.
* `clear_pending` stays high from the request until the acknowledge has
  crossed back. While it is high, `fire` is forced low, so a stale flag from
  the previous window is never read as a firing.
* A `clear` issued while one is still pending is **merged** with it, not
  toggled again. When the user clock is gated, two toggles could otherwise
  cancel out in the synchroniser. The request would then look complete while
  the old sticky flag is still set.
* `fire_count` counts windows that ended with a firing. It is reported to the
  host as the firing rate.

The sticky flag crosses to `clk` through a two-flip-flop synchroniser. It is
stable for a whole window, so one level is enough.

## Frequency search (`fsu`, `freq_rom`)

`freq_rom` holds `ROM_DEPTH` (128) entries, each `{M-1, D-1, f_kHz}` for the
DCM frequency synthesiser with a 100 MHz reference (M = 2..32, D = 1..32). Entry
*i* is the lowest achievable frequency `floor(100 MHz * M / D)` that is at
least `22 MHz + i * (250 - 22) MHz / 127` and above entry *i-1*. The table
therefore rises strictly from 22.2 MHz to 250 MHz. The steps are fine at the
low end and up to about 11 MHz near 200 MHz, where fewer M/D pairs exist. The
ROM is computed in SystemVerilog when the design is elaborated; there is no
data file.

One step of the search:

1. read the entry for `freq_idx` (1 clock);
2. hold the DCM in reset, write register 0x50 with `{M-1, D-1}` over the DRP,
   and wait for DRDY;
3. release reset and wait for LOCKED (at most `LOCK_TIMEOUT` clocks); only
   then raise `user_clk_en`;
4. clear the verification unit and wait until the clear has completed;
5. watch `fire` for `WINDOW_CYCLES` clocks.

Rule: while windows stay clean, the index goes up. On the first firing window,
the index goes down one entry. The search ends at the first clean window that
follows a firing, or at the top entry. If the search starts above the limit,
for example after the voltage was lowered, it simply walks down. A DCM that
does not lock in time counts as a firing. If the DCM fails even at entry 0,
the search ends with `fail`, and the clock stays off.

After a search, with `track` high (the management unit is in its RUN state),
the FSU keeps watching windows at the chosen entry. If one fires, for example
because the chip warmed up, it steps down again without waiting for a new
request. This makes the loop closed, not a one-time calibration.

Cost of one step with default parameters: about 10 µs of window plus the DCM
lock time. A full climb from 22 MHz to 240 MHz takes about 120 steps.

## Voltage step (`vsu`)

A single 16-bit SPI frame is sent, MSB first, in mode 0 (clock idle low, data
changed on the falling edge). The frame is the command byte `CMD` (0x11, the
usual "write wiper" of 8-bit single-channel digital potentiometers) followed by
the 8-bit wiper code. `SCK_DIV` = 5 gives a 10 MHz SCK. After the frame, the
unit waits `SETTLE_CYCLES` (100 µs) before it reports `done`, so the regulator
can settle before the frequency search begins. The design works in
potentiometer codes. Turning a code into volts is a property of the board.

## Swapping the logic (`lsu`)

Given a start word address and a length in 32-bit words, the LSU reads the
partial bitstream from a pipelined SRAM (`SRAM_LAT` = 2 cycles) and writes it
to the ICAP, one word per clock. This is the ICAP's full rate: 32 bits at
100 MHz is 400 MB/s. Reads are issued against credits, so a small FIFO
(`FIFO_DEPTH` = 8) never overflows, even while the ICAP stalls with `BUSY`.
A word is offered on `icap_i` with `icap_ce_n`/`icap_write_n` low, and held
until a clock where `icap_busy` is low. `irq` pulses for one clock after the
last word has been accepted. With no stalls, a transfer of N words takes
N + SRAM_LAT + 2 clocks from `start` to `irq`. Bitstreams must be stored
already in the bit order the ICAP expects.

## Running a request (`avls_mgmt`)

A request (`avls_pkg::avls_req_t`) carries an optional bitstream (flag,
address, length) and a potentiometer code. The management unit runs, in this
order:

```
IDLE/RUN -> [RECONFIG -> WAIT_IRQ] -> VOLTAGE -> WAIT_V -> FREQ -> WAIT_F -> RUN
```

The bracketed states are skipped when no bitstream is given. `done` pulses on
entering RUN, and `fail` reports a search that found no working clock. In RUN
the FSU tracks. A new request is accepted in IDLE or RUN.

The voltage is always set before the search starts, also when it is lowered.
This relies on the detectors: at a lower voltage the old clock is too fast,
the detectors fire, and the search walks down. A system that may never come
close to a real failure should lower the clock first. That is a small change
to the state order.

## Status to the host (`monitor`, `uart_tx`)

Every `SAMPLE_CYCLES` (0.1 s), the monitor reads the FPGA system monitor's
temperature (register 0x00) and VCCINT (0x01) over its DRP. It then sends
13 bytes at 115200 baud, 8N1:

| byte | content |
|---|---|
| 0 | 0xA5 |
| 1-2 | temperature code, MSB first |
| 3-4 | VCCINT code |
| 5-7 | user clock in kHz |
| 8 | potentiometer code |
| 9-10 | windows that fired (count) |
| 11 | {fail, fire, 2'b00, management state} |
| 12 | sum of bytes 1-11, modulo 256 |

These values are only reported. None of them feeds a decision of the
controller.

## Parameters (`avls_top`)

| parameter | default | meaning |
|---|---|---|
| `N_DET` | 100 | protected critical paths |
| `ROM_DEPTH` | 128 | frequency table entries (22-250 MHz) |
| `WINDOW_CYCLES` | 1024 | clocks per observation window |
| `LOCK_TIMEOUT` | 100000 | clocks to wait for DCM LOCKED |
| `SETTLE_CYCLES` | 10000 | clocks after an SPI write |
| `SRAM_LAT` | 2 | SRAM read latency |
| `CLK_HZ`, `BAUD` | 100 MHz, 115200 | management clock, UART |
| `SAMPLE_CYCLES` | 10000000 | monitor period |

Set in `avls_pkg`: an 18-bit SRAM word address (1 MB), a 32-bit ICAP, an 8-bit
potentiometer code, and frequencies in kHz on 18 bits.

Synthesised as one flat design with the default parameters, the IP plus 100
detectors comes to roughly 700 flip-flops and a 128 x 34-bit ROM. The 100
detectors account for 200 of those flip-flops.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. With
verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/avls_pkg.sv tb/tb_fsu.sv --top-module tb_fsu
./obj_dir/Vtb_fsu
```

`tb_avls_top` runs the whole IP at its default parameters for about 100 ms of
simulated time, which takes about a minute. The stand-ins are:

* `dcm_model`: DRP with 3-cycle latency, lock delay, and a clock at the
  programmed `100 MHz * M / D`, gated by `user_clk_en`;
* `vpcb_model`: SPI slave that decodes the frame and maps the code to
  `500 + 2 * code` mV;
* `silicon_model`: user logic whose highest working clock depends on the
  loaded variant (1, 3 or 6 units), the supply and a temperature derate. Above
  that clock its late copies go wrong and some paths really fail. It counts
  real errors, so the bench can check that none reaches `q`.

The limits in `silicon_model` are chosen to match or sit just above the
published operating points of the motion-estimation engine: 240 MHz at 1.0 V
for the single-unit variant, 86 MHz at 0.70 V for the three-unit one (83 MHz
published), and 45 MHz at 0.62 V for the six-unit one (42 MHz published). The
end-to-end bench loads the variants through the LSU and moves the voltage. It
checks that the chosen clock lies below the model's limit by less than 12 MHz
(about one ROM step), with no real errors. It also warms the chip to trigger
tracking, makes a DCM refuse to lock, and decodes a host frame. It counts each of these
mechanisms and fails if one never happened.

`tb_voltage_sweep` keeps the single-unit variant loaded and moves the supply
through 0.75, 0.80, 0.85, 1.00, 0.95 and 0.90 V. At each point the frequency
must be found again: rising with the voltage, falling when it drops, always
just under the model's limit, and with the detectors having fired. It shortens
the window and the lock time to run in a few seconds.

One point about reset matters for anyone writing a bench. The user-clock half
of `verification` and the detectors have no clock until the first DCM lock.
Only an asynchronous reset reaches them before that. A bench must therefore
drive a real falling edge on `rst_n`. If `rst_n` simply starts at 0, the
simulator sees no edge, and those flip-flops keep random start values. In the
FPGA the configuration start-up takes care of this.

## What is assumed, and what is not here

The published design gives the blocks and what each does, but not their
insides. Everything inside is this design's own:

* the window length and the one-step back-off;
* the lock timeout, and treating a failed lock as a firing;
* the tracking after a search;
* the clear handshake with its masking and merging;
* the request format and the UART frame;
* the FIFO in the LSU;
* the ROM contents and depth.

DRP register addresses, the DCM's M/D ranges and the potentiometer command come
from the usual Virtex-5 and part conventions, and should be checked against the
real parts.

Where the published text and this RTL differ:

* The SPI controller is a **master**. The text calls the FPGA's SPI block a
  slave, but the FPGA starts every transfer to the potentiometer.
* The detector output is an active-high "ok". This makes "AND all detector
  outputs to detect a violation" work as stated.
* The published LSU uses a block RAM. This one needs only an 8-word FIFO and
  is smaller than the published 349 flip-flops / 229 LUTs.

Not included, because they are hard FPGA primitives, board parts or software:

* the ICAP, the DCM_ADV and the system monitor (reached through ports);
* the external SRAM;
* the voltage regulator board;
* the motion-estimation user logic itself, whose design is not described here;
* the host program that displays the frames.

Power, energy and the derating of the detectors in real silicon are
measurements. They are not modelled beyond the simple limits in
`silicon_model`.
