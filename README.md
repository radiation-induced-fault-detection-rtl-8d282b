# Active sensor network for radiation fault detection on FPGAs

Radiation hurts FPGA logic in two main ways:

- **Single-event upsets (SEUs).** A particle strike makes a node stick at 0 or 1 for a while.
- **Total ionizing dose (TID).** Dose builds up over time and slows the transistors down.

This design spreads fifteen chains of inverters over the die. It watches them every clock cycle
and reports both kinds of fault as they happen:

- **where**: which chain, and so which region of the die;
- **what**: an upset, or a delay;
- **how much**: how many sensors are faulty, or how far the signal got;
- **how long**: for how many clock cycles.

Three signals run along each chain:

- a constant 1 and a constant 0. Any change in them is an upset.
- a bit that toggles every clock cycle. If it has not reached the end of the chain half a clock
  period after it was launched, the chain has slowed down.

Only two input vectors are needed: the two values of the toggling bit. Every fault in the chain
shows up without any test-pattern search.

The RTL is in `rtl/` and the testbenches are in `tb/`. All of it is SystemVerilog (IEEE 1800-2017).

## Signal path

```
 cycle_counter ──vec {1,0,~count[0]}──┬──► sensor_network 0 ──mon[25]──► network_analyzer 0 ──code──┐
   │ count, time_check                ├──► sensor_network 1 ──mon[25]──► network_analyzer 1 ──code──┤
   │                                  ⋮                                                             ⋮
   │                                  └──► sensor_network 14 ─mon[25]──► network_analyzer 14 ─code──┤
   │                                                  ▲ hold/clear                                   │
   └───────────────────────────────────────────► fault_reporter ◄─────────────────────────────────────┘
                         bram_checker (+ bram) ──bad word──►  │ records (valid/ready)
                                                              ▼
                                                         report_uart ──► uart_txd (230400 baud text)
```

Everything runs on one clock, 25 MHz by default (a 40 ns period). The delay check also uses the
falling edge. Reset is asynchronous and active low.

## The sensor chain (`sensor`, `sensor_network`)

A *sensor* inverts each of its three input bits: `100` leaves as `011`. A chain has 29 sensors.
Twenty-five of them are *monitored*: their outputs go to the analyzer as `mon[0..24]`. The other
four are unmonitored buffers that only add delay. They sit in pairs after monitored sensors 0 and
1:

```
 vec → S0 b b S1 b b S2 S3 S4 … S24
```

A pair inverts twice, so monitored sensor *m* always carries the input inverted *m*+1 times. The
analyzer can therefore treat the monitored sensors as one simple alternating sequence.

On silicon, each chain is placed on its own region of the die, and the inverters must not be
merged by the tools. The sensor outputs carry a `keep` attribute for the second point. The
placement is a floorplanning matter outside this RTL. In simulation the chain is plain
combinational logic.

**Fault injection.** Monitored sensors 4, 12 and 20 of every chain are injection sites. Each site
is driven by an `inj_ctrl_t`:

- **Stuck-at:** `en=1, delay=0`. The input bits selected by `mask` are replaced by the constant
  `value`.
- **Delay:** `en=1, delay=1`. The sensor is fed the toggling bit as it was one clock earlier,
  from a flip-flop. At the falling-edge sample this looks exactly like a signal that has not yet
  arrived at that sensor.

Every site input normally carries static-high = 1 and static-low = 0. So `mask=100, value=000` or
`mask=010, value=010` create an upset.

## Detecting upsets (`network_analyzer`)

At every rising edge the analyzer makes two checks:

1. **Snapshot.** It compares the static bits of all 25 monitored sensors with their expected
   values. Any mismatch means an upset is present in this cycle, and the upset duration counter
   counts that cycle.
2. **Neighbour comparison.** It compares every sensor with the sensor before it; sensor 0 is
   compared with the chain input. One bad wire inverts everything after it. Comparing neighbours
   shows that fault as **one** faulty sensor rather than as every sensor downstream of it. Each
   sensor found faulty sets a flag, which stays set until the reporter clears the network. The
   reported amount is the number of flags set.

The flags and the "upset seen" bit are also loaded asynchronously the moment a comparison fails
(`ASYNC_CAPTURE`). An upset lasting only a few nanoseconds between two edges is therefore still
reported, with a duration of 0 cycles.

This has a blind spot. Suppose two upsets on the same static bit invert it the same way. Then the
second upset does not make its two neighbours equal, and it is not counted. Faults on different
bits, or ones that undo an earlier inversion, are each counted.

## Measuring delay (`network_analyzer`)

The toggling bit is launched at the rising edge. The analyzer captures the toggling bit of all
monitored sensors at the **falling** edge, 20 ns later at 25 MHz, and checks the capture at the
next rising edge. The reference is the counter LSB: sensor *m* should show `lsb ^ m[0]`.

- **Delay fault.** A mismatch is a delay fault. It is counted only when no upset is present in
  the network and none is waiting to be reported. An upset on the static bits would otherwise
  also disturb this check and be reported as a false delay.
- **Delay value.** The analyzer scans from the end of the chain for the first two neighbouring
  sensors whose toggling bits are *equal*. Those two sensors mark where the edge stopped. The
  delay value is the 1-based number of the later sensor of the pair:
  - 25 means only the last sensor missed the edge.
  - 13 means the edge got through 12 monitored sensors.
  - 0 means a mismatch was seen but no such pair was found.
- **Worst value kept.** The analyzer keeps the smallest non-zero value seen since the last
  report, which is the worst slowdown.

**Turning a delay value into a slowdown.** Suppose the chain is tuned so that the edge reaches the
last sensor with very little slack at the falling edge. Then each step the value drops is one more
sensor stage that no longer fits into the half period. In the original implementation (Virtex-4,
25 MHz, 20 ns half period), one stage took about 0.67 ns, which left about 0.57 ns of slack over
29 stages.

`tb_delay_sweep` models exactly that chain with real stage delays and slows every stage
uniformly. It gives:

| uniform slowdown | 0–2 % | 3.4 % | 6 % | 9.9 % | 13 % | 16.3 % | 20.7 % | 25 % | 40 % |
|------------------|-------|-------|-----|-------|------|--------|--------|------|------|
| delay value      | none  | 25    | 25  | 24    | 23   | 22     | 21     | 20   | 18   |

This holds only for a particular placement. Routing changes stage delays from chain to chain, so
every build has to be calibrated again. The RTL reports positions, not percentages.

## Fault code

Each analyzer presents one 32-bit code. The code is all zeros when the network has no fault.

| bits  | field | meaning |
|-------|-------|---------|
| 31:28 | network | 0 … 14, printed `0` … `E` |
| 27:26 | `11` | a fault is present |
| 25    | type | 1 = upset, 0 = delay |
| 24:20 | amount | faulty sensors (upset) or delay value (delay) |
| 19:0  | duration | cycles with the fault present since the last report; saturates at 2^20 − 1 (about 42 ms) |

Printed as eight hex digits, the second digit reads `E`/`F` for an upset and `C`/`D` for a delay.
The amount's top bit spills into that digit. Examples:

- `5E300020`: three faulty sensors in network 5, present for 32 cycles.
- `AD900004`: a delay in network 10 where only the last sensor missed the edge (value 25), for
  4 cycles.

## Reporting (`fault_reporter`) and what it costs

The reporter goes round the networks in order 0 … 14:

1. It raises the network's `hold`. While held, the analyzer does not update, so the code cannot
   change while it is sent.
2. A zero code is skipped after one cycle.
3. A non-zero code is handed to the printer as a record. When the printer accepts it, the
   reporter pulses the network's `clear`.

After network 14 come two more slots:

- **Timestamp.** A timestamp record is sent if any code was sent in this round. It is also sent
  if a `time_check` pulse has arrived since the last timestamp, even when nothing failed.
  `time_check` pulses every 5 minutes.
- **Memory.** A memory word that has lost its pattern is sent.

**Lost cycles.** The printer is slow: a code line takes about 0.43 ms. Faults that happen in a
network while it waits with `hold` high are not counted. In practice a network is blind for the
length of one line out of every round. The end-to-end testbench checks this exactly. For every
network, the summed durations of its reports must equal the cycles its fault was present and the
network was not held.

**The counter.** `cycle_counter` provides both the toggling bit and the timestamp. It counts
clock cycles and returns to zero every 15 minutes (22.5 × 10^9 cycles at 25 MHz, so 35 bits
wide).

## Block memory check (`bram_checker`, `bram`)

An 8 KB memory, 2048 words of 32 bits, is checked for bit flips:

- After reset, the checker writes `0x55555555` into every word. The alternating ones and zeros
  make flips to 1 and flips to 0 equally visible.
- It then reads the words round and round, two cycles per word.
- A word that differs is handed to the reporter.
- Once the reporter has taken the word, the checker writes the pattern back, so each flip is
  reported once.

The memory has no per-word location on the die and no duration, so a memory report carries only
the bad word.

The upset port (`bram_upset_*`) writes `0x55555555 ^ upset_xor` into one word. This has the same
effect as flipping those bits. It is there for tests.

## Text output (`report_uart`)

Each record becomes one ASCII line ending in CR LF. Lines are sent 8N1 at 230400 baud. The bit
time is round(CLK_HZ / BAUD) = 109 clocks.

```
5E300020                 fault code
T00000ABCD               timestamp (counter value, nine hex digits)
Invalid BRAM 55545555    memory word that lost its pattern
```

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `asn_top` | `NUM_NETWORKS` | 15 | chains (at most 16, one hex digit) |
| `asn_top` | `CLK_HZ`, `BAUD` | 25 000 000, 230 400 | clock and serial rate |
| `asn_top`, `cycle_counter` | `WRAP_CYCLES` | 22 500 000 000 | counter period (15 min) |
| `asn_top`, `cycle_counter` | `CHECK_CYCLES` | 7 500 000 000 | time-check period (5 min) |
| `asn_top`, `bram_checker`, `bram` | `BRAM_WORDS` / `WORDS` | 2048 | 32-bit words checked (8 KB) |
| `sensor_network` | `NUM_SENSORS`, `NUM_MON` | 29, 25 | sensors per chain, monitored ones |
| `sensor_network` | `SITE_POS` | {4, 12, 20} | monitored sensors used as injection sites |
| `network_analyzer` | `NUM_MON`, `NET_ID` | 25, 0 | chain length, network number in the code |

Types and fixed widths (the 20-bit duration, the 35-bit counter, the record format) are in
`rtl/asn_pkg.sv`.

## Where this RTL departs from the original design

- **No processor.** In the original system an embedded processor sequences the reporting, fills
  and reads the memory, and drives the serial port. Here `fault_reporter`, `bram_checker` and
  `report_uart` do those jobs as state machines.
- **Glitch capture.** The original analyzer also reacts to changes of the sensor outputs between
  clock edges. Here this is done with flip-flops that a failed comparison loads asynchronously
  (`ASYNC_CAPTURE = 1`, the default). A glitch that falls between two edges is reported with a
  duration of 0 cycles, because durations count rising edges. On an FPGA, these asynchronous
  loads need timing care of their own.
- **Synthesizable delay injection.** The original delay injection was a 10 ns simulation wait,
  and it could not be built. Here it is a one-cycle-late copy of the toggling bit. It exercises
  the detection logic, but it does not model a real partial slowdown.
- **Injection from ports.** Injection is controlled from the top-level ports. In the original,
  faults were switched on at a fixed time after start.
- **Choices made here.** The following are this design's choices: zero codes are skipped, the
  worst delay value is kept, the timestamp and memory line formats, and the positions of the
  injection sites.
- **Delay value as a position.** The delay value is the position where the edge stopped, so a
  smaller value means more delay. Calibration results of the original are sometimes quoted as a
  count of late sensors instead (1 for a slightly slow chain). That count is 26 minus the value
  reported here.
- **Network count.** The original description speaks both of 14 and of 15 networks. Fifteen
  matches its network numbers `0` … `E` and is used here.

## Files

| file | contents |
|------|----------|
| `rtl/asn_pkg.sv` | shared constants, `inj_ctrl_t`, report record type, code assembly |
| `rtl/sensor.sv` | one inverter sensor with injection mask |
| `rtl/sensor_network.sv` | 29-sensor chain with buffers and three injection sites |
| `rtl/network_analyzer.sv` | upset and delay detection, counts, durations, code |
| `rtl/cycle_counter.sv` | timestamp counter, test vector, 5-minute time-check |
| `rtl/fault_reporter.sv` | round-robin freeze / send / clear sequencer |
| `rtl/report_uart.sv` | record-to-text conversion and 8N1 serial transmitter |
| `rtl/bram.sv`, `rtl/bram_checker.sv` | 8 KB memory and its pattern checker |
| `rtl/asn_top.sv` | the whole system |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_asn_top_body.svh` | shared end-to-end scenario for `tb_asn_top`, `tb_asn_top_full` and `tb_injected_fault_test` |
| `tb/slow_chain.sv` | behavioural, non-synthesizable chain with real stage delays, for `tb_delay_sweep` and `tb_chain_length_trial` |

## Simulating

Every testbench ends with a line `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_asn_top_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/asn_pkg.sv tb/tb_asn_top_full.sv
./obj_dir/Vtb_asn_top_full
```

Replace the top module and file to run any other testbench. The delays in the testbenches are
in nanoseconds, hence `--timescale 1ns/1ps`; the behavioural chain needs the picosecond
precision.

**End-to-end scenario.** `tb_asn_top_full` runs the system with every parameter at its default.
`tb_asn_top` shortens the counter and time-check periods so that those also happen. Both runs
include:

- single, double and triple upsets;
- delays at each injection site;
- an upset on top of a delay;
- a one-cycle upset;
- a fault long enough to be reported several times;
- two quiet networks;
- two memory flips.

Each record is checked for network, type and amount. Each network's durations are checked
against its fault windows. The serial line is decoded and compared, character for character,
with the records.

**Injected-fault test.** `tb_injected_fault_test` puts a stuck-at fault into every network for
65 536 cycles and checks the same way. It also measures the blind time, the share of faulty cycles during which
a network was frozen for reporting. It comes to 6.6 %, close to one slot in sixteen.

**Delay sweep.** `tb_delay_sweep` drives one analyzer from `tb/slow_chain.sv`, a behavioural chain
with real stage delays. It checks the delay value against the slowdown, as tabulated above.

**Chain-length trial.** `tb_chain_length_trial` repeats the calibration used to find the stage
delay: chains of 29, 31, 33 and 35 sensors at 0.67 ns per stage run side by side. The extra
sensors go in pairs after the first monitored sensors. The 29-sensor chain reports nothing. The
others report 24, 22 and 20: with equal stages, two extra sensors move the reported position two
sensors earlier. On real silicon the step was smaller and varied from build to build, because
routing changes with every build. The model has no routing.

**Unit testbenches.** Each one compares its module with an independent reference: an exhaustive
check for the sensor, a random check against a modelled chain for the chain, and a UART receiver
for the printer.

## How far it can be trusted

- **Tested.** All modules pass lint with Verilator (`-Wall`) and elaborate with the slang front
  end of Yosys. Every testbench passes. Each testbench has also been seen to fail against a
  deliberately broken copy of its module.
- **Not tested.**
  - Real delay behaviour: that needs placed-and-routed silicon and calibration.
  - The glitch capture on real hardware. It is simulated only with zero-delay logic and one
    injected 5 ns pulse.
  - The 5-minute and 15-minute periods at their full length: they are covered only at shortened
    periods.
