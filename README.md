# DCQCN rate limiter for an FPGA RoCEv2 sender

When many 10 GbE front-end boards push RDMA WRITE traffic into one switch
uplink (an *incast*), the switch queue fills up. Pause frames (PFC) alone keep
the fabric lossless, but they share bandwidth per link rather than per flow, and
they stall innocent flows. DCQCN moves the reaction to the sender that causes
the congestion. The switch ECN-marks packets when its queue grows. The receiver
answers each marked packet with a Congestion Notification Packet (CNP). The
sender cuts its rate on each CNP and climbs back while no CNPs arrive.

This RTL is that sender-side reaction (the DCQCN *reaction point*) for an FPGA
RoCEv2 stack. It sits on the AXI4-Stream transmit path between the RoCEv2
engine and the UDP/IP + MAC. It paces the stream at a current rate `R_C`, and it
recomputes `R_C` from a one-bit "CNP received" signal that the inbound MAC path
raises. All algorithm parameters are AXI4-Lite registers, so the response can be
retuned at run time.

```
               +------------------------- dcqcn_top --------------------------+
 RoCEv2 engine |  s_axis  +--------------------+  m_axis                        | UDP/IP + MAC
 ------------->|--------->| dcqcn_rate_limiter |------------------------------->|------------->
               |          |  credit += R_C     |--- tx_bytes ---+               |
               |          +--------------------+                |               |
               |                   ^ R_C                        v               |
               |   +---------------+-------- dcqcn_module ---------------------+|
 cnp_in ------>|-->| cnp_sync -> CNP event -> alpha_update   (alpha)            ||
 (from MAC rx) |   |                      -> rate_decrease  (R_C, R_T on CNP)  ||
               |   |   timer, bytes    -> rate_increase  (R_C, R_T recovery)   ||
               |   +-----------------------------------------------------------+|
               |           cfg ^      | status (R_C, R_T, alpha, F, #CNP)       |
 AXI4-Lite --->|-------> dcqcn_regs <-+                                         |
               +---------------------------------------------------------------+
```

## The control law

The reaction point keeps three numbers:

* `alpha`, a congestion estimate between 0 and 1. It starts at 1.
* `R_C`, the current rate. It is the ceiling on the egress throughput.
* `R_T`, the target rate that recovery climbs towards.

Both rates start at the 10 Gb/s line rate, so a sender is unconstrained until
its first CNP arrives.

**Estimator (`dcqcn_alpha_update`).** A free-running timer splits time into
alpha-update intervals (40 us by default). At the end of each interval alpha
takes one step:

* if at least one CNP arrived in the interval: `alpha <- (1-g)·alpha + g`;
* otherwise: `alpha <- (1-g)·alpha`.

The gain `g` defaults to 1/256. Repeated congestion therefore drives alpha
towards 1, and quiet periods let it decay towards 0.

**Decrease (`dcqcn_rate_decrease`).** An accepted CNP does two things at once.
It sets `R_C <- R_C·(1 - alpha/2)`, which halves the rate when alpha = 1 and
barely moves it when alpha is small. With ClampTargetRate on (the default), it
also sets `R_T` to the pre-CNP `R_C`. The sender then forgets its earlier,
higher target. With ClampTargetRate off, `R_T` keeps its old value, and the next
recovery step jumps back up sharply.

A CNP is accepted only if the rate-decrease interval (3 us by default) has
passed since the last accepted CNP. Within that cooldown, a burst of CNPs from
one congestion episode counts once.

**Recovery (`dcqcn_rate_increase`).** Two triggers produce *recovery events*:

* a periodic timer with a 2 ms default period. It runs freely: CNPs do not
  restart it;
* a byte counter that fires after a set number of bytes has been sent since
  the last accepted CNP (or since its own last firing).

A stage counter `F` counts recovery events since the last accepted CNP. With the
threshold `T` (5 by default), each event does:

| F before the event | phase                   | update                                    |
|--------------------|-------------------------|-------------------------------------------|
| F < T              | Fast Recovery           | `R_C <- (R_C + R_T)/2`                    |
| T <= F < 2T        | Additive Increase       | `R_T <- R_T + R_AI`, then `R_C <- (R_C + R_T)/2`  |
| F >= 2T            | Hyper-Additive Increase | `R_T <- R_T + R_HAI`, then `R_C <- (R_C + R_T)/2` |

`R_T` saturates at the line rate. As a result, `R_C` never exceeds `R_T`,
and `R_T` never exceeds the line rate. An assertion in `dcqcn_module` checks
this.

If an accepted CNP and a recovery event fall in the same cycle, the CNP wins
and the recovery event is dropped.

The effect is a saw-tooth around the fair share of the bottleneck. Alpha sets
how deep the cuts are. The timer period, the byte threshold, `T`, `R_AI` and
`R_HAI` set how fast the rate climbs back.

## Pacing: how R_C becomes a link rate

`dcqcn_rate_limiter` is a credit accumulator. Every cycle it adds `R_C`, and
every cycle it subtracts the payload bytes that moved on the master side, i.e.
the set `tkeep` bits of the beat. A beat may pass only when the credit covers
its size. Until then, `m_axis_tvalid` and `s_axis_tready` are both held low.
The MAC is the only consumer downstream, so over any window the bytes sent
equal `R_C` times the cycles, give or take the credit cap.

The details:

* The gate is combinational: no register stage, no added latency. It depends
  only on the registered credit and on the `tkeep` of the waiting beat, never on
  `m_axis_tready`.
* While nothing moves, the credit only grows. A beat that is offered therefore
  stays offered, as AXI4-Stream requires.
* The credit starts at zero and saturates at `CREDIT_CAP_BYTES`, two beats by
  default. An idle sender cannot save up a burst.
* At the line rate (`R_C` = 8 bytes/cycle), full beats pass every cycle. A
  partial last beat of a packet still costs a whole cycle, so the throughput is
  slightly below `R_C` there.
* With the enable bit cleared, every beat passes, and CNPs are dropped at the
  input of the reaction point. This is the DCQCN-off mode.

## Number formats

The algorithm is stated in real numbers. The fixed-point encodings here are
this design's own:

| quantity                    | encoding                                   | 1 LSB / example                                |
|-----------------------------|--------------------------------------------|------------------------------------------------|
| `R_C`, `R_T`, `R_AI`, `R_HAI` | bytes per clock cycle, 24 bits, 20 fractional | line rate 10 Gb/s = 8.0 = `0x800000`         |
| `alpha`                     | 17 bits, 16 fractional                     | 1.0 = `0x10000`                                |
| `g`                         | 16-bit fraction                            | 1/256 = 256                                    |
| intervals                   | clock cycles, 32 bits                      | 1 us = 156.25 cycles                           |
| byte threshold              | bytes, 32 bits                             |                                                |

Because rates are stored in bytes per cycle, the credit accumulator adds `R_C`
with no division. To convert a rate, use
`value = bytes_per_s / f_clk · 2^20`. For example, 6 MB/s at 156.25 MHz is
40265, and 1.1 Gb/s is about 922,000.

The constants and the `dcqcn_cfg_t` / `dcqcn_status_t` structs are in
`rtl/dcqcn_pkg.sv`. Its helper functions `us_to_cycles` and `mbps_to_rate`
compute the register reset values from `CLK_FREQ_HZ`.

## Register map (AXI4-Lite, 32-bit)

| addr | name           | access | reset (156.25 MHz)        | meaning                                   |
|------|----------------|--------|---------------------------|-------------------------------------------|
| 0x00 | CTRL           | RW     | 0x3                       | bit 0 enable, bit 1 ClampTargetRate       |
| 0x04 | G              | RW     | 256 (1/256)               | gain g                                    |
| 0x08 | R_AI           | RW     | 40265 (6 MB/s)            | additive increment                        |
| 0x0C | R_HAI          | RW     | 80531 (12 MB/s)           | hyper-additive increment                  |
| 0x10 | ALPHA_INTERVAL | RW     | 6250 (40 us)              | alpha-update interval                     |
| 0x14 | DEC_INTERVAL   | RW     | 469 (3 us)                | CNP cooldown                              |
| 0x18 | INC_INTERVAL   | RW     | 312500 (2 ms)             | recovery timer, 0 = off                   |
| 0x1C | BYTE_THRESHOLD | RW     | 10485760                  | recovery byte counter, 0 = off            |
| 0x20 | F_THRESHOLD    | RW     | 5                         | stage-counter threshold T                 |
| 0x24 | RC             | RO     |                           | live R_C                                  |
| 0x28 | RT             | RO     |                           | live R_T                                  |
| 0x2C | ALPHA          | RO     |                           | live alpha                                |
| 0x30 | STAGE          | RO     |                           | live F                                    |
| 0x34 | CNP_COUNT      | RO     |                           | CNPs received while enabled               |

The bus timing is simple:

* A write is taken when `AWVALID` and `WVALID` are both high. `WSTRB` is
  honoured. `BVALID` follows one cycle later.
* A read returns `RVALID` one cycle after `ARVALID`.
* Responses are always OKAY. Unmapped addresses read as zero, and writes to them
  are ignored.

The reset values are the parameter set used on the three-board incast test
bed, except the byte threshold (see below). Reading RC and RT at about 1 kHz is
enough to overlay the limiter state on a throughput plot.

## Timing

* The clock is a single 156.25 MHz domain: a 64-bit datapath gives 10 Gb/s.
  The reset is synchronous and active high.
* `cnp_in` may be asynchronous. It passes through two flip-flops and an edge
  detector, so a level held high counts as one CNP.
* From the clock edge that first samples `cnp_in` high, `R_C` takes its new
  value three edges later. The limiter paces at the new rate from the next
  cycle.
* Recovery and alpha updates take effect on the edge that ends the cycle in
  which their trigger fires.

## Files

| file | contents |
|------|----------|
| `rtl/dcqcn_pkg.sv` | formats, config/status structs, recovery-phase enum, conversion helpers |
| `rtl/cnp_sync.sv` | CNP rising-edge synchronizer |
| `rtl/dcqcn_alpha_update.sv` | alpha estimator |
| `rtl/dcqcn_rate_decrease.sv` | CNP decrease with cooldown and R_T clamp |
| `rtl/dcqcn_rate_increase.sv` | timer, byte counter, stage counter, FR/AI/HAI |
| `rtl/dcqcn_module.sv` | R_C/R_T registers, ties the four above together |
| `rtl/dcqcn_rate_limiter.sv` | credit pacer on AXI4-Stream |
| `rtl/dcqcn_regs.sv` | AXI4-Lite register file |
| `rtl/dcqcn_top.sv` | the complete block |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/emulated_switch.sv` | test model of a bottleneck: 32 us sliding-window throughput meter that sends CNPs above a threshold |
| `tb/tb_dcqcn_incast.sv` | three complete blocks behind a shared ECN-marking queue (see below) |
| `tb/tb_dcqcn_incast_asym.sv` | the same incast, with one sender slowed down (see below) |
| `tb/tb_dcqcn_tree.sv` | eight complete blocks in a two-tier tree with uneven leaves (see below) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -ytb -yrtl +libext+.sv \
    rtl/dcqcn_pkg.sv tb/tb_dcqcn_top.sv --top-module tb_dcqcn_top -o sim
./obj_dir/sim
```

Replace `tb_dcqcn_top` with any other `tb_*` name to run that testbench.

`tb_dcqcn_top` runs the whole block at its default parameters, closed in a loop
through `emulated_switch`. A saturating source sends sequence-numbered beats in
packets of up to 4096 bytes. The test has five phases:

1. **5 Gb/s bottleneck, sender starting at 10 Gb/s.** The first CNP, at
   alpha = 1, must cut `R_C` to exactly 5 Gb/s and leave `R_T` at 10 Gb/s.
   Later CNPs must cut by `1 - alpha/2`.
2. **Bottleneck lifted.** Fast Recovery, Additive Increase and Hyper-Additive
   Increase bring the rate back to the line rate.
3. **ClampTargetRate off, CNP bursts every 1 us.** `R_T` must survive the
   CNPs, and the cooldown must drop some of them.
4. **Random sink back-pressure.**
5. **DCQCN disabled.** With `R_C` left low, the stream must still run at line
   rate.

Throughout the run, the 32 us window throughput must match `R_C` whenever the
rate has been steady for a full window. Every beat is checked for order and
content, and the monitoring registers are read back. Each mechanism (decrease,
ignored CNP, alpha rise and decay, each recovery phase, each trigger,
throttling, back-pressure, disabled mode) is counted and must occur. The run
takes about 4.6 ms of simulated time and under a second of wall time.

`tb_dcqcn_incast` runs three complete blocks against one 10 Gb/s egress port.
The port has a shared queue that ECN-marks packets above a threshold, and a
receiver that answers marks with CNPs. The marking is RED-like: none below 5000 queued
bytes, rising to 1 % at 200 kB, applied at dequeue. The receiver sends at most
one CNP per flow every 50 us. The blocks use the default parameter set. After
150 ms of settling, the measured rates were 3.1, 3.3 and 3.4 Gb/s, 9.8 Gb/s in
total. When one flow then stops, the other two take about 5 Gb/s each. The test
checks that each flow lies between 2.3 and 4.4 Gb/s, that the sum is at least
9 Gb/s, that the two remaining flows reach 4 to 6 Gb/s each, and that the queue
stays bounded.

`tb_dcqcn_incast_asym` reprograms one of the three senders over AXI4-Lite. It
gets a 200 ms recovery timer, ClampTargetRate off, and no byte counter. The
other two keep the defaults. The slowed sender's `R_T` stays at 10 Gb/s, so
every 200 ms its `R_C` jumps from about 1 Gb/s to above 5 Gb/s. The queue then
fills, a run of CNPs cuts `R_C` back down, and the other two flows take the
bandwidth in between. The test checks the following:

* `R_T` never moves on a CNP;
* there are at least two jumps, each followed by CNP cuts;
* the slowed sender gets the least bandwidth (about 1.2 Gb/s against 3.4 to
  3.6 Gb/s);
* the link stays at least 75 % used.

Each jump makes all three senders back off for some tens of milliseconds, so
this test measured 8.1 Gb/s in total.

`tb_dcqcn_tree` puts eight blocks behind three leaf switches with two, four
and two senders. The leaves feed one root port, and every link runs at
10 Gb/s. Each leaf uplink and the root port has its own RED-marking queue.
PFC is not modelled. If bandwidth were shared per link, as PFC shares it, each
leaf would get a third of the root port, and the four senders on the crowded
leaf would get half the rate of the others. With DCQCN each flow settled
between 1.0 and 1.3 Gb/s, 9.0 Gb/s in total. The crowded leaf's flows got
0.92 times the rate of the others. When seven flows then stop, the last one
climbs steadily through the recovery phases and reaches 10 Gb/s after about
190 ms. The test checks the following:

* each flow gets 0.7 to 1.8 Gb/s;
* the crowded leaf is within 25 % of the others;
* the sum is at least 8.5 Gb/s;
* the climb never falls back and passes 7 Gb/s;
* the queues stay bounded.

These three network tests take 30 to 55 s of wall time each.

## What to trust, and where this departs from the algorithm description

Followed closely:

* equations for alpha, the multiplicative decrease and the R_T clamp;
* the three recovery phases and their two triggers;
* the reset of `F` on CNPs;
* the credit pacer;
* the set of run-time registers and the monitoring outputs;
* the parameter defaults of the hardware test set.

This design's own choices, where the algorithm description leaves room:

* **When alpha steps.** Alpha is updated once per interval, using a flag set by
  any CNP in that interval, rather than immediately on every CNP. The
  rate decrease uses the alpha of the moment.
* **One threshold for the phases.** Only one stage-counter threshold `T` is
  given. Hyper-Additive Increase is taken to start at `2T`.
* **Free-running timer.** The recovery timer fires at fixed intervals
  whatever the CNPs do. Only the byte counter and `F` restart on a CNP. Many
  DCQCN implementations also restart the timer on a CNP. Under steady CNPs
  that version would never let a long timer fire.
* **Merged triggers.** A timer and a byte-counter firing in the same cycle count
  as one recovery event.
* **Default byte threshold.** Its default is 10 MiB, a common DCQCN setting.
  Set the register for your fabric.
* **Cooldown details.** The cooldown runs from the last *accepted* CNP. An
  ignored CNP changes nothing. It does not reset `F` or the byte counter.
* **No rate floor.** `R_C` can decay towards zero. Recovery still works from
  there, because the timer keeps running.
* **Rounding.** Products truncate, except `g·alpha`, which rounds up so that
  alpha can decay to exactly zero.
* **Credit cap.** The cap of two beats is an assumption. A larger cap allows
  short line-rate bursts after idle periods.
* **Register map.** Addresses, field layout, the CNP counter and the STAGE
  register are this design's.

Known differences from the reference implementation this follows:

* The reference module was reported at roughly 1.3 k LUTs, 2.6 k flip-flops,
  18 block RAMs and 5 DSPs on a Kintex UltraScale. This RTL has no memory and
  about 500 flip-flops after generic synthesis. Whatever the block RAMs held
  (buffering, counters for statistics) is not described and is not built.
* The reference sits inside a VHDL network library and uses that library's
  register bus. Here the bus is a plain AXI4-Lite slave.

Not included:

* the RoCEv2 engine, the UDP/IP stack and MAC, the PCS/PMA and any CNP parsing.
  The block only sees the one-bit `cnp_in`, which the receive path must drive.
* switches and receivers, beyond the test models in `tb/`.

## Changing it

* **Datapath width and clock.** `DATA_BYTES` sets the stream width and the line
  rate (`DATA_BYTES` bytes per cycle). `CLK_FREQ_HZ` rescales the register reset
  values.
* **Rate resolution.** Change `RATE_W` and `RATE_FRAC` in the package. At
  least 4 integer bits are needed for 8 bytes/cycle.
* **Recovery phases.** The phase boundaries sit in one `always_comb` block of
  `dcqcn_rate_increase`, if a separate Hyper-Additive threshold is wanted.
