# Absolute delay differentiation: adaptive service-rate control for a class buffer

A router that promises a class of traffic an *absolute* delay bound ("no
packet of this class waits longer than D\*") has to decide, again and again,
how much of the output link to give to that class. Give too little and
packets queue past the bound; give too much and other classes starve. This
design sets the service rate once per time slot from three numbers:

* the backlog now in the class buffer,
* a prediction of how much will arrive during the next slot, and
* the error of the previous slot's prediction (measured minus predicted).

The third term is the point of the scheme. A plain predictor is always
somewhat wrong, and with bursty traffic it is wrong in runs. Adding the last
error back into the next slot's rate means a slot that was under-provisioned
is paid back in the following slot, so the controller tracks traffic changes
instead of lagging them.

The RTL is the hardware form of that controller, as built for an FPGA test
circuit: it generates 100 Mb/s byte traffic, queues it, measures and
predicts it per slot, serves the queue at the computed rate and measures
the delay every byte actually saw. A host CPU sets the target delay, starts
and stops a run and reads the results over an 8-bit bus. By default the
circuit has one class, as the test board does; the `NUM_CLASSES` parameter
builds several classes that share one output link, each with its own
target delay.

## Time base and units

Everything is counted in **ticks** of 12.5 MHz (50 MHz divided by 4). One tick
is one byte time of a 100 Mb/s link, so the link capacity is C = 1 byte per
tick. The buffer holds one entry per byte. Rates are kept as *units per slot*
(rate × T) so that the control law needs no fractions:

| quantity | symbol | RTL | default |
|---|---|---|---|
| slot length | T | `T_SLOT` ticks | 125 (10 µs) |
| target delay | D | `target_us` × 12.5, rounded down | CPU register |
| one byte's service time | L/C | `L_TICKS` | 1 tick |
| measured arrivals of a slot | λ(n)·T | `traffic_measure.count` | 32 bits |
| predicted arrivals | P | `traffic_predict.pred` | 32 bits |
| prediction error | E | `traffic_predict.err` | 33 bits, signed |
| backlog | B | FIFO fill count | 12 bits |
| service rate | G | `service_rate_control.rate` | units per slot |
| other classes' minimum rates | Σ Gmin_j | `service_rate_control.others_gmin` | units per slot |

## The control law

At the end of each slot n−1, for each class i (all in units per slot):

```
prediction   P = ceil( 0.1 * (λ(n-2) + λ(n-3) + λ(n-4)) + 0.9 * λ(n-1) )
error        E = λ(n-1) − P(n-1)                 (what the last prediction missed)
lower bound  Gmin = ceil( T * max(B + P + E, 0) / (D + T − L/C) )
capacity     Gcap = max( C*T − Σ_{j≠i} Gmin_j , 0 )  (what the other classes leave)
upper bound  Gmax = min( Gcap , P + B )          (link capacity, backlog)
rate         G = min(Gmin, Gmax)
```

Where `Gmin` comes from: with a constant rate G during a slot, a byte that
arrives at the end of the slot finds the start-of-slot backlog plus the slot's
arrivals minus what was served, and waits (B + P + E − G)/G slots plus one
byte time. Requiring that to stay under D and solving for G gives `Gmin`.
`Gmax` is the most the link can give the class once every other class has
its own `Gmin`, and the most there is to serve. Because each class takes at
most its `Gmin`, the rates of all classes always add up to at most C·T. Any rate between the bounds meets the target in the fluid model; this
design takes the lowest, so the class uses no more of the link than it needs.
When `Gmin` exceeds `Gmax` the target cannot be met this slot and the rate is
clipped to `Gmax`; the `cap_lim` and `bl_lim` flags say which bound clipped.

The predictor's weights (0.9 on the last slot, 0.1 on each of the three
before it) add up to 1.2, so P runs about 20 % above the true rate on steady
traffic. The error term cancels that bias: in steady state E settles near
−0.2·λ and `B + P + E` tracks the real demand. After a jump in traffic E
turns positive and the next slot's rate overshoots to drain what piled up.

## Serving at the rate

The `scheduler` keeps one accumulator per class and adds that class's G to
it on every tick; each time the accumulator passes T it wraps and the class
earns one credit. So a class earns exactly G credits in any T consecutive
ticks, spread evenly. The link carries one byte per tick. On each tick the
highest-numbered class that holds a credit and has data is served; a class
that loses out keeps its credit in a small counter and is served on a later
tick. With one class a credit is spent on the tick it is earned, so exactly
G bytes are read in any T ticks. A credit that falls on an empty buffer is
dropped rather than saved, so no class bursts above its rate to catch up.

The new rate is computed by a sequential divider and loaded about 55 clock
cycles (14 ticks) after the slot ends; the previous rate applies until then.

## Blocks

One lane per class (`NUM_CLASSES` lanes, one by default), one scheduler and
one CPU interface shared by all lanes:

```
              +--------------+   tick (to every block)
 clk 50 MHz ->| clock_divide |---------------------------------------------
              +--------------+
  lane c      +------------+ wen,stamp +-----------+ rddt,rvalid +---------------------+
              | fifo_write |---------->| sync_fifo |------------>| performance_measure |--> delay_sum[c]
              +------------+           +-----------+             +---------------------+    delay_cnt[c]
                  | now                  ^ ren  | count (B), empty        ^ start/stop
                  v                      |      v                         |
         +-----------------+   +----------------------+  gmin    +---------------+
         | traffic_measure |   | service_rate_control |<-------->| Σ other gmin  |
         +-----------------+   +----------------------+          +---------------+
                  | count        ^ pred, err  | rate[c]
                  v              |            v
         +-----------------+     |     +-----------+  ren[c]  (shared by all lanes)
         | traffic_predict |-----+     | scheduler |---------> back to sync_fifo of lane c
         +-----------------+           +-----------+
                                                     +---------------+
                             target_us[c] <----------| cpu_interface |<--> CPU bus
                                                     +---------------+
```

| module | role |
|---|---|
| `add_top` | the whole circuit, ports as listed below |
| `add_pkg` | widths and the CPU register map |
| `clock_divide` | 50 MHz → 12.5 MHz: divided clock and a one-cycle `tick` enable |
| `fifo_write` | traffic source: ON/OFF bursts from an LFSR; each byte is written as its arrival tick; one per class, each with its own seed |
| `sync_fifo` | a class buffer, 2^12 − 1 words of 32 bits, drops writes when full |
| `traffic_measure` | slot timer; counts arrivals per slot |
| `traffic_predict` | moving-average prediction and prediction error |
| `service_rate_control` | control law above for one class, with a sequential divider |
| `scheduler` | rate-paced reads of all class buffers over the one link |
| `seq_divider` | restoring divider used by the rate control |
| `performance_measure` | sums `now − stamp` of every served byte and counts them |
| `cpu_interface` | host registers, clock-domain crossing, start/stop pulses |

The whole core runs on the 50 MHz clock and advances on `tick`; only the CPU
bus is on its own clock (`cpu_clk`). `rst` is synchronous and active high in
both domains; hold it for a few cycles of each clock.

## Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz |
| `rst` | in | 1 | synchronous reset, active high |
| `cpu_clk`, `cs`, `rw`, `addr` | in | 1,1,1,3 | CPU bus: clock, select (active high), 1 = read, register address |
| `data_i`, `data_o`, `data_oe` | in/out/out | 8,8,1 | bidirectional data bus split in three; drive pins from `data_o` when `data_oe` |
| `ta_n` | out | 1 | transfer acknowledge, low for one `cpu_clk` cycle per bus cycle |
| `ext_start`, `ext_stop` | out | 1 | the start (T) and stop (P) control bits, in the core clock domain |
| `delay_sum`, `delay_cnt` | out | 31 each, array [`NUM_CLASSES`] | measurement results per class, also readable over the bus |

## Using it from the CPU

A bus cycle begins when `cs` is high at a `cpu_clk` edge. A write (`rw` = 0)
takes effect on that edge; for a read (`rw` = 1) `data_o` is loaded on it.
`ta_n` is low during the following cycle; take the read data then and drop
`cs`. The next cycle starts only after `cs` has been low.

| addr | name | access | contents |
|---|---|---|---|
| 0 | CTRL | r/w | bit 0 T (start), bit 1 P (stop) |
| 1 | TARGET | r/w | target delay in µs, 1..255, of the class chosen in SEL |
| 2 | SEL | r/w | bit 0: result bytes show 0 = DELAY_SUM, 1 = DELAY_CNT; bits 6:4: class for TARGET and the results (class numbers past the last select class 0) |
| 3 | STATUS | r | bit 0 measuring, bit 1 a buffer (of any class) overflowed since start |
| 4–7 | RES0–RES3 | r | selected 31-bit result, least significant byte first |

A run: write SEL and TARGET for each class; write CTRL = 1 (the rising T clears the results, opens
the measurement and starts the traffic source); wait; write CTRL = 3 (the
rising P closes the measurement and stops the source, whose last burst
completes); write CTRL = 0 to re-arm. The scheduler keeps draining the buffer
after the stop, but bytes served after it are not counted. Read the results
after the stop; while a run is open they change under the reader. The
average delay in µs is `DELAY_SUM / DELAY_CNT / 12.5`.

## How well it holds the target

`tb/add_top_full_tb.sv` runs the circuit at its default sizes at the target
delays 1, 3, 5, 7, 15, 23, 87 and 255 µs, 100 slots each, with the source at
half load in bursts of 1–4 bytes. Average delays it measures:

| target (µs) | 1 | 3 | 5 | 7 | 15 | 23 | 87 | 255 |
|---|---|---|---|---|---|---|---|---|
| average (µs) | 1.29 | 2.89 | 4.82 | 6.76 | 14.57 | 22.36 | 81.60 | 209.93 |

From 3 µs up the average stays under the target, but only just (about 95 %),
because the controller aims for the lowest rate the target allows. At 1 µs
(12.5 ticks, well under the 125-tick slot) the average is about 30 % over:
the control law treats arrivals inside a slot as a smooth flow, and at a rate
close to the arrival rate the random bursts of the source queue up for
longer than that. Burstier traffic (the end-to-end bench uses bursts of up
to 16 bytes) widens the gap at small targets. Ways to tighten it, not taken
here: a shorter slot, or choosing a rate between `Gmin` and `Gmax` rather
than `Gmin` itself.

The same control law has been reported to give averages of about 50 to
70 % of the target on a test board, for example 0.5 µs at 1 µs and 176 µs at
255 µs. That traffic was different from this design's source, and the slot
length it used is not known, so the two sets of numbers are not directly
comparable. This design runs closer to its targets because it always
takes the lowest rate the bound allows.

With two classes (`tb/add_top_classes_tb.sv`, each source at about a
quarter of the link) the class set to 20 µs averages 19.3 µs and the class
set to 40 µs averages 38.4 µs, whichever of the two lanes carries which
target: the rates, not the scheduler's fixed order, set the delays. When
the classes together offer more than the link, the rates still add up to
at most the link, the buffers overflow and the averages exceed the targets;
the class with the smaller target still sees the smaller delay.

## Design choices not fixed by the algorithm

* **Classes.** One by default, as on the test board. With `NUM_CLASSES` > 1
  each class has its own source, buffer, measurement, prediction and rate
  control; the sources stand in for a classifier, which is not built. All
  classes are absolute-delay classes; proportional classes are not built.
  The capacity bound of each class uses the other classes' `Gmin` of the
  same slot, which is possible because all lanes compute together.
* **Scheduler order**: the highest-numbered class first when two hold a
  credit on the same tick; the credit counter holds up to 15 waiting credits.
* **Slot length** 125 ticks (10 µs), chosen to be longer than the small
  targets yet short enough to follow traffic; any `T_SLOT` from 2 to 65535
  works. The condition T > L/C − D always holds.
* **Traffic source**: ON/OFF bursts from a 32-bit LFSR, `SRC_ON_W`/`SRC_OFF_W`
  giving bursts of 1..2^ON_W bytes and gaps of 1..2^OFF_W ticks (2 and 2 at
  the top, about half load).
* **Delay measurement**: from the tick a byte is written to the clock cycle
  after it is read, so the smallest delay is 2 ticks (0.16 µs). Both results
  saturate at 2^31 − 1.
* **Rounding**: prediction and `Gmin` round up, the target conversion rounds
  down, all on the safe side of the bound.
* **Traffic measurement** counts offered bytes, including any dropped at a
  full buffer.
* **Bus and register map** as above; `cs` active high.
* **Class select** in bits 6:4 of SEL, added for the multi-class build.
* **Clock crossing**: T, P and TARGET pass through two-flop synchronisers;
  results and status are double-registered into the bus domain and are
  meant to be read while static.

## Simulating

Each module has a self-checking bench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module add_top_tb rtl/add_pkg.sv tb/add_top_tb.sv
./obj_dir/Vadd_top_tb
```

Replace `add_top_tb` by any other bench name (`service_rate_control_tb`,
`traffic_predict_tb`, `sync_fifo_tb`, …). The benches:

* `add_top_tb` — end to end with two classes, 63-word buffers and bursty
  load, three runs with target pairs (7, 1), (255, 255) and (1, 23) µs. It
  keeps its own queue of arrival ticks and its own delay sum and count per
  class, compares them with the pins and with the values read over the bus,
  checks that the rates never add up to more than the link, and checks that
  the class with the smaller target sees the smaller delay. It also counts
  every mechanism: slot ends, rate updates, positive and negative
  prediction errors, capacity-, shared-capacity- and backlog-clipped rates,
  buffer overflow, lost service credits, two classes ready on one tick, CPU
  reads and writes. Its two sources together offer about the full link, so
  the buffers overflow and the averages are well above the targets; the run
  shows the ordering, not the bound.
* `add_top_full_tb` — the default-size circuit (one class) at the eight
  targets above.
* `add_top_classes_tb` — two classes at full buffer size, targets 20 and
  40 µs (then swapped), each source at about a quarter of the link. It
  checks both averages against their targets (measured: 19.3 and 38.4 µs,
  whichever class carries which target) and that no buffer overflows.
* `scheduler_tb` — exact read counts per window for one class, and three
  classes against a credit-counting reference.
* one bench per block, each against an independent reference: the control
  law in integer arithmetic, a queue model of the FIFO, the moving average,
  and so on.

Everything is plain synthesizable SystemVerilog; the buffer is a memory array
with a registered read port and maps to block RAM.
