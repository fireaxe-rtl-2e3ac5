# Partitioned FPGA simulation: the token machinery in SystemVerilog

When a design is too big for one FPGA, you can still simulate it cycle by
cycle on several FPGAs. Cut the design at some module boundary. Wrap each piece
so that its clock no longer runs freely. The wrapped piece advances one
*target* cycle only when it has the values it needs from the other pieces.
Those values travel between FPGAs as *tokens*, one per signal group per target
cycle, over a cable or PCIe. This is the approach of FireAxe, a partitioned
extension of FireSim. Its compiler makes the cut and adds the wrappers
automatically.

This repository holds the hardware that such a wrapper is made of. It also
holds small example targets that show the two partitioning modes and the
multithreading trick:

* **LI-BDN wrapper parts**: channel queues, the per-output FSM and the fire FSM
  that advances the target cycle.
* **Exact mode**: a two-FPGA split with combinational paths across the cut. It
  stays cycle-exact by giving source ports and sink ports separate channels.
* **Fast mode**: a two-FPGA split of a ready-valid interface. Each channel is
  seeded with one token, so both halves compute in parallel. The interface is
  rewritten (gated valid, skid buffer) so that backpressure survives the extra
  cycle of latency.
* **Token transport**: serializing tokens onto an AXI4-Stream link and back.
* **FAME-5**: N identical tiles simulated by one shared datapath, one thread
  per host cycle.
* **NIC latency counters**: the counters used to measure bus
  request-to-response latency in the leaky-DMA case study.

The large targets FireAxe was used on are not here: BOOM cores, ring NoCs, SoCs
and accelerators. Neither are the compiler or the vendor link IP (Aurora/QSFP,
PCIe peer-to-peer). The streams that would run over those links are ports of
the top module.

## Tokens, channels and the firing rule

Every input and output of a wrapped partition becomes a *channel*. A channel is
a valid/ready queue of tokens (`token_queue`). Two small controllers decide when
things happen:

* `libdn_output_fsm`: one per output channel. It offers the output token once
  every input channel that the output depends on *combinationally* holds a
  token. For an output driven only by registers, that is immediately. It keeps
  one bit, `fired`, so that the token is sent only once per target cycle.
* `libdn_fire_fsm`: advances the target cycle (`fire`) in a host cycle where
  all input channels hold a token and every output has fired or is firing now.
  In that host cycle the target registers update, all input tokens are
  dequeued and the output FSMs re-arm. It also counts target cycles.

The wrapped target's registers are written only on `fire`. A target cycle may
take any number of host cycles. Its result is the same regardless.

## Exact mode: why source and sink ports get separate channels

If all of a partition's inputs share one channel and all its outputs share
another, a combinational path across the cut in both directions deadlocks.
Each side waits for the other's whole output token before it can produce its
own.

The example target (`exact_part1`, `exact_part2`) is built to hit this case:

```
partition 1                         partition 2
  X (reset 1)                         Y (reset 2), constant K = 6
  C = X            ---- source ---->  B = C + K   (combinational on C)
  D = A + X        ---- sink   ---->  Y <= D + K
  X <= B           <--- source ----   B
  A (into D)       <--- sink   ----   A = Y
```

Ports that feed only registers, or are driven only by registers, are *source*
ports. Ports on a combinational path are *sink* ports. Each class gets its own
channel. One target cycle then runs in two exchanges:

1. C (= X) and A (= Y) need no inputs and leave at once.
2. When A arrives, partition 1 sends D = A + X. When C arrives, partition 2
   sends B = C + 6.
3. Both sides now hold all inputs and fire: X <= B, Y <= D + 6.

From reset the first cycle sends A = 2, C = 1, then D = 3, B = 7, and ends with
X = 7, Y = 9. In general X <= X + 6 and Y <= Y + X + 6. The end-to-end test
checks this recurrence against the registers and the C token of every cycle.
The price is two link crossings per target cycle. FireAxe's compiler refuses
cuts that would need more than two.

## Fast mode: seed tokens and the ready-valid rewrite

This is the subtle part of the design.

Fast mode gives each side one input channel and one output channel. Every
input channel starts out holding one *seed* token (`token_queue` with `SEED =
1`). Both sides can then simulate cycle 0 at once and exchange results, so a
target cycle costs one crossing instead of two. The seed also delays every
signal across the cut by one target cycle. Credit-based interfaces tolerate
that; a ready-valid handshake does not. Follow the signals:

* The sink produces ready `R` in target cycle n.
* The source sees it in cycle n+1.
* A valid the source sends in cycle n+1 reaches the sink in cycle n+2.

An unmodified source keeps asserting valid while the stale ready is high, so
one entry is delivered twice. An unmodified sink can also receive a beat it no
longer has room for. Two rewrites fix this:

* **Source side (`fast_src_part`)**: the valid sent is `valid && R`, where R is
  the delayed ready. The head entry leaves the source queue exactly when that
  gated valid is sent, so each entry is sent once.
* **Sink side (`skid_buffer` inside `fast_sink_part`)**: every arriving beat
  goes into a skid buffer. The buffer drains into the real sink queue when that
  queue is not full. The R it sends back is a *promise*: R is asserted only if
  the beats the buffer will hold after this cycle, plus the beat still in
  flight from last cycle's promise, plus one more, fit in `DEPTH`. With
  `DEPTH = 3` a sink that drains every cycle still gets one beat per target
  cycle. The buffer never overflows; an assertion checks this.

The seed values follow the fast-mode description: R = 0 on the source side
and {V = 0, D = don't care} on the sink side. The example source queue has 3
entries and the sink queue 2. A stand-in producer writes 0, 1, 2, ... into the
source queue. A stand-in consumer takes one entry every second target cycle.
The sink therefore fills up, and the gate, the skid buffer and backpressure
all come into play.

Fast-mode results are cycle-exact with respect to the *rewritten* target, not
the original. The boundary adds one cycle each way.

## Moving tokens between FPGAs

`link_tx` takes the output channels of one partition and sends their tokens
over one AXI4-Stream:

* A token of `TOK_W` bits becomes `ceil(TOK_W / LINK_W)` beats, least
  significant beat first.
* Every beat carries the channel number in `tdest`, and the last beat has
  `tlast`.
* Channels are served round robin. Capturing a token costs one idle cycle.

`link_rx` reassembles the beats and offers the token on channel `tdest`. It
back-pressures the stream until that channel takes the token.

`LINK_W` defaults to 512, the width of the host PCIe DMA path. Wide partition
boundaries cost beats: a 7000-bit boundary is 14 beats per token. This is why
the fast-mode gain shrinks as the cut gets wider.

## FAME-5: threading duplicate tiles

`fame5_threads` holds the state of `N_THREADS` identical tiles (default 6) in a
register array. It has one adder and one state read port. A round-robin
pointer picks a thread. For that thread it:

1. sends the thread's output token (its `acc` register);
2. when the thread's input token is present, writes `acc + input` back;
3. moves to the next thread.

Each thread keeps its own input and output channels. With all tokens present,
one target cycle of six tiles takes exactly six host cycles. Those extra
cycles are small compared with an inter-FPGA round trip, so threading tiles
behind a partition boundary costs almost no simulation speed. The accumulator
tile is a stand-in; FireAxe threads whole core tiles this way.

## NIC latency counters

`bus_latency_counter` keeps read counters at index 0 and write counters at
index 1. For each it counts requests, responses, the requests outstanding, and
a latency sum. Each cycle the sum grows by the number of requests outstanding
at the start of that cycle. A request issued in cycle a and answered in cycle b
therefore adds exactly b - a. Once nothing is outstanding, the average latency
is `lat_sum / resp_count`. Software does that division.

## The top level

`fireaxe_top` places the three partitioned examples and the counters side by
side on one clock:

| group | blocks | streams to connect |
|---|---|---|
| exact mode | `exact_part1`, `exact_part2`, 2x `link_tx`, 2x `link_rx` | `ex_p1_tx` to `ex_p2_rx`, `ex_p2_tx` to `ex_p1_rx` |
| fast mode | `fast_src_part`, `fast_sink_part`, 2x `link_tx`, 2x `link_rx` | `fm_src_tx` to `fm_sink_rx`, `fm_sink_tx` to `fm_src_rx` |
| FAME-5 | `fame5_threads`, `link_tx`, `link_rx` | `f5_tx` / `f5_rx` go to the partner partition |
| counters | `bus_latency_counter` | `lat_*` |

Tying each tx directly to its rx closes a loop. In a real system a
transceiver and a cable sit in between. Observation outputs give the target
registers, target cycle counts and fast-mode events. Reset is synchronous and
active high everywhere.

Default sizes: `LINK_W = 512`, 32-bit example tokens, `N_THREADS = 6` with
64-bit tile state. Synthesized, the top is about 870 word-level cells and 5.8k
flip-flops. Most of those flip-flops are the 512-bit beat registers.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert rtl/fireaxe_pkg.sv -y rtl -y tb \
    tb/tb_fireaxe_top.sv --top-module tb_fireaxe_top
./obj_dir/Vtb_fireaxe_top
```

Replace `tb_fireaxe_top` with any other testbench name to run it. Each block
has one testbench, `tb_<module>`.

`tb_fireaxe_top` runs the top at its default parameters. It closes every
stream through `axis_link_model`, a behavioural link with a 20-cycle latency.
A behavioural partner answers the FAME-5 partition. It checks that:

* the exact-mode registers and tokens follow the recurrence, and each target
  cycle takes at least two crossings;
* the fast-mode consumer sees every entry once and in order;
* the seed tokens let both sides finish their first cycle before any token
  crosses;
* the valid gate, the skid buffer and a full sink queue each occur at least
  once;
* fast mode runs at least 1.5 times the exact-mode rate (measured: 47 versus
  20 host cycles per target cycle, about 2.3x);
* the FAME-5 threads answer in round-robin order with their own state;
* the latency counters produce the expected sum.

The run takes well under a second.

`tb_wide_boundary` builds the exact-mode pair with 7000-bit tokens. That is
roughly the boundary width when a large out-of-order core is split between
its front end and back end. It checks the following:

* each token is 14 beats on the 512-bit stream;
* the wide registers keep the recurrence, with carries across the full width;
* one target cycle costs two crossings plus two 14-beat serializations. The
  run measures 73 host cycles per target cycle with a 20-cycle link.

## How far to trust it, and where it departs from FireAxe

Tested: each block against a model in its testbench, with random traffic and
back-pressure where it applies. Each testbench was also run against a
deliberately broken copy of its block and caught the fault.

Taken from the FireAxe description:

* the LI-BDN firing rules;
* the exact-mode port classes and the worked example's values;
* fast-mode seeding with R = 0 and (X, 0);
* the valid && ready rewrite and the sink-side skid buffer;
* the 3-entry source queue and 2-entry sink queue;
* 512-bit PCIe DMA width;
* six threads per FAME-5 partition;
* separate read and write latency counters.

Choices of this design, where the description is silent:

* queue depths (2);
* skid buffer depth (3) and its exact grant rule;
* token framing on the stream (`tdest`, `tlast`, beat order, round robin);
* data widths;
* the stand-in producer, consumer and accumulator tile;
* the counter method and widths;
* synchronous reset.

Differences to keep in mind:

* In the real flow a compiler generates the wrapper for any target. Here the
  wrappers are written by hand for the example targets.
* The exact-mode example sends both of a partition's channels over one stream
  in round robin rather than as one concatenated token.
* `link_rx` holds one finished token at a time. Consecutive tokens for a
  channel that is not draining therefore block the stream.
* Link latency, Aurora/QSFP framing and PCIe peer-to-peer transfers are only
  modelled behaviourally in the testbench.
