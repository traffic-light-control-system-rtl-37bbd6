# Two-way traffic light controller

A crossing of two highways, one running north-south (NS) and one east-west
(EW), is controlled by a single clocked state machine. Each highway has a
red/yellow/green signal head. The controller gives one highway a long green
and then a short yellow. Both highways then get a short all-red clearance
before the other highway gets its own long green. The sequence repeats for
as long as the clock runs. The lamps are one 6-bit vector, `{RYG(NS), RYG(EW)}`,
so each stage is one 6-bit pattern.

## The six stages

| State | `signal` (NS RYG, EW RYG) | North-south | East-west | Dwell limit | Cycles at defaults |
|-------|---------------------------|-------------|-----------|-------------|--------------------|
| S0    | `001 100`                 | green       | red       | LONG_DELAY = 15  | 16 |
| S1    | `010 100`                 | yellow      | red       | SHORT_DELAY = 3  | 4  |
| S2    | `100 100`                 | red         | red       | SHORT_DELAY = 3  | 4  |
| S3    | `100 001`                 | red         | green     | LONG_DELAY = 15  | 16 |
| S4    | `100 010`                 | red         | yellow    | SHORT_DELAY = 3  | 4  |
| S5    | `100 100`                 | red         | red       | SHORT_DELAY = 3  | 4  |

After S5 the controller returns to S0. Bit 5 of `signal` is the north-south
red lamp and bit 0 is the east-west green lamp. At any time at least one
highway shows red, and each head lights exactly one lamp. The sequencer
checks both rules with assertions.

## How long a stage lasts

This is the part most easily misread. Each state has a limit N. The state
holds while the dwell count is below N ("stay while Count < N"), and it
moves on in the cycle the count reaches N. The count is 0 in the first cycle
of a state, so a state with limit N lasts **N + 1 clock cycles**:

- each green stage lasts 16 cycles;
- each yellow and each all-red stage lasts 4 cycles;
- one full round takes 2·16 + 4·4 = **48 cycles**.

The first stage after reset also lasts its full 16 cycles. There is no clock
rate in the design. To get real-time durations, choose the clock, or add a
clock-enable prescaler in front of the controller, so that one cycle is the
time unit you want.

The source specification speaks of three delay lengths: long for red to green, "moderate"
for green to yellow and "very small" for yellow to red. Its state table and
state diagram give only two, a long one and a short one. The two-level
version (15 and 3) is what is built.

## Structure

```
            +---------------- tlc_sequencer ----------------+
 clk, rst ->| state reg S0..S5 --> lamp decode --> lights   |--> signal[5:0], ns_ryg, ew_ryg
            |      ^                  limit select --> limit |--+ stage
            |      | advance (= done)                        |  |
            +------|-----------------------------------------+  |
                   |                                            v
            +------|-------- tlc_dwell_timer -------------------+
            | count <= 0 on clear, else +1 until count == limit |--> dwell_count
            | done = (count >= limit)                           |
            +---------------------------------------------------+
```

- `tlc_pkg`: the lamp type `ryg_t`, the pair `lights_t`, the state enum
  `state_t`, the default dwell limits, and the functions for the next state,
  the lamp pattern of each state and whether a state is long.
- `tlc_dwell_timer`: the cycle counter of the current state. Its `done` is
  a compare of the count register with `limit`, so `done` is valid in the
  same cycle as the count it describes.
- `tlc_sequencer`: the Moore state machine. It selects the limit of the
  current state, passes `done` on as `advance`, and decodes the lamps from
  the state register alone, so the lamp outputs have no glitches from the
  counter.
- `traffic_light`: the top. It connects `advance` to the timer's `clear`, so
  the same clock edge that changes the state restarts the count at 0.

## Interface of `traffic_light`

| Port          | Dir | Width | Meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | clock; everything changes on the rising edge |
| `rst`         | in  | 1     | synchronous, active-high reset to S0 with the count at 0 |
| `signal`      | out | 6     | `{NS red, NS yellow, NS green, EW red, EW yellow, EW green}` |
| `ns_ryg`      | out | 3     | north-south head (`tlc_pkg::ryg_t`), same bits as `signal[5:3]` |
| `ew_ryg`      | out | 3     | east-west head, same bits as `signal[2:0]` |
| `stage`       | out | 3     | current state number, 0..5 for S0..S5 |
| `dwell_count` | out | WIDTH | cycles counted in the current state |

Parameters: `LONG_DELAY` (default 15) and `SHORT_DELAY` (default 3). The
counter width is derived from the larger of the two
(`$clog2(max + 1)`, 4 bits at the defaults).

## What follows the specification and what is chosen here

Taken from the specification:
- the six stages and their order;
- the 6-bit lamp patterns;
- the state names S0..S5;
- the counts 15 (green stages) and 3 (all other stages);
- rising-edge clocking and an active-high reset.

Chosen here:
- **Which highway goes first.** The specification's bit table puts north-south
  in the upper three bits and starts with north-south green. One of its
  tables names the columns the other way round. The bit table is followed;
  the other reading only swaps which half of `signal` is called NS.
- The reset is synchronous and returns to S0.
- A stage lasts N + 1 cycles, as described above.
- The 3-bit binary state code.
- The split into a sequencer and a separate timer.
- The extra outputs `ns_ryg`, `ew_ryg`, `stage` and `dwell_count`.
- The timer holds at its limit if it is not cleared. In the assembled
  controller it is always cleared in that cycle.

Not built: the specification suggests making the delays adapt to traffic
volume, estimated from GPS data or from averages over 20 days. It gives no
inputs, data format or rule for this. The controller uses fixed delays, and
the two parameters are where adaptive timing would plug in.

## Simulating

Every testbench checks itself. It prints one line
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it if it
hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl --top-module tb_traffic_light \
    rtl/tlc_pkg.sv rtl/tlc_dwell_timer.sv rtl/tlc_sequencer.sv rtl/traffic_light.sv \
    tb/tb_traffic_light.sv
./obj_dir/Vtb_traffic_light
```

- `tb/tb_traffic_light.sv` runs the top at its default parameters. It runs
  10 full rounds and resets in the middle of each of the six stages. It
  checks every stage's pattern against the table, its length (16 or 4
  cycles), the 48-cycle round, the dwell count and the no-conflict rule. It
  counts long dwells, short dwells, all-red stages, wraps from S5 to S0 and
  mid-stage resets, and fails if any of them never happens.
- `tb/tb_tlc_sequencer.sv` drives `done` at random. It compares the state,
  lamps, limit and `advance` every cycle against a reference written as
  literal bit patterns. It also checks reset from every state.
- `tb/tb_tlc_dwell_timer.sv` checks that `done` rises exactly `limit` cycles
  after a clear for every limit from 0 to 15. It then compares the counter
  against a reference model under random clears, resets and limit changes.

The whole design is 7 flip-flops (3 for the state, 4 for the count) plus a
few comparators and multiplexers.
