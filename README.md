# Dynamic-priority output arbiters for a NoC router

In a network-on-chip router, several input ports often want the same output
channel in the same cycle, and an arbiter must pick one. A plain round robin
arbiter is fair but blind to congestion. The two arbiters here add a
**dynamic priority**: a priority that changes while the router runs, instead
of being fixed at design time.

* **Dynamic-priority round robin arbiter** (`dprr_arbiter`, wrapped as the bus
  scheduler `dprr_scheduler`). A router that sees more than `T` requests for
  one output is congested. It flags the packets it forwards as high priority
  (`dp_out`), and the next router serves flagged packets first. A modulo-`T`
  counter keeps ordinary packets from starving.
* **Dynamic-priority matrix arbiter** (`dpm_arbiter`). Each requester has a
  programmed 4-bit priority. A live copy of that priority drops by one each
  time the requester wins. Once the requesters have used up their priority,
  all values are restored. The result is a rotating, weighted schedule.

Both arbiters serve four requesters. Each gives one grant per clock, and both
register their `out_en` outputs. `dp_arbiter_top` puts the two side by side;
they share only the clock and reset.

Requester *k* (`req<k>`, `out_en<k>`, `priority<k>`) is always bit *k*-1 of a
vector. So grant `4'b0001` means requester 1.

## The round robin arbiter with dynamic priority

```
 request_in ──┬─────────────► dp_generator ──────────────────────► dp_out
              │
 dp_in ───────┼─► packet_control ── request_in_rr ─► rr_arbiter ─ grant_rr ─┐
 change_rr_   │      │  is_priority ─────────────────►   (2 pointers)        ├─► mux ─► grant
 priority_in ─┘      │  change_rr_priority ──────────►                       │
                     └── bypass (mux select) ─ request_in ───────────────────┘
```

**dp_generator** counts the active requests. It raises `dp_out` when the
count is larger than `T`. This is combinational.

**packet_control** puts every cycle into one of four modes (`pcc_mode_e`):

| mode        | condition                                           | what the RR arbiter sees       |
|-------------|-----------------------------------------------------|--------------------------------|
| `PCC_IDLE`  | no request                                          | nothing                        |
| `PCC_BYPASS`| exactly one request                                 | nothing; the mux passes it on  |
| `PCC_HIGH`  | some `request_in & dp_in` set **and** counter ≠ 0   | only the high-priority requests|
| `PCC_ALL`   | otherwise                                           | all requests                   |

The **priority counter** counts modulo `T`. It steps once per accepted
arbitration (mode HIGH or ALL, `change_rr_priority_in` high) in which at least
one high-priority request was present. While high-priority traffic lasts,
high-priority-only rounds and ordinary rounds therefore follow the pattern
`ALL, HIGH × (T-1), ALL, ...`. With the default `T = 2` they alternate. A
bypass or idle cycle changes no state.

**rr_arbiter** is a pointer-based round robin arbiter. The requester served
last has the lowest priority in the next round. It keeps **two pointers**:
`is_priority` picks the one for high-priority rounds or the one for ordinary
rounds. This matters. With one shared pointer, two high-priority requesters
that alternate with ordinary rounds keep dragging the pointer back to
themselves. The ordinary requesters would then never be served. With
separate pointers, the ordinary rounds rotate over all requesters. Every
requester is then served at least once every `T·N` accepted arbitrations
while it keeps requesting. Tie `is_priority` low and it is a conventional
round robin arbiter.

A worked example from the tests: all four requesting, requesters 1 and 2
flagged, `T = 2`. The grants are `0001 0001 0010 0010 0100 0001 1000 0010`:
ordinary and high-priority rounds alternate, and requesters 3 and 4 still get
their turns.

`change_rr_priority_in` is the accept strobe. On a clock edge where it is high,
the pointer and the counter advance according to the current grant. `grant`
itself is combinational.

### Bus-side scheduler (`dprr_scheduler`)

The published version of this arbiter is a scheduler with bus-style pins:
`haddr[31:0]`, `hburst`, `hready`, `htrans` and `req1..4` in, and
`hmaster[3:0]`, `output_data[31:0]` and `out_en1..4` out. Here:

* A **transfer slot** is a clock edge with `hready && htrans`. In a slot the
  arbiter's grant is accepted and registered. The registered grant drives
  `out_en` and `hmaster`, which is one-hot. `output_data` takes `haddr` when a
  master is granted. Outside a slot all outputs hold, which gives AHB-like wait
  states.
* With all four masters requesting and no flags, `hmaster` steps
  `0001, 0010, 0100, 1000, 0001`, one step per slot, and `output_data` equals
  `haddr`. This is the published reference behaviour.
* `hburst` is accepted but does nothing. No function for it is known, and the
  reference run shows the grant rotating with `hburst` high.
* `dp_in[3:0]`, `dp_out` and `rst_n` are **additions** to the published pin
  list. Without them the dynamic priority could not be driven from outside.

## The matrix arbiter with dynamic priority

```
 req, priority ─► dpm_priority_box ─ DP1..4 ─► dpm_comparator ─ CP1..4 ─► dpm_reducer_restorer ─► out_en
                        ▲                                                        │
                        └──────────── dp_next / restore ─────────────────────────┘
```

* **dpm_priority_box** holds the live ("dynamic") priority of every requester.
  After reset, and after each restore, it shows the programmed `priority<k>`
  values directly. A restore therefore always picks up the values present at
  that time.
* **dpm_comparator** builds an N×N priority matrix. Entry (*i*, *j*) is set
  when requester *i* beats requester *j*: a higher live priority, or an equal
  one and a lower input number. The winner is the requester that requests and
  beats every other requester that requests. This is the matrix-arbiter form,
  with the matrix derived from the live priorities rather than stored.
* **dpm_reducer_restorer** registers the winner as `out_en`. It lowers the
  winner's live priority by one. If no requesting input has any priority left
  after that, it tells the box to restore the programmed values.

Under full load, requester *k* therefore receives `priority<k>` grants in every
round of Σ`priority` cycles. Higher values are served first, and ties go to
the lower number. Example with priorities 1, 3, 6, 2 (requesters 1..4):

```
3 3 3 2 3 2 3 4 1 2 3 4 | 3 3 3 2 ...
```

New programmed priorities take effect at the next restore. A requester
programmed with priority 0 is served only when no requesting input with
credit left competes, so it starves under full load. Likewise, a requester
whose live priority has reached 0 waits for the next restore.

## Timing

| block            | request → grant                         | state                                      |
|------------------|-----------------------------------------|--------------------------------------------|
| `dprr_arbiter`   | combinational                           | 2 RR pointers, priority counter            |
| `dprr_scheduler` | registered, 1 clock after a transfer slot | + `hmaster`/`out_en` and `output_data` registers |
| `dpm_arbiter`    | registered, 1 clock                     | live priorities + 1 flag, `out_en`         |

All resets are asynchronous and active low (`rst_n`). After reset, grants
are zero and the pointers point to requester 1.

## Parameters

| parameter | default | meaning                                 | origin                        |
|-----------|---------|-----------------------------------------|-------------------------------|
| `N`       | 4       | requesters                              | published (req1..req4)        |
| `T`       | 2       | DP threshold and counter modulus        | **chosen**; no value published|
| `AW`      | 32      | `haddr` / `output_data` width           | published                     |
| `PW`      | 4       | programmed priority width               | published (priority[3:0])     |

Defaults live in `rtl/dp_arbiter_pkg.sv`.

## What is published and what is chosen here

The published material gives the block diagrams and the pin lists of both
arbiters, reference waveforms and the rules in prose. The following are this
implementation's own readings:

* The value `T = 2`, and one `T` for both the threshold and the counter
  modulus.
* The counter also steps from zero. The prose reads as if it only steps when
  non-zero, but then it could never leave zero.
* `Change_RR_Priority_in` is read as the accept strobe. The output mux is
  read as "bypass when exactly one request".
* The two pointers in the RR arbiter. The published diagram only shows an
  `Is_priority` line going into the arbiter.
* `hready`/`htrans` as the transfer slot. `hburst` has no effect.
* The whole reduce-by-one / restore-when-exhausted rule of the matrix arbiter.
  Only the block's name, "priority reducer / restorer", is given. The rule
  matches the published behaviour: grants rotate, and all four outputs are
  served under full load.
* Ties in the matrix arbiter go to the lower-numbered input.
* Resets, and the added `dp_in`/`dp_out`/`rst_n` pins of the scheduler.

Not built:

* The router around the arbiters: input FIFO buffers, crossbar, five ports.
* The mesh of processing elements and network interfaces. These are
  described only as context, with no sizes, flit format or routing.
* The fixed-priority round robin and matrix arbiters, which were used only as
  comparison baselines.

The published power (0.46 mW / 0.10 mW), gate-count and 4.04 ns pad-delay
figures come from one FPGA flow and are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_dp_generator` – all request patterns, T = 0, 2, 3.
* `tb_rr_arbiter`, `tb_packet_control`, `tb_dprr_arbiter`, `tb_dprr_scheduler`
  – reference models plus hand-worked sequences: the 1-2-3-4 rotation, the
  flagged sequence above, bypass and wait states.
* `tb_dpm_priority_box`, `tb_dpm_comparator`, `tb_dpm_reducer_restorer`,
  `tb_dpm_arbiter` – reference models, and the 1/3/6/2 sequence and shares,
  then the change to 3/7/6/2.
* `tb_dprr_chain` – two round robin arbiters in a row, the upstream `dp_out`
  feeding the downstream `dp_in` of one input. A congested upstream router
  (4 requests) raises that input's share downstream from 8 to 20 of 32 grants,
  and the other three inputs keep 4 each.
* `tb_dp_arbiter_top` – both arbiters at their default parameters, driven
  end to end. It counts that every mechanism occurs: bypass,
  high-priority round, ordinary round, counter wrap, `dp_out`, wait state,
  reduction, restore, tie and priority reload.

Immediate assertions in the RTL check that grants are one-hot and go only to
requesters.

## Simulating

With Verilator 5 (the package first, then the modules):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl --top-module tb_dp_arbiter_top \
    rtl/dp_arbiter_pkg.sv tb/tb_dp_arbiter_top.sv
./obj_dir/Vtb_dp_arbiter_top
```

Replace the top module and testbench file to run any other test. `-Wno-fatal` is needed because the testbenches widen values into their compare tasks, which Verilator reports as width warnings. Lint with
`verilator --lint-only -Wall`. The remaining warnings are unused signals: the
scheduler's `hburst`, status outputs the scheduler does not use, and the
comparator's matrix output.

## Files

`rtl/`: `dp_arbiter_pkg` (constants, `pcc_mode_e`), `dp_generator`,
`packet_control`, `rr_arbiter`, `dprr_arbiter`, `dprr_scheduler`,
`dpm_priority_box`, `dpm_comparator`, `dpm_reducer_restorer`, `dpm_arbiter`,
`dp_arbiter_top`. `tb/`: one `tb_<module>.sv` per module.
