# Clos permutation network with dynamic path setup

Many multiprocessor systems-on-chip move data in *permutations*: every
processing element sends to exactly one other, and every element receives
from exactly one. FFT and sorting give shuffle patterns. Matrix transposes
give transpose patterns. Multi-standard Turbo/LDPC decoders switch between
arbitrary permutations at run time. They also need guaranteed throughput:
no lost data, fixed latency, full bandwidth and in-order delivery.

This RTL is an on-chip network built for that traffic. It does not queue
packets. It **sets up circuits**:

- A source sends a small *probe* into a three-stage Clos network.
- The probe finds a free path by itself. It moves forward over free links
  and moves back when a link is blocked.
- Once the path is set up, the source streams one data word per clock over
  it. There is no buffering, no arbitration and no loss, and the latency is
  fixed.

Path setup happens at run time in hardware, so the permutation can change
whenever the sources change their destinations. Because the network has no
queues, a network instance is small. Several instances could be stacked to
carry concurrent permutations.

The default configuration is the Clos network C(5,5,5), which has 25
inputs, 25 outputs and fifteen 5x5 switches, with a 25-bit data path.

## Topology and port numbering

```
 25 inputs            5 first-stage        5 middle          5 last-stage       25 outputs
 (5 per switch)       switches 5x5         switches 5x5      switches 5x5       (5 per switch)

 src 0..4   ──────▶  F0  ──┐  ┌──▶ M0 ──┐  ┌──▶  L0  ──────▶ dst 0..4
 src 5..9   ──────▶  F1  ──┼──┼──▶ M1 ──┼──┼──▶  L1  ──────▶ dst 5..9
   ...               ...   │  │   ...   │  │   ...
 src 20..24 ──────▶  F4  ──┘  └──▶ M4 ──┘  └──▶  L4  ──────▶ dst 20..24
```

- Network port `p` is port `p % 5` of switch `p / 5`. The same rule holds
  on the input side and on the output side.
- Output `m` of first-stage switch `Ff` feeds input `f` of middle switch
  `Mm`.
- Output `l` of `Mm` feeds input `m` of last-stage switch `Ll`.

There is exactly one link between every first-stage switch and every middle
switch, and between every middle switch and every last-stage switch. A
circuit from input `s` to output `d` therefore has exactly five candidate
paths, one through each middle switch. Choosing the middle switch is the
only routing decision. The middle switch must take the link to `L(d/5)`,
and the last-stage switch must take its port `d%5`.

The sizes are parameters of `clos_network`: `N` ports per outer switch, `M`
middle switches, `R` outer switches per side, and `DATA_W`. C(n,m,r) with
`m >= n` is *rearrangeable*. Any full permutation can be routed, but it may
need a particular choice of middle switches.

## The link: Req, data, Ans

Every link, whether switch-to-switch or network edge, has three parts:

| signal | direction  | width    | meaning |
|--------|------------|----------|---------|
| Req    | downstream | 1        | 1 = this link is requested or held; 0 = released |
| data   | downstream | `DATA_W` | probe while the path is being set up, payload afterwards |
| Ans    | upstream   | 2        | answer from further down the path |

| Ans  | name | meaning |
|------|------|---------|
| `00` | none | no answer yet, or link idle |
| `01` | Ack  | the whole path is set up and the receiver is ready |
| `11` | nAck | the path is set up but the receiver is busy: hold the path, pause the data |
| `10` | Back | the link is blocked: the probe has to move back |

The probe is just the data word with the destination address in its low
`ADDR_W` bits (5 bits for 25 ports). No separate probe wires are needed.
Switches never look at any data bit above `ADDR_W`. During transfer they
pass all `DATA_W` bits unchanged.

A circuit has three phases:

1. **Setup.** The source raises Req, puts the probe on data, and holds the
   probe until an answer arrives.
2. **Transfer.** After Ack, every word the source drives appears at the
   receiver exactly three cycles later. The receiver can answer nAck at any
   time for end-to-end flow control. Because the answer only takes effect at
   the source, up to three words that are already in flight still arrive.
3. **Release.** The source drops Req for at least one cycle. Each switch
   frees its link one cycle after its input Req falls, so the release moves
   down the path one switch per cycle, behind the last data word.

If the source receives **Back** during setup, no path was available at that
moment. The source must drop Req and try again later. The test sources wait
a random 1 to 9 cycles.

## How a probe finds its path

This part of the design does the real work. Each input of each switch has
an *input control* (IC) that runs a small state machine:

| state  | meaning |
|--------|---------|
| idle   | no circuit |
| setup  | first stage only: looking for another middle switch |
| hold   | owns one output of the switch; its Req and data go downstream |
| reject | blocked here; answers Back until Req falls |

How the IC picks an output is the only difference between the three kinds
of switch (`STAGE` parameter):

- **First stage** (`STAGE_FIRST`) uses *exhausted profitable backtracking*.
  All five outputs lead towards the destination. The IC asks for the
  lowest-numbered output that is free and not yet tried in this setup. The
  output is marked as tried when:
  - the IC loses arbitration for it, or
  - a **Back** comes up from the middle or last stage after the IC took it.
    The IC then releases the link (its downstream Req goes to 0) and tries
    the next output.

  When no free, untried output is left, the IC answers Back to the source.
  A Back from below is never passed to the source; the IC absorbs it and
  retries. So every path through a middle switch is tried at most once per
  setup.
- **Middle stage** (`STAGE_MIDDLE`) has one profitable output,
  `addr / N`. If that output is busy or lost in arbitration, the IC answers
  Back. A Back from the last stage is passed up unchanged.
- **Last stage** (`STAGE_LAST`) has one profitable output, `addr % N`.
  Busy or lost also gives Back.

Example: input 0 of `F0` wants output 22 on `L4`, and the link `M0→L4` is
held by another circuit. Let edge 0 be the rising edge on which the source
raises Req.

```
edge 1   F0 took M0: Req/probe on link F0→M0
         M0: link M0→L4 busy → M0's IC answers Back; F0 sees it at once
edge 2   F0 has released F0→M0 and marked M0 tried
edge 3   F0 took M1: Req/probe on F0→M1
edge 4   M1 took M1→L4
edge 5   L4 took port 2 → receiver answers Ack → Ack reaches the source
         in the same cycle
edge 6   source drives the first payload word
```

With no contention, Ack reaches the source during the third cycle after
Req rises: one switch per cycle. A probe that finds its only link busy is
answered Back in the cycle it arrives. A probe that loses arbitration is
answered one cycle later. The first-stage switch needs two cycles after a
Back to move on: one to release the link and one to request the next. So a
link blocked at a middle switch costs two cycles, one blocked at a
last-stage switch costs three, and a lost arbitration adds one more.

**The limit of rearrangeability.** C(5,5,5) can route every full
permutation, but only with suitable middle switches. The probe searches
every middle switch while the other circuits stay where they are. It never
moves an existing circuit. So a setup can fail even though the network
could carry the whole permutation: all five middle switches can be blocked
for this destination by circuits that were set up earlier. The source then
gets Back. It will succeed once some of those circuits are released. In the
random full permutations of the end-to-end test this happens often while
many circuits are being set up at the same time, and every transfer still
completes. The hardware never rearranges circuits to make room. If the
blocking circuits are never released, the blocked source keeps getting
Back. A system that keeps a full permutation up for a long time should
either tear it down and rebuild it, or set up its circuits in an order that
is known to route.

## Inside a switch

`clos_switch` has the same structure for all three kinds:

```
 in_req/in_data ──▶ IC 0..NI-1 ──request bus──▶ ARBITER ──control bus──▶ OC 0..NO-1 ──▶ out_req/out_data
                        ▲  ◀── status bus ───────┤   │                      ▲
 in_ans ◀───────────────┘  ◀── grant bus (Ans) ──┘   └──▶ CROSSBAR (NI x NO) ┘
                                                ◀── out_ans
```

- **Input control** (`input_control`): the state machine above. It runs on
  the **rising** edge. Its request (`req_valid`, `req_port`) and its
  release (`rel`) are combinational from its state, its input link and the
  status bus.
- **Arbiter** (`switch_arbiter`): runs on the **falling** edge. It keeps an
  ownership table with one entry per output: owned or not, and by which
  input. The table is both the status bus read by the ICs and the control
  bus read by the crossbar and the OCs.
  - On each falling edge it frees the outputs whose owner asks for a
    release. It then gives every other free output to its lowest-numbered
    requester (fixed priority).
  - It flags each refused requester as `lost`. The IC treats a lost
    arbitration like a blocked link. At the first stage it tries the next
    output. At the other stages it answers Back.
  - An output freed on an edge is not given away on the same edge, so a
    downstream IC always sees Req low for at least one cycle between two
    circuits.
  - Through the grant bus the arbiter connects the Ans of each owned
    output combinationally to its owner IC. Answers therefore cross all
    three stages in the same cycle.
- **Crossbar** (`crossbar`): NI x NO output multiplexers, selected by the
  ownership table.
- **Output control** (`output_control`): on the rising edge it registers the
  output's ownership bit as the outgoing Req and the crossbar word as the
  outgoing data. The data is zero when the output is not owned. This
  register is the pipeline stage of the circuit.

Why two clock edges? The IC decides on the rising edge, the arbiter judges
the request half a cycle later, and the OC launches the probe on the next
rising edge. A probe therefore passes one switch per clock, with no extra
cycle for arbitration. The price is paid in timing closure. Two paths must
settle in the half cycle between the rising edge and the falling edge:
- the IC request logic;
- the answer path, which is up to three grant-bus multiplexers plus the
  first-stage release logic.

The grant decision then has the other half cycle to reach the IC and OC
registers.

An IC reads the arbiter's decision only from the arbiter's outputs:
`granted` with `grant_port`, or `lost` with `lost_port`. It does not read
its own request again, because the request has changed by then.

## Using and changing the RTL

Files (one module or package per file):

| file | contents |
|------|----------|
| `rtl/perm_pkg.sv` | Ans and stage enums, default sizes |
| `rtl/clos_network.sv` | top: 15 switches wired as C(N,M,R) |
| `rtl/clos_switch.sv` | one switch: ICs, arbiter, crossbar, OCs |
| `rtl/input_control.sv` | IC state machine and probe routing |
| `rtl/switch_arbiter.sv` | falling-edge arbiter, ownership table, grant bus |
| `rtl/crossbar.sv` | output multiplexers |
| `rtl/output_control.sv` | registered Req and data of one output |
| `tb/tb_*.sv` | self-checking testbenches: one per module, plus the run-time tests |
| `tb/clos_runtime_bench.sv` | parameterised body of the run-time permutation tests |

The top's ports are unpacked arrays indexed by network port: `src_req`,
`src_data`, `src_ans` on the input side and `dst_req`, `dst_data`,
`dst_ans` on the output side. The reset `rst_n` is asynchronous and active
low. Every link is idle after reset.

To simulate, for example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/perm_pkg.sv tb/tb_clos_network.sv --top-module tb_clos_network
./obj_dir/Vtb_clos_network
```

The other testbenches run the same way. Each prints
`TB_RESULT checks=N failures=F`.

- **`tb_clos_network`** runs the network at its default size, with a
  source model on every input and a receiver model on every output. It
  runs a lone circuit, then the backtracking example above, then the
  identity, a 2s mod 25 shuffle, the 5x5
  transpose, four random full permutations, a random partial permutation,
  and a random permutation whose receivers are often busy. All circuits are
  released between patterns. The test checks:
  - every probe address;
  - that every payload word comes from the right source, in order and
    without loss;
  - that every word arrives exactly 3 cycles after it was sent;
  - that setup takes 3 cycles when there is no contention, and 5 cycles
    with exactly one backtrack in the example above;
  - that all links are idle after release.

  It also counts first-stage backtracks, lost arbitrations, Backs that
  reach a source, nAcks and releases, and fails if any of these never
  happened.
- **`tb_clos_runtime`** lets all 25 sources change permutation on their
  own schedule, with no barrier between patterns. Each source runs 24
  circuits of 1 to 16 words to a fresh random permutation. Circuits of old
  and new patterns overlap, so last-stage conflicts, Backs and retries are
  frequent. Receivers answer nAck about one cycle in five. The test checks
  routing, order and 3-cycle latency for every word, and checks that every
  circuit delivered all its words.
- **`tb_clos_runtime_c444`** runs the same test on C(4,4,4), with 16
  ports and 4-bit addresses. It shows that the parameters scale the whole
  design. `tb/clos_runtime_bench.sv` holds the test body for both.
- **`tb_clos_switch`** tests single switches:
  - backtracking over two blocked middle links (Ack after exactly 5
    cycles);
  - one-cycle payload latency;
  - contention at the first and the last stage;
  - release;
  - an exhausted search, in which every middle switch is tried exactly
    once;
  - middle-stage routing, an immediate Back for a busy link, and a Back
    passed up from the last stage.
- **`tb_input_control`**, **`tb_switch_arbiter`**, **`tb_crossbar`** and
  **`tb_output_control`** test the parts against directed sequences or a
  reference model.

The IC and the arbiter contain immediate assertions for the handshake
rules:

- an IC asks only for a free output, and only while it holds none;
- only a first-stage IC gives up a link while its Req is still high, and
  only after a Back.

## Where this RTL fills in or departs from the original description

- **Size.** The original description sets C(5,5,5), a 5x5 crossbar, 25
  test tiles and 25-bit data. It also speaks of a parallelism degree of 16,
  a 4-bit probe address and four middle switches. This RTL follows
  C(5,5,5): 25 ports, five middle switches and 5-bit addresses. The other
  sizes are parameters.
- **Back code.** Ack = `01` and nAck = `11` are as published. Back is
  encoded as `10` here, and `00` means no answer.
- **Arbitration.** The rule is "pre-defined" in the original. Here it is a
  fixed priority: the lowest input number wins.
- **Data pipelining.** The original has the OCs re-time the arbiter's
  commands. Here they also register the data word, so payload and Req
  advance together, one switch per cycle.
- **Chosen here, not published:** the IC state machine, the lost-arbitration
  flags, the rule that freed links are not regranted on the same edge, the
  source rules (hold the probe; keep Req low for at least one cycle between
  circuits; retry after Back), the reset, the idle value of data, and the
  port numbering.
- **Not built:** the test tiles that drive and check traffic on the
  original test chip (the testbenches model sources and receivers instead),
  stacking of several networks, and the physical implementation in a
  0.13 µm standard-cell process.
