# Timed asynchronous controllers

Three clockless controllers: a SCSI protocol controller, the memory-data-load
controller of a memory management unit (MMU), and a DRAM controller that sits
between a synchronous processor bus and a DRAM array. They share one idea.
Every output is a single state-holding gate, a **generalized C-element**. A
pull-up guard makes the output rise, a pull-down guard makes it fall, and
otherwise the gate keeps its value. The guards are kept small by relying on
known **timing bounds**: how fast the environment can answer, how slow the
gates can be, how long a delay line takes. If a transition is always far
enough ahead of another under those bounds, the circuit does not need to
check for it. That saves a literal, which is a transistor pair in CMOS.

So the circuits are *timed*. They are correct only while their environment
keeps to the bounds below. They are not speed-independent. The testbenches
keep to those bounds and check every transition against the full
specification. That includes the orderings the circuits no longer enforce
themselves.

## Reading the gates

A guard is written `g => s↑` or `g => s↓`. `!x` is the complement of x. Each
controller is a set of `gc_element` instances, one per output:

```
gc_element #(.INIT(v)) u_s (.rst(rst), .set_g(<pull-up guard>), .clr_g(<pull-down guard>), .q(s));
```

`gc_element` is a level-sensitive latch. Its enable is `set_g | clr_g` and its
data is `set_g`. This behaves like a transistor network with a weak keeper. The
two guards of a gate must never be true together; in silicon that would be a
short, called interference. No guard includes this gate's own output. The
latches and the combinational loops through them (for example req → rdy → q →
req in the SCSI controller) are the circuit itself, so lint tools report them
on purpose. `rst` is an asynchronous reset to each output's initial value.

Each gate can delay its output by a fixed time (default 0). In the MMU and
DRAM controllers one `GATE_DELAY` parameter sets all gates. The SCSI
controller has one parameter per gate: `REQ_DELAY`, `RDY_DELAY` and
`Q_DELAY`. The design bounds for gate delay are:

* [0,5] units in the SCSI example
* [0,1] ns in the MMU
* [0,2] ns in the DRAM controller

The MMU and DRAM unit testbenches run every gate at the upper end of its
bound. The SCSI testbench runs rdy at 0, req at 2.5 and q at 5. That is the
case where q falls latest relative to rdy. The end-to-end test runs at the
default of zero. With zero delay, a chain of enabled transitions can settle
within one time step, and the testbenches are written for that. Each delay is
an inertial `#` delay, so synthesis ignores it.

## SCSI protocol controller (`scsi_ctrl`)

Inputs `ack` and `go` come from the environment. It answers each controller
transition within [20,50] time units. Outputs `req`, `rdy` and `q` answer
within [0,5]. One cycle:

| transition | enabled by |
|---|---|
| req↓ | ack↑, q↑ (previous cycle) |
| ack↓ | req↓ (environment) |
| rdy↑ | req↓ |
| go↑ | rdy↑ (environment) |
| q↓ | rdy↑ |
| rdy↓ | go↑, q↓ |
| req↑ | ack↓, rdy↓ |
| go↓ | rdy↓ (environment) |
| q↑ | go↓, req↑ |
| ack↑ | req↑ (environment) |

Gates, 10 literals:

| output | pull-up (↑) | pull-down (↓) |
|---|---|---|
| req | `!ack & !rdy` | `ack & q` |
| rdy | `!req & q` | `go` |
| q | `req & !go` | `rdy` |

The timing bounds pay off twice:

* **No q in the rdy pull-down.** q falls 0–5 after rdy rises. rdy can fall
  only after go has risen, which is at least 20 later. So q↓ always comes at
  least 15 (at most 55) before rdy↓. The rule "q↓ before rdy↓" therefore holds
  without a literal.
* **No `!q` in the req pull-up.** Right after req falls, rdy is about to
  rise. Without timing, ack could fall first, giving ack=0, go=0, req=0,
  rdy=0, q=1. In that state `!ack & !rdy` is true and req would rise again,
  so `!q` would be needed in the req pull-up. Under the bounds, rdy rises
  within 5 units and ack falls no sooner than 20, so that state cannot be
  reached.

rdy↑ still needs the context signal q. Without it, `!req` would raise rdy
again right after rdy falls.

Reset gives req=1, rdy=0, q=1, with ack=1 and go=0 from the environment. In
that state req↓ is already enabled, so the controller starts its first cycle
as soon as `rst` drops.

## MMU memory-data-load controller (`mmu_ctrl`)

The MMU turns a 16-bit memory address into a 24-bit real address. The upper
8 bits come from a segmentation register; the 16-bit path goes through an
address comparator. The controller runs one load. Its four-phase handshakes
are:

* processor: `mdli` (request) / `mdlo` (acknowledge)
* segmentation register: `rao` / `rai`, delay [2,9] ns
* address comparator: `bo` / `bi`, delay [2.5,13] ns
* memory interface: `mslo` / `msli`, access time of at least 30 ns, and
  acknowledges withdrawn 5–30 ns after their request
* the processor issues a new request no sooner than 30 ns after the last one
  ended

Sequence: mdli↑ → rao,bo↑ → rai,bi↑ → mslo↑ → (rao,bo↓ → rai,bi↓) and msli↑ →
mdlo↑ → mslo↓ (→ msli↓) and mdli↓ → mdlo↓.

This is the concurrent ordering: rao and bo are released as soon as memory is
requested, not after the processor is acknowledged. It also includes three
*persistence* rules (rao↓ and bo↓ before mslo↓, mslo↓ before mdlo↓). Without
timing it would need a state variable. With the bounds above, 6 of the 15
rules on outputs are redundant, including all three persistence rules. The
rao and bo gates also become identical and are shared:

| output | pull-up (↑) | pull-down (↓) |
|---|---|---|
| mdlo | `mdli & msli` | `!mdli` |
| mslo | `rai & bi` | `mdlo` |
| rao = bo | `mdli & !mdlo & !mslo` | `mslo` |

That is 10 literals. Only this one of the MMU's six cycles is built, because
the other five are not specified. The datapath (comparator, segmentation
register, memory interface) is outside the design: its handshake wires are
ports.

## DRAM controller (`dram_ctrl`, `dram_delay`, `dram_addr_path`)

An arbiter, which is not part of this design, turns the processor bus and a
refresh clock into four active-low requests:

* `asw`: address strobe of a write
* `asr`: address strobe of a read
* `dds`: data strobe
* `rfreq`: refresh request

A delay line (`dram_delay`) provides the only sense of time:

* `a` follows `ras` after [10,20] ns (modelled as 15)
* `b` follows `ras` after [25,35] ns (modelled as 30)
* `c` follows `rfreq` after [20,30] ns (modelled as 25)

The controller works in *fundamental mode*: the next input burst comes only
after the outputs of the previous one. The cycles are listed as input burst /
output burst. ras, cas, we and dtack are active low.

| cycle | step 1 | step 2 | step 3 | step 4 | return |
|---|---|---|---|---|---|
| refresh | rfreq↓ / rfip↑ | c↓ / ras↓ | a↓ b↓ rfreq↑ / rfip↓ ras↑ | | a↑ b↑ c↑ |
| write | asw↓ / ras↓ | a↓ / dtack↓ we↓ selca↑ | b↓ dds↓ / cas↓ | asw↑ dds↑ / ras↑ cas↑ dtack↑ we↑ selca↓ | a↑ b↑ |
| read | asr↓ dds↓ / ras↓ | a↓ / dtack↓ selca↑ | b↓ / cas↓ | asr↑ dds↑ / ras↑ cas↑ dtack↑ selca↓ | a↑ b↑ |

The three cycles are a free choice of the environment. To analyse the timing,
they are chained into one long refresh–write–read loop. This covers every
behaviour because each cycle ends in the same idle state. Gates:

| output | pull-up (↑) | pull-down (↓) |
|---|---|---|
| rfip | `!rfreq` | `rfreq & !b` |
| we | `asw & dds` | `!asw & !a` |
| ras | `rfreq & !b & dtack` or `asw & dds & asr & c` | `!rfreq & !c` or `!asw` or `!asr & !dds` |
| cas | `asw & dds & asr` | `!b & (!asr` or `!asw & !dds)` |
| dtack | `asw & dds & asr` | `!a & (!asw` or `!asr)` |
| selca | inverter on dtack | |

Points that are easy to miss:

* The end of a refresh does not wait for tap `a`. By the time `b` falls, `a`
  has long fallen.
* `dtack` in the first ras pull-up term is the one context signal a refresh
  needs. During a write or a read, `b` falls while `rfreq` is high; `dtack` is
  low then and keeps ras from rising.
* The row-to-column time (ras↓ to cas↓) is set by tap `b`. So it is at least
  25 ns whatever the processor does.

`dram_addr_path` drives the DRAM address pins:

* `row_addr` until `selca` rises, then `col_addr`.
* During a refresh (`rfip` high), the refresh row instead. That row comes from
  a counter that steps by one (INC) at the end of every refresh and wraps
  after 2^ADDR_W rows.

## Top level (`timed_async_top`)

The top holds the three controllers side by side, with one shared `rst`. Port
groups are prefixed `scsi_`, `mmu_` and `dram_`. Inside the DRAM group, the
delay line and the address path are wired to the controller. The only
parameter is `DRAM_ADDR_W` (default 10). Timing bounds shared by the delay
model and the testbenches are in `timed_async_pkg`.

## Files

| file | contents |
|---|---|
| `rtl/timed_async_pkg.sv` | timing bounds (`bound_t`) and nominal delay-line taps |
| `rtl/gc_element.sv` | generalized C-element |
| `rtl/scsi_ctrl.sv`, `rtl/mmu_ctrl.sv`, `rtl/dram_ctrl.sv` | the controllers |
| `rtl/dram_delay.sv` | behavioural delay line (not synthesizable: `#` delays) |
| `rtl/dram_addr_path.sv` | refresh counter and address multiplexers |
| `rtl/timed_async_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
delays need `--timing`. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_scsi_ctrl \
  rtl/timed_async_pkg.sv rtl/gc_element.sv rtl/scsi_ctrl.sv tb/tb_scsi_ctrl.sv
./obj_dir/Vtb_scsi_ctrl
```

The end-to-end test needs every file in `rtl/`, with the package first. It
runs at the top's default parameters and takes a few seconds:

```
verilator --binary --timing -Wno-fatal --top-module tb_timed_async_top \
  rtl/timed_async_pkg.sv rtl/gc_element.sv rtl/scsi_ctrl.sv rtl/mmu_ctrl.sv \
  rtl/dram_ctrl.sv rtl/dram_delay.sv rtl/dram_addr_path.sv \
  rtl/timed_async_top.sv tb/tb_timed_async_top.sv
./obj_dir/Vtb_timed_async_top
```

To change gate delays, delay-line taps or the refresh address width, set
the gate delays on a controller, `A_DELAY`/`B_DELAY`/`C_DELAY` on `dram_delay`
or `DRAM_ADDR_W` on the top. Check the new values against the bounds in
`timed_async_pkg`.

What the testbenches check:

* **`tb_scsi_ctrl`, `tb_mmu_ctrl`**
  * The environment answers after random delays inside its bounds. A
    quarter of the delays sit at each end of the bound.
  * A monitor checks every transition against the complete list of
    specification rules, including the ones the gates leave out.
  * Each output must fire within its bound once enabled.
  * No gate may have both guards true.
  * SCSI: the q↓-to-rdy↓ separation lies in [15,55]. It reaches 15,
    which shows that the bound is tight.
  * SCSI: every state passed through is one of the 16 states reachable
    under the bounds, and all 16 occur. The 4 extra states that an untimed
    analysis allows never occur. Environment delays favour the ends of
    their bound to reach the rare orderings.
  * MMU: the load latency lies within what the bounds allow.
* **`tb_dram_ctrl`**
  * 300 random refresh, write and read cycles.
  * All six outputs are compared after every burst.
  * Every output transition is counted per cycle, so a glitch or misfire shows.
  * The row-to-column time is checked.
  * The delay line runs at its tightest corner: a at 20 ns, b at 25 ns,
    c at 30 ns. The end-to-end test uses the nominal taps.
* **`tb_timed_async_top`**
  * All three environments run at once.
  * DRAM addresses are checked at the row strobe, the column strobe and during
    refresh.
  * The run lasts until the refresh counter has wrapped, about 2,400 SCSI
    cycles and 1,300 MMU loads.
  * It fails if any counted mechanism never occurred: SCSI cycle, MMU load,
    refresh, write, read, row/column switch, counter wrap.

To explore other timings, change the bounds in `timed_async_pkg`. A
testbench that goes outside the bounds the gates were designed for will, and
should, report violations.

## How far to trust it, and where it departs from the original design

* The gates are exactly the published timed guards for:
  * the SCSI req gate
  * all three MMU gates
  * the five DRAM gates

  The SCSI rdy and q gates are not printed there. They were rebuilt from the
  specification's rules and the two context decisions described above. Their
  total, 10 literals, matches the published count.
* **SCSI state space.** In simulation the SCSI controller passes through
  exactly the 16 states of the published timed state graph, never one of
  the 4 states that only the untimed graph has.
* **cas pull-down polarity.** The published DRAM gate drawings disagree on the
  polarity of `asr` in the cas pull-down. `!asr` is used here, because only it
  lets cas fall in a read cycle.
* **DRAM literal count.** The guards are written factored here. For example,
  the cas pull-down is `!b & (!asr | !asw & !dds)`. The published gates are
  sum-of-products, such as `!asr & !b | !asw & !dds & !b`. Counted that way,
  the guards have 34 literals, plus the selca inverter. That gives the
  published 35. A separate selca gate would add six and give 41.
* **MMU context signals.** The published MMU description gives 5 context
  signals in its text and 3 in its summary table. These gates have 3.
* **Choices of this design**, not taken from the original:
  * the latch model of the C-element
  * the reset input and reset values
  * `ADDR_W` = 10
  * the refresh counter stepping on rfip falling, and its reset to 0
  * the delay-line nominal values
  * fixed gate delays (`GATE_DELAY`, or one per gate in the SCSI controller)
  * the upper limits put on open-ended environment bounds in simulation
    (80–90 ns)
* **Not built**, because they are only named or are outside parts:
  * the arbiter that turns the bus strobes and the refresh clock into asw,
    asr, dds and rfreq
  * the MMU's address comparator and segmentation register, and its other
    five cycles
  * processor, memory interface and DRAM array
  * the pipeline handshake and microprocessor controllers, which appear only
    in a results table
* **Timing is not verified.** The simulations use random environment delays
  and two gate-delay cases. In one, every gate has zero delay. In the
  other, the gates have nonzero delays. For the MMU and DRAM every gate is at
  its upper bound. For SCSI, rdy is at 0, req at 2.5 and q at 5. Under these
  cases the logic follows its specification. Other mixes of gate delays are
  not simulated. None of this replaces timing analysis of a real
  implementation. The gates must really switch within their assumed bounds,
  and the delay line must stay inside its bounds.
