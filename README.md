# G-21 multi-processor memory system

Two central processors share a bank of eight core memory modules. Three kinds
of other users also need those modules: an I/O exchange, a display that must
be refreshed all the time, and the processors themselves. The processors need
a lot of memory bandwidth. The exchange and the display need little, but they
must not be starved.

The design splits the problem in two:

* **A shared processor bus.** Both processors reach every module over one set
  of wired-OR lines. There is one *bus queue control* per processor. Each one
  keeps its own copy of every module's busy state by watching the start and
  finish lines. It decides alone, at each microsecond boundary, whether its
  processor may take the bus. Nothing is centralised. The two queue controls
  share just one piece of state: a priority bit that passes back and forth
  between them on a pair of promote/demote lines.
* **A portal on each module.** Each module's *portal queue control* sits
  between the processor bus and two slow terminals. The high capacity (HC)
  terminal is the bus. The low demand (LD) terminal is the exchange. The
  continuous demand (CD) terminal is the display. The portal fits a slow
  access in behind each processor access, by holding back the finish signal
  that the bus is waiting for. It does this without the processors ever
  knowing that the slow terminals exist.

Two small units complete the system. A memory protection register refuses
writes into protected modules. A pair of flags lets each processor interrupt
the other.

This repository holds synthesizable SystemVerilog for all of these parts. It
also holds a top level that wires two processor ports, the bus and eight
modules together, with one self-checking testbench per part and one for the
whole system. The processors, the exchange and the display are not modelled.
Their terminals are ports of the top level.

## Time base

Everything runs on one clock with **four ticks per microsecond**. The
processors decide once per microsecond. A shared 2-bit phase count `ph`
(`rtl/timebase.sv`) marks the quarters, so every queue control and portal sees
the same boundary (`ph == 0`). The quarter-microsecond resolution is only there
to place the module's pulses where the module timing chart puts them.

## A module access (`core_module`)

Each module holds 8192 words of 32 bits. It is a plain array, so synthesis
infers a RAM. An access is started by a one-tick pulse on `start`. Ticks are
counted from that pulse (tick 0 = 0.25 µs into the processor's microsecond).

| tick | time (µs) | event |
|------|-----------|-------|
| 3 | 1.0 | internal start: address latched, word read |
| 6 | 1.75 | write word sampled |
| 7–14 | 2.0–4.0 | read data driven (`rvalid`) |
| 12–13 | 3.25–3.75 | data available pulse (`dav`) |
| 20–21 | 5.25–5.75 | finish cycle (`fin`) |
| ≥22 | | a new start is accepted (`ready`) |
| 27 | 7.0 | end of the core cycle |

`ready` goes up at the end of the finish cycle. This is before the core has
fully recovered, because a new access spends its first microsecond in
addressing. As a result, back-to-back accesses to one module can run every
24 ticks (6 µs). An assertion flags a start while the module is not ready.
The module count, word count, word width and the ordering of the pulses come
from the source. The exact tick numbers are this design's reading of the
timing charts. The timing names are constants in `rtl/g21_pkg.sv`.

## Bus arbitration and alternating priority (`bus_qc`, `proc_bus`)

This is the least obvious part of the design.

### Lines

`proc_bus` is the wired-OR medium. Each processor drives these lines:

* request
* busy
* promote and demote
* one start line per module
* address and write word
* read/write

Every line a processor is not using is driven to zero, so ORing the two
processors' drives gives the bus value. Each module adds a finish line and a
data available line. The module being read drives the read data. Assertions
check that at most one processor holds busy, that at most one start is up, and
that at most one module drives read data. The bus has no logic of its own
beyond these ORs.

### One access, seen from a queue control

An access that is granted at boundary *t* takes this shape:

* **µs t..t+1:** the request line is up, the start pulse is sent to the chosen
  module in the middle two quarters, and the address and read/write lines are
  driven.
* **µs t+1..t+2:** the busy line is up, with the address and the write word
  still driven. A write is then done as far as the processor is concerned.
* **after that:** the bus is free. A read waits for the module's data
  available pulse and takes the word from the read lines.

So one processor holds the bus for 2 µs per access. The other processor can
use the bus for a different module as soon as busy falls.

### Module status

Each queue control holds eight busy flags:

* A flag is set when any start is seen on that module's start line, from
  either processor or from a portal.
* It is cleared by that module's finish line.

The flags are updated on the last quarter of each microsecond from what was
seen during it. So at the next boundary both processors hold the same picture.

### The decision at a boundary

A processor with an access pending runs these tests in order:

1. The other processor's busy is up → **wait**, keep the request up.
2. The addressed module is marked busy → **idle**: drop the request and try
   again at the next boundary.
3. The other processor is also requesting and holds priority → **tie lost**,
   wait.
4. Otherwise → **take the bus**.

Both queue controls run the same test on the same bus picture. This means they
can never both take the bus, and no central arbiter is needed.

### Priority

The master/slave choice is a configuration input (`master_sel` on the top).
After reset the priority bit belongs to the master. The rule is built so that
two processors hammering the same module take turns, instead of the master
winning every time:

* If the slave loses a tie to the master during an access, it remembers this.
  If it then finds the module busy (the master's access holds it), it promotes
  itself and pulses **demote**, which clears the master's priority bit.
* When the slave takes the bus, it gives the priority straight back: it
  demotes itself and pulses **promote**.

The master therefore wins the first tie of a run. The slave wins the next one,
the master the one after, and so on. When there is no contention, priority
stays with the master. The source states the promotion condition twice, in
two slightly different ways. The "only after having waited on the master" form
is the one that gives strict alternation, and it is the one built here.

### Timing consequence

When both processors hammer one module, the module runs back-to-back at its
contiguous rate, and each processor gets every second access. When they use
different modules, the accesses overlap, and only the 2 µs bus occupancy
serialises them.

## Portal queue control (`portal_qc`)

Each module has three terminals: HC (the bus), LD and CD. The portal has two
queue flip-flops, one for LD and one for CD, and a priority flip-flop that
means "an HC access is under way".

* **HC is never delayed.** A start from the bus goes straight to the module.
  An assertion checks that the module is ready when it arrives.
* **Finish inhibit (the sneak).** On the first tick of the module's finish
  pulse, the portal decides what to do:
  * If an HC access is under way and a slow request is queued, the finish is
    **not** passed to the bus.
  * Instead, as soon as the module is ready, the portal starts one slow access,
    LD before CD.
  * The finish of that slow access is what the bus sees.

  The bus therefore believes its access took longer, and the module stays
  marked busy in both processors' status flags throughout. To make this work,
  the portal passes each finish to the bus one tick late, so an inhibit never
  cuts a pulse short.
* **Detection window.** When the module is ready and no HC access is under way,
  a queued slow request waits through one whole processor microsecond:
  * If an HC start arrives in that microsecond, the HC access takes the module
    (a *preempt*) and the slow request stays queued. It will then usually go
    in as the sneak behind that HC access.
  * If no HC start arrives, the portal starts the slow access on the last
    quarter of the microsecond. It also pulses `hc_echo`, which is ORed onto
    the module's start line so the processors mark the module busy.

  This window is why a slow access on an otherwise idle module costs 7 µs
  rather than 6 µs.
* **LD over CD.** With both queued, LD is always served first. A continuous
  stream of LD requests can therefore shut out CD, as intended: the exchange
  has the tighter service bound.

Slow terminal handshake:

* `xx_req` is a level, held until `xx_gnt` rises.
* `xx_gnt` stays up until the access's finish cycle. While it is up, the
  terminal drives its address, read/write and write word.
* The terminal reads data on `xx_rdata` when `xx_dav` pulses. `xx_fin` marks
  the finish.
* The terminal may raise its next request once the grant has fallen.

## Private memory

Seven modules are common to both processors. The eighth (`PRIV_MOD` in
`rtl/g21_pkg.sv`) holds 4K words private to each processor. For an access by
processor `p` to that module, the top level replaces address bit 12 with `p`.
Each processor therefore sees only its own half, and addresses 4096–8191
alias 0–4095. Nothing else treats the module differently. It is arbitrated,
status-tracked and protected like the others, and its slow terminals see all
8192 words.

## Memory protection (`mem_protect`)

`mem_protect` holds one bit per module, with 1 meaning unprotected.

* Reset protects every module.
* Either processor can load the register. If both load in the same cycle,
  processor 0 wins.
* A write to a protected module is refused before it reaches the bus: the
  queue control never sees it, and the processor gets a one-cycle `irq` pulse
  (`prot_irq` on the top) instead of `cpu_done`.
* Reads are never refused.

## Inter-processor interrupt (`cp_interrupt`)

`cp_interrupt` holds one pending flag per processor. A processor's `raise`
sets the other processor's flag. The owner's `ack` clears its own flag. If a
raise and an ack arrive together, the raise wins, so no interrupt is lost.

## Top level (`g21_top`)

`g21_top` contains:

* one timebase
* two bus queue controls, with `master_sel` choosing the master
* one `proc_bus`
* eight pairs of `portal_qc` and `core_module`
* `mem_protect` and `cp_interrupt`

Ports:

* **Processor side, per processor `p`:**
  * the access inputs `cpu_req[p]`, `cpu_mod[p]`, `cpu_addr[p]`, `cpu_we[p]`
    and `cpu_wdata[p]`
  * the results `cpu_rdata[p]` and `cpu_done[p]`
  * `prot_irq`, `prot_load`, `prot_val`
  * `ipi_raise`, `ipi_ack`, `ipi_pending`

  A processor holds `cpu_req` until `cpu_done` or `prot_irq`.
* **Slow terminals, per module:** `ld_req/gnt/addr/we/wdata/rdata/dav/fin`, and
  the same set for `cd_`.
* **Observation:** the bus request, bus busy and start lines; the priority
  bits; both copies of the module status; and one-tick event strobes for tie
  lost, wait on busy, idle, promotion, sneak, window timeout and preemption.
  The testbench counts each of these.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/g21_pkg.sv rtl/*.sv \
    tb/tb_g21_top.sv --top-module tb_g21_top
./obj_dir/Vtb_g21_top
```

Substitute the unit testbenches the same way (`tb_core_module`, `tb_bus_qc`,
`tb_portal_qc`, `tb_proc_bus`, `tb_mem_protect`, `tb_cp_interrupt`).

`tb_g21_top` runs the full system at its default sizes (eight modules of 8192
words). It covers these cases:

* a protection violation
* filling every module from both processors
* each processor finding its own word at one address of the private module
* both processors hammering one module
* mixed random traffic with LD and CD traffic on module 0
* LD shutting out CD
* the interrupt handshake

It checks every read against a reference memory and checks the cycle counts
given above. It fails if any mechanism listed under the observation ports
never happens. Each unit testbench has its own checks against independently
computed expectations, including the 6 µs contiguous rate, the 7 µs slow
cycle and strict alternation under contention.

To change the system, edit the constants in `rtl/g21_pkg.sv`: the number of
modules, address width, word width, and the tick positions of the module
pulses. The modules take these as parameter defaults.

## Departures from the source and limits

* Words are 32 bits wide, as in the source. Parity is not modelled.
* Module count and size follow the source. The tick positions of the module
  pulses are this design's reading of the timing charts.
* The source routes 80 common lines over the bus. This design has 78: 13
  address, 32 write data, 32 read data and 1 read/write. Control lines are
  counted separately.
* The source puts 4K words of private memory for each processor in one
  module. Here that is the last module. Selecting the half by replacing the
  top address bit is this design's own choice, because the source does not
  say how a processor addresses its half. The 4K words inside each processor
  are outside this design. Protection works per whole module.
* The source provides a "missing finish cycle" signal for when a slow request
  disappears after it has caused an inhibit. Here, requests are latched in the
  queue flip-flops and cannot disappear, so the path is never needed and is
  not built.
* The one-tick finish delay and the start echo from a portal are this design's
  own mechanisms. They keep every processor's status flags correct around
  slow accesses.
* The queue-control decision order and the priority rule are written from the
  prose, as described above.
* The processors, the exchange, the display, the bulk store and the consoles
  are outside this design. The system improvements the source proposes are not
  built: the non-restoring read mode, unite-and-jump, relocation and paging,
  and stack hardware.
