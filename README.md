# Hardware assertion checking with on-chip result collection

Assertion-based verification relies on SystemVerilog Assertions (SVA), which
simulators understand but synthesis does not. This design moves the
assertions into hardware so they can run on an FPGA at the speed of the
design under verification (DUV):

* every assertion becomes a small synthesizable **checker** made of a few
  standard pieces (a counter for a repetition, a shift register for a delay,
  one flip-flop for `$past`, ...); each checker drives one wire that is `1`
  while its assertion fails;
* a **collection module** watches all those wires, and when one of them goes
  high it writes the *index* of that assertion into an on-chip memory. Each
  assertion is stored once. The user can stop collection at any time and
  read the memory out, one index per clock.

So the result of a run is a short list, in the order the failures were
detected, of which assertions failed. Nothing needs to be streamed to a host
while the design runs.

The RTL contains the collection module (sized for 1000 assertions), a
library of ten checker building blocks, and two complete case studies that
use them: an 8-bit up-down counter with four assertions, and three 16 x 8
FIFOs with 32 assertions. `abv_platform_top` places the two case studies side
by side.

```
           DUV signals              failure bits (1 = failed)
  +------+  (internal nets   +-----------+   request[N-1:0]   +-------------------+
  | DUV  |--brought out as-->| assertion |------------------->| collection module |--> data_out, addr_mem,
  +------+   DUV outputs)    |  checkers |                    |  (N inputs)       |    valid, we, full
                             +-----------+                    +-------------------+
                                                         din_user, rst_clk --^
```

## The collection module

`collection_module #(N, M = $clog2(N))` is the part of the design with the
most behaviour to understand. Inside:

```
 request[N] --> oblivious_arbiter --grant[N]--> onehot_encoder --index[M]--> result_memory.din
                  ^ carry_in = !din_user && !full          |                      ^ addr
                                                           +--> |grant (we) --+   |
                                       din_user ------------------------------OR--> addr_counter
```

**Arbiter with blocking logic** (`oblivious_arbiter`). Failures are
unpredictable and several can start in the same clock cycle, but the memory
takes one word per cycle. The arbiter is a chain of N identical slices. A
carry runs from slice N-1 down to slice 0. Slice *i* grants when its carry is
high, `request[i]` is high and `block[i]` is high. It then stops the carry, so
at most one grant is issued per cycle and the highest index wins. `block[i]`
is a flip-flop that is `1` after reset and drops to `0` once `grant[i]` has
been issued, so an assertion that keeps failing (or fails again later) is
never stored twice. A blocked request lets the carry through, so a lower
request is served in the same cycle. Blocking is released only by `rst_n`.

**Encoder, counter, memory.** The one-hot grant is encoded to the M-bit
index (`onehot_encoder`). It is written into `result_memory` (2^M words of M
bits) at the address held by `addr_counter`. The counter advances through an
OR of "a grant was issued" and `din_user`. One counter therefore serves both
writing and reading.

**Modes and timing.**

| | write mode (`din_user = 0`) | read mode (`din_user = 1`) |
|---|---|---|
| arbiter | grants, one per cycle | disabled (carry-in low) |
| memory | index written at the edge ending the grant cycle | word at `addr_mem` read at the edge |
| counter | +1 per stored result | +1 per cycle |
| `we` | 1 in cycles that store | 0 |
| `data_out` | 0 | word of the previous cycle's address |

* Failure to storage latency: a request seen in cycle *t* is granted
  combinationally and written at the end of *t*. Throughput is one result
  per cycle.
* Read latency is one clock. While word *k* is on `data_out`, `addr_mem`
  already shows *k+1*.
* `rst_clk` clears the address counter synchronously. The normal read-out is:
  raise `rst_clk` for one cycle, then hold `din_user` high and take one
  index per cycle. If the user goes back to write mode after reading, pulse
  `rst_clk` again (or accept that the address has advanced). The counter
  moves in read mode, and new results are written at its current address.
* `valid` (registered) is high while `data_out` shows a word whose address
  is below `stored`, the number of results written since reset.
* `full` goes high after N results are stored, and then collection stops.
  With blocking, at most N distinct results exist anyway.

**Things to know before relying on it.**

* While `din_user` is high nothing is granted. A failure that is still
  active when read mode ends is stored then. A one-cycle failure pulse that
  happens during read mode is lost.
* Two one-cycle pulses in the same cycle: only the higher index is stored,
  because the lower one is gone by the next cycle. Persistent failures are
  never lost. Failure bits that are held until reset avoid both losses. The
  FIFO case study holds its checker outputs this way (see below).
* The memory contents are not reset. `valid` compares the address read
  with the number of results stored. It is exact when the results were
  written from address 0 without a read in between. If reading moved the
  counter before more results arrived, the later results sit above that
  range, and `valid` does not mark them. The FIFO testbenches show this
  case.

## The checker library

Each module translates one SVA operator or system function. The modules
report *coverage* (`op_i = 1` when the operator matched or the property
held). For a property, the failure bit is the inverse of the coverage. For a
sequence written under `not`, the failure bit is the match itself. All
clocked modules have `clk` and an asynchronous active-low `rst_n`.

| module | SVA | structure | timing of `op_i` |
|---|---|---|---|
| `sva_consec_rep #(N,M)` | `s1[*N:M]` | saturating counter of $clog2(M+1) bits, cleared when s1 is absent | combinational: high from the N-th consecutive s1 on |
| `sva_goto_rep #(N,M)` | `s1[->N:M]` | occurrence counter, gaps allowed, restarts after the M-th | combinational: high on the N-th..M-th occurrence |
| `sva_delay #(N,M)` | `s1 ##[N:M] s2` | M-bit shift register of s1 | combinational: s2 now and s1 N..M cycles ago |
| `sva_and` | `s1 and s2` | flags "s1 matched", "s2 matched", "started together" | registered: the cycle after the later match |
| `sva_intersect` | `s1 intersect s2` | flag "started together" | registered: the cycle after a common match |
| `sva_if #(HAS_ELSE)` | `if (e) p1 [else p2]` | multiplexer | combinational |
| `sva_impl_overlap` | `s1 \|-> p1` | `!s1 \|\| p1`, registered | one clock after the checked cycle |
| `sva_impl_nonoverlap` | `s1 \|=> p1` | s1 delayed one clock, then `!s1_prev \|\| p1`, registered | s1 at *t*, p1 at *t+1*, `op_i` at *t+2* |
| `sva_past #(W)` | `$past(a)` | W-bit register | `a` of the previous cycle |
| `sva_stable #(W)` | `$stable(a)` | register plus compare | combinational |

The repetition operators use a counter of about log2(M) flip-flops, not one
flip-flop per repetition as an automaton-based translation would. For
`[*10]` that is 4 flip-flops instead of 10.

`sva_and` and `sva_intersect` describe each operand sequence by three
signals: `*_on` (an attempt starts), `*_out` (it matches) and `*_off` (a
level: no attempt in progress). All their state clears when both operands
are off. `sva_intersect` registers its start flag, so a start and a common
match in the same cycle are not seen. Use it with sequences that last two
cycles or more.

## Case study 1: up-down counter

`updown_counter` is an 8-bit counter. `en_load` loads `load`. Otherwise
`en_ud` counts up (`up = 1`) or down, wrapping at both ends. Its checker
module `updown_counter_assertions` holds four assertions. Bit *k-1* of `asr`
is ASR_*k*:

| | property | built from |
|---|---|---|
| ASR_1 | `(!en_ud && !en_load) \|=> $stable(cnt)` | `sva_stable`, `sva_impl_nonoverlap` |
| ASR_2 | `en_load \|=> cnt == $past(load)` | `sva_past`, `sva_impl_nonoverlap` |
| ASR_3 | `!en_load \|=> !(cnt == ~$past(cnt) && cnt[7] == cnt[0])` | `sva_past`, `sva_impl_nonoverlap` |
| ASR_4 | `not (!en_load && !en_ud)[*10]` | `sva_consec_rep` (4-bit counter) |

A correct counter never fails ASR_1 or ASR_2. ASR_3 fails when the counter
wraps down from 0 to 255: 255 is the complement of 0, and its end bits are
equal. ASR_4 fails in the 10th idle cycle in a row and stays high while the
counter remains idle. All failure bits are forced to 0 during reset.
`updown_counter_platform` connects the four bits to a 4-input collection
module (2-bit indices).

## Case study 2: three FIFOs

`sync_fifo` is a 16 x 8 single-clock FIFO. It ignores writes when full and
reads when empty, and it has a registered `dout`. `fifo_assertions` holds ten
checkers per FIFO. The set of ten is this design's own choice, made so that
every library operator is used:

| bit | property |
|---|---|
| 0 | `full \|-> count == 16` |
| 1 | `empty \|-> count == 0` |
| 2 | `if (count == 0) empty else !empty` (output registered) |
| 3 | push without pop, not full `\|=> count == $past(count) + 1` |
| 4 | pop without push, not empty `\|=> count == $past(count) - 1` |
| 5 | no push and no pop `\|=> $stable(count)` |
| 6 | `not (wr_en && full)[*4]`: four overflow attempts in a row (the one with a repetition count) |
| 7 | `not ((push-only && empty) ##1 empty)` |
| 8 | `not (full and empty)` |
| 9 | `not (rd_en && empty)[->4]`: every fourth underflow attempt |

`multi_fifo_platform` instantiates three FIFOs with their checkers (requests
10k..10k+9 for FIFO k). Each FIFO and its checkers run in their own clock
and reset domain: `fifo_clk[k]`, and `fifo_rst_n[k]` ANDed with `rst_n`. The
32-input collection module (5-bit indices) runs on `clk`.

**Crossing into the collection clock.** A checker's failure can be a single
cycle of a fast clock, which a plain synchronizer could miss. `sticky_sync`
therefore first holds each failure bit in its own domain until that FIFO is
reset. Holding loses nothing, because the collection module stores each
index only once. The held bit then passes a two-flop synchronizer into
`clk`. The port `asr` shows the raw checker outputs. The port `request`
shows the same failures in the `clk` domain, 2 to 3 `clk` edges later. A
side effect is useful: failures that occur while the collection is in read
mode stay pending and are stored when read mode ends.

The platform adds two checkers of its own, which run on `clk` and use the
FIFO flags brought over by `sync_2ff`:

* request 30, ERROR_FIFO_ALL_SHOULD_BE_FULL: `(full0 && full1) intersect
  full2`. It is 1 after all three FIFOs have been full for two cycles.
* request 31, ERROR_FIFO_ALL_SHOULD_BE_EMPTY: `(empty0 && empty1) and
  empty2`. It is 1 the cycle after all three are empty.

## Parameters

| parameter | default | where |
|---|---|---|
| `N` (assertions collected) | 1000 (`abv_pkg::COLLECT_N`) | `collection_module`, `oblivious_arbiter`, `onehot_encoder` |
| `M` (index/address bits) | `$clog2(N)` = 10 | memory is 2^M words of M bits |
| counter width / ASR_4 repetition | 8 / 10 | `abv_pkg::UD_WIDTH`, `UD_IDLE_REP` |
| FIFO depth x width | 16 x 8 | `abv_pkg::FIFO_DEPTH`, `FIFO_WIDTH` |
| case-study collection sizes | 4 and 32 | `UD_ASSERTIONS`, `MF_ASSERTIONS` |

The collection module was also evaluated with 100 and 500 assertions. At
those sizes the indices are 7 and 9 bits wide. The testbench
`tb_collection_workload` fills 100-, 500- and 1000-input collection modules
to capacity and reads them back.

## Where this RTL makes its own choices

The structures of the collection module and of the checker operators, the
sizes, the ASR_1..ASR_4 properties, and the two all-full/all-empty checks
follow the original platform. The following points were decided here:

* **Collection module.**
  * Priority runs from index N-1 down to 0.
  * No grants are issued in read mode or after `full`.
  * `rst_clk` is a synchronous clear of the address counter only.
  * `valid` means "the word shown was written".
  * `data_out` reads 0 in write mode.
  * Reads are synchronous.
* **Implication coverage.** It is taken to be `!antecedent || consequent`,
  so the failure is "antecedent, then consequent false".
* **ASR_3.** The consequent compares with `~$past(cnt)`, as in the property
  itself. The hand-written checker of the original uses plain `$past(cnt)`.
* **ASR_4.** Its counter is cleared when the counter stops idling. The
  repetition is consecutive.
* **`sva_delay`.** It does not keep the extra s2 history that would require
  s2 to be absent earlier in the window.
* **Up-down counter.** The direction input `up` and the priority of load
  over count are choices made here. Only the counter's other signal names
  are given.
* **FIFO checkers.** The ten FIFO properties are substitutes. The original
  FIFO assertions are not available.
* **Clock crossing.** The multiple-FIFO circuit has several clock domains,
  but how failures reach the collection clock is not specified. The
  sticky-then-synchronize crossing and the flag synchronizers are choices
  made here. The FIFO resets are applied asynchronously and are not
  synchronized to the FIFO clocks. Release them away from clock edges, as
  the testbenches do.

Not included:

* The software that generates checkers from SVA text.
* The script that rewires a DUV's internal nets to new output ports. The two
  platform tops were wired by hand in the shape that flow produces.
* The larger DUV (a CAVLC video entropy coder with 100 to 1000 assertions).
  It is not available in a form that could be written as RTL.
* Board I/O (switches, LEDs, JTAG, logic analyser). It is represented by the
  top-level ports.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Each testbench computes its expected
values independently: queue or integer models, history-based formulas for
each checker, or a separate model of the arbitration order. Each has a
watchdog. The checker testbenches make every assertion both hold and fail.
The platform and top testbenches read the collected indices back and
compare them with the model. `tb_abv_platform_top` runs the whole design at
its default parameters. It counts each of these mechanisms and fails if any
never happens:

* arbitration of simultaneous failures;
* blocking of repeated failures;
* holding failures off in read mode, then storing them when read mode ends;
* `rst_clk`;
* read-out;
* a per-FIFO reset;
* each kind of checker failing.

The termination at `full` cannot be reached with correct DUVs. It is tested
in `tb_collection_module` and `tb_collection_workload`.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/abv_pkg.sv tb/tb_abv_platform_top.sv --top-module tb_abv_platform_top
./obj_dir/Vtb_abv_platform_top
```

Replace the testbench name to run another one. `abv_pkg.sv` must come first.
All runs finish in seconds.

## Files

* `rtl/abv_pkg.sv`: shared sizes and the request index layout.
* `rtl/collection_module.sv`, `oblivious_arbiter.sv`, `onehot_encoder.sv`,
  `addr_counter.sv`, `result_memory.sv`: result collection.
* `rtl/sva_*.sv`: the checker library.
* `rtl/updown_counter*.sv`: case study 1.
* `rtl/sync_fifo.sv`, `fifo_assertions.sv`, `multi_fifo_platform.sv`,
  `sticky_sync.sv`, `sync_2ff.sv`: case study 2 and its clock crossing.
* `rtl/abv_platform_top.sv`: both case studies side by side.
* `tb/tb_<module>.sv`: one testbench per module.
* `tb/fifo_traffic.sv`: per-clock FIFO driver used by the FIFO platform
  tests.
* `tb/tb_collection_workload.sv` with `tb/collection_workload_runner.sv`:
  capacity test at 100, 500 and 1000 assertions.
