# Banked register file with speculative port control

A superscalar core needs many register-file ports: two reads and one write
per issued instruction. A flat register file with eight read and four write
ports on every cell is large, slow and power-hungry. The alternative modelled
here splits the physical registers over several interleaved *banks* whose
cells have only a few ports each, and recovers the aggregate bandwidth through
a crossbar between the bank-local ports and the global ports of the functional
units. The catch is the *bank conflict*: more accesses to one bank in a cycle
than it has ports.

The control scheme makes no attempt to avoid conflicts at issue time, because
that would lengthen the wakeup-select loop. The scheduler issues as if the
register file were fully ported. A new pipeline stage, **Arbitrate**, placed
between Issue and register read, hands out the bank ports and kills every
instruction that did not get one. The issue window is then repaired in a
single cycle, and the killed instructions issue again two cycles after their
first attempt. Nothing stalls and no writes are buffered. The only cost is
lost issue slots.

The SystemVerilog here implements this back end: the issue window, the
arbitration stage, the banked register file with its crossbars, the bypass
network, the integer ALUs and writeback. It is modelled on the scheme
published as *"A Speculative Control Scheme for an Energy-Efficient Banked
Register File"*, and its default configuration is that paper's chosen
four-issue design point. The text below marks where this RTL fills in details
the scheme leaves open.

## Default configuration: 8B2R2WYY

Configurations are named `(#banks)B(#local read ports)R(#local write ports)W`,
followed by two letters: whether bypassed operands skip the read ports, and
whether read sharing is enabled.

| Parameter (`banked_rf_core`) | Default | Meaning |
|---|---|---|
| `ISSUE_W` | 4 | issue width = number of ALUs = dispatch width |
| `NUM_PREGS` | 64 | physical registers |
| `NUM_BANKS` | 8 | interleaved banks (8 rows each) |
| `RD_PER_SIDE` | 1 | local read ports per bank *per side* (2 in total) |
| `WR_PER_BANK` | 2 | local write ports per bank |
| `DATA_W` | 32 | register width |
| `BYPASS_SKIP` | 1 | the "Y" after `W`: bypassed operands do not request a port |
| `READ_SHARING` | 1 | the last "Y": one local port may feed several global buses |
| `IQ_DEPTH` | 32 | issue-window entries (own choice) |
| `N_LATE` | 1 | late-writeback ports for long-latency units (own choice) |
| `ID_W` | 8 | width of the instruction id carried to completion (own choice) |
| `WB_STAGES` | 1 | writeback stages between Execute and the bank write |

The eight-issue SMT design point, 16B4R2WYY with 512 registers, is the same
RTL with `ISSUE_W=8, NUM_PREGS=512, NUM_BANKS=16, RD_PER_SIDE=2`. The
testbench `tb_banked_rf_core_smt` runs it with a 64-entry window. Other
variants are reached the same way: 4 banks, 1 or 4 write ports, or either
optimisation switched off.

## Register file organisation (`banked_regfile`, `rf_bank`)

Register `p` lives in bank `p mod NUM_BANKS`, at row `p / NUM_BANKS`. The
scheme only says the banks are interleaved, so this low-order interleave is
an assumption.

Each functional unit has two global read buses, *left* (first operand) and
*right* (second operand). Each bank's read ports are split the same way:
left local ports drive only the left global buses, and right local ports
only the right ones. This halves both the crossbar and the number of
contenders for any one port. An instruction can still read both of its
operands from the same bank in one cycle. It cannot use a free left port to
fetch a right operand.

The crossbar is written as muxes. Each global read bus selects
`(bank, local port)` on its own side. Several buses may select the same
local port, which is how read sharing is realised in hardware. Each bank
write port selects one of the `ISSUE_W + N_LATE` global write buses.

Banks read combinationally and write at the clock edge. A value written in
one cycle is readable in the next; a read in the same cycle returns the old
value. Reset clears all registers. The real storage would be a 6T SRAM array
with hierarchical bitlines; here it is a plain array.

## Pipeline

```
Issue (wakeup, select) | Arbitrate | Read/Bypass | Execute | Writeback
      issue_window       3 x bank_    banked_rf,     int_alu   bank write
                         port_arbiter bypass_mux               ports, cmp_*
```

* **Issue.** The destination of every instruction selected in cycle *t* is
  broadcast in *t+1*. A dependent single-cycle instruction can therefore be
  selected in *t+1* and meet its producer's result on the execute-stage
  bypass.
* **Arbitrate.** Three instances of `bank_port_arbiter` serve the left-read,
  right-read and write requests of the group. Each arbiter walks its requests
  in fixed priority and gives each one the next free port of its bank. Late
  writebacks from long-latency units (loads that miss, divides) are placed
  first in the write arbiter, which gives them priority over the new group.
  The granted row addresses and crossbar selects are registered into
  Read/Bypass. Any instruction refused a port is killed. All other
  instructions free their window entry, and from then on they are certain to
  complete.
* **Read/Bypass.** `bypass_mux` picks, in order:
  1. the zero input, for a zero-register operand;
  2. a result leaving Execute (the critical bypass);
  3. a result in a Writeback stage (completed but not yet in the banks),
     the first stage before the later ones;
  4. the global read bus.
* **Execute.** One single-cycle ALU per slot (add, sub, and, or, xor).
* **Writeback.** Results are reported on `cmp_*` in the first Writeback
  stage. They are written in the last one, through the ports granted in
  Arbitrate. A write port granted to an instruction that was then killed
  stays idle. `WB_STAGES` sets the number of stages (default 1). Each
  extra stage adds one more source to the bypass mux and nothing else:
  issue, arbitration and latency stay the same.

## Speculative issue and the one-cycle repair

This is the heart of the design, and the subtle part. Take a group G1
selected in cycle *t*:

| cycle | Issue stage | Arbitrate stage |
|---|---|---|
| t   | G1 selected | – |
| t+1 | G1's destinations woken; G2 selected (may include G1's dependents) | G1 arbitrated: **conflict**, some of G1 killed |
| t+2 | **repair** (below); select again, including the killed G1 instructions | G2 killed as a whole (it was issued in parallel with the detection) |
| t+3 | normal | reissued instructions arbitrated |

In cycle *t+2*, the wakeup broadcast that would have carried G2's
destinations is used instead to carry the destinations of the G1
instructions that were killed. In this mode a tag match *clears* the ready
bit. In the same cycle, the issued bits of the killed G1 entries and of every
G2 entry are reset. Select runs on the repaired state in that same cycle, so
the killed instructions issue again exactly two cycles after their first
issue.

G2's destinations are never broadcast, so nothing was woken by them. G1's
killed destinations were broadcast in *t+1*. Any instruction woken by them
has its ready bit taken back, and it wakes again when the reissued producer
broadcasts. The only cost in hardware is a mux on the tag-broadcast path.

Entries stay in the window until they pass Arbitrate, because they might
still have to be reissued. A per-register ready scoreboard gives newly
dispatched instructions their initial ready bits. It follows the same set
and clear broadcasts, and it forwards same-cycle broadcasts and destinations
from earlier in the same dispatch group.

## Keeping reads off the ports

* **Zero register.** Rename marks a zero-register operand (`src_zero`). It
  never requests a port and takes the zero input of the bypass mux.
* **Conservative bypass bit (`BYPASS_SKIP`).** Each operand's bypass bit is
  the OR of that operand's tag-comparator matches in the current wakeup. The
  bit travels with the instruction when it is selected. It is set only when
  the operand woke up in the very cycle the instruction was selected. In that
  case the producer is in Execute exactly when the consumer is in
  Read/Bypass, so the value is certainly on the critical bypass and the
  operand does not request a port.

  Operands woken earlier still request a port, even if their value later
  comes from a writeback-stage bypass. That is the conservative part: the
  bit is never wrong and never needs a stall to recover. Late-writeback
  broadcasts do not set the bit. An assertion in `banked_rf_core` checks that
  every operand that skipped the ports found its value on the execute-stage
  bypass.
* **Read sharing (`READ_SHARING`).** Instructions that read the same register
  on the same side in one group share one local port. A register read from
  both sides uses one left and one right port.

## Late writebacks

A long-latency unit presents `late_valid/late_tag/late_data` and holds them
until `late_gnt`. The grant is combinational within the Arbitrate cycle. A
granted result moves down the pipeline with the group and is written in the
same Writeback cycle. Its register is broadcast for wakeup one cycle after
the grant, without the bypass flag.

To mark a register as pending, rename dispatches an `OP_LATE` slot with that
register as destination. The slot takes no window entry.

## Interface of `banked_rf_core` and timing

* **Dispatch:** `disp_valid[ISSUE_W]` plus, per slot, `op`, two source
  registers with `src_zero` flags, `dst_valid/dst` and an `id`. A group is
  accepted while `disp_ready` is high, which requires at least `ISSUE_W` free
  window entries. `disp_ready` does not depend on the dispatch inputs.
* **Completion:** `cmp_valid/id/dst_valid/dst/data`, per slot, in the
  first Writeback stage.
* **Events:** `ev_rd_conflict`, `ev_wr_conflict`, `ev_kill`, `ev_byp_skip`
  and `ev_rd_share` report the Arbitrate stage. `ev_repair` marks a repair
  cycle.
* **Latency:** an instruction in a group dispatched in cycle *d* is selected
  in *d+1* at the earliest and completes in *d+5*. A chain of dependent ALU
  instructions completes one per cycle. An instruction that loses
  arbitration completes two cycles later than it would have.
* **Reset:** asynchronous, active low. Everything is cleared and all
  registers read as zero and ready.

## Files

| File | Contents |
|---|---|
| `rtl/brf_pkg.sv` | default sizes, `op_e`, `idx_w()` |
| `rtl/banked_rf_core.sv` | top: the five stages, repair control, kill logic |
| `rtl/issue_window.sv` | wakeup, select, bypass bits, repair, scoreboard |
| `rtl/bank_port_arbiter.sv` | per-bank port allocation with optional sharing |
| `rtl/banked_regfile.sv` | banks, read crossbar, write interconnect |
| `rtl/rf_bank.sv` | one bank with left, right and write ports |
| `rtl/bypass_mux.sv` | zero / execute / writeback / register-file select |
| `rtl/int_alu.sv` | single-cycle integer ALU |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_banked_rf_core_smt.sv` | end-to-end test at 16B4R2WYY, 512 registers, 8-issue |
| `tb/core_harness.sv` | reusable harness: one core configuration on a seeded random program |
| `tb/tb_banked_rf_core_variants.sv` | seven four-issue configurations side by side |
| `tb/tb_smt_variants.sv` | 16B2R2WYY against 16B4R2WYY |
| `tb/tb_pcp_model.sv` | port arbiter against the random-access conflict formula |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **`tb_banked_rf_core`** (defaults). The testbench plays the rename stage,
  with a FIFO free list, and a long-latency unit. It runs a random program of
  3000 instructions over 16 architectural registers, about 10 % of them late
  loads with random delays. Every result is compared with an architectural
  model, and every architectural register is read back at the end.

  Directed checks cover:
  * the 5-cycle latency;
  * back-to-back dependent issue;
  * four writes to one bank: two instructions are killed, and they complete
    exactly two cycles after the other two;
  * four reads of one register served by one shared port.

  The test fails if any of these never happens: read conflict, write
  conflict, repair, bypass skip, read sharing, late writeback. A typical run
  sees about 350 repairs over roughly 1300 cycles.
* **`tb_banked_rf_core_smt`.** The same test at the SMT point. Repairs are
  about five times rarer there than at the default point.
* **`tb_banked_rf_core_variants`.** Seven four-issue configurations run
  the same program through `core_harness`: 8B2R2WYY, 8B2R2WNY, 8B2R2WYN,
  8B2R2WNN, 4B2R2WYY, 8B2R1WYY and 8B2R4WYY. The name encodes banks, local
  read ports per bank, write ports per bank, then Y/N for bypass skip and for
  read sharing. Each run checks its own results. The testbench then checks
  the expected ordering: removing either optimisation, halving the banks or
  halving the write ports each gives more repairs. An eighth run is the
  default with `WB_STAGES = 2`. Its results are correct only if values still
  in the second writeback stage are bypassed. One run gave:

  | Config | IPC | Repairs |
  |---|---|---|
  | 8B2R2WYY | 2.17 | 376 |
  | 8B2R2WNY | 1.86 | 529 |
  | 8B2R2WYN | 1.43 | 813 |
  | 8B2R2WNN | 1.25 | 988 |
  | 4B2R2WYY | 1.22 | 1017 |
  | 8B2R1WYY | 1.54 | 738 |
  | 8B2R4WYY | 2.27 | 330 |
  | 8B2R2WYY, 2 writeback stages | 2.17 | 364 |

  The IPC figures belong to this synthetic program, which has far more
  independent work than real code. They show the trend, not real
  benchmark numbers.
* **`tb_smt_variants`.** The same comparison at eight-issue with 512
  registers: 16B2R2WYY, 16B4R2WYY, and 16B4R2W with each optimisation
  removed. `core_harness` also adds up, cycle by cycle, the read-conflict
  probability that uniformly random accesses would have with the same
  number of read requests (see `tb_pcp_model` below). This gives the
  "random" column. One run gave:

  | Config | Cycles | Read-conflict cycles | Random model |
  |---|---|---|---|
  | 16B2R2WYY | 991 | 414 | 435 |
  | 16B4R2WYY | 553 | 24 | 45 |
  | 16B4R2WNY | 562 | 71 | 81 |
  | 16B4R2WYN | 685 | 171 | 68 |
  | 16B4R2WNN | 742 | 224 | 90 |

  Operands issued together are correlated: they often read the same
  register. Without read sharing, this gives far more conflicts than random
  accesses would. With read sharing, the same correlation is turned into
  fewer conflicts than random. The testbench checks both directions, and
  checks that the second pair of read ports cuts repairs.
* **`tb_pcp_model`.** Checks the port conflict probability (PCP): the
  chance that some bank gets more accesses in one cycle than it has ports,
  when A accesses fall uniformly on B banks of N ports. The exact value is

  P(no conflict) = A! · [x^A] (Σ_{k=0..N} x^k/k!)^B / B^A.

  The testbench feeds random register numbers to `bank_port_arbiter` for
  16 banks with 1, 2 or 3 ports, and for 2 ports with 2 to 32 banks, at
  2 to 8 accesses. The measured conflict rate must be within four standard
  deviations of the formula. For example, 8 accesses to 16 single-ported
  banks conflict 88 % of the time; with two ports that falls to 17 %.
* **Unit testbenches:**
  * `tb_issue_window` checks the repair sequence cycle by cycle.
  * `tb_bank_port_arbiter` checks random groups against an independent
    statement of the grant rule.
  * `tb_banked_regfile` and `tb_rf_bank` compare against flat array models.
  * `tb_bypass_mux` and `tb_int_alu` compare against reference values.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/brf_pkg.sv tb/tb_banked_rf_core.sv \
          --top-module tb_banked_rf_core -o sim && ./obj_dir/sim
```

The whole default-size end-to-end test simulates in well under a second.

## Where this RTL goes beyond or departs from the published scheme

* **Writeback depth.** The pipeline diagram of the scheme shows one
  Writeback stage. Its bypass-skip illustration shows two. The default here
  is one stage. `WB_STAGES = 2` gives the illustrated case, and
  `tb_banked_rf_core_variants` runs it.
* **Late-writeback buses.** Late writebacks get their own global write bus,
  a fifth one at the default point. The scheme draws four global write
  ports, one per functional unit, and does not say where late results enter.
  There is one late port (`N_LATE`).
* **Port priority.** Among issue slots it is fixed slot order. Allocation is
  single pass: a port won by an instruction that is killed for another reason
  is not offered to anyone else.
* **Select order.** Select is by window index, not by age, so an old
  instruction can wait behind younger ones at lower indices. This is correct
  but not fair.
* **Other own choices:** the window depth, all-or-nothing dispatch of a
  group, the ready scoreboard, reset values and the ALU operation set.
* **Not modelled:**
  * fetch, decode and rename; the testbench stands in for rename;
  * loads, stores, caches and dividers; they appear only through the
    late-writeback port;
  * branch-misprediction recovery; the scheme only notes that the extra
    stage adds one cycle to it;
  * circuit-level features such as hierarchical bitlines, cell packing and
    column muxes, which carry the area, delay and energy results but have no
    logic function.
