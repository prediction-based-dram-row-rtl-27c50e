# ABP: access-count prediction for DRAM row-buffer closure

When many cores share one DRAM system, their request streams arrive at the
memory controller interleaved, and the row-buffer locality of any single stream
is largely lost. An *open-page* policy then pays for many row-buffer
conflicts: the open page must be precharged before the new one is activated.
A *closed-page* policy avoids this, but it throws away the locality that is
still there. Timer-based hybrids try to guess how long a page should stay open.
That is hard to get right across hundreds of cycles.

The Access Based Predictor (ABP) instead predicts **how many column accesses
a DRAM page will receive while it is open**. It closes the page right after
the last predicted access. When the count is right, the precharge happens as
early as it usefully can, as an oracle policy would. The predictions live in
a small per-bank set-associative cache of recently used pages. For 32 banks
this is 20 KB. The lookup is not on the access path: the prediction is needed
only after the page has been activated and read.

This repository holds synthesizable SystemVerilog for the ABP unit of a
32-bank memory system, plus self-checking testbenches.

## How a page's life is decided

Each bank keeps a little state: the open page, how many accesses it has had,
its prediction mode, and the last page it closed on a prediction. For every
column access the memory controller services, the bank answers with
`resp_close`, which says whether to precharge right after this access.

| Situation when the access arrives | What the unit does | Table update |
|---|---|---|
| Bank precharged, page not in the table | open the page, keep it open until a conflict (`resp_pred_hit=0`) | none now; the count is **recorded** at the conflict |
| Bank precharged, page in the table with count N | open it, close it after the N-th access (`resp_pred_hit=1`). N=1 closes it at once | LRU touched |
| Row hit on the open page | count it; close if the prediction is reached | none |
| Conflict, open page had no entry | close it, then handle the new page as above | **record** its access count |
| Conflict, open page was predicted (the prediction was too high) | close it, then handle the new page | **decrement** its count by 1 (not below 1) |
| Access right after a predicted closure, to a *different* page | prediction was perfect (`resp_perfect=1`) | none |
| Access right after a predicted closure, to the *same* page | the closure was premature (`resp_reopen=1`). Reopen the page and keep counting from where it stopped. It stays open until a conflict | at that conflict, **record** the aggregate count of both openings |

These rules are the heart of the design. The decrement moves a prediction
that was too high one step at a time. A prediction that was too low is fixed
in one step, because the aggregate count replaces it. A page with a correct
prediction is never written again.

## The history table (`abp_pred_table`)

Each bank has a 64-set, 4-way table, so the whole unit is a 2048-set, 4-way
cache. The set index is the low 6 bits of the row address. Each way holds:

| field | bits | meaning |
|---|---|---|
| valid | 1 | entry in use |
| tag | 10 | row address bits 15:6 |
| count | 7 | predicted accesses, saturating at 127 |
| age | 2 | true-LRU rank in the set (0 = most recent) |

That is 20 bits × 8192 entries = 163,840 bits = 20 KB. The 16-bit row address
and the 7-bit count were chosen to land exactly on that figure. Seven bits
cover the 128 64-byte lines of an 8 KB page.

The table holds a set as one memory word (all four ways side by side), read
synchronously. An operation is accepted in one cycle. In the next cycle its
result is out (`done_hit`, `done_cnt`) and the changed set is written back.
Three operations exist:

* `TBL_LOOKUP`: return the count. A hit makes the way most recent.
* `TBL_RECORD`: write a count. A miss fills an invalid way or else replaces
  the LRU way.
* `TBL_DEC`: decrement, with a floor of 1. A miss is ignored (the entry has
  already been replaced).

Only the closing of an unpredicted page allocates an entry; a lookup miss
does not. After reset the table clears itself one set per cycle, 64 cycles,
and refuses operations meanwhile.

## Timing and interface

`abp_predictor` (top) has one request port: `acc_valid`, `acc_ready`,
`acc_bank` (5 bits) and `acc_row` (16 bits). The controller reports each
serviced column access there. `acc_ready` is the ready signal of the
addressed bank, so only a request to a bank that is still busy waits. Every
accepted access gets exactly one response pulse, on that bank's entry of
the response arrays:

| signal (per bank) | meaning |
|---|---|
| `resp_valid` | answer for the last accepted access of this bank |
| `resp_kind` | `ROW_HIT`, `ROW_EMPTY` (bank was precharged) or `ROW_CONFLICT` |
| `resp_close` | precharge the bank after this access (auto-precharge) |
| `resp_pred_hit` | the newly opened page had a table entry |
| `resp_reopen` | a premature closure was detected |
| `resp_perfect` | the previous predicted closure was confirmed correct |

Latency is counted in cycles after the acceptance cycle. The answer comes in
the next cycle for a row hit or a reopen. It takes 3 cycles for a precharged
bank (one table lookup) and 5 for a conflict (update of the old page, then
lookup of the new one). A bank takes one row hit per cycle. DRAM activate and
read latencies are far longer than these, so the decision is always ready
before it is needed. Banks run independently, and their answers may come in
the same cycle.

## Hierarchy

```
abp_predictor          top: 32 banks, request demultiplexing
└─ abp_bank_ctrl ×32   closure policy of one bank (state machine)
   └─ abp_pred_table   64-set × 4-way history table of that bank
abp_pkg                sizes, operation / row-kind / mode enums
```

Synthesis (generic, coarse) gives about 10k word-level cells, 3,968
flip-flops and 163,840 memory bits for the full unit.

## What is given and what is chosen

Taken from the published description: the policy rules above; per-bank
tables of 64 sets and 4 ways, 32 banks, 2048 sets in total; the 20 KB
budget; and the lookup being off the critical path.

This design's own choices:
* 16-bit row address, 7-bit saturating count, low-bits set index.
* LRU replacement. The description only says the table caches the most
  recent predictions.
* The decrement floor of 1.
* A count of 1 closes the page right after its first access.
* The request/response handshake and the 1/3/5-cycle latencies.
* The reset sweep.

Known limits:
* Only the single last predicted closure per bank is remembered for the
  premature-closure test.
* The unit is not told about precharges the controller makes for other
  reasons, such as refresh or power-down. After such an event its idea of
  the open page is stale until the next conflict. A controller that needs
  this would add a per-bank "closed" input.
* The memory controller and DRAM devices are outside this RTL.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb/tb_abp_pred_table.sv`: random lookups, records and decrements on rows
  that crowd three sets. The results are compared with a timestamp-LRU
  reference model. It also checks the one-cycle result timing and the reset
  sweep.
* `tb/tb_abp_bank_ctrl.sv`: a directed walk through every rule in the table
  above, with expected answers worked out by hand. It also checks the counter
  saturation at 127 and the 1/3/5-cycle latencies.
* `tb/tb_abp_predictor.sv`: end-to-end, all parameters at their defaults.
  40,000 accesses go to 32 banks, with page bursts that mostly repeat their
  length. Every answer and its latency is checked against a reference model
  of the whole policy. The testbench counts each mechanism and fails if one
  never happens: row hit, precharged bank, conflict, table hit and miss,
  record, decrement, predicted closure (also at the first access), perfect
  prediction, premature closure, replacement, stall on a busy bank, and
  overlapping answers. A typical run sees a table hit rate of about 89%.
* `tb/tb_abp_learning.sv`: convergence, at the default size. Every bank
  cycles through six pages with fixed burst lengths. After one learning
  round, every page must be closed exactly at its last access, and the next
  page must count as a perfect prediction. The burst lengths are then changed
  by +2 or -2. A longer page must cost exactly one premature closure. A page
  shorter by d must cost exactly d decrements. After that, the predictions
  must all be exact again.

The published evaluation (PARSEC and SPECjbb2005 workloads on a many-core
simulator, throughput relative to open/closed page) needs full-system
traces and is not reproduced here.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl \
  rtl/abp_pkg.sv rtl/abp_pred_table.sv rtl/abp_bank_ctrl.sv rtl/abp_predictor.sv \
  tb/tb_abp_predictor.sv --top-module tb_abp_predictor -o sim
./obj_dir/sim
```

`tb_abp_learning` builds the same way. The block testbenches need fewer files:
`tb_abp_pred_table` needs only the package and the table, and
`tb_abp_bank_ctrl` needs those two plus `abp_bank_ctrl`. The sizes are
parameters of every module (`NUM_BANKS`, `SETS`, `WAYS`, `ROW_W`, `CNT_W`).
Their defaults live in `abp_pkg`. `SETS` and `WAYS` should be powers of two.
