# Stream query accelerator in SystemVerilog

This repository holds synthesizable SystemVerilog for three hardware
processors of sliding-window aggregate queries over a stream of stock
trades. Each tuple of the stream is 128 bits wide and holds
`<Symbol, Price, Volume, Time>`, four 32-bit words, with Symbol in the most
significant word. Punctuation tuples carry a timestamp in the Time word.
A punctuation promises that no later tuple will be older than that time,
less an allowed lateness called the slack.

All three processors take one tuple per clock cycle. The top module,
`query_accel_top`, places them side by side. They share only the clock and
a synchronous, active-high reset. Each keeps its own port group: `wid_*`,
`pane_*` and `cq_*`.

| Part | Module | What it does | Latency |
|---|---|---|---|
| Window-ID circuit | `wid_query` | One fixed query, tolerant of out-of-order tuples | 4 cycles |
| Pane-based circuit | `pane_query` | The same query, with cost independent of window overlap | 7 cycles |
| Configurable engine (CQPH) | `cqph` | Up to 64 queries, loaded at run time | 2·N_S+11 to N_G+2·N_S+10 cycles |

Latency is counted in clock edges, from the edge that takes the closing
punctuation to the edge that registers the result.

## 1. Window-ID circuit (`wid_query`)

The fixed query counts trades of one symbol over a window of RANGE
seconds. The window advances every SLIDE seconds, and tuples may arrive up
to SLACK seconds late. The defaults are symbol "UBSN", RANGE 600, SLIDE 60
and SLACK 60.

Every window that can still receive tuples gets its own circuit. There are
`N_WIN = ceil((RANGE+SLACK)/SLIDE)` of them, 11 with the defaults.

The circuit has four pipeline stages:

1. Registers the tuple and compares its Symbol with the constant.
2. ANDs that comparison into the tuple's valid flag.
3. Runs the `N_WIN` window-aggregation modules (`wid_window_agg`).
   - Each pairs a window controller (`wid_ctrl`) with an aggregation module
     (`agg_unit`).
   - Window `i` first covers `[start + i·SLIDE, start + i·SLIDE + RANGE)`.
   - When a punctuation reaches the window's end, the window reports and
     moves on by `N_WIN·SLIDE`.
   - Inside a window, a tuple counts when its timestamp falls in the window
     (eis). A punctuation closes the window (eos).
4. Multiplexes the single closing window onto the output (`union_mux`).

`load` together with `wattr_start` sets the time origin. Results appear as
`out_punct`/`out_valid` with `out_time` (the window end) and `out_value`.

## 2. Pane-based circuit (`pane_query`)

Time is cut into panes of `gcd(RANGE, SLIDE)` seconds.

1. A small set of pane-level units (`plq_ctrl` + `agg_unit`) aggregates each
   pane.
   - Only `ceil(SLACK/pane)+1` units are needed, 2 with the defaults.
   - A pane covers `[begin, begin+pane)`.
2. Their results are merged (`union_mux`).
3. The results are written into a cyclic pane buffer (`pane_buffer`).
4. A window-level controller (`wlq_ctrl`) re-reads the last `P = RANGE/pane`
   entries of every window, and a second aggregation module combines them.

A COUNT query is turned into COUNT per pane and then SUM over the panes.
SUM, MIN and MAX keep their function at both levels.

The buffer holds the next power of two at or above P+2 entries: 16 for the
defaults.

The latency of 7 holds when the window-level stage has finished re-reading
the previous window before the next pane arrives. That takes P−1 cycles
after each window.

## 3. Configurable engine (`cqph`)

Queries have the form

```
SELECT time, group, AGG(attr) FROM Trades [RANGE r SLIDE s]
WHERE <Boolean expression of predicates> GROUP BY <attribute>
```

They are set at run time by *configuration tuples*: `in_cfg` high, entering
through the same input as data. Default size:

- N_SP = 64 predicates.
- N_G = 64 queries or groups.
- 2048-entry pane buffers.
- 128-entry union FIFOs.
- N_S = 2 union stages (1 when N_G ≤ 8).

The data path has no loops:

1. **Shared selection** (`shared_selection`, 2 cycles).
   - N_SP predicates (`sel_predicate`) each compare one attribute with a
     literal (`= != > >= < <=`, signed) into a 1-bit register.
   - N_G Boolean expression trees (`bool_expr_tree`) combine the predicate
     bits into one valid flag per query.
   - Each tree is built from binary reducers (`bin_reducer`): FALSE, TRUE,
     LEFT, AND and OR.
   - Leaf reducers pick any two predicate bits by index.
2. **Group-by managers** (`groupby_manager`, 1 cycle per cell).
   - N_G cells form a systolic chain.
   - Each cell serves one query. Without GROUP BY it takes every flagged
     tuple. With GROUP BY it takes the first value it sees as its group and
     then only tuples of that group.
   - A cell that takes a tuple clears the tuple's flag for the cells behind
     it.
   - Tuples still flagged after the last cell come out on `bypass_*`. These
     are groups beyond the available cells, meant for a host.
3. **Aggregation pipelines** (`aggregation_pipeline`, 6 cycles), one per
   cell:
   - The pane-level part (`cqph_plq`) aggregates each pane `(begin, end]`.
   - The pane buffer (`pane_buffer`) stores `{non-empty, pane end,
     aggregate}`.
   - The window-level part (`cqph_wlq`, built around `wlq_ctrl`) combines
     the last P panes into each window result.
4. **Union** (`union_rr`, 2·N_S+2 cycles).
   - One FIFO per pipeline (`sync_fifo`) and a round-robin arbiter.
   - An N_S-stage multiplexer tree, two cycles per stage.
   - *Admission control*: `in_ready` falls while any FIFO holds more than
     `FIFO_DEPTH − FIFO_MARGIN` entries. The source must hold the input then.

Results are `{pipeline index, group value, window end, aggregate}`, most
significant word first. Only windows with at least one tuple produce a
result. `out_ready` is the output channel's acceptance. It is sampled at
arbitration, and the accepted word appears 2·N_S cycles later.

### Configuration map

A configuration tuple has three fields:

- `data[127:112]`: target ID.
- `data[111:108]`: register select.
- `data[107:0]`: payload.

Every module forwards every configuration tuple. Only the module whose ID
matches loads it.

| Module | ID | Select | Payload |
|---|---|---|---|
| predicate i | i | 0 | literal [31:0], op [34:32] (EQ,NE,GT,GE,LT,LE = 0..5), attribute [36:35], enable [37] |
| reducer j of tree t | N_SP + t·(N_SP−1) + j | 0 | op [2:0] (FALSE,TRUE,LEFT,AND,OR = 0..4), left index [8+], right index [16+] |
| group-by manager g | N_SP + N_G·(N_SP−1) + g | 0 | enable [0], GROUP BY [1], group attribute [3:2], query [8+] |
| PLQ g | previous base + N_G + g | 0 | first pane start [31:0], pane length [63:32], pane step [95:64] |
| | | 1 | enable [0], function [2:1] (COUNT,SUM,MIN,MAX), value attribute [4:3], time attribute [6:5] |
| WLQ g | previous base + 2·N_G + g | 0 | panes per window [15:0]; also clears the buffer pointers and any partial window |
| | | 1 | enable [0], function [2:1] (SUM for a COUNT query) |

Tree nodes are numbered in heap order. Node j's children are 2j+1 and
2j+2, and nodes from N_SP/2−1 upward are leaves. Attributes are numbered
0 = Symbol, 1 = Price, 2 = Volume, 3 = Time.

### Limits of the engine as built

- A window's range must be a multiple of its slide. The pane length is set
  to the slide, and one result leaves per pane.
  - Every range/slide pair of the intended workloads (ranges 60, 300, 600
    and 1800 s; slides 1, 5, 10 and 30 s) meets this.
- A window may span at most 2046 panes.
- The stream must be in time order (no slack).
- At most N_G groups in total are served. Further groups go to the bypass
  port.
- Examples with N_G = 64:
  - 64 single-symbol GROUP BY queries fit.
  - 64 queries over 4 symbols each need 256 groups and do not fit.

## 4. Design decisions that differ from a literal reading of the source design

- **Window-level controller `eis`.** The controller raises `eis` from a
  registered "a pane was read" flag, not from "the read pointer changed".
  With two panes per window, the pointer jump lands on the same address,
  and the compare would drop a pane. Single-pane windows are also handled.
- **Window-ID windows report when empty.** The window-ID circuit reports
  every closed window, an empty one with value 0.
- **CQPH skips empty windows.** CQPH reports only non-empty windows.
- **Encodings are local.** The tuple packing and the configuration and
  result formats are this design's own. So are the FIFO depth and the
  admission margin (N_G+16).
- **What is not built.**
  - The network interface and punctuation generator.
  - The host software and the query compiler.
  - The memory-bus interface used for throughput runs.
  - The three processors' ports are plain valid/ready-style signals instead.

## 5. Verification

Each module has a self-checking testbench in `tb/`. Each testbench drives
random stimulus and compares against a reference model written
independently in the testbench. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

The checked behaviour includes:

- Exact results of every window.
- The latencies above: 1 cycle per predicate, 2 cycles for selection, 4, 7,
  6, 2·N_S+2 and 2·N_S+11+g.
- Round-robin order.
- No lost results under admission control.
- Group claiming and bypass.
- Reconfiguration between phases.

`tb_query_accel_top` runs the whole top at its default size. It feeds an
out-of-order stream to the two fixed circuits and configures four queries
on the engine, including one on the last pipeline (63). It reports how
often each mechanism occurred: configuration tuples, claims, new groups,
bypassed tuples, admission-control stall cycles, late tuples and results
per circuit.

`tb_q11_workload` runs the engine at its default size on the benchmark
query template

```
SELECT Time, Symbol, <AGG> FROM Trades [RANGE r SLIDE s WATTR Time]
WHERE Symbol in (<symbol list>) GROUP BY Symbol
```

with 25 ticker symbols and random aggregates (COUNT(*), and MAX, MIN or SUM
of Price or Volume). It runs three phases of 64 groups each: 64 queries of 1
symbol, 16 of 4 and 4 of 16. Windows use ranges of 60 or 300 s and slides
of 5, 10 or 30 s. Longer ranges (up to 1800 s with 1 s slides) work the same
way but need far more simulated cycles, because a window of P panes takes P
cycles to re-read. Larger query sets, such as 64 queries of 4 symbols, need
more groups than the 64 managers and send the extra groups to the bypass
port.

A broken variant of each module was used to confirm that its testbench
fails. Only the testbench runs and lint/synthesis checks were done. No
timing closure was attempted on an FPGA.

## 6. Simulating

Any testbench builds with plain verilator, package first:

```
verilator --binary --timing --assert --top-module tb_cqph \
    rtl/sq_pkg.sv $(ls rtl/*.sv | grep -v sq_pkg) tb/tb_cqph.sv
./obj_dir/Vtb_cqph
```

The full-size end-to-end test, `tb_query_accel_top`, builds in under a
minute and runs in a few seconds. Unit testbenches use reduced sizes
(e.g. four predicates and four pipelines for `tb_cqph`), set through
parameters. Every module's parameters default to the full design.

## 7. Files

- `rtl/sq_pkg.sv`: tuple type, encodings and helper functions (window and
  pane counts, configuration IDs).
- `rtl/query_accel_top.sv`: the top.
- `rtl/*.sv`: one module per file, named as above.
- `tb/tb_<module>.sv`: the testbench of each module.
