# Stream fetch engine

A superscalar front end has to deliver many instructions per cycle, and the
branches between basic blocks get in the way. This engine takes the
*instruction stream* as its unit of fetch. A stream is the run of sequential
instructions from the target of one taken branch to the next taken branch.
A stream can hold several basic blocks joined by not-taken branches. Once a
compiler has laid out the code so that frequent paths fall through, streams
are long: typically 16 to 20 or more instructions.

A stream is fully named by two numbers, its start address and its length.
Every branch inside it is implicitly not taken, and the last one is taken.
So one prediction per stream is enough. The predictor never looks at the
individual conditional branches. The instructions are already sequential in
memory, so a plain instruction cache with very long lines is the only
instruction store. There is no trace cache, no fill unit and no second
predictor.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It has an
end-to-end testbench and a self-checking testbench for every block.

## The three stages

```
 fetch address ──► next stream predictor ──► FTQ ──► instruction cache ──► rotate & select ──► out reg ──► back end
      ▲                     │                 ▲            (one line)       (≤ 8 instr.)
      └── next stream start ┘                 └── head start += n, length -= n
```

1. **Fetch request generation.** The predictor holds the current fetch
   address. In one cycle it looks it up and produces a request
   `{start, length}` and the start of the following stream. That start
   becomes the fetch address of the next cycle. The request goes into a
   4-entry fetch target queue (FTQ). When the FTQ is full the predictor
   stalls.
2. **Instruction cache access.** The start address of the FTQ head reads one
   whole line: 32 instructions, or 128 bytes, for an 8-wide machine.
3. **Instruction fetch.** Rotate & select moves the first instruction of the
   request to slot 0. It keeps `n = min(8, instructions to the end of the
   line, instructions left in the stream)` slots, and the bundle is
   registered for the back end.

By default stages 2 and 3 share a cycle. A predicted stream therefore
reaches the output register two cycles after its prediction when the FTQ is
empty. With `LINE_BUF` = 1 a cache line buffer sits between the two stages.
It holds the line just read and the part of the head request it serves, so
the cache access and rotate & select get a cycle each. That adds one cycle
of latency and changes nothing else. The
predictor can make one prediction per cycle. In steady state the rate is
bounded by the cache side: one line per cycle, at most 8 instructions.

## Why one request can take several cycles (FTQ head update)

A stream is usually longer than 8 instructions, and it may cross line
boundaries. The request is not split into smaller requests. Instead, the
FTQ head is updated in place: each cycle its start advances by `n`
instructions and its length drops by `n`. When the length reaches zero the
head retires and the next request moves up. The predictor can therefore run
several streams ahead of the cache. That is also why a 4-entry FTQ is enough.

Because the cache reads only one line per cycle, a short stream that
straddles a line boundary costs two cycles. For example, 3 instructions split
2+1 take two cycles. Long lines make this rare, and they avoid the
interchange network that a two-line, banked cache would need.

## The next stream predictor

This is the part that takes the most care to understand.

### Two tables, one cascade

| table | index | size | holds |
|---|---|---|---|
| first | current fetch address | 1K entries, 4-way | tag, length, branch type, next start, 2-bit counter |
| second | DOLC hash of the address and the path | 6K entries, 3-way (2048 sets) | same fields |

Both tables are read every cycle:

* If both hit, the second (path-correlated) table wins.
* If only one hits, its entry is used.
* If both miss, the engine falls back to **sequential fetching**. It requests
  the rest of the current cache line and moves to the next line. It goes on
  doing so until a table hits again or a misprediction redirects it.

A stream ending in a **call** pushes the address after the stream onto the
8-entry return address stack. A stream ending in a **return** takes its next
start from the top of that stack, not from the table.

### Overlapping streams and the hysteresis counter

Two different streams can start at the same address. In the example loop
`A → (B | C) → D`, the frequent path A-B-D is one 53-instruction stream. In
the passes where A's branch is taken, the stream is A alone (6
instructions). Such streams share a tag in the first table. They are told
apart by the path that led to them, which indexes the second table.

Both tables are updated from *committed* streams, using the same rules:

* The tag is present and length and next start match: the counter goes up,
  saturating at 3.
* The tag is present but the data differs: the counter goes down. When it
  would reach zero, the entry takes the new stream and the counter restarts
  at 1.
* The tag is missing: the victim is an invalid way if there is one, otherwise
  the lowest-counter way. It follows the same rule as a mismatching hit, so a
  confident entry survives one intruder.

The first table always takes the update. The second table allocates a new
entry only in two cases:

* the stream was not in the first table yet (its first appearance);
* the back end flags the stream as mispredicted.

Streams that do not need path information therefore stay out of the second
table, and its capacity goes to the ones that do.

### DOLC path hash

`12-2-4-10` means the hash uses:

* a path depth of 12 previous stream starts;
* 2 bits from each of the 11 older starts;
* 4 bits from the last start;
* 10 bits from the current fetch address.

The low bits of the word addresses are used. The 36 bits are XOR-folded into
the 11-bit index of the second table (`dolc_hash`).

### Two path history registers

* The **lookup** register is shifted when a predicted stream is sent to the
  FTQ, so it follows the speculative path. Sequential fallback requests are
  not shifted in.
* The **update** register is shifted when the back end commits a stream
  with `in_path` set (see partial streams below). It sees only the correct
  path, and it is the history used to index second-table updates.
* On a misprediction the update register, including a commit made in the
  same cycle, is copied into the lookup register.

### Return address stack recovery

Every request carries a checkpoint: the stack index and top entry as they
were *before* that stream's push or pop. The checkpoint travels with the
fetched bundle (`out_ckpt`). On a misprediction the back end returns the
checkpoint of the stream that held the mispredicted branch, together with
that branch's real type. The stack puts back the index and the top entry,
then applies the real branch's own push (call) or pop (return).

## Back-end contract

The engine works with any back end that keeps these rules:

* **Commit** (`upd_valid`, `upd`): one completed stream per cycle, in program
  order. A stream is `{start, length in instructions, type of the taken branch
  that ended it, next start, mispredicted}`. `mispredicted` is set when a
  branch in the stream, or its final branch, went another way than fetched.
  A sixth field, `in_path`, is described under partial streams below.
  Lengths above 255 must not be reported (`LEN_W` = 8).
* **Redirect** (`redirect_valid`, `redirect`): the correct next fetch
  address, the checkpoint of the mispredicted stream, the real type of the
  mispredicted branch (JUMP for a conditional branch) and its return address
  (branch address + 4). The redirect flushes the FTQ and the output register
  in the same cycle. The predictor restarts at the target on the next cycle.
  The path history is rebuilt from committed streams only. Send the redirect
  after the older streams, including the one that ends at the mispredicted
  branch, have been committed; otherwise the lookup history misses them.
* **Partial streams.** Fetch resumes at the point of misprediction: there is
  no rollback to the start of the stream. When the misprediction was inside
  a stream, the back end reports two records when that stream ends:
  * the whole stream, with `in_path` clear. It trains the tables but is not
    shifted into the update history, because fetch did not follow it;
  * the partial stream, from the redirect target to the taken branch, with
    `in_path` set.

  The lookup history, rebuilt at the redirect, then sees the same streams as
  the update history. The next redirect to the same place finds the partial
  stream in the tables. All other streams have `in_path` set.
* **Refill** (`mem_*`): the cache issues a one-cycle `mem_req` with a line
  address and expects the whole 1024-bit line once, with `mem_resp_valid`.
  Only one refill is outstanding at a time.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `FETCH_W` | 8 | instructions per bundle (pipeline width) |
| `LINE_INSTR` | 4 × `FETCH_W` = 32 | instructions per cache line (128 bytes) |
| `IC_BYTES`, `IC_WAYS` | 65536, 2 | instruction cache size and ways |
| `FTQ_DEPTH` | 4 | FTQ entries |
| `LINE_BUF` | 0 | 1 puts a cache line buffer between cache access and rotate & select |
| `T1_ENTRIES`, `T1_WAYS` | 1024, 4 | address-indexed table |
| `T2_ENTRIES`, `T2_WAYS` | 6144, 3 | path-indexed table |
| DOLC (in `next_stream_predictor`) | 12-2-4-10 | path hash |
| `RAS_DEPTH` (`fetch_pkg`) | 8 | return address stack |
| `ADDR_W`, `INST_W`, `LEN_W` (`fetch_pkg`) | 64, 32, 8 | address, instruction and length widths |

The 2- and 4-wide machines of the original evaluation are `FETCH_W` = 2 and
4, with 32- and 64-byte lines.

## Files

| file | block |
|---|---|
| `rtl/fetch_pkg.sv` | shared types: request, committed stream, redirect, checkpoint, branch type |
| `rtl/stream_fetch_engine.sv` | top: the three stages and the output register |
| `rtl/next_stream_predictor.sv` | cascade, selection, sequential fallback, update policy |
| `rtl/stream_table.sv` | one set-associative stream table with hysteresis replacement |
| `rtl/dolc_hash.sv` | path hash |
| `rtl/path_history.sv` | lookup and update history registers |
| `rtl/ras.sv` | return address stack with checkpoint restore |
| `rtl/ftq.sv` | fetch target queue with in-place head update |
| `rtl/icache.sv` | 64KB 2-way single-ported cache, whole-line read, LRU, refill |
| `rtl/rotate_select.sv` | alignment and selection of up to `FETCH_W` instructions |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/fetch_backend_model.sv` | behavioural back end, test program and memory used by the engine-level testbenches |
| `tb/tb_fetch_widths.sv` | the engine at 2, 4 and 8 wide, and 8 wide with the line buffer |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fetch_pkg.sv tb/tb_stream_fetch_engine.sv \
          --top-module tb_stream_fetch_engine -Mdir obj
./obj/Vtb_stream_fetch_engine
```

Replace the name to run another block's testbench. Lint a block with
`verilator --lint-only -Wall -Irtl rtl/fetch_pkg.sv rtl/<block>.sv`.

## What the tests show

* `tb_stream_fetch_engine` runs the whole engine at its default sizes for
  6000 cycles. The program is the if-then-else loop above, laid out
  A-B-D-E with C out of line. F is a subroutine called from D and from C.
  The behavioural back end has these properties:
  * it follows the correct path and checks every accepted instruction word
    against the memory image;
  * it refuses 1 bundle in 16;
  * it detects mispredictions and redirects;
  * it commits streams.

  A 15-cycle memory model answers refills. The test requires every mechanism
  to occur at least once:
  * sequential fallback;
  * hits in each table;
  * a full FTQ;
  * cache misses;
  * partial head updates;
  * redirects;
  * returns taken from the stack;
  * back-end stalls;
  * full 8-wide bundles.

  A second engine in the same bench runs the program with an extra branch
  inside B, taken on an irregular 1 in 8 passes. It mispredicts inside a
  stream, so partial streams occur. The test requires that partial streams
  are committed and that the predictor hits at their start on later
  redirects (9 committed, 7 such hits).

  It also checks that no bundle crosses a line. Once trained, the path table
  predicts the every-fourth-pass branch: the test requires no more than 2
  redirects in the second half. The result is 0 redirects in the second
  half and about 5.7 instructions per cycle delivered.
* `tb_fetch_widths` runs the same program on four engines side by side:
  2-, 4- and 8-wide, with 32-, 64- and 128-byte lines, plus the 8-wide one
  with the cache line buffer. Once trained they deliver about 1.8, 3.3, 5.75
  and 5.73 instructions per cycle. The back end's random refusals cap the
  2-wide engine at 1.875.
* The block testbenches use hand-worked values or independent reference
  models:
  * hysteresis and victim order of the table;
  * the hash, bit by bit;
  * history copy on restore;
  * stack restore plus the real branch's push or pop;
  * FTQ order, head update and flush;
  * line alignment including a 3-instruction stream split over two lines;
  * cache LRU and refill latency;
  * predictor path correlation, calls and returns, stall, and a stream
    committed with `in_path` clear leaving the history alone.

## Design choices not fixed by the architecture

Where the architecture leaves a detail open, these choices were made:

* **Widths.** 64-bit byte addresses, 4-byte instructions, an 8-bit stream
  length and a 2-bit branch type.
* **Table tags.** The first table is tagged with the address bits above its
  index, the second with the whole instruction address.
* **Table reads and update ports.** Both tables are read combinationally, so
  the prediction loop is one cycle. Each has a separate update port that does
  its read-modify-write in one cycle.
* **Sequential fallback.** It requests the rest of the current line.
* **Partial streams and the path history.** The whole stream that
  contained an in-stream misprediction is committed off the path
  (`in_path` clear), and the partial stream that fetch followed is shifted
  into the history instead.
* **Reset.** The engine starts at `RESET_PC` (0). A redirect starts it
  anywhere.
* **Cache.** LRU replacement and one outstanding refill. Data and tags are
  not reset; valid bits are.
* **Return stack checkpoint.** It is kept once per stream (one prediction),
  carried in the FTQ entry and the fetched bundle, not once per branch
  instruction. Inside a stream only the last branch can change the stack,
  so the two are equivalent.
* **Return stack.** Wrap-around on overflow, and the real branch is
  re-applied after a restore.
* **Cache line buffer.** It is optional (`LINE_BUF`, default 0, one stage
  for cache access and selection). The FTQ head is advanced when the line
  enters the buffer, so the in-place head update works the same in both
  forms.
