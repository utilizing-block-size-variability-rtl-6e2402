# VSBC: a Variable-Sized Block Cache for instruction fetch

A trace cache raises fetch bandwidth by storing instructions in the order they
executed, so several basic blocks can be delivered in one fetch even across
taken branches. It has a cost. The same basic block ends up in many traces, and
a trace can only be entered at its first instruction. The Variable-Sized Block
Cache (VSBC) keeps the benefit of trace fetch without the duplication. It
stores each instruction once, and it keeps traces as lists of pointers to
basic blocks:

* The **basic block cache (BBC)** holds instructions. Each instruction sits at
  the line picked by its own address, like in an ordinary set-associative
  cache. A basic block is then just a run of consecutive lines, of any length.
  The BBC is shared by all hardware threads.
* The **block pointer cache (BPC)** holds one line per trace. A line records
  four basic blocks: for each, its head and tail address and the BBC way that
  holds it, plus the taken/not-taken outcome of the branches that end the
  first three blocks. A fetch address that matches the head of *any* of the
  four blocks is a hit, so a trace can be entered in the middle.

On a hit, each block is read from its own way through its own read port. A
per-thread **coalescing buffer** lines the blocks up back to back, and the
result goes to the decoder, 16 instructions per cycle. Traces are built on the
side. A per-thread **trace build engine** watches the executed instructions,
writes them into the BBC and collects block boundaries in its trace build
buffer (TBB). After four blocks it copies the TBB into the BPC.

This repository gives synthesizable SystemVerilog for that fetch system in its
multi-threaded form (two threads by default). It also has self-checking
testbenches for every module and for the whole system.

## Block diagram

```
 executed instructions (per thread)            fetch address + 3 predicted
 pc, instr, branch info                        branch outcomes (per thread)
        |                                                |
        v                                                v
 +----------------------+  writes   +---------------------------------------+
 | trace_build_engine t |---------->|             vsbc_storage              |
 |   (TBB)              |<--way-----|  rr_arbiter: one request per cycle    |
 +----------------------+           |  bpc:  NBPC lines, split per thread  |
                                    |  bbc:  WAYS ways x LINES, shared      |
                                    |  mode register per thread            |
                                    +---------------------------------------+
                                          | result + data of all ways
                                          v
                                 +----------------------+   +-----------------+
                                 | coalescing_buffer t  |   | instruction     |
                                 | way mux, rearrange,  |   | cache (outside) |
                                 | coalesce, 16/cycle   |   +-----------------+
                                 +----------------------+          |
                                          |                        |
                                          v                        v
                                      +----------------------------------+
                                      | fetch_mux t  (select by mode)    |
                                      +----------------------------------+
                                                   |
                                                   v  to decoder / execution engine
```

`vsbc_top` builds this picture for `NTH` threads. The branch predictors, the
BTBs, the instruction cache and the execution engine are not part of the RTL.
Their signals are ports of `vsbc_top`.

## Storage formats

A BPC line (`vsbc_pkg::trace_t`, plus an LRU rank kept in `bpc`):

| field          | width       | meaning                                          |
|----------------|-------------|--------------------------------------------------|
| tid            | 4           | thread the trace belongs to                      |
| valid          | 1           | line holds a trace                               |
| head[0..3]     | 4 x 32      | byte address of each block's first instruction   |
| tail[0..3]     | 4 x 32      | byte address of each block's last instruction    |
| way[0..3]      | 4 x 3       | BBC way holding each block                       |
| br[0..2]       | 3           | branch status after blocks 0..2, 1 = taken       |
| LRU rank       | log2(NBPC/NTH) | 0 = most recently used within the thread     |

The last block's branch outcome is not kept. A block's length is
`(tail - head)/4 + 1` instructions. Instructions are 32 bits wide (4 bytes).

A BBC line holds one instruction (32 bits), its tag, the writing thread's ID
and a valid bit. Index = `addr[2 +: log2(LINES)]`. Tag = the bits above the
index. With the default 4 KB and 4 ways, each way has 256 lines. A block of
length L with head H uses the lines `index(H) .. index(H)+L-1` of one way,
wrapping at the end of the way.

## Building a trace (`trace_build_engine`)

The engine sees one executed instruction per cycle, with a valid/ready
handshake. For each instruction it:

1. Sends a write to the storage module, so the instruction lands in the BBC.
   The stream only advances when that write is granted.
2. If the instruction starts a block (the first one after a block end), it
   records the address as the block's head. It also keeps the way that the BBC
   chose for it in the same cycle. The rest of the block goes to that way.
3. If the instruction ends a block, it records the address as the tail. A
   block ends at a control instruction, or after 16 instructions so that the
   block fits one BBC read port. For blocks 0..2 it also records the branch
   status: the taken bit of a conditional branch, 1 for an unconditional
   transfer, 0 for a block cut at 16.
4. After the fourth block it sends the whole TBB to the BPC as one trace
   write. The executed stream waits for that one request.

The BBC picks a way for a block's first instruction as follows:

* the way that already holds that address for the same thread, else
* an invalid way at that index, else
* a round-robin victim.

Executed code that is already present is rewritten in place and not
duplicated. In the BPC, a new trace with the same first head and the same
branch status replaces the existing line. Otherwise it takes an invalid line
of the thread's partition, or else that partition's least recently used line.

## Finding and delivering a trace

A lookup carries the fetch address and three predicted branch outcomes. It
takes two cycles in the storage module:

| cycle | what happens |
|-------|--------------|
| 0     | Request granted (`lk_ready`). The BPC compares the address with every head of every valid line of the thread. For a match at block k, branch status k, k+1, ... is compared with predictions 0, 1, .... Delivery stops after the first block whose branch disagrees. The line that delivers most blocks is registered. |
| 1     | The blocks to deliver are read from the BBC: slot j uses read port j of every way. Each line of each block must match in tag, thread and valid bit in the recorded way. Delivery stops before the first block that fails. The result and the data of all ways go to the thread's coalescing buffer. The thread's mode becomes *trace delivery* on a hit and *trace assembly* on a miss. |
| 2     | `resp_valid` with hit/miss, partial flag and length. On a hit the first 16 packed instructions are on `ex_*` in this same cycle. |
| 3..   | The next 16 each cycle, until the trace is out (`ex_last`). |

So a trace hit needs three things: the address matches a block head in the
BPC, the BBC tags match, and the recorded branch bits match the prediction. A
*partial* hit delivers fewer blocks than the trace holds from its start block
onward, either because a prediction disagrees or because a block was
overwritten in the BBC. It still delivers the blocks before that point. A hit
that starts at block k > 0 delivers blocks k..3.

The coalescing buffer does the way selection, rearranging and packing in one
cycle. Block j comes from `res_data[way[j]][j]`. Output slot
`len[0]+...+len[j-1]+i` gets instruction i of block j.

A thread cannot start a new lookup while its previous lookup is in the
pipeline or while its coalescing buffer is still delivering. `lk_ready` stays
low until then. In assembly mode the fetch mux passes instruction-cache lines
(`ic_*`) to `ex_*` unchanged.

## Threads

* BPC lines are split evenly. Thread t owns lines
  `t*NBPC/NTH .. (t+1)*NBPC/NTH-1`. Lookup, replacement and LRU stay inside
  that range.
* The BBC is shared. The thread-ID field in each line keeps threads from
  hitting on each other's code, but their blocks can overwrite each other.
  This shows up as cut or missing traces.
* Every thread has its own trace build engine, coalescing buffer and fetch
  mux.
* All lookup and write requests of all threads go through one round-robin
  arbiter (`rr_arbiter`). The arbiter serves one request per cycle. The
  requester after the last one granted has the highest priority.

## Parameters (`vsbc_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| NTH       | 2       | hardware threads (up to 16, the width of the thread-ID field) |
| NBPC      | 512     | BPC lines (traces), split evenly among threads |
| WAYS      | 4       | BBC ways (up to 8, the width of the way-ID field) |
| BBC_BYTES | 4096    | BBC capacity; LINES per way = BBC_BYTES/4/WAYS |
| DELIVER_W | 16      | instructions delivered per cycle |

Fixed in `vsbc_pkg`: 4 blocks per trace, 16-instruction read ports, 32-bit
addresses and instructions. The evaluated design space covers BBC sizes of
1-16 KB, 1-8 ways, 512 or 1024 BPC lines and 1-16 threads, and all of these
are reachable through the parameters. Keep `NBPC/NTH` and `LINES` powers of
two.

## Interface of `vsbc_top`

All per-thread ports are packed arrays indexed by thread.

| port | dir | meaning |
|------|-----|---------|
| clk, rst_n | in | clock; synchronous active-low reset |
| lk_valid, lk_addr, lk_pred[2:0] | in | lookup: fetch address and predicted outcomes of the next three block-ending branches |
| lk_ready | out | lookup accepted this cycle |
| resp_valid, resp_hit, resp_partial, resp_len | out | lookup response, two cycles after acceptance |
| ret_valid, ret_pc, ret_instr, ret_ctrl, ret_cond, ret_taken | in | executed instruction: control instruction, conditional, taken |
| ret_ready | out | executed instruction accepted |
| ic_valid, ic_count, ic_instr[16] | in | instruction-cache line for assembly mode |
| ex_valid, ex_vsbc, ex_count, ex_instr[16], ex_last | out | instructions to the decoder; ex_vsbc = from the VSBC |
| mode | out | 1 = trace delivery, 0 = trace assembly |

## Where this RTL goes beyond, or departs from, the VSBC description

The architecture fixes these points: the BPC/BBC split and the fields of their
lines, hits on any block head, the three hit conditions, LRU in the BPC, a
thread ID in both structures, BPC lines dedicated to threads with a shared
BBC, four 16-wide read ports per way, the coalescing buffer, one build engine
and one coalescing buffer per thread, round-robin service, and 16
instructions per cycle. Everything below is this implementation's own choice:

* **Timing.** The original is specified only functionally. The two-cycle
  lookup, the single storage request per cycle and the chunked delivery
  timing are choices made here.
* **One instruction per BBC line, 4-byte instructions.** This is how a block
  "of any length" maps onto an address-indexed array.
* **Way per block.** The description says both that a trace's blocks may sit
  in several ways and that they sit in one way. Here the way is chosen per
  block, with the rule given in "Building a trace".
* **16-instruction block limit.** Blocks are said to be limited only by the
  size of a way, but each read port is 16 instructions wide. The port width
  wins here: longer blocks are split. A trace therefore holds at most
  4 x 16 = 64 instructions.
* **One BPC write per trace.** The TBB is copied into the BPC once, after its
  fourth block. The description can also be read as one BPC write per block.
* **Partial hits.** Delivering the blocks before a mispredicted branch or an
  overwritten block is this design's reading of "partial trace hit".
* **Branch status** of unconditional and length-cut block ends (1 and 0), the
  longest-delivery rule between several matching BPC lines, and the rewrite of
  an identical trace are choices made here.
* **BPC organisation.** The BPC is searched fully associatively, because any
  head of any line can match. LRU is exact, as a rank per line within the
  thread's partition. The listed BPC associativity of 1 does not fit LRU
  replacement. The LRU statement was followed.
* **Defaults.** The defaults are two threads and four ways, as in the system
  diagram, with 512 BPC lines and a 4 KB BBC. The published comparison
  against a trace cache mostly used a 1-way BBC (set `WAYS=1`).

## Hardware cost notes

The design follows the architecture literally, and some of that is expensive.
Each lookup compares the address with 4 x NBPC/NTH head addresses. The BBC
reads 4 ports x 16 lines in every way in one cycle. All arrays are written as
plain SystemVerilog arrays with combinational reads, not as SRAM macros. A
real implementation would bank the BBC (16 interleaved banks per way give one
line per bank per port) and would likely narrow the BPC compare. The
interfaces here would not change.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| tb_rr_arbiter | grants against a reference pointer model under random requests; equal service with all requesters active |
| tb_bbc | random block writes from two threads into a small BBC; way choice and every read port line (data, hit) against a reference model |
| tb_bpc | random inserts and lookups on 8 lines / 2 threads; hit, block count, start block and selected line against a model with its own MRU list; rewrites and evictions counted |
| tb_trace_build_engine | random executed path with random storage back-pressure; every instruction write and every trace (heads, tails, ways, branch status) against an independent block split |
| tb_coalescing_buffer | random results; packed order, 16 per cycle, delivery length in cycles, other-thread and miss results ignored |
| tb_fetch_mux | source selection by mode |
| tb_vsbc_storage | full, mid-trace, branch-cut and clobber-cut hits, misses, one-cycle result latency, mode, alternating service of four simultaneous requesters |
| tb_vsbc_top | end-to-end at the default sizes (see below) |
| tb_vsbc_threads | the same end-to-end test with 16 threads, 1024 BPC lines (64 per thread), 4 KB, 4 ways |

`tb_vsbc_top` runs two threads of synthetic programs through the whole system
for about 65,000 cycles (30,000 instructions per thread). It uses a perfect
branch predictor and shared code addresses, so the threads compete for the
BBC. It checks:

* every instruction reaching the decoder, in order, against the program path;
* the two-cycle lookup latency;
* 16 instructions per cycle in every delivery cycle but the last.

It also counts each mechanism and fails if any of them never happens: full,
partial and mid-trace hits, misses, both mode switches, BPC LRU evictions and
rewrites, traces cut by overwritten BBC lines, blocks cut at 16, arbitration
conflicts, lookups held by a busy coalescing buffer, multi-cycle deliveries,
and a stalled executed stream. A typical run reports a trace miss rate around
49% and an average delivered trace length of about 17 instructions. These
numbers describe the synthetic programs, not SPEC workloads.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/vsbc_pkg.sv tb/tb_vsbc_top.sv --top-module tb_vsbc_top -o sim
./obj_dir/sim
```

Replace `tb_vsbc_top` with any other testbench name. `-y rtl` lets Verilator
find the modules by file name. The package must be named first.
`tb_vsbc_top` finishes in about ten seconds and `tb_vsbc_threads` in about
thirty.

## Files

* `rtl/vsbc_pkg.sv`: widths, the BPC line, write-request and lookup-result
  records, and the block-length function
* `rtl/vsbc_top.sv`: the multi-threaded fetch system
* `rtl/vsbc_storage.sv`: the storage module (arbiter, BPC, BBC, mode)
* `rtl/bpc.sv`, `rtl/bbc.sv`, `rtl/rr_arbiter.sv`
* `rtl/trace_build_engine.sv`, `rtl/coalescing_buffer.sv`, `rtl/fetch_mux.sv`
* `tb/tb_*.sv`: one testbench per module, plus the system test
