# Checksum-based fault detection for a two-thread pipeline, without compression

A transient fault (a particle strike that flips one bit in a latch or
flip-flop) in a processor pipeline can silently corrupt a result. This design
detects such faults by running every block of instructions twice, once in each
of two hardware threads, and comparing a checksum of what each run left in the
pipeline. The checksum is not squeezed into a single word. A register chain
that runs alongside the pipeline keeps one checksum word per stage, and all of
these words are compared in parallel. Nothing is folded together before the
compare, so nothing is lost to folding. And the compare does not have to wait
for the checksum to shift out of the chain.

The RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`, with a self-checking
testbench per module in `tb/`.

## The checksum chain

Each thread has a chain of `NSTAGES+1` word registers `c[0..N]` (N = `NSTAGES`,
32-bit words). The chain shifts in the same direction as the pipeline. Each
stage adds in the word it is handing to its latch (`tap[i]`). The chain's last
register is fed back through the generator polynomial:

```
c[0]   <= word fetched this cycle
c[i+1] <= c[i] ^ tap[i] ^ (g_i ? c[N] : 0)          i = 0 .. N-1
```

```
 fetch ──► stage0 ──┬─► latch0 ──► stage1 ──┬─► latch1 ── ... ──► stageN-1 ──┬─► latchN-1 ─► out
                    │ tap0                   │ tap1                           │ tapN-1
 word ─► c0 ──────► ⊕ ─► c1 ──────────────► ⊕ ─► c2 ── ... ──────────────────► ⊕ ─► cN ─┐
                    ▲ g0                     ▲ g1                             ▲ gN-1    │
                    └────────────────────────┴────────── feedback ────────────┴─────────┘
```

A CRC register has one serial input. This register takes a full word from
every stage in every cycle. The polynomial is given by the integer value of
its coefficients, so `g_i` is bit `i` of `POLY`. `POLY = 11 = 0b01011` is
g(x) = x³ + x + 1. The number of stages limits the degree to N-1, so a
5-stage pipeline has 32 possible polynomials. The default `POLY = 11` is one
that the original fault-injection study found to give full coverage on five
stages.

The last latch is not tapped: its output leaves the pipeline. This matches
the tap points of the scheme, which sit between each stage and its latch.

## Two threads, one block at a time

Both threads run the same instruction stream, each with its own program
counter (block multithreading). Thread 0 fetches one instruction per cycle
until it fetches a branch. Then the context switches, and thread 1 fetches the
same block from the same addresses. Every pipeline latch carries the thread ID
of its word. At every tap, a demultiplexer controlled by that thread ID
steers the word to its own thread's chain, and the other chain gets zero. A
flipped thread ID therefore moves a word into the wrong checksum, and the
compare catches it.

For a block of length L that starts in cycle 0, with D = `DRAIN`:

| cycle      | what happens                                                        |
|------------|---------------------------------------------------------------------|
| 0          | thread 0 fetches; its chain restarts from zero (`clear[0]`)         |
| 0 .. L-1   | thread 0 fetches the block, ending with the branch                  |
| L          | thread 1 fetches; its chain restarts from zero (`clear[1]`)         |
| L .. 2L-1  | thread 1 fetches the same block                                     |
| L+D        | all N+1 words of thread 0's chain are written to the store          |
| 2L .. 2L+D-1 | drain: nothing is fetched                                         |
| 2L+D       | compare: thread 1's N+1 words against the stored ones               |

Both checksums are taken exactly L+D cycles after their own block began, and
both start from zero. So without a fault they are equal, word for word. This
is why the chains restart at each block start. Otherwise a chain's contents
would depend on how long the other thread's block ran.

**Drain.** With `DRAIN = 0`, the compare comes as soon as thread 1 has fetched
its branch. That is the earliest point, but the block's last few words have
not yet passed the deeper taps, so a fault that hits them is never seen. The
default `DRAIN = NSTAGES-1` waits until the last word has passed every tap.
That costs N-1 idle cycles per block pair.

**Stale words.** With a short drain, words from a thread's previous block can
still be in the pipeline when its next block starts. So can a thread-0 word
whose thread ID was flipped. A small age counter per
thread keeps them out: `a` cycles after a block start, only taps `0..a` can
hold the new block's words, so deeper taps are masked (`stale` output). With
the default drain, only a flipped thread ID triggers this.

**On a mismatch** the pipeline is flushed. Both program counters return to the
address where the pair began, which is the instruction after the last branch
that compared clean, and the pair runs again. A block with no branch is cut
after `MAX_BLOCK` instructions (a forced switch). This bounds both the time
to detection and the counter widths.

## What is detected, and what is not

Every stage in this model passes its word on unchanged (the evaluation model
of the scheme does the same). So a word hit in latch j is added into the
chain once at every later tap, always along the same diagonal of the chain.
An XOR of the same error twice cancels, so whether the error survives
depends on how many taps are left after latch j. An error that reaches `c[N]`
is fed back and then stays in the state, and the compare sees it. One that
cancels first is lost, whatever the polynomial. The test
`tb_cfd_coverage` measures this on the RTL. It injects single-bit flips of a
word or thread ID into random pipeline latches, during either thread's run
of a block:

| pipeline | polynomials             | detected |
|----------|-------------------------|----------|
| 5 stages | 0 (no feedback)         | 19.8 %   |
| 5 stages | any of 1..31            | 36.8 %   |
| 8 stages | 32 sampled of 0..255    | 49.6 %   |

Flips in the checksum registers themselves are caught, except when they
land after the checksum has been stored or compared. With those flips
included, `tb_cfd_top` detects about 59 % of all injected upsets. The mean
time from upset to report is about 7.4 cycles. An upset in thread 0's run
also waits for thread 1's run of the block. For upsets in thread 1's run
alone, the mean is about 5.8 cycles.

The original study reports full coverage for polynomials 3, 11 and 27 on five
stages, and a strong dependence on the polynomial. This RTL does not
reproduce either result. The study's fault and compare model is not specified
closely enough to rebuild it. One example: if an upset were counted at a
single tap only, any polynomial with g0 = 1 would keep the error forever. The
measured numbers above are what this hardware does. The cancellation comes
from the pass-through stages. Real stages transform their words, so in a real
pipeline the same flip would not, in general, be added in as the same value
twice.

Uncovered by construction:

- a flip in the last latch;
- with `DRAIN < NSTAGES-1`, a flip in a block's last words;
- a flip in thread 0's chain after its store, or in thread 1's after its
  compare. These fall outside the block's checksum window.

## Cycles spent

Each instruction is fetched twice, and every block pair adds `DRAIN` idle
cycles and one compare cycle. A pair therefore takes 2L + `DRAIN` + 1 cycles,
and a pair that reports a fault is run again. Short blocks cost the most.
`tb_cfd_branch_rates` runs the default design on synthetic streams. Their
branch rates are those measured for six SPEC95 programs. In one pair in
four, a single bit is flipped.

| program  | branch rate | mean block | cycles per instruction | upsets detected |
|----------|-------------|------------|------------------------|-----------------|
| compress | 9.463 %     | 10.29      | 2.95                   | 247 of 375      |
| ijpeg    | 15.349 %    | 6.25       | 3.35                   | 249 of 380      |
| go       | 19.355 %    | 5.01       | 3.62                   | 266 of 402      |
| apsi     | 22.546 %    | 4.33       | 3.78                   | 250 of 388      |
| vortex   | 22.931 %    | 4.22       | 3.89                   | 272 of 377      |
| cc1      | 24.251 %    | 3.99       | 3.89                   | 247 of 376      |

## Modules

| file | role |
|------|------|
| `cfd_pkg.sv` | word and slot types (`slot_t` = valid, thread ID, 32-bit word), `is_branch` |
| `cfd_pipeline.sv` | `NSTAGES` pass-through latches, taps, flush, upset injection |
| `cfd_checksum_chain.sv` | one thread's chain, all registers out in parallel |
| `cfd_thread_checksums.sv` | two chains, thread-ID demultiplexers, age masking |
| `cfd_checksum_storage.sv` | parallel store and stage-by-stage compare |
| `cfd_fetch_ctrl.sv` | threads, program counters, store/drain/compare sequencing, rollback |
| `cfd_top.sv` | everything wired together |

### `cfd_top` interface

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (all state resets to zero) |
| `run` | in | run block pairs; sampled only between pairs |
| `imem_addr` / `imem_rdata` | out / in | instruction fetch, word address, data returned in the same cycle |
| `retire_slot` | out | slot leaving the last latch |
| `blk_start`, `blk_tid` | out | first fetch of a block, and the fetching thread |
| `ctx_switch`, `forced_switch` | out | last fetch of a block; the same, without a branch |
| `store` | out | thread 0's checksum written to the store this cycle |
| `pair_ok` | out | compare found both checksums equal |
| `fault_detected`, `fault_stages` | out | compare found a difference; which of the N+1 words differ |
| `rollback` | out | flush and restart of the pair (same cycle as `fault_detected`) |
| `stale` | out | a word of an older block was kept out of a checksum |
| `pair_start`, `snap_o` | out | address the pair began at; the stored checksum words |
| `seu_en`, `seu_target`, `seu_thread`, `seu_stage`, `seu_mask` | in | fault injection: at the next edge, flip `seu_mask` in pipeline latch `seu_stage` (`seu_target`=0, mask bit 32 flips the thread ID) or in register `seu_stage` of chain `seu_thread` (`seu_target`=1). Tie `seu_en` low in use. |

Branches: a word whose bits [31:26] equal `6'h04` is a branch
(`cfd_pkg::BR_OPCODE`). Branches are not taken. The stream is sequential,
and a branch only ends a block.

### Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `NSTAGES` | 5 | the main configuration evaluated for the scheme (8 was also studied) |
| `POLY` | 11 | g(x) = x³ + x + 1, the polynomial used for the latency study |
| `MAX_BLOCK` | 64 | this design's choice |
| `DRAIN` | `NSTAGES-1` | this design's choice; 0 gives the compare-at-branch timing |
| `XLEN` (package) | 32 | the control-path width between stages |

Cost at the defaults, after generic synthesis: about 870 flip-flops (two
chains of 6 × 32 bits, the 6 × 32-bit store, 5 pipeline latches of 34 bits,
two 32-bit program counters and control).

## Where this design goes beyond the scheme as described

The scheme fixes the chain structure, the per-stage thread-ID
demultiplexers, the parallel per-stage outputs and compare, the switch on
branches, the two instruction counters, and flush with rollback to the last
good branch. The following were left open and are choices made here:

- the pass-through stages;
- how a block's checksum is started (clear) and kept clean (age masking);
- the drain and its default;
- the single compare cycle per pair, with no fetch in it;
- the store depth of one block;
- the forced switch after `MAX_BLOCK`;
- the branch encoding;
- reset to zero;
- the upset-injection ports.

An out-of-order execution stage, checksummed separately with a plain XOR, was
part of earlier related work. It is not included here. The design is
in-order.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/cfd_pkg.sv \
          tb/tb_cfd_top.sv --top-module tb_cfd_top -Mdir obj_top
./obj_top/Vtb_cfd_top
```

Replace `tb_cfd_top` with any testbench below. Each one ends with
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_cfd_top` | default size, 3000 block pairs with about 1500 random upsets, in either thread. Checks the fetch sequence, the store timing and the stored checksum against a behavioural model. Checks every fault report and differing-stage mask against the model, and the flush and replay. Requires every mechanism to occur: context switch, forced switch, store, clean compare, detection, rollback, idle, stale-word masking. |
| `tb_cfd_top_nodrain` | the same with `DRAIN = 0` |
| `tb_cfd_branch_rates` | default size, streams at six branch rates (9.5 % to 24.3 %), 1500 pairs each. Checks fetch, store and compare timing, the stored checksum, and the fault reports against a model. Reports the cycles per instruction. |
| `tb_cfd_coverage` | coverage study over polynomials (5 and 8 stages), using helper `cfd_cov_run`; takes about a minute to compile |
| `tb_cfd_pipeline`, `tb_cfd_checksum_chain`, `tb_cfd_thread_checksums`, `tb_cfd_checksum_storage`, `tb_cfd_fetch_ctrl` | each module against its own model |

To try another polynomial or depth, override `POLY` / `NSTAGES` on `cfd_top`.
The testbench models read the same two numbers from their localparams.
