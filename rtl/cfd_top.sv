// cfd_top: a pipelined two-thread processor model with compression-free,
// checksum-based fault detection.
//
// Two hardware threads run the same program in block-multithreaded fashion:
// thread 0 runs a block up to its branch, then thread 1 runs the same block.
// While a block passes through the NSTAGES-stage pipeline, every stage's
// output is folded into a per-thread checksum register chain with
// generator-polynomial feedback (POLY). At each thread switch the complete
// chain of thread 0, one word per stage, is written in parallel into the
// checksum store; when thread 1 ends the same block, its chain is compared
// with the store stage by stage. A difference means a transient fault (a bit
// flip in a pipeline latch, a thread ID or a checksum flip-flop) hit one of
// the two runs: the pipeline is flushed and both threads restart at the
// beginning of the block pair.
//
// Blocks: cfd_fetch_ctrl (threads, program counters, sequencing),
// cfd_pipeline (latches and checksum taps), cfd_thread_checksums (thread-ID
// demultiplexers and one cfd_checksum_chain per thread) and
// cfd_checksum_storage (parallel store and compare).
//
// Interface: instructions are read from an external memory, combinationally
// (imem_addr out, imem_rdata back in the same cycle). retire_slot is what
// leaves the last latch. The status pulses report the mechanisms: a context
// switch, a forced switch of a branch-free block, a store, a clean compare, a
// detected fault with the differing stage registers, a rollback, and words
// of an older block kept out of a checksum (stale). snap_o shows the stored
// checksums. The seu_* inputs inject single bit flips for test: into
// pipeline latch seu_stage (seu_target = 0, mask bit XLEN flips the thread
// ID) or into register seu_stage of thread seu_thread's checksum chain
// (seu_target = 1); tie seu_en low in normal use.
//
// Timing: one instruction fetched per cycle while a block runs, then DRAIN
// idle cycles and one compare cycle per block pair; a fault is reported in
// the compare cycle of the pair it hit, at most 2*MAX_BLOCK+DRAIN cycles
// after it occurred.
//
// From the scheme: the checksum chain with polynomial feedback, one chain per
// thread selected by the stages' thread IDs, parallel output of every chain
// register to a checksum store, switching threads on branches, compare when
// the second thread reaches the branch, flush and rollback. This design's own
// choices: the drain (DRAIN = 0 gives the compare right at the branch), the
// forced switch, pass-through stages, and the injection ports.
module cfd_top
  import cfd_pkg::*;
#(
  parameter int unsigned NSTAGES   = 5,
  parameter int unsigned POLY      = 11,
  parameter int unsigned MAX_BLOCK = 64,
  parameter int unsigned DRAIN     = NSTAGES - 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  output word_t                        imem_addr,
  input  word_t                        imem_rdata,
  output slot_t                        retire_slot,
  output logic                         blk_start,
  output tid_t                         blk_tid,
  output logic                         ctx_switch,
  output logic                         forced_switch,
  output logic                         store,
  output logic                         pair_ok,
  output logic                         fault_detected,
  output logic [NSTAGES:0]             fault_stages,
  output logic                         rollback,
  output logic                         stale,
  output word_t                        pair_start,
  output word_t                        snap_o [NSTAGES+1],
  input  logic                         seu_en,
  input  logic                         seu_target,
  input  tid_t                         seu_thread,
  input  logic [$clog2(NSTAGES+1)-1:0] seu_stage,
  input  logic [XLEN:0]                seu_mask
);

  slot_t               fetch_slot;
  slot_t               tap  [NSTAGES];
  logic [NTHREADS-1:0] clear;
  logic                compare, mismatch, flush;
  word_t               regs [NTHREADS][NSTAGES+1];

  cfd_fetch_ctrl #(
    .MAX_BLOCK(MAX_BLOCK),
    .DRAIN    (DRAIN)
  ) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .run          (run),
    .fetch_pc     (imem_addr),
    .fetch_instr  (imem_rdata),
    .fetch_slot   (fetch_slot),
    .clear        (clear),
    .store        (store),
    .compare      (compare),
    .mismatch     (mismatch),
    .flush        (flush),
    .blk_start    (blk_start),
    .forced_switch(forced_switch),
    .ctx_switch   (ctx_switch),
    .rollback     (rollback),
    .pair_ok      (pair_ok),
    .pair_start_o (pair_start)
  );

  assign blk_tid = fetch_slot.tid;

  cfd_pipeline #(
    .NSTAGES(NSTAGES)
  ) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .flush    (flush),
    .in_slot  (fetch_slot),
    .seu_en   (seu_en && !seu_target),
    .seu_stage(seu_stage[$clog2(NSTAGES)-1:0]),
    .seu_mask (seu_mask),
    .tap      (tap),
    .out_slot (retire_slot)
  );

  cfd_thread_checksums #(
    .NSTAGES(NSTAGES),
    .POLY   (POLY)
  ) u_sums (
    .clk       (clk),
    .rst_n     (rst_n),
    .tap       (tap),
    .clear     (clear),
    .seu_en    (seu_en && seu_target),
    .seu_thread(seu_thread),
    .seu_idx   (seu_stage),
    .seu_mask  (seu_mask[XLEN-1:0]),
    .regs      (regs),
    .stale_o   (stale)
  );

  cfd_checksum_storage #(
    .NSTAGES(NSTAGES)
  ) u_store (
    .clk       (clk),
    .rst_n     (rst_n),
    .store     (store),
    .store_regs(regs[0]),
    .compare   (compare),
    .cmp_regs  (regs[1]),
    .mismatch  (mismatch),
    .diff_o    (fault_stages),
    .snap_o    (snap_o)
  );

  assign fault_detected = mismatch;

endmodule
