// cfd_thread_checksums: one checksum chain per hardware thread, fed through a
// thread-ID demultiplexer at every stage tap.
//
// Each pipeline stage carries the thread ID of the instruction it holds. At
// every tap a demultiplexer steers the stage's word to the chain of that
// thread; the other chains see zero at that tap. A fault in a thread ID thus
// moves a word into the wrong checksum and shows up as a mismatch.
//
// Blocks: a thread's checksum covers one block of its instructions. clear[k]
// is raised in the cycle the first instruction of a new block of thread k is
// fetched; chain k then restarts from zero. Words of the same thread's
// previous block may still be in the pipeline at that time; they are kept out
// of the new checksum by an age counter per thread: in the cycle that is
// `age` cycles after the block start, only taps 0..age can hold the new
// block's instructions (tap i shows the instruction fetched i cycles ago), so
// deeper taps are masked. This masking is this design's own addition; it
// makes the checksum of a block independent of what ran before it, so two
// threads that run the same block produce the same checksum.
//
// stale_o is high when a valid word of a thread was masked by the age rule.
module cfd_thread_checksums
  import cfd_pkg::*;
#(
  parameter int unsigned NSTAGES = 5,
  parameter int unsigned POLY    = 11
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  slot_t                        tap   [NSTAGES],
  input  logic [NTHREADS-1:0]          clear,
  input  logic                         seu_en,
  input  tid_t                         seu_thread,
  input  logic [$clog2(NSTAGES+1)-1:0] seu_idx,
  input  word_t                        seu_mask,
  output word_t                        regs  [NTHREADS][NSTAGES+1],
  output logic                         stale_o
);

  localparam int unsigned AW = $clog2(NSTAGES + 1);

  logic [AW-1:0] age_q [NTHREADS];
  logic [AW-1:0] age   [NTHREADS];
  word_t         ctap  [NTHREADS][NSTAGES];
  logic          stale [NTHREADS];

  always_comb begin
    for (int k = 0; k < NTHREADS; k++) begin
      age[k]   = clear[k] ? '0 : age_q[k];
      stale[k] = 1'b0;
      for (int i = 0; i < NSTAGES; i++) begin
        logic mine;
        mine = tap[i].valid && (tap[i].tid == k[0]);
        if (mine && i <= int'(age[k])) ctap[k][i] = tap[i].instr;
        else                           ctap[k][i] = '0;
        if (mine && i > int'(age[k])) stale[k] = 1'b1;
      end
    end
  end

  assign stale_o = stale[0] | stale[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTHREADS; k++) age_q[k] <= AW'(NSTAGES);
    end else begin
      for (int k = 0; k < NTHREADS; k++)
        if (int'(age[k]) < NSTAGES) age_q[k] <= age[k] + 1'b1;
        else                         age_q[k] <= age[k];
    end
  end

  for (genvar k = 0; k < NTHREADS; k++) begin : g_chain
    cfd_checksum_chain #(
      .NSTAGES(NSTAGES),
      .POLY   (POLY)
    ) u_chain (
      .clk     (clk),
      .rst_n   (rst_n),
      .clear   (clear[k]),
      .in_word (ctap[k][0]),
      .tap     (ctap[k]),
      .seu_en  (seu_en && seu_thread == k[0]),
      .seu_idx (seu_idx),
      .seu_mask(seu_mask),
      .regs    (regs[k])
    );
  end

endmodule
