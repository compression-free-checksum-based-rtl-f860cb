// cfd_checksum_storage: holds the per-stage checksums of the first thread and
// compares them with the second thread's.
//
// The checksum chains bring all their stage registers out in parallel. When
// the first thread's block ends (store, one cycle), all NSTAGES+1 words of its
// chain are written into the store. When the second thread has run the same
// block (compare, one cycle), every word of its chain is compared with the
// stored word of the same stage in that same cycle. Any difference is a
// detected fault: mismatch is combinational so that the fetch controller can
// flush and roll back at the next edge. diff_o tells which stage registers
// differed; snap_o shows the stored words.
//
// A compare while no block has been stored since reset never reports a
// fault (an assertion flags it as a controller error).
//
// The scheme says only that every stage's checksum goes in parallel to a
// store where it is compared with the previously computed one; one register
// per stage word and one equality compare per stage is this design's
// simplest reading, holding one block at a time.
module cfd_checksum_storage
  import cfd_pkg::*;
#(
  parameter int unsigned NSTAGES = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             store,
  input  word_t            store_regs [NSTAGES+1],
  input  logic             compare,
  input  word_t            cmp_regs   [NSTAGES+1],
  output logic             mismatch,
  output logic [NSTAGES:0] diff_o,
  output word_t            snap_o     [NSTAGES+1]
);

  word_t snap_q [NSTAGES+1];
  logic  held_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q <= 1'b0;
      for (int i = 0; i <= NSTAGES; i++) snap_q[i] <= '0;
    end else if (store) begin
      held_q <= 1'b1;
      for (int i = 0; i <= NSTAGES; i++) snap_q[i] <= store_regs[i];
    end
  end

  always_comb begin
    for (int i = 0; i <= NSTAGES; i++)
      diff_o[i] = compare && held_q && (snap_q[i] != cmp_regs[i]);
    mismatch = |diff_o;
  end

  assign snap_o = snap_q;

  a_compare_after_store: assert property (@(posedge clk) disable iff (!rst_n)
    compare |-> held_q);

endmodule
