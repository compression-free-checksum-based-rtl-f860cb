// cfd_pipeline: the in-order pipeline whose latches the checksums watch.
//
// NSTAGES latches in a row (fetch, decode, execute, ... for the default five
// stages). As in the fault-coverage model, a stage does not change what it
// carries: each latch takes the slot (valid, thread ID, 32-bit word) of the
// latch before it, so an instruction fetched in cycle t sits in latch i during
// cycle t+i+1. There are no stalls.
//
// Taps: tap[i] is the output of stage i, i.e. the value that latch i loads at
// the next edge. tap[0] is the slot being fetched (in_slot), tap[i] for i>0 is
// latch i-1. These are the points where the checksum XOR gates take their
// inputs in the figures of the scheme; the last latch feeds out_slot only.
//
// flush clears every valid bit at the next edge (used for rollback).
//
// Single-event upsets are modelled by the seu_* inputs: when seu_en is high,
// latch seu_stage loads its next value XOR seu_mask. Bit XLEN of the mask
// flips the thread ID, bits XLEN-1..0 flip the word. These inputs are for
// fault injection and are tied low in normal use.
module cfd_pipeline
  import cfd_pkg::*;
#(
  parameter int unsigned NSTAGES = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  slot_t                      in_slot,
  input  logic                       seu_en,
  input  logic [$clog2(NSTAGES)-1:0] seu_stage,
  input  logic [XLEN:0]              seu_mask,
  output slot_t                      tap      [NSTAGES],
  output slot_t                      out_slot
);

  slot_t latch_q [NSTAGES];

  always_comb begin
    tap[0] = in_slot;
    for (int i = 1; i < NSTAGES; i++) tap[i] = latch_q[i-1];
  end

  slot_t latch_d [NSTAGES];

  always_comb begin
    for (int i = 0; i < NSTAGES; i++) begin
      latch_d[i] = tap[i];
      if (flush) latch_d[i].valid = 1'b0;
      if (seu_en && seu_stage == i[$clog2(NSTAGES)-1:0]) begin
        latch_d[i].tid   = latch_d[i].tid ^ seu_mask[XLEN];
        latch_d[i].instr = latch_d[i].instr ^ seu_mask[XLEN-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < NSTAGES; i++) latch_q[i] <= '0;
    else        for (int i = 0; i < NSTAGES; i++) latch_q[i] <= latch_d[i];
  end

  assign out_slot = latch_q[NSTAGES-1];

endmodule
