// cfd_pkg: shared types and constants of the checksum-based fault-detection
// pipeline.
//
// The pipeline moves 32-bit words (the control path from stage to stage is
// 32 bits wide). Every pipeline slot carries a valid bit and a one-bit thread
// ID next to the word, because the design runs two hardware threads and the
// thread ID selects which checksum a stage contributes to.
//
// The instruction encoding is this design's own choice: a word whose top six
// bits equal BR_OPCODE is a branch, every other word is an ordinary
// instruction. A branch ends a block and causes a context switch.
package cfd_pkg;

  localparam int unsigned XLEN     = 32;  // control-path width per stage
  localparam int unsigned NTHREADS = 2;   // redundant hardware threads

  typedef logic [XLEN-1:0] word_t;
  typedef logic            tid_t;

  // One pipeline latch: what a stage hands to the next one.
  typedef struct packed {
    logic  valid;
    tid_t  tid;
    word_t instr;
  } slot_t;

  // Branch opcode in bits [31:26] of a pseudo-instruction.
  localparam logic [5:0] BR_OPCODE = 6'h04;

  // Takes the opcode field, bits [31:26] of the instruction.
  function automatic logic is_branch(logic [5:0] opcode);
    return opcode == BR_OPCODE;
  endfunction

endpackage
