// cfd_checksum_chain: the checksum of one thread, a multi-input shift register
// with generator-polynomial feedback.
//
// Unlike a CRC register, which has a single serial input, this register takes
// one whole word per pipeline stage. It has NSTAGES+1 word registers c[0..N]
// (N = NSTAGES) that shift in the same direction as the pipeline:
//
//   c[0]   <= in_word                                  (instruction stream)
//   c[i+1] <= c[i] ^ tap[i] ^ (g_i ? c[N] : 0)         i = 0 .. N-1
//
// where tap[i] is the word leaving pipeline stage i and g_i is bit i of POLY.
// c[N] is the checksum output and is fed back to every stage whose generator
// coefficient is 1. The polynomial is given as the decimal value of its
// coefficients read as a binary number: POLY = 11 = 0b01011 is
// g(x) = x^3 + x + 1. Its degree is limited to N-1 by the number of stages,
// so a 5-stage pipeline has 32 possible polynomials. 11 is one of the
// polynomials that reach full coverage on a 5-stage pipeline in the
// fault-injection study the scheme was evaluated with.
//
// Instead of waiting for the checksum to shift out, all N+1 registers are
// brought out in parallel (regs) so that a checksum store can compare every
// stage at once.
//
// clear makes the registers act as zero for the update in this cycle: the
// block starting in this cycle begins from an all-zero checksum. Taps of
// other threads or other blocks must be zeroed by the caller.
//
// seu_en / seu_idx / seu_mask flip bits of register seu_idx at the next edge;
// they exist for fault injection.
module cfd_checksum_chain
  import cfd_pkg::*;
#(
  parameter int unsigned NSTAGES = 5,
  parameter int unsigned POLY    = 11
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  word_t                        in_word,
  input  word_t                        tap  [NSTAGES],
  input  logic                         seu_en,
  input  logic [$clog2(NSTAGES+1)-1:0] seu_idx,
  input  word_t                        seu_mask,
  output word_t                        regs [NSTAGES+1]
);

  localparam logic [NSTAGES-1:0] G = POLY[NSTAGES-1:0];

  word_t c_q [NSTAGES+1];
  word_t c_d [NSTAGES+1];

  always_comb begin
    word_t prev [NSTAGES+1];
    for (int i = 0; i <= NSTAGES; i++) prev[i] = clear ? '0 : c_q[i];
    c_d[0] = in_word;
    for (int i = 0; i < NSTAGES; i++)
      c_d[i+1] = prev[i] ^ tap[i] ^ (G[i] ? prev[NSTAGES] : '0);
    if (seu_en)
      for (int i = 0; i <= NSTAGES; i++)
        if (seu_idx == i[$clog2(NSTAGES+1)-1:0]) c_d[i] = c_d[i] ^ seu_mask;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i <= NSTAGES; i++) c_q[i] <= '0;
    else        for (int i = 0; i <= NSTAGES; i++) c_q[i] <= c_d[i];
  end

  assign regs = c_q;

endmodule
