// cfd_fetch_ctrl: block-multithreading fetch controller for two redundant
// threads, with checksum store/compare sequencing and rollback.
//
// Both hardware threads run the same instruction stream, each with its own
// program counter. Thread 0 fetches one instruction per cycle until it has
// fetched a branch; then the context switches and thread 1 fetches the same
// block again (the same number of instructions, from the address thread 0
// started at). After thread 1's block, one compare cycle follows in which no
// instruction is fetched; then thread 0 continues with the next block.
//
// Timing of one block pair of length L, cycle 0 being thread 0's first fetch:
//   cycles 0..L-1     thread 0 fetches; clear[0] in cycle 0
//   cycles L..2L-1    thread 1 fetches; clear[1] and store in cycle L
//   cycle  2L         compare (no fetch)
// Each checksum is thus taken exactly L cycles after its block started, so
// for a fault-free run the two threads' checksums are equal.
//
// If the compare reports a mismatch, the pipeline is flushed and both program
// counters return to the address at which the pair began (the block after the
// last branch that compared clean), and the pair is run again.
//
// A block with no branch is cut after MAX_BLOCK instructions (a forced
// context switch), which bounds the time to detection. run is sampled only
// between block pairs. Instructions are read combinationally: fetch_pc is
// valid in the cycle, fetch_instr must return the word in the same cycle.
//
// Following the scheme: switch on a branch, two threads, instruction counters
// per thread, compare when the second thread reaches the branch, flush and
// roll back to the previous branch on a fault. This design's own choices: the
// drain, the compare cycle and the delayed store, the forced switch after
// MAX_BLOCK, word-indexed program counters that simply step by one (branches
// are not taken; the stream is sequential), and the reset address RESET_PC.
// DRAIN must not exceed MAX_BLOCK (it shares the block counter).
module cfd_fetch_ctrl
  import cfd_pkg::*;
#(
  parameter int unsigned MAX_BLOCK = 64,
  parameter int unsigned DRAIN     = 4,
  parameter word_t       RESET_PC  = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  output word_t               fetch_pc,
  input  word_t               fetch_instr,
  output slot_t               fetch_slot,
  output logic [NTHREADS-1:0] clear,
  output logic                store,
  output logic                compare,
  input  logic                mismatch,
  output logic                flush,
  output logic                blk_start,
  output logic                forced_switch,
  output logic                ctx_switch,
  output logic                rollback,
  output logic                pair_ok,
  output word_t               pair_start_o
);

  localparam int unsigned CW = $clog2(MAX_BLOCK + 1);

  typedef enum logic [2:0] {S_IDLE, S_T0, S_T1, S_DRN, S_CMP} state_e;
  localparam int unsigned DW = (DRAIN > 0) ? $clog2(DRAIN + 1) : 1;

  state_e  state_q;
  word_t   pc_q [NTHREADS];
  word_t   pair_start_q;
  logic [CW-1:0] cnt_q;
  logic [CW-1:0] len_q;
  logic [DW-1:0] sc_q;      // cycles until the pending store
  logic          spend_q;   // a store of thread 0's checksum is pending

  logic fetching;
  tid_t tid;
  logic last0, last1;

  always_comb begin
    fetching = (state_q == S_T0) || (state_q == S_T1);
    tid      = (state_q == S_T1);
    fetch_pc = pc_q[tid];
    fetch_slot.valid = fetching;
    fetch_slot.tid   = tid;
    fetch_slot.instr = fetch_instr;
    last0 = (state_q == S_T0) &&
            (is_branch(fetch_instr[XLEN-1 -: 6]) || (int'(cnt_q) + 1 == MAX_BLOCK));
    last1 = (state_q == S_T1) && (cnt_q + 1'b1 == len_q);
    clear[0] = (state_q == S_T0) && (cnt_q == '0);
    clear[1] = (state_q == S_T1) && (cnt_q == '0);
    store    = spend_q && (sc_q == '0);
    blk_start = fetching && (cnt_q == '0);
    compare  = (state_q == S_CMP);
    flush    = compare && mismatch;
    rollback = flush;
    pair_ok  = compare && !mismatch;
    forced_switch = last0 && !is_branch(fetch_instr[XLEN-1 -: 6]);
    ctx_switch    = last0 || last1;
  end

  assign pair_start_o = pair_start_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      pc_q[0]      <= RESET_PC;
      pc_q[1]      <= RESET_PC;
      pair_start_q <= RESET_PC;
      cnt_q        <= '0;
      len_q        <= '0;
      sc_q         <= '0;
      spend_q      <= 1'b0;
    end else begin
      if (last0) begin
        spend_q <= 1'b1;
        sc_q    <= DW'(DRAIN);
      end else if (store) begin
        spend_q <= 1'b0;
      end else if (spend_q) begin
        sc_q <= sc_q - 1'b1;
      end
      unique case (state_q)
        S_IDLE: begin
          if (run) state_q <= S_T0;
          cnt_q <= '0;
        end
        S_T0: begin
          if (cnt_q == '0) pair_start_q <= pc_q[0];
          pc_q[0] <= pc_q[0] + 1'b1;
          if (last0) begin
            len_q   <= cnt_q + 1'b1;
            cnt_q   <= '0;
            state_q <= S_T1;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_T1: begin
          pc_q[1] <= pc_q[1] + 1'b1;
          if (last1) begin
            cnt_q   <= '0;
            state_q <= (DRAIN > 0) ? S_DRN : S_CMP;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_DRN: begin
          if (int'(cnt_q) + 1 >= DRAIN) begin
            cnt_q   <= '0;
            state_q <= S_CMP;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_CMP: begin
          if (mismatch) begin
            pc_q[0] <= pair_start_q;
            pc_q[1] <= pair_start_q;
          end
          state_q <= run ? S_T0 : S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Thread 1 replays thread 0's block from the same memory, so it can only
  // meet a branch at the block's last instruction.
  a_replay_branch: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_T1 && is_branch(fetch_instr[XLEN-1 -: 6])) |-> last1);
  // Both program counters agree whenever a new pair begins.
  // Thread 0's checksum is stored before thread 1's is compared.
  a_store_first: assert property (@(posedge clk) disable iff (!rst_n)
    compare |-> !spend_q);
  a_pc_sync: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_T0 && cnt_q == '0) |-> pc_q[0] == pc_q[1]);

endmodule
