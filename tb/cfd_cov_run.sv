// cfd_cov_run: one fault-injection campaign on cfd_top with a given
// generator polynomial, for the fault-coverage study (tb_cfd_coverage).
//
// It runs NPAIRS block pairs of a pseudo-random stream with one branch in
// five and injects, in every pair, one single-bit upset into a random
// pipeline latch while thread 0 or thread 1 runs the block (or the pipeline
// drains): a flip of a word bit or of the thread ID. Every report of the design is held against a
// behavioural model of the two checksums (mismatches count as failures), and
// the number of injected and detected upsets is returned. The random numbers
// come from a private xorshift generator seeded by SEED, so every polynomial
// sees the same sequence of draws.
module cfd_cov_run
  import cfd_pkg::*;
#(
  parameter int unsigned N      = 5,
  parameter int unsigned POLY   = 11,
  parameter int          NPAIRS = 600,
  parameter int unsigned SEED   = 32'h1234_5678
) (
  input  logic clk,
  output int   injected,
  output int   detected,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int unsigned MAXB = 64;
  localparam int unsigned D    = N - 1;

  logic rst_n = 1'b0;
  logic run;
  word_t imem_addr, imem_rdata, pair_start;
  slot_t retire_slot;
  logic blk_start, ctx_switch, forced_switch, store, pair_ok, fault_detected;
  logic rollback, stale;
  tid_t blk_tid;
  logic [N:0] fault_stages;
  word_t snap_o [N+1];
  logic seu_en, seu_target;
  tid_t seu_thread;
  logic [$clog2(N+1)-1:0] seu_stage;
  logic [XLEN:0] seu_mask;

  cfd_top #(.NSTAGES(N), .POLY(POLY)) dut (.*);

  logic [31:0] rng = SEED;
  function automatic int unsigned draw(int unsigned lo, int unsigned hi);
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return lo + rng % (hi - lo + 1);
  endfunction

  function automatic word_t mem(word_t a);
    word_t h = a * 32'h9E37_79B9 ^ 32'h7F4A_7C15;
    h = h ^ (h >> 13);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 16);
    if ((a % 1024) >= 900 && (a % 1024) < 1000) h[31:26] = 6'h3F;
    else if (h % 5 == 0) h[31:26] = BR_OPCODE;
    else if (h[31:26] == BR_OPCODE) h[31:26] = 6'h01;
    return h;
  endfunction

  assign imem_rdata = mem(imem_addr);

  // Fault description for the model.
  typedef struct {
    int    kind;   // -1 none, 0 word flip in latch, 1 TID flip in latch, 2 chain flip
    int    thr;    // thread whose run of the block the upset hits
    int    tinj;   // cycle of that run (0..L+D-1) at whose end the upset lands
    int    pos;    // latch index (kinds 0, 1) or chain register (kind 2)
    word_t mask;
  } fault_t;

  typedef word_t sig_t [N+1];

  // Checksum of one block of length L starting at address p, taken L+D
  // cycles after the block's first fetch, from an all-zero start, for the
  // chain of thread th. The upset f hits thread f.thr's run of the block. A
  // thread ID flip moves the word out of that thread's chain. A word of
  // thread 1 then lands in thread 0's chain, which at that time is L cycles
  // further into its own checksum; a word of thread 0 reaches thread 1's
  // chain only before thread 1's block has started, so it is either cleared
  // away or masked as stale.
  function automatic sig_t model_sig(word_t p, int L, fault_t f, int th);
    sig_t c, nx;
    word_t d [N];
    int sf = f.tinj - f.pos;   // block index of the slot a latch upset hits
    for (int i = 0; i <= N; i++) c[i] = 0;
    for (int t = 0; t < L + D; t++) begin
      for (int i = 0; i < N; i++) begin
        int s = t - i;
        d[i] = (s >= 0 && s < L) ? mem(p + s) : 32'h0;
        if (th == f.thr && s >= 0 && s == sf && i >= f.pos + 1) begin
          if (f.kind == 0) d[i] ^= f.mask;
          if (f.kind == 1) d[i] = 32'h0;
        end
        if (th == 0 && f.thr == 1 && f.kind == 1 && t - L - i == sf && i >= f.pos + 1)
          d[i] ^= mem(p + sf);
      end
      nx[0] = d[0];
      for (int i = 0; i < N; i++)
        nx[i+1] = c[i] ^ d[i] ^ (((POLY >> i) & 1) ? c[N] : 32'h0);
      if (th == f.thr && f.kind == 2 && f.tinj == t) nx[f.pos] ^= f.mask;
      c = nx;
    end
    return c;
  endfunction

  // Drive the upset inputs in cycle rel of the block pair (thread 0 starts
  // in cycle 0, thread 1 in cycle L).
  task automatic inject(fault_t f, int rel, int L);
    seu_en     = (f.kind >= 0 && rel - (f.thr == 1 ? L : 0) == f.tinj);
    seu_target = (f.kind == 2);
    seu_thread = tid_t'(f.thr);
    seu_stage  = 3'(f.pos);
    seu_mask   = (f.kind == 1) ? {1'b1, 32'h0} : {1'b0, f.mask};
  endtask

  initial begin
    word_t p = 0;
    injected = 0; detected = 0; checks = 0; failures = 0; done = 1'b0;
    run = 0; seu_en = 0; seu_target = 0; seu_thread = 1; seu_stage = 0; seu_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run = 1;
    @(negedge clk);
    for (int pair = 0; pair < NPAIRS; pair++) begin
      int L;
      fault_t f;
      sig_t s0, s1;
      logic exp_det;
      L = 0;
      do L++; while (!is_branch(mem(p + L - 1)[31:26]) && L < MAXB);
      f.kind = draw(0, 3) == 0 ? 1 : 0;
      f.thr  = draw(0, 1);
      f.tinj = draw(0, L + D - 1);
      f.pos  = draw((f.tinj >= L) ? f.tinj - L + 1 : 0, (f.tinj < N - 1) ? f.tinj : N - 1);
      f.mask = 32'h1 << draw(0, 31);
      s0 = model_sig(p, L, f, 0);
      s1 = model_sig(p, L, f, 1);
      exp_det = 1'b0;
      for (int i = 0; i <= N; i++) if (s0[i] != s1[i]) exp_det = 1'b1;
      for (int t = 0; t < 2 * L + D; t++) begin
        seu_en     = (t - (f.thr == 1 ? L : 0) == f.tinj);
        seu_stage  = ($clog2(N+1))'(f.pos);
        seu_mask   = (f.kind == 1) ? {1'b1, 32'h0} : {1'b0, f.mask};
        @(negedge clk);
        seu_en = 0;
      end
      #1;
      checks += 2;
      if (fault_detected !== exp_det) failures++;
      if (!(pair_start == p && (pair_ok || rollback))) failures++;
      injected++;
      if (fault_detected) detected++;
      if (pair_ok) p += L;
      @(negedge clk);
    end
    done = 1'b1;
  end
endmodule
