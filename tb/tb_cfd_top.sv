// tb_cfd_top: end-to-end test of the fault-detecting two-thread pipeline at
// its default size (5 stages, g(x) = x^3 + x + 1, blocks of at most 64).
//
// The instruction memory is a function of the address: one word in five is a
// branch (the branch rate of the evaluation), and one stretch of 100 words in
// every 1024 has no branch, so that the forced switch after 64 instructions
// happens too. The test follows the pair sequence itself: from the memory it
// works out each block's length L, checks that thread 0 and then thread 1
// fetch the block (block start, thread ID, address, context switch, forced
// switch, store), that DRAIN cycles without fetch and one compare cycle
// follow, and that the store comes L+DRAIN cycles after the pair started.
//
// In about half of the pairs one single-event upset is injected while
// thread 0 or thread 1 runs the block (or the pipeline drains): a bit flip
// in the word of a pipeline latch, a flip of a latch's thread ID, or a bit
// flip in a register of that thread's checksum chain. A behavioural model of
// the checksum (per-stage taps of a pass-through pipeline folded into the
// generator-polynomial shift register) gives both threads' per-stage
// checksums of the block with the upset's effect. The test checks that the
// stored checksum equals the model's thread-0 checksum, that a fault is
// reported exactly when the two model checksums differ, that the reported
// stages are the differing ones, and that after a report
// the pipeline is empty and the same pair is run again. Faults whose effect
// the checksum cancels, or which reach the checksum only after the compare,
// are counted as undetected (they are not failures). Detection latency is
// the number of cycles from the upset to the compare.
//
// Each mechanism must occur at least once: context switch, forced switch,
// store, clean compare, detected fault, rollback, idle between pairs, and a
// stale word kept out of a checksum (with the default drain this happens
// only when an upset flips the thread ID of a thread-0 word).
module tb_cfd_top;
  import cfd_pkg::*;

  localparam int unsigned N    = 5;    // the top's defaults
  localparam int unsigned POLY = 11;
  localparam int unsigned MAXB = 64;
  localparam int unsigned D    = N - 1;   // drain cycles before the compare
  localparam int          NPAIRS = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
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

  cfd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ctx = 0, n_forced = 0, n_store = 0, n_ok = 0, n_det = 0, n_rb = 0;
  int n_stale = 0, n_idle = 0, n_inj = 0, n_undet = 0;
  longint lat_sum = 0;
  int lat_max = 0;

  always @(posedge clk) if (rst_n && stale) n_stale++;

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

  task automatic expect1(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t p = 0;
    logic after_rb = 1'b0;
    run = 0; seu_en = 0; seu_target = 0; seu_thread = 0; seu_stage = 0; seu_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run = 1;
    @(negedge clk);
    for (int pair = 0; pair < NPAIRS; pair++) begin
      int L;
      logic forced, exp_det;
      fault_t f, none;
      sig_t clean, bad;   // thread 0's and thread 1's model checksums
      logic [N:0] exp_diff;

      L = 0;
      do L++; while (!is_branch(mem(p + L - 1)[31:26]) && L < MAXB);
      forced = !is_branch(mem(p + L - 1)[31:26]);
      none.kind = -1; none.thr = 1; none.tinj = 0; none.pos = 0; none.mask = 0;
      f = none;
      if ($urandom_range(0, 1) == 0) begin
        f.kind = $urandom_range(0, 2);
        f.thr  = $urandom_range(0, 1);
        f.tinj = $urandom_range(0, L + D - 1);
        if (f.kind == 2) f.pos = $urandom_range(0, N);
        else f.pos = $urandom_range((f.tinj >= L) ? f.tinj - L + 1 : 0,
                                    (f.tinj < N - 1) ? f.tinj : N - 1);
        f.mask = 32'h1 << $urandom_range(0, 31);
      end
      clean = model_sig(p, L, f, 0);
      bad   = model_sig(p, L, f, 1);
      exp_diff = '0;
      for (int i = 0; i <= N; i++) exp_diff[i] = (bad[i] != clean[i]);
      exp_det = (exp_diff != '0);

      for (int th = 0; th < 2; th++)
        for (int i = 0; i < L; i++) begin
          #1;
          expect1(blk_start == (i == 0), "block start");
          expect1(blk_tid == th[0], "thread ID");
          expect1(imem_addr == p + i, $sformatf("fetch address %0d, expected %0d", imem_addr, p + i));
          expect1(ctx_switch == (i == L - 1), "context switch");
          expect1(forced_switch == (th == 0 && i == L - 1 && forced), "forced switch");
          expect1(store == (th * L + i == L + D), "store");
          expect1(!fault_detected, "no report while fetching");
          if (after_rb && th == 0 && i == 0) begin
            expect1(!retire_slot.valid, "pipeline flushed after rollback");
            after_rb = 1'b0;
          end
          if (ctx_switch) n_ctx++;
          if (forced_switch) n_forced++;
          if (store) n_store++;
          inject(f, th * L + i, L);
          @(negedge clk);
          seu_en = 0;
        end
      for (int d = 0; d < D; d++) begin
        #1;
        expect1(!blk_start && !fault_detected, "drain");
        expect1(store == (2 * L + d == L + D), "store in drain");
        if (store) n_store++;
        inject(f, 2 * L + d, L);
        @(negedge clk);
        seu_en = 0;
      end

      // Compare cycle.
      if ($urandom_range(0, 199) == 0) run = 0;
      #1;
      for (int i = 0; i <= N; i++)
        expect1(snap_o[i] == clean[i], $sformatf("stored checksum stage %0d", i));
      expect1(fault_detected == exp_det, $sformatf("fault report %b expected %b (kind %0d)", fault_detected, exp_det, f.kind));
      expect1(fault_stages == exp_diff, "differing stages");
      expect1(pair_ok == !exp_det && rollback == exp_det, "clean compare / rollback");
      expect1(pair_start == p, "pair start address");
      if (f.kind >= 0) begin
        n_inj++;
        if (fault_detected) begin
          int lat;
          lat = L + D - f.tinj + (f.thr == 0 ? L : 0);
          lat_sum += lat;
          if (lat > lat_max) lat_max = lat;
        end else n_undet++;
      end
      if (fault_detected) begin n_det++; after_rb = 1'b1; end
      if (rollback) n_rb++;
      if (pair_ok) begin n_ok++; p += L; end
      @(negedge clk);
      if (!run) begin
        repeat (3) begin
          #1;
          expect1(!blk_start && !pair_ok && !fault_detected, "idle between pairs");
          n_idle++;
          @(negedge clk);
        end
        run = 1;
        @(negedge clk);
      end
    end

    $display("pairs run=%0d clean=%0d instructions=%0d", NPAIRS, n_ok, p);
    $display("context switches=%0d forced=%0d stores=%0d stale-masked cycles=%0d idle=%0d",
             n_ctx, n_forced, n_store, n_stale, n_idle);
    $display("upsets injected=%0d detected=%0d undetected=%0d rollbacks=%0d",
             n_inj, n_det, n_undet, n_rb);
    if (n_det > 0)
      $display("mean detection latency=%0d.%02d cycles, max=%0d",
               lat_sum / n_det, (lat_sum * 100 / n_det) % 100, lat_max);
    expect1(n_ctx > 0,    "context switch seen");
    expect1(n_forced > 0, "forced switch seen");
    expect1(n_store > 0,  "store seen");
    expect1(n_ok > 0,     "clean compare seen");
    expect1(n_det > 0,    "detected fault seen");
    expect1(n_rb > 0,     "rollback seen");
    expect1(n_idle > 0,   "idle seen");
    expect1(n_stale > 0,  "stale masking seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
