// tb_cfd_branch_rates: runs the fault-detecting two-thread pipeline, at its
// default size, on synthetic instruction streams whose branch rates are those
// measured for six SPEC95 programs (go 19.355 %, ijpeg 15.349 %, compress
// 9.463 %, cc1 24.251 %, apsi 22.546 %, vortex 22.931 %).
//
// The stream is a hash of the address: a word is a branch when the hash,
// taken modulo 100000, falls below the rate in thousandths of a percent. For
// each rate the test runs 1500 block pairs. It works out each block's length
// from the stream and checks the pair sequence: block starts, fetch
// addresses, the store L+DRAIN cycles after the pair starts, and the compare
// 2L+DRAIN cycles after it. The stored checksum must equal a behavioural model
// of the block's checksum (pass-through taps folded into the shift register
// with g(x) = x^3 + x + 1). In one pair in four, a single bit is flipped in a
// pipeline latch or a chain register during thread 1's run of the block. The
// fault report and the differing-stage mask must then match the model, and a
// reported pair must be run again from the same address.
//
// Per rate it prints the branch rate actually fetched, the mean block length,
// the cycles spent per instruction (both threads, drain and compare
// included), and the share of upsets that were detected. The cycle count of
// every pair is checked to be exactly 2L+DRAIN+1.
module tb_cfd_branch_rates;
  import cfd_pkg::*;

  localparam int unsigned N    = 5;    // the top's defaults
  localparam int unsigned POLY = 11;
  localparam int unsigned MAXB = 64;
  localparam int unsigned D    = N - 1;
  localparam int          NPAIRS = 1500;
  localparam int          NRATES = 6;

  // Branch rates in thousandths of a percent, and the programs they come from.
  localparam int RATE [NRATES] = '{19355, 15349, 9463, 24251, 22546, 22931};
  localparam string NAME [NRATES] = '{"go", "ijpeg", "compress", "cc1", "apsi", "vortex"};

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
  int rate = 0;   // branch rate of the stream now being fetched

  function automatic word_t mem(word_t a, int r);
    word_t h = a * 32'h9E37_79B9 ^ 32'h7F4A_7C15;
    h = h ^ (h >> 13);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 16);
    if (int'(h % 100000) < r) h[31:26] = BR_OPCODE;
    else if (h[31:26] == BR_OPCODE) h[31:26] = 6'h01;
    return h;
  endfunction

  assign imem_rdata = mem(imem_addr, rate);

  typedef word_t sig_t [N+1];

  // Checksum of the block of length L at address p, L+D cycles after its
  // first fetch, from an all-zero start. kind: -1 none, 0 bit flip mask in
  // the slot that latch pos holds at the end of cycle tinj, 2 flip of chain
  // register pos at the end of cycle tinj.
  function automatic sig_t model_sig(word_t p, int L, int r, int kind,
                                     int tinj, int pos, word_t mask);
    sig_t c, nx;
    word_t d [N];
    for (int i = 0; i <= N; i++) c[i] = 0;
    for (int t = 0; t < L + D; t++) begin
      for (int i = 0; i < N; i++) begin
        int s;
        s = t - i;
        d[i] = (s >= 0 && s < L) ? mem(p + s, r) : 32'h0;
        if (kind == 0 && s == tinj - pos && i >= pos + 1) d[i] ^= mask;
      end
      nx[0] = d[0];
      for (int i = 0; i < N; i++)
        nx[i+1] = c[i] ^ d[i] ^ (((POLY >> i) & 1) != 0 ? c[N] : 32'h0);
      if (kind == 2 && tinj == t) nx[pos] ^= mask;
      c = nx;
    end
    return c;
  endfunction

  task automatic expect1(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t p;
    run = 0; seu_en = 0; seu_target = 0; seu_thread = 0; seu_stage = 0; seu_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NRATES; b++) begin
      int n_instr, n_br, n_inj, n_det, n_pairs;
      longint c0, pair_c0;
      // Each program starts from reset: the fetch returns to address 0 with
      // an empty pipeline and cleared checksums.
      @(negedge clk);
      run = 0;
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      rate = RATE[b];
      p = 0;
      n_instr = 0; n_br = 0; n_inj = 0; n_det = 0; n_pairs = 0;
      run = 1;
      @(negedge clk);
      c0 = cyc;
      for (int pair = 0; pair < NPAIRS; pair++) begin
        int L, kind, tinj, pos;
        word_t mask;
        sig_t clean, bad;
        logic [N:0] exp_diff;

        L = 0;
        do L++; while (!is_branch(mem(p + L - 1, rate)[31:26]) && L < MAXB);
        kind = -1; tinj = 0; pos = 0; mask = 0;
        if ($urandom_range(0, 3) == 0) begin
          kind = $urandom_range(0, 1) * 2;
          tinj = $urandom_range(0, L + D - 1);
          if (kind == 2) pos = $urandom_range(0, N);
          else pos = $urandom_range((tinj >= L) ? tinj - L + 1 : 0,
                                    (tinj < N - 1) ? tinj : N - 1);
          mask = 32'h1 << $urandom_range(0, 31);
        end
        clean = model_sig(p, L, rate, -1, 0, 0, 0);
        bad   = model_sig(p, L, rate, kind, tinj, pos, mask);
        for (int i = 0; i <= N; i++) exp_diff[i] = (bad[i] != clean[i]);

        pair_c0 = cyc;
        for (int t = 0; t < 2 * L + D; t++) begin
          #1;
          if (t < 2 * L) begin
            expect1(blk_start == (t % L == 0), "block start");
            expect1(blk_tid == tid_t'(t / L), "thread ID");
            expect1(imem_addr == p + word_t'(t % L), "fetch address");
          end else
            expect1(!blk_start, "no fetch in the drain");
          expect1(store == (t == L + D), "store L+DRAIN cycles into the pair");
          expect1(!fault_detected && !pair_ok, "no compare before 2L+DRAIN");
          seu_en     = (kind >= 0 && t == L + tinj);
          seu_target = (kind == 2);
          seu_thread = 1'b1;
          seu_stage  = 3'(pos);
          seu_mask   = {1'b0, mask};
          @(negedge clk);
          seu_en = 1'b0;
        end
        #1;
        expect1(int'(cyc - pair_c0) == 2 * L + int'(D), "compare 2L+DRAIN cycles after the pair start");
        for (int i = 0; i <= N; i++)
          expect1(snap_o[i] == clean[i], $sformatf("stored checksum stage %0d", i));
        expect1(fault_detected == (exp_diff != '0), "fault report");
        expect1(fault_stages == exp_diff, "differing stages");
        expect1(pair_ok == (exp_diff == '0) && rollback == fault_detected, "compare result");
        expect1(pair_start == p, "pair start address");
        if (kind >= 0) n_inj++;
        if (fault_detected) n_det++;
        if (pair_ok) begin
          n_pairs++;
          n_instr += L;
          if (is_branch(mem(p + L - 1, rate)[31:26])) n_br++;
          p += L;
        end
        @(negedge clk);
      end
      // Every pair, clean or replayed, took 2L+DRAIN+1 cycles; the checks
      // above tie each one to its block length.
      $display("%s: branch rate %.3f %%, fetched %.3f %%, mean block %.2f, cycles per instruction %.2f, upsets %0d detected %0d",
               NAME[b], real'(RATE[b]) / 1000.0, 100.0 * n_br / n_instr,
               real'(n_instr) / n_pairs, real'(cyc - c0) / n_instr, n_inj, n_det);
      // The fetched branch rate must be close to the nominal one (the
      // stream has thousands of words, so within two percentage points).
      expect1(n_br * 100000 / n_instr > RATE[b] - 2000 &&
              n_br * 100000 / n_instr < RATE[b] + 2000, "fetched branch rate");
      expect1(n_det > 0, "detected upset seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
