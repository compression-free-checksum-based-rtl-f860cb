// tb_cfd_thread_checksums: self-checking test of the per-thread checksums.
//
// Random slots of both threads (and bubbles) are put on the taps, with random
// block starts (clear) per thread and random flips in chain registers. A
// behavioural model keeps, for each thread, the cycles since its block start
// and the chain contents: a tap feeds thread k's chain only if it is valid,
// carries thread ID k and is not deeper than the block's age. The outputs
// are compared every cycle, including the stale flag. A directed check first
// shows that a thread-0 word at tap 3 right after a thread-0 block start is
// kept out of the checksum and flagged as stale, while a thread-1 word in the
// same cycle goes to chain 1 only.
module tb_cfd_thread_checksums;
  import cfd_pkg::*;

  localparam int unsigned N    = 5;
  localparam int unsigned POLY = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  slot_t tap [N];
  logic [NTHREADS-1:0] clear;
  logic seu_en;
  tid_t seu_thread;
  logic [$clog2(N+1)-1:0] seu_idx;
  word_t seu_mask;
  word_t regs [NTHREADS][N+1];
  logic stale_o;

  word_t m   [NTHREADS][N+1];
  int    age [NTHREADS];
  int checks = 0, failures = 0;

  cfd_thread_checksums #(.NSTAGES(N), .POLY(POLY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model of one cycle; returns the expected stale flag.
  function automatic logic model_step();
    logic st = 1'b0;
    for (int k = 0; k < 2; k++) begin
      int a = clear[k] ? 0 : age[k];
      word_t t [N];
      word_t p [N+1];
      word_t nx [N+1];
      for (int i = 0; i < N; i++) begin
        t[i] = 0;
        if (tap[i].valid && tap[i].tid == k) begin
          if (i <= a) t[i] = tap[i].instr;
          else        st = 1'b1;
        end
      end
      for (int i = 0; i <= N; i++) p[i] = clear[k] ? 32'h0 : m[k][i];
      nx[0] = t[0];
      for (int i = 0; i < N; i++)
        nx[i+1] = p[i] ^ t[i] ^ (((POLY >> i) & 1) ? p[N] : 32'h0);
      if (seu_en && seu_thread == k) nx[seu_idx] ^= seu_mask;
      m[k] = nx;
      age[k] = (a < N) ? a + 1 : a;
    end
    return st;
  endfunction

  task automatic compare_all(string what);
    for (int k = 0; k < 2; k++)
      for (int i = 0; i <= N; i++) begin
        checks++;
        if (regs[k][i] !== m[k][i]) begin
          failures++;
          $display("FAIL %s thread %0d c[%0d]=%h expected %h", what, k, i, regs[k][i], m[k][i]);
        end
      end
  endtask

  initial begin
    logic exp_stale;
    for (int i = 0; i < N; i++) tap[i] = '0;
    clear = 0; seu_en = 0; seu_thread = 0; seu_idx = 0; seu_mask = 0;
    for (int k = 0; k < 2; k++) begin
      age[k] = N;
      for (int i = 0; i <= N; i++) m[k][i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Directed: thread 0 starts a block while an old thread-0 word is at
    // tap 3 and a thread-1 word at tap 2.
    @(negedge clk);
    clear = 2'b01;
    tap[3] = '{valid: 1'b1, tid: 1'b0, instr: 32'h1111_2222};
    tap[2] = '{valid: 1'b1, tid: 1'b1, instr: 32'h3333_4444};
    tap[0] = '{valid: 1'b1, tid: 1'b0, instr: 32'h5555_6666};
    #1;
    checks++;
    if (stale_o !== 1'b1) begin failures++; $display("FAIL stale not flagged"); end
    exp_stale = model_step();
    @(negedge clk);
    checks++;
    if (regs[0][0] !== 32'h5555_6666 || regs[0][1] !== 32'h5555_6666 ||
        regs[0][4] !== 32'h0 || regs[1][3] !== 32'h3333_4444) begin
      failures++;
      $display("FAIL directed demux: %h %h %h %h", regs[0][0], regs[0][1], regs[0][4], regs[1][3]);
    end
    compare_all("directed");

    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int i = 0; i < N; i++) begin
        tap[i].valid = $urandom_range(0, 5) != 0;
        tap[i].tid   = 1'($urandom());
        tap[i].instr = $urandom();
      end
      clear[0] = ($urandom_range(0, 9) == 0);
      clear[1] = ($urandom_range(0, 9) == 0);
      seu_en     = ($urandom_range(0, 39) == 0);
      seu_thread = 1'($urandom());
      seu_idx    = 3'($urandom_range(0, N));
      seu_mask   = 32'h1 << $urandom_range(0, 31);
      #1;
      exp_stale = model_step();
      checks++;
      if (stale_o !== exp_stale) begin
        failures++;
        $display("FAIL cycle %0d stale=%b expected %b", cyc, stale_o, exp_stale);
      end
      @(negedge clk);
      compare_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
