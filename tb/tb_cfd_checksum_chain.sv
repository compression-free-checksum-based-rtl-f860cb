// tb_cfd_checksum_chain: self-checking test of one checksum chain.
//
// 1. A directed check of the feedback wiring for g(x) = x^3 + x + 1 (11): a
//    word put on the last tap reaches c[5], and one cycle later appears in
//    c[1], c[2] and c[4] (coefficients g0, g1, g3) but not in c[3] or c[5].
// 2. 2000 cycles of random taps, random clears and random register flips,
//    compared every cycle with a behavioural model of the recurrence.
module tb_cfd_checksum_chain;
  import cfd_pkg::*;

  localparam int unsigned N    = 5;
  localparam int unsigned POLY = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, seu_en;
  logic [$clog2(N+1)-1:0] seu_idx;
  word_t in_word, seu_mask;
  word_t tap  [N];
  word_t regs [N+1];
  word_t m    [N+1];

  int checks = 0, failures = 0;

  cfd_checksum_chain #(.NSTAGES(N), .POLY(POLY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_regs(string what);
    for (int i = 0; i <= N; i++) begin
      checks++;
      if (regs[i] !== m[i]) begin
        failures++;
        $display("FAIL %s c[%0d]=%h expected %h", what, i, regs[i], m[i]);
      end
    end
  endtask

  // Behavioural model of one update.
  task automatic model_step();
    word_t p [N+1];
    word_t nx [N+1];
    for (int i = 0; i <= N; i++) p[i] = clear ? 32'h0 : m[i];
    nx[0] = in_word;
    for (int i = 0; i < N; i++) begin
      nx[i+1] = p[i] ^ tap[i];
      if ((POLY >> i) & 1) nx[i+1] ^= p[N];
    end
    if (seu_en) nx[seu_idx] ^= seu_mask;
    m = nx;
  endtask

  initial begin
    clear = 0; seu_en = 0; seu_idx = 0; seu_mask = 0; in_word = 0;
    for (int i = 0; i < N; i++) tap[i] = 0;
    for (int i = 0; i <= N; i++) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_regs("reset");

    // Directed feedback check.
    tap[N-1] = 32'hA5A5_0001;
    @(negedge clk);
    tap[N-1] = 0;
    checks++;
    if (regs[N] !== 32'hA5A5_0001) begin failures++; $display("FAIL c5 load"); end
    @(negedge clk);
    checks++;
    if (regs[1] !== 32'hA5A5_0001 || regs[2] !== 32'hA5A5_0001 ||
        regs[3] !== 32'h0 || regs[4] !== 32'hA5A5_0001 || regs[5] !== 32'h0) begin
      failures++;
      $display("FAIL feedback pattern %h %h %h %h %h", regs[1], regs[2], regs[3], regs[4], regs[5]);
    end
    // Clear: the next state ignores the old contents.
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (regs[1] !== 0 || regs[2] !== 0 || regs[5] !== 0) begin
      failures++; $display("FAIL clear");
    end
    for (int i = 0; i <= N; i++) m[i] = regs[i];

    // Random run against the model.
    for (int cyc = 0; cyc < 2000; cyc++) begin
      in_word = $urandom();
      for (int i = 0; i < N; i++) tap[i] = ($urandom_range(0, 3) == 0) ? 32'h0 : $urandom();
      clear    = ($urandom_range(0, 19) == 0);
      seu_en   = ($urandom_range(0, 29) == 0);
      seu_idx  = 3'($urandom_range(0, N));
      seu_mask = 32'h1 << $urandom_range(0, 31);
      model_step();
      @(negedge clk);
      check_regs("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
