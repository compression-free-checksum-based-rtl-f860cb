// tb_cfd_fetch_ctrl: self-checking test of the block-multithreading fetch
// controller.
//
// The instruction memory is a function of the address; roughly one word in
// five is a branch, and some long branch-free stretches force a switch after
// MAX_BLOCK (8 here). For each block pair the test works out, from the
// memory alone, the block length L and then checks cycle by cycle: L fetches
// of thread 0 from the pair's start address (clear[0] on the first), L
// fetches of thread 1 from the same addresses (clear[1] on the first), DRAIN
// (2 here) cycles without fetch, then one compare cycle; store must come
// exactly L+DRAIN cycles after the pair started. A mismatch is returned in some compares;
// the controller must then flush and start the same pair again, otherwise it
// continues after the block. run is dropped now and then to check that the
// controller idles between pairs.
module tb_cfd_fetch_ctrl;
  import cfd_pkg::*;

  localparam int unsigned MAXB = 8;
  localparam int unsigned D    = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic run, mismatch;
  word_t fetch_pc, fetch_instr, pair_start_o;
  slot_t fetch_slot;
  logic [NTHREADS-1:0] clear;
  logic store, compare, flush, blk_start, forced_switch, ctx_switch, rollback, pair_ok;

  int checks = 0, failures = 0;
  int n_forced = 0, n_rollback = 0, n_idle = 0, n_pairs = 0;

  cfd_fetch_ctrl #(.MAX_BLOCK(MAXB), .DRAIN(D)) dut (.*);

  always #5 clk = ~clk;

  function automatic word_t mem(word_t a);
    word_t h = a * 32'h9E37_79B9 ^ 32'h7F4A_7C15;
    h = h ^ (h >> 13);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 16);
    if ((a % 64) >= 40) h[31:26] = 6'h3F;          // long branch-free stretch
    else if (h % 5 == 0) h[31:26] = BR_OPCODE;
    else if (h[31:26] == BR_OPCODE) h[31:26] = 6'h01;
    return h;
  endfunction

  assign fetch_instr = mem(fetch_pc);

  task automatic expect1(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t p = 0;
    run = 0; mismatch = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect1(!fetch_slot.valid, "no fetch while idle");
    run = 1;
    @(negedge clk);                       // IDLE -> T0 at this edge
    for (int pair = 0; pair < 600; pair++) begin
      int L;
      logic fail, forced;
      L = 0;
      do L++; while (!is_branch(mem(p + L - 1)[31:26]) && L < MAXB);
      forced = !is_branch(mem(p + L - 1)[31:26]);
      for (int th = 0; th < 2; th++)
        for (int i = 0; i < L; i++) begin
          #1;
          expect1(fetch_slot.valid && fetch_slot.tid == th[0], "thread fetching");
          expect1(fetch_pc == p + i, $sformatf("pc %0d expected %0d", fetch_pc, p + i));
          expect1(clear == ((i == 0) ? (2'b01 << th) : 2'b00), "clear");
          expect1(store == (th * L + i == L + D), "store");
          expect1(blk_start == (i == 0), "blk_start");
          expect1(ctx_switch == (i == L - 1), "ctx_switch");
          expect1(forced_switch == (th == 0 && i == L - 1 && forced), "forced_switch");
          expect1(!compare, "no compare while fetching");
          if (forced_switch) n_forced++;
          @(negedge clk);
        end
      for (int d = 0; d < D; d++) begin
        #1;
        expect1(!fetch_slot.valid && !compare, "drain");
        expect1(store == (2 * L + d == L + D), "store in drain");
        @(negedge clk);
      end
      // Compare cycle.
      fail = ($urandom_range(0, 6) == 0);
      mismatch = fail;
      if ($urandom_range(0, 15) == 0) run = 0;
      #1;
      expect1(compare && !fetch_slot.valid, "compare cycle");
      expect1(flush == fail && rollback == fail && pair_ok == !fail, "flush/rollback");
      expect1(pair_start_o == p, "pair start");
      @(negedge clk);
      mismatch = 0;
      if (fail) n_rollback++; else begin p += L; n_pairs++; end
      if (!run) begin
        repeat (3) begin
          #1;
          expect1(!fetch_slot.valid && !compare, "idle");
          n_idle++;
          @(negedge clk);
        end
        run = 1;
        @(negedge clk);
      end
    end
    expect1(n_forced > 0 && n_rollback > 0 && n_idle > 0, "all mechanisms seen");
    $display("pairs=%0d forced=%0d rollbacks=%0d idle=%0d", n_pairs, n_forced, n_rollback, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
