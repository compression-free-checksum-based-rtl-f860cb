// tb_cfd_checksum_storage: self-checking test of the checksum store.
//
// Random snapshots are stored; compares then present either the same words
// (no fault expected) or the same words with random bits flipped in random
// stage registers (a fault expected, with exactly those stages marked). The
// stored words must be visible on snap_o, and the store must hold its
// contents while store is low.
module tb_cfd_checksum_storage;
  import cfd_pkg::*;

  localparam int unsigned N = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic store, compare, mismatch;
  word_t store_regs [N+1];
  word_t cmp_regs   [N+1];
  word_t snap_o     [N+1];
  logic [N:0] diff_o;

  word_t ref_snap [N+1];
  int checks = 0, failures = 0;

  cfd_checksum_storage #(.NSTAGES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    store = 0; compare = 0;
    for (int i = 0; i <= N; i++) begin store_regs[i] = 0; cmp_regs[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 400; round++) begin
      logic [N:0] flips;
      @(negedge clk);
      store = 1;
      for (int i = 0; i <= N; i++) begin
        store_regs[i] = $urandom();
        ref_snap[i]   = store_regs[i];
      end
      @(negedge clk);
      store = 0;
      // Disturb store_regs: the store must not follow them.
      for (int i = 0; i <= N; i++) store_regs[i] = $urandom();
      repeat ($urandom_range(0, 3)) @(negedge clk);
      flips = ($urandom_range(0, 1) == 0) ? '0 : (N+1)'($urandom());
      for (int i = 0; i <= N; i++)
        cmp_regs[i] = ref_snap[i] ^ (flips[i] ? (32'h1 << $urandom_range(0, 31)) : 32'h0);
      #1;
      checks++;
      if (mismatch !== 1'b0 || diff_o !== '0) begin
        failures++; $display("FAIL mismatch without compare");
      end
      compare = 1;
      #1;
      checks += 2;
      if (mismatch !== (flips != 0)) begin
        failures++; $display("FAIL round %0d mismatch=%b flips=%b", round, mismatch, flips);
      end
      if (diff_o !== flips) begin
        failures++; $display("FAIL round %0d diff=%b flips=%b", round, diff_o, flips);
      end
      for (int i = 0; i <= N; i++) begin
        checks++;
        if (snap_o[i] !== ref_snap[i]) begin
          failures++; $display("FAIL snap[%0d]", i);
        end
      end
      @(negedge clk);
      compare = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
