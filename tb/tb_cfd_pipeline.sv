// tb_cfd_pipeline: self-checking test of the pipeline latches and taps.
//
// Random slots are fetched every cycle. A slot fetched in cycle t must appear
// at tap i in cycle t+i and at the output in cycle t+NSTAGES, unchanged. A
// flush must clear every valid bit, and an injected upset must flip exactly
// the chosen bits of the chosen latch, after which the flipped slot travels
// on unchanged.
module tb_cfd_pipeline;
  import cfd_pkg::*;

  localparam int unsigned N = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic flush, seu_en;
  logic [$clog2(N)-1:0] seu_stage;
  logic [XLEN:0] seu_mask;
  slot_t in_slot, out_slot;
  slot_t tap [N];

  slot_t hist [$];   // expected slot history, newest first
  int checks = 0, failures = 0;

  cfd_pipeline #(.NSTAGES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; seu_en = 0; seu_stage = 0; seu_mask = 0; in_slot = '0;
    for (int i = 0; i < N + 1; i++) hist.push_front('0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      in_slot.valid = $urandom_range(0, 4) != 0;
      in_slot.tid   = 1'($urandom());
      in_slot.instr = $urandom();
      flush    = ($urandom_range(0, 49) == 0);
      seu_en   = !flush && ($urandom_range(0, 19) == 0);
      seu_stage = 3'($urandom_range(0, N - 1));
      seu_mask  = 33'h1 << $urandom_range(0, XLEN);
      // hist[0] is what is fetched now, hist[i] what sits in latch i-1.
      hist.push_front(in_slot);
      void'(hist.pop_back());
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (tap[i] !== hist[i]) begin
          failures++;
          $display("FAIL cycle %0d tap %0d = %h expected %h", cyc, i, tap[i], hist[i]);
        end
      end
      checks++;
      if (out_slot !== hist[N]) begin
        failures++;
        $display("FAIL cycle %0d out = %h expected %h", cyc, out_slot, hist[N]);
      end
      // Apply what the coming edge does to the model.
      if (flush) for (int i = 0; i < N; i++) hist[i].valid = 1'b0;
      if (seu_en) begin
        hist[seu_stage].tid   ^= seu_mask[XLEN];
        hist[seu_stage].instr ^= seu_mask[XLEN-1:0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
