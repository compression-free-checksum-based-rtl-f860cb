// tb_cfd_coverage: fault-coverage study over generator polynomials.
//
// The scheme was evaluated by injecting single bit flips into the pipeline
// latches of a 5-stage and an 8-stage pipeline running a random stream with
// one branch in five, for every generator polynomial the pipeline depth
// allows (32 for five stages, 256 for eight). This testbench repeats that
// study on the RTL: one cfd_cov_run per polynomial, each a complete cfd_top
// with its own fault campaign, all polynomials seeing the same sequence of
// random draws. It covers all 32 polynomials of the 5-stage pipeline and a
// sample of 32 of the 256 of the 8-stage pipeline (every eighth, starting at
// 3). Every run checks each fault report against a behavioural model of the
// checksums; the table printed at the end gives the detected share per
// polynomial.
module tb_cfd_coverage;

  localparam int NP5 = 32;
  localparam int NP8 = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int inj5 [NP5], det5 [NP5], chk5 [NP5], fail5 [NP5];
  int inj8 [NP8], det8 [NP8], chk8 [NP8], fail8 [NP8];
  logic [NP5-1:0] done5;
  logic [NP8-1:0] done8;

  for (genvar g = 0; g < NP5; g++) begin : g_p5
    cfd_cov_run #(.N(5), .POLY(g), .NPAIRS(600)) u_run (
      .clk(clk), .injected(inj5[g]), .detected(det5[g]),
      .checks(chk5[g]), .failures(fail5[g]), .done(done5[g]));
  end
  for (genvar g = 0; g < NP8; g++) begin : g_p8
    cfd_cov_run #(.N(8), .POLY(8 * g + 3), .NPAIRS(300)) u_run (
      .clk(clk), .injected(inj8[g]), .detected(det8[g]),
      .checks(chk8[g]), .failures(fail8[g]), .done(done8[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best5 = 0;
    wait (&done5 && &done8);
    $display("5-stage pipeline: polynomial, injected, detected, coverage %%");
    for (int p = 0; p < NP5; p++) begin
      checks += chk5[p];
      failures += fail5[p];
      $display("  %3d  %4d  %4d  %3d.%1d", p, inj5[p], det5[p],
               det5[p] * 100 / inj5[p], (det5[p] * 1000 / inj5[p]) % 10);
      if (det5[p] > det5[best5]) best5 = p;
    end
    $display("  best: %0d", best5);
    $display("8-stage pipeline (sample): polynomial, injected, detected, coverage %%");
    for (int g = 0; g < NP8; g++) begin
      checks += chk8[g];
      failures += fail8[g];
      $display("  %3d  %4d  %4d  %3d.%1d", 8 * g + 3, inj8[g], det8[g],
               det8[g] * 100 / inj8[g], (det8[g] * 1000 / inj8[g]) % 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
