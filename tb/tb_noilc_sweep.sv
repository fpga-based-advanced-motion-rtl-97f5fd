// tb_noilc_sweep: the NOILC engine built at many sizes, as a single
// matrix-vector product (Q = 0).
//
// Instantiates the engine at N = 2, 3, 4, 5, 8, 13, 16, 20, 32, 42, 64 and
// 128 side by side (one noilc_sweep_point each), all running at once. Every
// point computes L*e for two iterations of random errors and is checked
// against a reference with the engine's fixed-point rules. This covers the
// range of sizes over which the matrix-vector product is usually compared,
// up to the size where the run time is still short.
module tb_noilc_sweep;
  localparam int NP = 12;
  localparam int SIZES [NP] = '{2, 3, 4, 5, 8, 13, 16, 20, 32, 42, 64, 128};

  logic clk = 0;
  always #5 clk = ~clk;

  logic done [NP];
  int   pchecks [NP];
  int   pfails [NP];

  for (genvar g = 0; g < NP; g++) begin : g_point
    noilc_sweep_point #(.N(SIZES[g])) u_point (.clk, .done(done[g]), .checks(pchecks[g]), .failures(pfails[g]));
  end

  initial begin
    int checks, failures;
    bit all_done;
    all_done = 0;
    while (!all_done) begin
      @(negedge clk);
      all_done = 1;
      for (int g = 0; g < NP; g++) if (!done[g]) all_done = 0;
    end
    checks = 0; failures = 0;
    for (int g = 0; g < NP; g++) begin
      $display("N = %0d: checks %0d failures %0d", SIZES[g], pchecks[g], pfails[g]);
      checks += pchecks[g];
      failures += pfails[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    for (int g = 0; g < NP; g++) begin checks += pchecks[g]; failures += pfails[g]; end
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
