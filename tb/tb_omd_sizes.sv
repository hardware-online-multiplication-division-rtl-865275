// tb_omd_sizes: exhaustive end-to-end sweep of omd_top at small operand sizes.
//
// Runs four copies of the design side by side from one clock, each driven
// and checked by omd_sweep, each on every A, B < D for a set of divisors:
//   * K = 4 and K = 6: every normalised divisor (all operand combinations);
//   * K = 8: 32 divisors (smallest, largest, 30 random), to keep the run
//     near a minute; setting ALL_D on it runs all 128 (a few minutes);
//   * K = 10: the smallest and the largest divisor.
// Both units and both correction stages are checked on every operation:
// digit counts, corrected quotient equal to floor(A*B/D), and A*B = Q*D + R with
// 0 <= R < D. These are the operand sizes at which the algorithms are
// verified by exhaustive simulation in the source description.
//
// Ends with the combined TB_RESULT line when all four sweeps are done; a
// watchdog stops it after 200 million cycles.
module tb_omd_sizes;
  logic clk = 0;
  int c4, f4, c6, f6, c8, f8, c10, f10;
  logic d4, d6, d8, d10;
  int checks, failures;

  always #5 clk = ~clk;

  omd_sweep #(.K(4),  .ALL_D(1'b1))            u_k4  (.clk(clk), .checks(c4),  .failures(f4),  .done(d4));
  omd_sweep #(.K(6),  .ALL_D(1'b1))            u_k6  (.clk(clk), .checks(c6),  .failures(f6),  .done(d6));
  omd_sweep #(.K(8),  .ALL_D(1'b0), .NDIV(32)) u_k8  (.clk(clk), .checks(c8),  .failures(f8),  .done(d8));
  omd_sweep #(.K(10), .ALL_D(1'b0), .NDIV(2))  u_k10 (.clk(clk), .checks(c10), .failures(f10), .done(d10));

  initial begin
    repeat (200000000) @(posedge clk);
    checks = c4 + c6 + c8 + c10;
    failures = f4 + f6 + f8 + f10 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d4 && d6 && d8 && d10);
    checks = c4 + c6 + c8 + c10;
    failures = f4 + f6 + f8 + f10;
    $display("K=4: %0d checks %0d failures, K=6: %0d/%0d, K=8: %0d/%0d, K=10: %0d/%0d",
             c4, f4, c6, f6, c8, f8, c10, f10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
