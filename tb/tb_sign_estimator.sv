// tb_sign_estimator: checks the ES(RS, RC) classification.
// Random (W = 10) carry-save pairs; the estimate is recomputed here from the
// five top bits (four integer bits, one fraction bit) and classified with
// the thresholds +0.5 and -2.5, in units of 1/2 as integers.
module tb_sign_estimator;
  import omd_pkg::*;
  localparam int W = 10;
  logic [W-1:0] rs, rc;
  est_t est;
  logic [4:0] es_sum;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  sign_estimator #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e;
      est_t ref_est;
      rs = W'($urandom()); rc = W'($urandom());
      #1;
      e = int'(rs[W-1:W-5]) + int'(rc[W-1:W-5]);
      e = e % 32;
      if (e >= 16) e -= 32;          // halves, -16 .. 15
      ref_est = (e >= 1) ? EST_POS : (e <= -5) ? EST_NEG : EST_UNSURE;
      seen[int'(ref_est)]++;
      checks++;
      if (est != ref_est) begin
        failures++;
        $display("FAIL rs=%h rc=%h est=%0d expected %0d", rs, rc, est, ref_est);
      end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
