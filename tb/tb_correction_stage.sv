// tb_correction_stage: checks the correction stage on synthetic unit outputs.
// Each run plays a raw digit stream of N = 8 random digits and, in the last
// iteration, a random carry-save residue r with -D <= r < D for a random
// D (L = 10); in other iterations the residue inputs carry noise that must
// be ignored. Expected, worked out here: the N+1 corrected digits, read as
// an integer, equal the raw digits read the same way minus 1 if r < 0; the
// corrected remainder is r (+ D if r < 0) and lies in [0, D); rem_neg
// tells whether r was negative; exactly N+1 digits are valid.
module tb_correction_stage;
  import omd_pkg::*;
  localparam int L = 10;
  localparam int N = 8;
  logic clk = 0, rst = 1, start = 0, q_valid = 0, last = 0;
  bsd_t q_in = BSD_ZERO, q_out;
  logic [L-1:0] rs_in = '0, rc_in = '0, dcorr = '0, rem_s, rem_c;
  logic q_out_valid, rem_neg, rem_valid;
  int checks = 0, failures = 0, nneg = 0, npos = 0;

  correction_stage #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bsd_t to_bsd(int v);
    return (v > 0) ? BSD_POS : (v < 0) ? BSD_NEG : BSD_ZERO;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int dv, r, raw, got, nout, dig, isneg;
      logic [L-1:0] rsum;
      dv = 1 + int'($urandom_range((1 << (L - 2)) - 2));
      r  = int'($urandom_range(2 * dv - 1)) - dv;
      if (n == 0) r = -dv;
      isneg = (r < 0);
      dcorr = L'(dv);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      raw = 0; got = 0; nout = 0;
      for (int j = 1; j <= N + 1; j++) begin
        q_valid = (j <= N);
        last    = (j == N);
        dig     = (j <= N) ? int'($urandom_range(2)) - 1 : 0;
        q_in    = to_bsd(dig);
        if (j <= N) raw = 2 * raw + dig;
        rs_in = L'($urandom());
        rc_in = (j == N) ? L'(r) - rs_in : L'($urandom());
        #1;
        if (q_out_valid) begin got = 2 * got + bsd_value(q_out); nout++; end
        @(negedge clk);
      end
      q_valid = 0; last = 0;
      rsum = rem_s + rem_c;
      if (isneg) nneg++; else npos++;
      checks += 3;
      if (nout != N + 1 || !rem_valid) begin failures++; $display("FAIL run %0d: %0d digits", n, nout); end
      if (got != raw - isneg) begin failures++; $display("FAIL run %0d: quotient %0d raw %0d r %0d", n, got, raw, r); end
      if (int'(rsum) != r + (isneg ? dv : 0) || int'(rsum) >= dv || rem_neg != 1'(isneg)) begin
        failures++;
        $display("FAIL run %0d: remainder %0d from r %0d D %0d", n, rsum, r, dv);
      end
    end
    checks++;
    if (nneg == 0 || npos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
