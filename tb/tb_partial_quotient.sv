// tb_partial_quotient: checks the two-digit partial quotient.
// Feeds random increment streams (digits in {-1, 0, 1}, with a final
// increment that may also be -2, as after a remainder correction), then one
// flush cycle with increment 0. The n+1 emitted digits, read as an integer
// (last digit weight 1), must equal the n increments read the same way
// (last increment weight 1): the accumulator delays the stream by one digit
// without changing its value.
module tb_partial_quotient;
  import omd_pkg::*;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  logic signed [1:0] inc = '0;
  bsd_t q_hat;
  int checks = 0, failures = 0;
  int rewrites = 0;

  partial_quotient dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      longint want, got;
      int len;
      len = 1 + int'($urandom_range(11));
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      want = 0; got = 0;
      for (int j = 0; j <= len; j++) begin
        int v;
        if (j < len - 1)       v = int'($urandom_range(2)) - 1;
        else if (j == len - 1) v = int'($urandom_range(3)) - 2;
        else                   v = 0;            // flush
        en = 1; inc = 2'(v);
        #1;
        if (dut.v == -3'sd1) rewrites++;   // 0,-1 rewritten as -1,+1
        want = 2 * want + v;
        got  = 2 * got + bsd_value(q_hat);
        checks++;
        if (q_hat.p && q_hat.n) begin failures++; $display("illegal digit"); end
        @(negedge clk);
        en = 0;
      end
      checks++;
      if (2 * got != want) begin
        failures++;
        $display("FAIL run %0d: emitted %0d, increments %0d", n, got, want);
      end
    end
    checks++;
    if (rewrites == 0) begin failures++; $display("rewrite never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
