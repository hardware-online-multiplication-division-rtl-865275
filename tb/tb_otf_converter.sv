// tb_otf_converter: checks the on-the-fly converter.
// Replays the textbook example 0.1 0 -1 1 -1 -1 0 1 (K = 8, result
// 0.01100101), then random digit strings whose value is non-negative; after
// every digit Q must equal the value of the digits so far and QM must equal
// Q - 2^-j, both modulo 1 in units of 2^-K.
module tb_otf_converter;
  import omd_pkg::*;
  localparam int K = 8;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  bsd_t q = BSD_ZERO;
  logic [K-1:0] qreg, qmreg;
  int checks = 0, failures = 0;

  otf_converter #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bsd_t to_bsd(int v);
    return (v > 0) ? BSD_POS : (v < 0) ? BSD_NEG : BSD_ZERO;
  endfunction

  task automatic convert(input int digs [K]);
    int val;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    val = 0;
    for (int j = 0; j < K; j++) begin
      en = 1; q = to_bsd(digs[j]);
      val += digs[j] * (1 << (K - 1 - j));
      @(negedge clk);
      en = 0;
      checks++;
      if (qreg != K'(val) || qmreg != K'(val - (1 << (K - 1 - j)))) begin
        failures++;
        $display("FAIL step %0d: Q=%b QM=%b value %0d", j, qreg, qmreg, val);
      end
    end
  endtask

  initial begin
    int ex [K] = '{1, 0, -1, 1, -1, -1, 0, 1};
    int rd [K];
    repeat (2) @(negedge clk);
    rst = 0;
    convert(ex);
    checks++;
    if (qreg != 8'b01100101) begin failures++; $display("example gave %b", qreg); end
    for (int n = 0; n < 300; n++) begin
      rd[0] = 1;
      for (int j = 1; j < K; j++) rd[j] = int'($urandom_range(2)) - 1;
      convert(rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
