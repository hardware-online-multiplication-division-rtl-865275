// tb_omd_const: self-checking test of the constant-divisor online multiplier-divider.
//
// Runs the worked example A=53, B=56, D=63 (K=6), whose digit stream is
// 0 1 -1 -1 1 0 0 0 -1 (Q = 47, remainder 7), then every A, B < D for every
// 6-bit divisor with its MSB set. For each run it rebuilds Q from the K+3
// digits, Q = sum q_i 2^(K+3-i), and the remainder from the carry-save pair,
// R = (RS + RC)/8 as a signed (K+4)-bit number, and checks A*B = Q*D + R,
// -D <= R < D (the raw remainder can reach -D
// exactly), that q_1 = 0 (online delay 3) and that exactly K+3 digits are
// valid before done.
module tb_omd_const;
  import omd_pkg::*;
  localparam int K = 6;
  localparam int W = K + 4;

  logic clk = 0, rst = 1, start = 0, a = 0, b = 0;
  logic [K-1:0] d = '0;
  bsd_t q;
  logic q_valid, last, done;
  logic [W-1:0] rs_next, rc_next, rs, rc;
  int checks = 0, failures = 0;

  omd_const #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int digits [K+3];

  task automatic run(input int av, input int bv, input int dv);
    int nvalid;
    d = K'(dv);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    nvalid = 0;
    for (int i = 1; i <= K + 3; i++) begin
      a = (i <= K) ? av[K-i] : 1'b0;
      b = (i <= K) ? bv[K-i] : 1'b0;
      #1;
      if (q_valid) begin
        digits[i-1] = bsd_value(q);
        nvalid++;
      end
      if ((i == K + 3) != last) begin
        failures++;
        $display("last flag wrong at iteration %0d", i);
      end
      @(negedge clk);
    end
    a = 0; b = 0;
    checks++;
    if (nvalid != K + 3 || !done || q_valid) begin
      failures++;
      $display("cycle count wrong: %0d valid digits, done=%0b", nvalid, done);
    end
  endtask

  function automatic longint quotient();
    longint qv = 0;
    for (int i = 0; i < K + 3; i++) qv = 2 * qv + digits[i];
    return qv;
  endfunction

  function automatic longint remainder8();
    logic [W-1:0] sum = rs + rc;
    return longint'($signed(sum));
  endfunction

  task automatic check(input int av, input int bv, input int dv);
    longint qv, r8;
    qv = quotient();
    r8 = remainder8();
    checks++;
    if (digits[0] != 0 || r8 % 8 != 0 || longint'(av) * bv != qv * dv + r8 / 8 ||
        r8 / 8 >= dv || r8 / 8 < -dv) begin
      failures++;
      if (failures < 10)
        $display("FAIL A=%0d B=%0d D=%0d: Q=%0d 8R=%0d", av, bv, dv, qv, r8);
    end
  endtask

  initial begin
    int expd [9] = '{0, 1, -1, -1, 1, 0, 0, 0, -1};
    repeat (3) @(negedge clk);
    rst = 0;
    // worked example
    run(53, 56, 63);
    check(53, 56, 63);
    checks++;
    if (digits != expd || quotient() != 47 || remainder8() != 56) begin
      failures++;
      $display("example mismatch: Q=%0d 8R=%0d", quotient(), remainder8());
    end
    // exhaustive over A, B < D for all normalised 6-bit divisors
    for (int dv = 32; dv < 64; dv++)
      for (int av = 0; av < dv; av++)
        for (int bv = 0; bv < dv; bv++) begin
          run(av, bv, dv);
          check(av, bv, dv);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
