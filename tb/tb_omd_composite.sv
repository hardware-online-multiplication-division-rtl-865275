// tb_omd_composite: self-checking test of the fully online multiplier-divider.
//
// Runs the worked example A=53, B=56, D=63 (K=6), whose digit stream is
// 0 0 0 0 1 1 0 0 -1 1 (Q = 47, remainder 7), then every A, B < D for every
// 6-bit divisor with its MSB set, all three operands fed bit-serially. For
// each run it rebuilds Q = sum q_i 2^(K+4-i) from the K+4 digits and the
// remainder R = (RS + RC)/16 (signed, K+6 bits), and checks A*B = Q*D + R,
// -D <= R < D, that the first four digits are 0 (online delay 4), that the
// accumulated divisor equals D and that exactly K+4 digits are valid.
module tb_omd_composite;
  import omd_pkg::*;
  localparam int K = 6;
  localparam int W = K + 6;

  logic clk = 0, rst = 1, start = 0, a = 0, b = 0, d = 0;
  bsd_t q;
  logic q_valid, last, done;
  logic [K-1:0] d_acc;
  logic [W-1:0] rs_next, rc_next, rs, rc;
  int checks = 0, failures = 0;

  omd_composite #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int digits [K+4];
  logic [K-1:0] dseen;

  task automatic run(input int av, input int bv, input int dv);
    int nvalid;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    nvalid = 0;
    for (int i = 1; i <= K + 4; i++) begin
      a = (i <= K) ? av[K-i] : 1'b0;
      b = (i <= K) ? bv[K-i] : 1'b0;
      d = (i <= K) ? dv[K-i] : 1'b0;
      #1;
      if (q_valid) begin
        digits[i-1] = bsd_value(q);
        nvalid++;
      end
      if (last) dseen = d_acc;
      if ((i == K + 4) != last) begin
        failures++;
        $display("last flag wrong at iteration %0d", i);
      end
      @(negedge clk);
    end
    a = 0; b = 0; d = 0;
    checks++;
    if (nvalid != K + 4 || !done || q_valid || dseen != K'(dv)) begin
      failures++;
      $display("cycle count or divisor wrong: %0d valid digits, done=%0b", nvalid, done);
    end
  endtask

  function automatic longint quotient();
    longint qv = 0;
    for (int i = 0; i < K + 4; i++) qv = 2 * qv + digits[i];
    return qv;
  endfunction

  function automatic longint remainder16();
    logic [W-1:0] sum = rs + rc;
    return longint'($signed(sum));
  endfunction

  task automatic check(input int av, input int bv, input int dv);
    longint qv, r16;
    qv  = quotient();
    r16 = remainder16();
    checks++;
    if (digits[0] != 0 || digits[1] != 0 || digits[2] != 0 || digits[3] != 0 ||
        r16 % 16 != 0 || longint'(av) * bv != qv * dv + r16 / 16 ||
        r16 / 16 >= dv || r16 / 16 < -dv) begin
      failures++;
      if (failures < 10)
        $display("FAIL A=%0d B=%0d D=%0d: Q=%0d 16R=%0d", av, bv, dv, qv, r16);
    end
  endtask

  initial begin
    int expd [10] = '{0, 0, 0, 0, 1, 1, 0, 0, -1, 1};
    repeat (3) @(negedge clk);
    rst = 0;
    run(53, 56, 63);
    check(53, 56, 63);
    checks++;
    if (digits != expd || quotient() != 47 || remainder16() != 112) begin
      failures++;
      $display("example mismatch: Q=%0d 16R=%0d", quotient(), remainder16());
    end
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
