// tb_bk_sign_detect: checks the Brent-Kung sign detector.
// Three instances (L = 9, a power of two plus one; L = 12; L = 2) get random
// and corner carry-save pairs; the sign and the carry out of the low L-1
// bits are compared with a plain addition done here.
module tb_bk_sign_detect;
  logic [8:0]  xs9, xc9;
  logic [11:0] xs12, xc12;
  logic [1:0]  xs2, xc2;
  logic n9, c9, n12, c12, n2, c2;
  int checks = 0, failures = 0;

  bk_sign_detect #(.L(9))  d9  (.xs(xs9),  .xc(xc9),  .cout(c9),  .neg(n9));
  bk_sign_detect #(.L(12)) d12 (.xs(xs12), .xc(xc12), .cout(c12), .neg(n12));
  bk_sign_detect #(.L(2))  d2  (.xs(xs2),  .xc(xc2),  .cout(c2),  .neg(n2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [9:0] s9; logic [12:0] s12; logic [2:0] s2;
      xs9 = 9'($urandom()); xc9 = 9'($urandom());
      xs12 = 12'($urandom()); xc12 = 12'($urandom());
      xs2 = 2'($urandom()); xc2 = 2'($urandom());
      if (n == 0) begin xs9 = 9'h0ff; xc9 = 9'h101; xs12 = 12'h7ff; xc12 = 12'h801; end
      #1;
      s9 = {1'b0, xs9[7:0]} + {1'b0, xc9[7:0]};
      s12 = {1'b0, xs12[10:0]} + {1'b0, xc12[10:0]};
      s2 = {2'b0, xs2[0]} + {2'b0, xc2[0]};
      checks += 3;
      if (c9 != s9[8] || n9 != 1'(9'(xs9 + xc9) >> 8)) begin failures++; $display("FAIL L=9 %h %h", xs9, xc9); end
      if (c12 != s12[11] || n12 != 1'(12'(xs12 + xc12) >> 11)) begin failures++; $display("FAIL L=12 %h %h", xs12, xc12); end
      if (c2 != s2[1] || n2 != 1'(2'(xs2 + xc2) >> 1)) begin failures++; $display("FAIL L=2 %h %h", xs2, xc2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
