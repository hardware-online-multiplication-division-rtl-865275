// tb_csa: checks the 3:2 carry-save adder on random and corner words.
// For each input set s + c must equal x + y + z + cin modulo 2^W, and the
// sum word must be the bitwise XOR of the three inputs.
module tb_csa;
  localparam int W = 13;
  logic [W-1:0] x, y, z, s, c;
  logic cin;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      x = W'($urandom()); y = W'($urandom()); z = W'($urandom()); cin = 1'($urandom());
      if (n == 0) begin x = '1; y = '1; z = '1; cin = 1; end
      #1;
      checks++;
      if (W'(s + c) != W'(x + y + z + W'(cin)) || s != (x ^ y ^ z)) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h cin=%b s=%h c=%h", x, y, z, cin, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
