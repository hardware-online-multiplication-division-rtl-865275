// tb_compressor42: checks the [4:2] compressor on random and corner words.
// s + c must equal the sum of the four inputs modulo 2^W.
module tb_compressor42;
  localparam int W = 15;
  logic [W-1:0] w0, w1, w2, w3, s, c;
  int checks = 0, failures = 0;

  compressor42 #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      w0 = W'($urandom()); w1 = W'($urandom()); w2 = W'($urandom()); w3 = W'($urandom());
      if (n == 0) begin w0 = '1; w1 = '1; w2 = '1; w3 = '1; end
      #1;
      checks++;
      if (W'(s + c) != W'(w0 + w1 + w2 + w3)) begin
        failures++;
        $display("FAIL %h %h %h %h -> %h %h", w0, w1, w2, w3, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
