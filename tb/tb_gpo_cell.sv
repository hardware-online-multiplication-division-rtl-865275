// tb_gpo_cell: exhaustive check of the generate-propagate operator.
// Treats (gh, ph) and (gl, pl) as two carry-transfer functions and checks
// that the merged cell maps each carry-in exactly as the two applied in turn.
module tb_gpo_cell;
  logic gh, ph, gl, pl, g, p;
  int checks = 0, failures = 0;

  gpo_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {gh, ph, gl, pl} = 4'(v);
      #1;
      for (int ci = 0; ci < 2; ci++) begin
        logic mid, outc, merged;
        mid    = gl | (pl & 1'(ci));
        outc   = gh | (ph & mid);
        merged = g | (p & 1'(ci));
        checks++;
        if (outc != merged) begin
          failures++;
          $display("FAIL gh=%b ph=%b gl=%b pl=%b cin=%0d", gh, ph, gl, pl, ci);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
