// tb_v_selector: checks the V estimate and Selm digit selection.
// Random (W = 12) pairs: the five top bits (two integer, three fraction) are
// summed here, truncated to quarters, and q = +1 for >= 1/4, -1 for <= -1/2,
// else 0 is expected; with enable low q must be 0.
module tb_v_selector;
  import omd_pkg::*;
  localparam int W = 12;
  logic [W-1:0] vs, vc;
  logic enable;
  logic [4:0] v_est;
  bsd_t q;
  int checks = 0, failures = 0;

  v_selector #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int e, quarters, qref;
      vs = W'($urandom()); vc = W'($urandom()); enable = (n % 8) != 0;
      #1;
      e = (int'(vs[W-1:W-5]) + int'(vc[W-1:W-5])) % 32;
      if (e >= 16) e -= 32;                      // eighths, -16 .. 15
      quarters = (e >= 0) ? e / 2 : -((-e + 1) / 2);  // floor(e/2)
      qref = !enable ? 0 : (quarters >= 1) ? 1 : (quarters <= -2) ? -1 : 0;
      checks++;
      if (bsd_value(q) != qref || (q.p && q.n)) begin
        failures++;
        $display("FAIL vs=%h vc=%h en=%b q=%0d expected %0d", vs, vc, enable, bsd_value(q), qref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
