// v_selector: the V and Selm blocks of the fully online multiplier-divider.
//
// V: a 5-bit carry-propagate adder sums the five top bits of the carry-save
// pair (VS, VC), which has two integer bits and W-2 fraction bits, giving an
// estimate V^ with three fraction bits. Selm: the quotient digit is chosen
// from the four most significant bits of V^ (V^ truncated to quarters):
//   q = +1 if the truncated estimate >= 1/4
//   q = -1 if the truncated estimate <= -1/2
//   q =  0 if it is 0 or -1/4
// which is the radix-2 online division rule q = 1 for V >= 1/4, q = -1 for
// V < -1/4 applied to the estimate. While `enable` is low (the first four
// iterations, the online delay) q is 0. Purely combinational.
module v_selector
  import omd_pkg::*;
#(
  parameter int unsigned W = 70
) (
  input  logic [W-1:0] vs,
  input  logic [W-1:0] vc,
  input  logic         enable,
  output logic [4:0]   v_est,
  output bsd_t         q
);
  logic [3:0] v4;

  always_comb begin
    v_est = vs[W-1 -: 5] + vc[W-1 -: 5];
    v4    = v_est[4:1];
    q     = BSD_ZERO;
    if (enable) begin
      if (v4 == 4'b0000 || v4 == 4'b1111) q = BSD_ZERO;
      else if (!v4[3])                    q = BSD_POS;
      else                                q = BSD_NEG;
    end
  end
endmodule
