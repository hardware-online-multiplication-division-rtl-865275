// sign_estimator: the ES(RS, RC) unit of the constant-divisor multiplier-divider.
//
// The residue is a W-bit carry-save pair with four integer bits (the top one
// is the sign) and W-4 fraction bits. A 5-bit carry-propagate adder sums the
// five top bits of RS and RC, giving an estimate with one fraction bit
// (units of 1/2, range -8 .. 7.5). The estimate is classified as
//   EST_POS    if estimate >= 0.5   (5-bit code 00001 .. 01111)
//   EST_NEG    if estimate <= -2.5  (5-bit code 10000 .. 11011)
//   EST_UNSURE otherwise
// The thresholds are the document's; the 5-bit adder plus a small decoder is
// its stated structure. Purely combinational; the result is registered by
// the datapath and used in the following iteration.
module sign_estimator
  import omd_pkg::*;
#(
  parameter int unsigned W = 68
) (
  input  logic [W-1:0] rs,
  input  logic [W-1:0] rc,
  output est_t         est,
  output logic [4:0]   es_sum  // the raw 5-bit estimate
);
  always_comb begin
    es_sum = rs[W-1 -: 5] + rc[W-1 -: 5];
    if (!es_sum[4] && es_sum != 5'd0)
      est = EST_POS;
    else if ($signed(es_sum) <= $signed(5'b11011))
      est = EST_NEG;
    else
      est = EST_UNSURE;
  end
endmodule
