// partial_quotient: two-digit partial quotient of the correction stage.
//
// Holds the low digit l of a two-digit signed-digit accumulator. Each enabled
// cycle it forms v = 2*l + inc, where inc in {-2 .. 1} is the quotient
// increment of that iteration (the raw digit, minus 1 in the iteration where
// the remainder is found negative), and splits v into an emitted digit h and
// a new low digit:
//   v >= 2  : h = +1, l = v - 2
//   v <= -1 : h = -1, l = v + 2
//   else    : h =  0, l = v
// So a value 0,-1 is rewritten as -1,+1, and a decrement of a digit that is
// already -1 (giving -2) never overflows the two digits. h is the corrected
// quotient digit, available combinationally in the same cycle; the digit
// stream is therefore one digit longer than the raw one, and the last digit
// is flushed by an enabled cycle with inc = 0. The selection rule is the
// document's; the arithmetic coding of v is this design's choice.
module partial_quotient
  import omd_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              en,
  input  logic signed [1:0] inc,
  output bsd_t              q_hat
);
  logic signed [2:0] lo;      // low digit, -1 .. 1
  logic signed [2:0] v;
  logic signed [2:0] lo_next;

  always_comb begin
    v = 3'(lo <<< 1) + 3'(inc);
    if (v >= 3'sd2) begin
      q_hat   = BSD_POS;
      lo_next = v - 3'sd2;
    end else if (v <= -3'sd1) begin
      q_hat   = BSD_NEG;
      lo_next = v + 3'sd2;
    end else begin
      q_hat   = BSD_ZERO;
      lo_next = v;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) lo <= '0;
    else if (en)      lo <= lo_next;
  end

  // The low digit must stay a single signed digit.
  assert property (@(posedge clk) disable iff (rst) en |-> (lo_next >= -3'sd1 && lo_next <= 3'sd1));

endmodule
