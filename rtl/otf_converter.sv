// otf_converter: on-the-fly conversion of an MSB-first signed-digit number.
//
// Accepts one binary signed digit per enabled cycle, most significant first,
// and keeps two K-bit fractions: Q, the value of the digits so far, and
// QM = Q - 2^-j, its predecessor at the current length j. Both are updated by
// writing one bit at the current position (a one-hot pointer that starts at
// the MSB and moves right), never by a carry chain:
//   digit +1: Q <- Q  with bit 1,  QM <- Q  with bit 0
//   digit  0: Q <- Q  with bit 0,  QM <- QM with bit 1
//   digit -1: Q <- QM with bit 1,  QM <- QM with bit 0
// After K digits the pointer is empty and later digits are ignored. The
// registers start at 0, so a number whose leading nonzero digit is -1 comes
// out modulo 1 (the document's converter is k bits wide and holds
// non-negative quotients only). The conversion rules are the document's;
// the pointer form is this design's choice. `clear` (synchronous) restarts
// the conversion; Q reflects a digit from the cycle after it is given.
module otf_converter
  import omd_pkg::*;
#(
  parameter int unsigned K = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         en,
  input  bsd_t         q,
  output logic [K-1:0] qreg,
  output logic [K-1:0] qmreg
);
  logic [K-1:0] pos;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      qreg  <= '0;
      qmreg <= '0;
      pos   <= {1'b1, {(K-1){1'b0}}};
    end else if (en) begin
      pos <= pos >> 1;
      if (q.p) begin
        qreg  <= qreg | pos;
        qmreg <= qreg;
      end else if (q.n) begin
        qreg  <= qmreg | pos;
        qmreg <= qmreg;
      end else begin
        qmreg <= qmreg | pos;
      end
    end
  end

  // The two-wire digit code never carries (1,1).
  assert property (@(posedge clk) disable iff (rst) en |-> !(q.p && q.n));

endmodule
