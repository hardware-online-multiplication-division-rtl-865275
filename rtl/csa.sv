// csa: W-bit 3:2 carry-save adder.
//
// Adds three W-bit words into a sum word s and a carry word c so that
// s + c = x + y + z + cin (mod 2^W). Each bit position is one full adder; the
// carry of position i moves to position i+1 of c, and the free LSB of c takes
// cin. The online multiplier-dividers use cin to finish a two's-complement
// subtraction: they feed the inverted subtrahend on one input and set cin.
// Purely combinational. The document names the block and its size (k+4 or
// k+6 bits); the bit-level form is the textbook one.
module csa #(
  parameter int unsigned W = 68
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[W-2:0], cin};
  end

endmodule
