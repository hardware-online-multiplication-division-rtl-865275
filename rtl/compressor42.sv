// compressor42: W-bit [4:2] compressor.
//
// Reduces four W-bit words to a carry-save pair with
// s + c = w0 + w1 + w2 + w3 (mod 2^W). It is built from two rows of 3:2
// carry-save adders: the first row adds w0, w1 and w2, the second adds its
// sum and carry to w3. Carries out of bit W-1 are dropped, which is exact
// for two's-complement residues that stay in range. The document asks for an
// optimized [4:2] compressor with the same function; the two-row form is this
// design's choice. Purely combinational.
module compressor42 #(
  parameter int unsigned W = 68
) (
  input  logic [W-1:0] w0,
  input  logic [W-1:0] w1,
  input  logic [W-1:0] w2,
  input  logic [W-1:0] w3,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] s1, c1;

  csa #(.W(W)) u_row1 (.x(w0), .y(w1), .z(w2), .cin(1'b0), .s(s1), .c(c1));
  csa #(.W(W)) u_row2 (.x(s1), .y(c1), .z(w3), .cin(1'b0), .s(s),  .c(c));

endmodule
