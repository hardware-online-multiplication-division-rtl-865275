// gpo_cell: generate-propagate operator of a Brent-Kung carry tree.
//
// Merges the (G, P) pair of an upper group of bit positions with the pair of
// the adjacent lower group: the merged group generates a carry if the upper
// part generates one, or propagates one generated by the lower part; it
// propagates an incoming carry only if both parts do.
//   g = gh | (ph & gl),  p = ph & pl
// This is the operator cell of the document's correction stage. Purely
// combinational.
module gpo_cell (
  input  logic gh,
  input  logic ph,
  input  logic gl,
  input  logic pl,
  output logic g,
  output logic p
);
  always_comb begin
    g = gh | (ph & gl);
    p = ph & pl;
  end
endmodule
