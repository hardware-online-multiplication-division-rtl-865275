// bk_sign_detect: sign of a carry-save number without a full addition.
//
// The sign of xs + xc (mod 2^L) is the XOR of the two most significant bits
// with the carry that the lower L-1 bit positions send into the MSB. That
// carry comes from a Brent-Kung style tree: each lower position forms
// generate G = xs & xc and propagate P = xs | xc, and log2 levels of
// generate-propagate operators (gpo_cell) merge neighbouring groups pairwise
// until one group covers all L-1 positions; its G is the carry (the carry-in
// is 0). Positions above L-1 that pad the tree to a power of two carry
// G = 0, P = 1, which leave any group unchanged. Delay grows with log2(L)
// instead of L.
//
// The document gives the G/P cells, the operator and the tree (drawn for 8
// bits) and says the carry is XORed with the two MSBs. The padding for sizes
// that are not a power of two is this design's choice; the document produced
// each size with a generator program. Purely combinational.
module bk_sign_detect #(
  parameter int unsigned L = 68
) (
  input  logic [L-1:0] xs,
  input  logic [L-1:0] xc,
  output logic         cout,  // carry out of bits L-2..0
  output logic         neg    // xs + xc is negative (two's complement)
);
  localparam int unsigned N   = L - 1;
  localparam int unsigned LEV = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned M   = 1 << LEV;

  // Level-l node j covers positions j*2^l .. (j+1)*2^l - 1. Each level has
  // its own vectors, so the tree is visibly loop-free.
  logic [M-1:0] g0, p0;
  logic         gtop;

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      if (i < N) begin
        g0[i] = xs[i] & xc[i];
        p0[i] = xs[i] | xc[i];
      end else begin
        g0[i] = 1'b0;
        p0[i] = 1'b1;
      end
    end
  end

  for (genvar l = 0; l < LEV; l++) begin : g_level
    localparam int unsigned NODES = M >> (l + 1);
    logic [2*NODES-1:0] gi, pi;
    logic [NODES-1:0]   go, po;
    if (l == 0) begin : g_first
      assign gi = g0;
      assign pi = p0;
    end else begin : g_next
      assign gi = g_level[l-1].go;
      assign pi = g_level[l-1].po;
    end
    for (genvar j = 0; j < NODES; j++) begin : g_node
      gpo_cell u_gpo (
        .gh(gi[2*j+1]), .ph(pi[2*j+1]),
        .gl(gi[2*j]),   .pl(pi[2*j]),
        .g (go[j]),     .p (po[j])
      );
    end
  end

  if (LEV == 0) begin : g_single
    assign gtop = g0[0];
  end else begin : g_tree
    assign gtop = g_level[LEV-1].go[0];
  end

  assign cout = gtop;
  assign neg  = xs[L-1] ^ xc[L-1] ^ cout;

endmodule
