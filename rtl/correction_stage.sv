// correction_stage: remainder sign correction for an online multiplier-divider.
//
// An online multiplier-divider ends with a remainder R in carry-save form
// that may be negative (|R| < D); its quotient digits are then one unit in
// the last place too large. This stage runs alongside the unit it follows:
//   * every iteration it feeds the raw digit q_i into a two-digit partial
//     quotient (partial_quotient) and emits the digit that leaves it;
//   * in the unit's last iteration it finds the sign of the residue being
//     written (rs_in + rc_in) with a Brent-Kung carry tree
//     (bk_sign_detect) instead of a full addition; if negative it adds the
//     divisor (dcorr, at the residue's scale) with a CSA and feeds q_i - 1
//     instead of q_i into the partial quotient;
//   * one more cycle flushes the last digit.
// The output digit stream (q_out, one digit longer than the raw stream)
// is the corrected quotient, MSB first, the last digit having the weight of
// the unit's last raw digit; the corrected remainder (rem_s, rem_c) is in
// [0, D) at the residue scale. The correction adds one cycle in all.
//
// Timing: `start` clears it together with the unit. q_in, q_valid, last,
// rs_in, rc_in come combinationally from the unit. q_out is combinational
// and valid with q_out_valid; rem_s/rem_c/rem_neg are registered and valid
// from the cycle after `last` (rem_valid). The method (carry-save correction
// without assimilation, tree sign detection, partial quotient with secondary
// selection) is the document's; the handshake is this design's choice.
module correction_stage
  import omd_pkg::*;
#(
  parameter int unsigned L = 68
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  bsd_t         q_in,
  input  logic         q_valid,
  input  logic         last,
  input  logic [L-1:0] rs_in,
  input  logic [L-1:0] rc_in,
  input  logic [L-1:0] dcorr,
  output bsd_t         q_out,
  output logic         q_out_valid,
  output logic [L-1:0] rem_s,
  output logic [L-1:0] rem_c,
  output logic         rem_neg,
  output logic         rem_valid
);
  logic              neg, cout;
  logic              flush;
  logic              fix;
  logic signed [1:0] inc;
  logic [L-1:0]      cs, cc;

  bk_sign_detect #(.L(L)) u_sign (.xs(rs_in), .xc(rc_in), .cout(cout), .neg(neg));

  always_comb begin
    fix = last && neg;
    inc = '0;
    if (q_valid) inc = 2'(bsd_value(q_in) - int'(fix));
  end

  partial_quotient u_pq (
    .clk(clk), .rst(rst), .clear(start), .en(q_valid || flush), .inc(inc), .q_hat(q_out)
  );
  assign q_out_valid = q_valid || flush;

  csa #(.W(L)) u_fix (
    .x(rs_in), .y(rc_in), .z(fix ? dcorr : '0), .cin(1'b0), .s(cs), .c(cc)
  );

  always_ff @(posedge clk) begin
    if (rst || start) begin
      flush     <= 1'b0;
      rem_s     <= '0;
      rem_c     <= '0;
      rem_neg   <= 1'b0;
      rem_valid <= 1'b0;
    end else begin
      flush <= last;
      if (last) begin
        rem_s     <= cs;
        rem_c     <= cc;
        rem_neg   <= neg;
        rem_valid <= 1'b1;
      end
    end
  end

endmodule
