// omd_top: the two online multiplier-dividers, each with its correction stage.
//
// Two independent units computing Q = A*B/D sit side by side, each with its
// own ports:
//   * c_*: the constant-divisor unit (omd_const), A and B online, D in
//     parallel, online delay 3, K+3 raw digits; its correction stage works on
//     the (K+4)-bit residue, which holds 8R, and adds 8D when it is negative;
//   * f_*: the fully online composite unit (omd_composite), A, B and D
//     online, online delay 4, K+4 raw digits; its correction stage works on
//     the (K+6)-bit residue, which holds 16R, and adds 16D when negative.
// Each unit's raw digit stream (*_q_raw, valid with *_q_raw_valid) and its
// corrected stream (*_q, one digit longer, valid with *_q_valid) are both
// brought out, as is the corrected carry-save remainder. Digits use the
// (p, n) two-wire code of omd_pkg. Starting a unit clears its correction
// stage too.
//
// Timing: rst is synchronous and active high. A one-cycle *_start pulse is
// followed by iteration 1; digit j of A, B (and D for f_) is driven in
// iteration j = 1 .. K, while c_d is held for the whole operation. Raw digits
// come out in iterations 1 .. K+3 (c_) or 1 .. K+4 (f_), corrected digits one
// cycle longer; the remainder is registered after the last iteration.
// Pairing each unit with the correction stage follows the document, which
// proposes the stage for either algorithm; the two-unit top and its
// handshake are this design's choices.
module omd_top
  import omd_pkg::*;
#(
  parameter int unsigned K = 64
) (
  input  logic         clk,
  input  logic         rst,
  // constant-divisor unit
  input  logic         c_start,
  input  logic         c_a,
  input  logic         c_b,
  input  logic [K-1:0] c_d,
  output bsd_t         c_q_raw,
  output logic         c_q_raw_valid,
  output bsd_t         c_q,
  output logic         c_q_valid,
  output logic [K+3:0] c_rem_s,
  output logic [K+3:0] c_rem_c,
  output logic         c_rem_neg,
  output logic         c_rem_valid,
  // fully online composite unit
  input  logic         f_start,
  input  logic         f_a,
  input  logic         f_b,
  input  logic         f_d,
  output bsd_t         f_q_raw,
  output logic         f_q_raw_valid,
  output bsd_t         f_q,
  output logic         f_q_valid,
  output logic [K+5:0] f_rem_s,
  output logic [K+5:0] f_rem_c,
  output logic         f_rem_neg,
  output logic         f_rem_valid
);
  // constant-divisor path
  logic         c_last, c_done;
  logic [K+3:0] c_rs_next, c_rc_next, c_rs, c_rc;

  omd_const #(.K(K)) u_const (
    .clk(clk), .rst(rst), .start(c_start), .a(c_a), .b(c_b), .d(c_d),
    .q(c_q_raw), .q_valid(c_q_raw_valid), .last(c_last),
    .rs_next(c_rs_next), .rc_next(c_rc_next), .rs(c_rs), .rc(c_rc), .done(c_done)
  );

  correction_stage #(.L(K+4)) u_const_fix (
    .clk(clk), .rst(rst), .start(c_start),
    .q_in(c_q_raw), .q_valid(c_q_raw_valid), .last(c_last),
    .rs_in(c_rs_next), .rc_in(c_rc_next), .dcorr({1'b0, c_d, 3'b000}),
    .q_out(c_q), .q_out_valid(c_q_valid),
    .rem_s(c_rem_s), .rem_c(c_rem_c), .rem_neg(c_rem_neg), .rem_valid(c_rem_valid)
  );

  // fully online composite path
  logic         f_last, f_done;
  logic [K-1:0] f_d_acc;
  logic [K+5:0] f_rs_next, f_rc_next, f_rs, f_rc;

  omd_composite #(.K(K)) u_comp (
    .clk(clk), .rst(rst), .start(f_start), .a(f_a), .b(f_b), .d(f_d),
    .q(f_q_raw), .q_valid(f_q_raw_valid), .last(f_last), .d_acc(f_d_acc),
    .rs_next(f_rs_next), .rc_next(f_rc_next), .rs(f_rs), .rc(f_rc), .done(f_done)
  );

  correction_stage #(.L(K+6)) u_comp_fix (
    .clk(clk), .rst(rst), .start(f_start),
    .q_in(f_q_raw), .q_valid(f_q_raw_valid), .last(f_last),
    .rs_in(f_rs_next), .rc_in(f_rc_next), .dcorr({2'b00, f_d_acc, 4'b0000}),
    .q_out(f_q), .q_out_valid(f_q_valid),
    .rem_s(f_rem_s), .rem_c(f_rem_c), .rem_neg(f_rem_neg), .rem_valid(f_rem_valid)
  );

endmodule
