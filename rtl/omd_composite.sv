// omd_composite: radix-2 fully online multiplier-divider (composite recurrence).
//
// Computes Q = A*B/D with A, B and the divisor D all arriving bit-serially,
// most significant bit first, as K-bit fractions (0.5 <= D < 1, A*B < D), and
// Q leaving one binary signed digit per cycle. Instead of an online
// multiplier feeding an online divider, the product terms go straight into
// the division recurrence:
//   R(i) = 2R(i-1) + 2^-4 (a_i B[i] + b_i A[i-1]) - 2^-4 d_i Q[i-1] - q_i D[i]
// The residue (RS, RC) is a (K+6)-bit carry-save pair with two integer bits
// and K+4 fraction bits. In iteration i = 1 .. K+4:
//   * a [4:2] compressor adds 2RS, 2RC and the two partial products
//     (aligned 2^-4 lower) giving (PS, PC);
//   * if Q[i-1] != 0 and d_i = 1, a CSA adds -2^-4 Q[i-1] (inverted Q plus a
//     carry-in) giving (VS, VC), otherwise (VS, VC) = (PS, PC);
//   * V and Selm pick q_i from a 5-bit estimate of (VS, VC); q_i = 0 for
//     i <= 4 (online delay 4);
//   * a second CSA adds -q_i D[i] (D[i] already holds d_i);
//   * the on-the-fly converter appends q_i to Q.
// The digits q_5 .. q_{K+4} give Q = sum q_i 2^(K+4-i) in units of 2^-K.
// After the last iteration RS + RC = 16 (A*B - Q*D) in units of 2^-(2K+4),
// i.e. 16R with |R| < D.
//
// Timing: a one-cycle `start` clears the unit; the next cycle is iteration 1;
// a, b, d are sampled in iterations 1 .. K. q is combinational from the
// current inputs and valid while q_valid is high; `last` marks iteration
// K+4; `done` rises after it with the remainder in rs/rc. The recurrence,
// widths, the Q != 0 condition and the selection rule follow the document;
// the handshake and reset are this design's choices.
module omd_composite
  import omd_pkg::*;
#(
  parameter int unsigned K = 64
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           a,
  input  logic           b,
  input  logic           d,
  output bsd_t           q,
  output logic           q_valid,
  output logic           last,
  output logic [K-1:0]   d_acc,
  output logic [K+5:0]   rs_next,
  output logic [K+5:0]   rc_next,
  output logic [K+5:0]   rs,
  output logic [K+5:0]   rc,
  output logic           done
);
  localparam int unsigned W   = K + 6;
  localparam int unsigned NIT = K + 4;
  localparam int unsigned CW  = $clog2(NIT + 2);

  logic [CW-1:0] it;
  logic          active;
  logic [K-1:0]  areg, breg, dreg, pos;
  logic [K-1:0]  qreg, qmreg;

  logic          a_m, b_m, d_m;
  logic [K-1:0]  b_i, d_i;
  logic [W-1:0]  ps, pc, vs, vc, qterm, dterm;
  logic          qsub, dcin, sel_en;
  logic [4:0]    v_est;
  bsd_t          q_sel;

  always_comb begin
    a_m   = a & (|pos);
    b_m   = b & (|pos);
    d_m   = d & (|pos);
    b_i   = breg | (b_m ? pos : '0);
    d_i   = dreg | (d_m ? pos : '0);
    qsub  = d_m && (qreg != '0);
    qterm = qsub ? {6'b111111, ~qreg} : '0;
    sel_en = active && (it > CW'(4));
  end

  compressor42 #(.W(W)) u_c42 (
    .w0({rs[W-2:0], 1'b0}), .w1({rc[W-2:0], 1'b0}),
    .w2(a_m ? {6'b000000, b_i}  : W'(0)),
    .w3(b_m ? {6'b000000, areg} : W'(0)),
    .s(ps), .c(pc)
  );

  csa #(.W(W)) u_csa_q (.x(ps), .y(pc), .z(qterm), .cin(qsub), .s(vs), .c(vc));

  v_selector #(.W(W)) u_sel (.vs(vs), .vc(vc), .enable(sel_en), .v_est(v_est), .q(q_sel));

  always_comb begin
    q = q_sel;
    if (q.p) begin
      dterm = {2'b11, ~d_i, 4'b1111};
      dcin  = 1'b1;
    end else if (q.n) begin
      dterm = {2'b00, d_i, 4'b0000};
      dcin  = 1'b0;
    end else begin
      dterm = '0;
      dcin  = 1'b0;
    end
  end

  csa #(.W(W)) u_csa_d (.x(vs), .y(vc), .z(dterm), .cin(dcin), .s(rs_next), .c(rc_next));

  otf_converter #(.K(K)) u_ca (
    .clk(clk), .rst(rst), .clear(start), .en(sel_en), .q(q),
    .qreg(qreg), .qmreg(qmreg)
  );

  assign q_valid = active;
  assign last    = active && (it == CW'(NIT));
  assign d_acc   = d_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      done   <= 1'b0;
      it     <= '0;
      areg   <= '0;
      breg   <= '0;
      dreg   <= '0;
      pos    <= '0;
      rs     <= '0;
      rc     <= '0;
    end else if (start) begin
      active <= 1'b1;
      done   <= 1'b0;
      it     <= CW'(1);
      areg   <= '0;
      breg   <= '0;
      dreg   <= '0;
      pos    <= {1'b1, {(K-1){1'b0}}};
      rs     <= '0;
      rc     <= '0;
    end else if (active) begin
      areg <= areg | (a_m ? pos : '0);
      breg <= b_i;
      dreg <= d_i;
      pos  <= pos >> 1;
      rs   <= rs_next;
      rc   <= rc_next;
      it   <= it + 1'b1;
      if (last) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
