// omd_const: radix-2 online multiplier-divider with a parallel (constant) divisor.
//
// Computes Q = A*B/D and a remainder R with A*B = Q*D + R, where A and B
// arrive bit-serially, most significant bit first, as K-bit fractions, D is a
// K-bit fraction given in parallel (held constant, MSB = 1, A < D, B < D) and
// Q leaves one binary signed digit per cycle, most significant first.
//
// It is a Koc-Hung style interleaved multiply-and-reduce loop turned online.
// The residue (RS, RC) is a (K+4)-bit carry-save pair, four integer bits and
// K fraction bits. In iteration i = 1 .. K+3:
//   * the partial product a_i*B[i] + b_i*A[i-1] (B[i] already holds b_i,
//     A[i-1] not yet a_i) is added in a (K+4)-bit CSA together with
//     -8D, +8D or 0, chosen by the sign estimate ES of the residue at the end
//     of the previous iteration: ES >= 0.5 subtracts 8D and emits q_i = +1,
//     ES <= -2.5 adds 8D and emits q_i = -1, otherwise 0 and q_i = 0;
//   * a [4:2] compressor adds that pair to 2*(RS, RC);
//   * a 5-bit adder over the top bits of the new residue forms the next ES.
// The digits q_1 .. q_{K+3} give Q = sum q_i * 2^(K+3-i) in units of 2^-K
// (q_1 is always 0), i.e. an online delay of 3. After the last iteration
// RS + RC = 8*(A*B - Q*D) in units of 2^-2K, i.e. 8R, which may be negative
// (|R| < D); the correction stage fixes that. RS and RC are given in full
// rather than divided by 8 separately, since each half may carry low bits
// whose sum is a multiple of 8.
//
// Timing: a one-cycle `start` clears the unit; the next cycle is iteration 1.
// a and b are sampled in iterations 1 .. K and ignored after. q is valid
// (combinational, from the registered estimate) while q_valid is high;
// `last` marks iteration K+3; rs_next/rc_next are the residue being written
// this cycle, rs/rc the registered one, valid as remainder when `done`.
// Structure, widths, thresholds and the 8D scaling follow the document; the
// start/valid handshake and reset are this design's choices.
module omd_const
  import omd_pkg::*;
#(
  parameter int unsigned K = 64
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           a,
  input  logic           b,
  input  logic [K-1:0]   d,
  output bsd_t           q,
  output logic           q_valid,
  output logic           last,
  output logic [K+3:0]   rs_next,
  output logic [K+3:0]   rc_next,
  output logic [K+3:0]   rs,
  output logic [K+3:0]   rc,
  output logic           done
);
  localparam int unsigned W     = K + 4;
  localparam int unsigned NIT   = K + 3;
  localparam int unsigned CW    = $clog2(NIT + 2);

  logic [CW-1:0] it;       // iteration number, 1 .. NIT while active
  logic          active;
  logic [K-1:0]  areg, breg, pos;
  est_t          est;

  logic          a_m, b_m;
  logic [K-1:0]  b_i;
  logic [W-1:0]  xb, ya, dsel, d8, d8n;
  logic          cin;
  logic [W-1:0]  vs, vc;
  est_t          est_next;
  logic [4:0]    es_sum;

  assign d8  = {1'b0, d, 3'b000};   // 8D
  assign d8n = ~d8;                 // -8D - 2^-K; the CSA carry-in adds the 2^-K

  always_comb begin
    a_m  = a & (|pos);
    b_m  = b & (|pos);
    b_i  = breg | (b_m ? pos : '0);
    xb   = a_m ? {4'b0000, b_i}  : '0;
    ya   = b_m ? {4'b0000, areg} : '0;
    unique case (est)
      EST_POS: begin dsel = d8n; cin = 1'b1; q = BSD_POS;  end
      EST_NEG: begin dsel = d8;  cin = 1'b0; q = BSD_NEG;  end
      default: begin dsel = '0;  cin = 1'b0; q = BSD_ZERO; end
    endcase
    if (!active) q = BSD_ZERO;
  end

  csa #(.W(W)) u_csa (.x(xb), .y(ya), .z(dsel), .cin(cin), .s(vs), .c(vc));

  compressor42 #(.W(W)) u_c42 (
    .w0({rs[W-2:0], 1'b0}), .w1({rc[W-2:0], 1'b0}), .w2(vs), .w3(vc),
    .s(rs_next), .c(rc_next)
  );

  sign_estimator #(.W(W)) u_es (.rs(rs_next), .rc(rc_next), .est(est_next), .es_sum(es_sum));

  assign q_valid = active;
  assign last    = active && (it == CW'(NIT));

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      done   <= 1'b0;
      it     <= '0;
      areg   <= '0;
      breg   <= '0;
      pos    <= '0;
      rs     <= '0;
      rc     <= '0;
      est    <= EST_UNSURE;
    end else if (start) begin
      active <= 1'b1;
      done   <= 1'b0;
      it     <= CW'(1);
      areg   <= '0;
      breg   <= '0;
      pos    <= {1'b1, {(K-1){1'b0}}};
      rs     <= '0;
      rc     <= '0;
      est    <= EST_UNSURE;
    end else if (active) begin
      areg <= areg | (a_m ? pos : '0);
      breg <= b_i;
      pos  <= pos >> 1;
      rs   <= rs_next;
      rc   <= rc_next;
      est  <= est_next;
      it   <= it + 1'b1;
      if (last) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
