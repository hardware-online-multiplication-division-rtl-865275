// omd_sweep: reusable end-to-end checker for omd_top at one operand size K.
//
// Instantiates omd_top at size K and runs both units with their correction
// stages on every A, B < D for a set of normalised divisors: all 2^(K-1) of
// them when ALL_D is set, otherwise the smallest, the largest and NDIV - 2
// random ones. Each operation is checked as in the end-to-end test: raw and
// corrected digit counts, corrected quotient equal to floor(A*B/D), and
// A*B = Q*D + R with 0 <= R < D, for both units. It also counts how often
// each mechanism fires (digits +1 / -1 / 0, the -Q[i-1] term, the
// partial-quotient rewrite, negative and non-negative remainders) and counts
// a failure for one that never fired. The -Q[i-1] term cannot fire when
// K <= 4: divisor digits arrive only in iterations 1 .. K, while Q is still
// zero (the first quotient digit is selected in iteration 5).
//
// Interface: clk in; checks and failures out, final when done rises. The
// clock comes from the enclosing testbench, so several sizes can run side by
// side. Each operation takes K+8 cycles (start, K+6 iterations, one gap).
module omd_sweep
  import omd_pkg::*;
#(
  parameter int K     = 4,
  parameter bit ALL_D = 1'b1,
  parameter int NDIV  = 4
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int WB = 2 * K + 8;   // width for products and quotients
  logic rst = 1;
  logic c_start = 0, c_a = 0, c_b = 0;
  logic [K-1:0] c_d = '0;
  logic f_start = 0, f_a = 0, f_b = 0, f_d = 0;
  bsd_t c_q_raw, c_q, f_q_raw, f_q;
  logic c_q_raw_valid, c_q_valid, c_rem_neg, c_rem_valid;
  logic f_q_raw_valid, f_q_valid, f_rem_neg, f_rem_valid;
  logic [K+3:0] c_rem_s, c_rem_c;
  logic [K+5:0] f_rem_s, f_rem_c;

  omd_top #(.K(K)) dut (.*);

  // mechanism counters
  int n_cpos = 0, n_cneg = 0, n_cunsure = 0, n_fpos = 0, n_fneg = 0;
  int n_rewrite = 0, n_qsub = 0, n_remneg = 0, n_rempos = 0;
  always @(posedge clk) begin
    if (c_q_raw_valid) begin
      if (c_q_raw.p) n_cpos++;
      else if (c_q_raw.n) n_cneg++;
      else n_cunsure++;
    end
    if (f_q_raw_valid && f_q_raw.p) n_fpos++;
    if (f_q_raw_valid && f_q_raw.n) n_fneg++;
    if (dut.u_const_fix.u_pq.en && dut.u_const_fix.u_pq.v == -3'sd1) n_rewrite++;
    if (dut.u_comp_fix.u_pq.en && dut.u_comp_fix.u_pq.v == -3'sd1) n_rewrite++;
    if (dut.u_comp.active && dut.u_comp.qsub) n_qsub++;
    if (dut.u_const.last) begin
      if (dut.u_const_fix.neg) n_remneg++; else n_rempos++;
    end
    if (dut.u_comp.last) begin
      if (dut.u_comp_fix.neg) n_remneg++; else n_rempos++;
    end
  end

  task automatic run(input logic [K-1:0] av, input logic [K-1:0] bv, input logic [K-1:0] dv);
    logic signed [WB-1:0] cq_raw, cq, fq_raw, fq, ab, qref, cr, fr;
    logic [K+3:0] csum;
    logic [K+5:0] fsum;
    int ncr, nc, nfr, nf;
    cq_raw = 0; cq = 0; fq_raw = 0; fq = 0;
    ncr = 0; nc = 0; nfr = 0; nf = 0;
    c_d = dv;
    @(negedge clk) begin c_start = 1; f_start = 1; end
    @(negedge clk) begin c_start = 0; f_start = 0; end
    for (int i = 1; i <= K + 6; i++) begin
      c_a = (i <= K) ? av[K-i] : 1'b0;
      c_b = (i <= K) ? bv[K-i] : 1'b0;
      f_a = c_a; f_b = c_b;
      f_d = (i <= K) ? dv[K-i] : 1'b0;
      #1;
      if (c_q_raw_valid) begin cq_raw = 2 * cq_raw + WB'(bsd_value(c_q_raw)); ncr++; end
      if (c_q_valid)     begin cq     = 2 * cq     + WB'(bsd_value(c_q));     nc++;  end
      if (f_q_raw_valid) begin fq_raw = 2 * fq_raw + WB'(bsd_value(f_q_raw)); nfr++; end
      if (f_q_valid)     begin fq     = 2 * fq     + WB'(bsd_value(f_q));     nf++;  end
      @(negedge clk);
    end
    ab   = WB'(av) * WB'(bv);
    qref = ab / WB'(dv);
    csum = c_rem_s + c_rem_c;
    fsum = f_rem_s + f_rem_c;
    cr   = WB'(csum) >>> 3;
    fr   = WB'(fsum) >>> 4;
    checks += 3;
    if (ncr != K + 3 || nc != K + 4 || nfr != K + 4 || nf != K + 5 || !c_rem_valid || !f_rem_valid) begin
      failures++;
      $display("digit counts %0d %0d %0d %0d", ncr, nc, nfr, nf);
    end
    if (cq != qref || csum[2:0] != 3'b000 || ab != cq * WB'(dv) + cr || cr >= WB'(dv)) begin
      failures++;
      if (failures < 10) $display("constant-divisor FAIL A=%0d B=%0d D=%0d Q=%0d R=%0d", av, bv, dv, cq, cr);
    end
    if (fq != qref || fsum[3:0] != 4'b0000 || ab != fq * WB'(dv) + fr || fr >= WB'(dv)) begin
      failures++;
      if (failures < 10) $display("fully online FAIL A=%0d B=%0d D=%0d Q=%0d R=%0d", av, bv, dv, fq, fr);
    end
  endtask

  function automatic logic [K-1:0] rand_below(input logic [K-1:0] lim);
    logic [K+31:0] r;
    r = '0;
    for (int w = 0; w < K; w += 32) r = {r[K-1:0], 32'($urandom())};
    return (lim == 0) ? '0 : K'(r[K-1:0] % lim);
  endfunction

  initial begin
    logic [K-1:0] dv;
    int ndiv;
    checks = 0; failures = 0; done = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    ndiv = ALL_D ? (1 << (K - 1)) : NDIV;
    for (int j = 0; j < ndiv; j++) begin
      if (ALL_D)       dv = K'((1 << (K - 1)) + j);
      else if (j == 0) dv = {1'b1, {(K-1){1'b0}}};
      else if (j == 1) dv = '1;
      else             dv = rand_below('1) | {1'b1, {(K-1){1'b0}}};
      for (int x = 0; x < int'(dv); x++)
        for (int y = 0; y < int'(dv); y++)
          run(K'(x), K'(y), dv);
    end
    $display("K=%0d: %0d divisors, mechanisms: ES+ %0d ES- %0d ES? %0d | composite q+ %0d q- %0d | Q-term %0d | rewrite %0d | R<0 %0d R>=0 %0d",
             K, ndiv, n_cpos, n_cneg, n_cunsure, n_fpos, n_fneg, n_qsub, n_rewrite, n_remneg, n_rempos);
    checks++;
    if (n_cpos == 0 || n_cneg == 0 || n_cunsure == 0 || n_fpos == 0 || n_fneg == 0 ||
        (n_qsub == 0 && K > 4) || n_rewrite == 0 || n_remneg == 0 || n_rempos == 0) begin
      failures++;
      $display("K=%0d: a mechanism never fired", K);
    end
    done = 1;
  end
endmodule
