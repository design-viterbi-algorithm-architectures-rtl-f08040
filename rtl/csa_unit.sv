// csa_unit: compare-select-add (CSA) unit with signature-based error detection.
//
// Function: out1 = min(pm1, pm2) + bm_a and out2 = min(pm1, pm2) + bm_b, with
// dec telling which path metric won (1 = pm2). The comparison comes first:
// a subtractor forms pm1 - pm2, one multiplexer selects the smaller metric,
// and two adders then add the two branch metrics to it.
//
// Error detection (all flags ORed into err, the CSA-ERROR output):
//  * every register carries an S-bit signature (interleaved parity; S = 1 is
//    plain parity); the four input registers and the three output registers
//    check their contents;
//  * the multiplexer is duplicated and the two copies are compared (XOR);
//  * the subtractor and both adders are self-checking adders (sc_adder);
//  * the signature of each sum is predicted from the operand signatures and
//    the adder carries, sig(x+y) = sig(x) ^ sig(y) ^ sig(carries), and is
//    written into the output register with the sum, so a wrong sum bit shows
//    up as a signature error there.
// Metrics are unsigned modulo 2**W; the comparison uses the sign of the
// modulo difference (valid while the two metrics differ by less than 2**(W-1)).
// Ties select pm1.
//
// Timing: the inputs and their signatures are captured when in_valid is
// high (first edge); the results are written on the next edge, so
// out_valid, out1/out2, dec and err are valid in the cycle after the second
// edge. One operation per cycle.
// fi (fault injection) is captured with the operands and flips internal
// nodes of that operation: sum_flip the output of the bm_a adder, sel_flip the
// select of the primary multiplexer.
// The structure (registers with P, subtractor, duplicated mux, two adders,
// XOR comparisons, OR into CSA-ERROR) follows the published CSA scheme; the
// signature code, modulo comparison, tie rule, reset and timing are this
// design's choices.
module csa_unit
  import vit_pkg::*;
#(
  parameter int unsigned W = METRIC_W,
  parameter int unsigned S = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] pm1,
  input  logic [S-1:0] pm1_p,
  input  logic [W-1:0] pm2,
  input  logic [S-1:0] pm2_p,
  input  logic [W-1:0] bm_a,
  input  logic [S-1:0] bm_a_p,
  input  logic [W-1:0] bm_b,
  input  logic [S-1:0] bm_b_p,
  input  logic [W:0]   fi,       // {sum_flip[W-1:0], sel_flip}
  output logic         out_valid,
  output logic [W-1:0] out1,
  output logic [S-1:0] out1_p,
  output logic [W-1:0] out2,
  output logic [S-1:0] out2_p,
  output logic         dec,
  output logic         err
);
  // ---- input registers (with signatures) ----
  logic [W-1:0] a1, a2, la, lb;
  logic [S-1:0] a1p, a2p, lap, lbp;
  logic [3:0]   in_err;
  logic         v_q;
  logic [W:0]   fi_q;

  par_reg #(.W(W), .S(S)) u_r_pm1 (.clk, .rst, .ld(in_valid), .d(pm1),  .dp(pm1_p),  .q(a1), .qp(a1p), .err(in_err[0]));
  par_reg #(.W(W), .S(S)) u_r_pm2 (.clk, .rst, .ld(in_valid), .d(pm2),  .dp(pm2_p),  .q(a2), .qp(a2p), .err(in_err[1]));
  par_reg #(.W(W), .S(S)) u_r_bma (.clk, .rst, .ld(in_valid), .d(bm_a), .dp(bm_a_p), .q(la), .qp(lap), .err(in_err[2]));
  par_reg #(.W(W), .S(S)) u_r_bmb (.clk, .rst, .ld(in_valid), .d(bm_b), .dp(bm_b_p), .q(lb), .qp(lbp), .err(in_err[3]));

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q  <= 1'b0;
      fi_q <= '0;
    end else begin
      v_q  <= in_valid;
      if (in_valid) fi_q <= fi;
    end
  end

  // ---- compare: subtractor pm1 - pm2 ----
  logic [W-1:0] diff, diff_c;
  logic         diff_co, sub_err, sel2;

  sc_adder #(.N(W)) u_sub (
    .a(a1), .b(~a2), .cin(1'b1), .s(diff), .cout(diff_co), .carries(diff_c), .err(sub_err)
  );
  assign sel2 = ~diff[W-1] & (|diff);   // pm1 > pm2 (modulo): take pm2

  // ---- select: primary and duplicated multiplexer ----
  logic         sel_p;
  logic [W-1:0] m, m_dup;
  logic [S-1:0] mp, mp_dup;
  logic         mux_err;

  assign sel_p   = sel2 ^ fi_q[0];
  assign m       = sel_p ? a2  : a1;
  assign mp      = sel_p ? a2p : a1p;
  assign m_dup   = sel2  ? a2  : a1;
  assign mp_dup  = sel2  ? a2p : a1p;
  assign mux_err = (|(m ^ m_dup)) | (|(mp ^ mp_dup));

  // ---- add: two self-checking adders with signature prediction ----
  logic [W-1:0] sa, sb, sa_raw, ca, cb;
  logic         coa, cob, add_err_a, add_err_b;
  logic [S-1:0] spa, spb, sca, scb;

  sc_adder #(.N(W)) u_add_a (.a(m), .b(la), .cin(1'b0), .s(sa_raw), .cout(coa), .carries(ca), .err(add_err_a));
  sc_adder #(.N(W)) u_add_b (.a(m), .b(lb), .cin(1'b0), .s(sb),     .cout(cob), .carries(cb), .err(add_err_b));

  assign sa  = sa_raw ^ fi_q[W:1];
  sig_gen #(.W(W), .S(S)) u_sig_ca (.d(ca), .sig(sca));
  sig_gen #(.W(W), .S(S)) u_sig_cb (.d(cb), .sig(scb));
  assign spa = mp ^ lap ^ sca;
  assign spb = mp ^ lbp ^ scb;

  // ---- output registers (with signatures) ----
  logic [1:0] out_err;
  logic       dec_err, dec_p, stage_err;

  par_reg #(.W(W), .S(S)) u_r_out1 (.clk, .rst, .ld(v_q), .d(sa), .dp(spa), .q(out1), .qp(out1_p), .err(out_err[0]));
  par_reg #(.W(W), .S(S)) u_r_out2 (.clk, .rst, .ld(v_q), .d(sb), .dp(spb), .q(out2), .qp(out2_p), .err(out_err[1]));
  par_reg #(.W(1), .S(1)) u_r_dec  (.clk, .rst, .ld(v_q), .d(sel_p), .dp(sel_p), .q(dec), .qp(dec_p), .err(dec_err));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      stage_err <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) stage_err <= (|in_err) | sub_err | mux_err | add_err_a | add_err_b;
    end
  end

  assign err = stage_err | (|out_err) | dec_err;

  // The result of the subtractor's carry-out is not needed by the compare.
  logic unused;
  assign unused = dec_p ^ diff_co ^ (^diff_c) ^ coa ^ cob;
endmodule
