// pcsa_unit: parallel compare-select-add (PCSA) unit with signature-based
// error detection.
//
// Same function as csa_unit: out1 = min(pm1, pm2) + bm_a,
// out2 = min(pm1, pm2) + bm_b, dec = 1 when pm2 won. Here the additions do
// not wait for the comparison: four adders form pm1+bm_a, pm2+bm_a, pm1+bm_b
// and pm2+bm_b while the subtractor compares pm1 with pm2, and two
// multiplexers then pick the sums that start from the smaller metric. This
// removes the adder from behind the compare at the cost of two more adders.
//
// Error detection (ORed into err, the PCSA-ERROR output): S-bit signatures
// on the four input and three output registers; both multiplexers duplicated
// and compared (XOR); subtractor and all four adders self-checking (sc_adder);
// each sum's signature predicted as sig(x) ^ sig(y) ^ sig(carries), carried
// through the multiplexer into the output register.
// Metrics are unsigned modulo 2**W, compared by the sign of the modulo
// difference; ties select pm1.
//
// Timing: identical to csa_unit: operands captured on the edge with
// in_valid, results and err written on the following edge, one operation
// per cycle. fi is captured with
// the operands: sum_flip (fi[W:1]) flips the output of the pm1+bm_a adder,
// sel_flip (fi[0]) the select of both primary multiplexers.
// The four adders, one subtractor, two duplicated multiplexer pairs, XOR
// comparisons and the OR into PCSA-ERROR follow the published PCSA scheme;
// codes, compare rule, reset and timing are this design's choices.
module pcsa_unit
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
  logic         diff_co, sub_err, sel2, sel_p;

  sc_adder #(.N(W)) u_sub (
    .a(a1), .b(~a2), .cin(1'b1), .s(diff), .cout(diff_co), .carries(diff_c), .err(sub_err)
  );
  assign sel2  = ~diff[W-1] & (|diff);
  assign sel_p = sel2 ^ fi_q[0];

  // ---- add in parallel: four self-checking adders ----
  // index: 0 = pm1+bm_a, 1 = pm2+bm_a, 2 = pm1+bm_b, 3 = pm2+bm_b
  logic [W-1:0] x [4];
  logic [W-1:0] y [4];
  logic [S-1:0] xp [4];
  logic [S-1:0] yp [4];
  logic [W-1:0] sum [4];
  logic [W-1:0] sum_raw [4];
  logic [W-1:0] car [4];
  logic [S-1:0] sp [4];
  logic [S-1:0] sc [4];
  logic [3:0]   co, add_err;

  assign x[0] = a1; assign xp[0] = a1p; assign y[0] = la; assign yp[0] = lap;
  assign x[1] = a2; assign xp[1] = a2p; assign y[1] = la; assign yp[1] = lap;
  assign x[2] = a1; assign xp[2] = a1p; assign y[2] = lb; assign yp[2] = lbp;
  assign x[3] = a2; assign xp[3] = a2p; assign y[3] = lb; assign yp[3] = lbp;

  for (genvar k = 0; k < 4; k++) begin : g_add
    sc_adder #(.N(W)) u_add (
      .a(x[k]), .b(y[k]), .cin(1'b0), .s(sum_raw[k]), .cout(co[k]), .carries(car[k]), .err(add_err[k])
    );
    sig_gen #(.W(W), .S(S)) u_sig_c (.d(car[k]), .sig(sc[k]));
    assign sp[k] = xp[k] ^ yp[k] ^ sc[k];
  end

  assign sum[0] = sum_raw[0] ^ fi_q[W:1];
  assign sum[1] = sum_raw[1];
  assign sum[2] = sum_raw[2];
  assign sum[3] = sum_raw[3];

  // ---- select: two primary multiplexers and their duplicates ----
  logic [W-1:0] o1, o2, o1_dup, o2_dup;
  logic [S-1:0] o1p, o2p, o1p_dup, o2p_dup;
  logic         mux_err;

  assign o1      = sel_p ? sum[1] : sum[0];
  assign o1p     = sel_p ? sp[1]  : sp[0];
  assign o2      = sel_p ? sum[3] : sum[2];
  assign o2p     = sel_p ? sp[3]  : sp[2];
  assign o1_dup  = sel2  ? sum[1] : sum[0];
  assign o1p_dup = sel2  ? sp[1]  : sp[0];
  assign o2_dup  = sel2  ? sum[3] : sum[2];
  assign o2p_dup = sel2  ? sp[3]  : sp[2];
  assign mux_err = (|(o1 ^ o1_dup)) | (|(o1p ^ o1p_dup)) | (|(o2 ^ o2_dup)) | (|(o2p ^ o2p_dup));

  // ---- output registers (with signatures) ----
  logic [1:0] out_err;
  logic       dec_err, dec_p, stage_err;

  par_reg #(.W(W), .S(S)) u_r_out1 (.clk, .rst, .ld(v_q), .d(o1), .dp(o1p), .q(out1), .qp(out1_p), .err(out_err[0]));
  par_reg #(.W(W), .S(S)) u_r_out2 (.clk, .rst, .ld(v_q), .d(o2), .dp(o2p), .q(out2), .qp(out2_p), .err(out_err[1]));
  par_reg #(.W(1), .S(1)) u_r_dec  (.clk, .rst, .ld(v_q), .d(sel_p), .dp(sel_p), .q(dec), .qp(dec_p), .err(dec_err));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      stage_err <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) stage_err <= (|in_err) | sub_err | mux_err | (|add_err);
    end
  end

  assign err = stage_err | (|out_err) | dec_err;

  logic unused;
  assign unused = dec_p ^ diff_co ^ (^diff_c) ^ (^co);
endmodule
