// reco_pcsa: parallel compare-select-add unit protected by recomputation
// with encoded operands (RESO or RERO, chosen by ENC).
//
// Function, as in pcsa_unit: out1 = min(pm1, pm2) + bm_a,
// out2 = min(pm1, pm2) + bm_b, dec = 1 when pm2 won (ties select pm1,
// modulo-2**W comparison by the sign of pm1 - pm2).
//
// The unit is cut into two halves by a sub-pipeline register:
//   half 1 (compare and add): the subtractor and the four adders
//          pm1+bm_a, pm2+bm_a, pm1+bm_b, pm2+bm_b, all enc_adder slices,
//   half 2 (select):          the two multiplexers, which pick encoded sums.
// Each operation passes each half twice: first with the original operands,
// then with the shifted (RESO) or rotated (RERO) ones, half 2 always one
// cycle behind half 1. Because the multiplexers also work on encoded words,
// a stuck multiplexer bit hits different result bits in the two passes too.
// The decoded difference and the decoded selected sums of the two passes are
// compared; a mismatch raises err. The outputs are the first-pass results.
//
// Timing and handshake are those of reco_csa: one operation accepted every
// two cycles (in_ready); counting the accepting edge as the first, results
// and err are updated on the fourth edge and out_valid lasts one cycle.
// fi flips slices of the pm1+bm_a adder in both passes (a permanent fault);
// it is seen only when that sum is selected.
// Recomputation of PCSA with RESO/RERO and the half/half sub-pipelining follow
// the published scheme; the split into halves, K and the handshake are this design's
// choices.
module reco_pcsa
  import vit_pkg::*;
#(
  parameter enc_e        ENC = ENC_RESO,
  parameter int unsigned W   = METRIC_W,
  parameter int unsigned K   = 1,
  localparam int unsigned E  = (ENC == ENC_RESO) ? W + K : W + 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] pm1,
  input  logic [W-1:0] pm2,
  input  logic [W-1:0] bm_a,
  input  logic [W-1:0] bm_b,
  input  logic [E-1:0] fi,
  output logic         out_valid,
  output logic [W-1:0] out1,
  output logic [W-1:0] out2,
  output logic         dec,
  output logic         err
);
  function automatic logic [E-1:0] encode(input logic [W-1:0] x, input logic pass);
    logic [E-1:0] v;
    v = E'(x);
    if (pass) begin
      if (ENC == ENC_RESO) v = v << K;
      else                 v = (v << K) | (v >> (E - K));
    end
    return v;
  endfunction

  function automatic logic [W-1:0] decode(input logic [E-1:0] y, input logic pass);
    logic [E-1:0] v;
    v = y;
    if (pass) begin
      if (ENC == ENC_RESO) v = v >> K;
      else                 v = (v >> K) | (v << (E - K));
    end
    return v[W-1:0];
  endfunction

  // ---- operand register and half-1 pass control ----
  logic [W-1:0] r_a1, r_a2, r_la, r_lb;
  logic [E-1:0] r_fi;
  logic         h1_valid, h1_pass, accept;

  assign in_ready = ~h1_valid | h1_pass;
  assign accept   = in_valid & in_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      h1_valid <= 1'b0;
      h1_pass  <= 1'b0;
      r_a1 <= '0; r_a2 <= '0; r_la <= '0; r_lb <= '0; r_fi <= '0;
    end else begin
      h1_valid <= accept | (h1_valid & ~h1_pass);
      h1_pass  <= h1_valid & ~h1_pass;
      if (accept) begin
        r_a1 <= pm1; r_a2 <= pm2; r_la <= bm_a; r_lb <= bm_b; r_fi <= fi;
      end
    end
  end

  // ---- half 1: subtractor and four adders, in parallel ----
  logic [E-1:0] e_a1, e_a2, e_a2n, e_la, e_lb, e_diff;
  logic [E-1:0] e_sum [4];
  logic [W-1:0] diff;
  logic         sel2;

  assign e_a1  = encode(r_a1, h1_pass);
  assign e_a2  = encode(r_a2, h1_pass);
  assign e_a2n = encode(~r_a2, h1_pass);
  assign e_la  = encode(r_la, h1_pass);
  assign e_lb  = encode(r_lb, h1_pass);

  enc_adder #(.ENC(ENC), .W(W), .K(K)) u_sub (
    .a(e_a1), .b(e_a2n), .cin(1'b1), .pass(h1_pass), .flip('0), .s(e_diff));
  enc_adder #(.ENC(ENC), .W(W), .K(K)) u_add_1a (
    .a(e_a1), .b(e_la), .cin(1'b0), .pass(h1_pass), .flip(r_fi), .s(e_sum[0]));
  enc_adder #(.ENC(ENC), .W(W), .K(K)) u_add_2a (
    .a(e_a2), .b(e_la), .cin(1'b0), .pass(h1_pass), .flip('0), .s(e_sum[1]));
  enc_adder #(.ENC(ENC), .W(W), .K(K)) u_add_1b (
    .a(e_a1), .b(e_lb), .cin(1'b0), .pass(h1_pass), .flip('0), .s(e_sum[2]));
  enc_adder #(.ENC(ENC), .W(W), .K(K)) u_add_2b (
    .a(e_a2), .b(e_lb), .cin(1'b0), .pass(h1_pass), .flip('0), .s(e_sum[3]));

  assign diff = decode(e_diff, h1_pass);
  assign sel2 = ~diff[W-1] & (|diff);

  logic [W-1:0] diff0;
  always_ff @(posedge clk) begin
    if (rst)                      diff0 <= '0;
    else if (h1_valid & ~h1_pass) diff0 <= diff;
  end

  // ---- sub-pipeline register ----
  logic         p_valid, p_pass, p_sel, p_err;
  logic [E-1:0] p_sum [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= 1'b0;
      p_pass  <= 1'b0;
      p_sel   <= 1'b0;
      p_err   <= 1'b0;
      for (int k = 0; k < 4; k++) p_sum[k] <= '0;
    end else begin
      p_valid <= h1_valid;
      p_pass  <= h1_pass;
      p_sel   <= sel2;
      p_err   <= h1_valid & h1_pass & (diff != diff0);
      for (int k = 0; k < 4; k++) p_sum[k] <= e_sum[k];
    end
  end

  // ---- half 2: select on encoded sums, then decode ----
  logic [W-1:0] s1, s2;
  assign s1 = decode(p_sel ? p_sum[1] : p_sum[0], p_pass);
  assign s2 = decode(p_sel ? p_sum[3] : p_sum[2], p_pass);

  logic [W-1:0] s1_0, s2_0;
  logic         sel_0;
  always_ff @(posedge clk) begin
    if (rst) begin
      s1_0  <= '0;
      s2_0  <= '0;
      sel_0 <= 1'b0;
    end else if (p_valid & ~p_pass) begin
      s1_0  <= s1;
      s2_0  <= s2;
      sel_0 <= p_sel;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out1      <= '0;
      out2      <= '0;
      dec       <= 1'b0;
      err       <= 1'b0;
    end else begin
      out_valid <= p_valid & p_pass;
      if (p_valid & p_pass) begin
        out1 <= s1_0;
        out2 <= s2_0;
        dec  <= sel_0;
        err  <= p_err | (s1 != s1_0) | (s2 != s2_0) | (p_sel != sel_0);
      end
    end
  end

  initial begin
    assert (K >= 1 && K < E) else $error("reco_pcsa: K must be in 1..E-1");
  end
endmodule
