// reco_csa: compare-select-add unit protected by recomputation with encoded
// operands (RESO or RERO, chosen by ENC).
//
// Function, as in csa_unit: out1 = min(pm1, pm2) + bm_a,
// out2 = min(pm1, pm2) + bm_b, dec = 1 when pm2 won (ties select pm1,
// modulo-2**W comparison by the sign of pm1 - pm2).
//
// The unit is cut into two halves by a sub-pipeline register:
//   half 1 (compare-select): subtractor (enc_adder) and multiplexer,
//   half 2 (add):            two adders (enc_adder).
// Every operation goes through each half twice. In its first cycle half 1
// works on the original operands; in the second cycle half 1 gets the
// encoded (shifted or rotated) operands while half 2 works on the original
// ones; in the third cycle half 2 gets the encoded ones. The decoded
// difference of the two subtractor passes and the decoded sums of the two
// adder passes are compared; any mismatch raises err for that operation.
// The outputs are the first-pass (original) results.
//
// Timing: an operation is accepted on a clock edge with in_valid & in_ready;
// in_ready is low every second cycle while a first pass occupies half 1, so
// one operation is accepted every two cycles. Counting the accepting edge
// as the first, out_valid, the outputs and err are updated on the fourth
// edge (four register stages: operands, sub-pipeline, first-pass results,
// outputs) and out_valid lasts one cycle.
// fi (instrumentation, captured with the operands) flips sum slices of the
// bm_a adder in both passes: a permanent slice fault.
// The two-cycle recompute with shifted/rotated operands and the half/half
// sub-pipelining follow the published scheme; the shift/rotate amount K, the handshake
// and the output timing are this design's choices.
module reco_csa
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
  // ---- operand encoding ----
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
  logic         h1_valid, h1_pass;
  logic         accept;

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

  // ---- half 1: compare (subtractor) and select ----
  logic [E-1:0] e_a1, e_a2, e_a2n, e_diff, m_e;
  logic [W-1:0] diff;
  logic         sel2;

  assign e_a1  = encode(r_a1, h1_pass);
  assign e_a2  = encode(r_a2, h1_pass);
  assign e_a2n = encode(~r_a2, h1_pass);

  enc_adder #(.ENC(ENC), .W(W), .K(K)) u_sub (
    .a(e_a1), .b(e_a2n), .cin(1'b1), .pass(h1_pass), .flip('0), .s(e_diff)
  );
  assign diff = decode(e_diff, h1_pass);
  assign sel2 = ~diff[W-1] & (|diff);
  assign m_e  = sel2 ? e_a2 : e_a1;

  // first-pass difference kept for the comparison
  logic [W-1:0] diff0;
  always_ff @(posedge clk) begin
    if (rst)                      diff0 <= '0;
    else if (h1_valid & ~h1_pass) diff0 <= diff;
  end

  // ---- sub-pipeline register between the halves ----
  logic         p_valid, p_pass, p_sel, p_err;
  logic [E-1:0] p_m, p_la, p_lb, p_fi;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= 1'b0;
      p_pass  <= 1'b0;
      p_sel   <= 1'b0;
      p_err   <= 1'b0;
      p_m <= '0; p_la <= '0; p_lb <= '0; p_fi <= '0;
    end else begin
      p_valid <= h1_valid;
      p_pass  <= h1_pass;
      p_sel   <= sel2;
      p_err   <= h1_valid & h1_pass & (diff != diff0);
      p_m     <= m_e;
      p_la    <= encode(r_la, h1_pass);
      p_lb    <= encode(r_lb, h1_pass);
      p_fi    <= r_fi;
    end
  end

  // ---- half 2: two adders ----
  logic [E-1:0] e_s1, e_s2;
  logic [W-1:0] s1, s2;

  enc_adder #(.ENC(ENC), .W(W), .K(K)) u_add_a (
    .a(p_m), .b(p_la), .cin(1'b0), .pass(p_pass), .flip(p_fi), .s(e_s1)
  );
  enc_adder #(.ENC(ENC), .W(W), .K(K)) u_add_b (
    .a(p_m), .b(p_lb), .cin(1'b0), .pass(p_pass), .flip('0), .s(e_s2)
  );
  assign s1 = decode(e_s1, p_pass);
  assign s2 = decode(e_s2, p_pass);

  // first-pass results and select decision
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

  // ---- outputs after the second adder pass ----
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
    assert (K >= 1 && K < E) else $error("reco_csa: K must be in 1..E-1");
  end
endmodule
