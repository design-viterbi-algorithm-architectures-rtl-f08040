// viterbi_architecture: the fault-tolerant compare-select-add datapath of a
// look-ahead Viterbi decoder, in all six protected variants.
//
// One set of metric inputs (two path metrics pm1/pm2 and two branch metrics
// bm_a/bm_b) feeds six units that each compute
//   out1 = min(pm1, pm2) + bm_a,  out2 = min(pm1, pm2) + bm_b,  dec = (pm2 won)
// and each raise their own error flag:
//   csa   - compare first, then add; register signatures, duplicated mux,
//           self-checking adders (csa_unit);
//   pcsa  - add in parallel with the compare; same checks (pcsa_unit);
//   reso  - compare-select-add recomputed with shifted operands (reco_csa);
//   rero  - compare-select-add recomputed with rotated operands (reco_csa);
//   preso - parallel compare-select-add recomputed with shifted operands
//           (reco_pcsa);
//   prero - parallel compare-select-add recomputed with rotated operands
//           (reco_pcsa).
// The signature of each input word (SIG_W-bit interleaved parity, plain
// parity by default) is generated here, where the word enters the protected
// datapath. The branch metric unit and the survivor
// path memory of the decoder are outside this block: branch metrics come in
// as ports and the dec outputs go out to the survivor memory.
//
// Handshake: an operation is accepted on a rising edge with in_valid and
// in_ready; in_ready follows the recomputing units, which take one operation
// every two cycles. Counting the accepting edge as the first, the
// signature-based units write their results on the second edge and the
// recomputing units on the fourth; each unit has its own *_valid strobe. err_any is high in any cycle in which a unit presents a
// result with its error flag set.
//
// Instrumentation inputs (all zero in normal use) inject faults for error
// detection assessment: par_flip inverts bit 0 of the generated signature of
// {bm_b, bm_a, pm2, pm1}; csa_fi / pcsa_fi flip an adder's sum bits (upper
// W bits) or the primary multiplexer select (bit 0); reso_fi / rero_fi flip
// sum slices of the bm_a adder in both passes of the recomputing CSA units,
// preso_fi / prero_fi those of the pm1+bm_a adder of the recomputing PCSA
// units.
// The name and 16-bit metric width follow the published scheme; putting the six
// variants side by side with one shared input is this design's choice.
module viterbi_architecture
  import vit_pkg::*;
#(
  parameter int unsigned W      = METRIC_W,
  parameter int unsigned SIG_W  = 1,
  parameter int unsigned K_RESO = 1,
  parameter int unsigned K_RERO = METRIC_W / 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [W-1:0]      pm1,
  input  logic [W-1:0]      pm2,
  input  logic [W-1:0]      bm_a,
  input  logic [W-1:0]      bm_b,
  // fault injection
  input  logic [3:0]        par_flip,
  input  logic [W:0]        csa_fi,
  input  logic [W:0]        pcsa_fi,
  input  logic [W+K_RESO-1:0] reso_fi,
  input  logic [W:0]        rero_fi,
  input  logic [W+K_RESO-1:0] preso_fi,
  input  logic [W:0]        prero_fi,
  // compare-select-add with signatures
  output logic              csa_valid,
  output logic [W-1:0]      csa_out1,
  output logic [W-1:0]      csa_out2,
  output logic              csa_dec,
  output logic              csa_err,
  // parallel compare-select-add with signatures
  output logic              pcsa_valid,
  output logic [W-1:0]      pcsa_out1,
  output logic [W-1:0]      pcsa_out2,
  output logic              pcsa_dec,
  output logic              pcsa_err,
  // recompute with shifted operands
  output logic              reso_valid,
  output logic [W-1:0]      reso_out1,
  output logic [W-1:0]      reso_out2,
  output logic              reso_dec,
  output logic              reso_err,
  // recompute with rotated operands
  output logic              rero_valid,
  output logic [W-1:0]      rero_out1,
  output logic [W-1:0]      rero_out2,
  output logic              rero_dec,
  output logic              rero_err,
  // parallel compare-select-add, recompute with shifted operands
  output logic              preso_valid,
  output logic [W-1:0]      preso_out1,
  output logic [W-1:0]      preso_out2,
  output logic              preso_dec,
  output logic              preso_err,
  // parallel compare-select-add, recompute with rotated operands
  output logic              prero_valid,
  output logic [W-1:0]      prero_out1,
  output logic [W-1:0]      prero_out2,
  output logic              prero_dec,
  output logic              prero_err,
  output logic              err_any
);
  logic reso_ready, rero_ready, preso_ready, prero_ready, accept;
  logic [SIG_W-1:0] pm1_s, pm2_s, bm_a_s, bm_b_s;
  logic [SIG_W-1:0] pm1_p, pm2_p, bm_a_p, bm_b_p;

  assign in_ready = reso_ready & rero_ready & preso_ready & prero_ready;
  assign accept   = in_valid & in_ready;

  // signature generation at the entry of the protected datapath
  sig_gen #(.W(W), .S(SIG_W)) u_sig_pm1 (.d(pm1),  .sig(pm1_s));
  sig_gen #(.W(W), .S(SIG_W)) u_sig_pm2 (.d(pm2),  .sig(pm2_s));
  sig_gen #(.W(W), .S(SIG_W)) u_sig_bma (.d(bm_a), .sig(bm_a_s));
  sig_gen #(.W(W), .S(SIG_W)) u_sig_bmb (.d(bm_b), .sig(bm_b_s));
  assign pm1_p  = pm1_s  ^ SIG_W'(par_flip[0]);
  assign pm2_p  = pm2_s  ^ SIG_W'(par_flip[1]);
  assign bm_a_p = bm_a_s ^ SIG_W'(par_flip[2]);
  assign bm_b_p = bm_b_s ^ SIG_W'(par_flip[3]);

  logic [SIG_W-1:0] csa_o1p, csa_o2p, pcsa_o1p, pcsa_o2p;

  csa_unit #(.W(W), .S(SIG_W)) u_csa (
    .clk, .rst, .in_valid(accept),
    .pm1, .pm1_p, .pm2, .pm2_p, .bm_a, .bm_a_p, .bm_b, .bm_b_p,
    .fi(csa_fi),
    .out_valid(csa_valid), .out1(csa_out1), .out1_p(csa_o1p),
    .out2(csa_out2), .out2_p(csa_o2p), .dec(csa_dec), .err(csa_err)
  );

  pcsa_unit #(.W(W), .S(SIG_W)) u_pcsa (
    .clk, .rst, .in_valid(accept),
    .pm1, .pm1_p, .pm2, .pm2_p, .bm_a, .bm_a_p, .bm_b, .bm_b_p,
    .fi(pcsa_fi),
    .out_valid(pcsa_valid), .out1(pcsa_out1), .out1_p(pcsa_o1p),
    .out2(pcsa_out2), .out2_p(pcsa_o2p), .dec(pcsa_dec), .err(pcsa_err)
  );

  reco_csa #(.ENC(ENC_RESO), .W(W), .K(K_RESO)) u_reso (
    .clk, .rst, .in_valid(accept), .in_ready(reso_ready),
    .pm1, .pm2, .bm_a, .bm_b, .fi(reso_fi),
    .out_valid(reso_valid), .out1(reso_out1), .out2(reso_out2),
    .dec(reso_dec), .err(reso_err)
  );

  reco_csa #(.ENC(ENC_RERO), .W(W), .K(K_RERO)) u_rero (
    .clk, .rst, .in_valid(accept), .in_ready(rero_ready),
    .pm1, .pm2, .bm_a, .bm_b, .fi(rero_fi),
    .out_valid(rero_valid), .out1(rero_out1), .out2(rero_out2),
    .dec(rero_dec), .err(rero_err)
  );

  reco_pcsa #(.ENC(ENC_RESO), .W(W), .K(K_RESO)) u_preso (
    .clk, .rst, .in_valid(accept), .in_ready(preso_ready),
    .pm1, .pm2, .bm_a, .bm_b, .fi(preso_fi),
    .out_valid(preso_valid), .out1(preso_out1), .out2(preso_out2),
    .dec(preso_dec), .err(preso_err)
  );

  reco_pcsa #(.ENC(ENC_RERO), .W(W), .K(K_RERO)) u_prero (
    .clk, .rst, .in_valid(accept), .in_ready(prero_ready),
    .pm1, .pm2, .bm_a, .bm_b, .fi(prero_fi),
    .out_valid(prero_valid), .out1(prero_out1), .out2(prero_out2),
    .dec(prero_dec), .err(prero_err)
  );

  assign err_any = (csa_valid & csa_err) | (pcsa_valid & pcsa_err)
                 | (reso_valid & reso_err) | (rero_valid & rero_err)
                 | (preso_valid & preso_err) | (prero_valid & prero_err);

  // Output signatures are checked inside the units; they are not exported.
  logic unused;
  assign unused = ^{csa_o1p, csa_o2p, pcsa_o1p, pcsa_o2p};
endmodule
