// par_reg: a register that stores a word together with its parity signature.
//
// The writer supplies the word and the S-bit signature it predicts for it
// (interleaved even parity, see sig_gen; S = 1 is plain parity). On every rising clock
// edge with ld high both are stored. err is combinational and high whenever
// the stored word and stored signature disagree, so a flipped bit inside the
// register, or a wrongly predicted signature from the logic feeding it, is
// flagged one cycle after the write. Synchronous active-high reset clears
// word and signature (a consistent all-zero state). The signature on every
// register follows the published scheme; the interleaved parity code and reset are
// choices of this design.
module par_reg #(
  parameter int unsigned W = vit_pkg::METRIC_W,
  parameter int unsigned S = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [W-1:0] d,
  input  logic [S-1:0] dp,
  output logic [W-1:0] q,
  output logic [S-1:0] qp,
  output logic         err
);
  always_ff @(posedge clk) begin
    if (rst) begin
      q  <= '0;
      qp <= '0;
    end else if (ld) begin
      q  <= d;
      qp <= dp;
    end
  end

  logic [S-1:0] q_sig;
  sig_gen #(.W(W), .S(S)) u_sig (.d(q), .sig(q_sig));
  assign err = |(q_sig ^ qp);
endmodule
