// sig_gen: signature generator for the protected datapath registers.
//
// Computes an S-bit interleaved parity of a W-bit word: signature bit k is
// the XOR of all data bits i with i mod S == k. S = 1 is plain parity. Because
// each group is an XOR, the signature of a sum predicts through an adder
// group by group: sig(x + y) = sig(x) ^ sig(y) ^ sig(carries), where carries
// are the carries into each bit. Purely combinational.
// Single-bit and multi-bit register signatures follow the published scheme;
// the interleaved grouping is this design's choice.
module sig_gen #(
  parameter int unsigned W = vit_pkg::METRIC_W,
  parameter int unsigned S = 1
) (
  input  logic [W-1:0] d,
  output logic [S-1:0] sig
);
  always_comb begin
    sig = '0;
    for (int i = 0; i < W; i++) sig[i % S] ^= d[i];
  end
endmodule
