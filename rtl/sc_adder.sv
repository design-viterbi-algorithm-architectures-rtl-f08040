// sc_adder: self-checking N-bit ripple-carry adder.
//
// Every bit position holds two full adders fed with the same operand bits.
// The first gets the true ripple carry c[i] and produces the sum bit and the
// next carry. The second recomputes the sum with the complemented carry
// ~c[i]; for a fault-free slice its sum is the complement of the first, so
// (sum, recomputed sum) is a two-rail pair. The N pairs are merged by a chain
// of two-pair two-rail checkers; err rises when the final pair is not
// complementary. The sum leaving the adder is always the one made with the
// original carry. In addition each slice checks its two carry-outs: with
// carry-in 0 the carry-out cannot exceed the one made with carry-in 1, so the
// slice flags an error if carry-out(cin=0) & ~carry-out(cin=1).
// carries returns the internal carry into every bit, which lets the caller
// predict the parity of the sum: par(s) = par(a) ^ par(b) ^ ^carries.
// Purely combinational. The complemented-carry recomputation follows the
// published scheme; the chain-shaped checker tree and the carry check are choices of
// this design.
module sc_adder #(
  parameter int unsigned N = vit_pkg::METRIC_W
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout,
  output logic [N-1:0] carries,
  output logic         err
);
  logic [N:0]   c;       // true ripple carries
  logic [N-1:0] sr;      // sums recomputed with complemented carry
  logic [N-1:0] cr;      // carries recomputed with complemented carry
  logic [N-1:0] cbad;    // per-slice carry consistency failure
  logic [N-1:0] t0, t1;  // two-rail checker chain

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_slice
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    assign sr[i]  = a[i] ^ b[i] ^ ~c[i];
    assign cr[i]  = (a[i] & b[i]) | (~c[i] & (a[i] ^ b[i]));
    // carry made with cin=0 must not be above the one made with cin=1
    assign cbad[i] = c[i] ? (cr[i] & ~c[i+1]) : (c[i+1] & ~cr[i]);
  end

  assign t0[0] = s[0];
  assign t1[0] = sr[0];
  for (genvar i = 1; i < N; i++) begin : g_trc
    two_rail_checker u_trc (
      .x0(t0[i-1]), .x1(t1[i-1]), .y0(s[i]), .y1(sr[i]),
      .z0(t0[i]),   .z1(t1[i])
    );
  end

  assign cout    = c[N];
  assign carries = c[N-1:0];
  assign err     = ~(t0[N-1] ^ t1[N-1]) | (|cbad);
endmodule
