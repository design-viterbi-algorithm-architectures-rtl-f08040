// two_rail_checker: two-pair two-rail checker.
//
// Each input pair (x0,x1), (y0,y1) is a two-rail code: valid when its two
// rails are complementary. The outputs are
//   z0 = x0&y0 | x1&y1,  z1 = x0&y1 | x1&y0,
// which are complementary exactly when both inputs are, so checkers can be
// chained into a tree and a single output pair tells whether any input pair
// is invalid. Purely combinational. The checker equations are the standard
// ones; the published scheme names the checker but gives no gates.
module two_rail_checker (
  input  logic x0,
  input  logic x1,
  input  logic y0,
  input  logic y1,
  output logic z0,
  output logic z1
);
  assign z0 = (x0 & y0) | (x1 & y1);
  assign z1 = (x0 & y1) | (x1 & y0);
endmodule
