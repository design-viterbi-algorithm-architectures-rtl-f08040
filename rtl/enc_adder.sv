// enc_adder: adder slice array for recomputation with encoded operands.
//
// An E-slice ripple adder whose operands arrive already encoded. The caller
// runs each addition twice: pass = 0 with the plain operands, pass = 1 with
// operands that are shifted (RESO) or rotated (RERO) by K slices. A faulty
// slice then corrupts a different bit of the true result in each pass, and
// the decoded results disagree.
//  * ENC_RESO: E = W + K, operands x << K in pass 1. The K low slices hold
//    zeros, so a plain ripple chain is enough.
//  * ENC_RERO: E = W + 1, operands {1'b0, x} rotated left by K in pass 1.
//    The carry out of the top slice wraps round to slice 0 (end-around
//    carry). In every pass exactly one slice holds the guard zero in both
//    operands and so cannot produce a carry: the ring never carries round,
//    and the topmost result bit of pass 0 (slot W) is the carry-out.
// cin is added at the slice that holds operand bit 0: slice 0 in pass 0,
// slice K in pass 1. Subtraction is done by the caller with the data bits of
// the second operand complemented (guard bits left at zero) and cin = 1.
// flip is an instrumentation input: each set bit inverts that slice's sum,
// modelling a faulty slice that stays faulty in both passes.
// Purely combinational.
// Circuit note: in the RERO build the end-around carry makes the carry ring a
// combinational loop in the netlist. It is never active (the guard slice
// always kills the carry), which is the standard RERO construction; tools
// may still report the loop.
// RESO/RERO come from the published scheme; slice-level structure, K and the guard
// bit handling are this design's choices.
module enc_adder
  import vit_pkg::*;
#(
  parameter enc_e        ENC = ENC_RESO,
  parameter int unsigned W   = METRIC_W,
  parameter int unsigned K   = 1,
  localparam int unsigned E  = (ENC == ENC_RESO) ? W + K : W + 1
) (
  input  logic [E-1:0] a,
  input  logic [E-1:0] b,
  input  logic         cin,
  input  logic         pass,
  input  logic [E-1:0] flip,
  output logic [E-1:0] s
);
  logic [E-1:0] ci, co;

  for (genvar i = 0; i < E; i++) begin : g_slice
    if (i == 0) begin : g_lo
      if (ENC == ENC_RERO) begin : g_ring
        assign ci[i] = co[E-1] | (cin & ~pass);
      end else begin : g_lin
        assign ci[i] = cin & ~pass;
      end
    end else if (i == K) begin : g_k
      assign ci[i] = co[i-1] | (cin & pass);
    end else begin : g_mid
      assign ci[i] = co[i-1];
    end
    assign s[i]  = a[i] ^ b[i] ^ ci[i] ^ flip[i];
    assign co[i] = (a[i] & b[i]) | (ci[i] & (a[i] ^ b[i]));
  end
endmodule
