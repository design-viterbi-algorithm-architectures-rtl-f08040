// vit_pkg: constants and types shared by the fault-tolerant
// compare-select-add (CSA) datapath of the Viterbi decoder.
//
// METRIC_W is the width of path and branch metrics. The 16-bit width matches
// the 16-bit buses of the top-level block (VITERBI_ARCHITECTURE). Every
// register in the datapath carries one even-parity signature bit next to its
// word (the XOR of the word). enc_e selects how the time-redundant units
// encode their operands for the second (checking) pass.
package vit_pkg;

  localparam int unsigned METRIC_W = 16;

  // Recompute with shifted operands / recompute with rotated operands.
  typedef enum logic {ENC_RESO = 1'b0, ENC_RERO = 1'b1} enc_e;

endpackage
