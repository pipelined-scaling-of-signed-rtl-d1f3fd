// rns_sign_mux: sign-controlled output multiplexer (MUX) of one channel.
//
// Picks, for one residue channel, the result computed for a nonnegative
// number (pos) or the one corrected for a negative number (neg), under the
// sign detected from the top mixed-radix digit: neg when negative = 1, pos
// otherwise. Follows the source architecture. Purely combinational.
module rns_sign_mux
  import rns_scaler_pkg::*;
(
  input  residue_t pos,
  input  residue_t neg,
  input  logic     negative,
  output residue_t y
);

  always_comb y = negative ? neg : pos;

endmodule
