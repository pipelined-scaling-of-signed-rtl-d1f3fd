// rns_binary_adder: the small binary adder/subtractor of the scaler (the
// BA blocks of the converter).
//
// With SUBTRACT = 1 it forms the difference a - b of two 5-bit residues as a
// 6-bit two's complement number; this is how the first converter stage forms
// |X|_mi - a1, which lies in [-31, 31] and is passed on, unreduced, as the
// address of the next look-up table. With SUBTRACT = 0 it forms the unsigned
// 6-bit sum a + b (at most 62) of two look-up table outputs, again left
// unreduced for the look-up table that follows. The two's complement coding
// of the difference follows the source architecture; the use of one block
// for both jobs is this design's choice.
//
// Purely combinational: no clock, the result follows the inputs.
module rns_binary_adder
  import rns_scaler_pkg::*;
#(
  parameter bit SUBTRACT = 1'b0
) (
  input  residue_t  a,
  input  residue_t  b,
  output lut_addr_t s
);

  always_comb begin
    if (SUBTRACT) s = lut_addr_t'({1'b0, a}) - lut_addr_t'({1'b0, b});
    else          s = lut_addr_t'({1'b0, a}) + lut_addr_t'({1'b0, b});
  end

endmodule
