// rns_toma: two-operand modulo adder (TOMA) of one residue channel.
//
// Adds two residues a, b < MOD and returns |a + b|_MOD: the 6-bit binary sum
// is compared with MOD and MOD is subtracted when the sum reaches it. In the
// scaler it adds the residues of the two scaled mixed-radix terms, a4*m3 and
// a3, in channel mi. The compare-and-subtract structure is this design's
// choice; the source architecture names the block and its function only.
//
// Purely combinational.
module rns_toma
  import rns_scaler_pkg::*;
#(
  parameter int MOD = 32
) (
  input  residue_t a,
  input  residue_t b,
  output residue_t s
);

  lut_addr_t sum;

  always_comb begin
    sum = lut_addr_t'({1'b0, a}) + lut_addr_t'({1'b0, b});
    if (sum >= lut_addr_t'(MOD)) s = residue_t'(sum - lut_addr_t'(MOD));
    else                         s = residue_t'(sum);
  end

endmodule
