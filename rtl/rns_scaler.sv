// rns_scaler: pipelined scaler of signed residue numbers by a product of
// moduli, through mixed-radix conversion.
//
// A signed integer X in [-M/2, M/2), M = m1*m2*m3*m4, arrives as its four
// residues |X|_mi (negative X as the residues of X + M). Five clock cycles
// later the residues of Y = floor(X / K), K = m1*m2, leave on y, together
// with the sign of X. A new number may enter every cycle. With the default
// base {27, 29, 31, 32}, K = 783, M = 776736 and Y lies in [-496, 495].
//
//   rns_mrc           stages 1-3: digits a1..a4 of X in the mixed-radix
//                     system and the sign (a4 >= m4/2)
//   rns_scaling_part  stages 4-5: residues of Ny = a4*m3 + a3 and, for a
//                     negative X, of Ny - m3*m4
//
// The mixed-radix digits and the sign are also brought out, 3 cycles after
// the input, as the converter produces them. Interface: in_valid qualifies
// x; out_valid qualifies y and y_negative; mrs_valid qualifies mrs_digits
// and mrs_negative. rst_n (asynchronous, active low) clears only the valid
// bits. The architecture follows the published scaler; the valid bits, the
// register placement and the parameterisation of the base are this design's
// own. The base must be pairwise coprime, every modulus at most 32, and m4
// even; the structure is fixed to four moduli and K = m1*m2.
module rns_scaler
  import rns_scaler_pkg::*;
#(
  parameter int M1 = M1_DEFAULT,
  parameter int M2 = M2_DEFAULT,
  parameter int M3 = M3_DEFAULT,
  parameter int M4 = M4_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  residue_vec_t x,             // x[0] = |X|_m1 ... x[3] = |X|_m4
  output logic         out_valid,
  output residue_vec_t y,             // y[0] = |Y|_m1 ... y[3] = |Y|_m4
  output logic         y_negative,    // X < 0, aligned with y
  output logic         mrs_valid,
  output residue_vec_t mrs_digits,    // a1 .. a4, 3 cycles after x
  output logic         mrs_negative   // X < 0, aligned with mrs_digits
);

  if (M4 % 2 != 0) begin : g_bad_m4
    $error("rns_scaler: m4 must be even for sign detection from a4");
  end
  if (M1 < 2 || M2 < 2 || M3 < 2 || M4 < 2 ||
      M1 > 32 || M2 > 32 || M3 > 32 || M4 > 32) begin : g_bad_range
    $error("rns_scaler: every modulus must lie in [2, 32]");
  end
  if (gcd(M1, M2) != 1 || gcd(M1, M3) != 1 || gcd(M1, M4) != 1 ||
      gcd(M2, M3) != 1 || gcd(M2, M4) != 1 || gcd(M3, M4) != 1) begin : g_bad_base
    $error("rns_scaler: the moduli must be pairwise coprime");
  end

  rns_mrc #(.M1(M1), .M2(M2), .M3(M3), .M4(M4)) u_mrc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .out_valid(mrs_valid),
    .a        (mrs_digits),
    .negative (mrs_negative)
  );

  rns_scaling_part #(.M1(M1), .M2(M2), .M3(M3), .M4(M4)) u_scale (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mrs_valid),
    .a3        (mrs_digits[2]),
    .a4        (mrs_digits[3]),
    .negative  (mrs_negative),
    .out_valid (out_valid),
    .y         (y),
    .y_negative(y_negative)
  );

endmodule
