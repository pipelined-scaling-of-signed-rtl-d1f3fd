// rns_scaler_pkg: types, default base and constant arithmetic shared by the
// signed residue scaler.
//
// The scaler works on a four-moduli residue number system (RNS) whose moduli
// are at most 5 bits wide. Every look-up table has a 6-bit address, the input
// width of one FPGA LUT6, and every residue is carried in 5 bits. The default
// base {27, 29, 31, 32} and the scaling factor K = m1*m2 = 783 are those of
// the published architecture. The helper functions are used only at
// elaboration time to fill look-up tables and to compute reference constants.
package rns_scaler_pkg;

  localparam int RES_W      = 5;  // width of one residue
  localparam int ADDR_W     = 6;  // look-up table address width (LUT6)
  localparam int NUM_MODULI = 4;

  // Default base B = {m1, m2, m3, m4}; the scaling factor is K = m1*m2.
  localparam int M1_DEFAULT = 27;
  localparam int M2_DEFAULT = 29;
  localparam int M3_DEFAULT = 31;
  localparam int M4_DEFAULT = 32;

  typedef logic [RES_W-1:0]  residue_t;
  typedef logic [ADDR_W-1:0] lut_addr_t;
  // Residue digit vector; element 0 belongs to m1, element 3 to m4.
  typedef residue_t [NUM_MODULI-1:0] residue_vec_t;

  // Least nonnegative residue of a (any sign) modulo m (m > 0).
  function automatic int pmod(input longint a, input int m);
    longint r;
    r = a % longint'(m);
    if (r < 0) r += longint'(m);
    return int'(r);
  endfunction

  // Multiplicative inverse of a modulo m, found by search (m <= 64 here).
  // Returns 0 when no inverse exists.
  function automatic int mod_inv(input int a, input int m);
    int inv;
    inv = 0;
    for (int k = 1; k < m; k++)
      if (inv == 0 && pmod(longint'(a) * k, m) == 1) inv = k;
    return inv;
  endfunction

  // Greatest common divisor, used by the elaboration checks on the base.
  function automatic int gcd(input int a, input int b);
    int x, y, t;
    x = a;
    y = b;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

endpackage
