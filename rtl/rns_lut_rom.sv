// rns_lut_rom: one 64-word look-up table (a ROM block of the scaler).
//
// Every ROM of the scaler maps a 6-bit address to a residue through
// multiplication by constants and modulo reduction. This module covers all
// of them with one formula, evaluated for every address at elaboration time:
//
//   v    = address, read as two's complement when ADDR_SIGNED, else unsigned
//   u    = |v * MUL1|_MOD1            (skipped, u = v * MUL1, when MOD1 = 0)
//   data = |u * MUL2 + ADD2|_MOD2
//
// The inner reduction lets one table fold two steps, for example "find the
// mixed-radix digit a2 from |X|_m2 - a1, then form |-a2*m1|_m3". When
// SIGN_BIT is set the word gains one more bit, DATA_W-1, that is 1 when the
// result is at least MOD2/2: with MOD2 = m4 and the result the top
// mixed-radix digit, that bit is the sign of the number.
//
// Tables of 2^6 words map onto LUT6 primitives, one per output bit, as in
// the source architecture; the generic formula is this design's own way of
// describing all its ROMs. Combinational: data follows addr.
module rns_lut_rom
  import rns_scaler_pkg::*;
#(
  parameter bit ADDR_SIGNED = 1'b0,
  parameter int MUL1        = 1,
  parameter int MOD1        = 0,
  parameter int MUL2        = 1,
  parameter int ADD2        = 0,
  parameter int MOD2        = 32,
  parameter bit SIGN_BIT    = 1'b0,
  parameter int DATA_W      = RES_W
) (
  input  lut_addr_t         addr,
  output logic [DATA_W-1:0] data
);

  localparam int WORDS = 1 << ADDR_W;

  typedef logic [DATA_W-1:0]            word_t;
  typedef logic [WORDS-1:0][DATA_W-1:0] table_t;

  function automatic word_t entry(input int word_addr);
    int    v, u, r;
    word_t w;
    v = (ADDR_SIGNED && word_addr >= WORDS / 2) ? word_addr - WORDS : word_addr;
    u = (MOD1 != 0) ? pmod(longint'(v) * MUL1, MOD1) : v * MUL1;
    r = pmod(longint'(u) * MUL2 + longint'(ADD2), MOD2);
    w = word_t'(r);
    if (SIGN_BIT) w[DATA_W-1] = (r >= MOD2 / 2);
    return w;
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < WORDS; a++) t[a] = entry(a);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  if (DATA_W != RES_W + int'(SIGN_BIT)) begin : g_bad_width
    $error("rns_lut_rom: DATA_W must be RES_W, plus one when SIGN_BIT is set");
  end

  always_comb data = TABLE[addr];

endmodule
