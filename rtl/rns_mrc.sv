// rns_mrc: pipelined RNS-to-mixed-radix converter with sign detection (the
// "MRC part" of the scaler).
//
// For X given by its residues (x1, x2, x3, x4) in the base {m1, m2, m3, m4},
// it finds the mixed-radix digits of X = a1 + a2*m1 + a3*m1*m2 + a4*m1*m2*m3
// and the sign of X, read as a signed number in [-M/2, M/2), M = m1*m2*m3*m4.
// Only binary adders (BA) and 64-word look-up tables (ROM) are used:
//
//   stage 1  BA11..BA13  d_i = x_i - a1 (i = 2, 3, 4), 6-bit two's complement
//            ROM11       a2            = |d2 * |1/m1|_m2|_m2
//            ROM12       |-a2*m1|_m3     (a2 recomputed from d2 in the table)
//            ROM13       |d3|_m3
//            ROM14       |-a2*m1|_m4     (a2 recomputed from d2 in the table)
//            ROM15       |d4|_m4
//   stage 2  BA21        s3 = ROM13 + ROM12           (unreduced, <= 62)
//            ROM21       a3 = |s3 * |1/(m1*m2)|_m3|_m3
//            BA22        s4a = ROM15 + ROM14
//            ROM22       |-a3*m1*m2|_m4  (a3 recomputed from s3 in the table)
//            ROM23       |s4a|_m4
//   stage 3  BA31        s4 = ROM23 + ROM22
//            ROM31       a4 = |s4 * |1/(m1*m2*m3)|_m4|_m4, and the sign,
//                        a4 >= m4/2 (m4 must be even)
//
// The block structure and the numbering follow the source architecture.
// This design's own choices: each stage ends in a register, so the digits
// appear 3 clock cycles after the residues are presented, one new number per
// cycle; a1 and a2 are delayed so that all four digits and the sign leave
// together; a valid bit travels with the data and is the only registered
// state that is reset (asynchronous, active low).
module rns_mrc
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
  input  residue_vec_t x,          // x[0] = |X|_m1 ... x[3] = |X|_m4
  output logic         out_valid,
  output residue_vec_t a,          // a[0] = a1 ... a[3] = a4
  output logic         negative    // sign of X: 1 when X < 0
);

  localparam int INV_M1_M2     = mod_inv(M1 % M2, M2);
  localparam int INV_M1M2_M3   = mod_inv((M1 * M2) % M3, M3);
  localparam int INV_M1M2M3_M4 = mod_inv((M1 * M2 * M3) % M4, M4);
  localparam int NEG_M1_M3     = pmod(-longint'(M1), M3);
  localparam int NEG_M1_M4     = pmod(-longint'(M1), M4);
  localparam int NEG_M1M2_M4   = pmod(-longint'(M1 * M2), M4);

  // ---------------- stage 1 ----------------
  lut_addr_t d2, d3, d4;
  residue_t  rom11, rom12, rom13, rom14, rom15;

  rns_binary_adder #(.SUBTRACT(1'b1)) u_ba11 (.a(x[1]), .b(x[0]), .s(d2));
  rns_binary_adder #(.SUBTRACT(1'b1)) u_ba12 (.a(x[2]), .b(x[0]), .s(d3));
  rns_binary_adder #(.SUBTRACT(1'b1)) u_ba13 (.a(x[3]), .b(x[0]), .s(d4));

  rns_lut_rom #(.ADDR_SIGNED(1'b1), .MUL1(INV_M1_M2), .MOD1(M2), .MUL2(1), .MOD2(M2))
    u_rom11 (.addr(d2), .data(rom11));
  rns_lut_rom #(.ADDR_SIGNED(1'b1), .MUL1(INV_M1_M2), .MOD1(M2), .MUL2(NEG_M1_M3), .MOD2(M3))
    u_rom12 (.addr(d2), .data(rom12));
  rns_lut_rom #(.ADDR_SIGNED(1'b1), .MUL1(1), .MOD1(0), .MUL2(1), .MOD2(M3))
    u_rom13 (.addr(d3), .data(rom13));
  rns_lut_rom #(.ADDR_SIGNED(1'b1), .MUL1(INV_M1_M2), .MOD1(M2), .MUL2(NEG_M1_M4), .MOD2(M4))
    u_rom14 (.addr(d2), .data(rom14));
  rns_lut_rom #(.ADDR_SIGNED(1'b1), .MUL1(1), .MOD1(0), .MUL2(1), .MOD2(M4))
    u_rom15 (.addr(d4), .data(rom15));

  logic     v1;
  residue_t a1_s1, a2_s1, r12_s1, r13_s1, r14_s1, r15_s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    a1_s1  <= x[0];
    a2_s1  <= rom11;
    r12_s1 <= rom12;
    r13_s1 <= rom13;
    r14_s1 <= rom14;
    r15_s1 <= rom15;
  end

  // ---------------- stage 2 ----------------
  lut_addr_t s3, s4a;
  residue_t  rom21, rom22, rom23;

  rns_binary_adder #(.SUBTRACT(1'b0)) u_ba21 (.a(r13_s1), .b(r12_s1), .s(s3));
  rns_binary_adder #(.SUBTRACT(1'b0)) u_ba22 (.a(r15_s1), .b(r14_s1), .s(s4a));

  rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL1(1), .MOD1(0), .MUL2(INV_M1M2_M3), .MOD2(M3))
    u_rom21 (.addr(s3), .data(rom21));
  rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL1(INV_M1M2_M3), .MOD1(M3), .MUL2(NEG_M1M2_M4), .MOD2(M4))
    u_rom22 (.addr(s3), .data(rom22));
  rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL1(1), .MOD1(0), .MUL2(1), .MOD2(M4))
    u_rom23 (.addr(s4a), .data(rom23));

  logic     v2;
  residue_t a1_s2, a2_s2, a3_s2, r22_s2, r23_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  always_ff @(posedge clk) begin
    a1_s2  <= a1_s1;
    a2_s2  <= a2_s1;
    a3_s2  <= rom21;
    r22_s2 <= rom22;
    r23_s2 <= rom23;
  end

  // ---------------- stage 3 ----------------
  lut_addr_t s4;
  logic [RES_W:0] rom31;     // {sign, a4}

  rns_binary_adder #(.SUBTRACT(1'b0)) u_ba31 (.a(r23_s2), .b(r22_s2), .s(s4));

  rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL1(1), .MOD1(0), .MUL2(INV_M1M2M3_M4), .MOD2(M4),
                .SIGN_BIT(1'b1), .DATA_W(RES_W + 1))
    u_rom31 (.addr(s4), .data(rom31));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v2;
  end

  always_ff @(posedge clk) begin
    a[0]     <= a1_s2;
    a[1]     <= a2_s2;
    a[2]     <= a3_s2;
    a[3]     <= rom31[RES_W-1:0];
    negative <= rom31[RES_W];
  end

endmodule
