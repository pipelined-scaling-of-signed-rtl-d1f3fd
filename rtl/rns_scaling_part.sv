// rns_scaling_part: scales by K = m1*m2 from the two top mixed-radix digits
// and corrects the result of a negative number (the "scaling part").
//
// With X = a1 + a2*m1 + a3*m1*m2 + a4*m1*m2*m3 read as N in [0, M), the
// truncated quotient is Ny = floor(N/K) = a4*m3 + a3. For each channel mi
// (i = 1..4):
//
//   stage 4  ROM4(2i-1)  |a3|_mi          ROM4(2i)  |a4*m3|_mi
//            TOMA mod mi t_i = |a4*m3 + a3|_mi = |Ny|_mi
//   stage 5  ROM5i       |t_i - M/K|_mi  = mi - |M/K - Ny|_mi (reduced),
//                        the residue of Y = Ny - M/K, M/K = m3*m4
//            MUX         y_i = negative ? ROM5i : t_i
//
// so y is the residue form of Y = floor(X/K) for X in [-M/2, M/2).
//
// The blocks, their count and the choice by sign follow the source
// architecture. This design's own choices: which ROM of a pair takes a3 and
// which a4; a register at the end of each of the two stages (latency 2
// cycles, one result per cycle); the ROM5i content written as the residue of
// Ny - M/K, reduced into [0, mi); a valid bit, the only reset register.
module rns_scaling_part
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
  input  residue_t     a3,
  input  residue_t     a4,
  input  logic         negative,
  output logic         out_valid,
  output residue_vec_t y,          // y[0] = |Y|_m1 ... y[3] = |Y|_m4
  output logic         y_negative  // sign, aligned with y
);

  localparam int MOD [NUM_MODULI] = '{M1, M2, M3, M4};

  residue_vec_t t_s4;
  logic         v4, neg_s4;

  for (genvar i = 0; i < NUM_MODULI; i++) begin : g_ch
    residue_t p_a3, p_a4, t, corr, sel;

    // stage 4: scaled mixed-radix terms and their modulo sum
    rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL1(1), .MOD1(0), .MUL2(1), .MOD2(MOD[i]))
      u_rom_a3 (.addr({1'b0, a3}), .data(p_a3));
    rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL1(1), .MOD1(0), .MUL2(M3), .MOD2(MOD[i]))
      u_rom_a4 (.addr({1'b0, a4}), .data(p_a4));
    rns_toma #(.MOD(MOD[i])) u_toma (.a(p_a4), .b(p_a3), .s(t));

    always_ff @(posedge clk) t_s4[i] <= t;

    // stage 5: negative-number correction and selection by sign
    rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL1(1), .MOD1(0), .MUL2(1),
                  .ADD2(pmod(-(longint'(M3) * M4), MOD[i])), .MOD2(MOD[i]))
      u_rom5 (.addr({1'b0, t_s4[i]}), .data(corr));
    rns_sign_mux u_mux (.pos(t_s4[i]), .neg(corr), .negative(neg_s4), .y(sel));

    always_ff @(posedge clk) y[i] <= sel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v4        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v4        <= in_valid;
      out_valid <= v4;
    end
  end

  always_ff @(posedge clk) begin
    neg_s4     <= negative;
    y_negative <= neg_s4;
  end

endmodule
