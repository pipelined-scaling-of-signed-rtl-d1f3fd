// tb_rns_lut_rom: self-checking test of the look-up table generator, read at
// all 64 addresses in four configurations of the kinds the scaler uses:
//   - signed address, inner modulo step: the digit a2 from |X|_29 - |X|_27,
//     checked by searching for the k < 29 with k*27 = d (mod 29);
//   - the same digit folded into |-a2*27|_31;
//   - unsigned address with a sign bit: a4 = |s*17|_32 and a4 >= 16;
//   - additive constant: |t - 992|_27.
// Every expected value is formed by a search or plain arithmetic in the
// testbench, not by the table formula.
module tb_rns_lut_rom;
  import rns_scaler_pkg::*;

  int checks = 0;
  int failures = 0;

  lut_addr_t      addr;
  residue_t       d_a2, d_fold, d_corr;
  logic [RES_W:0] d_sign;

  // a2 = |d * |1/27|_29|_29, |1/27|_29 = 14
  rns_lut_rom #(.ADDR_SIGNED(1'b1), .MUL1(14), .MOD1(29), .MUL2(1), .MOD2(29))
    dut_a2 (.addr(addr), .data(d_a2));
  // |-a2*27|_31 = |a2*4|_31
  rns_lut_rom #(.ADDR_SIGNED(1'b1), .MUL1(14), .MOD1(29), .MUL2(4), .MOD2(31))
    dut_fold (.addr(addr), .data(d_fold));
  rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL2(17), .MOD2(32), .SIGN_BIT(1'b1), .DATA_W(RES_W + 1))
    dut_sign (.addr(addr), .data(d_sign));
  // |t - 992|_27: ADD2 = |-992|_27 = 7
  rns_lut_rom #(.ADDR_SIGNED(1'b0), .MUL2(1), .ADD2(7), .MOD2(27))
    dut_corr (.addr(addr), .data(d_corr));

  function automatic int posmod(int v, int m);
    return ((v % m) + m) % m;
  endfunction

  task automatic check(string what, int got, int exp, int ad);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s addr=%0d: got %0d expected %0d", what, ad, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, k2, r;
    for (int ad = 0; ad < 64; ad++) begin
      addr = lut_addr_t'(ad);
      #1;
      d = (ad >= 32) ? ad - 64 : ad;
      k2 = -1;
      for (int k = 0; k < 29; k++)
        if (posmod(k * 27 - d, 29) == 0) k2 = k;
      check("a2", int'(d_a2), k2, ad);
      check("fold", int'(d_fold), posmod(-k2 * 27, 31), ad);
      r = (ad * 17) % 32;
      check("a4", int'(d_sign[RES_W-1:0]), r, ad);
      check("sign", int'(d_sign[RES_W]), (r >= 16) ? 1 : 0, ad);
      check("corr", int'(d_corr), posmod(ad - 992, 27), ad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
