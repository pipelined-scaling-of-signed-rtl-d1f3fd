// tb_rns_toma: exhaustive self-checking test of the two-operand modulo
// adder for each modulus of the default base {27, 29, 31, 32}: every pair of
// residues a, b < m is added and compared with (a + b) mod m.
module tb_rns_toma;
  import rns_scaler_pkg::*;

  localparam int MODS [4] = '{27, 29, 31, 32};

  int checks = 0;
  int failures = 0;

  residue_t a, b;
  residue_t s [4];

  for (genvar i = 0; i < 4; i++) begin : g_dut
    rns_toma #(.MOD(MODS[i])) dut (.a(a), .b(b), .s(s[i]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        a = residue_t'(i);
        b = residue_t'(j);
        #1;
        for (int k = 0; k < 4; k++) begin
          if (i < MODS[k] && j < MODS[k]) begin
            checks++;
            if (int'(s[k]) != (i + j) % MODS[k]) begin
              failures++;
              $display("FAIL mod %0d: %0d+%0d gave %0d", MODS[k], i, j, s[k]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
