// tb_rns_sign_mux: exhaustive self-checking test of the sign-controlled
// output multiplexer: every pair of 5-bit inputs with both sign values.
module tb_rns_sign_mux;
  import rns_scaler_pkg::*;

  int checks = 0;
  int failures = 0;

  residue_t pos, neg, y;
  logic     negative;

  rns_sign_mux dut (.pos(pos), .neg(neg), .negative(negative), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 32; i++) begin
        for (int j = 0; j < 32; j++) begin
          pos = residue_t'(i);
          neg = residue_t'(j);
          negative = s[0];
          #1;
          checks++;
          if (int'(y) != (s != 0 ? j : i)) begin
            failures++;
            $display("FAIL sign=%0d pos=%0d neg=%0d: got %0d", s, i, j, y);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
