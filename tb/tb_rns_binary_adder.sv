// tb_rns_binary_adder: exhaustive self-checking test of the small binary
// adder/subtractor. Both the subtracting form (6-bit two's complement
// difference) and the adding form (unsigned 6-bit sum) see every pair of
// 5-bit operands; the expected value is formed with plain integer arithmetic.
module tb_rns_binary_adder;
  import rns_scaler_pkg::*;

  int checks = 0;
  int failures = 0;

  residue_t  a, b;
  lut_addr_t diff, sum;

  rns_binary_adder #(.SUBTRACT(1'b1)) dut_sub (.a(a), .b(b), .s(diff));
  rns_binary_adder #(.SUBTRACT(1'b0)) dut_add (.a(a), .b(b), .s(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_diff, exp_sum;
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        a = residue_t'(i);
        b = residue_t'(j);
        #1;
        exp_diff = i - j;                    // in [-31, 31]
        exp_sum  = i + j;                    // in [0, 62]
        checks += 2;
        if ($signed(diff) != exp_diff) begin
          failures++;
          $display("FAIL sub %0d-%0d: got %0d", i, j, $signed(diff));
        end
        if (int'(sum) != exp_sum) begin
          failures++;
          $display("FAIL add %0d+%0d: got %0d", i, j, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
