// tb_rns_scaling_part: self-checking test of the scaling part in the
// default base {27, 29, 31, 32}.
//
// Every combination of a3 < 31, a4 < 32 and sign is presented, one per
// cycle. The expected result is Ny = a4*31 + a3, less M/K = 992 when the
// sign is set, reduced into each modulus with plain integer arithmetic. Each
// result must appear exactly 2 cycles after its input.
module tb_rns_scaling_part;
  import rns_scaler_pkg::*;

  localparam int MODS [4] = '{27, 29, 31, 32};
  localparam int LATENCY  = 2;

  typedef struct {
    int a3;
    int a4;
    int neg;
    int due;
  } item_t;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  residue_t     a3 = '0, a4 = '0;
  logic         negative = 1'b0;
  logic         out_valid;
  residue_vec_t y;
  logic         y_negative;

  item_t queue_q [$];

  rns_scaling_part dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a3(a3), .a4(a4),
    .negative(negative), .out_valid(out_valid), .y(y), .y_negative(y_negative)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (queue_q.size() > 0 && queue_q[0].due == cycle) begin
        item_t it;
        int    yv;
        it = queue_q.pop_front();
        yv = it.a4 * 31 + it.a3 - (it.neg != 0 ? 992 : 0);
        check("valid", int'(out_valid), 1);
        check("sign", int'(y_negative), it.neg);
        for (int i = 0; i < 4; i++)
          check($sformatf("y%0d a3=%0d a4=%0d neg=%0d", i + 1, it.a3, it.a4, it.neg),
                int'(y[i]), ((yv % MODS[i]) + MODS[i]) % MODS[i]);
      end else begin
        check("idle", int'(out_valid), 0);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 31; j++) begin
          @(negedge clk);
          in_valid = 1'b1;
          a4 = residue_t'(i);
          a3 = residue_t'(j);
          negative = s[0];
          queue_q.push_back('{a3: j, a4: i, neg: s, due: cycle + LATENCY});
        end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    check("drained", queue_q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
