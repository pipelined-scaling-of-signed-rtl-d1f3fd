// tb_rns_mrc: self-checking test of the pipelined RNS-to-mixed-radix
// converter in the default base {27, 29, 31, 32}.
//
// Random N in [0, M) (and the corner values 0, M/2-1, M/2, M-1) enter as
// residues, one per cycle with occasional idle cycles. The expected digits
// come from repeated integer division of N (a1 = N mod 27, a2 = (N/27) mod 29,
// ...), the expected sign from N >= M/2. Each result must appear exactly 3
// cycles after its input, and out_valid must be low otherwise.
module tb_rns_mrc;
  import rns_scaler_pkg::*;

  localparam int M        = 27 * 29 * 31 * 32;
  localparam int LATENCY  = 3;
  localparam int NUM_IN   = 20000;

  typedef struct {
    int n;
    int due;
  } item_t;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  residue_vec_t x = '0;
  logic         out_valid;
  residue_vec_t a;
  logic         negative;

  item_t queue_q [$];

  rns_mrc dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .a(a), .negative(negative)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (NUM_IN * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp, int n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s N=%0d: got %0d expected %0d", what, n, got, exp);
    end
  endtask

  // Output monitor: compares on every cycle after reset.
  always @(posedge clk) begin
    if (rst_n) begin
      if (queue_q.size() > 0 && queue_q[0].due == cycle) begin
        item_t it;
        it = queue_q.pop_front();
        check("valid", int'(out_valid), 1, it.n);
        check("a1", int'(a[0]), it.n % 27, it.n);
        check("a2", int'(a[1]), (it.n / 27) % 29, it.n);
        check("a3", int'(a[2]), (it.n / (27 * 29)) % 31, it.n);
        check("a4", int'(a[3]), it.n / (27 * 29 * 31), it.n);
        check("sign", int'(negative), (it.n >= M / 2) ? 1 : 0, it.n);
      end else begin
        check("idle", int'(out_valid), 0, -1);
      end
    end
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < NUM_IN; k++) begin
      @(negedge clk);
      if ($urandom_range(9) == 0) begin
        in_valid = 1'b0;
        x = residue_vec_t'($urandom);
      end else begin
        case (k)
          1: n = 0;
          2: n = M / 2 - 1;
          3: n = M / 2;
          4: n = M - 1;
          default: n = int'($urandom_range(M - 1));
        endcase
        in_valid = 1'b1;
        x[0] = residue_t'(n % 27);
        x[1] = residue_t'(n % 29);
        x[2] = residue_t'(n % 31);
        x[3] = residue_t'(n % 32);
        // the monitor, which samples before each edge updates, sees it LATENCY edges on
        queue_q.push_back('{n: n, due: cycle + LATENCY});
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    check("drained", queue_q.size(), 0, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
