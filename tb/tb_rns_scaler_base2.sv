// tb_rns_scaler_base2: the end-to-end test of tb_rns_scaler repeated for
// another base, {25, 23, 29, 32} (K = 575, M = 533600), to check that the
// look-up tables and constants follow the moduli parameters. Every signed
// X in [-M/2, M/2) is scaled and compared with floor(X / K); the mixed-radix
// digits, the sign, the latencies (5 and 3 cycles) and the mechanism
// counters are checked as in tb_rns_scaler. As for any base, the m3 adder
// never wraps (a4*m3 = 0 mod m3) and the m3 and m4 channels need no
// negative-number correction (M/K = m3*m4).
module tb_rns_scaler_base2;
  import rns_scaler_pkg::*;

  localparam int MODS [4]     = '{25, 23, 29, 32};
  localparam int M            = MODS[0] * MODS[1] * MODS[2] * MODS[3];
  localparam int K            = MODS[0] * MODS[1];
  localparam int M_OVER_K     = MODS[2] * MODS[3];
  localparam int LATENCY      = 5;
  localparam int MRS_LATENCY  = 3;
  localparam int BLOCK        = 4096;     // inputs per shuffled block

  typedef struct {
    int x;
    int due;
  } item_t;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_positive = 0, n_negative = 0, n_idle = 0, n_back_to_back = 0;
  int n_wrap [4] = '{0, 0, 0, 0};
  int n_corr [4] = '{0, 0, 0, 0};

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  residue_vec_t x = '0;
  logic         out_valid, y_negative, mrs_valid, mrs_negative;
  residue_vec_t y, mrs_digits;

  item_t y_q [$];
  item_t a_q [$];

  rns_scaler #(.M1(MODS[0]), .M2(MODS[1]), .M3(MODS[2]), .M4(MODS[3])) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y(y), .y_negative(y_negative),
    .mrs_valid(mrs_valid), .mrs_digits(mrs_digits), .mrs_negative(mrs_negative)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (M + M / 4 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int posmod(int v, int m);
    return ((v % m) + m) % m;
  endfunction

  function automatic int floor_div(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q--;
    return q;
  endfunction

  task automatic check(string what, int got, int exp, int xv);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s X=%0d: got %0d expected %0d", what, xv, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      // scaled output
      if (y_q.size() > 0 && y_q[0].due == cycle) begin
        item_t it;
        int    yv;
        it = y_q.pop_front();
        yv = floor_div(it.x, K);
        check("out_valid", int'(out_valid), 1, it.x);
        check("y_negative", int'(y_negative), (it.x < 0) ? 1 : 0, it.x);
        for (int i = 0; i < 4; i++) check($sformatf("y%0d", i + 1), int'(y[i]), posmod(yv, MODS[i]), it.x);
      end else begin
        check("out_valid idle", int'(out_valid), 0, 0);
      end
      // mixed-radix digits
      if (a_q.size() > 0 && a_q[0].due == cycle) begin
        item_t it;
        int    n;
        it = a_q.pop_front();
        n = posmod(it.x, M);
        check("mrs_valid", int'(mrs_valid), 1, it.x);
        check("mrs_negative", int'(mrs_negative), (it.x < 0) ? 1 : 0, it.x);
        check("a1", int'(mrs_digits[0]), n % MODS[0], it.x);
        check("a2", int'(mrs_digits[1]), (n / MODS[0]) % MODS[1], it.x);
        check("a3", int'(mrs_digits[2]), (n / K) % MODS[2], it.x);
        check("a4", int'(mrs_digits[3]), n / (K * MODS[2]), it.x);
      end else begin
        check("mrs_valid idle", int'(mrs_valid), 0, 0);
      end
    end
  end

  task automatic send(int xv, ref bit prev_valid);
    int n, ny;
    @(negedge clk);
    if ($urandom_range(15) == 0) begin
      in_valid = 1'b0;
      x = residue_vec_t'($urandom);
      n_idle++;
      prev_valid = 1'b0;
      @(negedge clk);
    end
    if (prev_valid) n_back_to_back++;
    prev_valid = 1'b1;
    n = posmod(xv, M);
    in_valid = 1'b1;
    for (int i = 0; i < 4; i++) x[i] = residue_t'(n % MODS[i]);
    y_q.push_back('{x: xv, due: cycle + LATENCY});
    a_q.push_back('{x: xv, due: cycle + MRS_LATENCY});
    // what the data path will meet on the way
    if (xv < 0) n_negative++; else n_positive++;
    ny = n / K;
    for (int i = 0; i < 4; i++) begin
      if (((ny / MODS[2]) * MODS[2]) % MODS[i] + (ny % MODS[2]) % MODS[i] >= MODS[i]) n_wrap[i]++;
      if (xv < 0 && M_OVER_K % MODS[i] != 0) n_corr[i]++;
    end
  endtask

  initial begin
    bit prev_valid;
    int nblocks;
    int order [$];
    prev_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // all of [-M/2, M/2) in blocks of BLOCK consecutive values, blocks shuffled
    nblocks = (M + BLOCK - 1) / BLOCK;
    for (int b = 0; b < nblocks; b++) order.push_back(b);
    order.shuffle();
    foreach (order[k]) begin
      for (int j = 0; j < BLOCK; j++) begin
        int v;
        v = order[k] * BLOCK + j;
        if (v < M) send(v - M / 2, prev_valid);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    check("drained", y_q.size() + a_q.size(), 0, 0);

    $display("inputs: positive=%0d negative=%0d back_to_back=%0d idle=%0d",
             n_positive, n_negative, n_back_to_back, n_idle);
    check("positive seen", int'(n_positive > 0), 1, 0);
    check("negative seen", int'(n_negative > 0), 1, 0);
    check("back-to-back seen", int'(n_back_to_back > 0), 1, 0);
    check("idle seen", int'(n_idle > 0), 1, 0);
    check("all inputs", n_positive + n_negative, M, 0);
    for (int i = 0; i < 4; i++) begin
      $display("channel m%0d=%0d: adder wraps=%0d corrections=%0d", i + 1, MODS[i], n_wrap[i], n_corr[i]);
      // no wrap is possible where m_i divides m3 (|a4*m3|_mi = 0)
      if (MODS[2] % MODS[i] != 0) check($sformatf("wrap m%0d", i + 1), int'(n_wrap[i] > 0), 1, 0);
      // the correction is the identity where m_i divides m3*m4
      if (M_OVER_K % MODS[i] != 0) check($sformatf("correction m%0d", i + 1), int'(n_corr[i] > 0), 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
