// tb_puf_calibration: the testbench plays the challenge source and the PUF.
// Each modelled unit answers 1 with a probability that rises with the
// sweep level around its own centre; the testbench counts the ones it
// returned per unit and level itself and checks that the calibration
// picks, per unit, the first level whose count is nearest half of CAL_N,
// that it makes exactly 2R*CAL_N requests and signals done once.
// The closest-to-half rule follows the original calibration; CAL_N and the
// tie rule (first level wins) are this design's own.
module tb_puf_calibration;
  localparam int Q = 4, R = 16, N = 256;
  localparam int TW = $clog2(2 * R);
  logic clk = 0, rst_n = 0, start = 0, cvalid = 0, ctake, preq, pdone = 0;
  logic [Q-1:0] uresp;
  logic [TW-1:0] sweep, opt [Q];
  logic busy, done;
  int checks = 0, failures = 0;
  int centre [Q] = '{3, 16, 21, 29};
  int ones [2*R][Q];
  int reqs = 0, dones = 0;

  puf_calibration #(.Q(Q), .R(R), .CAL_N(N)) dut (.clk, .rst_n, .start, .chal_valid(cvalid),
    .chal_take(ctake), .puf_req(preq), .puf_done(pdone), .unit_resp(uresp),
    .sweep_level(sweep), .busy, .done, .tune_opt(opt));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // challenge source: valid most of the time
  always @(posedge clk) cvalid <= ($urandom_range(3) != 0);

  // PUF model: answers 1..3 cycles after a request
  always @(posedge clk) begin
    pdone <= 0;
    if (preq) begin
      int s, wait_c;
      reqs++;
      s = int'(sweep);
      wait_c = $urandom_range(2);
      for (int u = 0; u < Q; u++) begin
        int p;
        p = 500 + 60 * (s - centre[u]);
        if (p < 0) p = 0;
        if (p > 1000) p = 1000;
        uresp[u] = ($urandom_range(999) < p);
        ones[s][u] += uresp[u];
      end
      repeat (wait_c) @(posedge clk);
      pdone <= 1;
    end
    if (done) dones++;
  end

  initial begin
    int ncyc;
    for (int s = 0; s < 2 * R; s++) for (int u = 0; u < Q; u++) ones[s][u] = 0;
    uresp = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int u = 0; u < Q; u++) chk(int'(opt[u]) == R, "balanced level after reset");
    start <= 1; @(posedge clk); start <= 0;
    ncyc = 0;
    while (!done) begin @(posedge clk); ncyc++; end
    @(posedge clk); #1;
    for (int u = 0; u < Q; u++) begin
      int best, bl, dd;
      best = 1 << 30; bl = 0;
      for (int s = 0; s < 2 * R; s++) begin
        dd = 2 * ones[s][u] - N; if (dd < 0) dd = -dd;
        if (dd < best) begin best = dd; bl = s; end
      end
      chk(int'(opt[u]) == bl, $sformatf("unit %0d: level %0d, expected %0d", u, opt[u], bl));
      chk(bl >= centre[u] - 2 && bl <= centre[u] + 2 || centre[u] < 2 || centre[u] > 2*R-3,
          "chosen level near the unit's centre");
    end
    chk(reqs == 2 * R * N, $sformatf("request count %0d", reqs));
    chk(dones == 1 && !busy, "done once, then idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
