// tb_nist_overlap: sequences of 200 blocks of 1023 bits (the block length
// fixes the class probabilities; the number of blocks only scales them)
// with different densities of ones. Overlapping all-ones 9-bit matches per
// block are counted in the testbench, classed 0..5 and tested against
// chi-square(5) 95% = 11.0705 with pi_i from NIST's formula for M = 1023.
module tb_nist_overlap;
  localparam int NB = 200, M = 1023, TM = 9;
  logic clk = 0, rst_n = 0, clear = 0, bit_valid = 0, bit_in = 0;
  logic rv, rp;
  int checks = 0, failures = 0, npass = 0, nfail = 0;
  real pi [6];

  nist_overlap #(.N_BLK(NB), .M_LEN(M)) dut (.clk, .rst_n, .clear, .bit_valid, .bit_in,
    .res_valid(rv), .res_pass(rp));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // NIST SP800-22 class probabilities
  function automatic real lgam(input int n);  // ln((n-1)!) for n >= 1
    real s; s = 0.0;
    for (int i = 2; i < n; i++) s += $ln(1.0 * i);
    return s;
  endfunction
  function automatic real pr(input int u, input real eta);
    real s;
    if (u == 0) return $exp(-eta);
    s = 0.0;
    for (int l = 1; l <= u; l++)
      s += $exp(-eta - u * $ln(2.0) + l * $ln(eta) - lgam(l + 1) + lgam(u) - lgam(l) - lgam(u - l + 1));
    return s;
  endfunction

  task automatic run_seq(input int pm);
    int v [6]; real chi; bit e; int cycles;
    v = '{0, 0, 0, 0, 0, 0};
    for (int b = 0; b < NB; b++) begin
      int run, cnt;
      run = 0; cnt = 0;
      for (int j = 0; j < M; j++) begin
        bit x;
        x = ($urandom_range(999) < pm);
        run = x ? run + 1 : 0;
        if (run >= TM) cnt++;
        bit_valid <= 1; bit_in <= x;
        @(posedge clk);
      end
      v[(cnt > 5) ? 5 : cnt]++;
    end
    bit_valid <= 0;
    chi = 0.0;
    for (int i = 0; i < 6; i++) chi += (v[i] - NB * pi[i]) ** 2 / (NB * pi[i]);
    e = chi < 11.070497693516351;
    cycles = 0;
    while (!rv && cycles < 100) begin @(posedge clk); #1; cycles++; end
    chk(rv == 1, "result produced");
    chk(cycles == 6, $sformatf("latency %0d cycles", cycles));
    chk(rp == e, $sformatf("decision pm=%0d chi2=%f", pm, chi));
    if (e) npass++; else nfail++;
    @(posedge clk);
  endtask

  initial begin
    real eta, sum;
    eta = (M - TM + 1) / 1024.0;
    sum = 0.0;
    for (int i = 0; i < 5; i++) begin pi[i] = pr(i, eta); sum += pi[i]; end
    pi[5] = 1.0 - sum;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_seq(500); run_seq(540); run_seq(500); run_seq(470); run_seq(505);
    chk(npass > 0 && nfail > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
