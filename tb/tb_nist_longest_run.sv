// tb_nist_longest_run: 16 x 8-bit sequences with different densities of
// ones; the longest run per block is classified and the chi-square
// statistic computed in floating point against chi-square(3) 95% = 7.8147.
// Sequences follow each other back to back; each result must arrive two
// cycles after the last bit.
module tb_nist_longest_run;
  localparam int NB = 16, M = 8;
  localparam real PI [4] = '{0.2148, 0.3672, 0.2305, 0.1875};
  logic clk = 0, rst_n = 0, clear = 0, bit_valid = 0, bit_in = 0;
  logic rv, rp;
  int checks = 0, failures = 0, npass = 0, nfail = 0;

  nist_longest_run dut (.clk, .rst_n, .clear, .bit_valid, .bit_in, .res_valid(rv), .res_pass(rp));

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

  bit exp_q [$];
  int due [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (due.size() > 0 && cyc == due[0]) begin
      bit e;
      void'(due.pop_front());
      e = exp_q.pop_front();
      #1;
      chk(rv == 1, "result valid two cycles after last bit");
      chk(rp == e, "longest-run decision");
      if (e) npass++; else nfail++;
    end
  end

  task automatic run_seq(input int pm);
    int v [4]; real chi;
    v = '{0, 0, 0, 0};
    for (int b = 0; b < NB; b++) begin
      int run, lmax;
      run = 0; lmax = 0;
      for (int i = 0; i < M; i++) begin
        bit x;
        x = ($urandom_range(999) < pm);
        run = x ? run + 1 : 0;
        if (run > lmax) lmax = run;
        bit_valid <= 1; bit_in <= x;
        @(posedge clk);
      end
      v[(lmax <= 1) ? 0 : (lmax >= 4) ? 3 : lmax - 1]++;
    end
    chi = 0.0;
    for (int i = 0; i < 4; i++) chi += (v[i] - NB * PI[i]) ** 2 / (NB * PI[i]);
    exp_q.push_back(chi < 7.814727903251179);
    due.push_back(cyc + 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 60; r++) run_seq((r % 3 == 0) ? 500 : (r % 3 == 1) ? 700 : 350);
    bit_valid <= 0;
    repeat (5) @(posedge clk);
    chk(due.size() == 0, "all results delivered");
    chk(npass > 0 && nfail > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
