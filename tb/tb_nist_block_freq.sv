// tb_nist_block_freq: fair and block-biased 100 x 200-bit sequences, plus two
// made-up sequences whose statistic lies just below and just above the bound; the
// chi-square statistic is computed in floating point and compared with the
// 95% point of chi-square(100) = 124.342. Checks the 2-cycle latency.
module tb_nist_block_freq;
  localparam int NB = 100, M = 200;
  localparam real CRIT = 124.342;
  logic clk = 0, rst_n = 0, clear = 0, bit_valid = 0, bit_in = 0;
  logic rv, rp;
  int checks = 0, failures = 0;

  nist_block_freq dut (.clk, .rst_n, .clear, .bit_valid, .bit_in, .res_valid(rv), .res_pass(rp));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_seq(input int kind);
    real chi; bit exp_pass; int ones;
    chi = 0.0;
    for (int b = 0; b < NB; b++) begin
      int pm;
      pm = (kind == 0) ? 500 : (kind == 1) ? ((b % 2) ? 540 : 460) : ((b % 2) ? 520 : 480);
      ones = 0;
      for (int i = 0; i < M; i++) begin
        bit x;
        x = ($urandom_range(999) < pm);
        // kinds 3 and 4: exact block counts M/2 +- 8 (first 87 / 88 blocks)
        // and M/2 -+ 7, putting the statistic just below / just above the bound
        if (kind >= 3) begin
          int dlt;
          dlt = (b < 84 + kind) ? 8 : 7;
          if (b % 2) dlt = -dlt;
          x = (i < M / 2 + dlt);
        end
        ones += x;
        bit_valid <= 1; bit_in <= x;
        @(posedge clk);
      end
      chi += 4.0 * M * (1.0 * ones / M - 0.5) * (1.0 * ones / M - 0.5);
    end
    bit_valid <= 0;
    exp_pass = chi < CRIT;
    #1;
    chk(rv == 0, "no result one cycle after last bit");
    @(posedge clk); #1;
    chk(rv == 1, "result two cycles after last bit");
    chk(rp == exp_pass, $sformatf("decision kind=%0d chi2=%f", kind, chi));
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 9; r++) run_seq(r % 3);
    run_seq(3);
    run_seq(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
