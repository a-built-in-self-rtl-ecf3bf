// tb_nist_nonoverlap: 8 x 256-bit sequences, random or seeded with copies
// of the template 000000001; the template count per block (non-overlapping
// scan) and the chi-square statistic are computed in the testbench and
// compared with chi-square(8) 95% = 15.507.
module tb_nist_nonoverlap;
  localparam int NB = 8, M = 256, TM = 9;
  logic clk = 0, rst_n = 0, clear = 0, bit_valid = 0, bit_in = 0;
  logic rv, rp;
  int checks = 0, failures = 0, npass = 0, nfail = 0;
  bit blkbits [M];

  nist_nonoverlap dut (.clk, .rst_n, .clear, .bit_valid, .bit_in, .res_valid(rv), .res_pass(rp));

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
    real chi, mu, s2; bit e;
    mu = (M - TM + 1) / 512.0;
    s2 = M * (1.0 / 512.0 - (2.0 * TM - 1.0) / (512.0 * 512.0));
    chi = 0.0;
    for (int b = 0; b < NB; b++) begin
      int w, i;
      for (int j = 0; j < M; j++) blkbits[j] = $urandom_range(1);
      if (kind == 1) for (int r = 0; r < 3 + b % 3; r++) begin
        int p; p = $urandom_range(M - TM);
        for (int j = 0; j < TM; j++) blkbits[p + j] = (j == TM - 1);
      end
      // NIST scan: on a match skip the whole template
      w = 0; i = 0;
      while (i <= M - TM) begin
        bit m; m = 1;
        for (int j = 0; j < TM; j++) if (blkbits[i + j] != (j == TM - 1)) m = 0;
        if (m) begin w++; i += TM; end else i++;
      end
      chi += (w - mu) ** 2 / s2;
      for (int j = 0; j < M; j++) begin
        bit_valid <= 1; bit_in <= blkbits[j];
        @(posedge clk);
      end
    end
    bit_valid <= 0;
    e = chi < 15.50731305586545;
    @(posedge clk); #1;
    chk(rv == 1, "result two cycles after last bit");
    chk(rp == e, $sformatf("decision kind=%0d chi2=%f", kind, chi));
    if (e) npass++; else nfail++;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 24; r++) run_seq(r % 2);
    chk(npass > 0 && nfail > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
