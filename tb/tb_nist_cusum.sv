// tb_nist_cusum: 20000-bit sequences, fair and slightly biased; the forward
// and backward maximum excursions are computed in the testbench and their
// NIST P-values evaluated in floating point (pass when both exceed 0.05).
module tb_nist_cusum;
  import tb_math_pkg::*;
  localparam int N = 20000;
  logic clk = 0, rst_n = 0, clear = 0, bit_valid = 0, bit_in = 0;
  logic rv, rp;
  int checks = 0, failures = 0, npass = 0, nfail = 0;

  nist_cusum dut (.clk, .rst_n, .clear, .bit_valid, .bit_in, .res_valid(rv), .res_pass(rp));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int walk [N+1];
  task automatic run_seq(input int pm);
    int zf, zb; bit e;
    walk[0] = 0; zf = 0; zb = 0;
    for (int i = 0; i < N; i++) begin
      bit x;
      x = ($urandom_range(9999) < pm);
      walk[i+1] = walk[i] + (x ? 1 : -1);
      bit_valid <= 1; bit_in <= x;
      @(posedge clk);
    end
    bit_valid <= 0;
    for (int i = 1; i <= N; i++) begin
      int a, b;
      a = (walk[i] < 0) ? -walk[i] : walk[i];
      b = walk[N] - walk[i - 1];
      if (b < 0) b = -b;
      if (a > zf) zf = a;
      if (b > zb) zb = b;
    end
    e = (cusum_p(1.0 * zf, 1.0 * N) >= 0.05) && (cusum_p(1.0 * zb, 1.0 * N) >= 0.05);
    @(posedge clk); #1;
    chk(rv == 1, "result two cycles after last bit");
    chk(rp == e, $sformatf("decision pm=%0d zf=%0d zb=%0d", pm, zf, zb));
    if (e) npass++; else nfail++;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 12; r++) run_seq((r % 3 == 0) ? 5000 : (r % 3 == 1) ? 5080 : 5030);
    chk(npass > 0 && nfail > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
