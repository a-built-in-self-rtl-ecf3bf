// tb_nist_freq_runs: feeds 20000-bit blocks of several kinds (fair, biased,
// few runs, many runs) to nist_freq_runs and compares both decisions with
// P-values computed in floating point from the NIST formulas; also checks
// the 1- and 2-cycle result latencies.
module tb_nist_freq_runs;
  import tb_math_pkg::*;
  localparam int N = 20000;
  logic clk = 0, rst_n = 0, clear = 0, bit_valid = 0, bit_in = 0;
  logic fv, fp, rv, rp;
  int checks = 0, failures = 0;
  bit seq [N];

  nist_freq_runs #(.N_BITS(N)) dut (.clk, .rst_n, .clear, .bit_valid, .bit_in,
    .freq_valid(fv), .freq_pass(fp), .runs_valid(rv), .runs_pass(rp));

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

  task automatic run_block(input int kind);
    int k, v; real pi, pf, pr, s;
    bit ef, er;
    // generate
    for (int i = 0; i < N; i++) begin
      case (kind)
        0: seq[i] = $urandom_range(1);
        1: seq[i] = ($urandom_range(999) < 515);               // biased
        2: seq[i] = (i == 0) ? 1'b0 : (($urandom_range(99) < 47) ? ~seq[i-1] : seq[i-1]);
        3: seq[i] = (i == 0) ? 1'b0 : (($urandom_range(99) < 53) ? ~seq[i-1] : seq[i-1]);
        default: seq[i] = ($urandom_range(999) < 508);
      endcase
    end
    k = 0; v = 1;
    for (int i = 0; i < N; i++) begin
      k += seq[i];
      if (i > 0 && seq[i] != seq[i-1]) v++;
    end
    s  = (2.0 * k - N) / $sqrt(1.0 * N);
    if (s < 0) s = -s;
    pf = erfc_r(s / $sqrt(2.0));
    ef = pf > 0.05;
    pi = 1.0 * k / N;
    if ((pi - 0.5 >= 2.0 / $sqrt(1.0 * N)) || (0.5 - pi >= 2.0 / $sqrt(1.0 * N))) er = 0;
    else begin
      real x;
      x = (v - 2.0 * N * pi * (1.0 - pi));
      if (x < 0) x = -x;
      pr = erfc_r(x / (2.0 * $sqrt(2.0 * N) * pi * (1.0 - pi)));
      er = pr > 0.05;
    end
    // drive
    for (int i = 0; i < N; i++) begin
      bit_valid <= 1; bit_in <= seq[i];
      @(posedge clk);
    end
    bit_valid <= 0;
    #1;
    chk(fv == 1, "freq_valid one cycle after last bit");
    chk(fp == ef, $sformatf("frequency decision kind=%0d k=%0d", kind, k));
    @(posedge clk); #1;
    chk(rv == 1, "runs_valid two cycles after last bit");
    chk(rp == er, $sformatf("runs decision kind=%0d k=%0d V=%0d", kind, k, v));
    @(posedge clk);
  endtask

  int npass_f = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 10; r++) run_block(r % 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
