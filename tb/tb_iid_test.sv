// tb_iid_test: 16-unit bit vectors change every cycle; the testbench keeps
// the interleaved sequence the test is defined on (one vector every 16
// cycles), computes the Wald-Wolfowitz Z statistic in floating point and
// compares |Z| < 1.96 with the block's decision. Cases: independent fair
// units, independent biased units (must still pass in expectation),
// correlated neighbouring units (must fail).
module tb_iid_test;
  localparam int Q = 16, N = 16384;
  logic clk = 0, rst_n = 0, en = 0;
  logic [Q-1:0] ub;
  logic rv, rp, err;
  bit last_rp = 1'b1;
  int err_bad = 0;
  int checks = 0, failures = 0;
  int kind = 0;
  int npass = 0, nfail = 0, corr_fail = 0;

  iid_test #(.Q(Q), .N_BITS(N)) dut (.clk, .rst_n, .en, .unit_bits(ub), .res_valid(rv), .res_pass(rp),
                                          .error(err));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference sequence
  int cyc = 0, nb = 0, n1 = 0, runs = 0;
  bit prev;
  bit exp_q [$];
  int kind_q [$];
  always @(posedge clk) if (en) begin
    if (cyc % Q == 0) begin
      for (int i = 0; i < Q; i++) begin
        bit b; b = ub[i];
        if (nb == 0 || b != prev) runs++;
        n1 += b; prev = b; nb++;
        if (nb == N) begin
          real n0, mu, var_, z;
          n0 = N - n1;
          mu = 2.0 * n1 * n0 / N + 1.0;
          var_ = (mu - 1.0) * (mu - 2.0) / (N - 1.0);
          z = (runs - mu) / $sqrt(var_);
          exp_q.push_back(z < 1.96 && z > -1.96);
          kind_q.push_back(kind);
          nb = 0; n1 = 0; runs = 0;
        end
      end
    end
    cyc++;
  end

  // the error signal must follow the latest result and hold between results
  always @(posedge clk) if (rst_n) begin
    if (rv) last_rp = rp;
    if (err != !last_rp) err_bad++;
  end

  always @(posedge clk) if (rv) begin
    bit e; int k;
    e = exp_q.pop_front();
    k = kind_q.pop_front();
    chk(rp == e, $sformatf("iid decision kind %0d", k));
    if (rp) npass++; else nfail++;
    if (k == 2 && !rp) corr_fail++;
  end

  task automatic drive(input int k, input int cycles);
    kind = k;
    for (int c = 0; c < cycles; c++) begin
      logic [Q-1:0] v;
      for (int i = 0; i < Q; i++) begin
        if (k == 2 && i > 0 && $urandom_range(99) < 30) v[i] = v[i-1];
        else v[i] = (k == 1) ? ($urandom_range(99) < 70) : $urandom_range(1);
      end
      ub <= v; en <= 1;
      @(posedge clk);
    end
  endtask

  initial begin
    ub = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    drive(0, 3 * N);
    drive(1, 3 * N);
    drive(2, 3 * N);
    en <= 0;
    repeat (20) @(posedge clk);
    chk(exp_q.size() == 0, "every sequence got a result");
    chk(corr_fail >= 2, "correlated units detected");
    chk(npass >= 3, "independent units pass");
    chk(err_bad == 0, $sformatf("error signal mismatches %0d", err_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
