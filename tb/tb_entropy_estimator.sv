// tb_entropy_estimator: four units with different bias (fair, 80% ones,
// stuck at one, 65% ones). The testbench reproduces each unit's windows
// (unit i starts i cycles late), counts the 2-bit words, evaluates the
// min-entropy formula in floating point and quantises it to 0..7; every
// reported level must match, arrive in the order the windows end, and the
// warning/error flags must follow the number of units below level 4.
// The level formula and the thresholds follow the published estimator;
// the unit biases and the sizes are this testbench's own.
module tb_entropy_estimator;
  localparam int Q = 4, NW = 10000;
  logic clk = 0, rst_n = 0, en = 0;
  logic [Q-1:0] ub;
  logic [2:0] level [Q];
  logic uv, warn, err;
  logic [1:0] uu;
  logic [2:0] ul;
  int checks = 0, failures = 0;
  int pm [Q];

  entropy_estimator #(.Q(Q), .N_WORDS(NW)) dut (.clk, .rst_n, .en, .unit_bits(ub), .level,
    .upd_valid(uv), .upd_unit(uu), .upd_level(ul), .warning(warn), .error(err));

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

  // reference model
  int cyc = 0;
  int cnt [Q][4];
  int words [Q];
  bit half [Q];
  bit fb [Q];
  int exp_u [$];
  int exp_l [$];
  int updates = 0, warn_seen = 0, err_seen = 0;

  function automatic int ref_level(input int cmax);
    real e;
    e = -$log10((cmax + 2.3 * $sqrt(cmax * (1.0 - 1.0 * cmax / NW))) / NW) / $log10(2.0);
    if (e > 2.0) e = 2.0;
    return (e >= 1.75) ? 7 : int'($floor(e * 4.0));
  endfunction

  always @(posedge clk) if (en) begin
    for (int i = 0; i < Q; i++) if (cyc >= i + 1) begin
      if (!half[i]) fb[i] = ub[i];
      else begin
        cnt[i][{fb[i], ub[i]}]++;
        words[i]++;
        if (words[i] == NW) begin
          int m; m = 0;
          for (int w = 0; w < 4; w++) if (cnt[i][w] > m) m = cnt[i][w];
          exp_u.push_back(i); exp_l.push_back(ref_level(m));
          words[i] = 0;
          for (int w = 0; w < 4; w++) cnt[i][w] = 0;
        end
      end
      half[i] = !half[i];
    end
    cyc++;
  end

  always @(posedge clk) if (uv) begin
    int eu, el, low;
    eu = exp_u.pop_front(); el = exp_l.pop_front();
    chk(32'(uu) == eu, "update order");
    chk(32'(ul) == el, $sformatf("level of unit %0d: got %0d expected %0d", eu, ul, el));
    updates++;
  end
  always @(posedge clk) begin
    int low; low = 0;
    for (int i = 0; i < Q; i++) if (level[i] < 4) low++;
    if (rst_n) begin
      if (warn != (low >= 1 && low <= 2) || err != (low > 2)) begin
        failures++; $display("FAIL: flags low=%0d warn=%0b err=%0b", low, warn, err);
      end
      warn_seen += warn; err_seen += err;
    end
  end

  initial begin
    for (int i = 0; i < Q; i++) begin
      half[i] = 0; words[i] = 0;
      for (int w = 0; w < 4; w++) cnt[i][w] = 0;
    end
    pm = '{500, 800, 1000, 650};
    ub = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < 2 * (2 * NW) + 40; c++) begin
      logic [Q-1:0] v;
      if (c == 2 * NW + 20) pm = '{500, 800, 1000, 950};
      for (int i = 0; i < Q; i++) v[i] = ($urandom_range(999) < pm[i]);
      ub <= v; en <= 1;
      @(posedge clk);
    end
    en <= 0;
    repeat (10) @(posedge clk);
    chk(updates == 2 * Q - 1 || updates == 2 * Q, $sformatf("updates %0d", updates));
    chk(warn_seen > 0, "warning raised (two units low)");
    chk(err_seen > 0, "error raised (three units low)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
