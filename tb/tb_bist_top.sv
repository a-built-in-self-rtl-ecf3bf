// tb_bist_top: end-to-end run of the whole BIST at reduced sizes.
//
// Sequence: reset and PUF calibration; user GEN and AUTH requests; fair
// TRNG until every randomness test has written round sums; one, then three
// stuck TRNG units (entropy warning, then error); fully correlated units
// (iid test fails, XOR output constant so TRNG success rates drop); fair
// again; then one complete PUF evaluation (ST1, ST2, UT1, UT2, UT3); the
// result memory is then read back through the read port.
//
// Checked against values the testbench works out itself: each TRNG round
// sum from the test results on the outputs, ST2 sums from the PUF's voted
// responses, the CRC over the exported result bits, the memory read-back
// against a shadow of every write, and the calibration levels against the
// per-unit ones counts seen during the sweep. Every mechanism is counted and
// one that never happened is a failure.
// The block structure follows the original scheme; the reduced sizes are
// this testbench's own.
module tb_bist_top;
  import bist_pkg::*;
  localparam int L = 16, R = 4, Q = 4, QT = 4, ROUNDS = 2, UTR = 1, T2 = 4, SC = 2, CALN = 16;
  logic clk = 0, rst_n = 0, eval_start = 0;
  logic ureq = 0; puf_mode_e umode = PUF_AUTH; logic [L-1:0] uchal = '0;
  logic udone, uresp, urv;
  rt_result_t rt_res;
  logic iid_valid, iid_pass, iid_error;
  bit iid_last = 1'b1;
  int iid_err_bad = 0;
  logic [2:0] ent_level [QT];
  logic ent_warning, ent_error;
  logic [NTESTS:0] chk_v, chk_b;
  logic [15:0] checksum;
  logic cal_done, busy, psr_low;
  logic [NTESTS-1:0] tsr_low;
  logic [$clog2(SC+1)-1:0] st2_stable;
  logic [MEM_AW-1:0] raddr = '0;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  bist_top #(.L(L), .R(R), .Q(Q), .QT(QT), .ROUNDS(ROUNDS), .UT_ROUNDS(UTR), .T2(T2),
    .ST2_CHAL(SC), .CAL_N(CALN), .N_RUNS(200), .BF_N(4), .BF_M(50), .BF_CHI2(9.487729),
    .LR_N(16), .NO_N(8), .NO_M(64), .NO_CHI2(15.507313), .OT_N(2), .OT_M(1023),
    .CS_N(200), .CS_ZMAX(31), .IID_N(1024), .ENT_N(10000), .SENS_WIN(64)) dut (
    .clk, .rst_n, .puf_eval_start(eval_start), .user_req(ureq), .user_mode(umode),
    .user_chal(uchal), .user_done(udone), .user_resp(uresp), .user_resp_valid(urv),
    .rt_res, .iid_valid, .iid_pass, .iid_error, .ent_level, .ent_warning, .ent_error,
    .chk_valid(chk_v), .chk_bits(chk_b), .checksum, .cal_done, .puf_eval_busy(busy),
    .trng_sr_low(tsr_low), .puf_sr_low(psr_low), .st2_stable, .mem_raddr(raddr), .mem_rdata(rdata));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_rt_valid [NTESTS], n_rt_fail [NTESTS];
  int n_iid_pass = 0, n_iid_fail = 0, n_warn = 0, n_err = 0;
  int n_tr_write = 0, n_tr_low = 0, n_ent_write = 0, n_cal_write = 0;
  int n_st1 = 0, n_st2 = 0, n_ut1 = 0, n_ut2 = 0, n_ut3 = 0;
  int n_gen = 0, n_gen_invalid = 0, n_auth = 0, n_psr_low = 0, n_reads = 0;

  // ---------------------------------------------------------------- shadow memory
  logic [15:0] shadow [int];
  always @(posedge clk) if (rst_n && dut.mem_we) begin
    int a;
    a = int'(dut.mem_waddr);
    shadow[a] = dut.mem_wdata;
    if (a < A_ENT) n_tr_write++;
    else if (a < A_ST1) n_ent_write++;
    else if (a == A_ST1) n_st1++;
    else if (a < A_CAL) n_st2++;
    else if (a < A_UT) n_cal_write++;
    else if (a < A_UT + 8) n_ut1++;
    else if (a < A_UT + 8 * (L + 1)) n_ut2++;
    else n_ut3++;
  end

  // ---------------------------------------------------------------- TRNG round sums
  int tr_sum [NTESTS], tr_cnt [NTESTS];
  int exp_tr [$];
  int tr_bad = 0;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NTESTS; t++) if (rt_res.valid[t]) begin
      n_rt_valid[t]++;
      if (!rt_res.pass[t]) n_rt_fail[t]++;
      if (!dut.u_fsm.in_ut) begin
        tr_sum[t] += rt_res.pass[t]; tr_cnt[t]++;
        if (tr_cnt[t] == ROUNDS) begin
          exp_tr.push_back(t << 16 | tr_sum[t]);
          if (tr_sum[t] * 100 < ROUNDS * 80) n_tr_low++;
          tr_sum[t] = 0; tr_cnt[t] = 0;
        end
      end
    end
    if (dut.mem_we && dut.mem_waddr < A_ENT) begin
      int e; e = -1;
      foreach (exp_tr[i]) if ((exp_tr[i] >> 16) == int'(dut.mem_waddr[2:0])) begin e = i; break; end
      if (e < 0 || (exp_tr[e] & 'hffff) != int'(dut.mem_wdata)) tr_bad++;
      else exp_tr.delete(e);
    end
    if (iid_valid) begin if (iid_pass) n_iid_pass++; else n_iid_fail++; iid_last = iid_pass; end
    if (rst_n && iid_error != !iid_last) iid_err_bad++;
    n_warn += ent_warning; n_err += ent_error;
    if (psr_low) n_psr_low++;
  end

  // ---------------------------------------------------------------- CRC of exported bits
  logic [15:0] crc = 16'hFFFF;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i <= NTESTS; i++) if (chk_v[i]) begin
      logic fb; fb = crc[15] ^ chk_b[i];
      crc = {crc[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
    end
  end

  // ---------------------------------------------------------------- ST2 reference
  int st2_acc = 0, st2_n = 0;
  int st2_exp [$];
  always @(posedge clk) if (rst_n && dut.u_puf.done && dut.u_fsm.st == 5'd6) begin   // S_ST2_WAIT
    st2_acc += dut.u_puf.response; st2_n++;
    if (st2_n == T2) begin st2_exp.push_back(st2_acc); st2_acc = 0; st2_n = 0; end
  end

  // ---------------------------------------------------------------- calibration reference
  int cal_ones [2*R][Q];
  always @(posedge clk) if (rst_n && dut.u_puf.done && dut.u_fsm.st == 5'd0)   // S_CAL
    for (int u = 0; u < Q; u++) cal_ones[dut.u_fsm.cal_level][u] += dut.u_puf.unit_resp[u];

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    for (int t = 0; t < NTESTS; t++) begin n_rt_valid[t] = 0; n_rt_fail[t] = 0; tr_sum[t] = 0; tr_cnt[t] = 0; end
    for (int s = 0; s < 2 * R; s++) for (int u = 0; u < Q; u++) cal_ones[s][u] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (cal_done);
    @(posedge clk);
    for (int u = 0; u < Q; u++) begin
      int best, bl, dd;
      best = 1 << 30; bl = 0;
      for (int s = 0; s < 2 * R; s++) begin
        dd = 2 * cal_ones[s][u] - CALN; if (dd < 0) dd = -dd;
        if (dd < best) begin best = dd; bl = s; end
      end
      chk(int'(shadow[A_CAL + u]) == bl, $sformatf("calibrated level of unit %0d", u));
    end
    // user requests
    for (int k = 0; k < 16; k++) begin
      umode <= (k % 2) ? PUF_GEN : PUF_AUTH; uchal <= L'($urandom); ureq <= 1;
      @(posedge clk); ureq <= 0;
      while (!udone) @(posedge clk);
      if (k % 2) begin n_gen++; if (!urv) n_gen_invalid++; end else n_auth++;
    end
    // fair TRNG until every test has results
    begin
      bit all;
      do begin
        wait_cycles(1000);
        all = 1;
        for (int t = 0; t < NTESTS; t++) if (n_rt_valid[t] < 2 * ROUNDS) all = 0;
      end while (!all);
    end
    // entropy: one stuck unit -> warning, three -> error
    dut.u_trng.one_prob_pm[0] = 1000;
    wait_cycles(42000);
    chk(ent_warning && !ent_error, "one low unit gives a warning");
    dut.u_trng.one_prob_pm[1] = 1000; dut.u_trng.one_prob_pm[2] = 0;
    wait_cycles(42000);
    chk(ent_error, "three low units give an error");
    for (int i = 0; i < QT; i++) dut.u_trng.one_prob_pm[i] = 500;
    // correlated units: iid fails, XOR output constant
    dut.u_trng.corr_pm = 1000;
    wait_cycles(6000);
    chk(tsr_low != '0, "constant TRNG output lowers success rates");
    dut.u_trng.corr_pm = 0;
    wait_cycles(3000);
    // PUF evaluation
    eval_start <= 1; @(posedge clk); eval_start <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    wait_cycles(20);
    chk(st2_exp.size() == SC, "ST2 challenge count");
    for (int k = 0; k < SC && k < st2_exp.size(); k++)
      chk(int'(shadow[A_ST2 + k]) == st2_exp[k], $sformatf("ST2 sum %0d", k));
    chk(checksum == crc, $sformatf("checksum %h vs %h", checksum, crc));
    chk(tr_bad == 0, $sformatf("TRNG round sums (%0d bad)", tr_bad));
    // read back memory
    foreach (shadow[a]) begin
      raddr <= MEM_AW'(a); @(posedge clk); #1;
      n_reads++;
      chk(rdata == shadow[a], $sformatf("memory read %0h", a));
    end
    // mechanisms
    for (int t = 0; t < NTESTS; t++) begin
      chk(n_rt_valid[t] > 0, $sformatf("test %0d produced results", t));
      chk(n_rt_fail[t] > 0, $sformatf("test %0d failed at least once", t));
    end
    chk(n_iid_pass > 0 && n_iid_fail > 0, $sformatf("iid pass %0d fail %0d", n_iid_pass, n_iid_fail));
    chk(iid_err_bad == 0, $sformatf("iid error signal mismatches %0d", iid_err_bad));
    chk(n_warn > 0 && n_err > 0, "entropy warning and error");
    chk(n_tr_write > 0 && n_tr_low > 0, $sformatf("TRNG round writes %0d, low %0d", n_tr_write, n_tr_low));
    chk(n_ent_write > 0, "entropy levels written");
    chk(n_cal_write == Q, "calibration levels written");
    chk(n_st1 == 1 && n_st2 == SC, "ST1 and ST2 written");
    chk(n_ut1 == NTESTS && n_ut2 == NTESTS * L && n_ut3 == NTESTS * L,
        $sformatf("UT writes %0d %0d %0d", n_ut1, n_ut2, n_ut3));
    chk(n_gen > 0 && n_auth > 0, "user GEN and AUTH requests");
    chk(n_psr_low > 0, "PUF success rate flagged low");
    chk(n_reads > 0, "memory read port");
    $display("mechanisms: tr_writes=%0d tr_low=%0d iid=%0d/%0d warn=%0d err=%0d ut=%0d/%0d/%0d gen_invalid=%0d",
             n_tr_write, n_tr_low, n_iid_pass, n_iid_fail, n_warn, n_err, n_ut1, n_ut2, n_ut3, n_gen_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
