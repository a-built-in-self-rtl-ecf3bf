// tb_bist_fsm: the controller with every peripheral modelled in the
// testbench, at small sizes. The models are a PUF with a known response
// function (some challenges noisy) and a calibration characteristic
// centred on a known level per unit, a randomness-test block that produces
// random results, a challenge source, an RO sensor and an entropy estimator.
// The testbench keeps its own expected contents of the result memory and its
// own CRC of the exported result bits, and checks:
//   calibration levels, TRNG round sums and low flags, entropy levels,
//   the ST1 count, ST2 sums and the stable count, UT1/UT2/UT3 bits (each
//   UT2/UT3 bit is the XOR of the two responses and the second challenge
//   differs from the first in exactly i / h bits), UT sums and puf_sr_low,
//   the checksum, and user GEN/AUTH requests.
// The ST1/ST2/UT1-3 order and the success-rate sums follow the original
// scheme; the sizes, memory map and handshakes are this design's own.
module tb_bist_fsm;
  import bist_pkg::*;
  localparam int L = 8, R = 4, Q = 2, QT = 4, ROUNDS = 4, UTR = 2, T2 = 6, SC = 3, SM = 1, CALN = 4;
  localparam int TW = $clog2(2 * R);
  localparam logic [L-1:0] KEY = 8'hB5;

  logic clk = 0, rst_n = 0, eval_start = 0;
  logic ureq = 0; puf_mode_e umode; logic [L-1:0] uchal;
  logic udone, uresp, urv, prv;
  logic trng_bit, rt_clear, rt_bv, rt_b;
  rt_result_t rt_res;
  logic iid_valid = 0, iid_pass = 0, ent_valid = 0;
  logic [$clog2(QT)-1:0] ent_unit;
  logic [2:0] ent_level;
  logic sens_valid = 0; logic [15:0] sens_count;
  logic cvalid = 0; logic [L-1:0] chal; logic ctake;
  logic preq; puf_mode_e pmode; logic [L-1:0] pchal; logic [TW-1:0] ptune [Q];
  logic pdone = 0, presp = 0; logic [Q-1:0] punit = '0;
  logic we; logic [MEM_AW-1:0] wa; logic [15:0] wd;
  logic cal_done, busy, psr_low; logic [NTESTS-1:0] tsr_low;
  logic [$clog2(SC+1)-1:0] st2_stable;
  logic [NTESTS:0] chk_v, chk_b; logic [15:0] checksum;
  int checks = 0, failures = 0;

  bist_fsm #(.L(L), .R(R), .Q(Q), .QT(QT), .ROUNDS(ROUNDS), .UT_ROUNDS(UTR), .T2(T2),
             .ST2_CHAL(SC), .ST2_MARGIN(SM), .SR_MIN_PCT(80), .CAL_N(CALN)) dut (
    .clk, .rst_n, .puf_eval_start(eval_start), .user_req(ureq), .user_mode(umode), .user_chal(uchal),
    .user_done(udone), .user_resp(uresp), .user_resp_valid(urv), .puf_resp_valid(prv),
    .trng_bit, .rt_clear, .rt_bit_valid(rt_bv), .rt_bit(rt_b), .rt_res,
    .iid_valid, .iid_pass, .ent_valid, .ent_unit, .ent_level, .sens_valid, .sens_count,
    .chal_valid(cvalid), .chal, .chal_take(ctake),
    .puf_req(preq), .puf_mode(pmode), .puf_chal(pchal), .puf_tune(ptune), .puf_done(pdone),
    .puf_resp(presp), .puf_unit_resp(punit),
    .mem_we(we), .mem_waddr(wa), .mem_wdata(wd),
    .cal_done, .puf_eval_busy(busy), .trng_sr_low(tsr_low), .puf_sr_low(psr_low),
    .st2_stable, .chk_valid(chk_v), .chk_bits(chk_b), .checksum);

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

  // ------------------------------------------------------------ memory model
  logic [15:0] mem [2**MEM_AW];
  int nwrites = 0;
  always @(posedge clk) if (rst_n && we) begin mem[wa] = wd; nwrites++; end

  // ------------------------------------------------------------ challenge source
  always @(posedge clk) begin
    if (!cvalid || ctake) begin
      cvalid <= ($urandom_range(1) == 1);
      chal   <= L'($urandom);
    end
  end
  assign trng_bit = 1'b0;

  // ------------------------------------------------------------ PUF model
  function automatic logic resp_fn(input logic [L-1:0] c);
    return ^(c & KEY);
  endfunction
  int unsigned cal_tog [Q];
  logic last_resp;
  always @(posedge clk) begin
    pdone <= 0;
    if (rst_n && preq) begin
      logic r;
      r = resp_fn(pchal);
      if (pmode != PUF_RAW && pchal[1:0] == 2'b11) r = $urandom_range(1);   // noisy challenges
      for (int u = 0; u < Q; u++) begin
        int lv, c;
        lv = int'(ptune[u]); c = 2 + u;
        if (lv > c) punit[u] <= 1;
        else if (lv < c) punit[u] <= 0;
        else begin punit[u] <= cal_tog[u][0]; cal_tog[u]++; end
      end
      presp <= r; last_resp = r;
      prv <= (pmode == PUF_GEN) ? pchal[0] : 1'b1;
      pdone <= 1;
    end
  end

  // ------------------------------------------------------------ randomness-test model
  int pass_pm = 900;
  always @(posedge clk) begin
    rt_result_t r;
    for (int t = 0; t < NTESTS; t++) begin
      r.valid[t] = ($urandom_range(5) == 0);
      r.pass[t]  = r.valid[t] && ($urandom_range(999) < pass_pm);
    end
    rt_res <= r;
  end

  // state codes of the controller (order of its state enumeration)
  // S_ST2_WAIT = 6, S_UT_REQ1 = 9, S_UT_REQ2 = 11, S_UT_WR = 13; UT1 = 0, UT2 = 1
  // expected TRNG round sums / UT sums
  int tr_sum [NTESTS], tr_cnt [NTESTS], tr_slot [NTESTS];
  int ut_sum [NTESTS], ut_cnt [NTESTS];
  int exp_tr [$];     // address<<16 | value
  int low_rounds = 0, lowflag_ok = 0, lowflag_bad = 0;
  logic [15:0] crc = 16'hFFFF;
  bit in_ut_d;
  assign in_ut_d = dut.in_ut;
  always @(posedge clk) if (rst_n) begin
    if (dut.clear_q) for (int t = 0; t < NTESTS; t++) begin ut_sum[t] = 0; ut_cnt[t] = 0; end
    for (int t = 0; t < NTESTS; t++) if (rt_res.valid[t]) begin
      if (!in_ut_d) begin
        tr_sum[t] += rt_res.pass[t]; tr_cnt[t]++;
        if (tr_cnt[t] == ROUNDS) begin
          exp_tr.push_back(((A_TRNG + 8 * tr_slot[t] + t) << 16) | tr_sum[t]);
          if (tr_sum[t] * 100 < ROUNDS * 80) low_rounds++;
          tr_slot[t] = (tr_slot[t] + 1) % 16; tr_sum[t] = 0; tr_cnt[t] = 0;
        end
      end else if (ut_cnt[t] < UTR) begin
        ut_sum[t] += rt_res.pass[t]; ut_cnt[t]++;
      end
    end
  end
  // CRC over {iid, rt (UT only)} in index order
  always @(posedge clk) if (rst_n) begin
    logic [NTESTS:0] v, b;
    v = {iid_valid, in_ut_d ? rt_res.valid : 7'b0};
    b = {iid_pass, rt_res.pass};
    for (int i = 0; i <= NTESTS; i++) if (v[i]) begin
      logic fb; fb = crc[15] ^ b[i];
      crc = {crc[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
    end
  end
  always @(posedge clk) iid_valid <= ($urandom_range(40) == 0);
  always @(posedge clk) iid_pass  <= $urandom_range(1);

  // ------------------------------------------------------------ UT monitors
  int ut_bits = 0, ut_bad = 0, ut2_seen = 0, ut3_seen = 0;
  logic [L-1:0] c1; logic r1;
  always @(posedge clk) if (rst_n && preq && dut.in_ut) begin
    if (dut.st == 5'd9) c1 <= pchal;
    if (dut.st == 5'd11) begin
      int hd, want;
      hd = $countones(pchal ^ c1);
      want = (dut.ut == 2'd1) ? 1 : int'(dut.ut_idx);
      if (hd != want) begin ut_bad++; $display("UT distance %0d want %0d", hd, want); end
      if (dut.ut == 2'd1) begin
        ut2_seen++;
        if ((pchal ^ c1) != (L'(1) << (int'(dut.ut_idx) - 1))) ut_bad++;
      end else ut3_seen++;
    end
  end
  logic [1:0] resp_hist;
  always @(posedge clk) if (pdone) resp_hist <= {resp_hist[0], presp};
  always @(posedge clk) if (rst_n && rt_bv && dut.in_ut) begin
    ut_bits++;
    if (dut.ut == 2'd0) begin if (rt_b != resp_hist[0]) begin ut_bad++; $display("UT1 bit bad %0t", $time); end end
    else if (rt_b != (resp_hist[1] ^ resp_hist[0])) begin ut_bad++; $display("UT2/3 bit bad %0t ut=%0d idx=%0d", $time, dut.ut, dut.ut_idx); end
  end

  // ST2 reference: count responses per challenge
  int st2_exp [$];
  int st2_acc = 0;
  always @(posedge clk) if (rst_n && pdone && (dut.st == 5'd6)) begin
    st2_acc += presp;
    if (int'(dut.st2_n) == T2 - 1) begin st2_exp.push_back(st2_acc); st2_acc = 0; end
  end

  // UT sums at each UT write
  int ut_w_bad = 0, ut_w = 0;
  always @(posedge clk) if (rst_n && dut.st == 5'd13) begin
    ut_w++;
    if (int'(wd) != ut_sum[dut.wr_t]) ut_w_bad++;
  end

  // TRNG write checker
  int tr_w = 0, tr_w_bad = 0;
  always @(posedge clk) if (rst_n && we && wa < A_ENT) begin
    int e;
    tr_w++;
    e = -1;
    foreach (exp_tr[i]) if ((exp_tr[i] >> 16) == int'(wa)) begin e = i; break; end
    if (e < 0 || (exp_tr[e] & 'hffff) != int'(wd)) begin
      tr_w_bad++; $display("TRNG write %h=%0d unexpected", wa, wd);
    end else exp_tr.delete(e);
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int ent_exp [QT];
    int sens_v, n_low_ut;
    umode = PUF_AUTH; uchal = '0; ent_unit = '0; ent_level = '0; sens_count = '0;
    for (int t = 0; t < NTESTS; t++) begin tr_sum[t] = 0; tr_cnt[t] = 0; tr_slot[t] = 0; ut_sum[t] = 0; ut_cnt[t] = 0; end
    for (int u = 0; u < Q; u++) cal_tog[u] = 0;
    for (int i = 0; i < 2**MEM_AW; i++) mem[i] = 16'hDEAD;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (cal_done); @(posedge clk);
    for (int u = 0; u < Q; u++) chk(int'(mem[A_CAL + u]) == 2 + u, $sformatf("calibration level unit %0d = %0d", u, mem[A_CAL + u]));
    // entropy levels
    for (int u = 0; u < QT; u++) begin
      ent_exp[u] = $urandom_range(7);
      ent_valid <= 1; ent_unit <= 2'(u); ent_level <= 3'(ent_exp[u]); @(posedge clk);
    end
    ent_valid <= 0;
    repeat (20) @(posedge clk);
    for (int u = 0; u < QT; u++) chk(int'(mem[A_ENT + u]) == ent_exp[u], "entropy level written");
    // user requests while idle
    for (int k = 0; k < 6; k++) begin
      logic [L-1:0] c;
      c = L'($urandom) & ~L'(3);
      umode <= (k % 2) ? PUF_GEN : PUF_AUTH; uchal <= c; ureq <= 1;
      @(posedge clk); ureq <= 0;
      while (!udone) @(posedge clk);
      #1;
      chk(uresp == resp_fn(c), "user response");
      chk(urv == ((k % 2) ? c[0] : 1'b1), "user RESP_VALID");
      @(posedge clk);
    end
    // low TRNG pass rate for a while
    pass_pm = 300;
    repeat (400) @(posedge clk);
    pass_pm = 950;
    // PUF evaluation
    sens_v = 1234;
    eval_start <= 1; @(posedge clk); eval_start <= 0;
    @(posedge clk); #1;
    chk(busy, "evaluation busy");
    repeat (5) @(posedge clk);
    sens_count <= 16'(sens_v); sens_valid <= 1; @(posedge clk); sens_valid <= 0;
    pass_pm = 700;
    while (busy) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(mem[A_ST1] == 16'(sens_v), "ST1 sensor count stored");
    chk(st2_exp.size() == SC, "ST2 challenge count");
    begin
      int ns; ns = 0;
      for (int k = 0; k < SC; k++) begin
        chk(int'(mem[A_ST2 + k]) == st2_exp[k], $sformatf("ST2 sum %0d", k));
        if (st2_exp[k] <= SM || st2_exp[k] + SM >= T2) ns++;
      end
      chk(int'(st2_stable) == ns, "ST2 stable count");
    end
    chk(ut_bits >= UTR * (1 + 2 * L) && ut_bad == 0, $sformatf("UT bits %0d bad %0d", ut_bits, ut_bad));
    chk(ut2_seen > 0 && ut3_seen > 0, "UT2 and UT3 ran");
    chk(ut_w == NTESTS * (1 + 2 * L) && ut_w_bad == 0, $sformatf("UT writes %0d bad %0d", ut_w, ut_w_bad));
    n_low_ut = 0;
    chk(psr_low, "pass rate 70% flags the PUF low");
    chk(tr_w > 0 && tr_w_bad == 0, $sformatf("TRNG round writes %0d bad %0d", tr_w, tr_w_bad));
    chk(low_rounds > 0, "some TRNG rounds were low");
    chk(lowflag_ok > 0 && lowflag_bad <= 1, $sformatf("trng_sr_low flags %0d ok %0d bad", lowflag_ok, lowflag_bad));
    chk(checksum == crc, $sformatf("checksum %h vs %h", checksum, crc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // trng_sr_low follows the last written round of each test
  always @(posedge clk) if (rst_n && we && wa < A_ENT) begin
    int t, v;
    t = int'(wa[2:0]); v = int'(wd);
    #1;
    if (tsr_low[t] != (v * 100 < ROUNDS * 80)) lowflag_bad++; else lowflag_ok++;
  end
endmodule
