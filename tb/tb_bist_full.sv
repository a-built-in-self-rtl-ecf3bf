// tb_bist_full: the complete BIST with every parameter at its default.
// It runs the start-up calibration of the PUF (2R sweep levels of CAL_N
// challenges), keeps the fair TRNG running until every one of the seven
// randomness tests, the iid test and the entropy estimator has produced a
// result (the overlapping-template test needs OT_N*OT_M, about one million,
// bits), then starts a PUF evaluation and follows it through ST1 and ST2
// until UT1 has begun feeding PUF responses to the randomness tests.
// A full UT sequence (2L+1 phases of UT_ROUNDS results each) is far too long
// to simulate and is covered at reduced size by tb_bist_top.
// Checks: calibration levels are written and lie inside the tuning range,
// every TRNG test reports, the first round results of the fair TRNG mostly
// pass, the ST1 count matches the sensor's window count, and each ST2 sum
// equals the number of ones among the T2 voted responses.
// Sizes are the defaults, which are the original scheme's where it gives them.
module tb_bist_full;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, eval_start = 0;
  logic udone, uresp, urv;
  rt_result_t rt_res;
  logic iid_valid, iid_pass, iid_error;
  logic [2:0] ent_level [16];
  logic ent_warning, ent_error;
  logic [NTESTS:0] chk_v, chk_b;
  logic [15:0] checksum;
  logic cal_done, busy, psr_low;
  logic [NTESTS-1:0] tsr_low;
  logic [4:0] st2_stable;
  logic [MEM_AW-1:0] raddr = '0;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  bist_top dut (
    .clk, .rst_n, .puf_eval_start(eval_start), .user_req(1'b0), .user_mode(PUF_AUTH),
    .user_chal(64'h0), .user_done(udone), .user_resp(uresp), .user_resp_valid(urv),
    .rt_res, .iid_valid, .iid_pass, .iid_error, .ent_level, .ent_warning, .ent_error,
    .chk_valid(chk_v), .chk_bits(chk_b), .checksum, .cal_done, .puf_eval_busy(busy),
    .trng_sr_low(tsr_low), .puf_sr_low(psr_low), .st2_stable, .mem_raddr(raddr), .mem_rdata(rdata));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_valid [NTESTS], n_pass [NTESTS];
  int n_iid = 0, n_ent = 0, n_cal = 0, n_ut_bits = 0;
  logic [15:0] shadow [int];
  int st2_acc = 0, st2_n = 0;
  int st2_exp [$];
  int sens_last = -1, st1_exp = -1;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NTESTS; t++) if (rt_res.valid[t]) begin
      n_valid[t]++; n_pass[t] += rt_res.pass[t];
    end
    n_iid += iid_valid;
    n_ent += dut.ent_valid;
    if (dut.mem_we) shadow[int'(dut.mem_waddr)] = dut.mem_wdata;
    if (dut.u_puf.done && dut.u_fsm.st == 5'd6) begin   // S_ST2_WAIT
      st2_acc += dut.u_puf.response; st2_n++;
      if (st2_n == 100) begin st2_exp.push_back(st2_acc); st2_acc = 0; st2_n = 0; end
    end
    if (dut.u_fsm.st == 5'd3 && dut.sens_valid) st1_exp = int'(dut.sens_count);   // S_ST1
    if (dut.u_fsm.in_ut && dut.rt_bit_valid) n_ut_bits++;
  end

  initial begin
    for (int t = 0; t < NTESTS; t++) begin n_valid[t] = 0; n_pass[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (cal_done);
    @(posedge clk); #1;
    $display("calibration done at %0t", $time);
    for (int u = 0; u < 16; u++) begin
      chk(shadow.exists(A_CAL + u) && shadow[A_CAL + u] < 32, $sformatf("calibration level of unit %0d", u));
      if (shadow.exists(A_CAL + u) && shadow[A_CAL + u] != 16) n_cal++;
    end
    begin
      bit all;
      do begin
        repeat (5000) @(posedge clk);
        all = (n_iid > 0) && (n_ent > 0);
        for (int t = 0; t < NTESTS; t++) if (n_valid[t] == 0) all = 0;
      end while (!all);
    end
    $display("all TRNG tests reported at %0t", $time);
    for (int t = 0; t < NTESTS; t++)
      chk(n_pass[t] * 10 >= n_valid[t] * 7, $sformatf("fair TRNG passes test %0d (%0d/%0d)", t, n_pass[t], n_valid[t]));
    eval_start <= 1; @(posedge clk); eval_start <= 0;
    while (!dut.u_fsm.in_ut || n_ut_bits < 20) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("UT1 running at %0t", $time);
    chk(st1_exp >= 0 && shadow.exists(A_ST1) && int'(shadow[A_ST1]) == st1_exp, "ST1 count stored");
    chk(st2_exp.size() == 16, "sixteen ST2 challenges");
    for (int k = 0; k < st2_exp.size(); k++)
      chk(shadow.exists(A_ST2 + k) && int'(shadow[A_ST2 + k]) == st2_exp[k], $sformatf("ST2 sum %0d", k));
    chk(busy, "evaluation in progress");
    raddr <= A_ST1; @(posedge clk); @(posedge clk); #1;
    chk(rdata == shadow[A_ST1], "memory read port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
