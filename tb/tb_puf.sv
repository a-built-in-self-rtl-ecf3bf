// tb_puf: exercises the three access modes of the PUF.
//  * RAW: one excitation; the response must be the XOR of the unit
//    responses and arrive 2 cycles after the request.
//  * AUTH: T1 excitations; the testbench records the combined bit of every
//    excitation and checks the response is their majority; latency 2*T1.
//  * GEN: V excitations at level+DELTA, V at level-DELTA, V at the level,
//    then the T1-vote; the testbench checks resp_valid against its own count
//    of the first 3V bits and the latency 2*(3V+T1), and that the tuning
//    levels seen by the units during each phase are the shifted ones.
// It also checks the challenge each unit receives against a reference of
// the diffusion layer, the per-unit rotation and the input network.
// Voting and GEN/AUTH behaviour follow the original scheme; T1, V, the tune
// offset and the RAW mode are this design's own choices.
module tb_puf;
  import bist_pkg::*;
  localparam int L = 64, R = 16, Q = 16, T1 = 7, V = 5, DELTA = 2, VM = 1;
  localparam int TW = $clog2(2 * R);
  logic clk = 0, rst_n = 0, req = 0;
  puf_mode_e mode;
  logic [L-1:0] chal;
  logic [TW-1:0] lev [Q];
  logic busy, done, resp, rv;
  logic [Q-1:0] ur;
  int checks = 0, failures = 0;
  int mtx [4][4] = '{'{2, 3, 1, 1}, '{1, 2, 3, 1}, '{1, 1, 2, 3}, '{2, 0, 0, 3}};

  puf #(.L(L), .R(R), .Q(Q), .T1(T1), .V(V), .TUNE_DELTA(DELTA), .VMARGIN(VM)) dut (
    .clk, .rst_n, .req, .mode, .challenge(chal), .tune_level(lev),
    .busy, .done, .response(resp), .resp_valid(rv), .unit_resp(ur));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int gf_mul(input int a, input int b);
    int p; p = 0;
    for (int i = 0; i < 4; i++) if ((b >> i) & 1) p ^= a << i;
    for (int i = 6; i >= 4; i--) if ((p >> i) & 1) p ^= 'h13 << (i - 4);
    return p & 'hf;
  endfunction
  function automatic logic [L-1:0] ref_unit_chal(input logic [L-1:0] x, input int j);
    logic [L-1:0] dd, r, y;
    for (int col = 0; col < L / 16; col++)
      for (int rr = 0; rr < 4; rr++) begin
        int acc; acc = 0;
        for (int k = 0; k < 4; k++) acc ^= gf_mul(mtx[rr][k], int'(x[16*col + 4*k +: 4]));
        dd[16*col + 4*rr +: 4] = 4'(acc);
      end
    r = (dd >> j) | (dd << (L - j));
    for (int i = 0; i < L; i++) begin
      if (i < L / 2) y[i] = r[2*i] ^ r[2*i+1];
      else if (i == L / 2) y[i] = r[0];
      else y[i] = r[2*(i - L/2) - 1] ^ r[2*(i - L/2)];
    end
    return y;
  endfunction

  // record the combined bit of every excitation
  int bits [$];
  always @(posedge clk) if (dut.st == 2'd2) bits.push_back(int'(^dut.ur));

  // tuning seen by the units during the phases
  int tune_bad = 0;
  for (genvar u = 0; u < Q; u++) begin : g_tchk
    always @(posedge clk) if (dut.st == 2'd1) begin
      int e;
      e = int'(lev[u]);
      if (dut.ph == 3'd0) e = e + DELTA;
      if (dut.ph == 3'd1) e = e - DELTA;
      if (e < 0) e = 0;
      if (e > 2 * R - 1) e = 2 * R - 1;
      if (int'(dut.g_unit[u].lev) != e) tune_bad++;
    end
  end

  task automatic run(input puf_mode_e m, input logic [L-1:0] ch, output int cyc);
    mode <= m; chal <= ch; req <= 1;
    bits.delete();
    @(posedge clk); req <= 0;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!done);
  endtask

  initial begin
    int cyc, gen_valid, gen_invalid, flips;
    mode = PUF_RAW; chal = '0;
    for (int u = 0; u < Q; u++) lev[u] = TW'(R - 3 + (u % 7));
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // RAW mode
    for (int t = 0; t < 40; t++) begin
      logic [L-1:0] ch;
      ch = {$urandom, $urandom};
      run(PUF_RAW, ch, cyc);
      chk(cyc == 2, $sformatf("raw latency %0d", cyc));
      chk(resp == ^ur && rv, "raw response is the XOR of the unit responses");
      for (int u = 0; u < Q; u++)
        chk(dut.c[u] == ref_unit_chal(ch, u), $sformatf("challenge of unit %0d", u));
    end
    // AUTH mode
    for (int t = 0; t < 40; t++) begin
      int s;
      run(PUF_AUTH, {$urandom, $urandom}, cyc);
      chk(cyc == 2 * T1, $sformatf("auth latency %0d", cyc));
      s = 0;
      foreach (bits[i]) s += bits[i];
      chk(bits.size() == T1 && resp == (s > T1 / 2) && rv, "auth response is the majority");
    end
    // GEN mode
    gen_valid = 0; gen_invalid = 0; flips = 0;
    for (int t = 0; t < 80; t++) begin
      int s3, sv;
      logic [L-1:0] ch;
      logic r1;
      ch = {$urandom, $urandom};
      run(PUF_GEN, ch, cyc);
      chk(cyc == 2 * (3 * V + T1), $sformatf("gen latency %0d", cyc));
      s3 = 0; sv = 0;
      for (int i = 0; i < 3 * V; i++) s3 += bits[i];
      for (int i = 3 * V; i < 3 * V + T1; i++) sv += bits[i];
      chk(bits.size() == 3 * V + T1, "gen excitation count");
      chk(rv == (s3 <= VM || s3 >= 3 * V - VM), $sformatf("gen valid flag (sum %0d)", s3));
      chk(resp == (sv > T1 / 2), "gen response is the majority of the vote");
      if (rv) begin
        gen_valid++;
        r1 = resp;
        run(PUF_AUTH, ch, cyc);
        if (resp != r1) flips++;
      end else gen_invalid++;
    end
    chk(tune_bad == 0, $sformatf("tuning levels during phases (%0d bad)", tune_bad));
    chk(gen_valid > 0 && gen_invalid > 0, $sformatf("gen marks both kinds (%0d/%0d)", gen_valid, gen_invalid));
    chk(flips * 10 <= gen_valid, $sformatf("stable challenges reproduce (%0d of %0d flipped)", flips, gen_valid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
