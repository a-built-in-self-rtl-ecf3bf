// tb_puf_unit_model: with the noise turned off the unit must be a fixed
// function of challenge and tuning; the testbench recomputes the additive
// delay difference from the unit's own stage weights (each stage's delay
// difference enters with the sign set by the crossings after it) and checks
// every response. It then checks that tuning the bottom row pushes the
// response toward 1 and the top row toward 0, and that with noise on some
// challenges near the threshold give unstable responses.
// The additive delay model is this design's stand-in for the analog race.
module tb_puf_unit_model;
  localparam int L = 64, R = 16;
  logic clk = 0, fire = 0;
  logic [L-1:0] c;
  logic [R-1:0] tt, tb;
  logic r0, r1;
  int checks = 0, failures = 0;

  puf_unit_model #(.L(L), .R(R), .SEED(7), .NOISE(0))  u0 (.clk, .fire, .c, .tune_top(tt), .tune_bot(tb), .resp(r0));
  puf_unit_model #(.L(L), .R(R), .SEED(7), .NOISE(60)) u1 (.clk, .fire, .c, .tune_top(tt), .tune_bot(tb), .resp(r1));

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

  function automatic int ref_delta(input logic [L-1:0] ch, input int nt, input int nb);
    int s;
    s = u0.w[L] + u0.bias + 60 * (nb - nt);
    for (int i = 0; i < L; i++) begin
      int crossings;
      crossings = $countones(ch >> i);   // crossings at stage i and after
      s += (crossings % 2) ? -u0.w[i] : u0.w[i];
    end
    return s;
  endfunction

  task automatic excite(input logic [L-1:0] ch);
    c <= ch; fire <= 1; @(posedge clk); fire <= 0; #1;
  endtask

  initial begin
    int ones_lo, ones_mid, ones_hi, unstable;
    tt = '0; tb = '0; c = '0;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      logic [L-1:0] ch;
      int nt, nb;
      ch = {$urandom, $urandom};
      nt = (t % 3 == 1) ? $urandom_range(R) : 0;
      nb = (t % 3 == 2) ? $urandom_range(R) : 0;
      tt = (R'(1) << nt) - 1; if (nt == R) tt = '1;
      tb = (R'(1) << nb) - 1; if (nb == R) tb = '1;
      excite(ch);
      chk(r0 == (ref_delta(ch, nt, nb) > 0), $sformatf("noise-free response, challenge %h", ch));
    end
    ones_lo = 0; ones_mid = 0; ones_hi = 0;
    for (int t = 0; t < 400; t++) begin
      logic [L-1:0] ch;
      ch = {$urandom, $urandom};
      tt = '1; tb = '0; excite(ch); ones_lo  += r0;
      tt = '0; tb = '0; excite(ch); ones_mid += r0;
      tt = '0; tb = '1; excite(ch); ones_hi  += r0;
    end
    chk(ones_lo < ones_mid && ones_mid < ones_hi,
        $sformatf("tuning moves the response (%0d %0d %0d)", ones_lo, ones_mid, ones_hi));
    unstable = 0;
    tt = '0; tb = '0;
    for (int t = 0; t < 200; t++) begin
      logic [L-1:0] ch;
      int n1;
      ch = {$urandom, $urandom};
      n1 = 0;
      for (int k = 0; k < 8; k++) begin excite(ch); n1 += r1; end
      if (n1 != 0 && n1 != 8) unstable++;
    end
    chk(unstable > 0 && unstable < 100, $sformatf("noise makes some responses unstable (%0d)", unstable));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
