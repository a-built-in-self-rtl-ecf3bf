// tb_diffusion_layer: compares the layer with a reference that multiplies
// nibbles in GF(2^4) by shift-and-add with reduction by x^4+x+1, over
// random and single-bit inputs, and checks that the layer is linear
// (d(a^b) = d(a)^d(b)) and that a single input bit reaches several outputs.
// The 4x4 nibble matrix of rank 3 follows the original scheme; the matrix
// entries and the field polynomial are this design's own choice.
module tb_diffusion_layer;
  localparam int L = 64;
  logic [L-1:0] e, d;
  int checks = 0, failures = 0;
  int mtx [4][4] = '{'{2, 3, 1, 1}, '{1, 2, 3, 1}, '{1, 1, 2, 3}, '{2, 0, 0, 3}};

  diffusion_layer #(.L(L)) dut (.e, .d);

  initial begin : watchdog
    #1000000;
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

  function automatic logic [L-1:0] ref_d(input logic [L-1:0] x);
    logic [L-1:0] y;
    y = '0;
    for (int col = 0; col < L / 16; col++)
      for (int r = 0; r < 4; r++) begin
        int acc; acc = 0;
        for (int j = 0; j < 4; j++) acc ^= gf_mul(mtx[r][j], int'(x[16*col + 4*j +: 4]));
        y[16*col + 4*r +: 4] = 4'(acc);
      end
    return y;
  endfunction

  initial begin
    logic [L-1:0] a, b, da, db;
    int spread;
    for (int t = 0; t < 200; t++) begin
      e = {$urandom, $urandom}; #1;
      chk(d == ref_d(e), $sformatf("random input %h", e));
    end
    spread = 0;
    for (int i = 0; i < L; i++) begin
      e = '0; e[i] = 1'b1; #1;
      chk(d == ref_d(e), $sformatf("single bit %0d", i));
      spread += $countones(d);
    end
    chk(spread > 2 * L, "single input bits spread to several outputs");
    for (int t = 0; t < 50; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      e = a; #1; da = d;
      e = b; #1; db = d;
      e = a ^ b; #1;
      chk(d == (da ^ db), "linearity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
