// tb_challenge_generator: drives known 4-bit source words and checks that
// each challenge is their concatenation (oldest word in the top bits), that
// it becomes valid exactly 16 cycles after the previous take, and that it
// is held until taken.
// Concatenating four TRNG outputs follows the original scheme; the word
// order and the take handshake are this design's own.
module tb_challenge_generator;
  localparam int L = 64;
  logic clk = 0, rst_n = 0, take = 0;
  logic [3:0] src;
  logic [L-1:0] chal;
  logic valid;
  int checks = 0, failures = 0;

  challenge_generator #(.L(L), .NSRC(4)) dut (.clk, .rst_n, .src, .take, .chal, .valid);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [L-1:0] expv;
    src = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 20; r++) begin
      expv = '0;
      for (int k = 0; k < L / 4; k++) begin
        logic [3:0] s;
        s = 4'($urandom);
        src <= s;
        expv = {expv[L-5:0], s};
        @(posedge clk); #1;
        chk(valid == (k == L / 4 - 1), $sformatf("valid after %0d words", k + 1));
      end
      chk(chal == expv, "challenge is the concatenation of the source words");
      // hold for a few cycles
      repeat (r % 4) begin
        src <= 4'($urandom);
        @(posedge clk); #1;
        chk(valid && chal == expv, "challenge held until taken");
      end
      take <= 1; @(posedge clk); take <= 0; #1;
      chk(!valid, "valid drops after take");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
