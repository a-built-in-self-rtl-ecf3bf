// tb_tune_decoder: exhaustive over all levels. Level R leaves both tuning
// rows off; level R+k turns on the first k stages of the top row; level R-k
// the first k stages of the bottom row (thermometer code).
// The signed reading of the level around R is this design's own choice.
module tb_tune_decoder;
  localparam int R = 16;
  logic [$clog2(2*R)-1:0] level;
  logic [R-1:0] top, bot;
  int checks = 0, failures = 0;

  tune_decoder #(.R(R)) dut (.level, .tune_top(top), .tune_bot(bot));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int lv = 0; lv < 2 * R; lv++) begin
      int nt, nb;
      logic [R-1:0] et, eb;
      level = lv[$clog2(2*R)-1:0]; #1;
      nt = (lv > R) ? lv - R : 0;
      nb = (lv < R) ? R - lv : 0;
      et = (R'(1) << nt) - 1;
      eb = (R'(1) << nb) - 1;
      if (nb == R) eb = '1;
      chk(top == et, $sformatf("level %0d top %b", lv, top));
      chk(bot == eb, $sformatf("level %0d bottom %b", lv, bot));
      chk(!(|top && |bot), "rows never tuned together");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
