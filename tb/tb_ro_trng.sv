// tb_ro_trng: checks the model's output bit is the XOR of the unit bits,
// that unbiased units give about half ones, that a biased unit follows its
// set probability and that unit correlation makes neighbours agree.
// The XOR of the unit bits follows the original TRNG; the probability
// controls are this model's own.
module tb_ro_trng;
  localparam int Q = 16;
  logic clk = 0;
  logic [Q-1:0] ub;
  logic ob;
  int checks = 0, failures = 0;

  ro_trng #(.Q(Q)) dut (.clk, .unit_bits(ub), .out_bit(ob));

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

  initial begin
    int ones, ones3, agree, xor_ok;
    ones = 0; ones3 = 0; xor_ok = 0;
    dut.one_prob_pm[3] = 900;
    repeat (2) @(posedge clk);
    for (int c = 0; c < 10000; c++) begin
      @(posedge clk); #1;
      xor_ok += (ob == ^ub);
      ones += ob;
      ones3 += ub[3];
    end
    chk(xor_ok == 10000, "out_bit is the XOR of the unit bits");
    chk(ones > 4700 && ones < 5300, $sformatf("external bit balanced (%0d)", ones));
    chk(ones3 > 8800 && ones3 < 9200, $sformatf("biased unit follows 90%% (%0d)", ones3));
    dut.corr_pm = 1000;
    agree = 0;
    @(posedge clk);
    for (int c = 0; c < 1000; c++) begin
      @(posedge clk); #1;
      agree += (ub[5] == ub[4]);
    end
    chk(agree == 1000, "fully correlated units repeat their neighbour");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
