// tb_randomness_tests: runs the seven-test module on a fair random stream
// and then, after a clear, on the periodic stream 000000001 000000001 .... Every test must
// report; on the fair stream each test's pass rate must be high, on the periodic
// stream every result must be a fail. The overlapping-template test
// is shortened to 20 blocks (its block length stays 1023).
module tb_randomness_tests;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, bit_valid = 0, bit_in = 0;
  rt_result_t res;
  int checks = 0, failures = 0;
  int nres [2][NTESTS];
  int npass [2][NTESTS];
  int phase = 0;

  randomness_tests #(.OT_N(20)) dut (.clk, .rst_n, .clear, .bit_valid, .bit_in, .res);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n)
    for (int t = 0; t < NTESTS; t++) if (res.valid[t]) begin
      nres[phase][t]++;
      npass[phase][t] += res.pass[t];
    end

  initial begin
    for (int p = 0; p < 2; p++) for (int t = 0; t < NTESTS; t++) begin
      nres[p][t] = 0; npass[p][t] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 100000; i++) begin
      bit_valid <= 1; bit_in <= $urandom_range(1);
      @(posedge clk);
    end
    bit_valid <= 0;
    repeat (20) @(posedge clk);
    phase = 1;
    clear <= 1; @(posedge clk); clear <= 0;
    for (int i = 0; i < 100000; i++) begin
      bit_valid <= 1; bit_in <= (i % 9 == 8);
      @(posedge clk);
    end
    bit_valid <= 0;
    repeat (20) @(posedge clk);
    for (int t = 0; t < NTESTS; t++) begin
      chk(nres[0][t] >= 4, $sformatf("test %0d reported on fair stream (%0d)", t, nres[0][t]));
      chk(npass[0][t] * 10 >= nres[0][t] * 7,
          $sformatf("test %0d passes fair stream (%0d/%0d)", t, npass[0][t], nres[0][t]));
      chk(nres[1][t] >= 4, $sformatf("test %0d reported on periodic stream", t));
      chk(npass[1][t] == 0, $sformatf("test %0d fails periodic stream (%0d)", t, npass[1][t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
