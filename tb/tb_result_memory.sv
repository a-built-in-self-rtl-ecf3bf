// tb_result_memory: random writes and reads against an associative-array
// model; read data is checked one cycle after the address (registered
// read), including a read of the address being written in the same cycle
// (old data).
// The memory organisation is this design's own.
module tb_result_memory;
  localparam int DEPTH = 2048, DW = 16, AW = $clog2(DEPTH);
  logic clk = 0, we = 0;
  logic [AW-1:0] wa, ra;
  logic [DW-1:0] wd, rd;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [int];

  result_memory #(.DEPTH(DEPTH), .DW(DW)) dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    wa = '0; ra = '0; wd = '0;
    // fill a region
    for (int a = 0; a < 64; a++) begin
      we <= 1; wa <= AW'(a * 31); wd <= DW'($urandom); @(posedge clk);
      model[a * 31] = wd;
    end
    for (int t = 0; t < 2000; t++) begin
      int a, r;
      logic [DW-1:0] expv;
      logic w;
      a = (t % 64) * 31; r = ($urandom_range(63)) * 31;
      w = $urandom_range(1);
      expv = model[r];
      we <= w; wa <= AW'(a); wd <= DW'($urandom); ra <= AW'(r);
      @(posedge clk); #1;
      if (w) model[a] = wd;
      chk(rd == expv, $sformatf("read %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
