// tb_ring_oscillator: measures the model's period before and after a change
// of half_period, and checks that it stops while disabled.
// The oscillator is a model of an analog part; the periods are arbitrary.
module tb_ring_oscillator;
  logic en = 0, ro;
  int checks = 0, failures = 0;

  ring_oscillator #(.HALF_PERIOD(20)) dut (.en, .ro);

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
    realtime t0, t1;
    #200;
    chk(ro == 0, "idle while disabled");
    en = 1;
    @(posedge ro); t0 = $realtime;
    repeat (10) @(posedge ro);
    t1 = $realtime;
    chk((t1 - t0) == 400.0, $sformatf("period 40 (10 periods = %0t)", t1 - t0));
    dut.half_period = 30;
    @(posedge ro); @(posedge ro); t0 = $realtime;
    repeat (10) @(posedge ro);
    t1 = $realtime;
    chk((t1 - t0) == 600.0, "period follows half_period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
