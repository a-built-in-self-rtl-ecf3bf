// tb_ro_sensor: drives the sensor with the ring-oscillator model at two
// frequencies and checks every windowed count against the number of RO
// periods in the window (within one), and the window length.
// An RO with a frequency counter follows the original sensor; window and
// synchroniser are this design's own.
module tb_ro_sensor;
  localparam int WIN = 256;
  logic clk = 0, rst_n = 0, ro;
  logic [15:0] count;
  logic valid;
  int checks = 0, failures = 0;

  ring_oscillator #(.HALF_PERIOD(37)) u_ro (.en(1'b1), .ro);
  ro_sensor #(.WINDOW(WIN), .CW(16)) dut (.clk, .rst_n, .ro, .count, .valid);

  always #5 clk = ~clk;   // 10 time-unit clock
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int expv, last_cyc, cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cyc = 0; last_cyc = -1;
    for (int w = 0; w < 12; w++) begin
      if (w == 6) u_ro.half_period = 23;
      do begin @(posedge clk); cyc++; #1; end while (!valid);
      if (w != 0 && w != 6 && w != 7) begin
        expv = (WIN * 10) / (2 * u_ro.half_period);
        chk(int'(count) >= expv - 1 && int'(count) <= expv + 1,
            $sformatf("count %0d vs %0d", count, expv));
      end
      if (last_cyc >= 0) chk(cyc - last_cyc == WIN, "window length");
      last_cyc = cyc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
