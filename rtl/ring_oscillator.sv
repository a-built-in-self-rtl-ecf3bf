// ring_oscillator: behavioural model of the free-running ring oscillator of
// the RO sensor. Its frequency depends on temperature, voltage and aging;
// here the half period (in simulation time units) is the variable
// half_period, which a testbench may change to emulate such a drift.
//
// Interface: ro toggles every half_period while en is high and stays low
// while en is low.
module ring_oscillator #(
  parameter int unsigned HALF_PERIOD = 37
) (
  input  logic en,
  output logic ro
);
  int unsigned half_period;

  initial begin
    half_period = HALF_PERIOD;
    ro = 1'b0;
    forever begin
      #(half_period);
      ro = en ? ~ro : 1'b0;
    end
  end

endmodule
