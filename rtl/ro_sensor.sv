// ro_sensor: frequency counter of the RO-based delay/temperature sensor.
//
// The ring-oscillator output is brought into the clock domain with two
// flip-flops, and its rising edges are counted over a window of WINDOW
// clock cycles. At the end of every window the count is published on
// count with a one-cycle valid strobe and counting restarts. The count is
// proportional to the oscillator frequency as long as that frequency is
// below half the clock frequency.
module ro_sensor #(
  parameter int unsigned WINDOW = 1024,
  parameter int unsigned CW     = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ro,
  output logic [CW-1:0] count,
  output logic          valid
);
  localparam int WW = $clog2(WINDOW);

  logic [2:0]    sync;
  logic [WW-1:0] wcnt;
  logic [CW-1:0] ecnt;
  logic          edge_s;

  assign edge_s = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0; wcnt <= '0; ecnt <= '0; count <= '0; valid <= 1'b0;
    end else begin
      sync  <= {sync[1:0], ro};
      valid <= 1'b0;
      if (wcnt == WW'(WINDOW - 1)) begin
        wcnt  <= '0;
        count <= ecnt + CW'(edge_s);
        ecnt  <= '0;
        valid <= 1'b1;
      end else begin
        wcnt <= wcnt + 1'b1;
        ecnt <= ecnt + CW'(edge_s);
      end
    end
  end

endmodule
