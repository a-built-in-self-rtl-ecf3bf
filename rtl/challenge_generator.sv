// challenge_generator: builds L-bit random challenges for the PUF tests and
// the calibration from NSRC true random bit streams (the outputs of four RO
// TRNGs), concatenating NSRC fresh bits per cycle.
//
// A challenge is complete after L/NSRC cycles; it is then held with valid
// high until take is asserted, after which a fresh challenge is assembled
// (no bit is ever reused).
//
// Interface: src carries one new bit of every TRNG each cycle. chal/valid
// are registered; take is honoured only while valid is high.
module challenge_generator #(
  parameter int unsigned L    = 64,
  parameter int unsigned NSRC = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] src,
  input  logic            take,
  output logic [L-1:0]    chal,
  output logic            valid
);
  localparam int unsigned STEPS = L / NSRC;
  localparam int SW = $clog2(STEPS + 1);

  logic [SW-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0; chal <= '0; valid <= 1'b0;
    end else if (valid) begin
      if (take) begin
        valid <= 1'b0;
        fill  <= '0;
      end
    end else begin
      chal <= {chal[L-NSRC-1:0], src};
      if (fill == SW'(STEPS - 1)) begin
        fill  <= '0;
        valid <= 1'b1;
      end else begin
        fill <= fill + 1'b1;
      end
    end
  end

endmodule
