// tune_decoder: turns a tune level into the selector words of the top and
// bottom tune-block delay lines of one PUF unit.
//
// The level has log2(2R) bits. Level R means balanced paths. A level above
// R switches (level - R) extra delay elements into the top path, a level
// below R switches (R - level) into the bottom path; elements are enabled
// from bit 0 upwards (thermometer code). The Hamming distance between the
// two words is therefore |level - R|. Purely combinational.
module tune_decoder #(
  parameter int unsigned R = 16
) (
  input  logic [$clog2(2*R)-1:0] level,
  output logic [R-1:0]           tune_top,
  output logic [R-1:0]           tune_bot
);
  always_comb begin
    tune_top = '0;
    tune_bot = '0;
    for (int k = 0; k < R; k++) begin
      if (32'(level) > R + k) tune_top[k] = 1'b1;
      if (32'(level) + k < R) tune_bot[k] = 1'b1;
    end
  end

endmodule
