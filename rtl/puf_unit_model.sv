// puf_unit_model: behavioural model of one PDL arbiter PUF unit: a switch
// block of L programmable-delay-line switches, a tune block of R delay
// elements per path, and the arbiter flip-flop.
//
// The race between the two paths is analog, so it is modelled with the
// usual additive delay model. Each instance draws its own stage delay
// differences w_0..w_L and a routing bias from a generator seeded by SEED.
// For challenge c the delay difference (bottom minus top) is
//   delta = sum_i w_i * phi_i(c) + w_L + bias
//           + TUNE_STEP * (ones(tune_bot) - ones(tune_top)) + noise,
// phi_i(c) = prod_{j>=i} (1 - 2 c_j), with fresh noise (roughly Gaussian,
// standard deviation about NOISE) on every evaluation. The arbiter outputs
// 1 when the top path is faster (delta > 0). All delays are integers in
// arbitrary units.
//
// Interface: one evaluation per cycle in which fire is high; resp is
// updated on that clock edge.
module puf_unit_model #(
  parameter int unsigned L         = 64,
  parameter int unsigned R         = 16,
  parameter int unsigned SEED      = 1,
  parameter int          WMAX      = 100,
  parameter int          BIAS_MAX  = 600,
  parameter int          TUNE_STEP = 60,
  parameter int          NOISE     = 30
) (
  input  logic         clk,
  input  logic         fire,
  input  logic [L-1:0] c,
  input  logic [R-1:0] tune_top,
  input  logic [R-1:0] tune_bot,
  output logic         resp
);
  int w [L+1];
  int bias;

  // xorshift32 generator for the per-instance delays
  function automatic int unsigned xs(input int unsigned s);
    int unsigned x;
    x = s;
    x ^= x << 13;
    x ^= x >> 17;
    x ^= x << 5;
    return x;
  endfunction

  initial begin
    int unsigned s;
    s = 32'h9E3779B9 ^ (SEED * 32'h85EBCA6B);
    for (int i = 0; i <= L; i++) begin
      s = xs(s);
      w[i] = int'(s % (2 * WMAX + 1)) - WMAX;
    end
    s = xs(s);
    bias = int'(s % (2 * BIAS_MAX + 1)) - BIAS_MAX;
    resp = 1'b0;
  end

  function automatic int delta_of(input logic [L-1:0] ch,
                                  input logic [R-1:0] tt,
                                  input logic [R-1:0] tb);
    int acc, phi;
    acc = w[L] + bias + TUNE_STEP * ($countones(tb) - $countones(tt));
    phi = 1;
    for (int i = L - 1; i >= 0; i--) begin
      phi = ch[i] ? -phi : phi;
      acc += w[i] * phi;
    end
    return acc;
  endfunction

  always @(posedge clk) begin
    if (fire) begin
      int n;
      n = 0;
      for (int k = 0; k < 4; k++) n += int'($urandom_range(2 * NOISE)) - NOISE;
      resp <= (delta_of(c, tune_top, tune_bot) + n) > 0;
    end
  end

endmodule
