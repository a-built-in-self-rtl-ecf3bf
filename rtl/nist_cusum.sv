// nist_cusum: NIST SP800-22 Cumulative Sums test, forward and backward
// modes, on blocks of N_BITS bits.
//
// The random walk S_k (+1 for a one, -1 for a zero) is tracked with its
// running maximum and minimum (S_0 = 0 included). Forward excursion
// z_f = max(maxS, -minS); backward excursion z_b = max(S_n - minS,
// maxS - S_n). The P-value is a decreasing function of z, so P > alpha
// becomes z <= Z_MAX; Z_MAX = 316 is the largest z with P >= 0.05 for
// n = 20000 (NIST P-value series evaluated offline) and must follow N_BITS.
// The block passes when both modes pass.
//
// Interface: one bit per cycle while bit_valid; clear restarts the block.
// Timing: res_valid pulses 2 cycles after the last bit of the block.
module nist_cusum #(
  parameter int unsigned N_BITS = 20000,
  parameter int unsigned Z_MAX  = 316
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output logic res_valid,
  output logic res_pass
);
  localparam int CW = $clog2(N_BITS + 1);
  localparam int SW = CW + 2;

  logic [CW-1:0]        cnt;
  logic signed [SW-1:0] s, smax, smin;
  logic signed [SW-1:0] s_f, smax_f, smin_f;
  logic                 s1, s2, pass_q;

  logic signed [SW-1:0] s_n, smax_n, smin_n;
  always_comb begin
    s_n    = bit_in ? s + 1 : s - 1;
    smax_n = (s_n > smax) ? s_n : smax;
    smin_n = (s_n < smin) ? s_n : smin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; s <= '0; smax <= '0; smin <= '0;
      s_f <= '0; smax_f <= '0; smin_f <= '0;
      s1 <= 1'b0; s2 <= 1'b0; pass_q <= 1'b0;
    end else begin
      s1 <= 1'b0;
      s2 <= s1;
      if (s1) begin
        logic signed [SW-1:0] zf, zb;
        zf = (smax_f > -smin_f) ? smax_f : -smin_f;
        zb = ((s_f - smin_f) > (smax_f - s_f)) ? (s_f - smin_f) : (smax_f - s_f);
        pass_q <= (zf <= SW'(Z_MAX)) && (zb <= SW'(Z_MAX));
      end
      if (clear) begin
        cnt <= '0; s <= '0; smax <= '0; smin <= '0;
      end else if (bit_valid) begin
        if (cnt == CW'(N_BITS - 1)) begin
          cnt <= '0; s <= '0; smax <= '0; smin <= '0;
          s_f <= s_n; smax_f <= smax_n; smin_f <= smin_n;
          s1  <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1; s <= s_n; smax <= smax_n; smin <= smin_n;
        end
      end
    end
  end

  assign res_valid = s2;
  assign res_pass  = pass_q;

endmodule
