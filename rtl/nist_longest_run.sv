// nist_longest_run: NIST SP800-22 Longest-Run-of-Ones-in-a-Block test for
// blocks of M = 8 bits, N_BLK blocks per sequence (n = 8*N_BLK).
//
// The longest run of ones of each block falls in one of four classes
// (<=1, 2, 3, >=4) with probabilities 0.2148, 0.3672, 0.2305, 0.1875.
// chi^2 = sum (v_i - N*pi_i)^2 / (N*pi_i) is compared with
// chi2inv(0.95, 3) = 7.8147, i.e. P = igamc(3/2, chi^2/2) > 0.05. The sum is
// formed in fixed point: differences scaled by 2^10, weights 1/(N*pi_i) by
// 2^16, all four terms in parallel.
//
// Interface: one bit per cycle while bit_valid; clear restarts the sequence.
// Timing: res_valid pulses 2 cycles after the last bit of the sequence.
module nist_longest_run #(
  parameter int unsigned N_BLK = 16,
  parameter int unsigned M_LEN = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output logic res_valid,
  output logic res_pass
);
  localparam int MW = $clog2(M_LEN + 1);
  localparam int NW = $clog2(N_BLK + 1);
  localparam real PI [4] = '{0.2148, 0.3672, 0.2305, 0.1875};
  localparam real CHI2_95 = 7.814727903251179;
  localparam longint BOUND = longint'(CHI2_95 * 68719476736.0);  // * 2^36

  logic [MW-1:0] bcnt, run, lmax;
  logic [NW-1:0] blk;
  logic [NW-1:0] v [4];
  logic          s1, s2, pass_q;

  function automatic int unsigned cls(input logic [MW-1:0] r);
    if (r <= 1) return 0;
    else if (r == 2) return 1;
    else if (r == 3) return 2;
    else return 3;
  endfunction

  logic [MW-1:0] run_n, lmax_n;
  always_comb begin
    run_n  = bit_in ? run + 1'b1 : '0;
    lmax_n = (run_n > lmax) ? run_n : lmax;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt <= '0; run <= '0; lmax <= '0; blk <= '0;
      for (int i = 0; i < 4; i++) v[i] <= '0;
      s1 <= 1'b0; s2 <= 1'b0;
    end else begin
      s1 <= 1'b0;
      s2 <= s1;
      if (clear) begin
        bcnt <= '0; run <= '0; lmax <= '0; blk <= '0;
        for (int i = 0; i < 4; i++) v[i] <= '0;
      end else begin
        if (s1) for (int i = 0; i < 4; i++) v[i] <= '0;
        if (bit_valid) begin
          if (bcnt == MW'(M_LEN - 1)) begin
            bcnt <= '0; run <= '0; lmax <= '0;
            for (int i = 0; i < 4; i++)
              if (cls(lmax_n) == i) v[i] <= (s1 ? '0 : v[i]) + 1'b1;
            if (blk == NW'(N_BLK - 1)) begin
              blk <= '0;
              s1  <= 1'b1;
            end else begin
              blk <= blk + 1'b1;
            end
          end else begin
            bcnt <= bcnt + 1'b1;
            run  <= run_n;
            lmax <= lmax_n;
          end
        end
      end
    end
  end

  // Stage 2: chi-square in fixed point over the four class counts.
  longint chi_fx;
  always_comb begin
    chi_fx = 0;
    for (int i = 0; i < 4; i++) begin
      longint d;
      d = longint'(v[i]) * 1024 - longint'(N_BLK * PI[i] * 1024.0 + 0.5);
      chi_fx += d * d * longint'(65536.0 / (N_BLK * PI[i]) + 0.5);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pass_q <= 1'b0;
    else if (s1) pass_q <= (chi_fx < BOUND);
  end

  assign res_valid = s2;
  assign res_pass  = pass_q;

endmodule
