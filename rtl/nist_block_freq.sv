// nist_block_freq: NIST SP800-22 Frequency-within-a-Block test on
// N_BLK blocks of M_LEN bits (n = N_BLK*M_LEN).
//
// chi^2 = (4/M) * sum_i (ones_i - M/2)^2 and P = igamc(N/2, chi^2/2) > alpha
// becomes chi^2 < chi2inv(1-alpha, N). With d_i = 2*ones_i - M this is
// sum_i d_i^2 < CHI2_95 * M, so only d_i^2 is accumulated. CHI2_95 is the
// 95% point of the chi-square distribution with N_BLK degrees of freedom
// (124.342 for N_BLK = 100); it must be changed together with N_BLK.
//
// Interface: one bit per cycle while bit_valid; clear restarts the sequence.
// Timing: res_valid pulses 2 cycles after the last bit of the sequence.
module nist_block_freq #(
  parameter int unsigned N_BLK   = 100,
  parameter int unsigned M_LEN   = 200,
  parameter real         CHI2_95 = 124.34211340400407
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
  localparam longint BOUND = longint'(CHI2_95 * M_LEN);  // pass: sum <= BOUND

  logic [MW-1:0] bcnt, ones;
  logic [NW-1:0] blk;
  longint        acc;
  logic          s1, s2;
  longint        last_d2;
  logic          pass_q;

  function automatic longint dsq(input logic [MW-1:0] o);
    longint d;
    d = 2 * longint'(o) - longint'(M_LEN);
    return d * d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt <= '0; ones <= '0; blk <= '0; acc <= 0;
      s1 <= 1'b0; s2 <= 1'b0; last_d2 <= 0; pass_q <= 1'b0;
    end else begin
      s1 <= 1'b0;
      s2 <= s1;
      if (s1) pass_q <= (acc + last_d2) <= BOUND;
      if (clear) begin
        bcnt <= '0; ones <= '0; blk <= '0; acc <= 0;
      end else begin
        if (s1) acc <= 0;
        if (bit_valid) begin
          if (bcnt == MW'(M_LEN - 1)) begin
            bcnt <= '0;
            ones <= '0;
            if (blk == NW'(N_BLK - 1)) begin
              blk     <= '0;
              last_d2 <= dsq(ones + MW'(bit_in));
              s1      <= 1'b1;
            end else begin
              blk <= blk + 1'b1;
              acc <= (s1 ? 0 : acc) + dsq(ones + MW'(bit_in));
            end
          end else begin
            bcnt <= bcnt + 1'b1;
            ones <= ones + MW'(bit_in);
          end
        end
      end
    end
  end

  assign res_valid = s2;
  assign res_pass  = pass_q;

endmodule
