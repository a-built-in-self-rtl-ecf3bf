// nist_nonoverlap: NIST SP800-22 Non-overlapping Template Matching test with
// one m-bit template, N_BLK blocks of M_LEN bits.
//
// Inside each block an m-bit window slides one bit at a time; on a match
// with TEMPLATE the count W_j is incremented and the window restarts after
// the match (no overlap). Windows never span two blocks. With
// mu = (M-m+1)/2^m and sigma^2 = M(1/2^m - (2m-1)/2^2m), the statistic
// chi^2 = sum (W_j - mu)^2 / sigma^2 < chi2inv(0.95, N) is evaluated scaled
// by 2^2m: sum (W_j*2^m - (M-m+1))^2 < CHI2_95 * M * (2^m - 2m + 1).
// CHI2_95 must follow N_BLK (15.507 for N_BLK = 8).
//
// Interface: one bit per cycle while bit_valid; clear restarts the sequence.
// Timing: res_valid pulses 2 cycles after the last bit of the sequence.
module nist_nonoverlap #(
  parameter int unsigned N_BLK    = 8,
  parameter int unsigned M_LEN    = 256,
  parameter int unsigned TM       = 9,
  parameter logic [8:0]  TEMPLATE = 9'b000000001,
  parameter real         CHI2_95  = 15.50731305586545
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
  localparam longint MU_S  = longint'(M_LEN - TM + 1);
  localparam longint BOUND =
      longint'(CHI2_95 * M_LEN * ((2.0 ** TM) - 2.0 * TM + 1.0));

  logic [MW-1:0] bcnt, wcnt, fill;
  logic [NW-1:0] blk;
  logic [TM-1:0] win;
  longint        acc, last_t;
  logic          s1, s2, pass_q;

  logic [TM-1:0] win_n;
  logic          hit;
  always_comb begin
    win_n = {win[TM-2:0], bit_in};
    hit   = (fill >= MW'(TM - 1)) && (win_n == TEMPLATE[TM-1:0]);
  end

  function automatic longint term(input logic [MW-1:0] w);
    longint d;
    d = (longint'(w) <<< TM) - MU_S;
    return d * d;
  endfunction

  logic [MW-1:0] w_fin;
  assign w_fin = wcnt + MW'(hit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt <= '0; wcnt <= '0; fill <= '0; blk <= '0; win <= '0;
      acc <= 0; last_t <= 0; s1 <= 1'b0; s2 <= 1'b0; pass_q <= 1'b0;
    end else begin
      s1 <= 1'b0;
      s2 <= s1;
      if (s1) pass_q <= (acc + last_t) < BOUND;
      if (clear) begin
        bcnt <= '0; wcnt <= '0; fill <= '0; blk <= '0; win <= '0; acc <= 0;
      end else begin
        if (s1) acc <= 0;
        if (bit_valid) begin
          win <= win_n;
          if (bcnt == MW'(M_LEN - 1)) begin
            bcnt <= '0; wcnt <= '0; fill <= '0;
            if (blk == NW'(N_BLK - 1)) begin
              blk    <= '0;
              last_t <= term(w_fin);
              s1     <= 1'b1;
            end else begin
              blk <= blk + 1'b1;
              acc <= (s1 ? 0 : acc) + term(w_fin);
            end
          end else begin
            bcnt <= bcnt + 1'b1;
            if (hit) begin
              wcnt <= wcnt + 1'b1;
              fill <= '0;
            end else begin
              fill <= fill + 1'b1;
            end
          end
        end
      end
    end
  end

  assign res_valid = s2;
  assign res_pass  = pass_q;

endmodule
