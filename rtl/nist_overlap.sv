// nist_overlap: NIST SP800-22 Overlapping Template Matching test with the
// m = 9 all-ones template, N_BLK blocks of M_LEN bits and K = 5.
//
// Each block's number of (overlapping) occurrences of the template is put
// in class min(count, 5). chi^2 = sum_i (v_i - N*pi_i)^2 / (N*pi_i) over the
// six classes is compared with chi2inv(0.95, 5) = 11.0705. pi_i follow
// NIST's formula with eta = (M-m+1)/2^(m+1):
// pi_0 = exp(-eta), pi_u = sum_{l=1..u} e^-eta 2^-u eta^l/l! C(u-1,l-1),
// pi_5 = 1 - sum; the values below are those for M = 1023, m = 9. The six
// terms are accumulated one per cycle with one multiplier.
//
// Interface: one bit per cycle while bit_valid; clear restarts the sequence.
// Timing: res_valid pulses 7 cycles after the last bit of the sequence.
module nist_overlap #(
  parameter int unsigned N_BLK = 1000,
  parameter int unsigned M_LEN = 1023
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output logic res_valid,
  output logic res_pass
);
  localparam int unsigned TM = 9;
  localparam int MW = $clog2(M_LEN + 1);
  localparam int NW = $clog2(N_BLK + 1);
  localparam real PI [6] = '{0.3711270071972147, 0.1839325743677602,
                             0.1375452820528441, 0.09909187149996633,
                             0.06940336172438316, 0.13889990315783152};
  localparam real CHI2_95 = 11.070497693516351;
  localparam longint BOUND = longint'(CHI2_95 * 1099511627776.0);  // * 2^40

  logic [MW-1:0] bcnt, fill;
  logic [2:0]    mcnt;                 // saturating at 5
  logic [NW-1:0] blk;
  logic [TM-1:0] win;
  logic [NW-1:0] v [6];
  logic [NW-1:0] vs [6];               // snapshot being evaluated
  logic          busy, done_q, pass_q;
  logic [2:0]    idx;
  longint        acc;

  logic [TM-1:0] win_n;
  logic          hit;
  logic [2:0]    mcnt_fin;
  always_comb begin
    win_n    = {win[TM-2:0], bit_in};
    hit      = (fill >= MW'(TM - 1)) && (&win_n);
    mcnt_fin = (hit && mcnt != 3'd5) ? mcnt + 3'd1 : mcnt;
  end

  // One chi-square term per cycle (differences * 2^8, weights * 2^24).
  longint d, t;
  always_comb begin
    d = longint'(vs[idx]) * 256 - longint'(N_BLK * PI[idx] * 256.0 + 0.5);
    t = d * d * longint'(16777216.0 / (N_BLK * PI[idx]) + 0.5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt <= '0; fill <= '0; mcnt <= '0; blk <= '0; win <= '0;
      for (int i = 0; i < 6; i++) begin v[i] <= '0; vs[i] <= '0; end
      busy <= 1'b0; done_q <= 1'b0; pass_q <= 1'b0; idx <= '0; acc <= 0;
    end else begin
      done_q <= 1'b0;
      if (busy) begin
        acc <= acc + t;
        if (idx == 3'd5) begin
          busy   <= 1'b0;
          done_q <= 1'b1;
          pass_q <= (acc + t) < BOUND;
        end else begin
          idx <= idx + 1'b1;
        end
      end
      if (clear) begin
        bcnt <= '0; fill <= '0; mcnt <= '0; blk <= '0; win <= '0;
        for (int i = 0; i < 6; i++) v[i] <= '0;
      end else if (bit_valid) begin
        win <= win_n;
        if (bcnt == MW'(M_LEN - 1)) begin
          bcnt <= '0; fill <= '0; mcnt <= '0;
          if (blk == NW'(N_BLK - 1)) begin
            blk <= '0;
            for (int i = 0; i < 6; i++) begin
              vs[i] <= v[i] + NW'(mcnt_fin == 3'(i));
              v[i]  <= '0;
            end
            busy <= 1'b1;
            idx  <= '0;
            acc  <= 0;
          end else begin
            blk <= blk + 1'b1;
            for (int i = 0; i < 6; i++)
              if (mcnt_fin == 3'(i)) v[i] <= v[i] + 1'b1;
          end
        end else begin
          bcnt <= bcnt + 1'b1;
          fill <= fill + 1'b1;
          mcnt <= mcnt_fin;
        end
      end
    end
  end

  assign res_valid = done_q;
  assign res_pass  = pass_q;

endmodule
