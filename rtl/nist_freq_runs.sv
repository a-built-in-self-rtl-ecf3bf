// nist_freq_runs: NIST SP800-22 Frequency (monobit) and Runs tests on blocks
// of N_BITS bits, sharing one ones-counter as in the hardware NIST tests this
// BIST builds on.
//
// Frequency: with k ones in n bits, P = erfc(|2k-n|/sqrt(2n)) > alpha becomes
// |2k-n| < sqrt(2n)*erfcinv(alpha). Runs: with V runs, P > alpha becomes
// |n*V - 2k(n-k)| < c*k(n-k), c = 2*erfcinv(alpha)*sqrt(2n)/n, evaluated
// with c in 20-bit fixed point; the NIST prerequisite |2k-n| < 4*sqrt(n) must
// also hold. alpha = 0.05 (bounds derived at elaboration from N_BITS).
//
// Interface: one bit per cycle while bit_valid; clear restarts the block.
// Timing: freq_valid pulses 1 cycle and runs_valid 2 cycles after the last
// bit of a block (the latencies quoted for these tests). Blocks follow each
// other without a gap.
module nist_freq_runs #(
  parameter int unsigned N_BITS = 20000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output logic freq_valid,
  output logic freq_pass,
  output logic runs_valid,
  output logic runs_pass
);
  import bist_pkg::*;

  localparam int CW = $clog2(N_BITS + 1);
  localparam longint FREQ_BOUND = longint'($sqrt(2.0 * N_BITS) * ERFCINV_A);
  localparam longint PRE_BOUND  = longint'(4.0 * $sqrt(1.0 * N_BITS));
  localparam longint RUNS_C20   =
      longint'(2.0 * ERFCINV_A * $sqrt(2.0 * N_BITS) / N_BITS * 1048576.0);

  logic [CW-1:0] cnt, ones, runs;
  logic          prev;
  logic          last;
  logic [CW-1:0] k_f, v_f;
  logic          s1, s2;
  longint        kk, nv;           // k(n-k), n*V
  logic          pre_ok_q;

  assign last = bit_valid && (cnt == CW'(N_BITS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; ones <= '0; runs <= '0; prev <= 1'b0;
      k_f <= '0; v_f <= '0; s1 <= 1'b0; s2 <= 1'b0;
      kk <= 0; nv <= 0; pre_ok_q <= 1'b0;
    end else begin
      s1 <= 1'b0;
      s2 <= s1;
      if (clear) begin
        cnt <= '0; ones <= '0; runs <= '0;
      end else if (bit_valid) begin
        if (last) begin
          cnt  <= '0;
          ones <= '0;
          runs <= '0;
          k_f  <= ones + CW'(bit_in);
          v_f  <= (cnt == '0 || bit_in != prev) ? runs + 1'b1 : runs;
          s1   <= 1'b1;
        end else begin
          cnt  <= cnt + 1'b1;
          ones <= ones + CW'(bit_in);
          if (cnt == '0 || bit_in != prev) runs <= runs + 1'b1;
        end
        prev <= bit_in;
      end
      if (s1) begin
        longint d;
        d  = 2 * longint'(k_f) - longint'(N_BITS);
        if (d < 0) d = -d;
        pre_ok_q  <= (d < PRE_BOUND);
        kk <= longint'(k_f) * (longint'(N_BITS) - longint'(k_f));
        nv <= longint'(N_BITS) * longint'(v_f);
      end
    end
  end

  // Stage 2: runs decision
  longint dev;
  always_comb begin
    dev = nv - 2 * kk;
    if (dev < 0) dev = -dev;
  end

  assign freq_valid = s1;
  always_comb begin
    longint d;
    d = 2 * longint'(k_f) - longint'(N_BITS);
    if (d < 0) d = -d;
    freq_pass = (d <= FREQ_BOUND);
  end
  assign runs_valid = s2;
  assign runs_pass  = pre_ok_q && ((dev <<< 20) < RUNS_C20 * kk);

endmodule
