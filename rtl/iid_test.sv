// iid_test: Wald-Wolfowitz runs test on the internal bit sequences of a
// Q-unit TRNG, used as the online independence (iid) check.
//
// The test sequence interleaves the units: a Q-bit vector is captured, its
// bits b_0..b_{Q-1} are taken one per cycle, and the vectors of the next Q-1
// cycles are skipped, so the sequence is b_0(c)..b_{Q-1}(c), b_0(c+Q), ...
// Three counters track the number of bits n, ones n1 and runs R. With
// A = 2*n1*n0, the runs mean is mu = A/n + 1 and the variance
// (mu-1)(mu-2)/(n-1). The two-sided 5% test |R-mu| < 1.96*sigma is evaluated
// without division or square root as
//   (n*R - A - n)^2 * (n-1) * 625 < A*(A-n) * 2401      (1.96^2 = 2401/625)
// and also requires A > n. A single 64x64 multiplier is used over six
// cycles.
//
// Interface: unit_bits is sampled while en is high. res_valid pulses with
// res_pass 7 cycles after the last bit of each N_BITS-bit sequence. error
// is the iid error signal: it rises with a failing result and stays high
// until a sequence passes.
module iid_test #(
  parameter int unsigned Q      = 16,
  parameter int unsigned N_BITS = 16384
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [Q-1:0] unit_bits,
  output logic         res_valid,
  output logic         res_pass,
  output logic         error
);
  localparam int QW = (Q > 1) ? $clog2(Q) : 1;
  localparam int CW = $clog2(N_BITS + 1);
  localparam longint NL = longint'(N_BITS);
  localparam longint LHS_K = (NL - 1) * 625;

  logic [QW-1:0] qidx;
  logic [Q-1:0]  vec;
  logic          b;
  logic [CW-1:0] cnt, ones, runs;
  logic          prev;
  logic [CW-1:0] n1_f, r_f;

  typedef enum logic [2:0] {C_IDLE, C_P1, C_NR, C_DD, C_LHS, C_AA, C_RHS} cstate_e;
  cstate_e       cs;
  longint        a_q, d_q, p_q;
  logic [127:0]  lhs_w;

  // the one shared multiplier
  longint        m_a, m_b;
  logic [127:0]  m_p;
  assign m_p = 128'(unsigned'(m_a)) * 128'(unsigned'(m_b));

  assign b = (qidx == '0) ? unit_bits[0] : vec[qidx];

  always_comb begin
    m_a = 0; m_b = 0;
    unique case (cs)
      C_P1:  begin m_a = longint'(n1_f); m_b = NL - longint'(n1_f); end
      C_NR:  begin m_a = NL;             m_b = longint'(r_f);        end
      C_DD:  begin m_a = d_q;            m_b = d_q;                  end
      C_LHS: begin m_a = p_q;            m_b = LHS_K;                end
      C_AA:  begin m_a = a_q;            m_b = a_q - NL;             end
      C_RHS: begin m_a = p_q;            m_b = 2401;                 end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qidx <= '0; vec <= '0; cnt <= '0; ones <= '0; runs <= '0; prev <= 1'b0;
      n1_f <= '0; r_f <= '0; cs <= C_IDLE;
      a_q <= 0; d_q <= 0; p_q <= 0; lhs_w <= '0;
      res_valid <= 1'b0; res_pass <= 1'b0; error <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (en) begin
        if (qidx == '0) vec <= unit_bits;
        qidx <= (qidx == QW'(Q - 1)) ? '0 : qidx + 1'b1;
        if (cnt == CW'(N_BITS - 1)) begin
          cnt  <= '0; ones <= '0; runs <= '0;
          n1_f <= ones + CW'(b);
          r_f  <= (b != prev) ? runs + 1'b1 : runs;
          cs   <= C_P1;
        end else begin
          cnt  <= cnt + 1'b1;
          ones <= ones + CW'(b);
          if (cnt == '0 || b != prev) runs <= runs + 1'b1;
        end
        prev <= b;
      end
      unique case (cs)
        C_P1:  begin a_q <= 2 * longint'(m_p[63:0]); cs <= C_NR; end
        C_NR:  begin d_q <= longint'(m_p[63:0]) - a_q - NL; cs <= C_DD; end
        C_DD:  begin p_q <= longint'(m_p[63:0]); cs <= C_LHS; end
        C_LHS: begin lhs_w <= m_p; cs <= C_AA; end
        C_AA:  begin p_q <= longint'(m_p[63:0]); cs <= C_RHS; end
        C_RHS: begin
          res_valid <= 1'b1;
          res_pass  <= (a_q > NL) && (lhs_w < m_p);
          error     <= !((a_q > NL) && (lhs_w < m_p));
          cs        <= C_IDLE;
        end
        default: ;
      endcase
    end
  end

endmodule
