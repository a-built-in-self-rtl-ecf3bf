// entropy_estimator: online min-entropy level of each TRNG unit.
//
// Each unit's raw bits are grouped into 2-bit words (W = 2); four counters
// per unit count the words of a window of N_WORDS words. C_max, the count of
// the most common word, gives the most-common-value estimate
//   E = min(W, -log2((C_max + 2.3*sqrt(C_max(1 - C_max/N)))/N)),
// quantised to a level 0..7 (level l means E >= l/4). Instead of evaluating
// E, C_max is compared with the eight C_max values at which E crosses
// 2.0, 1.75, ..., 0.25 for N = 10000: the level is the number of those
// thresholds that are >= C_max, saturated at 7.
//
// Unit i starts i cycles after unit 0, so the units' windows end on
// different cycles and one C_max/level evaluator is shared by all of them.
// A warning is raised while one or two units are below MIN_LEVEL and an
// error while more than two are.
//
// Interface: bits are taken while en is high (every cycle in this design).
// upd_valid pulses 3 cycles after the last bit of a unit's window with the
// unit number and its new level; level[] holds the latest level of every
// unit (7 after reset).
module entropy_estimator #(
  parameter int unsigned Q         = 16,
  parameter int unsigned N_WORDS   = 10000,
  parameter int unsigned MIN_LEVEL = 4,
  parameter int unsigned THR [8]   = '{2401, 2869, 3426, 4091, 4885, 5833, 6965, 8323}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [Q-1:0]         unit_bits,
  output logic [2:0]           level [Q],
  output logic                 upd_valid,
  output logic [$clog2(Q)-1:0] upd_unit,
  output logic [2:0]           upd_level,
  output logic                 warning,
  output logic                 error
);
  localparam int QW = $clog2(Q);
  localparam int NW = $clog2(N_WORDS + 1);

  logic [QW:0]   start_cnt;
  logic [Q-1:0]  active;
  logic [Q-1:0]  half;           // first bit of a word held
  logic [Q-1:0]  first_bit;
  logic [NW-1:0] wcnt [Q];
  logic [NW-1:0] occ  [Q][4];
  logic [Q-1:0]  ending;

  // shared evaluator
  logic          e1_v, e2_v;
  logic [QW-1:0] e1_u, e2_u;
  logic [NW-1:0] e1_c [4];
  logic [NW-1:0] e2_cmax;

  always_comb begin
    for (int i = 0; i < Q; i++)
      ending[i] = en && active[i] && half[i] && (wcnt[i] == NW'(N_WORDS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_cnt <= '0; active <= '0; half <= '0; first_bit <= '0;
      for (int i = 0; i < Q; i++) begin
        wcnt[i] <= '0;
        for (int w = 0; w < 4; w++) occ[i][w] <= '0;
      end
    end else if (en) begin
      if (start_cnt != (QW+1)'(Q)) start_cnt <= start_cnt + 1'b1;
      for (int i = 0; i < Q; i++) begin
        if (start_cnt == (QW+1)'(i)) active[i] <= 1'b1;
        if (active[i]) begin
          half[i] <= ~half[i];
          if (!half[i]) begin
            first_bit[i] <= unit_bits[i];
          end else begin
            logic [1:0] word;
            word = {first_bit[i], unit_bits[i]};
            if (ending[i]) begin
              wcnt[i] <= '0;
              for (int w = 0; w < 4; w++) occ[i][w] <= '0;
            end else begin
              wcnt[i] <= wcnt[i] + 1'b1;
              occ[i][word] <= occ[i][word] + 1'b1;
            end
          end
        end
      end
    end
  end

  // Stage 1: select the unit whose window ends (at most one per cycle) and
  // capture its final counts.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_v <= 1'b0; e1_u <= '0;
      for (int w = 0; w < 4; w++) e1_c[w] <= '0;
    end else begin
      e1_v <= |ending;
      for (int i = 0; i < Q; i++) begin
        if (ending[i]) begin
          logic [1:0] word;
          word = {first_bit[i], unit_bits[i]};
          e1_u <= QW'(i);
          for (int w = 0; w < 4; w++)
            e1_c[w] <= occ[i][w] + NW'(word == 2'(w));
        end
      end
    end
  end

  // Stage 2: C_max (comparator tree).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2_v <= 1'b0; e2_u <= '0; e2_cmax <= '0;
    end else begin
      logic [NW-1:0] m01, m23;
      m01 = (e1_c[0] > e1_c[1]) ? e1_c[0] : e1_c[1];
      m23 = (e1_c[2] > e1_c[3]) ? e1_c[2] : e1_c[3];
      e2_v    <= e1_v;
      e2_u    <= e1_u;
      e2_cmax <= (m01 > m23) ? m01 : m23;
    end
  end

  // Stage 3: level from eight threshold comparators.
  logic [3:0] nlev;
  always_comb begin
    nlev = '0;
    for (int k = 0; k < 8; k++)
      if (32'(e2_cmax) <= THR[k]) nlev = nlev + 1'b1;
    if (nlev > 4'd7) nlev = 4'd7;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < Q; i++) level[i] <= 3'd7;
      upd_valid <= 1'b0; upd_unit <= '0; upd_level <= '0;
    end else begin
      upd_valid <= e2_v;
      if (e2_v) begin
        level[e2_u] <= nlev[2:0];
        upd_unit    <= e2_u;
        upd_level   <= nlev[2:0];
      end
    end
  end

  // Warning / error flags from the latest levels.
  logic [QW:0] low_cnt;
  always_comb begin
    low_cnt = '0;
    for (int i = 0; i < Q; i++)
      if (32'(level[i]) < MIN_LEVEL) low_cnt = low_cnt + 1'b1;
    warning = (low_cnt >= 1) && (low_cnt <= 2);
    error   = (low_cnt > 2);
  end

endmodule
