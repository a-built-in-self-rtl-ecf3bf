// bist_fsm: controller of the BIST for the TRNG and the PUF.
//
// TRNG evaluation runs continuously: the TRNG's output bit feeds the shared
// randomness test module every cycle, and for each test the pass bits of
// ROUNDS consecutive results are summed. When a test has ROUNDS results its
// sum (success rate = sum/ROUNDS) is written to the result memory (16 round
// slots of 8 words) and trng_sr_low[t] tells whether it fell below
// SR_MIN_PCT percent. Entropy levels from the entropy estimator are also
// written to memory as they are produced.
//
// After reset the PUF is calibrated (puf_calibration) and the chosen tune
// levels are written to memory. A pulse on puf_eval_start then runs one PUF
// evaluation, in this order:
//   ST1  the next RO-sensor count is stored;
//   ST2  for ST2_CHAL random challenges, the challenge is applied T2 times
//        (voted responses at the optimum tune levels) and the sum S_R is
//        stored; st2_stable counts sums within ST2_MARGIN of 0 or T2;
//   UT1  the responses to random challenges feed the randomness tests;
//   UT2  for i = 1..L: response(X) xor response(X with bit i inverted);
//   UT3  for h = 1..L: response(X) xor response(X with h bits inverted; the
//        h bits are a run rotated by a random amount).
// The randomness tests are cleared at every switch of source and at the
// start of every UT phase; TRNG accumulation pauses during UT1-UT3. A UT
// phase ends when every test has UT_ROUNDS results; the seven sums go to
// memory (8 words per phase, phase index 0 = UT1, i = UT2, L+h = UT3) and
// puf_sr_low is set if any is below SR_MIN_PCT percent.
//
// The result bits of the randomness tests during UT and of the iid test
// are exported on chk_valid/chk_bits and folded into a 16-bit CRC
// (result_checksum) so the user can verify them.
//
// While idle (calibration done, no evaluation running) the controller
// also serves user CRP requests (user_req with user_mode PUF_GEN or
// PUF_AUTH): the PUF's response and RESP_VALID come back with user_done.
//
// Memory writes from the controller's own sequence take priority; TRNG
// round sums and entropy levels wait in pending registers and are written
// in the next free cycles.
module bist_fsm
  import bist_pkg::*;
#(
  parameter int unsigned L          = 64,
  parameter int unsigned R          = 16,
  parameter int unsigned Q          = 16,
  parameter int unsigned QT         = 16,
  parameter int unsigned ROUNDS     = 250,
  parameter int unsigned UT_ROUNDS  = 250,
  parameter int unsigned T2         = 100,
  parameter int unsigned ST2_CHAL   = 16,
  parameter int unsigned ST2_MARGIN = 10,
  parameter int unsigned SR_MIN_PCT = 80,
  parameter int unsigned CAL_N      = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     puf_eval_start,
  // user CRP port (served while idle)
  input  logic                     user_req,
  input  puf_mode_e                user_mode,
  input  logic [L-1:0]             user_chal,
  output logic                     user_done,
  output logic                     user_resp,
  output logic                     user_resp_valid,
  input  logic                     puf_resp_valid,
  // TRNG
  input  logic                     trng_bit,
  // randomness test module
  output logic                     rt_clear,
  output logic                     rt_bit_valid,
  output logic                     rt_bit,
  input  rt_result_t               rt_res,
  // iid test and entropy estimator
  input  logic                     iid_valid,
  input  logic                     iid_pass,
  input  logic                     ent_valid,
  input  logic [$clog2(QT)-1:0]    ent_unit,
  input  logic [2:0]               ent_level,
  // RO sensor
  input  logic                     sens_valid,
  input  logic [15:0]              sens_count,
  // challenge generator
  input  logic                     chal_valid,
  input  logic [L-1:0]             chal,
  output logic                     chal_take,
  // PUF
  output logic                     puf_req,
  output puf_mode_e                puf_mode,
  output logic [L-1:0]             puf_chal,
  output logic [$clog2(2*R)-1:0]   puf_tune [Q],
  input  logic                     puf_done,
  input  logic                     puf_resp,
  input  logic [Q-1:0]             puf_unit_resp,
  // result memory
  output logic                     mem_we,
  output logic [MEM_AW-1:0]        mem_waddr,
  output logic [15:0]              mem_wdata,
  // status
  output logic                     cal_done,
  output logic                     puf_eval_busy,
  output logic [NTESTS-1:0]        trng_sr_low,
  output logic                     puf_sr_low,
  output logic [$clog2(ST2_CHAL+1)-1:0] st2_stable,
  output logic [NTESTS:0]          chk_valid,
  output logic [NTESTS:0]          chk_bits,
  output logic [15:0]              checksum
);
  localparam int TW  = $clog2(2 * R);
  localparam int RW  = $clog2(((ROUNDS > UT_ROUNDS) ? ROUNDS : UT_ROUNDS) + 1);
  localparam int LW  = $clog2(L + 1);
  localparam int T2W = $clog2(T2 + 1);
  localparam int CW2 = $clog2(ST2_CHAL + 1);
  localparam int QTW = $clog2(QT);

  typedef enum logic [4:0] {
    S_CAL, S_CAL_WR, S_IDLE, S_ST1, S_ST2_GET, S_ST2_REQ, S_ST2_WAIT,
    S_ST2_WR, S_UT_GET, S_UT_REQ1, S_UT_WAIT1, S_UT_REQ2, S_UT_WAIT2, S_UT_WR,
    S_USER_REQ, S_USER_WAIT
  } state_e;
  typedef enum logic [1:0] {UT1, UT2, UT3} ut_e;

  state_e st;
  ut_e    ut;
  logic [LW-1:0]  ut_idx;      // i for UT2, h for UT3
  logic [L-1:0]   x_q, mask_q;
  logic           r1_q;
  logic [T2W-1:0] st2_n;
  logic [T2W-1:0] st2_sum;
  logic [CW2-1:0] st2_k;
  logic [$clog2(Q+1)-1:0] wr_i;
  logic [2:0]     wr_t;
  logic           cal_start_q;
  puf_mode_e      umode_q;

  // ---------------------------------------------------------------- calibration
  logic          cal_busy, cal_done_p, cal_take, cal_req;
  logic [TW-1:0] cal_level;
  logic [TW-1:0] tune_opt [Q];

  puf_calibration #(.Q(Q), .R(R), .CAL_N(CAL_N)) u_cal (
    .clk, .rst_n, .start(cal_start_q), .chal_valid, .chal_take(cal_take),
    .puf_req(cal_req), .puf_done, .unit_resp(puf_unit_resp),
    .sweep_level(cal_level), .busy(cal_busy), .done(cal_done_p), .tune_opt);

  // ---------------------------------------------------------------- source mux
  logic in_ut;
  assign in_ut = (st == S_UT_GET) || (st == S_UT_REQ1) || (st == S_UT_WAIT1) ||
                 (st == S_UT_REQ2) || (st == S_UT_WAIT2) || (st == S_UT_WR);

  logic ut_bit_v, ut_bit, clear_q;
  assign rt_clear     = clear_q;
  assign rt_bit_valid = in_ut ? ut_bit_v : !clear_q;
  assign rt_bit       = in_ut ? ut_bit : trng_bit;

  // ---------------------------------------------------------------- PUF mux
  logic     fsm_req;
  always_comb begin
    for (int u = 0; u < Q; u++) puf_tune[u] = (st == S_CAL) ? cal_level : tune_opt[u];
    puf_req  = (st == S_CAL) ? cal_req : fsm_req;
    puf_mode = (st == S_CAL) ? PUF_RAW : (st == S_USER_REQ) ? umode_q : PUF_AUTH;
    puf_chal = (st == S_CAL) ? chal : (st == S_UT_REQ2) ? (x_q ^ mask_q) : x_q;
  end
  assign fsm_req = (st == S_ST2_REQ) || (st == S_UT_REQ1) || (st == S_UT_REQ2) ||
                   (st == S_USER_REQ);
  assign chal_take = (st == S_CAL) ? cal_take :
                     (((st == S_ST2_GET) || (st == S_UT_GET)) && chal_valid);

  // ---------------------------------------------------------------- accumulators
  logic [RW-1:0] tr_sum [NTESTS];
  logic [RW-1:0] tr_cnt [NTESTS];
  logic [RW-1:0] ut_sum [NTESTS];
  logic [RW-1:0] ut_cnt [NTESTS];
  logic [3:0]    tr_slot [NTESTS];
  logic [NTESTS-1:0] tr_pend;
  logic [RW-1:0] tr_pval [NTESTS];
  logic [3:0]    tr_pslot [NTESTS];
  logic [QT-1:0] ent_pend;
  logic [2:0]    ent_pval [QT];
  logic          ut_all_done;

  always_comb begin
    ut_all_done = 1'b1;
    for (int t = 0; t < NTESTS; t++)
      if (32'(ut_cnt[t]) < UT_ROUNDS) ut_all_done = 1'b0;
  end

  // ---------------------------------------------------------------- memory port
  logic             fsm_we;
  logic [MEM_AW-1:0] fsm_addr;
  logic [15:0]      fsm_data;

  always_comb begin
    fsm_we = 1'b0; fsm_addr = '0; fsm_data = '0;
    unique case (st)
      S_CAL_WR: begin
        fsm_we = 1'b1; fsm_addr = A_CAL + MEM_AW'(wr_i);
        fsm_data = 16'(tune_opt[wr_i[$clog2(Q)-1:0]]);
      end
      S_ST1: if (sens_valid) begin
        fsm_we = 1'b1; fsm_addr = A_ST1; fsm_data = sens_count;
      end
      S_ST2_WR: begin
        fsm_we = 1'b1; fsm_addr = A_ST2 + MEM_AW'(st2_k); fsm_data = 16'(st2_sum);
      end
      S_UT_WR: begin
        fsm_we = 1'b1;
        fsm_addr = A_UT + MEM_AW'(8 * ((ut == UT1) ? 0 : (ut == UT2) ? int'(ut_idx)
                                                       : L + int'(ut_idx)) + int'(wr_t));
        fsm_data = 16'(ut_sum[wr_t]);
      end
      default: ;
    endcase
  end

  // arbitration of pending writes: FSM first, then TRNG sums, then entropy
  logic             pend_sel_tr, pend_sel_ent;
  logic [2:0]       pend_t;
  logic [QTW-1:0]   pend_u;
  always_comb begin
    pend_sel_tr = 1'b0; pend_sel_ent = 1'b0; pend_t = '0; pend_u = '0;
    for (int t = NTESTS - 1; t >= 0; t--)
      if (tr_pend[t]) begin pend_sel_tr = 1'b1; pend_t = 3'(t); end
    if (!pend_sel_tr)
      for (int u = QT - 1; u >= 0; u--)
        if (ent_pend[u]) begin pend_sel_ent = 1'b1; pend_u = QTW'(u); end
  end

  always_comb begin
    mem_we = fsm_we; mem_waddr = fsm_addr; mem_wdata = fsm_data;
    if (!fsm_we && pend_sel_tr) begin
      mem_we    = 1'b1;
      mem_waddr = A_TRNG + MEM_AW'(8 * int'(tr_pslot[pend_t]) + int'(pend_t));
      mem_wdata = 16'(tr_pval[pend_t]);
    end else if (!fsm_we && pend_sel_ent) begin
      mem_we    = 1'b1;
      mem_waddr = A_ENT + MEM_AW'(pend_u);
      mem_wdata = 16'(ent_pval[pend_u]);
    end
  end

  // ---------------------------------------------------------------- checksum
  assign chk_valid = {iid_valid, (in_ut ? rt_res.valid : '0)};
  assign chk_bits  = {iid_pass, rt_res.pass};
  result_checksum #(.NB(NTESTS + 1)) u_chk (
    .clk, .rst_n, .valid(chk_valid), .bits(chk_bits), .crc(checksum));

  // ---------------------------------------------------------------- UT masks
  function automatic logic [L-1:0] ut3_mask(input logic [LW-1:0] h, input logic [5:0] r);
    logic [L-1:0] m;
    m = '0;
    for (int k = 0; k < L; k++) if (k < int'(h)) m[(k + int'(r)) % L] = 1'b1;
    return m;
  endfunction

  // a success rate is low when sum/rounds < SR_MIN_PCT/100, compared exactly
  localparam int unsigned SR_MIN_TR = ROUNDS * SR_MIN_PCT;
  localparam int unsigned SR_MIN_UT = UT_ROUNDS * SR_MIN_PCT;

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_CAL; ut <= UT1; ut_idx <= '0; x_q <= '0; mask_q <= '0;
      r1_q <= 1'b0; st2_n <= '0; st2_sum <= '0; st2_k <= '0; wr_i <= '0; wr_t <= '0;
      cal_start_q <= 1'b1; clear_q <= 1'b1; ut_bit_v <= 1'b0; ut_bit <= 1'b0;
      cal_done <= 1'b0; puf_sr_low <= 1'b0; st2_stable <= '0; trng_sr_low <= '0;
      tr_pend <= '0; ent_pend <= '0;
      umode_q <= PUF_AUTH; user_done <= 1'b0; user_resp <= 1'b0; user_resp_valid <= 1'b0;
      for (int t = 0; t < NTESTS; t++) begin
        tr_sum[t] <= '0; tr_cnt[t] <= '0; ut_sum[t] <= '0; ut_cnt[t] <= '0;
        tr_slot[t] <= '0; tr_pval[t] <= '0; tr_pslot[t] <= '0;
      end
      for (int u = 0; u < QT; u++) ent_pval[u] <= '0;
    end else begin
      cal_start_q <= 1'b0;
      clear_q     <= 1'b0;
      ut_bit_v    <= 1'b0;
      user_done   <= 1'b0;

      // pending write bookkeeping
      if (!fsm_we && pend_sel_tr) tr_pend[pend_t] <= 1'b0;
      else if (!fsm_we && pend_sel_ent) ent_pend[pend_u] <= 1'b0;
      if (ent_valid) begin
        ent_pend[ent_unit] <= 1'b1;
        ent_pval[ent_unit] <= ent_level;
      end

      // TRNG success-rate accumulation (not during UT)
      if (!in_ut) begin
        for (int t = 0; t < NTESTS; t++) if (rt_res.valid[t]) begin
          if (32'(tr_cnt[t]) == ROUNDS - 1) begin
            tr_pend[t]  <= 1'b1;
            tr_pval[t]  <= tr_sum[t] + RW'(rt_res.pass[t]);
            tr_pslot[t] <= tr_slot[t];
            tr_slot[t]  <= tr_slot[t] + 1'b1;
            trng_sr_low[t] <= 100 * (32'(tr_sum[t]) + 32'(rt_res.pass[t])) < SR_MIN_TR;
            tr_sum[t] <= '0;
            tr_cnt[t] <= '0;
          end else begin
            tr_sum[t] <= tr_sum[t] + RW'(rt_res.pass[t]);
            tr_cnt[t] <= tr_cnt[t] + 1'b1;
          end
        end
      end else begin
        for (int t = 0; t < NTESTS; t++)
          if (rt_res.valid[t] && 32'(ut_cnt[t]) < UT_ROUNDS) begin
            ut_sum[t] <= ut_sum[t] + RW'(rt_res.pass[t]);
            ut_cnt[t] <= ut_cnt[t] + 1'b1;
          end
      end

      unique case (st)
        S_CAL: if (cal_done_p) begin
          st <= S_CAL_WR; wr_i <= '0;
        end
        S_CAL_WR: begin
          if (32'(wr_i) == Q - 1) begin
            st <= S_IDLE; cal_done <= 1'b1;
          end
          wr_i <= wr_i + 1'b1;
        end
        S_IDLE: if (puf_eval_start) begin
          st <= S_ST1;
          puf_sr_low <= 1'b0;
          st2_stable <= '0;
        end else if (user_req) begin
          x_q <= user_chal; umode_q <= user_mode; st <= S_USER_REQ;
        end
        S_USER_REQ: st <= S_USER_WAIT;
        S_USER_WAIT: if (puf_done) begin
          user_done <= 1'b1; user_resp <= puf_resp; user_resp_valid <= puf_resp_valid;
          st <= S_IDLE;
        end
        S_ST1: if (sens_valid) begin
          st <= S_ST2_GET; st2_k <= '0;
        end
        S_ST2_GET: if (chal_valid) begin
          x_q <= chal; st2_n <= '0; st2_sum <= '0; st <= S_ST2_REQ;
        end
        S_ST2_REQ: st <= S_ST2_WAIT;
        S_ST2_WAIT: if (puf_done) begin
          st2_sum <= st2_sum + T2W'(puf_resp);
          if (32'(st2_n) == T2 - 1) st <= S_ST2_WR;
          else begin st2_n <= st2_n + 1'b1; st <= S_ST2_REQ; end
        end
        S_ST2_WR: begin
          if (32'(st2_sum) <= ST2_MARGIN || 32'(st2_sum) + ST2_MARGIN >= T2)
            st2_stable <= st2_stable + 1'b1;
          if (32'(st2_k) == ST2_CHAL - 1) begin
            st <= S_UT_GET; ut <= UT1; ut_idx <= '0; clear_q <= 1'b1;
            for (int t = 0; t < NTESTS; t++) begin ut_sum[t] <= '0; ut_cnt[t] <= '0; end
          end else begin
            st2_k <= st2_k + 1'b1; st <= S_ST2_GET;
          end
        end
        S_UT_GET: if (ut_all_done) begin
          st <= S_UT_WR; wr_t <= '0;
        end else if (chal_valid) begin
          x_q   <= chal;
          mask_q <= (ut == UT2) ? (L'(1) << (ut_idx - 1'b1)) : ut3_mask(ut_idx, x_q[5:0]);
          st <= S_UT_REQ1;
        end
        S_UT_REQ1: st <= S_UT_WAIT1;
        S_UT_WAIT1: if (puf_done) begin
          if (ut == UT1) begin
            ut_bit_v <= 1'b1; ut_bit <= puf_resp; st <= S_UT_GET;
          end else begin
            r1_q <= puf_resp; st <= S_UT_REQ2;
          end
        end
        S_UT_REQ2: st <= S_UT_WAIT2;
        S_UT_WAIT2: if (puf_done) begin
          ut_bit_v <= 1'b1; ut_bit <= r1_q ^ puf_resp; st <= S_UT_GET;
        end
        S_UT_WR: begin
          if (100 * 32'(ut_sum[wr_t]) < SR_MIN_UT) puf_sr_low <= 1'b1;
          if (wr_t == 3'(NTESTS - 1)) begin
            clear_q <= 1'b1;
            for (int t = 0; t < NTESTS; t++) begin ut_sum[t] <= '0; ut_cnt[t] <= '0; end
            if (ut == UT1) begin
              ut <= UT2; ut_idx <= LW'(1); st <= S_UT_GET;
            end else if (32'(ut_idx) == L) begin
              if (ut == UT2) begin
                ut <= UT3; ut_idx <= LW'(1); st <= S_UT_GET;
              end else begin
                st <= S_IDLE;
              end
            end else begin
              ut_idx <= ut_idx + 1'b1; st <= S_UT_GET;
            end
          end
          wr_t <= wr_t + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign puf_eval_busy = (st != S_IDLE) && (st != S_CAL) && (st != S_CAL_WR) &&
                         (st != S_USER_REQ) && (st != S_USER_WAIT);

endmodule
