// bist_top: built-in self-test for an RO-based TRNG and a PDL-based strong
// PUF on one chip, with the circuits under test included.
//
// TRNG side: the Q-unit RO TRNG's external (XORed) bit feeds the shared
// NIST randomness test module; its internal unit bits feed the iid
// (Wald-Wolfowitz runs) test and the per-unit entropy estimator.
// PUF side: four further RO TRNGs feed the challenge generator; the
// controller (bist_fsm) calibrates the PUF's tune levels after reset and,
// on puf_eval_start, runs the stability tests (RO sensor reading, multiple
// interrogation) and the three unpredictability tests through the same
// randomness test module. Results go to the result memory, which the user
// reads through mem_raddr/mem_rdata, and to the instantaneous outputs.
// Between evaluations the PUF serves the user's CRP requests (user_req,
// GEN/AUTH in user_mode); user_resp_valid is the RESP_VALID of a GEN
// request (robust challenge).
//
// Instantaneous outputs: rt_res (every randomness-test result, from
// whichever source is being tested), iid_valid/iid_pass, entropy levels
// with ent_warning/ent_error, chk_valid/chk_bits (the result bits covered by
// the checksum) and checksum. Cumulative flags: trng_sr_low (per test,
// TRNG success rate of the last ROUNDS results below SR_MIN_PCT),
// puf_sr_low (a UT success rate below SR_MIN_PCT in the last evaluation),
// st2_stable (challenges found stable by ST2). All parameters default to
// the reference sizes (L = 64, R = 16, Q = 16, n = 20000 ...).
module bist_top
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
  parameter int unsigned CAL_N      = 1024,
  parameter int unsigned N_RUNS     = 20000,
  parameter int unsigned BF_N       = 100,
  parameter int unsigned BF_M       = 200,
  parameter real         BF_CHI2    = 124.34211340400407,
  parameter int unsigned LR_N       = 16,
  parameter int unsigned NO_N       = 8,
  parameter int unsigned NO_M       = 256,
  parameter real         NO_CHI2    = 15.50731305586545,
  parameter int unsigned OT_N       = 1000,
  parameter int unsigned OT_M       = 1023,
  parameter int unsigned CS_N       = 20000,
  parameter int unsigned CS_ZMAX    = 316,
  parameter int unsigned IID_N      = 16384,
  parameter int unsigned ENT_N      = 10000,
  parameter int unsigned SENS_WIN   = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     puf_eval_start,
  // user CRP port: GEN (with active parametric interrogation) or AUTH
  input  logic                     user_req,
  input  puf_mode_e                user_mode,
  input  logic [L-1:0]             user_chal,
  output logic                     user_done,
  output logic                     user_resp,
  output logic                     user_resp_valid,
  // instantaneous results
  output rt_result_t               rt_res,
  output logic                     iid_valid,
  output logic                     iid_pass,
  output logic                     iid_error,
  output logic [2:0]               ent_level [QT],
  output logic                     ent_warning,
  output logic                     ent_error,
  output logic [NTESTS:0]          chk_valid,
  output logic [NTESTS:0]          chk_bits,
  output logic [15:0]              checksum,
  // status
  output logic                     cal_done,
  output logic                     puf_eval_busy,
  output logic [NTESTS-1:0]        trng_sr_low,
  output logic                     puf_sr_low,
  output logic [$clog2(ST2_CHAL+1)-1:0] st2_stable,
  // result memory read port
  input  logic [MEM_AW-1:0]        mem_raddr,
  output logic [15:0]              mem_rdata
);
  localparam int TW = $clog2(2 * R);

  // ------------------------------------------------ TRNG under test
  logic [QT-1:0] trng_units;
  logic          trng_out;
  ro_trng #(.Q(QT), .P(3)) u_trng (.clk, .unit_bits(trng_units), .out_bit(trng_out));

  // ------------------------------------------------ randomness tests (shared)
  logic rt_clear, rt_bit_valid, rt_bit;
  randomness_tests #(
    .N_RUNS(N_RUNS), .BF_N(BF_N), .BF_M(BF_M), .BF_CHI2(BF_CHI2), .LR_N(LR_N),
    .NO_N(NO_N), .NO_M(NO_M), .NO_CHI2(NO_CHI2), .OT_N(OT_N), .OT_M(OT_M),
    .CS_N(CS_N), .CS_ZMAX(CS_ZMAX)
  ) u_rt (.clk, .rst_n, .clear(rt_clear), .bit_valid(rt_bit_valid), .bit_in(rt_bit),
          .res(rt_res));

  // ------------------------------------------------ internal TRNG tests
  iid_test #(.Q(QT), .N_BITS(IID_N)) u_iid (
    .clk, .rst_n, .en(1'b1), .unit_bits(trng_units),
    .res_valid(iid_valid), .res_pass(iid_pass), .error(iid_error));

  logic                  ent_valid;
  logic [$clog2(QT)-1:0] ent_unit;
  logic [2:0]            ent_upd;
  entropy_estimator #(.Q(QT), .N_WORDS(ENT_N)) u_ent (
    .clk, .rst_n, .en(1'b1), .unit_bits(trng_units), .level(ent_level),
    .upd_valid(ent_valid), .upd_unit(ent_unit), .upd_level(ent_upd),
    .warning(ent_warning), .error(ent_error));

  // ------------------------------------------------ challenge generator
  logic [3:0] cg_src;
  for (genvar g = 0; g < 4; g++) begin : g_cgtrng
    ro_trng #(.Q(16), .P(3)) u_cg_trng (.clk, .unit_bits(), .out_bit(cg_src[g]));
  end
  logic         chal_valid, chal_take;
  logic [L-1:0] chal;
  challenge_generator #(.L(L), .NSRC(4)) u_cg (
    .clk, .rst_n, .src(cg_src), .take(chal_take), .chal, .valid(chal_valid));

  // ------------------------------------------------ RO sensor
  logic        ro;
  logic        sens_valid;
  logic [15:0] sens_count;
  ring_oscillator u_ro (.en(rst_n), .ro);
  ro_sensor #(.WINDOW(SENS_WIN), .CW(16)) u_sens (
    .clk, .rst_n, .ro, .count(sens_count), .valid(sens_valid));

  // ------------------------------------------------ PUF under test
  logic          puf_req, puf_done, puf_resp, puf_rv;
  puf_mode_e     puf_mode;
  logic [L-1:0]  puf_chal;
  logic [TW-1:0] puf_tune [Q];
  logic [Q-1:0]  puf_unit_resp;
  logic          puf_busy;
  puf #(.L(L), .R(R), .Q(Q)) u_puf (
    .clk, .rst_n, .req(puf_req), .mode(puf_mode), .challenge(puf_chal),
    .tune_level(puf_tune), .busy(puf_busy), .done(puf_done), .response(puf_resp),
    .resp_valid(puf_rv), .unit_resp(puf_unit_resp));

  // ------------------------------------------------ result memory
  logic              mem_we;
  logic [MEM_AW-1:0] mem_waddr;
  logic [15:0]       mem_wdata;
  result_memory #(.DEPTH(1 << MEM_AW), .DW(16)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata));

  // ------------------------------------------------ controller
  bist_fsm #(
    .L(L), .R(R), .Q(Q), .QT(QT), .ROUNDS(ROUNDS), .UT_ROUNDS(UT_ROUNDS), .T2(T2),
    .ST2_CHAL(ST2_CHAL), .CAL_N(CAL_N)
  ) u_fsm (
    .clk, .rst_n, .puf_eval_start, .user_req, .user_mode, .user_chal, .user_done,
    .user_resp, .user_resp_valid, .puf_resp_valid(puf_rv), .trng_bit(trng_out),
    .rt_clear, .rt_bit_valid, .rt_bit, .rt_res,
    .iid_valid, .iid_pass, .ent_valid, .ent_unit, .ent_level(ent_upd),
    .sens_valid, .sens_count, .chal_valid, .chal, .chal_take,
    .puf_req, .puf_mode, .puf_chal, .puf_tune, .puf_done, .puf_resp,
    .puf_unit_resp, .mem_we, .mem_waddr, .mem_wdata,
    .cal_done, .puf_eval_busy, .trng_sr_low, .puf_sr_low, .st2_stable,
    .chk_valid, .chk_bits, .checksum);

endmodule
