// randomness_tests: the shared hardware randomness test module. It runs
// seven NIST SP800-22 tests in parallel on one bit stream: Frequency, Block
// Frequency, Runs, Longest Run of Ones, Non-overlapping Template, Overlapping
// Template and Cumulative Sums, each on its own block length, and reports
// each result as a pass bit with a one-cycle valid strobe.
//
// The sizes default to those of the reference implementation
// (n = 20000 for Frequency, Runs and Cumulative Sums; 100 x 200 for Block
// Frequency; 16 x 8 for Longest Run; 8 x 256 for Non-overlapping; 1000 x 1023
// for Overlapping). The frequency decision is shared with the Runs test.
//
// Interface: one bit per cycle while bit_valid; clear restarts all tests
// (used when the controller switches between the TRNG and the PUF).
// Result order follows bist_pkg::test_e.
module randomness_tests #(
  parameter int unsigned N_RUNS   = 20000,
  parameter int unsigned BF_N     = 100,
  parameter int unsigned BF_M     = 200,
  parameter real         BF_CHI2  = 124.34211340400407,
  parameter int unsigned LR_N     = 16,
  parameter int unsigned NO_N     = 8,
  parameter int unsigned NO_M     = 256,
  parameter real         NO_CHI2  = 15.50731305586545,
  parameter int unsigned OT_N     = 1000,
  parameter int unsigned OT_M     = 1023,
  parameter int unsigned CS_N     = 20000,
  parameter int unsigned CS_ZMAX  = 316
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    bit_valid,
  input  logic                    bit_in,
  output bist_pkg::rt_result_t    res
);
  import bist_pkg::*;

  nist_freq_runs #(.N_BITS(N_RUNS)) u_fr (
    .clk, .rst_n, .clear, .bit_valid, .bit_in,
    .freq_valid(res.valid[T_FREQ]), .freq_pass(res.pass[T_FREQ]),
    .runs_valid(res.valid[T_RUNS]), .runs_pass(res.pass[T_RUNS]));

  nist_block_freq #(.N_BLK(BF_N), .M_LEN(BF_M), .CHI2_95(BF_CHI2)) u_bf (
    .clk, .rst_n, .clear, .bit_valid, .bit_in,
    .res_valid(res.valid[T_BLKFREQ]), .res_pass(res.pass[T_BLKFREQ]));

  nist_longest_run #(.N_BLK(LR_N), .M_LEN(8)) u_lr (
    .clk, .rst_n, .clear, .bit_valid, .bit_in,
    .res_valid(res.valid[T_LRUN]), .res_pass(res.pass[T_LRUN]));

  nist_nonoverlap #(.N_BLK(NO_N), .M_LEN(NO_M), .CHI2_95(NO_CHI2)) u_no (
    .clk, .rst_n, .clear, .bit_valid, .bit_in,
    .res_valid(res.valid[T_NONOVL]), .res_pass(res.pass[T_NONOVL]));

  nist_overlap #(.N_BLK(OT_N), .M_LEN(OT_M)) u_ot (
    .clk, .rst_n, .clear, .bit_valid, .bit_in,
    .res_valid(res.valid[T_OVL]), .res_pass(res.pass[T_OVL]));

  nist_cusum #(.N_BITS(CS_N), .Z_MAX(CS_ZMAX)) u_cs (
    .clk, .rst_n, .clear, .bit_valid, .bit_in,
    .res_valid(res.valid[T_CUSUM]), .res_pass(res.pass[T_CUSUM]));

endmodule
