// bist_pkg: types and constants shared by the BIST for PUFs and TRNGs.
//
// The randomness test module reports seven NIST SP800-22 tests in a fixed
// order (test_e). The PUF is driven in one of three modes (puf_mode_e). The
// result memory is split into regions whose base addresses are listed here;
// the layout is this design's own choice.
package bist_pkg;

  localparam int unsigned NTESTS = 7;

  // Order of the tests in every result vector.
  typedef enum logic [2:0] {
    T_FREQ    = 3'd0,  // frequency (monobit)
    T_BLKFREQ = 3'd1,  // frequency within a block
    T_RUNS    = 3'd2,  // runs
    T_LRUN    = 3'd3,  // longest run of ones in a block
    T_NONOVL  = 3'd4,  // non-overlapping template matching
    T_OVL     = 3'd5,  // overlapping template matching
    T_CUSUM   = 3'd6   // cumulative sums
  } test_e;

  // PUF request modes.
  typedef enum logic [1:0] {
    PUF_RAW  = 2'd0,  // one excitation, per-unit responses returned (calibration)
    PUF_GEN  = 2'd1,  // CRP generation: parametric interrogation, then vote
    PUF_AUTH = 2'd2   // authentication: vote at the optimum tune levels
  } puf_mode_e;

  // One cycle's worth of results from the randomness test module.
  typedef struct packed {
    logic [NTESTS-1:0] valid;
    logic [NTESTS-1:0] pass;
  } rt_result_t;

  // Result memory map (16-bit words).
  localparam int unsigned MEM_AW = 11;
  localparam logic [MEM_AW-1:0] A_TRNG = 11'h000;  // 16 slots x 8 words: TRNG round sums
  localparam logic [MEM_AW-1:0] A_ENT  = 11'h080;  // entropy level per TRNG unit
  localparam logic [MEM_AW-1:0] A_ST1  = 11'h0A0;  // RO sensor count
  localparam logic [MEM_AW-1:0] A_ST2  = 11'h0C0;  // ST2 sums S_R, one per challenge
  localparam logic [MEM_AW-1:0] A_CAL  = 11'h0E0;  // calibrated tune level per PUF unit
  localparam logic [MEM_AW-1:0] A_UT   = 11'h200;  // UT sums: 8 words per phase (UT1, UT2 i, UT3 h)

  // erfcinv(0.05): bound used by the erfc-based tests at alpha = 0.05.
  localparam real ERFCINV_A = 1.3859038243496782;

endpackage
