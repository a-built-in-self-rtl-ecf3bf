// puf_calibration: automatic tune-level calibration of the Q PUF units.
//
// For every tune level 0..2R-1 (applied to all units at once) CAL_N random
// challenges are applied in RAW mode and the ones of every unit are
// counted. For each unit the level whose count is closest to CAL_N/2 (mean
// response closest to one half) is kept; ties keep the lower level. This
// replaces the offline collection of CRPs from every unit at every level.
//
// Interface: start (while !busy) runs one calibration. The block takes
// challenges from the challenge generator (chal_valid/chal_take) and issues
// PUF requests (puf_req, answered by puf_done with unit_resp); the caller
// routes challenge and sweep_level to the PUF. done pulses when tune_opt
// holds the result. Duration about 2R*CAL_N*(challenge time + 4) cycles.
module puf_calibration #(
  parameter int unsigned Q     = 16,
  parameter int unsigned R     = 16,
  parameter int unsigned CAL_N = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   chal_valid,
  output logic                   chal_take,
  output logic                   puf_req,
  input  logic                   puf_done,
  input  logic [Q-1:0]           unit_resp,
  output logic [$clog2(2*R)-1:0] sweep_level,
  output logic                   busy,
  output logic                   done,
  output logic [$clog2(2*R)-1:0] tune_opt [Q]
);
  localparam int TW = $clog2(2 * R);
  localparam int NW = $clog2(CAL_N + 1);

  typedef enum logic [1:0] {C_IDLE, C_CHAL, C_WAIT, C_EVAL} state_e;
  state_e        st;
  logic [NW-1:0] k;
  logic [NW-1:0] ones [Q];
  logic [NW:0]   best [Q];

  function automatic logic [NW:0] half_dist(input logic [NW-1:0] o);
    int signed x;
    x = 2 * int'(o) - int'(CAL_N);
    return (NW+1)'(x < 0 ? -x : x);
  endfunction

  assign busy      = (st != C_IDLE);
  assign chal_take = (st == C_CHAL) && chal_valid;
  assign puf_req   = chal_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; k <= '0; sweep_level <= '0; done <= 1'b0;
      for (int u = 0; u < Q; u++) begin
        ones[u] <= '0; best[u] <= '1; tune_opt[u] <= TW'(R);
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          sweep_level <= '0;
          k <= '0;
          for (int u = 0; u < Q; u++) begin ones[u] <= '0; best[u] <= '1; end
          st <= C_CHAL;
        end
        C_CHAL: if (chal_valid) st <= C_WAIT;
        C_WAIT: if (puf_done) begin
          for (int u = 0; u < Q; u++) ones[u] <= ones[u] + NW'(unit_resp[u]);
          if (k == NW'(CAL_N - 1)) begin
            k  <= '0;
            st <= C_EVAL;
          end else begin
            k  <= k + 1'b1;
            st <= C_CHAL;
          end
        end
        C_EVAL: begin
          for (int u = 0; u < Q; u++) begin
            if (half_dist(ones[u]) < best[u]) begin
              best[u]     <= half_dist(ones[u]);
              tune_opt[u] <= sweep_level;
            end
            ones[u] <= '0;
          end
          if (32'(sweep_level) == 2 * R - 1) begin
            st   <= C_IDLE;
            done <= 1'b1;
          end else begin
            sweep_level <= sweep_level + 1'b1;
            st          <= C_CHAL;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
