// puf: the PDL-based strong PUF with its peripheral circuitry and its
// built-in interrogation schemes.
//
// Datapath: challenge -> diffusion layer -> interconnect network (unit j
// gets the challenge rotated by j) -> one input network per unit -> Q PUF
// units -> Q-input XOR (output network). Each unit's tune block is driven
// by a tune decoder from that unit's tune level.
//
// Control (one request at a time, req while !busy):
//  * PUF_RAW : one excitation at the given tune levels; unit_resp returns
//              every unit's own bit (used by the calibration).
//  * PUF_AUTH: T1 excitations at the given (optimum) tune levels; response
//              is the majority, the MSB of the T1-sum (T1 = 2^k - 1).
//  * PUF_GEN : active parametric interrogation first: V excitations each
//              with the tune levels raised by TUNE_DELTA (extra delay in the
//              top path), lowered by TUNE_DELTA (extra delay in the bottom
//              path) and unchanged. resp_valid = 1 (robust challenge) when
//              the 3V-sum is within VMARGIN of 0 or 3V. Then the T1 vote as
//              in PUF_AUTH gives the response.
// Every excitation takes two cycles (fire, sample). done pulses for one
// cycle with response, resp_valid (1 in RAW/AUTH) and unit_resp.
// T1, V, TUNE_DELTA and VMARGIN are this design's choices.
module puf
  import bist_pkg::*;
#(
  parameter int unsigned L          = 64,
  parameter int unsigned R          = 16,
  parameter int unsigned Q          = 16,
  parameter int unsigned T1         = 7,
  parameter int unsigned V          = 5,
  parameter int unsigned TUNE_DELTA = 2,
  parameter int unsigned VMARGIN    = 1,
  parameter int unsigned SEED       = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   req,
  input  puf_mode_e              mode,
  input  logic [L-1:0]           challenge,
  input  logic [$clog2(2*R)-1:0] tune_level [Q],
  output logic                   busy,
  output logic                   done,
  output logic                   response,
  output logic                   resp_valid,
  output logic [Q-1:0]           unit_resp
);
  localparam int TW = $clog2(2 * R);
  localparam int SW = $clog2(3 * V + T1 + 1);

  typedef enum logic [1:0] {S_IDLE, S_FIRE, S_SAMPLE} state_e;
  // phase of an interrogation
  typedef enum logic [2:0] {P_UP, P_DOWN, P_MID, P_VOTE, P_RAW} phase_e;

  state_e        st;
  phase_e        ph;
  puf_mode_e     mode_q;
  logic [L-1:0]  chal_q;
  logic [SW-1:0] exc, sum3, sumv;

  // datapath
  logic [L-1:0] d;
  logic [L-1:0] c [Q];
  logic [Q-1:0] ur;
  logic         fire;

  diffusion_layer #(.L(L)) u_diff (.e(chal_q), .d(d));
  puf_interconnect #(.L(L), .Q(Q)) u_ic (.d(d), .c(c));

  assign fire = (st == S_FIRE);

  for (genvar u = 0; u < Q; u++) begin : g_unit
    logic [TW-1:0] lev;
    logic [R-1:0]  tt, tb;
    always_comb begin
      int signed l;
      l = int'(tune_level[u]);
      if (ph == P_UP)   l = l + int'(TUNE_DELTA);
      if (ph == P_DOWN) l = l - int'(TUNE_DELTA);
      if (l < 0) l = 0;
      if (l > 2 * R - 1) l = 2 * R - 1;
      lev = TW'(l);
    end
    tune_decoder #(.R(R)) u_dec (.level(lev), .tune_top(tt), .tune_bot(tb));
    puf_unit_model #(.L(L), .R(R), .SEED(SEED * 1000 + u)) u_unit (
      .clk, .fire, .c(c[u]), .tune_top(tt), .tune_bot(tb), .resp(ur[u]));
  end

  logic xr;
  assign xr = ^ur;   // output network

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ph <= P_RAW; mode_q <= PUF_RAW; chal_q <= '0;
      exc <= '0; sum3 <= '0; sumv <= '0;
      done <= 1'b0; response <= 1'b0; resp_valid <= 1'b0; unit_resp <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (req) begin
          chal_q <= challenge;
          mode_q <= mode;
          exc    <= '0; sum3 <= '0; sumv <= '0;
          unique case (mode)
            PUF_GEN:  ph <= P_UP;
            PUF_AUTH: ph <= P_VOTE;
            default:  ph <= P_RAW;
          endcase
          st <= S_FIRE;
        end
        S_FIRE: st <= S_SAMPLE;
        S_SAMPLE: begin
          st <= S_FIRE;
          unique case (ph)
            P_RAW: begin
              unit_resp  <= ur;
              response   <= xr;
              resp_valid <= 1'b1;
              done       <= 1'b1;
              st         <= S_IDLE;
            end
            P_UP, P_DOWN, P_MID: begin
              sum3 <= sum3 + SW'(xr);
              if (exc == SW'(V - 1)) begin
                exc <= '0;
                ph  <= (ph == P_UP) ? P_DOWN : (ph == P_DOWN) ? P_MID : P_VOTE;
              end else begin
                exc <= exc + 1'b1;
              end
            end
            default: begin  // P_VOTE
              if (exc == SW'(T1 - 1)) begin
                response   <= (32'(sumv) + 32'(xr)) > (T1 - 1) / 2;
                resp_valid <= (mode_q != PUF_GEN) ||
                              (32'(sum3) <= VMARGIN) || (32'(sum3) + VMARGIN >= 3 * V);
                unit_resp  <= ur;
                done       <= 1'b1;
                st         <= S_IDLE;
              end else begin
                exc  <= exc + 1'b1;
                sumv <= sumv + SW'(xr);
              end
            end
          endcase
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

endmodule
