// diffusion_layer: spreads every challenge bit over several bits before the
// PUF's interconnect and input networks.
//
// The L = 64-bit challenge E is read as sixteen 4-bit numbers arranged as a
// 4x4 matrix (nibble k is row k%4, column k/4) and multiplied by a constant
// 4x4 matrix with 2-bit entries, in GF(2^4) with x^4 + x + 1, as AES
// MixColumns does:
//      | 2 3 1 1 |
//  M = | 1 2 3 1 |      D(:,c) = M * E(:,c)
//      | 1 1 2 3 |
//      | 2 0 0 3 |
// The last row is the XOR of the other three, so M has determinant zero
// and rank 3: the layer cannot be undone by placing its inverse in front.
// The entries of M are this design's choice; size, entry width, rank and
// determinant follow the reference design. Purely combinational.
module diffusion_layer #(
  parameter int unsigned L = 64
) (
  input  logic [L-1:0] e,
  output logic [L-1:0] d
);
  localparam int unsigned NCOL = L / 16;  // 4x4 matrices of nibbles
  localparam logic [1:0] M [4][4] = '{'{2'd2, 2'd3, 2'd1, 2'd1},
                                      '{2'd1, 2'd2, 2'd3, 2'd1},
                                      '{2'd1, 2'd1, 2'd2, 2'd3},
                                      '{2'd2, 2'd0, 2'd0, 2'd3}};

  function automatic logic [3:0] xtime(input logic [3:0] a);
    return {a[2:0], 1'b0} ^ (a[3] ? 4'b0011 : 4'b0000);
  endfunction

  function automatic logic [3:0] gmul(input logic [1:0] k, input logic [3:0] a);
    unique case (k)
      2'd0: return 4'h0;
      2'd1: return a;
      2'd2: return xtime(a);
      default: return xtime(a) ^ a;
    endcase
  endfunction

  always_comb begin
    d = '0;
    for (int c = 0; c < NCOL; c++)
      for (int r = 0; r < 4; r++) begin
        logic [3:0] acc;
        acc = '0;
        for (int j = 0; j < 4; j++)
          acc ^= gmul(M[r][j], e[16*c + 4*j +: 4]);
        d[16*c + 4*r +: 4] = acc;
      end
  end

endmodule
