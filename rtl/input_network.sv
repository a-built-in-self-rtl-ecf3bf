// input_network: challenge transformation in front of one PUF unit, chosen
// to satisfy the Strict Avalanche Criterion. With 1-based indices and
// N = L:
//   c_(N/2+1)     = d_1
//   c_((i+1)/2)   = d_i xor d_(i+1),  i = 1, 3, ..., N-1
//   c_((N+i+2)/2) = d_i xor d_(i+1),  i = 2, 4, ..., N-2
// so the first half of c is formed from disjoint bit pairs, the second half
// from the pairs shifted by one. Purely combinational.
module input_network #(
  parameter int unsigned L = 64
) (
  input  logic [L-1:0] d,
  output logic [L-1:0] c
);
  always_comb begin
    c[L/2] = d[0];
    for (int k = 0; k < L / 2; k++) c[k] = d[2*k] ^ d[2*k+1];
    for (int m = 1; m < L / 2; m++) c[L/2 + m] = d[2*m-1] ^ d[2*m];
  end

endmodule
