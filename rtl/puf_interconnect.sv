// puf_interconnect: interconnect network of the PUF. Unit j receives the
// diffused challenge rotated by j positions (D_j, D_j+1, ..., D_j-1), and
// passes it through its own input network, so each of the Q units sees a
// different transformation and an attacker cannot invert more than one of
// them. Purely combinational.
module puf_interconnect #(
  parameter int unsigned L = 64,
  parameter int unsigned Q = 16
) (
  input  logic [L-1:0] d,
  output logic [L-1:0] c [Q]
);
  for (genvar j = 0; j < Q; j++) begin : g_unit
    logic [L-1:0] rot;
    always_comb
      for (int i = 0; i < L; i++) rot[i] = d[(i + j) % L];
    input_network #(.L(L)) u_in (.d(rot), .c(c[j]));
  end

endmodule
