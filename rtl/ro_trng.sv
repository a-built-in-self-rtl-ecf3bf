// ro_trng: behavioural model of the ring-oscillator TRNG (Q units, each a
// P-inverter ring oscillator sampled by a flip-flop, outputs XORed).
//
// The oscillators and their jitter cannot be expressed as logic, so each
// unit's sampled bit is modelled as a random draw on every clock edge. The
// draw is controlled by two variables that a testbench may change at run
// time through hierarchical references, to emulate failing or attacked
// units: one_prob_pm[i] is the probability (per mille) that unit i samples
// a one (500 = unbiased), and corr_pm is the probability that a unit simply
// repeats the bit of the unit below it (0 = independent units).
//
// Interface: unit_bits are the internal bit sequences (one new bit per unit
// per cycle), out_bit is their XOR, the external sequence. Both are
// registered on clk. P documents the ring length and does not change the
// model.
module ro_trng #(
  parameter int unsigned Q = 16,
  parameter int unsigned P = 3
) (
  input  logic         clk,
  output logic [Q-1:0] unit_bits,
  output logic         out_bit
);
  int unsigned one_prob_pm [Q];
  int unsigned corr_pm;

  initial begin
    for (int i = 0; i < Q; i++) one_prob_pm[i] = 500;
    corr_pm   = 0;
    unit_bits = '0;
    if (P == 0) $error("ring length must be positive");
  end

  always @(posedge clk) begin
    logic [Q-1:0] nb;
    for (int i = 0; i < Q; i++) begin
      if (i > 0 && $urandom_range(999) < corr_pm) nb[i] = nb[i-1];
      else nb[i] = ($urandom_range(999) < one_prob_pm[i]);
    end
    unit_bits <= nb;
  end

  assign out_bit = ^unit_bits;

endmodule
