// result_checksum: 16-bit checksum protecting the pass/fail result bits.
//
// The BIST's pass/fail outputs (the randomness tests during the PUF
// unpredictability tests, and the iid test) could be forced to '1' by an
// attacker. This block folds every result bit, as it is produced, into a
// CRC-16-CCITT register (x^16 + x^12 + x^5 + 1, initial value 0xFFFF). The
// user runs the same CRC over the result bits seen on the outputs and
// compares: a forced bit makes the two disagree. Bits presented in the same
// cycle are folded in index order (bit 0 first).
//
// Interface: valid[i] marks bit[i] as a new result bit. crc is registered.
module result_checksum #(
  parameter int unsigned NB = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NB-1:0] valid,
  input  logic [NB-1:0] bits,
  output logic [15:0]   crc
);
  function automatic logic [15:0] step(input logic [15:0] c, input logic b);
    logic fb;
    fb = c[15] ^ b;
    return {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
  endfunction

  logic [15:0] nxt;
  always_comb begin
    nxt = crc;
    for (int i = 0; i < NB; i++)
      if (valid[i]) nxt = step(nxt, bits[i]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) crc <= 16'hFFFF;
    else        crc <= nxt;

endmodule
