// tb_puf_interconnect: checks that unit j receives the input network
// applied to the shared challenge rotated right by j positions, written
// here directly from the network's equations, and that the units see
// different challenges.
// The rotation per unit follows the original interconnect drawing.
module tb_puf_interconnect;
  localparam int L = 64, Q = 16;
  logic [L-1:0] d;
  logic [L-1:0] c [Q];
  int checks = 0, failures = 0;

  puf_interconnect #(.L(L), .Q(Q)) dut (.d, .c);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [L-1:0] ref_c(input logic [L-1:0] x, input int j);
    logic [L-1:0] r, y;
    r = (x >> j) | (x << (L - j));
    for (int i = 0; i < L; i++) begin
      if (i < L / 2) y[i] = r[2*i] ^ r[2*i+1];
      else if (i == L / 2) y[i] = r[0];
      else y[i] = r[2*(i - L/2) - 1] ^ r[2*(i - L/2)];
    end
    return y;
  endfunction

  initial begin
    int distinct;
    for (int t = 0; t < 40; t++) begin
      d = {$urandom, $urandom}; #1;
      distinct = 0;
      for (int j = 0; j < Q; j++) begin
        chk(c[j] == ref_c(d, j), $sformatf("unit %0d challenge", j));
        if (j > 0 && c[j] != c[0]) distinct++;
      end
      chk(distinct == Q - 1, "units receive different challenges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
