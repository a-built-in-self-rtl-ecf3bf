// tb_input_network: checks the XOR network against its defining equations
// for random inputs and checks the avalanche property it is built for:
// flipping input bit 0 flips two outputs, and flipping any other input bit
// flips exactly two outputs, one in each half.
// The equations are those of the published lightweight PUF input network.
module tb_input_network;
  localparam int L = 64;
  logic [L-1:0] d, c;
  int checks = 0, failures = 0;

  input_network #(.L(L)) dut (.d, .c);

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

  function automatic logic [L-1:0] ref_c(input logic [L-1:0] x);
    logic [L-1:0] y;
    // lower half: pairs (0,1), (2,3), ...; upper half: bit 0, then pairs (1,2), (3,4), ...
    for (int i = 0; i < L; i++) begin
      if (i < L / 2) y[i] = x[2*i] ^ x[2*i+1];
      else if (i == L / 2) y[i] = x[0];
      else y[i] = x[2*(i - L/2) - 1] ^ x[2*(i - L/2)];
    end
    return y;
  endfunction

  initial begin
    logic [L-1:0] base, flip;
    for (int t = 0; t < 300; t++) begin
      d = {$urandom, $urandom}; #1;
      chk(c == ref_c(d), $sformatf("random input %h", d));
    end
    for (int i = 0; i < L - 1; i++) begin
      d = {$urandom, $urandom}; #1; base = c;
      d[i] = ~d[i]; #1; flip = c ^ base;
      chk($countones(flip) == 2 && $countones(flip[L/2-1:0]) == 1,
          $sformatf("flip of bit %0d changes one output in each half", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
