// tb_result_checksum: feeds the ASCII string "123456789" most significant
// bit first, one bit per cycle and then eight bits per cycle, and expects
// the published CRC-16/CCITT-FALSE check value 0x29B1; then compares random
// sparse valid masks against a bit-serial reference.
// A 16-bit checksum follows the original scheme; CRC-16-CCITT is this
// design's choice.
module tb_result_checksum;
  localparam int NB = 8;
  logic clk = 0, rst_n = 0;
  logic [NB-1:0] valid, bits;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  result_checksum #(.NB(NB)) dut (.clk, .rst_n, .valid, .bits, .crc);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_bit(input logic [15:0] c, input logic b);
    // polynomial division by x^16+x^12+x^5+1, one message bit at a time
    logic [16:0] t;
    t = {c, 1'b0};
    t[16] = t[16] ^ b;
    if (t[16]) t = t ^ 17'h11021;
    return t[15:0];
  endfunction

  task automatic reset_dut();
    rst_n <= 0; valid <= '0; @(posedge clk); rst_n <= 1; @(posedge clk);
  endtask

  initial begin
    string msg;
    logic [15:0] model;
    msg = "123456789";
    valid = '0; bits = '0;
    @(posedge clk);
    reset_dut();
    for (int i = 0; i < msg.len(); i++)
      for (int b = 7; b >= 0; b--) begin
        valid <= 8'b1; bits <= {7'b0, msg[i][b]}; @(posedge clk);
      end
    valid <= '0; @(posedge clk); #1;
    chk(crc == 16'h29B1, $sformatf("serial check value %h", crc));
    reset_dut();
    for (int i = 0; i < msg.len(); i++) begin
      logic [7:0] ch;
      ch = msg[i];
      valid <= '1; bits <= {<<{ch}}; @(posedge clk);   // bit 0 carries the MSB
    end
    valid <= '0; @(posedge clk); #1;
    chk(crc == 16'h29B1, $sformatf("parallel check value %h", crc));
    reset_dut();
    model = 16'hFFFF;
    for (int t = 0; t < 500; t++) begin
      logic [NB-1:0] v, b;
      v = NB'($urandom); b = NB'($urandom);
      valid <= v; bits <= b;
      for (int i = 0; i < NB; i++) if (v[i]) model = ref_bit(model, b[i]);
      @(posedge clk); #1;
      chk(crc == model, "random masks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
