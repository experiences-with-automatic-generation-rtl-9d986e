// tb_lager_booth -- all eight recodings times random multiplicands.
`timescale 1ns/1ps
module tb_lager_booth;
  logic [2:0] bits;
  logic signed [17:0] m, pp;
  int checks = 0, failures = 0;
  lager_booth #(.W(18)) dut (.*);
  initial begin
    int d, e;
    for (int n = 0; n < 400; n++) begin
      bits = 3'(n % 8);
      m = 18'($signed(16'($urandom)));
      #1;
      d = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      e = d * int'(m);
      checks++;
      if (pp != 18'(e)) begin failures++; $display("FAIL bits %b m %0d pp %0d", bits, m, pp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
