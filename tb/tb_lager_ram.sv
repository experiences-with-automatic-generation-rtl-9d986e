// tb_lager_ram -- reset clearing, random writes and reads, write bypass.
`timescale 1ns/1ps
module tb_lager_ram;
  logic clk = 0, rst = 1, we = 0;
  logic [5:0] raddr = '0, waddr = '0;
  logic [15:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  lager_ram #(.WL(16), .DEPTH(64)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [15:0] model [64];
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    foreach (model[i]) model[i] = '0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin raddr = 6'(i); #1; check(rdata == 0, "cleared"); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = $urandom_range(1); waddr = 6'($urandom_range(63)); wdata = 16'($urandom);
      raddr = ($urandom_range(3) == 0) ? waddr : 6'($urandom_range(63));
      #1;
      check(rdata == ((we && waddr == raddr) ? wdata : model[raddr]), "read");
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
