// tb_lager_host_iobuf -- both ports against a model, write priority, interrupt.
`timescale 1ns/1ps
module tb_lager_host_iobuf;
  logic clk = 0, rst = 1;
  logic [3:0] p_raddr = '0, p_waddr = '0, h_addr = '0;
  logic [15:0] p_rdata, p_wdata = '0, h_wdata = '0, h_rdata;
  logic p_we = 0, p_irq_set = 0, h_we = 0, irq, irq_ack = 0;
  int checks = 0, failures = 0;
  lager_host_iobuf #(.WL(16), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [15:0] model [16];
  bit mirq = 0;
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    foreach (model[i]) model[i] = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      p_raddr = 4'($urandom); p_waddr = 4'($urandom); h_addr = ($urandom_range(3) == 0) ? p_waddr : 4'($urandom);
      p_we = $urandom_range(1); h_we = $urandom_range(1);
      p_wdata = 16'($urandom); h_wdata = 16'($urandom);
      p_irq_set = ($urandom_range(7) == 0); irq_ack = ($urandom_range(3) == 0);
      #1;
      check(p_rdata == model[p_raddr] && h_rdata == model[h_addr], "reads");
      check(irq == mirq, "irq");
      @(posedge clk);
      if (h_we) model[h_addr] = h_wdata;
      if (p_we) model[p_waddr] = p_wdata;
      if (p_irq_set) mirq = 1; else if (irq_ack) mirq = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
