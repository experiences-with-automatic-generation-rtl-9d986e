// tb_lager_ser_link -- transmitter into receiver: words arrive intact, take
// WL cycles each, and the line carries the LSB first.
`timescale 1ns/1ps
module tb_lager_ser_link;
  localparam int WL = 16;
  logic clk = 0, rst = 1, load = 0;
  logic [WL-1:0] wdata = '0, rdata;
  logic sd, sv, busy, rvalid;
  int checks = 0, failures = 0;
  lager_ser_tx #(.WL(WL)) u_tx (.clk, .rst, .load, .wdata, .sd, .sv, .busy);
  lager_ser_rx #(.WL(WL)) u_rx (.clk, .rst, .sd, .sv, .rdata, .rvalid);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    logic [WL-1:0] w;
    int t;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 30; n++) begin
      w = 16'($urandom);
      @(negedge clk); load = 1; wdata = w;
      @(negedge clk); load = 0;
      check(sv && sd == w[0], "first bit is the LSB");
      t = 0;
      while (!rvalid) begin @(negedge clk); t++; end
      check(rdata == w, $sformatf("word %h got %h", w, rdata));
      check(t == WL, $sformatf("transfer took %0d cycles", t));
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
