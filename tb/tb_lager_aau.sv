// tb_lager_aau -- addressing modes and modulo index counting against a model.
`timescale 1ns/1ps
module tb_lager_aau;
  import lager_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  amode_e amode = AM_DIR;
  logic [7:0] field = '0, addr;
  xop_e x0op = X_NOP, x1op = X_NOP;
  logic x0z, x1z;
  int checks = 0, failures = 0;
  lager_aau #(.X0_MOD(6), .X1_MOD(5)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  int mx0 = 0, mx1 = 0;
  function automatic int upd(int x, xop_e op, int m);
    case (op)
      X_CLR: return 0;
      X_INC: return (x + 1) % m;
      X_DEC: return (x + m - 1) % m;
      default: return x;
    endcase
  endfunction
  initial begin
    int e;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      amode = amode_e'($urandom_range(2));
      field = 8'($urandom_range(255));
      x0op  = xop_e'($urandom_range(3));
      x1op  = xop_e'($urandom_range(3));
      en    = ($urandom_range(3) != 0);
      #1;
      e = (amode == AM_X0) ? field + mx0 : (amode == AM_X1) ? field + mx1 : field;
      check(addr == 8'(e), $sformatf("addr %0d exp %0d", addr, e));
      check(x0z == (mx0 == 0) && x1z == (mx1 == 0), "zero flags");
      @(posedge clk);
      if (en) begin mx0 = upd(mx0, x0op, 6); mx1 = upd(mx1, x1op, 5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
