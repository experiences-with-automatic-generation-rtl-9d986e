// tb_lager_fsm -- the condition FSM with the equalizer table: decision,
// the two-step error-sign selection (ERRP latches the sign when cond is
// set, ERRN selects between the latch and the current sign), and hold when
// fop = 0 or step is low.
`timescale 1ns/1ps
module tb_lager_fsm;
  import lager_pkg::*;
  logic clk = 0, rst = 1, step = 0;
  logic [1:0] fop = '0;
  logic acc_sign = 0, mr1 = 0, mr0 = 0, x0z = 0, x1z = 0, cond;
  logic [1:0] state;
  int checks = 0, failures = 0;
  lager_fsm #(.PROG(0)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  bit mc = 0, me = 0;
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      fop = 2'($urandom_range(3)); step = $urandom_range(1);
      acc_sign = $urandom_range(1); mr1 = $urandom_range(1); mr0 = $urandom_range(1);
      x0z = $urandom_range(1); x1z = $urandom_range(1);
      @(posedge clk);
      if (step) case (fop)
        2'd1: mc = ~acc_sign;
        2'd2: if (mc) me = ~acc_sign;
        2'd3: begin mc = mc ? me : ~acc_sign; me = mc; end
        default: ;
      endcase
      #1;
      check(cond == mc, $sformatf("cond after fop %0d", fop));
      check(state[0] == me, "error state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
