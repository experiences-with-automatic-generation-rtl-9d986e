// tb_lager_rom -- the ROM holds the selected microprogram word for word.
`timescale 1ns/1ps
module tb_lager_rom;
  import lager_pkg::*;
  import lager_prog_pkg::*;
  logic [7:0] addr;
  uword_t word_d, word_t;
  int checks = 0, failures = 0;
  lager_rom #(.PROG(PROG_DFE), .DEPTH(256)) u_d (.addr, .word(word_d));
  lager_rom #(.PROG(PROG_TEST), .DEPTH(256)) u_t (.addr, .word(word_t));
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    int eops = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1;
      check(word_d == prog_word(PROG_DFE, i), $sformatf("dfe word %0d", i));
      check(word_t == prog_word(PROG_TEST, i), $sformatf("test word %0d", i));
      if (word_d.eop) eops++;
    end
    // spot checks written out by hand
    addr = 8'd2; #1;
    check(word_d.aop == AOP_MULD && word_d.mrop == MR_SH2 && word_d.amode == AM_X0, "dfe word 2 is the sign-multiply step");
    addr = 8'd13; #1;
    check(word_d.aop == AOP_MULDL && word_d.mrop == MR_SH2 && word_d.addr == 8'd10, "dfe word 13 is the update step");
    addr = 8'd17; #1;
    check(word_d.eop && word_d.wram == WR_ALW && word_d.addr == 8'd0, "dfe word 17 ends the program");
    addr = 8'd40; #1;
    check(word_d == UW_NOP, "unused word is a no-op");
    check(eops == 1, "one end of program");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
