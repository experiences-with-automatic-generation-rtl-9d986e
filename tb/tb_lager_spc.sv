// tb_lager_spc -- slave PC driven by a small PC model: DO loop repeated the
// right number of times, CALL/RET, loop with count 1.
`timescale 1ns/1ps
module tb_lager_spc;
  import lager_pkg::*;
  logic clk = 0, rst = 1, issue = 0;
  logic [7:0] pc = 0, tgt, redir_pc;
  logic [7:0] cnt;
  seq_e seq;
  logic redir, loop_back;
  int checks = 0, failures = 0;
  lager_spc #(.PC_W(8)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // program: 0: DO tgt=2 cnt=3 ; 1,2 body ; 3: CALL 10 ; 4: DO tgt 5 cnt 1; 5; 6: end
  //          10: ; 11: RET
  always_comb begin
    seq = SEQ_NONE; tgt = '0; cnt = '0;
    case (pc)
      0: begin seq = SEQ_DO; tgt = 2; cnt = 3; end
      3: begin seq = SEQ_CALL; tgt = 10; end
      4: begin seq = SEQ_DO; tgt = 5; cnt = 1; end
      11: seq = SEQ_RET;
      default: ;
    endcase
  end
  int trace [$];
  int loops = 0;
  initial begin
    int expv [$] = '{0,1,2,1,2,1,2,3,10,11,4,5,6};
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk);
    issue <= 1;
    while (pc != 6) begin
      @(posedge clk);
      trace.push_back(pc);
      if (loop_back) loops++;
      pc <= redir ? redir_pc : pc + 1;
    end
    issue <= 0;
    foreach (trace[i]) $write("%0d ", trace[i]); $display("");
    check(trace.size() == expv.size(), $sformatf("length %0d", trace.size()));
    for (int i = 0; i < expv.size() && i < trace.size(); i++)
      check(trace[i] == expv[i], $sformatf("step %0d pc %0d exp %0d", i, trace[i], expv[i]));
    check(loops == 2, $sformatf("loop repeats %0d", loops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (500) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
