// tb_lager_pc -- master program counter: start on sync, count, redirect,
// stop on eop, drain delay before restart, pending strobe, overrun flag.
// A second instance with DRAIN = 0 runs a program whose eop word also
// closes a loop: eop must wait for the last loop pass, and a queued strobe
// restarts it after one idle cycle.
`timescale 1ns/1ps
module tb_lager_pc;
  logic clk = 0, rst = 1, sync = 0, eop = 0, redir = 0;
  logic [7:0] redir_pc = '0, pc;
  logic issue, overrun;
  int checks = 0, failures = 0;
  lager_pc #(.PC_W(8), .DRAIN(3)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // program of 6 words, eop at 5, redirect at 2 -> 4
  always_comb begin
    eop = issue && pc == 5;
    redir = issue && pc == 2;
    redir_pc = 8'd4;
  end
  // DRAIN = 0 instance: words 0 1 2 3, word 3 loops back to 1 once, eop at 3
  logic [7:0] pc0;
  logic issue0, overrun0, eop0, redir0;
  int nloop0 = 0, n0 = 0, gap0 = 0, maxgap0 = 0, started0 = 0;
  lager_pc #(.PC_W(8), .DRAIN(0)) dut0 (.clk, .rst, .sync, .eop(eop0), .redir(redir0),
    .redir_pc(8'd1), .pc(pc0), .issue(issue0), .overrun(overrun0));
  assign eop0   = issue0 && pc0 == 3;
  assign redir0 = issue0 && pc0 == 3 && nloop0 == 0;
  int trace0 [$];
  always_ff @(posedge clk) if (!rst) begin
    if (issue0) begin
      trace0.push_back(pc0);
      if (pc0 == 3) nloop0 <= (nloop0 == 0) ? 1 : 0;
      if (started0 > 0 && gap0 > maxgap0) maxgap0 <= gap0;
      started0 <= 1;
      gap0 <= 0;
    end else gap0 <= gap0 + 1;
  end
  int trace [$];
  always_ff @(posedge clk) if (issue && !rst) trace.push_back(pc);
  initial begin
    int t0;
    repeat (3) @(posedge clk); rst <= 0;
    repeat (3) @(posedge clk);
    check(!issue && pc == 0, "idle after reset");
    sync <= 1; @(posedge clk); sync <= 0; #1;
    check(issue && pc == 0, "issue starts at the edge that samples sync");
    // second strobe while running is remembered
    sync <= 1; @(posedge clk); sync <= 0;
    repeat (16) @(posedge clk);
    foreach (trace[i]) $write("%0d ", trace[i]); $display("");
    check(trace.size() == 10, $sformatf("two passes of 5 words, got %0d", trace.size()));
    if (trace.size() >= 5) check(trace[0] == 0 && trace[1] == 1 && trace[2] == 2 && trace[3] == 4 && trace[4] == 5, "sequence 0 1 2 4 5");
    if (trace.size() >= 10) check(trace[5] == 0 && trace[9] == 5, "second pass");
    check(trace0.size() == 14, $sformatf("DRAIN=0: two passes of 7 words, got %0d", trace0.size()));
    if (trace0.size() >= 7)
      check(trace0[0] == 0 && trace0[3] == 3 && trace0[4] == 1 && trace0[6] == 3, "DRAIN=0: eop waits for the loop");
    check(maxgap0 == 1, $sformatf("DRAIN=0: queued strobe restarts after %0d idle cycle(s)", maxgap0));
    // drain: after eop the next pass waits DRAIN cycles even if sync is early
    trace.delete();
    sync <= 1; @(posedge clk); sync <= 0;
    t0 = 0;
    while (!issue) begin @(posedge clk); t0++; end
    while (issue) @(posedge clk);
    #1;  // the pass just ended; strobe at once
    sync <= 1; @(posedge clk); sync <= 0;
    t0 = 1;
    #1;
    while (!issue) begin @(posedge clk); #1; t0++; end
    check(t0 >= 3 && t0 <= 4, $sformatf("restart delayed by drain, waited %0d", t0));
    // overrun: two strobes while one is pending
    repeat (1) @(posedge clk);
    sync <= 1; @(posedge clk); sync <= 0; @(posedge clk);
    sync <= 1; @(posedge clk); sync <= 0; #1;
    check(overrun, "overrun pulse");
    @(posedge clk); #1;
    check(!overrun, "overrun is a pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
