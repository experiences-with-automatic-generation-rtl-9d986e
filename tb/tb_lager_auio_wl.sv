// tb_lager_auio_wl -- the arithmetic pipeline at the other word lengths of
// the processor family, 18 and 26 bits.
//
// Two copies of lager_auio_wl_run drive one pipeline each, WL = 18 and
// WL = 26: random microwords against a bit-exact model, then serial and
// Booth multiplications of full-width operands checked against
// floor(M*B / 2**(WL-1)). The test passes when both copies finish without
// a failure.
`timescale 1ns/1ps
module tb_lager_auio_wl;
  logic clk = 0, rst = 1;
  logic done18, done26;
  int checks18, failures18, checks26, failures26;
  int checks, failures;

  lager_auio_wl_run #(.WL(18)) u18 (.clk, .rst, .done(done18), .checks(checks18), .failures(failures18));
  lager_auio_wl_run #(.WL(26)) u26 (.clk, .rst, .done(done26), .checks(checks26), .failures(failures26));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (!(done18 && done26)) @(posedge clk);
    checks   = checks18 + checks26;
    failures = failures18 + failures26;
    $display("WL=18: %0d checks, WL=26: %0d checks", checks18, checks26);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks18 + checks26, failures18 + failures26 + 1);
    $finish;
  end
endmodule
