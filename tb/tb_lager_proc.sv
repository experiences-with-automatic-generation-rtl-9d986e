// tb_lager_proc -- the processor running its test program.
//
// Per sample the host puts a multiplier B in host word 0, the sample M
// arrives on the parallel input and a word S arrives on the serial link.
// The program must return: M*B by serial-parallel steps on the parallel
// output, the same product by Booth steps in host word 2, S+5 on the
// serial output, the sign decision of M (subprogram with two conditional
// writes) in host word 3, modulo-3 indexed writes in host words 4..6, a
// modulo decrement wrap in host word 13, and the host interrupt. The
// product is checked against floor(M*B / 2**15) and the issue-cycle count
// of one pass against the program length (50 issued words).
`timescale 1ns/1ps
module tb_lager_proc;
  localparam int WL = 16;
  logic clk = 0, rst = 1, sync = 0;
  logic [WL-1:0] par_in = '0, par_out, h_wdata = '0, h_rdata;
  logic par_out_valid, ser_out_d, ser_out_v, h_irq, overrun;
  logic ser_in_d = 0, ser_in_v = 0, h_we = 0, h_irq_ack = 0;
  logic [3:0] h_addr = '0;
  int checks = 0, failures = 0;
  lager_proc #(.PROG(1), .X0_MOD(6), .X1_MOD(3)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  task automatic hread(int a, output logic [15:0] d);
    h_addr = 4'(a); #1; d = h_rdata;
  endtask
  int n_issue = 0;
  always @(posedge clk) if (!rst && dut.issue) n_issue++;
  logic [15:0] ser_rx;
  int ser_n = 0, ser_words = 0;
  always @(posedge clk) if (!rst && ser_out_v) begin
    ser_rx = {ser_out_d, ser_rx[15:1]};
    ser_n++;
    if (ser_n == 16) begin ser_n = 0; ser_words++; end
  end
  logic [15:0] out_q [$];
  always @(posedge clk) if (!rst && par_out_valid) out_q.push_back(par_out);

  initial begin
    logic signed [15:0] M, B, S;
    logic [15:0] d;
    longint p;
    int i0;
    repeat (3) @(posedge clk); rst <= 0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      M = 16'($urandom); B = 16'($urandom); S = 16'($urandom);
      if (n == 0) M = 16'sh7fff;
      if (n == 1) begin M = -16'sd3; B = 16'sh8000; end
      if (M == -16'sd32768 && B == -16'sd32768) B = 0;
      @(negedge clk);
      h_addr = 0; h_wdata = B; h_we = 1; @(negedge clk); h_we = 0;
      for (int b = 0; b < 16; b++) begin
        ser_in_d = S[b]; ser_in_v = 1; @(negedge clk);
      end
      ser_in_v = 0;
      par_in = M; sync = 1; @(negedge clk); sync = 0;
      i0 = n_issue;
      while (!h_irq) @(negedge clk);
      repeat (20) @(negedge clk);
      p = (longint'(M) * longint'(B)) >>> 15;
      check(out_q.size() == 1, "one parallel output");
      if (out_q.size() > 0) begin d = out_q.pop_front(); check(d == 16'(p), $sformatf("serial-parallel product %h*%h = %h got %h", M, B, 16'(p), d)); end
      hread(2, d); check(d == 16'(p), $sformatf("Booth product got %h exp %h", d, 16'(p)));
      hread(3, d); check(d == ((M >= 0) ? 16'd100 : 16'd200), "conditional write result");
      hread(4, d); check(d == 16'd11, "modulo index write 4");
      hread(5, d); check(d == 16'd9, "modulo index write 5");
      hread(6, d); check(d == 16'd10, "modulo index write 6");
      hread(7, d); check(d == 16'd2, "indexed write before decrement");
      hread(13, d); check(d == 16'd3, "decrement wraps to modulus - 1");
      check(ser_words == n + 1 && ser_rx == 16'(S + 16'sd5), $sformatf("serial out %h exp %h", ser_rx, 16'(S + 16'sd5)));
      check(n_issue - i0 == 50, $sformatf("issue cycles %0d", n_issue - i0));
      @(negedge clk);
      h_irq_ack = 1; @(negedge clk); h_irq_ack = 0;
      check(!h_irq, "interrupt acknowledged");
      // clear checked host words so the next pass must rewrite them
      for (int a = 2; a < 14; a++) begin h_addr = 4'(a); h_wdata = 16'hDEAD; h_we = 1; @(negedge clk); end
      h_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
