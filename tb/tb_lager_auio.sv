// tb_lager_auio -- random microword streams through the four-stage pipeline.
//
// Every word outputs its accumulator result on the parallel port, so the
// port shows the accumulator after each word in issue order. A model of the
// shift, complement-add and multiplier-register operations predicts that
// stream; the model also predicts the gated RAM write enable from the
// condition bit. Latency from issue to output is checked (four clock
// edges from the edge that takes the word).
`timescale 1ns/1ps
module tb_lager_auio;
  import lager_pkg::*;
  localparam int WL = 16;
  logic clk = 0, rst = 1, issue = 0, cond = 0;
  uword_t word = UW_NOP, s1_word;
  logic s1_valid;
  logic [7:0] s1_addr, wr_addr;
  logic [WL-1:0] ram_rdata, par_in, ser_rdata, host_rdata, wr_data, par_out;
  logic ram_we, ser_load, host_we, host_irq_set, par_out_valid, fsm_step, acc_sign, mr1, mr0;
  logic [1:0] fop;
  int checks = 0, failures = 0;
  lager_auio #(.WL(WL)) dut (.*);
  always #5 clk = ~clk;
  assign s1_addr   = s1_word.addr;
  assign ram_rdata = 16'h1234 ^ {8'h0, s1_addr};
  assign par_in    = 16'h8001;
  assign ser_rdata = 16'h00F0;
  assign host_rdata = 16'hFF00;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // model
  logic signed [17:0] macc = 0;
  logic [15:0] mmr = 0;
  logic mprev = 0;
  logic [15:0] exp_q [$];
  int issue_t [$];
  bit  exp_we [$];
  int cyc = 0;
  function automatic logic signed [17:0] booth(logic [2:0] b, logic signed [17:0] m);
    case (b)
      3'b001, 3'b010: return m;
      3'b011: return 2*m;
      3'b100: return -2*m;
      3'b101, 3'b110: return -m;
      default: return 0;
    endcase
  endfunction
  function automatic void model(uword_t w);
    logic [15:0] op;
    logic signed [17:0] m;
    case (w.src)
      SRC_IN: op = 16'h8001;
      SRC_SER: op = 16'h00F0;
      SRC_HOST: op = 16'hFF00;
      SRC_K: op = w.k;
      default: op = 16'h1234 ^ {8'h0, w.addr};
    endcase
    op = 16'($signed(op) >>> w.shf);
    m = 18'($signed(op));
    case (w.aop)
      AOP_LD: macc = m;
      AOP_ADD: macc = macc + m;
      AOP_SUB: macc = macc - m;
      AOP_MULS: macc = (macc + (mmr[0] ? m : 18'sd0)) >>> 1;
      AOP_MULL: macc = macc - (mmr[0] ? m : 18'sd0);
      AOP_MULD: macc = (mmr[1:0] == 2'b10) ? macc - m : macc + m;
      AOP_MULDL: macc = (mmr[1:0] == 2'b10) ? -m : m;
      AOP_MULB: macc = (macc + booth({mmr[1:0], mprev}, m)) >>> 2;
      AOP_MULBL: macc = (macc + booth({mmr[1:0], mprev}, m)) >>> 1;
      default: ;
    endcase
    case (w.mrop)
      MR_LOAD: begin mmr = op; mprev = 0; end
      MR_SH1: begin mprev = mmr[0]; mmr = 16'($signed(mmr) >>> 1); end
      MR_SH2: begin mprev = mmr[1]; mmr = 16'($signed(mmr) >>> 2); end
      default: ;
    endcase
    exp_q.push_back(w.wsel ? op : macc[15:0]);
  endfunction

  int nout = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && par_out_valid) begin
      int t;
      check(par_out == exp_q.pop_front(), $sformatf("output %0d", nout));
      t = issue_t.pop_front();
      check(cyc - t == 4, $sformatf("latency %0d", cyc - t));
      nout++;
    end
    if (!rst && ram_we != 0 || (!rst && dut.v4 && dut.w4.wram != WR_NO)) begin
      check(ram_we == ((dut.w4.wram == WR_ALW) || (dut.w4.wram == WR_COND && cond) ||
                       (dut.w4.wram == WR_NCOND && !cond)), "gated write");
    end
  end

  initial begin
    uword_t w;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      cond = $urandom_range(1);
      w = UW_NOP;
      w.src  = src_e'($urandom_range(4));
      w.addr = 8'($urandom);
      w.k    = 16'($urandom);
      w.shf  = 4'($urandom_range(3));
      w.aop  = aop_e'($urandom_range(9));
      w.mrop = mrop_e'($urandom_range(3));
      w.wram = wr_e'($urandom_range(3));
      w.wsel = ($urandom_range(7) == 0);
      w.wout = 1'b1;
      issue = ($urandom_range(4) != 0);
      word  = w;
      if (issue) begin model(w); issue_t.push_back(cyc + 1); end
    end
    @(negedge clk); issue = 0;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
