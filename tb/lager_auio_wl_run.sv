// lager_auio_wl_run -- test driver for the arithmetic pipeline at one word
// length WL, used by tb_lager_auio_wl.
//
// It feeds the pipeline with 400 random microwords and compares every
// result on the parallel port with a word-length-independent model
// (64-bit integers wrapped to the accumulator width WL+2 after each
// operation). Then it runs directed multiplications with full-width random
// operands M (RAM) and B (parallel input): WL-1 serial MULS steps plus MULL,
// and WL/2-1 Booth MULB steps plus MULBL. Both products must equal
// floor(M*B / 2**(WL-1)) in the low WL bits, in WL and WL/2 step cycles.
// Ports: clk, rst in; done, checks and failures out. WL must be even.
`timescale 1ns/1ps
module lager_auio_wl_run
  import lager_pkg::*;
#(
  parameter int unsigned WL = 18
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned AW = WL + 2;

  logic issue = 0, cond = 0;
  uword_t word = UW_NOP, s1_word;
  logic s1_valid;
  logic [ADDR_W-1:0] s1_addr, wr_addr;
  logic [WL-1:0] ram_rdata, par_in, ser_rdata, host_rdata, wr_data, par_out;
  logic ram_we, ser_load, host_we, host_irq_set, par_out_valid, fsm_step, acc_sign, mr1, mr0;
  logic [FOP_W-1:0] fop;
  logic [WL-1:0] rbase, pin;

  lager_auio #(.WL(WL)) dut (.*);

  assign s1_addr    = s1_word.addr;
  assign ram_rdata  = rbase ^ WL'(s1_addr);
  assign par_in     = pin;
  assign ser_rdata  = WL'(24'h00F0F0);
  assign host_rdata = WL'(24'hFF00FF);

  initial begin checks = 0; failures = 0; done = 0; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL WL=%0d %s", WL, what); end
  endtask

  // sign-extend the low n bits of x
  function automatic longint sx(longint x, int n);
    return (x <<< (64 - n)) >>> (64 - n);
  endfunction

  function automatic longint booth(logic [2:0] b, longint m);
    case (b)
      3'b001, 3'b010: return m;
      3'b011:         return 2 * m;
      3'b100:         return -2 * m;
      3'b101, 3'b110: return -m;
      default:        return 0;
    endcase
  endfunction

  longint macc = 0, mmr = 0;
  logic   mprev = 0;
  logic [WL-1:0] exp_q [$];

  function automatic logic [WL-1:0] model(uword_t w);
    longint op, m;
    logic [WL-1:0] rd;
    rd = rbase ^ WL'(w.addr);
    case (w.src)
      SRC_IN:   op = longint'(pin);
      SRC_SER:  op = longint'(ser_rdata);
      SRC_HOST: op = longint'(host_rdata);
      SRC_K:    op = sx(longint'(w.k), 16);
      default:  op = longint'(rd);
    endcase
    op = sx(op, WL) >>> w.shf;
    m  = op;
    case (w.aop)
      AOP_LD:    macc = m;
      AOP_ADD:   macc = sx(macc + m, AW);
      AOP_SUB:   macc = sx(macc - m, AW);
      AOP_MULS:  macc = sx(macc + (mmr[0] ? m : 0), AW) >>> 1;
      AOP_MULL:  macc = sx(macc - (mmr[0] ? m : 0), AW);
      AOP_MULD:  macc = sx((mmr[1:0] == 2'b10) ? macc - m : macc + m, AW);
      AOP_MULDL: macc = (mmr[1:0] == 2'b10) ? -m : m;
      AOP_MULB:  macc = sx(macc + booth({mmr[1:0], mprev}, m), AW) >>> 2;
      AOP_MULBL: macc = sx(macc + booth({mmr[1:0], mprev}, m), AW) >>> 1;
      default: ;
    endcase
    case (w.mrop)
      MR_LOAD: begin mmr = op; mprev = 1'b0; end
      MR_SH1:  begin mprev = mmr[0]; mmr = mmr >>> 1; end
      MR_SH2:  begin mprev = mmr[1]; mmr = mmr >>> 2; end
      default: ;
    endcase
    return w.wsel ? WL'(op) : WL'(macc);
  endfunction

  int nout = 0;
  always @(posedge clk) begin
    if (!rst && par_out_valid) begin
      logic [WL-1:0] e;
      e = exp_q.pop_front();
      check(par_out == e, $sformatf("output %0d: got %h exp %h", nout, par_out, e));
      nout++;
    end
  end

  // issue one word at the next negedge; the model sees the operands then
  task automatic put(uword_t w);
    @(negedge clk);
    word  = w;
    issue = 1'b1;
    if (w.wout) exp_q.push_back(model(w));
    else void'(model(w));
  endtask

  task automatic idle(int n);
    @(negedge clk);
    issue = 1'b0;
    word  = UW_NOP;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    uword_t w;
    longint M, B, p;
    logic [WL-1:0] last;
    @(negedge clk);
    while (rst) @(negedge clk);
    // random phase
    rbase = WL'({$urandom, $urandom});
    pin   = WL'({$urandom, $urandom});
    for (int n = 0; n < 400; n++) begin
      w = UW_NOP;
      w.src  = src_e'($urandom_range(4));
      w.addr = ADDR_W'($urandom);
      w.k    = K_W'($urandom);
      w.shf  = SHF_W'($urandom_range(3));
      w.aop  = aop_e'($urandom_range(9));
      w.mrop = mrop_e'($urandom_range(3));
      w.wsel = ($urandom_range(7) == 0);
      w.wout = 1'b1;
      put(w);
    end
    idle(8);
    // directed products, serial-parallel then Booth
    for (int n = 0; n < 20; n++) begin
      rbase = WL'({$urandom, $urandom});
      pin   = WL'({$urandom, $urandom});
      if (n == 0) begin rbase = {1'b0, {(WL-1){1'b1}}}; pin = {1'b1, {(WL-1){1'b0}}}; end
      M = sx(longint'(rbase), WL);
      B = sx(longint'(pin), WL);
      if (M == B && B == sx(longint'(1) <<< (WL - 1), WL)) begin
        rbase = '0; M = 0;    // -1 * -1 does not fit
      end
      p = (M * B) >>> (WL - 1);
      w = UW_NOP; w.src = SRC_IN; w.mrop = MR_LOAD; put(w);
      w = UW_NOP; w.src = SRC_K; w.k = '0; w.aop = AOP_LD; put(w);
      if (n % 2 == 0) begin
        for (int s = 0; s < WL - 1; s++) begin
          w = UW_NOP; w.aop = AOP_MULS; w.mrop = MR_SH1; put(w);
        end
        w = UW_NOP; w.aop = AOP_MULL; w.wout = 1'b1; put(w);
      end else begin
        for (int s = 0; s < WL / 2 - 1; s++) begin
          w = UW_NOP; w.aop = AOP_MULB; w.mrop = MR_SH2; put(w);
        end
        w = UW_NOP; w.aop = AOP_MULBL; w.mrop = MR_SH2; w.wout = 1'b1; put(w);
      end
      last = exp_q[$];
      check(last == WL'(p), $sformatf("%s product %0d * %0d: model %h formula %h",
                                       (n % 2 == 0) ? "serial" : "Booth", M, B, last, WL'(p)));
      idle(8);
    end
    check(exp_q.size() == 0 && nout == 420, $sformatf("all %0d outputs seen", nout));
    done = 1'b1;
  end
endmodule
