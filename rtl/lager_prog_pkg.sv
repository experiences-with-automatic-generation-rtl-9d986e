// lager_prog_pkg -- microprograms and condition-FSM tables for the core.
//
// A Lager-style processor is specialised for one task by its ROM contents
// and by the table of its user-defined condition FSM. Both are given here as
// functions of the program number, so the ROM and the FSM are filled at
// elaboration time without data files.
//
//   PROG_DFE  (0)  sign-sign adaptive decision feedback equalizer, six
//                  feedback taps plus the reference level c0. The delay line
//                  of past decisions is one word with two bits per tap
//                  (2'b10 = +1, 2'b01 = -1), shifted right by two per
//                  sample with the new decision entering at bits 11:10. The
//                  feedback sum uses the two-bit sign multiply step (MULD),
//                  one tap per cycle. The error sign is picked by the FSM
//                  from x_rec - c0 and x_rec + c0, and each coefficient
//                  update is a MULDL step (k*err*a_i) plus one add. One
//                  sample is 33 words; with no drain cycles strobes may
//                  come every 34 cycles.
//   PROG_TEST (1)  exercises every datapath and sequencing feature; it is
//                  only used by the processor testbench.
//
// The DFE algorithm (taps t_i = c_i if a_i = 10 else -c_i, adaptation
// c_i += k*err*a_i, err = sign(x_rec - c0*a0), the packed delay line) is the
// published one; the instruction schedule, the RAM layout and the step size
// k are this design's own.
package lager_prog_pkg;
  import lager_pkg::*;

  localparam int unsigned PROG_DFE  = 0;
  localparam int unsigned PROG_TEST = 1;

  // DFE RAM layout and constants
  localparam int unsigned DFE_C0    = 0;    // reference level c0
  localparam int unsigned DFE_CBASE = 1;    // RAM[1+j] = c_(6-j), j = 0..5
  localparam int unsigned DFE_A     = 8;    // packed decision delay line a1..a6
  localparam int unsigned DFE_AHI   = 9;    // new decision code << 10
  localparam int unsigned DFE_KE    = 10;   // adaptation step -err*k
  localparam int unsigned DFE_TAPS  = 6;
  localparam int unsigned DFE_K     = 64;   // adaptation step k (LSBs)

  // FSM operation codes used by both programs
  localparam logic [FOP_W-1:0] FOP_DEC  = 2'd1;  // cond = (acc >= 0)
  localparam logic [FOP_W-1:0] FOP_ERRP = 2'd2;  // if cond: state[0] = (acc >= 0)
  localparam logic [FOP_W-1:0] FOP_ERRN = 2'd3;  // e = cond ? state[0] : (acc >= 0);
                                                 // state[0] = cond = e

  function automatic uword_t dfe_word(int unsigned pc);
    uword_t w;
    w = UW_NOP;
    case (pc)
      // feedback filter: acc = x_in - sum t_i, one tap per cycle
      0:  begin w.addr = ADDR_W'(DFE_A); w.mrop = MR_LOAD; end
      1:  begin w.src = SRC_IN; w.aop = AOP_LD; w.seq = SEQ_DO; w.tgt = 8'd2; w.cnt = CNT_W'(DFE_TAPS); end
      2:  begin w.amode = AM_X0; w.addr = ADDR_W'(DFE_CBASE); w.aop = AOP_MULD; w.mrop = MR_SH2;
                w.x0op = X_INC; w.fop = FOP_DEC; end
      // decision a0 = sign(x_rec), kept pre-shifted in AHI
      3:  begin w.src = SRC_K; w.k = 16'h0400; w.wsel = 1'b1; w.wram = WR_ALW; w.addr = ADDR_W'(DFE_AHI); end
      4:  begin w.src = SRC_K; w.k = 16'h0800; w.wsel = 1'b1; w.wram = WR_COND; w.addr = ADDR_W'(DFE_AHI); end
      // error sign of x_rec - c0*a0: both candidates, the FSM keeps the right one
      5:  begin w.addr = ADDR_W'(DFE_C0); w.aop = AOP_SUB; w.fop = FOP_ERRP; end
      6:  begin w.addr = ADDR_W'(DFE_C0); w.aop = AOP_ADD; end
      7:  begin w.addr = ADDR_W'(DFE_C0); w.aop = AOP_ADD; w.fop = FOP_ERRN; end
      // adaptation step KE = -err*k
      8:  begin w.addr = ADDR_W'(DFE_A); w.mrop = MR_LOAD; end
      9:  begin w.src = SRC_K; w.k = K_W'(-DFE_K); w.wsel = 1'b1; w.wram = WR_ALW; w.addr = ADDR_W'(DFE_KE); end
      10: begin w.src = SRC_K; w.k = K_W'(DFE_K); w.wsel = 1'b1; w.wram = WR_NCOND; w.addr = ADDR_W'(DFE_KE); end
      // delay line: A = (A >>> 2) + (a0 code << 10)
      11: begin w.addr = ADDR_W'(DFE_AHI); w.aop = AOP_LD; end
      12: begin w.addr = ADDR_W'(DFE_A); w.shf = 4'd2; w.aop = AOP_ADD; w.wram = WR_ALW;
                w.seq = SEQ_DO; w.tgt = 8'd14; w.cnt = CNT_W'(DFE_TAPS); end
      // c_i += k*err*a_i, i = 6..1, two cycles per coefficient
      13: begin w.addr = ADDR_W'(DFE_KE); w.aop = AOP_MULDL; w.mrop = MR_SH2; end
      14: begin w.amode = AM_X0; w.addr = ADDR_W'(DFE_CBASE); w.aop = AOP_ADD; w.wram = WR_ALW; w.x0op = X_INC; end
      // output a0, then c0 += k*err*a0
      15: begin w.addr = ADDR_W'(DFE_AHI); w.shf = 4'd10; w.mrop = MR_LOAD; w.wsel = 1'b1;
                w.wout = 1'b1; w.wser = 1'b1; end
      16: begin w.addr = ADDR_W'(DFE_KE); w.aop = AOP_MULDL; end
      17: begin w.addr = ADDR_W'(DFE_C0); w.aop = AOP_ADD; w.wram = WR_ALW; w.eop = 1'b1; end
      default: ;
    endcase
    return w;
  endfunction

  // Test program RAM layout: [0] M, [1] B, [3] FSM result, [4..6] X1 writes.
  function automatic uword_t test_word(int unsigned pc);
    uword_t w;
    w = UW_NOP;
    case (pc)
      0:  begin w.src = SRC_IN; w.aop = AOP_LD; w.wram = WR_ALW; w.addr = 8'd0; w.x0op = X_CLR; w.x1op = X_CLR; end
      1:  begin w.src = SRC_HOST; w.addr = 8'd0; w.mrop = MR_LOAD; end
      2:  begin w.src = SRC_K; w.k = '0; w.aop = AOP_LD; w.seq = SEQ_DO; w.tgt = 8'd3; w.cnt = 8'd15; end
      3:  begin w.addr = 8'd0; w.aop = AOP_MULS; w.mrop = MR_SH1; end
      4:  begin w.addr = 8'd0; w.aop = AOP_MULL; w.wout = 1'b1; end
      5:  begin w.src = SRC_HOST; w.addr = 8'd0; w.mrop = MR_LOAD; end
      6:  begin w.src = SRC_K; w.k = '0; w.aop = AOP_LD; w.seq = SEQ_DO; w.tgt = 8'd7; w.cnt = 8'd7; end
      7:  begin w.addr = 8'd0; w.aop = AOP_MULB; w.mrop = MR_SH2; end
      8:  begin w.addr = 8'd0; w.aop = AOP_MULBL; w.mrop = MR_SH2; end
      9:  begin w.seq = SEQ_CALL; w.tgt = 8'd30; w.addr = 8'd2; w.whost = 1'b1; end
      10: begin w.src = SRC_SER; w.aop = AOP_LD; end
      11: begin w.src = SRC_K; w.k = 16'd5; w.aop = AOP_ADD; w.wser = 1'b1; end
      12: begin w.src = SRC_K; w.k = 16'd7; w.aop = AOP_LD; w.seq = SEQ_DO; w.tgt = 8'd13; w.cnt = 8'd4; end
      13: begin w.src = SRC_K; w.k = 16'd1; w.aop = AOP_ADD; w.amode = AM_X1; w.addr = 8'd4;
                w.wram = WR_ALW; w.x1op = X_INC; end
      17: begin w.addr = 8'd4; w.wsel = 1'b1; w.whost = 1'b1; end
      18: begin w.addr = 8'd5; w.wsel = 1'b1; w.whost = 1'b1; end
      19: begin w.addr = 8'd6; w.wsel = 1'b1; w.whost = 1'b1; end
      20: begin w.src = SRC_K; w.k = 16'd2; w.amode = AM_X0; w.addr = 8'd7; w.wsel = 1'b1;
                w.wram = WR_ALW; w.x0op = X_DEC; end
      21: begin w.addr = 8'd3; w.wsel = 1'b1; w.whost = 1'b1; end
      22: begin w.src = SRC_K; w.k = 16'd3; w.amode = AM_X0; w.addr = 8'd8; w.wsel = 1'b1; w.whost = 1'b1; end
      23: begin w.addr = 8'd7; w.wsel = 1'b1; w.whost = 1'b1; w.hirq = 1'b1; w.eop = 1'b1; end
      // subprogram: RAM[3] = (M >= 0) ? 100 : 200 by two conditional writes
      30: begin w.addr = 8'd0; w.aop = AOP_LD; w.fop = FOP_DEC; end
      31: begin w.src = SRC_K; w.k = 16'd100; w.aop = AOP_LD; w.wram = WR_COND; w.addr = 8'd3; end
      32: begin w.src = SRC_K; w.k = 16'd200; w.aop = AOP_LD; w.wram = WR_NCOND; w.addr = 8'd3;
                w.seq = SEQ_RET; end
      default: ;
    endcase
    return w;
  endfunction

  function automatic uword_t prog_word(int unsigned prog, int unsigned pc);
    return (prog == PROG_TEST) ? test_word(pc) : dfe_word(pc);
  endfunction

  // Condition FSM table shared by both programs. Index bits, MSB first:
  // fop[1:0], cond, acc_sign, mr1, mr0, x0z, x1z, state[1:0].
  // Entry: {next_state[1:0], next_cond}.
  function automatic logic [(2**FSM_IN_W)*FSM_OUT_W-1:0] fsm_table(int unsigned prog);
    logic [(2**FSM_IN_W)*FSM_OUT_W-1:0] t;
    logic [FOP_W-1:0]  fop;
    logic              cond, sgn;
    logic [FSM_SB-1:0] st, nst;
    logic              ncond;
    t = '0;
    for (int i = 0; i < 2**FSM_IN_W; i++) begin
      fop  = FOP_W'(i >> 8);
      cond = i[7];
      sgn  = i[6];
      st   = FSM_SB'(i);
      nst   = st;
      ncond = cond;
      case (fop)
        FOP_DEC:  ncond = ~sgn;
        FOP_ERRP: if (cond) nst = {st[1], ~sgn};
        FOP_ERRN: begin
          ncond = cond ? st[0] : ~sgn;
          nst   = {st[1], ncond};
        end
        default: ;
      endcase
      t[i*FSM_OUT_W +: FSM_OUT_W] = {nst, ncond};
    end
    if (prog > 1) t = '0;
    return t;
  endfunction

endpackage
