// lager_pkg -- shared types of the Lager-style microprogrammed DSP core.
//
// The core is controlled by an undecoded microcode word: every field below
// drives one multiplexer, enable or operation select directly, with no
// instruction decoder in between. The word travels down a four-stage
// arithmetic pipeline (memory access, shift, complement-add, i/o), and each
// stage uses only its own fields. The field list (source select, addressing
// mode, shift, add operation, multiplier-register operation, conditional
// write, index register operations, FSM operation, loop/subprogram control,
// end of program) follows the functions the architecture is described with;
// the exact widths and encodings are this design's own choice.
package lager_pkg;

  // Fixed field widths of the microcode word.
  localparam int unsigned ADDR_W = 8;   // RAM / host-buffer address field
  localparam int unsigned TGT_W  = 8;   // ROM address (loop end, call target)
  localparam int unsigned CNT_W  = 8;   // loop repeat count
  localparam int unsigned K_W    = 16;  // immediate constant, sign-extended
  localparam int unsigned SHF_W  = 4;   // arithmetic right shift, 0..15
  localparam int unsigned FOP_W  = 2;   // FSM operation code (0 = hold)

  // Operand source, selected in the memory-access stage.
  typedef enum logic [2:0] {
    SRC_RAM  = 3'd0,   // local RAM at the computed address
    SRC_IN   = 3'd1,   // parallel sample-rate input bus
    SRC_SER  = 3'd2,   // last word received on the bit-serial link
    SRC_HOST = 3'd3,   // host i/o buffer at the computed address
    SRC_K    = 3'd4    // immediate constant from the microword
  } src_e;

  // Address generation in the address arithmetic unit.
  typedef enum logic [1:0] {
    AM_DIR = 2'd0,     // address = field
    AM_X0  = 2'd1,     // address = field + X0
    AM_X1  = 2'd2      // address = field + X1
  } amode_e;

  // Operation of the complement-add stage on the accumulator.
  typedef enum logic [3:0] {
    AOP_NOP   = 4'd0,  // accumulator unchanged
    AOP_LD    = 4'd1,  // acc = op
    AOP_ADD   = 4'd2,  // acc = acc + op
    AOP_SUB   = 4'd3,  // acc = acc - op
    AOP_MULS  = 4'd4,  // serial multiply step:  acc = (acc + MR[0]*op) >>> 1
    AOP_MULL  = 4'd5,  // last (sign) step:      acc =  acc - MR[0]*op
    AOP_MULD  = 4'd6,  // two-bit sign step:     acc = acc - (MR[1:0]==2'b10 ? op : -op)
    AOP_MULB  = 4'd7,  // radix-4 Booth step:    acc = (acc + d*op) >>> 2
    AOP_MULBL = 4'd8,  // last Booth step:       acc = (acc + d*op) >>> 1
    AOP_MULDL = 4'd9   // two-bit sign load:     acc = (MR[1:0]==2'b10 ? -op : op)
  } aop_e;

  // Multiplier register (serial operand) operation, complement-add stage.
  typedef enum logic [1:0] {
    MR_NOP  = 2'd0,
    MR_LOAD = 2'd1,    // MR = op, Booth history bit cleared
    MR_SH1  = 2'd2,    // MR >>= 1
    MR_SH2  = 2'd3     // MR >>= 2 (history bit = MR[1])
  } mrop_e;

  // RAM write in the i/o stage, optionally gated by the FSM condition bit.
  typedef enum logic [1:0] {
    WR_NO    = 2'd0,
    WR_ALW   = 2'd1,
    WR_COND  = 2'd2,   // write only when the condition bit is 1
    WR_NCOND = 2'd3    // write only when the condition bit is 0
  } wr_e;

  // Index register operation, done in the memory-access stage after use.
  typedef enum logic [1:0] {
    X_NOP = 2'd0,
    X_CLR = 2'd1,
    X_INC = 2'd2,      // modulo increment
    X_DEC = 2'd3       // modulo decrement
  } xop_e;

  // Sequencing, done at fetch by the slave program counter.
  typedef enum logic [1:0] {
    SEQ_NONE = 2'd0,
    SEQ_DO   = 2'd1,   // repeat PC+1 .. tgt, cnt times in all
    SEQ_CALL = 2'd2,   // run the subprogram at tgt
    SEQ_RET  = 2'd3    // return from the subprogram
  } seq_e;

  typedef struct packed {
    logic               eop;    // last instruction of the sample program
    seq_e               seq;
    logic [TGT_W-1:0]   tgt;
    logic [CNT_W-1:0]   cnt;
    src_e               src;
    amode_e             amode;
    logic [ADDR_W-1:0]  addr;
    logic [K_W-1:0]     k;
    logic [SHF_W-1:0]   shf;
    aop_e               aop;
    mrop_e              mrop;
    xop_e               x0op;
    xop_e               x1op;
    logic [FOP_W-1:0]   fop;
    wr_e                wram;
    logic               wsel;   // write data: 0 = accumulator, 1 = shifted operand
    logic               wout;   // write to the parallel output bus
    logic               wser;   // send on the bit-serial link
    logic               whost;  // write to the host buffer at the computed address
    logic               hirq;   // raise the host interrupt
  } uword_t;

  localparam int unsigned UW_W = $bits(uword_t);

  localparam uword_t UW_NOP = '{
    eop: 1'b0, seq: SEQ_NONE, tgt: '0, cnt: '0, src: SRC_RAM, amode: AM_DIR,
    addr: '0, k: '0, shf: '0, aop: AOP_NOP, mrop: MR_NOP, x0op: X_NOP,
    x1op: X_NOP, fop: '0, wram: WR_NO, wsel: 1'b0, wout: 1'b0, wser: 1'b0,
    whost: 1'b0, hirq: 1'b0};

  // Condition FSM: table index = {fop, cond, acc_sign, mr1, mr0, x0z, x1z, state}
  localparam int unsigned FSM_SB   = 2;                       // state bits
  localparam int unsigned FSM_IN_W = FOP_W + 1 + 5 + FSM_SB;  // table index width
  localparam int unsigned FSM_OUT_W = FSM_SB + 1;             // {next state, cond}

endpackage
