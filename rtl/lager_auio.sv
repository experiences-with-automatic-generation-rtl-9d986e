// lager_auio -- four-stage arithmetic and i/o pipeline of the core.
//
// Each issued microword passes through four stages, one per cycle, so four
// words are in flight and memory access, shift, complement-add and i/o of
// different words happen at the same time:
//   S1 memory access  operand from RAM, parallel input, serial input,
//                     host buffer or the immediate field; the address
//                     comes from the address arithmetic unit.
//   S2 shift          arithmetic right shift of the operand by 0..15.
//   S3 complement-add accumulator load/add/subtract and the multiply
//                     steps, which use the multiplier register MR as the
//                     serial operand and the shifted word as the parallel
//                     one. MR is loaded, shifted by 1 or 2, here as well.
//   S4 i/o            write of the accumulator (or the shifted operand) to
//                     RAM, unconditionally or gated by the condition bit,
//                     to the parallel output, the serial link or the host
//                     buffer; the condition FSM steps on the status left by
//                     this word's S3.
// Multiplication is parallel-serial: one multiplier bit per MULS step,
// acc = (acc + b*M) >>> 1, and a final MULL step subtracts the sign bit's
// weight, giving M*B as a fraction with a WL-bit B in WL cycles. MULB/MULBL
// retire two bits per step through the Booth decoder. MULD is the two-bit
// sign step for a {-1,+1} multiplier coded 2'b10 = +1, 2'b01 = -1:
// acc = acc - (code == 2'b10 ? M : -M), one tap of a sign-data filter;
// MULDL loads the same term negated, acc = -(code == 2'b10 ? M : -M).
// The accumulator has GUARD extra bits; writes take its low WL bits.
// Timing: a RAM value written in S4 is read correctly by a word issued
// three or more slots later; the accumulator and MR are usable by the very
// next word. All arithmetic is two's complement.
// Stage functions, parallel-serial multiplication and the modified sign
// multiplier follow the architecture description; guard bits, the shift
// range, the operand sources, the write-data select and the MULDL step are
// this design's own choices.
module lager_auio
  import lager_pkg::*;
#(
  parameter int unsigned WL    = 16,
  parameter int unsigned GUARD = 2,
  localparam int unsigned AW   = WL + GUARD
) (
  input  logic              clk,
  input  logic              rst,
  // issue
  input  logic              issue,
  input  uword_t            word,
  // S1: address arithmetic unit and operand sources
  output logic              s1_valid,
  output uword_t            s1_word,
  input  logic [ADDR_W-1:0] s1_addr,
  input  logic [WL-1:0]     ram_rdata,
  input  logic [WL-1:0]     par_in,
  input  logic [WL-1:0]     ser_rdata,
  input  logic [WL-1:0]     host_rdata,
  // S4: writes
  output logic              ram_we,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [WL-1:0]     wr_data,
  output logic              ser_load,
  output logic              host_we,
  output logic              host_irq_set,
  output logic [WL-1:0]     par_out,
  output logic              par_out_valid,
  // S4: condition FSM
  output logic              fsm_step,
  output logic [FOP_W-1:0]  fop,
  output logic              acc_sign,
  output logic              mr1,
  output logic              mr0,
  input  logic              cond
);
  logic              v1, v2, v3, v4;
  uword_t            w1, w2, w3, w4;
  logic [ADDR_W-1:0] a2, a3, a4;
  logic [WL-1:0]     op1, op2, op4;
  logic signed [WL-1:0] op3, sh2;
  logic signed [AW-1:0] acc, acc_n, m, bpp;
  logic [WL-1:0]     mr, mr_n;
  logic              mprev, mprev_n;

  localparam logic signed [AW-1:0] ZERO = '0;

  // ---- issue register -------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      w1 <= UW_NOP;
    end else begin
      v1 <= issue;
      w1 <= issue ? word : UW_NOP;
    end
  end

  assign s1_valid = v1;
  assign s1_word  = w1;

  // ---- S1 memory access -------------------------------------------------
  always_comb begin
    case (w1.src)
      SRC_IN:   op1 = par_in;
      SRC_SER:  op1 = ser_rdata;
      SRC_HOST: op1 = host_rdata;
      SRC_K:    op1 = WL'($signed(w1.k));
      default:  op1 = ram_rdata;
    endcase
  end

  // ---- S2 shift ---------------------------------------------------------
  assign sh2 = $signed(op2) >>> w2.shf;

  // ---- S3 complement-add ------------------------------------------------
  assign m = AW'(op3);

  lager_booth #(.W(AW)) u_booth (
    .bits ({mr[1:0], mprev}),
    .m    (m),
    .pp   (bpp)
  );

  always_comb begin
    acc_n = acc;
    case (w3.aop)
      AOP_LD:    acc_n = m;
      AOP_ADD:   acc_n = acc + m;
      AOP_SUB:   acc_n = acc - m;
      AOP_MULS:  acc_n = (acc + (mr[0] ? m : ZERO)) >>> 1;
      AOP_MULL:  acc_n = acc - (mr[0] ? m : ZERO);
      AOP_MULD:  acc_n = (mr[1:0] == 2'b10) ? acc - m : acc + m;
      AOP_MULDL: acc_n = (mr[1:0] == 2'b10) ? -m : m;
      AOP_MULB:  acc_n = (acc + bpp) >>> 2;
      AOP_MULBL: acc_n = (acc + bpp) >>> 1;
      default:   acc_n = acc;
    endcase
    mr_n    = mr;
    mprev_n = mprev;
    case (w3.mrop)
      MR_LOAD: begin mr_n = op3;                      mprev_n = 1'b0;  end
      MR_SH1:  begin mr_n = WL'($signed(mr) >>> 1);   mprev_n = mr[0]; end
      MR_SH2:  begin mr_n = WL'($signed(mr) >>> 2);   mprev_n = mr[1]; end
      default: ;
    endcase
  end

  // ---- pipeline and accumulator registers -------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      {v2, v3, v4} <= '0;
      w2 <= UW_NOP;
      w3 <= UW_NOP;
      w4 <= UW_NOP;
      a2 <= '0; a3 <= '0; a4 <= '0;
      op2 <= '0; op3 <= '0; op4 <= '0;
      acc <= '0;
      mr <= '0;
      mprev <= 1'b0;
    end else begin
      v2 <= v1; w2 <= w1; a2 <= s1_addr; op2 <= op1;
      v3 <= v2; w3 <= w2; a3 <= a2;      op3 <= sh2;
      v4 <= v3; w4 <= w3; a4 <= a3;      op4 <= op3;
      if (v3) begin
        acc   <= acc_n;
        mr    <= mr_n;
        mprev <= mprev_n;
      end
    end
  end

  // ---- S4 i/o -----------------------------------------------------------
  assign wr_addr = a4;
  assign wr_data = w4.wsel ? op4 : acc[WL-1:0];

  always_comb begin
    case (w4.wram)
      WR_ALW:   ram_we = v4;
      WR_COND:  ram_we = v4 && cond;
      WR_NCOND: ram_we = v4 && !cond;
      default:  ram_we = 1'b0;
    endcase
  end

  assign ser_load     = v4 && w4.wser;
  assign host_we      = v4 && w4.whost;
  assign host_irq_set = v4 && w4.hirq;
  assign fsm_step     = v4 && (w4.fop != '0);
  assign fop          = w4.fop;
  assign acc_sign     = acc[AW-1];
  assign mr1          = mr[1];
  assign mr0          = mr[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      par_out       <= '0;
      par_out_valid <= 1'b0;
    end else begin
      par_out_valid <= v4 && w4.wout;
      if (v4 && w4.wout) par_out <= wr_data;
    end
  end
endmodule
