// lager_spc -- slave program counter: hardware loops and one subprogram level.
//
// The controller has no jumps. Repetition is done here instead: a word with
// seq = DO at address p makes the block p+1 .. tgt run `cnt` times in all
// (cnt = 0 counts as 1); when the word at tgt is issued and passes remain,
// the next address is forced back to p+1. A CALL saves pc+1 and continues at
// tgt; RET continues at the saved address. One loop and one return address
// are held, so loops do not nest and a subprogram cannot call another.
// All decisions are combinational on the issued word; registers update on
// the clock edge that issues it. The loop/subprogram function is from the
// architecture description; the DO/CALL/RET encoding is this design's own.
module lager_spc
  import lager_pkg::*;
#(
  parameter int unsigned PC_W = TGT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             issue,
  input  logic [PC_W-1:0]  pc,
  input  seq_e             seq,
  input  logic [TGT_W-1:0] tgt,
  input  logic [CNT_W-1:0] cnt,
  output logic             redir,
  output logic [PC_W-1:0]  redir_pc,
  output logic             loop_back   // a loop pass was repeated this cycle
);
  logic             active;
  logic [PC_W-1:0]  lstart, lend, ret;
  logic [CNT_W-1:0] lcnt;

  always_comb begin
    loop_back = issue && active && (pc == lend) && (lcnt != '0) && (seq == SEQ_NONE || seq == SEQ_DO);
    redir     = 1'b0;
    redir_pc  = pc;
    if (issue && seq == SEQ_CALL) begin
      redir    = 1'b1;
      redir_pc = PC_W'(tgt);
    end else if (issue && seq == SEQ_RET) begin
      redir    = 1'b1;
      redir_pc = ret;
    end else if (loop_back) begin
      redir    = 1'b1;
      redir_pc = lstart;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      lstart <= '0;
      lend   <= '0;
      lcnt   <= '0;
      ret    <= '0;
    end else if (issue) begin
      if (seq == SEQ_DO) begin
        active <= 1'b1;
        lstart <= pc + 1'b1;
        lend   <= PC_W'(tgt);
        lcnt   <= (cnt == '0) ? '0 : cnt - 1'b1;
      end else if (active && pc == lend) begin
        if (lcnt != '0) lcnt <= lcnt - 1'b1;
        else            active <= 1'b0;
      end
      if (seq == SEQ_CALL) ret <= pc + 1'b1;
    end
  end
endmodule
