// lager_fsm -- user-defined decision-making FSM that sets the condition bit.
//
// The controller cannot branch; decisions are made by this small state
// machine instead, and its condition bit gates the conditional RAM writes
// of the i/o stage. The machine is a table (a PLA in a real layout) indexed
// by the word's FSM operation code, the current condition bit, the
// processor status -- accumulator sign, multiplier register bits 1:0,
// index registers at zero -- and FSM_SB state bits. Each entry gives the
// next state and the next condition bit. A word with fop = 0 leaves both
// unchanged. The step happens in the i/o stage, on the status left by that
// word's complement-add stage, and the new condition bit is seen by the
// next word's conditional write. The table is chosen per program by PROG.
// Status inputs and the conditional write follow the architecture
// description; the table form and the status list are this design's own.
module lager_fsm
  import lager_pkg::*;
  import lager_prog_pkg::*;
#(
  parameter int unsigned PROG = PROG_DFE
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              step,      // a word with fop != 0 is in the i/o stage
  input  logic [FOP_W-1:0]  fop,
  input  logic              acc_sign,
  input  logic              mr1,
  input  logic              mr0,
  input  logic              x0z,
  input  logic              x1z,
  output logic              cond,
  output logic [FSM_SB-1:0] state
);
  localparam logic [(2**FSM_IN_W)*FSM_OUT_W-1:0] TABLE = fsm_table(PROG);

  logic [FSM_IN_W-1:0]  idx;
  logic [FSM_OUT_W-1:0] nxt;

  assign idx = {fop, cond, acc_sign, mr1, mr0, x0z, x1z, state};
  assign nxt = TABLE[idx*FSM_OUT_W +: FSM_OUT_W];

  always_ff @(posedge clk) begin
    if (rst) begin
      cond  <= 1'b0;
      state <= '0;
    end else if (step && fop != '0) begin
      {state, cond} <= nxt;
    end
  end
endmodule
