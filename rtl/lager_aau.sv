// lager_aau -- address arithmetic unit with two modulo index registers.
//
// Forms the RAM (and host buffer) address of the word in the memory-access
// stage: the microword's address field, optionally plus index register X0
// or X1 (addr = field + Xn, modulo 2**ADDR_W). After use, each register can
// be cleared, incremented or decremented modulo X0_MOD / X1_MOD, so a
// register can walk a coefficient table or a circular buffer and wrap by
// itself (for example a modulo-6 counter for a six-fold decimation).
// Updates take effect for the next word. x0z / x1z flag a register at zero
// and are status inputs of the condition FSM.
// Two index registers and modulo counting follow the architecture
// description; the address = field + index form is this design's own.
module lager_aau
  import lager_pkg::*;
#(
  parameter int unsigned X0_MOD = 6,
  parameter int unsigned X1_MOD = 6
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,       // a word occupies the memory-access stage
  input  amode_e            amode,
  input  logic [ADDR_W-1:0] field,
  input  xop_e              x0op,
  input  xop_e              x1op,
  output logic [ADDR_W-1:0] addr,
  output logic              x0z,
  output logic              x1z
);
  logic [ADDR_W-1:0] x0, x1;

  function automatic logic [ADDR_W-1:0] step(logic [ADDR_W-1:0] x, xop_e op, int unsigned m);
    case (op)
      X_CLR:   return '0;
      X_INC:   return (x >= ADDR_W'(m - 1)) ? '0 : x + 1'b1;
      X_DEC:   return (x == '0 || x >= ADDR_W'(m)) ? ADDR_W'(m - 1) : x - 1'b1;
      default: return x;
    endcase
  endfunction

  always_comb begin
    case (amode)
      AM_X0:   addr = field + x0;
      AM_X1:   addr = field + x1;
      default: addr = field;
    endcase
  end

  assign x0z = (x0 == '0);
  assign x1z = (x1 == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      x0 <= '0;
      x1 <= '0;
    end else if (en) begin
      x0 <= step(x0, x0op, X0_MOD);
      x1 <= step(x1, x1op, X1_MOD);
    end
  end
endmodule
