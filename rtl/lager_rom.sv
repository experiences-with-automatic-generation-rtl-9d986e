// lager_rom -- microcode ROM delivering undecoded control words.
//
// DEPTH words of type uword_t, filled at elaboration from the microprogram
// selected by PROG (see lager_prog_pkg). Read is asynchronous: the word at
// `addr` appears in the same cycle and is registered by the pipeline's issue
// stage. Words past the end of a program are no-operations.
// The ROM of undecoded words follows the architecture description; the
// program store as an elaboration-time function is this design's own.
module lager_rom
  import lager_pkg::*;
  import lager_prog_pkg::*;
#(
  parameter int unsigned PROG  = PROG_DFE,
  parameter int unsigned DEPTH = 256
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output uword_t                   word
);
  uword_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = prog_word(PROG, i);
  end

  assign word = mem[addr];
endmodule
