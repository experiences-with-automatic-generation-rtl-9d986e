// lager_pc -- master program counter of the core controller.
//
// The microprogram has no branches: the master PC runs once through the
// program for every sample and is restarted by the sample strobe `sync`.
// After RESET the PC idles at 0. A `sync` pulse (remembered if it arrives
// while the program still runs) starts a pass; the fetched word's `eop` bit
// ends it, the PC returns to 0 and waits again. Loops and the subprogram are
// handled by the slave PC, which overrides the next address through
// `redir`/`redir_pc`. An `eop` on the last word of a loop body ends the
// pass only after the last loop pass (while the slave PC redirects, `eop`
// is ignored). A restart is held off for DRAIN cycles after `eop` so the
// last writes of a pass leave the four-stage pipeline before the next pass
// reads memory; a program without such a hazard can use DRAIN = 0, and then
// one idle cycle separates two passes. `overrun` pulses when a strobe
// arrives while another is still pending, i.e. the program is longer than
// the sample period.
// The restart-per-sample behaviour follows the architecture description;
// the drain delay and the overrun flag are this design's own choices.
module lager_pc #(
  parameter int unsigned PC_W  = 8,
  parameter int unsigned DRAIN = 3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sync,      // sample strobe, one cycle
  input  logic            eop,       // end-of-program bit of the word at pc
  input  logic            redir,     // slave PC overrides the next address
  input  logic [PC_W-1:0] redir_pc,
  output logic [PC_W-1:0] pc,
  output logic            issue,     // word at pc is executed this cycle
  output logic            overrun
);
  localparam int unsigned DW = (DRAIN > 0) ? $clog2(DRAIN + 1) : 1;

  logic          pending;
  logic [DW-1:0] drain;
  logic          start;

  assign start = !issue && (drain == '0) && (pending || sync);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      issue   <= 1'b0;
      pending <= 1'b0;
      drain   <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= sync && pending;
      pending <= (pending || sync) && !start;
      if (issue) begin
        if (eop && !redir) begin
          issue <= 1'b0;
          pc    <= '0;
          drain <= DW'(DRAIN);
        end else begin
          pc <= redir ? redir_pc : pc + 1'b1;
        end
      end else if (drain != '0) begin
        drain <= drain - 1'b1;
      end else if (start) begin
        issue <= 1'b1;
      end
    end
  end
endmodule
