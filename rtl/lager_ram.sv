// lager_ram -- local variable RAM of one processor.
//
// DEPTH words of WL bits, one asynchronous read port (memory-access stage)
// and one synchronous write port (i/o stage). A read of the address being
// written in the same cycle returns the new data, so a value written by the
// i/o stage can be read by the word three issue slots later. The contents
// are cleared by reset so that a program starts from zero state (filter
// coefficients, delay lines). Size and word length are parameters, as in
// the architecture description; bypass and reset clearing are this
// design's own choices.
module lager_ram #(
  parameter int unsigned WL    = 16,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] raddr,
  output logic [WL-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [WL-1:0] wdata
);
  logic [WL-1:0] mem [DEPTH];

  assign rdata = (we && waddr == raddr) ? wdata : mem[raddr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end
endmodule
