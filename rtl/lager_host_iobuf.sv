// lager_host_iobuf -- interrupt-driven buffer between a processor and a host.
//
// Frame-rate data (filter parameters going in, analysis results going out)
// is exchanged with a slow host through this small two-port register file
// rather than over the sample-rate bus. The processor reads it as an
// operand source (asynchronous read) and writes it from its i/o stage; the
// host reads and writes it at any time through its own address port. A
// microword with `hirq` set raises `irq`, which stays high until the host
// pulses `irq_ack`. If both sides write the same word in one cycle the
// processor wins. Cleared by reset.
// The buffer and its interrupt are from the architecture description; the
// depth, the two-port organisation and the handshake are this design's own.
module lager_host_iobuf #(
  parameter int unsigned WL    = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  // processor side
  input  logic [AW-1:0] p_raddr,
  output logic [WL-1:0] p_rdata,
  input  logic          p_we,
  input  logic [AW-1:0] p_waddr,
  input  logic [WL-1:0] p_wdata,
  input  logic          p_irq_set,
  // host side
  input  logic [AW-1:0] h_addr,
  input  logic          h_we,
  input  logic [WL-1:0] h_wdata,
  output logic [WL-1:0] h_rdata,
  output logic          irq,
  input  logic          irq_ack
);
  logic [WL-1:0] mem [DEPTH];

  assign p_rdata = mem[p_raddr];
  assign h_rdata = mem[h_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      irq <= 1'b0;
    end else begin
      if (h_we) mem[h_addr] <= h_wdata;
      if (p_we) mem[p_waddr] <= p_wdata;
      if (p_irq_set)    irq <= 1'b1;
      else if (irq_ack) irq <= 1'b0;
    end
  end
endmodule
