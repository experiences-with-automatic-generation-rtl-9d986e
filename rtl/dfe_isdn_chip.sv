// dfe_isdn_chip -- decision feedback equalizer of an ISDN U-interface receiver.
//
// The received line signal, already sampled by the recovered clock and
// cleaned of the transmit echo, arrives one word per symbol on `x_in`
// with the strobe `x_strobe` (the timing clock). One core processor,
// running the DFE microprogram, subtracts the feedback of the last six
// symbol decisions and slices the result:
//   x_rec = x_in - sum_{i=1..6} t_i,  t_i = c_i if a_i = +1 else -c_i
//   a_0   = sign(x_rec)                              (the output symbol)
//   err   = sign(x_rec - c_0*a_0)
//   c_i  += k*err*a_i,  i = 0..6                     (sign-sign adaptation)
// The six past decisions live in one 12-bit word, two bits per symbol
// (2'b10 = +1, 2'b01 = -1), updated by a two-bit right shift with the new
// decision entering at bits 11:10; that word is the serial operand of the
// sign multiply step, so the whole feedback sum is six one-cycle steps.
// The decision leaves as a two-bit code on `x_out` (strobe `x_out_valid`)
// and on the bit-serial link `tr_sd/tr_sv` toward the timing recovery
// processor, which is not part of this design; its link back into the DFE
// processor (`tr_in_d/tr_in_v`) is brought out unused by the program.
// The host buffer of the processor is brought out as well.
// Timing: one pass of the program is 33 issue cycles plus one idle cycle
// (no drain cycles are needed by this program), so strobes may come every
// 34 clock cycles or slower; at 5 MHz and 144 kbit/s there are 34.7 cycles
// per symbol. `overrun` flags faster strobes.
// Algorithm and delay-line coding follow the published equalizer; the
// schedule, word length, step size k and link formats are this design's own.
module dfe_isdn_chip
  import lager_prog_pkg::*;
#(
  parameter int unsigned WL = 16,
  localparam int unsigned HAW = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           x_strobe,
  input  logic [WL-1:0]  x_in,
  output logic [1:0]     x_out,
  output logic           x_out_valid,
  output logic           tr_sd,
  output logic           tr_sv,
  input  logic           tr_in_d,
  input  logic           tr_in_v,
  input  logic [HAW-1:0] h_addr,
  input  logic           h_we,
  input  logic [WL-1:0]  h_wdata,
  output logic [WL-1:0]  h_rdata,
  output logic           h_irq,
  input  logic           h_irq_ack,
  output logic           overrun
);
  logic [WL-1:0] par_out;

  lager_proc #(
    .PROG(PROG_DFE), .WL(WL), .RAM_DEPTH(64), .ROM_DEPTH(256), .HB_DEPTH(2**HAW),
    .X0_MOD(DFE_TAPS), .X1_MOD(DFE_TAPS), .DRAIN(0)
  ) u_dfe (
    .clk, .rst, .sync(x_strobe), .par_in(x_in), .par_out, .par_out_valid(x_out_valid),
    .ser_in_d(tr_in_d), .ser_in_v(tr_in_v), .ser_out_d(tr_sd), .ser_out_v(tr_sv),
    .h_addr, .h_we, .h_wdata, .h_rdata, .h_irq, .h_irq_ack, .overrun);

  assign x_out = par_out[1:0];
endmodule
