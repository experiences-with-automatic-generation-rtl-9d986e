// lager_proc -- one Lager-style microprogrammed signal processor.
//
// A simple, bit-parallel, pipelined processor specialised by parameters and
// by its microprogram. Data path and control are strictly separate:
//   control  master PC (restarted every sample by `sync`), slave PC (loops,
//            one subprogram), microcode ROM of undecoded words;
//   data     four-stage arithmetic/i-o unit (lager_auio) with a
//            parallel-serial multiplier, local RAM, address arithmetic unit
//            with two modulo index registers, and the user-defined
//            condition FSM that gates conditional writes.
// There are no branches: decisions only select which of two results is
// written. I/O: a sample-rate parallel bus (`par_in` is latched on `sync`,
// `par_out` is written by the program with a one-cycle `par_out_valid`), a
// bit-serial link in and out for other processors, and a host buffer with
// an interrupt for frame-rate data. `overrun` pulses when a sample strobe
// arrives while the previous one still waits, i.e. the program does not fit
// in the sample period.
// Timing: the first word of a pass is issued two cycles after `sync`; a
// word's RAM write happens four cycles after its issue. After the end-of-
// pass word the PC stays idle for at least one cycle plus DRAIN cycles;
// DRAIN = 0 is safe when the program's last writes are not read by the
// first words of the next pass.
// The block structure is the one of the architecture description; sizes
// not given there (RAM, ROM, host buffer depth) are this design's choice.
module lager_proc
  import lager_pkg::*;
  import lager_prog_pkg::*;
#(
  parameter int unsigned PROG      = PROG_DFE,
  parameter int unsigned WL        = 16,
  parameter int unsigned RAM_DEPTH = 64,
  parameter int unsigned ROM_DEPTH = 256,
  parameter int unsigned HB_DEPTH  = 16,
  parameter int unsigned X0_MOD    = 6,
  parameter int unsigned X1_MOD    = 6,
  parameter int unsigned DRAIN     = 3,   // idle cycles forced after a pass
  localparam int unsigned HAW      = $clog2(HB_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           sync,
  input  logic [WL-1:0]  par_in,
  output logic [WL-1:0]  par_out,
  output logic           par_out_valid,
  input  logic           ser_in_d,
  input  logic           ser_in_v,
  output logic           ser_out_d,
  output logic           ser_out_v,
  input  logic [HAW-1:0] h_addr,
  input  logic           h_we,
  input  logic [WL-1:0]  h_wdata,
  output logic [WL-1:0]  h_rdata,
  output logic           h_irq,
  input  logic           h_irq_ack,
  output logic           overrun
);
  localparam int unsigned PC_W = $clog2(ROM_DEPTH);
  localparam int unsigned RAW  = $clog2(RAM_DEPTH);

  logic [PC_W-1:0]   pc, redir_pc;
  logic              issue, redir, loop_back;
  uword_t            word, s1_word;
  logic              s1_valid;
  logic [ADDR_W-1:0] s1_addr, wr_addr;
  logic              x0z, x1z;
  logic [WL-1:0]     ram_rdata, ser_rdata, host_rdata, wr_data, in_reg;
  logic              ram_we, ser_load, host_we, host_irq_set, ser_rvalid, ser_busy;
  logic              fsm_step, acc_sign, mr1, mr0, cond;
  logic [FOP_W-1:0]  fop;
  logic [FSM_SB-1:0] fsm_state;

  // sample-rate input register
  always_ff @(posedge clk) begin
    if (rst)       in_reg <= '0;
    else if (sync) in_reg <= par_in;
  end

  lager_pc #(.PC_W(PC_W), .DRAIN(DRAIN)) u_pc (
    .clk, .rst, .sync, .eop(word.eop), .redir, .redir_pc, .pc, .issue, .overrun);

  lager_spc #(.PC_W(PC_W)) u_spc (
    .clk, .rst, .issue, .pc, .seq(word.seq), .tgt(word.tgt), .cnt(word.cnt),
    .redir, .redir_pc, .loop_back);

  lager_rom #(.PROG(PROG), .DEPTH(ROM_DEPTH)) u_rom (.addr(pc), .word);

  lager_aau #(.X0_MOD(X0_MOD), .X1_MOD(X1_MOD)) u_aau (
    .clk, .rst, .en(s1_valid), .amode(s1_word.amode), .field(s1_word.addr),
    .x0op(s1_word.x0op), .x1op(s1_word.x1op), .addr(s1_addr), .x0z, .x1z);

  lager_ram #(.WL(WL), .DEPTH(RAM_DEPTH)) u_ram (
    .clk, .rst, .raddr(s1_addr[RAW-1:0]), .rdata(ram_rdata),
    .we(ram_we), .waddr(wr_addr[RAW-1:0]), .wdata(wr_data));

  lager_auio #(.WL(WL)) u_auio (
    .clk, .rst, .issue, .word, .s1_valid, .s1_word, .s1_addr,
    .ram_rdata, .par_in(in_reg), .ser_rdata, .host_rdata,
    .ram_we, .wr_addr, .wr_data, .ser_load, .host_we, .host_irq_set,
    .par_out, .par_out_valid, .fsm_step, .fop, .acc_sign, .mr1, .mr0, .cond);

  lager_fsm #(.PROG(PROG)) u_fsm (
    .clk, .rst, .step(fsm_step), .fop, .acc_sign, .mr1, .mr0, .x0z, .x1z,
    .cond, .state(fsm_state));

  lager_ser_tx #(.WL(WL)) u_ser_tx (
    .clk, .rst, .load(ser_load), .wdata(wr_data), .sd(ser_out_d), .sv(ser_out_v),
    .busy(ser_busy));

  lager_ser_rx #(.WL(WL)) u_ser_rx (
    .clk, .rst, .sd(ser_in_d), .sv(ser_in_v), .rdata(ser_rdata), .rvalid(ser_rvalid));

  lager_host_iobuf #(.WL(WL), .DEPTH(HB_DEPTH)) u_hbuf (
    .clk, .rst, .p_raddr(s1_addr[HAW-1:0]), .p_rdata(host_rdata),
    .p_we(host_we), .p_waddr(wr_addr[HAW-1:0]), .p_wdata(wr_data), .p_irq_set(host_irq_set),
    .h_addr, .h_we, .h_wdata, .h_rdata, .irq(h_irq), .irq_ack(h_irq_ack));
endmodule
