// tb_dfe_isdn_chip -- end-to-end test of the DFE chip at its default size.
//
// A random +-1 symbol stream goes through a line model with three
// postcursors and a little noise, one sample per strobe. A reference model
// of the equalizer equations, written independently of the microprogram,
// predicts every output decision bit-exactly and the final coefficients.
// The test also checks that the equalizer converges (taps near the
// postcursors, decisions equal to the sent symbols), the number of issue
// cycles per sample (33, strobes every 34 cycles without overrun), the
// serial copy of every decision, and that each mechanism occurred: loop
// repetition, taken and suppressed conditional writes, both signs of the sign-multiply step, FSM steps, and an overrun
// when strobes come too fast.
`timescale 1ns/1ps
module tb_dfe_isdn_chip;
  localparam int WL = 16;
  localparam int NSAMP = 600;
  localparam int PERIOD = 34;   // 5 MHz / 144 kbit/s = 34.7 cycles
  localparam int K = 64;
  localparam int H0 = 8000, H1 = 3000, H2 = -1500, H3 = 800;

  logic clk = 0, rst = 1;
  logic x_strobe = 0;
  logic [WL-1:0] x_in = '0;
  logic [1:0] x_out;
  logic x_out_valid, tr_sd, tr_sv, h_irq, overrun;
  logic [WL-1:0] h_rdata;

  dfe_isdn_chip dut (
    .clk, .rst, .x_strobe, .x_in, .x_out, .x_out_valid, .tr_sd, .tr_sv,
    .tr_in_d(1'b0), .tr_in_v(1'b0), .h_addr(4'd0), .h_we(1'b0), .h_wdata('0),
    .h_rdata, .h_irq, .h_irq_ack(1'b0), .overrun);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  logic signed [15:0] c [7];
  logic [15:0] A;
  function automatic logic signed [17:0] sx(logic [15:0] v);
    return 18'($signed(v));
  endfunction
  function automatic logic [1:0] model_step(logic [15:0] x);
    logic signed [17:0] acc, e;
    logic [1:0] pair, code;
    logic ap, ep;
    acc = sx(x);
    for (int j = 0; j < 6; j++) begin
      pair = A[2*j +: 2];
      acc = (pair == 2'b10) ? acc - sx(c[6-j]) : acc + sx(c[6-j]);
    end
    ap   = ~acc[17];
    code = ap ? 2'b10 : 2'b01;
    e    = ap ? acc - sx(c[0]) : acc + sx(c[0]);
    ep   = ~e[17];
    c[0] = (ep == ap) ? c[0] + 16'(K) : c[0] - 16'(K);
    for (int i = 1; i <= 6; i++) begin
      pair = A[2*(6-i) +: 2];
      c[i] = (ep == pair[1]) ? c[i] + 16'(K) : c[i] - 16'(K);
    end
    A = 16'($signed(A) >>> 2) + (16'(code) << 10);
    return code;
  endfunction

  // ---------------- stimulus and scoreboard ----------------
  logic [1:0] exp_q [$];
  int sym [$];
  int nout = 0, nerr_late = 0;
  int n_loop = 0, n_cw_taken = 0, n_cw_skip = 0, n_muld_add = 0, n_muld_sub = 0, n_fsm = 0;
  int n_ovr = 0, n_ser_words = 0, n_issue = 0;
  int ser_bits = 0;
  logic [WL-1:0] ser_sr;
  int cyc = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.u_dfe.u_spc.loop_back) n_loop++;
      if (dut.u_dfe.u_auio.v4 && dut.u_dfe.u_auio.w4.wram inside {lager_pkg::WR_COND, lager_pkg::WR_NCOND}) begin
        if (dut.u_dfe.ram_we) n_cw_taken++; else n_cw_skip++;
      end
      if (dut.u_dfe.u_auio.v3 && dut.u_dfe.u_auio.w3.aop inside {lager_pkg::AOP_MULD, lager_pkg::AOP_MULDL}) begin
        if (dut.u_dfe.u_auio.mr[1:0] == 2'b10) n_muld_sub++; else n_muld_add++;
      end
      if (dut.u_dfe.fsm_step) n_fsm++;
      if (overrun) n_ovr++;
      if (dut.u_dfe.issue) n_issue++;
      if (tr_sv) begin
        ser_sr = {tr_sd, ser_sr[WL-1:1]};
        ser_bits++;
        if (ser_bits == WL && !ovr_phase) begin
          ser_bits = 0;
          n_ser_words++;
          check(ser_sr == 16'(exp_last), "serial copy of decision");
        end
      end
      if (x_out_valid && !ovr_phase) begin
        logic [1:0] e;
        e = exp_q.pop_front();
        check(x_out == e, $sformatf("decision %0d: got %b exp %b", nout, x_out, e));
        last_code = x_out;
        if (nout >= NSAMP/2) begin
          if ((x_out == 2'b10) != (sym[nout] > 0)) nerr_late++;
        end
        nout++;
      end
    end
  end
  logic [1:0] last_code = 2'b01;
  bit ovr_phase = 0;
  logic [1:0] exp_last;
  assign exp_last = last_code;

  initial begin
    int s [4];
    int xv, noise;
    logic [1:0] code;
    for (int i = 0; i < 7; i++) c[i] = '0;
    A = '0;
    s = '{1, 1, 1, 1};
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      s[3] = s[2]; s[2] = s[1]; s[1] = s[0];
      s[0] = ($urandom_range(1) == 1) ? 1 : -1;
      sym.push_back(s[0]);
      noise = int'($urandom_range(200)) - 100;
      xv = H0*s[0] + H1*s[1] + H2*s[2] + H3*s[3] + noise;
      code = model_step(16'(xv));
      exp_q.push_back(code);
      x_in <= 16'(xv);
      x_strobe <= 1;
      @(posedge clk);
      x_strobe <= 0;
      repeat (PERIOD - 1) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(n_issue == 33 * NSAMP, $sformatf("issue cycles per sample %0d/%0d", n_issue, NSAMP));
    check(n_ovr == 0, "no overrun at one strobe per 34 cycles");
    check(nout == NSAMP, $sformatf("outputs %0d", nout));
    check(n_ser_words == NSAMP, $sformatf("serial words %0d", n_ser_words));
    for (int i = 0; i < 7; i++)
      check(dut.u_dfe.u_ram.mem[i == 0 ? 0 : 7 - i] == c[i],
            $sformatf("c%0d rtl %0d model %0d", i, $signed(dut.u_dfe.u_ram.mem[i == 0 ? 0 : 7 - i]), c[i]));
    check(dut.u_dfe.u_ram.mem[8] == A, "delay line word");
    check($signed(c[0]) > H0 - 400 && $signed(c[0]) < H0 + 400, $sformatf("c0 converged %0d", c[0]));
    check($signed(c[1]) > H1 - 400 && $signed(c[1]) < H1 + 400, $sformatf("c1 converged %0d", c[1]));
    check($signed(c[2]) > H2 - 400 && $signed(c[2]) < H2 + 400, $sformatf("c2 converged %0d", c[2]));
    check($signed(c[3]) > H3 - 400 && $signed(c[3]) < H3 + 400, $sformatf("c3 converged %0d", c[3]));
    check(nerr_late == 0, $sformatf("late decision errors %0d", nerr_late));
    // overrun: strobes faster than the program
    ovr_phase = 1;
    for (int n = 0; n < 4; n++) begin
      x_strobe <= 1; @(posedge clk); x_strobe <= 0;
      repeat (10) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    $display("mechanisms: loop=%0d cw_taken=%0d cw_skip=%0d muld_add=%0d muld_sub=%0d fsm=%0d overrun=%0d",
             n_loop, n_cw_taken, n_cw_skip, n_muld_add, n_muld_sub, n_fsm, n_ovr);
    check(n_loop > 0, "loop repetition seen");
    check(n_cw_taken > 0, "conditional write taken");
    check(n_cw_skip > 0, "conditional write suppressed");
    check(n_muld_add > 0 && n_muld_sub > 0, "both sign-multiply directions");
    check(n_fsm > 0, "FSM steps");
    check(n_ovr > 0, "overrun flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * PERIOD + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
