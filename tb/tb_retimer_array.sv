// Testbench of the four-channel retiming array, the synthesizable part of
// the chip, at its default size on ideal clocks. One set of seven clocks
// at delta = 140 ps (T = 980 ps, 1.02 Gb/s) drives all channels; each channel receives its own
// 2^31-1 sequence with a different initial phase, wander and jitter, so
// the channels lock to different clock phases. Every output bit of every
// channel is checked for value and latency (three bit periods from the
// central sample to the output register) by serial_link_model.
// It also counts, over all channels, how often each mechanism of the
// circuit acted and fails if one never did:
//   * overlap    - two phase results active at once in the comparator
//   * early path - a result of a phase n < 0 selected (falling-edge stage)
//   * grp_d0     - the delay-0 group selected (position m > +3)
//   * grp_d2     - the delay-2T group selected (position m < -3)
//   * discard    - a P' copy present outside the window and dropped
module tb_retimer_array;
  timeunit 1ps; timeprecision 1ps;
  localparam int D = 140;
  localparam int NB = 6000;

  logic [6:0] cp;
  logic rst_n = 1'b1;
  logic [3:0] din, dout, done;
  int c [4], f [4];
  int checks = 0, failures = 0;
  int n_overlap = 0, n_early = 0, n_d0 = 0, n_d2 = 0, n_discard = 0;

  mpclk_gen u_clk (.delta_ps(D), .cp(cp));

  retimer_array dut (.rst_n(rst_n), .cp(cp), .din(din), .dout(dout));

  serial_link_model #(.DELTA(D), .S_INIT(2), .AMP(19 * D / 10), .WPER(900),
                      .JIT(D / 5), .NBITS(NB), .SEED(101))
    u_l0 (.cp(cp), .dout(dout[0]), .din(din[0]), .checks(c[0]), .failures(f[0]), .done(done[0]));
  serial_link_model #(.DELTA(D), .S_INIT(-3), .AMP(19 * D / 10), .WPER(700),
                      .JIT(D / 5), .NBITS(NB), .SEED(202))
    u_l1 (.cp(cp), .dout(dout[1]), .din(din[1]), .checks(c[1]), .failures(f[1]), .done(done[1]));
  serial_link_model #(.DELTA(D), .S_INIT(-1), .AMP(D), .WPER(1100),
                      .JIT(D / 5), .NBITS(NB), .SEED(303))
    u_l2 (.cp(cp), .dout(dout[2]), .din(din[2]), .checks(c[2]), .failures(f[2]), .done(done[2]));
  serial_link_model #(.DELTA(D), .S_INIT(0), .AMP(3 * D / 2), .WPER(500),
                      .JIT(D / 4), .NBITS(NB), .SEED(404))
    u_l3 (.cp(cp), .dout(dout[3]), .din(din[3]), .checks(c[3]), .failures(f[3]), .done(done[3]));

  for (genvar k = 0; k < 4; k++) begin : g_mon
    always @(posedge cp[3]) begin
      if ($countones(dut.g_ch[k].u_ch.p) > 1) n_overlap++;
      if ((dut.g_ch[k].u_ch.p_ext[5:3] & dut.g_ch[k].u_ch.u_sel.win[5:3]) != 0 ||
          (dut.g_ch[k].u_ch.p_ext[12:10] & dut.g_ch[k].u_ch.u_sel.win[12:10]) != 0) n_early++;
      if ((dut.g_ch[k].u_ch.p_ext[12:10] & dut.g_ch[k].u_ch.u_sel.win[12:10]) != 0) n_d0++;
      if ((dut.g_ch[k].u_ch.p_ext[2:0] & dut.g_ch[k].u_ch.u_sel.win[2:0]) != 0) n_d2++;
      if (dut.g_ch[k].u_ch.u_sel.s != 0 &&
          (dut.g_ch[k].u_ch.p_ext & ~dut.g_ch[k].u_ch.u_sel.win) != 0) n_discard++;
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    wait (done == 4'hf);
    for (int k = 0; k < 4; k++) begin
      checks += c[k];
      failures += f[k];
      checks++;
      if (c[k] < NB - 100) begin failures++; $display("channel %0d checked too few bits", k); end
    end
    need("overlap", n_overlap);
    need("early path", n_early);
    need("delay-0 group", n_d0);
    need("delay-2T group", n_d2);
    need("discard", n_discard);
    $display("initial phases %0d %0d %0d %0d", u_l0.s_phase, u_l1.s_phase, u_l2.s_phase, u_l3.s_phase);
    $display("bits checked %0d %0d %0d %0d; overlap=%0d early=%0d d0=%0d d2=%0d discard=%0d",
             c[0], c[1], c[2], c[3], n_overlap, n_early, n_d0, n_d2, n_discard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(NB + 200) * 7 * D);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
