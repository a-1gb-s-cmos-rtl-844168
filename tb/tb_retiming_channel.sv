// Testbench of one retiming channel. Runs the channel at three bit rates
// inside the 580 Mb/s .. 1.08 Gb/s range (delta = 246, 140 and 134 ps,
// i.e. 581 Mb/s, 1.02 Gb/s, 1.066 Gb/s), one after the other, each with
// a 2^31-1 sequence whose phase wanders by up to +-1.9 phases and jitters
// by +-0.2 phases. Initial phases are chosen so that the selected position
// crosses into the delay-0 and delay-2T groups. Every output bit is checked
// for value and latency by serial_link_model.
module tb_retiming_channel;
  timeunit 1ps; timeprecision 1ps;

  localparam int D0 = 246, D1 = 140, D2 = 134;
  logic [6:0] cp0, cp1, cp2;
  logic rst_n = 1'b1;
  logic din0, din1, din2, dout0, dout1, dout2;
  int c0, c1, c2, f0, f1, f2;
  logic done0, done1, done2;
  int checks = 0, failures = 0;

  mpclk_gen u_clk0 (.delta_ps(D0), .cp(cp0));
  mpclk_gen u_clk1 (.delta_ps(D1), .cp(cp1));
  mpclk_gen u_clk2 (.delta_ps(D2), .cp(cp2));

  // three channel instances, one per rate, run in parallel
  retiming_channel dut0 (.rst_n, .cp(cp0), .din(din0), .dout(dout0));
  retiming_channel dut1 (.rst_n, .cp(cp1), .din(din1), .dout(dout1));
  retiming_channel dut2 (.rst_n, .cp(cp2), .din(din2), .dout(dout2));

  serial_link_model #(.DELTA(D0), .S_INIT(2), .AMP(19 * D0 / 10), .WPER(600),
                      .JIT(D0 / 5), .NBITS(3000), .SEED(11))
    u_l0 (.cp(cp0), .dout(dout0), .din(din0), .checks(c0), .failures(f0), .done(done0));
  serial_link_model #(.DELTA(D1), .S_INIT(-3), .AMP(19 * D1 / 10), .WPER(800),
                      .JIT(D1 / 5), .NBITS(3000), .SEED(22))
    u_l1 (.cp(cp1), .dout(dout1), .din(din1), .checks(c1), .failures(f1), .done(done1));
  serial_link_model #(.DELTA(D2), .S_INIT(1), .AMP(19 * D2 / 10), .WPER(500),
                      .JIT(D2 / 5), .NBITS(3000), .SEED(33))
    u_l2 (.cp(cp2), .dout(dout2), .din(din2), .checks(c2), .failures(f2), .done(done2));

  // mechanism counters: selected positions outside the central group
  int far_lo = 0, far_hi = 0, overlap = 0;
  always @(posedge cp1[3]) begin
    if ((dut1.p_ext[2:0] & dut1.u_sel.win[2:0]) != 0) far_lo++;
    if ((dut1.p_ext[12:10] & dut1.u_sel.win[12:10]) != 0) far_hi++;
    if ($countones(dut1.p) > 1) overlap++;
  end
  always @(posedge cp0[3]) begin
    if ((dut0.p_ext[2:0] & dut0.u_sel.win[2:0]) != 0) far_lo++;
    if ((dut0.p_ext[12:10] & dut0.u_sel.win[12:10]) != 0) far_hi++;
  end

  initial begin
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    wait (done0 && done1 && done2);
    checks = c0 + c1 + c2 + 3;
    failures = f0 + f1 + f2;
    if (far_lo == 0) begin failures++; $display("delay-2T group never used"); end
    if (far_hi == 0) begin failures++; $display("delay-0 group never used"); end
    if (overlap == 0) begin failures++; $display("no phase overlap"); end
    $display("initial phases %0d %0d %0d", u_l0.s_phase, u_l1.s_phase, u_l2.s_phase);
    $display("checks per rate %0d %0d %0d; far_lo=%0d far_hi=%0d overlap=%0d",
             c0, c1, c2, far_lo, far_hi, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c0 + c1 + c2, failures + f0 + f1 + f2);
    $finish;
  end
endmodule
