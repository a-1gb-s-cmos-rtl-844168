// End-to-end testbench of the complete chip at its default size: PLL,
// delay line and four retiming channels. A 124.875 MHz reference
// (8008 ps) is applied; once the PLL reports lock the channels are taken
// out of reset, and each channel then receives its own 2^31-1 sequence at
// 999 Mb/s (T = 1001 ps, frequency-locked to the reference) with its own
// initial phase, wander of up to +-1.9 phases and jitter. Every output bit
// of every channel is checked for value and latency by serial_link_model.
// The testbench counts how often each mechanism acted and fails if one
// never did: PLL lock, phase overlap in the comparator, selection of an
// early phase (n < 0, the falling-edge path), of the delay-0 group
// (m > +3) and of the delay-2T group (m < -3), and discarding of a P' copy
// outside the window.
module tb_retimer_chip;
  timeunit 1ps; timeprecision 1fs;
  localparam int  D    = 143;
  localparam int  NB   = 5000;
  localparam real TREF = 8008.0;

  logic refclk = 1'b0, rst_n = 1'b1, locked;
  logic [3:0] din, dout, done;
  logic [6:0] cp;
  int c [4], f [4];
  int checks = 0, failures = 0;
  int n_lock = 0, n_overlap = 0, n_early = 0, n_d0 = 0, n_d2 = 0, n_discard = 0;

  initial forever begin #(TREF / 2.0) refclk = ~refclk; end

  retimer_chip dut (.refclk(refclk), .rst_n(rst_n), .din(din), .dout(dout), .cp(cp), .locked(locked));

  serial_link_model #(.DELTA(D), .START(4.0e6), .S_INIT(2), .AMP(19 * D / 10), .WPER(900),
                      .JIT(D / 5), .NBITS(NB), .SEED(101))
    u_l0 (.cp(cp), .dout(dout[0]), .din(din[0]), .checks(c[0]), .failures(f[0]), .done(done[0]));
  serial_link_model #(.DELTA(D), .START(4.0e6), .S_INIT(-3), .AMP(19 * D / 10), .WPER(700),
                      .JIT(D / 5), .NBITS(NB), .SEED(202))
    u_l1 (.cp(cp), .dout(dout[1]), .din(din[1]), .checks(c[1]), .failures(f[1]), .done(done[1]));
  serial_link_model #(.DELTA(D), .START(4.0e6), .S_INIT(-1), .AMP(D), .WPER(1100),
                      .JIT(D / 5), .NBITS(NB), .SEED(303))
    u_l2 (.cp(cp), .dout(dout[2]), .din(din[2]), .checks(c[2]), .failures(f[2]), .done(done[2]));
  serial_link_model #(.DELTA(D), .START(4.0e6), .S_INIT(0), .AMP(3 * D / 2), .WPER(500),
                      .JIT(D / 4), .NBITS(NB), .SEED(404))
    u_l3 (.cp(cp), .dout(dout[3]), .din(din[3]), .checks(c[3]), .failures(f[3]), .done(done[3]));

  for (genvar k = 0; k < 4; k++) begin : g_mon
    always @(posedge cp[3]) begin
      if (rst_n) begin
        if ($countones(dut.u_array.g_ch[k].u_ch.p) > 1) n_overlap++;
        if ((dut.u_array.g_ch[k].u_ch.p_ext[5:3] & dut.u_array.g_ch[k].u_ch.u_sel.win[5:3]) != 0 ||
            (dut.u_array.g_ch[k].u_ch.p_ext[12:10] & dut.u_array.g_ch[k].u_ch.u_sel.win[12:10]) != 0)
          n_early++;
        if ((dut.u_array.g_ch[k].u_ch.p_ext[12:10] & dut.u_array.g_ch[k].u_ch.u_sel.win[12:10]) != 0) n_d0++;
        if ((dut.u_array.g_ch[k].u_ch.p_ext[2:0] & dut.u_array.g_ch[k].u_ch.u_sel.win[2:0]) != 0) n_d2++;
        if (dut.u_array.g_ch[k].u_ch.u_sel.s != 0 &&
            (dut.u_array.g_ch[k].u_ch.p_ext & ~dut.u_array.g_ch[k].u_ch.u_sel.win) != 0) n_discard++;
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    #10 rst_n = 1'b0;
    wait (locked);
    n_lock++;
    $display("PLL locked at %0.1f ns", $realtime / 1000.0);
    #(20 * TREF);
    rst_n = 1'b1;
    wait (done == 4'hf);
    for (int k = 0; k < 4; k++) begin
      checks += c[k];
      failures += f[k];
      checks++;
      if (c[k] < NB - 100) begin failures++; $display("channel %0d checked too few bits", k); end
    end
    checks++;
    if (!locked) begin failures++; $display("PLL lost lock"); end
    need("PLL lock", n_lock);
    need("overlap", n_overlap);
    need("early path", n_early);
    need("delay-0 group", n_d0);
    need("delay-2T group", n_d2);
    need("discard", n_discard);
    $display("bits checked %0d %0d %0d %0d; overlap=%0d early=%0d d0=%0d d2=%0d discard=%0d",
             c[0], c[1], c[2], c[3], n_overlap, n_early, n_d0, n_d2, n_discard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(4.0e6 + real'(NB + 200) * 7 * D);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
