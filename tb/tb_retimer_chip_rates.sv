// Chip-level test at the ends of the operating range, through the PLL:
// one chip at a 75.03 MHz reference (13328 ps, 600.2 Mb/s) and one at a
// 133.3 MHz reference (7504 ps, 1.066 Gb/s), each with four channels of
// 2^31-1 data at different initial phases with wander and jitter. All
// output bits are checked by serial_link_model; both PLLs must lock.
module tb_retimer_chip_rates;
  timeunit 1ps; timeprecision 1fs;
  localparam int DL = 238, DH = 134;
  localparam int NB = 2500;

  logic rl = 1'b0, rh = 1'b0, rst_n = 1'b1;
  logic lock_l, lock_h;
  logic [3:0] din_l, dout_l, din_h, dout_h, done_l, done_h;
  logic [6:0] cp_l, cp_h;
  int cl [4], fl [4], ch [4], fh [4];
  int checks = 0, failures = 0;

  initial forever begin #(28.0 * DL) rl = ~rl; end
  initial forever begin #(28.0 * DH) rh = ~rh; end

  retimer_chip dut_l (.refclk(rl), .rst_n(rst_n), .din(din_l), .dout(dout_l), .cp(cp_l), .locked(lock_l));
  retimer_chip dut_h (.refclk(rh), .rst_n(rst_n), .din(din_h), .dout(dout_h), .cp(cp_h), .locked(lock_h));

  for (genvar k = 0; k < 4; k++) begin : g_link
    serial_link_model #(.DELTA(DL), .START(6.0e6), .S_INIT(2 * k - 3), .AMP(3 * DL / 2),
                        .WPER(400 + 100 * k), .JIT(DL / 5), .NBITS(NB), .SEED(7 + k))
      u_ll (.cp(cp_l), .dout(dout_l[k]), .din(din_l[k]), .checks(cl[k]), .failures(fl[k]), .done(done_l[k]));
    serial_link_model #(.DELTA(DH), .START(6.0e6), .S_INIT(3 - 2 * k), .AMP(3 * DH / 2),
                        .WPER(450 + 100 * k), .JIT(DH / 5), .NBITS(NB), .SEED(17 + k))
      u_lh (.cp(cp_h), .dout(dout_h[k]), .din(din_h[k]), .checks(ch[k]), .failures(fh[k]), .done(done_h[k]));
  end

  initial begin
    #10 rst_n = 1'b0;
    wait (lock_l && lock_h);
    $display("both PLLs locked at %0.1f ns", $realtime / 1000.0);
    #(1.0e5);
    rst_n = 1'b1;
    wait (done_l == 4'hf && done_h == 4'hf);
    for (int k = 0; k < 4; k++) begin
      checks += cl[k] + ch[k];
      failures += fl[k] + fh[k];
      checks++;
      if (cl[k] < NB - 100 || ch[k] < NB - 100) begin failures++; $display("channel %0d: too few bits", k); end
    end
    checks++;
    if (!lock_l || !lock_h) begin failures++; $display("lock lost"); end
    $display("bits checked low %0d %0d %0d %0d high %0d %0d %0d %0d",
             cl[0], cl[1], cl[2], cl[3], ch[0], ch[1], ch[2], ch[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(6.0e6 + real'(NB + 200) * 7 * DL);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
