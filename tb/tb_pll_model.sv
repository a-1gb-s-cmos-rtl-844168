// Testbench of the PLL model. A 124.875 MHz reference (8008 ps) must give
// a locked 999 Mb/s bit clock (1001 ps): after lock the mean output period
// over 512 cycles must be within 0.1 ps of 1001 ps, and the divided clock
// stay within 2 ps of the reference. The reference is then retuned to
// 75 MHz and 130 MHz, inside the 580 MHz .. 1.08 GHz lock range, where the
// output must follow at eight times the reference and lock again, and to
// 140 MHz, beyond it, where the output must stay at 1.08 GHz and lock
// must not be reported.
module tb_pll_model;
  timeunit 1ps; timeprecision 1fs;
  logic refclk = 1'b0, rst_n = 1'b1, clk_out, fb_clk, locked;
  real  tref = 8008.0;
  int checks = 0, failures = 0;
  real t_lock;
  real t_ref = 0.0;

  always @(posedge refclk) t_ref = $realtime;

  pll_model dut (.refclk, .rst_n, .clk_out, .fb_clk, .locked);

  initial forever begin #(tref / 2.0) refclk = ~refclk; end

  task automatic measure(output real per);
    real t0;
    @(posedge clk_out);
    t0 = $realtime;
    repeat (512) @(posedge clk_out);
    per = ($realtime - t0) / 512.0;
  endtask

  task automatic expect_close(string what, real got, real want, real tol);
    checks++;
    if (got > want + tol || got < want - tol) begin
      failures++;
      $display("%s: %f, expected %f +- %f", what, got, want, tol);
    end else $display("%s: %f", what, got);
  endtask

  initial begin
    real per, e;
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    wait (locked);
    t_lock = $realtime;
    $display("locked after %0.1f ns", t_lock / 1000.0);
    checks++;
    if (t_lock > 10.0e6) begin failures++; $display("lock took too long"); end
    measure(per);
    expect_close("bit period at 124.875 MHz ref", per, 1001.0, 0.1);
    repeat (16) begin
      @(posedge fb_clk);
      e = $realtime - t_ref;
      if (e > tref / 2.0) e = e - tref;
      expect_close("divided clock phase error", e, 0.0, 2.0);
    end
    // retune inside the range
    tref = 1.0e6 / 75.0;
    #(20.0e6);
    measure(per);
    expect_close("bit period at 75 MHz ref", per, tref / 8.0, 0.1);
    checks++;
    if (!locked) begin failures++; $display("not locked at 75 MHz"); end
    tref = 1.0e6 / 130.0;
    #(20.0e6);
    measure(per);
    expect_close("bit period at 130 MHz ref", per, tref / 8.0, 0.1);
    checks++;
    if (!locked) begin failures++; $display("not locked at 130 MHz"); end
    // beyond the top of the range: VCO pinned at 1.08 GHz, no lock
    tref = 1.0e6 / 140.0;
    #(20.0e6);
    measure(per);
    expect_close("bit period at 140 MHz ref (clamped)", per, 1.0e6 / 1080.0, 0.5);
    checks++;
    if (locked) begin failures++; $display("lock reported out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(120.0e6);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
