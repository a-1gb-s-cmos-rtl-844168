// Testbench of the delay line model. Feeds bit clocks of 1001 ps and,
// later, 1724 ps and checks, once the taps have settled, that every rising
// edge of cp[i] comes i*T/7 after a rising bit clock edge (within 0.01 ps)
// and that the taps keep a 50 % duty cycle.
module tb_delay_line_model;
  timeunit 1ps; timeprecision 1fs;
  logic bitclk = 1'b0;
  logic [6:0] cp;
  real tbit = 1001.0;
  real t_rise [$];
  int checks = 0, failures = 0;
  logic armed = 1'b0;

  delay_line_model dut (.bitclk(bitclk), .cp(cp));

  initial forever begin #(tbit / 2.0) bitclk = ~bitclk; end
  always @(posedge bitclk) begin
    t_rise.push_back($realtime);
    if (t_rise.size() > 8) void'(t_rise.pop_front());
  end

  for (genvar i = 0; i < 7; i++) begin : g_chk
    real t_up;
    always @(posedge cp[i]) begin
      t_up = $realtime;
      if (armed) begin
        automatic real want = tbit * i / 7.0;
        automatic bit  ok = 1'b0;
        foreach (t_rise[k]) begin
          automatic real d = $realtime - t_rise[k];
          if (d > want - 0.01 && d < want + 0.01) ok = 1'b1;
        end
        checks++;
        if (!ok) begin failures++; if (failures < 10) $display("%0t: tap %0d misplaced", $realtime, i); end
      end
    end
    always @(negedge cp[i]) begin
      if (armed) begin
        checks++;
        if ($realtime - t_up > tbit / 2.0 + 0.01 || $realtime - t_up < tbit / 2.0 - 0.01) begin
          failures++; $display("%0t: tap %0d duty", $realtime, i);
        end
      end
    end
  end

  initial begin
    #(20 * tbit);
    armed = 1'b1;
    #(300 * tbit);
    armed = 1'b0;
    tbit = 1724.0;
    #(20 * tbit);
    armed = 1'b1;
    #(300 * tbit);
    checks++;
    if (checks < 8000) begin failures++; $display("too few tap edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(2.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
