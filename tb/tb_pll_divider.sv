// Testbench of the PLL feedback divider: counts input edges between output
// edges. Each output half period must last exactly DIV/2 input periods,
// and every output rising edge must follow a rising input edge. Checked at
// the default ratio of 8.
module tb_pll_divider;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1, clk_div;
  int checks = 0, failures = 0;
  int n_in = 0, last_n = -1;
  logic armed = 1'b0;

  pll_divider dut (.clk, .rst_n, .clk_div);

  initial forever #500 clk = ~clk;
  always @(posedge clk) n_in++;

  always @(clk_div) begin
    if (armed && last_n >= 0) begin
      checks++;
      if (n_in - last_n != 4) begin
        failures++; $display("%0t: half period of %0d input cycles", $time, n_in - last_n);
      end
    end
    if (armed) last_n = n_in;
  end

  initial begin
    #10 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    armed = 1'b1;
    #1_000_000;
    checks++;
    if (checks < 200) begin failures++; $display("too few output edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
