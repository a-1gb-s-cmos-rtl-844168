// Feedback frequency divider of the bit clock PLL.
//
// Divides the VCO output (the bit clock) by DIV, 8 by default, so that a
// 1 GHz bit clock is compared with the 125 MHz reference. A counter runs on
// the rising VCO edge; the output toggles every DIV/2 edges, giving a 50 %
// duty square wave whose rising edge follows a rising VCO edge.
// Interface: clk (VCO), rst_n (asynchronous, active low), clk_div.
// The ratio is the one of the chip described; the counter is the simplest
// circuit that does it. DIV must be even and at least 2.
module pll_divider #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_div
);
  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_div <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_div <= ~clk_div;
    end else begin
      cnt     <= cnt + 1'b1;
    end
  end
endmodule
