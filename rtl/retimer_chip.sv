// Four-channel 1 Gb/s data retiming chip.
//
// A PLL multiplies the reference clock by eight to the bit clock (125 MHz
// to 1 GHz); a delay line taps the bit clock into seven phases CP[-3..+3]
// spaced T/7; four retiming channels share these phases, and each recovers
// its own serial input, which must be frequency-locked to the reference,
// onto CP[0]. The PLL and the delay line are behavioural models (analog on
// the chip); the PLL's divider and everything in the channels is
// synthesizable logic.
// Ports: refclk, rst_n (asynchronous, active low), din/dout per channel,
// cp (the seven phases, for observation and for clocking what follows
// DOUT), locked (PLL lock indicator). Release rst_n once locked is high, so
// the channels start from the final clock phases.
// Four channels, as on the chip described, is the default.
module retimer_chip
  import retimer_pkg::*;
#(
  parameter int unsigned NCH = 4
) (
  input  logic           refclk,
  input  logic           rst_n,
  input  logic [NCH-1:0] din,
  output logic [NCH-1:0] dout,
  output phase_vec_t     cp,
  output logic           locked
);
  logic bitclk;
  logic fb_clk;

  pll_model u_pll (
    .refclk  (refclk),
    .rst_n   (1'b1),
    .clk_out (bitclk),
    .fb_clk  (fb_clk),
    .locked  (locked)
  );

  delay_line_model u_dl (
    .bitclk (bitclk),
    .cp     (cp)
  );

  retimer_array #(.NCH(NCH)) u_array (
    .rst_n (rst_n),
    .cp    (cp),
    .din   (din),
    .dout  (dout)
  );
endmodule
