// Array of retiming channels: the synthesizable logic of the chip.
//
// NCH independent serial link channels share one set of seven multiphase
// bit clocks, which on the chip come from a PLL (125 MHz reference times
// eight) followed by a delay line; both are analog and are outside this
// module, so the clocks are inputs. Each channel retimes its own DIN,
// which must be frequency-locked to the clocks but may have any phase, to
// DOUT in the CP[0] domain.
//
// Interface: rst_n, cp[i] = CP[i-3], din[k] / dout[k] for channel k.
// Four channels, as on the chip described, is the default.
module retimer_array
  import retimer_pkg::*;
#(
  parameter int unsigned NCH = 4
) (
  input  logic           rst_n,
  input  phase_vec_t     cp,
  input  logic [NCH-1:0] din,
  output logic [NCH-1:0] dout
);
  for (genvar k = 0; k < NCH; k++) begin : g_ch
    retiming_channel u_ch (
      .rst_n (rst_n),
      .cp    (cp),
      .din   (din[k]),
      .dout  (dout[k])
    );
  end
endmodule
