// Behavioural model of the multiphase delay line (not synthesizable: an
// analog delay chain).
//
// Taps the bit clock into NPH = 7 phases spaced one seventh of the bit
// period apart: cp[i] = CP[i-3] is the bit clock delayed by i*T/7, so CP[0]
// lags the bit clock by 3T/7 and CP[n] lags CP[n-1] by T/7. The period T is
// measured between consecutive rising edges of the input, which stands for
// the calibration a real delay line needs; until two edges have been seen
// the taps assume T = T_INIT_PS.
// Ports: bitclk in, cp out (7 phases).
// That the phases come from the bit clock through a delay line follows the
// chip described; the line itself is not specified there.
module delay_line_model
  import retimer_pkg::*;
#(
  parameter real T_INIT_PS = 1000.0
) (
  input  logic       bitclk,
  output phase_vec_t cp
);
  timeunit 1ps; timeprecision 1fs;

  real t_bit  = T_INIT_PS;
  real t_last = -1.0;

  initial cp = '0;

  always @(posedge bitclk) begin
    if (t_last >= 0.0) t_bit = $realtime - t_last;
    t_last = $realtime;
  end

  // Transport delay: every input edge is replayed on each tap, even when
  // the delay exceeds half a period.
  for (genvar i = 0; i < NPH; i++) begin : g_tap
    always @(bitclk) begin
      fork
        automatic logic v = bitclk;
        automatic real  d = t_bit * i / NPH;
        begin
          #(d);
          cp[i] = v;
        end
      join_none
    end
  end
endmodule
