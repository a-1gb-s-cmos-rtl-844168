// Behavioural model of the multiphase bit clock source: the PLL that
// synthesizes the bit clock and the delay line that taps it into seven
// phases CP[-3..+3], spaced T/7 = delta_ps apart with 50 % duty.
// Every delta_ps/2 one clock edge occurs: phase i (= n+3) rises at
// i*delta_ps + k*T and falls 3.5*delta_ps later, so CP[0] rises at
// 3*delta_ps + k*T, counting from time 0. delta_ps must be even and
// constant.
module mpclk_gen (
  input  int unsigned delta_ps,
  output logic [6:0]  cp
);
  timeunit 1ps; timeprecision 1ps;
  int unsigned q;

  initial begin
    cp = '0;
    q  = 0;
    forever begin
      for (int i = 0; i < 7; i++) begin
        if (q == 2 * i)              cp[i] = 1'b1;
        if (q == (2 * i + 7) % 14)   cp[i] = 1'b0;
      end
      q = (q + 1) % 14;
      #(delta_ps / 2);
    end
  end
endmodule
