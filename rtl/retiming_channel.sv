// One data retiming channel.
//
// The phase comparator finds, from the rising edges of DIN, which of the
// seven bit clocks CP[n] has its rising edge nearest the centre of the data
// eye (P[n]). One synchronous digital phase aligner moves P[n] into the
// CP[0] domain and extends it to the 13-position window P'[m]; a second,
// identical aligner fed with DIN on all seven inputs produces the matching
// data samples DIN'[m]. The selector keeps the data sample at the valid
// position and delivers it as DOUT, one bit per CP[0] cycle.
//
// Interface: cp[i] = CP[i-3] (frequency-locked to DIN, CP[0] is the system
// bit clock), din, dout. DOUT for the data sampled around CP[0] edge k
// appears after CP[0] edge k+3.
// The partitioning into these four blocks is that of the circuit.
module retiming_channel
  import retimer_pkg::*;
(
  input  logic       rst_n,
  input  phase_vec_t cp,
  input  logic       din,
  output logic       dout
);
  phase_vec_t p;
  ext_vec_t   p_ext;
  ext_vec_t   din_ext;

  phase_comparator u_pc (
    .rst_n (rst_n),
    .din   (din),
    .cp    (cp),
    .p     (p)
  );

  sync_phase_aligner u_spa_p (
    .rst_n (rst_n),
    .cp    (cp),
    .x     (p),
    .ext   (p_ext)
  );

  sync_phase_aligner u_spa_d (
    .rst_n (rst_n),
    .cp    (cp),
    .x     ({NPH{din}}),
    .ext   (din_ext)
  );

  selector u_sel (
    .rst_n   (rst_n),
    .cp0     (cp[PH0]),
    .din_ext (din_ext),
    .p_ext   (p_ext),
    .dout    (dout),
    .s       ()
  );
endmodule
