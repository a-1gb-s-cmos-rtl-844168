// Phase comparator: seven slices closed in a ring.
//
// Slice n compares C[n] with C[n-1]; the first slice (n = -3) uses C[+3],
// which closes the ring over one bit period. With a 50 % duty bit clock the
// latched vector C is a circular run of ones, so exactly one slice sees the
// 0-to-1 step and raises P[n]: CP[n] is the phase whose rising edge lies
// T/2 .. T/2+T/7 after the rising data edge. When the optimum phase moves,
// old and new P[n] overlap for one bit period.
//
// Interface: cp[i] = CP[i-3], p[i] = P[i-3] (retimed to its own CP[n]).
// The ring and slice structure are those of the circuit description.
module phase_comparator
  import retimer_pkg::*;
(
  input  logic       rst_n,
  input  logic       din,
  input  phase_vec_t cp,
  output phase_vec_t p
);
  phase_vec_t c;

  for (genvar i = 0; i < NPH; i++) begin : g_slice
    localparam int unsigned IPREV = (i == 0) ? NPH - 1 : i - 1;
    phase_comparator_slice u_slice (
      .rst_n  (rst_n),
      .din    (din),
      .cp     (cp[i]),
      .c_prev (c[IPREV]),
      .c      (c[i]),
      .p      (p[i])
    );
  end
endmodule
