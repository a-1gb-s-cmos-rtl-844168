// One slice (phase n) of the phase comparator.
//
// On every rising edge of the incoming data DIN the slice latches the level
// of its own bit clock CP[n] into C[n]. Together with C[n-1] from the slice
// of the preceding phase it decides whether CP[n] is the phase whose next
// rising edge falls in the window T/2 .. T/2+T/7 after the data edge, i.e.
// at the centre of the data bit: that is the case when C[n-1] = 0 and
// C[n] = 1 (CP[n-1] has already fallen while CP[n] is still high).
// The raw result is retimed by a flip-flop clocked by CP[n]; a second
// flip-flop delays it one more bit period and the OR of both is P[n]. When
// the selected phase moves to a neighbour, the old and new results overlap
// for one bit period, so a metastable first flip-flop cannot leave a gap.
//
// Interface: din, cp = CP[n], c_prev = C[n-1] (the first slice, n = -3,
// takes C[+3]), c = C[n], p = P[n]. P[n] changes shortly after rising CP[n];
// it follows a data edge after one to two bit periods.
// Structure and function follow the circuit description; the asynchronous
// active-low reset is an addition of this design so simulation starts clean.
module phase_comparator_slice (
  input  logic rst_n,
  input  logic din,
  input  logic cp,
  input  logic c_prev,
  output logic c,
  output logic p
);
  logic p_raw;      // C[n] AND NOT C[n-1]
  logic p_q1;       // retimed to CP[n]
  logic p_q2;       // delayed one more bit period

  // C[n]: CP[n] sampled by the data edge.
  always_ff @(posedge din or negedge rst_n) begin
    if (!rst_n) c <= 1'b0;
    else        c <= cp;
  end

  assign p_raw = c & ~c_prev;

  always_ff @(posedge cp or negedge rst_n) begin
    if (!rst_n) begin
      p_q1 <= 1'b0;
      p_q2 <= 1'b0;
    end else begin
      p_q1 <= p_raw;
      p_q2 <= p_q1;
    end
  end

  assign p = p_q1 | p_q2;
endmodule
