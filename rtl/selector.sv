// Selector: picks the retimed data bit out of the extended window.
//
// The phase results P'[m] hold two copies of the selected phase, one bit
// period (seven positions) apart. S[n], n = -3..+3, is the initial value of
// the central positions P'[-3..+3]; it is captured at the first CP[0] edge
// after reset at which one of them is set, and then held. It defines a
// seven-position window around the initial phase s:
//     W[m] = OR S[n] for n = -3 .. m+3   (m <= 0)
//     W[m] = OR S[n] for n = m-3 .. +3   (m >= 1)
// which is true exactly for m in s-3 .. s+3. Only one of the two P' copies
// can fall inside it, so the other is discarded, and
//     DOUT = OR over m of DIN'[m] AND P'[m] AND W[m].
// The window is static once S is taken, so the phase may wander up to three
// positions either side of where it started (up to six from the centre of
// the window) without a bit slip.
//
// Interface: din_ext[j] = DIN'[j-6], p_ext[j] = P'[j-6], s[i] = S[i-3].
// DOUT is registered on the rising edge of CP[0], one bit period after the
// window inputs.
// An assertion checks that S, once taken, stays until reset.
// The equation is the one of the circuit description; when S is captured
// and the output register are choices of this design.
module selector
  import retimer_pkg::*;
(
  input  logic       rst_n,
  input  logic       cp0,
  input  ext_vec_t   din_ext,
  input  ext_vec_t   p_ext,
  output logic       dout,
  output phase_vec_t s
);
  ext_vec_t   win;        // W[m], the valid positions
  logic       dout_d;
  phase_vec_t p_mid;      // P'[-3..+3]

  assign p_mid = p_ext[M0 + PH0 : M0 - PH0];

  always_ff @(posedge cp0 or negedge rst_n) begin
    if (!rst_n)                     s <= '0;
    else if (s == '0 && p_mid != '0) s <= p_mid;
  end

  always_comb begin
    for (int j = 0; j < int'(NEXT); j++) begin
      win[j] = 1'b0;
      for (int i = 0; i < int'(NPH); i++) begin
        // j - M0 = m, i - PH0 = n
        if (j <= int'(M0)) begin
          if (i - int'(PH0) <= j - int'(M0) + int'(PH0)) win[j] = win[j] | s[i];
        end else begin
          if (i - int'(PH0) >= j - int'(M0) - int'(PH0)) win[j] = win[j] | s[i];
        end
      end
    end
    dout_d = |(din_ext & p_ext & win);
  end

  always_ff @(posedge cp0 or negedge rst_n) begin
    if (!rst_n) dout <= 1'b0;
    else        dout <= dout_d;
  end

  // Once taken, S holds until the next reset.
  a_s_held : assert property (@(posedge cp0) disable iff (!rst_n) (s != '0) |=> $stable(s))
    else $error("selector: S changed after it was taken");
endmodule
