// Synchronous digital phase aligner.
//
// Brings seven signals, each sampled by its own bit clock CP[n], into the
// CP[0] domain and spreads them over a two-bit-wide window.
//   * First stage: x[n] is sampled by a flip-flop clocked by CP[n]. For the
//     phase path x[n] = P[n]; for the data path every x[n] is DIN, so the
//     stage takes seven samples of DIN spaced T/7 apart.
//   * Alignment: for n < 0, whose edges precede CP[0], the sample passes a
//     flip-flop on the falling edge of CP[0] and then one on the rising edge
//     of CP[0]; for n >= 0 it goes straight to the rising edge of CP[0].
//     Either way every sample taken around one CP[0] edge arrives together
//     at the next CP[0] edge, with at least about T/2 of timing margin.
//   * Extension: the aligned vector A is kept with delays of 0, T and 2T.
//     The thirteen outputs X'[m], m = -6..+6, are
//         X'[m] = A delayed 2T, phase m+7   for m = -6..-4
//         X'[m] = A delayed T,  phase m     for m = -3..+3
//         X'[m] = A delayed 0,  phase m-7   for m = +4..+6
//     so that all of them describe one time axis: X'[m] is the sample taken
//     at tc + m*T/7, where tc is the CP[0] edge two bit periods before the
//     edge that loaded the delay-0 register.
//
// Interface: cp[i] = CP[i-3], x[i] = input of phase i-3, ext[j] = X'[j-6].
// All outputs change on the rising edge of CP[0].
// The clocking of the three stages follows the circuit description; the
// exact mapping of the 0/T/2T delays onto positions m is this design's
// reading of the two-bit-wide window, and the reset is an addition.
module sync_phase_aligner
  import retimer_pkg::*;
(
  input  logic       rst_n,
  input  phase_vec_t cp,
  input  phase_vec_t x,
  output ext_vec_t   ext
);
  phase_vec_t s1;          // first stage, clocked by own phase
  logic [PH0-1:0] half;    // falling-edge CP[0] stage, n < 0 only
  phase_vec_t a0;          // aligned to CP[0], delay 0
  phase_vec_t a1;          // delay T
  phase_vec_t a2;          // delay 2T

  for (genvar i = 0; i < NPH; i++) begin : g_phase
    always_ff @(posedge cp[i] or negedge rst_n) begin
      if (!rst_n) s1[i] <= 1'b0;
      else        s1[i] <= x[i];
    end

    if (i < PH0) begin : g_early
      // Early phase: via the falling edge of CP[0].
      always_ff @(negedge cp[PH0] or negedge rst_n) begin
        if (!rst_n) half[i] <= 1'b0;
        else        half[i] <= s1[i];
      end
      always_ff @(posedge cp[PH0] or negedge rst_n) begin
        if (!rst_n) a0[i] <= 1'b0;
        else        a0[i] <= half[i];
      end
    end else begin : g_late
      // CP[0] and late phases: directly to the rising edge of CP[0].
      always_ff @(posedge cp[PH0] or negedge rst_n) begin
        if (!rst_n) a0[i] <= 1'b0;
        else        a0[i] <= s1[i];
      end
    end
  end

  always_ff @(posedge cp[PH0] or negedge rst_n) begin
    if (!rst_n) begin
      a1 <= '0;
      a2 <= '0;
    end else begin
      a1 <= a0;
      a2 <= a1;
    end
  end

  for (genvar j = 0; j < NEXT; j++) begin : g_ext
    localparam int M = j - int'(M0);
    if (M <= -int'(PH0) - 1) begin : g_d2
      assign ext[j] = a2[M + int'(NPH) + int'(PH0)];
    end else if (M >= int'(PH0) + 1) begin : g_d0
      assign ext[j] = a0[M - int'(NPH) + int'(PH0)];
    end else begin : g_d1
      assign ext[j] = a1[M + int'(PH0)];
    end
  end
endmodule
