// Behavioural model of one incoming serial link and of the check of its
// retimed output.
//
// Source: a 2^31-1 pseudo-random bit sequence (x^31 + x^28 + 1) at the bit
// period T = 7*DELTA, frequency-locked to the bit clocks. The data is
// referenced to the clocks: at the first rising CP[0] edge after START
// (time base), bit j starts at
//     base + (j+1)*T + (S_INIT-4)*DELTA + wander(j) + jitter(j) + 0.5 ps,
// which puts the rising edge of CP[S_INIT] 4*DELTA (T/2 + DELTA/2) after
// each data edge, so S_INIT is the phase the comparator should report
// first. wander is zero for the first 64 bits and then a triangle of
// amplitude AMP ps and period WPER bits; jitter is uniform in +-JIT ps
// from bit 64 on. The extra 0.5 ps keeps data edges off the integer-ps
// clock edges, a race a zero-delay simulation cannot resolve.
//
// Check: the initial optimum phase s is derived from the observed clocks:
// the n whose CP[n] rising edge lies (T/2, T/2+DELTA] after the first
// rising data edge; it must equal S_INIT. For the output loaded at the
// CP[0] edge te, tc = te - 3T; the expected bit is the one whose nominal
// centre lies in [tc + (s-4)*DELTA, tc + (s+3)*DELTA), i.e. the bit a
// sampling point kept within three phases of s falls in. This fixes both
// the value and the latency of every output bit. Checking starts at bit 48
// and ends with the data; done is raised then.
module serial_link_model #(
  parameter int     DELTA  = 140,
  parameter real    START  = 5000.0,
  parameter int     S_INIT = 0,
  parameter int     AMP    = 0,
  parameter int     WPER   = 1000,
  parameter int     JIT    = 0,
  parameter int     NBITS  = 4000,
  parameter int     SEED   = 1
) (
  input  logic [6:0] cp,
  input  logic       dout,
  output logic       din,
  output int         checks,
  output int         failures,
  output logic       done
);
  timeunit 1ps; timeprecision 1fs;
  localparam real T  = 7.0 * DELTA;
  localparam real DL = 1.0 * DELTA;

  real         start_t [NBITS];
  logic        val     [NBITS];
  int          s_phase = 99;         // initial optimum phase n, 99: unknown
  real         e0 = -1.0;            // last rising CP[0] edge
  logic [30:0] lfsr;

  always @(posedge cp[3]) e0 = $realtime;

  // phase n whose rising edge lies (T/2, T/2+DELTA] after time t
  function automatic int phase_of(real t);
    for (int n = -3; n <= 3; n++) begin
      real x = e0 + n * DL - t;
      real d = x - T * $floor(x / T);
      if (d > 3.5 * DL && d <= 4.5 * DL) return n;
    end
    return 99;
  endfunction

  function automatic real wander(int j);
    real ph;
    if (j < 64 || AMP == 0) return 0.0;
    ph = real'((j - 64) % WPER) / real'(WPER);
    // triangle 0 -> AMP -> 0 -> -AMP -> 0 over one period
    if (ph < 0.25)      return 4.0 * AMP * ph;
    else if (ph < 0.75) return 2.0 * AMP - 4.0 * AMP * ph;
    else                return 4.0 * AMP * ph - 4.0 * AMP;
  endfunction

  initial begin
    automatic real base;
    din  = 1'b0;
    lfsr = 31'(SEED) | 31'h1;
    #(START);
    @(posedge cp[3]);
    base = $realtime;
    for (int j = 0; j < NBITS; j++) begin
      automatic real t = base + (j + 1) * T + (S_INIT - 4) * DL + wander(j) + 0.5;
      if (j >= 64 && JIT > 0) t = t + real'(int'($urandom % (2 * JIT + 1)) - JIT);
      start_t[j] = t;
      val[j]     = lfsr[30];
      lfsr       = {lfsr[29:0], lfsr[30] ^ lfsr[27]};
    end
    // drive the line
    for (int j = 0; j < NBITS; j++) begin
      #(start_t[j] - $realtime);
      if (val[j] && !din && s_phase == 99) s_phase = phase_of($realtime);
      din = val[j];
    end
  end

  // check the retimed output half a bit period after it is loaded
  initial begin
    checks = 0; failures = 0; done = 1'b0;
    forever begin
      @(negedge cp[3]);
      begin
        automatic real te = e0;
        automatic real tc = te - 3.0 * T;
        automatic real lo, hi;
        automatic int  hit = -1;
        automatic int  jg;
        if (s_phase != 99 && tc > start_t[48]) begin
          lo = tc + (s_phase - 4) * DL;
          hi = tc + (s_phase + 3) * DL;
          if (hi + T >= start_t[NBITS - 1]) begin
            done = 1'b1;
            break;
          end
          jg = int'($floor((tc - start_t[0]) / T));
          for (int j = (jg > 4) ? jg - 4 : 0; j < NBITS && j < jg + 5; j++) begin
            if (start_t[j] + T / 2.0 >= lo && start_t[j] + T / 2.0 < hi) hit = j;
          end
          checks++;
          if (hit < 0) begin
            failures++;
            $display("%m: no bit centred in the window at %0t", $realtime);
          end else if (dout !== val[hit]) begin
            failures++;
            if (failures < 10)
              $display("%m: %0t bit %0d: dout=%b expected %b", $realtime, hit, dout, val[hit]);
          end
        end
      end
    end
  end

  // the clocks must place the first data edge as intended
  initial begin
    wait (s_phase != 99);
    checks++;
    if (s_phase != S_INIT) begin
      failures++;
      $display("%m: initial phase %0d, intended %0d", s_phase, S_INIT);
    end
  end
endmodule
