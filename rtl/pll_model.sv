// Behavioural model of the bit clock PLL (not synthesizable: the VCO,
// phase-frequency detector, charge pump and loop filter are analog).
//
// Synthesizes the bit clock at DIV (8) times the reference frequency, e.g.
// 1 GHz from 125 MHz. The VCO is a toggling variable with a real period,
// limited to F_MIN_MHZ .. F_MAX_MHZ (580 MHz .. 1.08 GHz). Its output is
// divided by the synthesizable pll_divider. The phase-frequency detector
// pairs the k-th rising reference edge with the k-th rising divided edge;
// once both of a pair have arrived it measures the time error e (positive
// when the divided clock is late) and updates a discrete-time
// proportional-integral loop filter once per reference cycle:
//     T_vco = T_int - (A/DIV) * e,     T_int <- T_int - (B/DIV) * e
// with A = 2*pi*LOOP_BW_MHZ/F_REF_MHZ and B = A*A/2 (damping about 0.7),
// which sets the loop bandwidth near LOOP_BW_MHZ (5 MHz). As in a
// tri-state detector, at most one edge of either input waits for its
// partner: a second edge of the same input replaces the waiting one, so
// the error keeps its sign while the frequencies differ. locked is raised after 64 consecutive
// comparisons within 2 ps and dropped on an error above 50 ps.
// Ports: refclk, rst_n (restarts the divider and the detector), clk_out (bit
// clock), fb_clk (divided clock), locked.
// The ratio, lock range and bandwidth are those of the chip described; the
// loop model and the lock indicator are this design's own.
module pll_model #(
  parameter int unsigned DIV         = 8,
  parameter real         F_MIN_MHZ   = 580.0,
  parameter real         F_MAX_MHZ   = 1080.0,
  parameter real         F_INIT_MHZ  = 830.0,
  parameter real         F_REF_MHZ   = 125.0,
  parameter real         LOOP_BW_MHZ = 5.0
) (
  input  logic refclk,
  input  logic rst_n,
  output logic clk_out,
  output logic fb_clk,
  output logic locked
);
  timeunit 1ps; timeprecision 1fs;

  localparam real PI    = 3.14159265358979;
  localparam real A     = 2.0 * PI * LOOP_BW_MHZ / F_REF_MHZ;
  localparam real B     = A * A / 2.0;
  localparam real T_MIN = 1.0e6 / F_MAX_MHZ;     // ps
  localparam real T_MAX = 1.0e6 / F_MIN_MHZ;     // ps

  real    t_vco = 1.0e6 / F_INIT_MHZ;            // current VCO period, ps
  real    t_int = 1.0e6 / F_INIT_MHZ;            // integral path
  real    tr [16];                               // reference edge times
  real    tf [16];                               // divided edge times
  int     nref = 0, nfb = 0;                     // edges seen
  int     good = 0;

  function automatic real clamp(real v);
    if (v < T_MIN) return T_MIN;
    if (v > T_MAX) return T_MAX;
    return v;
  endfunction

  // loop filter update for edge pair k
  task automatic update(int k);
    real e;
    e     = tf[k % 16] - tr[k % 16];
    t_int = clamp(t_int - (B / DIV) * e);
    t_vco = clamp(t_int - (A / DIV) * e);
    if (e < 2.0 && e > -2.0) begin
      if (good < 64) good++;
    end else if (e > 50.0 || e < -50.0) begin
      good = 0;
    end
    locked = (good >= 64) || (locked && e < 50.0 && e > -50.0);
  endtask

  initial begin
    clk_out = 1'b0;
    locked  = 1'b0;
  end

  // VCO: toggles every half period
  always begin
    #(t_vco / 2.0);
    clk_out = ~clk_out;
  end

  pll_divider #(.DIV(DIV)) u_div (
    .clk     (clk_out),
    .rst_n   (rst_n),
    .clk_div (fb_clk)
  );

  // phase-frequency detector
  always @(posedge refclk or negedge rst_n) begin
    if (!rst_n) begin
      nref   = 0;
      nfb    = 0;
      good   = 0;
      locked = 1'b0;
    end else begin
      if (nref - nfb >= 1) nref = nref - 1;    // unmatched: keep the newest
      tr[nref % 16] = $realtime;
      nref++;
      if (nfb >= nref) update(nref - 1);
    end
  end

  // (no divided edges arrive while rst_n holds the divider)
  always @(posedge fb_clk) begin
    if (nfb - nref >= 1) nfb = nfb - 1;
    tf[nfb % 16] = $realtime;
    nfb++;
    if (nref >= nfb) update(nfb - 1);
  end
endmodule
