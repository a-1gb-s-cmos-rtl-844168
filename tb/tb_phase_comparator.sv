// Testbench of the seven-slice phase comparator. Seven clocks spaced
// delta = 200 ps (T = 1.4 ns) drive it; random data whose edge phase takes
// a slow random walk in 100 ps steps over more than a full bit period is
// applied. For every rising data edge at time t the testbench works out the
// expected optimum phase: the n whose next rising edge lies in
// (T/2, T/2 + delta] after t. At each rising edge of CP[n] it checks
//   p[n] == raw(now) | raw(previous CP[n] edge),  raw = (expected == n).
// It also checks that all seven phases were selected and that overlaps of
// two results happened.
module tb_phase_comparator;
  timeunit 1ps; timeprecision 1ps;
  localparam int DELTA = 200;
  localparam int T     = 7 * DELTA;

  logic       rst_n = 1'b1, din = 1'b0;
  logic [6:0] cp, p;
  int checks = 0, failures = 0;
  int exp_ph = -1;                 // index of expected phase, -1: none yet
  logic [6:0] q1 = '0, q2 = '0;
  int seen [7];
  int overlaps = 0;

  mpclk_gen u_clk (.delta_ps(DELTA), .cp(cp));
  phase_comparator dut (.rst_n(rst_n), .din(din), .cp(cp), .p(p));

  function automatic int phase_of(longint t);
    for (int i = 0; i < 7; i++) begin
      longint d = ((longint'(i * DELTA) - t) % longint'(T) + longint'(T)) % longint'(T);
      if (2 * d > 7 * DELTA && 2 * d <= 9 * DELTA) return i;
    end
    return -1;
  endfunction

  // data: bit j starts at 50 + j*T + phi; phi random-walks in 100 ps steps
  initial begin
    automatic longint phi = 0;
    automatic longint tnext;
    automatic logic   b;
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int j = 1; j < 3000; j++) begin
      if (j % 20 == 0) phi = phi + (($urandom % 2) != 0 ? 100 : -100);
      if (phi > 2 * T) phi = 2 * T;
      if (phi < -2 * T) phi = -2 * T;
      tnext = 50 + longint'(j) * T + 4 * T + phi;
      #(tnext - $time);
      b = 1'($urandom % 2);
      if (b && !din) exp_ph = phase_of($time);
      din = b;
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("phase %0d never selected", i); end
    end
    checks++;
    if (overlaps == 0) begin failures++; $display("no overlap seen"); end
    $display("overlaps=%0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < 7; i++) begin : g_chk
    always @(posedge cp[i]) begin
      q2[i] = q1[i];
      q1[i] = (exp_ph == i);
      #10;
      checks++;
      if (p[i] !== (q1[i] | q2[i])) begin
        failures++;
        if (failures < 10) $display("%0t: p[%0d]=%b expected %b", $time, i, p[i], q1[i] | q2[i]);
      end
      if (p[i]) seen[i]++;
      if (i == 3 && $countones(p) > 1) overlaps++;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
