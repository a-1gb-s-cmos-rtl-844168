// Testbench of the selector. A 1.4 ns clock drives cp0; din_ext and p_ext
// get random values after every edge. p_ext is built as the real aligner
// would present it: a selected phase p (walking slowly over -6..+6) shows
// up at position p and at its alias p-7 or p+7, sometimes with a neighbour
// for an overlap. The reference model captures S from P'[-3..+3] at the
// first edge after reset where it is non-zero and takes as valid every
// position m within three of a set S[n] (|m-n| <= 3); the expected DOUT,
// one cycle later, is the OR of din_ext & p_ext over valid positions.
// The run is repeated after resets so that S starts at every phase.
module tb_selector;
  timeunit 1ps; timeprecision 1ps;
  localparam int T = 1400;

  logic        rst_n = 1'b1, cp0 = 1'b0;
  logic [12:0] din_ext = '0, p_ext = '0;
  logic        dout;
  logic [6:0]  s;
  int checks = 0, failures = 0;
  logic [6:0]  ref_s = '0;
  logic        ref_dout = 1'b0;
  int discards = 0;
  int s_seen [7];

  selector dut (.rst_n, .cp0, .din_ext, .p_ext, .dout, .s);

  initial forever #(T / 2) cp0 = ~cp0;

  function automatic logic [12:0] valid_of(logic [6:0] sv);
    logic [12:0] w = '0;
    for (int m = -6; m <= 6; m++)
      for (int n = -3; n <= 3; n++)
        if (sv[n + 3] && (m - n <= 3) && (n - m <= 3)) w[m + 6] = 1'b1;
    return w;
  endfunction

  function automatic logic [12:0] place(int ph);
    logic [12:0] v = '0;
    v[ph + 6] = 1'b1;
    if (ph >= 1) v[ph - 7 + 6] = 1'b1;
    if (ph <= -1) v[ph + 7 + 6] = 1'b1;
    return v;
  endfunction

  // stimulus and reference
  initial begin
    automatic int ph;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int run = 0; run < 14; run++) begin
      ph = (run % 7) - 3;
      @(negedge cp0);
      rst_n = 1'b0; p_ext = '0; din_ext = '0;
      @(negedge cp0);
      rst_n = 1'b1;
      ref_s = '0; ref_dout = 1'b0;
      // a few empty cycles before the first phase result
      repeat (3) begin
        @(posedge cp0); #1;
        checks++;
        if (dout !== 1'b0 || s !== 7'd0) begin failures++; $display("not idle after reset"); end
      end
      for (int k = 0; k < 300; k++) begin
        @(negedge cp0);
        if (k > 0 && k % 25 == 0) ph = ph + (((run / 7) == 0) ? 1 : -1);
        if (ph > 6) ph = 6;
        if (ph < -6) ph = -6;
        p_ext   = place(ph);
        if (ph < 6 && $urandom % 8 == 0) p_ext = p_ext | place(ph + 1);
        din_ext = 13'($urandom);
        @(posedge cp0);
        // reference update in step with the clock edge
        ref_dout = |(din_ext & p_ext & valid_of(ref_s));
        if ((p_ext & ~valid_of(ref_s)) != 0 && ref_s != 0) discards++;
        if (ref_s == 0 && p_ext[9:3] != 0) ref_s = p_ext[9:3];
        #1;
        checks++;
        if (dout !== ref_dout) begin
          failures++;
          if (failures < 10) $display("%0t: dout=%b expected %b (S=%b)", $time, dout, ref_dout, ref_s);
        end
        checks++;
        if (s !== ref_s) begin failures++; if (failures < 10) $display("%0t: S=%b expected %b", $time, s, ref_s); end
      end
      for (int n = 0; n < 7; n++) if (ref_s[n]) s_seen[n]++;
    end
    for (int n = 0; n < 7; n++) begin
      checks++;
      if (s_seen[n] == 0) begin failures++; $display("S never started at phase %0d", n - 3); end
    end
    checks++;
    if (discards == 0) begin failures++; $display("invalid group never discarded"); end
    $display("discards=%0d", discards);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10000 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
