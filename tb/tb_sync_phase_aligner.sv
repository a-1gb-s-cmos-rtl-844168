// Testbench of the synchronous digital phase aligner. Each input x[i] gets
// a new random value 50 ps after every rising edge of its own clock
// CP[i-3]; the testbench records the value present at each of those edges,
// keyed by the edge time. After every rising edge of CP[0] at time E it
// checks every output position m against the recorded sample:
//   ext[m+6] == sample of phase n taken at  tc + m*delta,  tc = E - 2T,
// where n = m, m-7 or m+7 is the phase whose edge falls at that time.
// This checks the three alignment paths and the 0/T/2T extension, and the
// latency of one sample per bit period.
module tb_sync_phase_aligner;
  timeunit 1ps; timeprecision 1ps;
  localparam int DELTA = 200;
  localparam int T     = 7 * DELTA;

  logic        rst_n = 1'b1;
  logic [6:0]  cp, x;
  logic [12:0] ext;
  int checks = 0, failures = 0;
  bit sample [longint];            // edge time -> value sampled there
  int ncyc = 0;

  mpclk_gen u_clk (.delta_ps(DELTA), .cp(cp));
  sync_phase_aligner dut (.rst_n(rst_n), .cp(cp), .x(x), .ext(ext));

  initial begin
    x = '0;
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
  end

  for (genvar i = 0; i < 7; i++) begin : g_drv
    always @(posedge cp[i]) begin
      sample[$time] = x[i];
      #50 x[i] = 1'($urandom % 2);
    end
  end

  always @(posedge cp[3]) begin
    automatic longint e = $time;
    #20;
    ncyc++;
    if (e >= 4 * T) begin
      for (int m = -6; m <= 6; m++) begin
        automatic longint ts = e - 2 * T + m * DELTA;
        checks++;
        if (!sample.exists(ts)) begin
          failures++; $display("no sample recorded at %0t", ts);
        end else if (ext[m + 6] !== sample[ts]) begin
          failures++;
          if (failures < 10) $display("%0t: X'[%0d]=%b expected %b", e, m, ext[m + 6], sample[ts]);
        end
      end
    end
    if (ncyc == 2000) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #(4000 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
