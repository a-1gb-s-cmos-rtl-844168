// Testbench of one phase comparator slice. Drives din, cp and c_prev with
// random, non-coincident edges and checks
//   * c follows cp at every rising din edge,
//   * p at every rising cp edge equals raw(now) OR raw(previous cp edge),
//     raw = c AND NOT c_prev, computed here from the driven levels.
// Also counts how often the one-period overlap of p is exercised.
module tb_phase_comparator_slice;
  timeunit 1ps; timeprecision 1ps;
  logic rst_n = 1'b1, din = 1'b0, cp = 1'b0, c_prev = 1'b0;
  logic c, p;
  int checks = 0, failures = 0;
  logic exp_c = 1'b0, raw_q1 = 1'b0, raw_q2 = 1'b0;
  int overlaps = 0;

  phase_comparator_slice dut (.rst_n, .din, .cp, .c_prev, .c, .p);

  // cp: 1000 ps bit clock
  initial forever begin #500 cp = ~cp; end
  // din: random toggles at times never coinciding with cp edges
  initial begin
    #10 rst_n = 1'b0;
    #1224;
    rst_n = 1'b1;
    forever begin
      #(50 + 100 * ($urandom % 20) + 17);
      din = ~din;
      if (din) exp_c = cp;
    end
  end
  // c_prev: random slow changes
  initial forever begin
    #(333 + 100 * ($urandom % 30));
    c_prev = $urandom % 2;
  end

  always @(posedge cp) begin
    if (rst_n) begin
      raw_q2 <= raw_q1;
      raw_q1 <= exp_c & ~c_prev;
    end
  end

  always @(negedge cp) begin
    if (rst_n) begin
      checks++;
      if (c !== exp_c) begin failures++; $display("c mismatch at %0t", $time); end
      checks++;
      if (p !== (raw_q1 | raw_q2)) begin
        failures++; $display("p mismatch at %0t: %b exp %b", $time, p, raw_q1 | raw_q2);
      end
      if (raw_q2 && !raw_q1) overlaps++;
    end
  end

  initial begin
    #4_000_000;
    checks++;
    if (overlaps == 0) begin failures++; $display("overlap never exercised"); end
    $display("overlaps=%0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // watchdog
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
