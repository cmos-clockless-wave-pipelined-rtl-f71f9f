// Self-checking testbench of the edge-sensing circuit model (PULSE_W 350 ps).
// A rising and a falling edge must each give one pulse that starts with the
// edge and lasts 350 ps; two edges 100 ps apart must give one pulse from the
// first edge to 350 ps after the second; a quiet input must give no pulse.
// Pulse edges are timed by polling the output every picosecond, so each
// measured edge is allowed 1 ps of slack.
`timescale 1ps/1ps
module tb_edge_sensing_circuit;
  localparam int unsigned W = 350;

  logic din, dout;
  int checks = 0, failures = 0;

  edge_sensing_circuit #(.PULSE_W(W)) dut (.din(din), .dout(dout));

  initial begin
    #(1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watches dout for `len` ps and returns the first rise, last fall and
  // number of rises, relative to the call.
  task automatic watch(input int len, output int rise, output int fall, output int n);
    logic prev;
    prev = dout; rise = -1; fall = -1; n = 0;
    for (int t = 1; t <= len; t++) begin
      #1;
      if (dout && !prev) begin n++; if (rise < 0) rise = t - 1; end
      if (!dout && prev) fall = t - 1;
      prev = dout;
    end
  endtask

  task automatic expect_pulse(input string what, input int rise, input int fall, input int n,
                              input int erise, input int efall);
    checks++;
    if (n != 1 || rise < erise - 1 || rise > erise + 1 || fall < efall - 1 || fall > efall + 1) begin
      failures++;
      $display("%s: %0d pulses, rise %0d fall %0d, expected one pulse %0d..%0d",
               what, n, rise, fall, erise, efall);
    end
  endtask

  initial begin
    int r, f, n;
    din = 1'b0;
    #(2000);
    for (int rep = 0; rep < 3; rep++) begin
      // Rising edge.
      fork
        begin #1 din = 1'b1; end
        watch(1500, r, f, n);
      join
      expect_pulse("rising edge", r, f, n, 1, 1 + W);
      // Falling edge.
      fork
        begin #1 din = 1'b0; end
        watch(1500, r, f, n);
      join
      expect_pulse("falling edge", r, f, n, 1, 1 + W);
      // Two edges 100 ps apart (a glitch): one merged pulse.
      fork
        begin #1 din = 1'b1; #100 din = 1'b0; end
        watch(1500, r, f, n);
      join
      expect_pulse("glitch", r, f, n, 1, 101 + W);
      // Two edges 500 ps apart: two separate pulses.
      fork
        begin #1 din = 1'b1; #500 din = 1'b0; end
        watch(1500, r, f, n);
      join
      checks++;
      if (n != 2 || f < 500 + W || f > 502 + W) begin
        failures++;
        $display("separate edges: %0d pulses, last fall %0d", n, f);
      end
      // No edge, no pulse.
      watch(2000, r, f, n);
      checks++;
      if (n != 0 || dout) begin failures++; $display("pulse without an edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
