// Self-checking testbench of the completion detector (9 bits, 350 ps pulses).
// Each round picks a random set of bits and changes each of them at its own
// random time within a 300 ps window, as a skewed adder output would. done
// must rise with the earliest change and fall 350 ps after the latest, as one
// pulse; only the bits that changed may pulse; a round that changes nothing
// must give no pulse. Times are measured by polling every picosecond.
`timescale 1ps/1ps
module tb_escd;
  localparam int unsigned N = 9;
  localparam int unsigned W = 350;

  logic [N-1:0] data, pulses, seen;
  logic done;
  int checks = 0, failures = 0;
  int quiet_rounds = 0, busy_rounds = 0;

  escd #(.N(N), .PULSE_W(W)) dut (.data(data), .pulses(pulses), .done(done));

  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int when [N];
    logic [N-1:0] mask;
    int first, last, rise, fall, n;
    logic prev;
    data = '0;
    #(2000);
    for (int round = 0; round < 400; round++) begin
      mask = (round % 8 == 0) ? '0 : N'($urandom);
      first = 1_000_000; last = -1;
      for (int i = 0; i < N; i++) begin
        when[i] = 10 + int'($urandom % 300);
        if (mask[i]) begin
          if (when[i] < first) first = when[i];
          if (when[i] > last) last = when[i];
        end
      end
      prev = done; rise = -1; fall = -1; n = 0; seen = '0;
      for (int t = 0; t < 1200; t++) begin
        for (int i = 0; i < N; i++) if (mask[i] && when[i] == t) data[i] = ~data[i];
        #1;
        seen |= pulses;
        if (done && !prev) begin n++; if (rise < 0) rise = t; end
        if (!done && prev) fall = t;
        prev = done;
      end
      checks++;
      if (mask == '0) begin
        quiet_rounds++;
        if (n != 0 || seen != '0) begin failures++; $display("round %0d: pulse without a change", round); end
      end else begin
        busy_rounds++;
        if (n != 1 || rise < first || rise > first + 1 || fall < last + int'(W) - 1 || fall > last + int'(W) + 1) begin
          failures++;
          $display("round %0d: %0d pulses %0d..%0d, changes %0d..%0d", round, n, rise, fall, first, last);
        end
        checks++;
        if (seen != mask) begin failures++; $display("round %0d: pulsing bits %b, changed %b", round, seen, mask); end
      end
    end
    checks++;
    if (quiet_rounds == 0 || busy_rounds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
