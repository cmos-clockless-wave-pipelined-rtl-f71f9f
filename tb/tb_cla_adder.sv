// Self-checking testbench of cla_adder (8 bits, default delays).
//
// 1) All 65536 operand pairs, one at a time: {cout, sum} must equal a + b
//    (integer addition in the testbench) 1001 ps after the operands, just
//    after the latest settling time of the default delays (1000 ps).
// 2) Skew: for a pair that changes the fastest (bit 0) and the slowest
//    (bit 7) output, the first and the last output change are timed; they must fall at 700 ps and 1000 ps (300 ps skew).
// 3) Wave pipelining: operands change every 1000 ps with no wait, and each
//    result is sampled 1001 ps after its operands, before the next wave
//    reaches the outputs at 1700 ps.
`timescale 1ps/1ps
module tb_cla_adder;
  localparam int unsigned W = 8;

  logic [W-1:0] a, b, sum;
  logic cout;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #(300_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_v;
    logic [W:0] prev;
    int first, last, t;

    // Skew: 00+00 -> 80+01 changes sum bit 0 (fastest path) and bit 7 (slowest).
    a = '0; b = '0;
    #(3000);
    a = 8'h80; b = 8'h01;   // 129: bit 0 is the earliest output, bit 7 the latest
    prev = {cout, sum};
    first = -1; last = -1; t = 0;
    while (t < 2000) begin
      #1; t++;
      if ({cout, sum} != prev) begin
        if (first < 0) first = t;
        last = t;
        prev = {cout, sum};
      end
    end
    checks++;
    if (first != 700 || last != 1000) begin
      failures++;
      $display("output changes from %0d to %0d ps, expected 700 to 1000", first, last);
    end
    checks++;
    if ({cout, sum} != 9'd129) begin failures++; $display("80+01 wrong"); end

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = W'(i); b = W'(j);
        #(1001);
        exp_v = i + j;
        checks++;
        if ({cout, sum} !== 9'(exp_v)) begin
          failures++;
          if (failures < 10) $display("%0d+%0d = %0d", i, j, {cout, sum});
        end
        #(200);
      end
    end

    // Back-to-back waves at 1 GHz: each result is sampled 1001 ps after its
    // operands, 1 ps after the next operands have been applied.
    for (int n = 0; n <= 2000; n++) begin
      a = W'($urandom); b = W'($urandom);
      #1;
      if (n > 0) begin
        checks++;
        if ({cout, sum} !== 9'(exp_v)) begin
          failures++;
          if (failures < 10) $display("wave %0d: got %0d expected %0d", n - 1, {cout, sum}, exp_v);
        end
      end
      exp_v = int'(a) + int'(b);
      #(999);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
