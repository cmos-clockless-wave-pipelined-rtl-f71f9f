// Self-checking testbench of sum_generator: all combinations of the 8
// propagates f and 8 carries c are applied; sum must equal f XOR (c shifted
// up by one bit, 0 into bit 0) and cout must equal c[7]. The expected values
// are formed bit by bit here. The sum delay is checked once.
`timescale 1ps/1ps
module tb_sum_generator;
  localparam int unsigned W = 8;
  localparam int unsigned D = 150;

  logic [W-1:0] f, c, sum;
  logic cout;
  int checks = 0, failures = 0;

  sum_generator #(.WIDTH(W), .SUM_DLY(D)) dut (.f(f), .c(c), .sum(sum), .cout(cout));

  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] es;
    f = '0; c = '0;
    #(D + 10);
    f = 8'h01;
    #(D - 1);
    checks++; if (sum[0] !== 1'b0) begin failures++; $display("sum early"); end
    #2;
    checks++; if (sum[0] !== 1'b1) begin failures++; $display("sum late"); end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        f = W'(i); c = W'(j);
        #(D + 10);
        for (int k = 0; k < W; k++) es[k] = f[k] ^ ((k == 0) ? 1'b0 : c[k-1]);
        checks++;
        if (sum !== es || cout !== c[W-1]) begin
          failures++;
          if (failures < 10) $display("f=%h c=%h sum=%h/%h cout=%b", f, c, sum, es, cout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
