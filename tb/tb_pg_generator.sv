// Self-checking testbench of pg_generator: all 65536 operand pairs of the
// 8-bit stage are applied; p and g are compared with a ^ b and a & b computed
// bit by bit in the testbench. The gate delay is checked too: outputs must
// still hold their old value just before GATE_DLY and the new one after it.
`timescale 1ps/1ps
module tb_pg_generator;
  localparam int unsigned W = 8;
  localparam int unsigned D = 150;

  logic [W-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  pg_generator #(.WIDTH(W), .GATE_DLY(D)) dut (.a(a), .b(b), .p(p), .g(g));

  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ep, eg;
    a = '0; b = '0;
    #(D + 10);
    // Timing: change every bit of p and g at once.
    a = '1; b = '1;
    #(D - 1);
    checks++; if (g !== '0) begin failures++; $display("g changed before %0d ps", D); end
    #2;
    checks++; if (g !== '1 || p !== '0) begin failures++; $display("g/p wrong after %0d ps", D); end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = W'(i); b = W'(j);
        #(D + 10);
        for (int k = 0; k < W; k++) begin
          ep[k] = (a[k] != b[k]);
          eg[k] = (a[k] == 1'b1) && (b[k] == 1'b1);
        end
        checks++;
        if (p !== ep || g !== eg) begin
          failures++;
          if (failures < 10) $display("a=%h b=%h p=%h/%h g=%h/%h", a, b, p, ep, g, eg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
