// Self-checking testbench of carry_generator (8 bits).
//
// Values: for all 65536 operand pairs the tb forms p = a ^ b and g = a & b
// and compares c (carry out of every bit), gp (AND of p[i:0]) and f (= p)
// with a ripple-carry evaluation done here.
// Structure and timing: all generates are raised at once and the time each
// carry rises is measured. Column i must arrive after n*PG_DLY +
// (4-n)*PAD_DLY, where n, the number of prefix cells in the column, is
// 0,1,1,2,1,2,2,3 for columns 1..8 of the tree.
`timescale 1ps/1ps
module tb_carry_generator;
  localparam int unsigned W = 8;
  localparam int unsigned PG = 200;
  localparam int unsigned PAD = 100;
  localparam int NPG [W] = '{0, 1, 1, 2, 1, 2, 2, 3};

  logic [W-1:0] p, g, f, gp, c;
  int checks = 0, failures = 0;

  carry_generator #(.WIDTH(W), .PG_DLY(PG), .PAD_DLY(PAD)) dut (
    .p(p), .g(g), .f(f), .gp(gp), .c(c)
  );

  initial begin
    #(200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, ec, egp;
    logic carry, allp;
    int arr [W];
    int t;

    // Arrival time of each carry column.
    p = '0; g = '0;
    #(2000);
    g = '1;
    for (int k = 0; k < W; k++) arr[k] = -1;
    t = 0;
    while (t < 1500) begin
      #1; t++;
      for (int k = 0; k < W; k++) if (c[k] && arr[k] < 0) arr[k] = t;
    end
    for (int k = 0; k < W; k++) begin
      checks++;
      if (arr[k] != NPG[k] * int'(PG) + (4 - NPG[k]) * int'(PAD)) begin
        failures++;
        $display("column %0d: carry arrived at %0d ps", k + 1, arr[k]);
      end
    end

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = W'(i); b = W'(j);
        p = a ^ b; g = a & b;
        #(1000);
        carry = 1'b0; allp = 1'b1;
        for (int k = 0; k < W; k++) begin
          carry = (a[k] & b[k]) | (carry & (a[k] ^ b[k]));
          allp = allp & (a[k] ^ b[k]);
          ec[k] = carry;
          egp[k] = allp;
        end
        checks++;
        if (c !== ec || gp !== egp || f !== (a ^ b)) begin
          failures++;
          if (failures < 10) $display("a=%h b=%h c=%h/%h gp=%h/%h", a, b, c, ec, gp, egp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
