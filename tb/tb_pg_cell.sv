// Self-checking testbench of pg_cell: all 32 input combinations are applied
// in turn; P, G and f are compared with the prefix operator evaluated from a
// truth-table view in the testbench (G is 1 when this span generates, or
// when it propagates and the partner span generates). The cell delay is
// checked: an output must not move before DLY and must have moved after it.
`timescale 1ps/1ps
module tb_pg_cell;
  localparam int unsigned D = 200;

  logic f_in, pl, gl, pr, gr, f_out, p, g;
  int checks = 0, failures = 0;

  pg_cell #(.DLY(D)) dut (
    .f_in(f_in), .pl(pl), .gl(gl), .pr(pr), .gr(gr),
    .f_out(f_out), .p(p), .g(g)
  );

  initial begin
    #(1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eg;
    {f_in, pl, gl, pr, gr} = '0;
    #(D + 10);
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 32; v++) begin
        {f_in, pl, gl, pr, gr} = 5'(v);
        #(D + 10);
        ep = (pl && pr) ? 1'b1 : 1'b0;
        case ({pl, gl, gr})
          3'b010, 3'b011, 3'b110, 3'b111, 3'b101: eg = 1'b1;
          default:                                eg = 1'b0;
        endcase
        checks++;
        if (p !== ep || g !== eg || f_out !== f_in) begin
          failures++;
          $display("in=%b: f=%b p=%b/%b g=%b/%b", 5'(v), f_out, p, ep, g, eg);
        end
      end
    end
    // Timing: generate a 0 -> 1 change and watch the delay.
    {f_in, pl, gl, pr, gr} = 5'b00000;
    #(D + 10);
    {f_in, pl, gl, pr, gr} = 5'b10100;
    #(D - 1);
    checks++; if (g !== 1'b0 || f_out !== 1'b0) begin failures++; $display("output moved early"); end
    #2;
    checks++; if (g !== 1'b1 || f_out !== 1'b1) begin failures++; $display("output late"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
