// Wave-pipelined carry-lookahead adder core (no registers inside).
//
// PG generator -> delay-balanced prefix carry generator -> sum generator.
// Because it holds no state, operands may be applied faster than its latency
// allows for a settled result: several "waves" of data can be inside the logic
// at once, as long as the spread between the earliest and the latest output
// change is smaller than the operand period. The outputs are therefore
// skewed; the edge-sensing completion detector and its latch realign them.
//
// Timing with the default (simulation-only) delays: an output bit changes
// between 700 ps and 1000 ps after an operand change, a 300 ps skew.
`timescale 1ps/1ps
module cla_adder
#(
  parameter int unsigned WIDTH    = wpa_pkg::ADD_WIDTH,
  parameter int unsigned GATE_DLY = wpa_pkg::GATE_DLY_PS,
  parameter int unsigned PG_DLY   = wpa_pkg::PG_DLY_PS,
  parameter int unsigned PAD_DLY  = wpa_pkg::PAD_DLY_PS,
  parameter int unsigned SUM_DLY  = wpa_pkg::SUM_DLY_PS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] p, g, f, gp, c;

  pg_generator #(.WIDTH(WIDTH), .GATE_DLY(GATE_DLY)) u_pg (
    .a(a), .b(b), .p(p), .g(g)
  );

  carry_generator #(.WIDTH(WIDTH), .PG_DLY(PG_DLY), .PAD_DLY(PAD_DLY)) u_carry (
    .p(p), .g(g), .f(f), .gp(gp), .c(c)
  );

  sum_generator #(.WIDTH(WIDTH), .SUM_DLY(SUM_DLY)) u_sum (
    .f(f), .c(c), .sum(sum), .cout(cout)
  );

  // The group propagate of the whole word is not needed without a carry-in.
  logic unused_gp;
  assign unused_gp = ^gp;
endmodule
