// PG generator: first stage of the carry-lookahead adder.
//
// For every bit it forms the propagate term p = a ^ b and the generate term
// g = a & b, as the design prescribes (an XOR and an AND per bit). There are no
// registers: the stage is pure combinational logic, and a new operand pair may
// be applied while earlier results are still travelling through later stages
// (wave pipelining).
//
// Timing: every output follows its inputs after GATE_DLY picoseconds in
// simulation. The delay value is this design's choice; synthesis ignores it.
`timescale 1ps/1ps
module pg_generator
#(
  parameter int unsigned WIDTH    = wpa_pkg::ADD_WIDTH,
  parameter int unsigned GATE_DLY = wpa_pkg::GATE_DLY_PS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);
  // One delayed assignment per bit, so that every bit is its own gate.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign #(GATE_DLY) p[i] = a[i] ^ b[i];
    assign #(GATE_DLY) g[i] = a[i] & b[i];
  end
endmodule
