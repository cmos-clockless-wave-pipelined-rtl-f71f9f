// Sum generator: last stage of the carry-lookahead adder.
//
// Sum bit i is the bit propagate of column i XORed with the carry out of the
// next lower bit: sum[i] = f[i] ^ c[i-1], sum[0] = f[0] (the adder has no
// carry-in). The carry out of the adder is the carry of the top bit, c[WIDTH-1],
// passed on without a gate. The XOR form is the usual one; the design names
// the stage but does not draw its gates.
//
// Timing (simulation only): sum bits follow their inputs after SUM_DLY
// picoseconds; cout follows c[WIDTH-1] at once.
`timescale 1ps/1ps
module sum_generator
#(
  parameter int unsigned WIDTH   = wpa_pkg::ADD_WIDTH,
  parameter int unsigned SUM_DLY = wpa_pkg::SUM_DLY_PS
) (
  input  logic [WIDTH-1:0] f,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] c_in;  // carry into each bit

  assign c_in = {c[WIDTH-2:0], 1'b0};
  // One delayed assignment per bit, so that every bit is its own gate.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign #(SUM_DLY) sum[i] = f[i] ^ c_in[i];
  end
  assign cout = c[WIDTH-1];
endmodule
