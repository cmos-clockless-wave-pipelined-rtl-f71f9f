// PG cell: the prefix operator of the carry tree.
//
// It merges the propagate/generate pair of its own column (pl, gl, the more
// significant span) with the pair arriving from a less significant partner
// column (pr, gr):  P = pl & pr,  G = gl | (pl & gr).
// A third lane, f, runs straight through the cell; it carries the column's own
// bit propagate down to the sum generator with the same delay as the carries.
// The port names follow the cell drawing of the design; the operator is the
// usual carry-lookahead one, and reading f as the bit propagate is this
// design's interpretation.
//
// Timing: all three outputs follow after DLY picoseconds in simulation.
`timescale 1ps/1ps
module pg_cell
#(
  parameter int unsigned DLY = wpa_pkg::PG_DLY_PS
) (
  input  logic f_in,
  input  logic pl,
  input  logic gl,
  input  logic pr,
  input  logic gr,
  output logic f_out,
  output logic p,
  output logic g
);
  assign #(DLY) f_out = f_in;
  assign #(DLY) p     = pl & pr;
  assign #(DLY) g     = gl | (pl & gr);
endmodule
