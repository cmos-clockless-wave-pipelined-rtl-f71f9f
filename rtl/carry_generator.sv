// Carry generator: delay-balanced parallel-prefix carry tree.
//
// The tree has $clog2(WIDTH) levels of prefix combining in a divide-and-
// conquer (Sklansky) pattern, followed by PAD_ROWS rows of padding only. At
// level l, column i (0-based) holds a PG cell when bit l of i is set; its
// partner is the top column of the neighbouring lower half-block,
// ((i >> (l+1)) << (l+1)) + 2**l - 1. For 8 bits this gives exactly the
// arrangement of the design: level 1 cells on columns 8,6,4,2; level 2 on
// 8,7 and 4,3; level 3 on 8..5; then a row of padding cells.
//
// Every other position is a padding cell: it passes f, P and G of its column
// on unchanged, after PAD_DLY. Padding makes every path cross the same number
// of cells, which narrows the spread between the earliest and the latest
// output; the remaining spread comes from PG cells being slower than padding
// cells. A padding cell has no logic, so it is written here as a delayed
// assignment rather than as a module.
//
// Outputs: c[i] = generate of span i..0 = carry out of bit i (no carry-in),
// gp[i] = propagate of span i..0, f[i] = the bit propagate p[i], all after
// the tree. Timing (simulation only): column i settles after
// n*PG_DLY + (ROWS-n)*PAD_DLY, n being the number of PG cells in the column.
`timescale 1ps/1ps
module carry_generator
#(
  parameter int unsigned WIDTH    = wpa_pkg::ADD_WIDTH,
  parameter int unsigned PG_DLY   = wpa_pkg::PG_DLY_PS,
  parameter int unsigned PAD_DLY  = wpa_pkg::PAD_DLY_PS,
  parameter int unsigned PAD_ROWS = 1
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] f,
  output logic [WIDTH-1:0] gp,
  output logic [WIDTH-1:0] c
);
  localparam int unsigned LEVELS = $clog2(WIDTH);
  localparam int unsigned ROWS   = LEVELS + PAD_ROWS;

  // Row r of these arrays is the input of tree row r; row ROWS is the output.
  logic [WIDTH-1:0] fs [ROWS+1];
  logic [WIDTH-1:0] ps [ROWS+1];
  logic [WIDTH-1:0] gs [ROWS+1];

  assign fs[0] = p;
  assign ps[0] = p;
  assign gs[0] = g;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      if (r < LEVELS && ((i >> r) & 1) == 1) begin : g_pg
        localparam int unsigned PARTNER = ((i >> (r + 1)) << (r + 1)) + (1 << r) - 1;
        pg_cell #(.DLY(PG_DLY)) u_cell (
          .f_in (fs[r][i]),
          .pl   (ps[r][i]),
          .gl   (gs[r][i]),
          .pr   (ps[r][PARTNER]),
          .gr   (gs[r][PARTNER]),
          .f_out(fs[r+1][i]),
          .p    (ps[r+1][i]),
          .g    (gs[r+1][i])
        );
      end else begin : g_pad
        assign #(PAD_DLY) fs[r+1][i] = fs[r][i];
        assign #(PAD_DLY) ps[r+1][i] = ps[r][i];
        assign #(PAD_DLY) gs[r+1][i] = gs[r][i];
      end
    end
  end

  assign f  = fs[ROWS];
  assign gp = ps[ROWS];
  assign c  = gs[ROWS];
endmodule
