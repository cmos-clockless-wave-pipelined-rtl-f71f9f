// Shared constants and types of the clockless wave-pipelined adder.
//
// The operand width (8 bits) is the design's own size. The delay constants are
// picosecond gate delays used only in simulation (synthesis ignores delays);
// the design itself does not specify them, so they were chosen so that the
// adder's outputs spread over about 300 ps, the skew the design is meant to
// remove, and so that new operands can be applied every 1 ns (1 GHz).
`timescale 1ps/1ps
package wpa_pkg;
  localparam int unsigned ADD_WIDTH = 8;        // operand width
  localparam int unsigned GATE_DLY_PS = 150; // PG generator XOR/AND
  localparam int unsigned PG_DLY_PS = 200;   // prefix (PG) cell of the carry tree
  localparam int unsigned PAD_DLY_PS = 100;  // padding (delay) cell of the carry tree
  localparam int unsigned SUM_DLY_PS = 150;  // sum XOR
  localparam int unsigned PULSE_W_PS = 350;  // edge-sensing pulse width
  localparam int unsigned IN_PERIOD_PS = 1000; // operand rate, 1 GHz

  // Adder result as it leaves the adder and as it is latched.
  typedef struct packed {
    logic             cout;
    logic [ADD_WIDTH-1:0] sum;
  } result_t;

  localparam int unsigned RESULT_BITS = $bits(result_t);
endpackage
