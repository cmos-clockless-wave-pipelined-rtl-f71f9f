// Edge-sensing circuit (ESC): behavioural model of an analog cell.
//
// The real circuit differentiates its input with a passive RC network: a
// rising input gives a positive current spike, a falling input a negative one.
// Two inverters with different supply rails turn the positive and the
// negative spike into logic pulses, and the two are ORed, so the output
// pulses after every transition, whatever its direction (an "absolute value"
// of the derivative). The cell cannot be written as synthesizable logic; this
// model reproduces its behaviour with delays.
//
// Model: each rising edge starts a pulse of PULSE_W picoseconds on the
// positive path, each falling edge one on the negative path; dout is their OR.
// Edges closer together than PULSE_W merge into one longer pulse, as the
// overlapping RC responses would. No transition, no pulse. The pulse width is
// this design's choice (the RC constant is not given): it must exceed the
// output skew of the adder so one wave gives one pulse.
`timescale 1ps/1ps
module edge_sensing_circuit #(
  parameter int unsigned PULSE_W = wpa_pkg::PULSE_W_PS
) (
  input  logic din,
  output logic dout
);
  // Number of pulses still running on each path.
  int unsigned pos_active;
  int unsigned neg_active;

  initial begin
    pos_active = 0;
    neg_active = 0;
  end

  always @(posedge din) begin
    pos_active++;
    fork
      begin
        #(PULSE_W);
        pos_active--;
      end
    join_none
  end

  always @(negedge din) begin
    neg_active++;
    fork
      begin
        #(PULSE_W);
        neg_active--;
      end
    join_none
  end

  assign dout = (pos_active != 0) || (neg_active != 0);
endmodule
