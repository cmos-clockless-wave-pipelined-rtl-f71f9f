// Edge-sensing completion detector (ESCD).
//
// One edge-sensing circuit watches each bit of a skewed data word and pulses
// after every change of that bit. The OR of all pulses, done, rises with the
// earliest change of a wave and falls PULSE_W after the latest one. Its
// falling edge therefore marks the moment the whole word has settled, and it
// is used to latch the word. A wave that changes no bit gives no pulse, and
// nothing needs to be latched. No request/acknowledge handshake is involved.
//
// Interface: data (N bits, N = 9 for the 8 sum bits and the carry out),
// pulses (the individual edge pulses, for observation), done.
// Timing: done rises with the first data change and falls PULSE_W after the
// last one, provided the gaps between changes are shorter than PULSE_W.
// The OR is synthesizable; the edge-sensing circuits are behavioural models.
`timescale 1ps/1ps
module escd #(
  parameter int unsigned N       = wpa_pkg::RESULT_BITS,
  parameter int unsigned PULSE_W = wpa_pkg::PULSE_W_PS
) (
  input  logic [N-1:0] data,
  output logic [N-1:0] pulses,
  output logic         done
);
  for (genvar i = 0; i < N; i++) begin : g_esc
    edge_sensing_circuit #(.PULSE_W(PULSE_W)) u_esc (
      .din (data[i]),
      .dout(pulses[i])
    );
  end

  assign done = |pulses;
endmodule
