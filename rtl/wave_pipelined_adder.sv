// Clockless wave-pipelined 8-bit adder with edge-sensing completion detection.
//
// A registerless carry-lookahead adder (cla_adder) accepts a new operand pair
// every operand period. Its 9 outputs (8 sum bits and the carry out) settle
// at different times: a skew of about 300 ps with the default delays. An
// edge-sensing completion detector (escd) turns every output change into a
// pulse and ORs them; the combined pulse ends after the latest change of the
// wave, and its falling edge makes pipeline_latch take the whole word at once.
// There is no clock and no handshake: the data themselves time the latch.
//
// Interface: rst_n clears the output word; a, b are the operands; sum_q and
// cout_q are the aligned result. sum_skewed, cout_skewed and done are brought
// out for observation.
// Timing with the default delays: a result is latched between 1050 ps and
// 1350 ps after its operands were applied (latest change + PULSE_W), and the
// next wave's first output change comes 700 ps after the next operands. An
// operand period T works when 1000 + PULSE_W < T + 700, so 1 GHz (1000 ps)
// leaves 350 ps of margin.
`timescale 1ps/1ps
module wave_pipelined_adder #(
  parameter int unsigned WIDTH    = wpa_pkg::ADD_WIDTH,
  parameter int unsigned GATE_DLY = wpa_pkg::GATE_DLY_PS,
  parameter int unsigned PG_DLY   = wpa_pkg::PG_DLY_PS,
  parameter int unsigned PAD_DLY  = wpa_pkg::PAD_DLY_PS,
  parameter int unsigned SUM_DLY  = wpa_pkg::SUM_DLY_PS,
  parameter int unsigned PULSE_W  = wpa_pkg::PULSE_W_PS
) (
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum_q,
  output logic             cout_q,
  output logic [WIDTH-1:0] sum_skewed,
  output logic             cout_skewed,
  output logic             done
);
  localparam int unsigned N = WIDTH + 1;

  logic [N-1:0] skewed;
  logic [N-1:0] pulses;
  logic [N-1:0] aligned;

  cla_adder #(
    .WIDTH(WIDTH), .GATE_DLY(GATE_DLY), .PG_DLY(PG_DLY),
    .PAD_DLY(PAD_DLY), .SUM_DLY(SUM_DLY)
  ) u_adder (
    .a(a), .b(b), .sum(sum_skewed), .cout(cout_skewed)
  );

  assign skewed = {cout_skewed, sum_skewed};

  escd #(.N(N), .PULSE_W(PULSE_W)) u_escd (
    .data(skewed), .pulses(pulses), .done(done)
  );

  pipeline_latch #(.N(N)) u_latch (
    .rst_n(rst_n), .done(done), .d(skewed), .q(aligned)
  );

  assign {cout_q, sum_q} = aligned;

  // The per-bit pulses are only needed inside the detector.
  logic unused_pulses;
  assign unused_pulses = ^pulses;
endmodule
