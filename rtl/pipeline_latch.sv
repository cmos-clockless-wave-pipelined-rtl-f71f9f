// Pipelining latch of the clockless wave pipeline.
//
// It holds the aligned output word. The word is taken from the skewed data
// at the falling edge of the completion pulse done, i.e. once the latest bit
// of the wave has changed, so all output bits change together. Capturing at
// the end of the pulse (rather than passing data through while the pulse is
// high) is this design's reading of "the pulse latches the data": only that
// removes the skew. rst_n clears the word asynchronously (a choice of this
// design; it gives a known value before the first wave).
//
// Interface: rst_n, done, d (N bits), q (N bits).
// Timing: q takes d at each falling edge of done; it does not change otherwise.
`timescale 1ps/1ps
module pipeline_latch #(
  parameter int unsigned N = wpa_pkg::RESULT_BITS
) (
  input  logic         rst_n,
  input  logic         done,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(negedge done or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
