// completion_detector: completion detection for one 1-of-n channel.
//
// A single N-input NOR over the channel wires. Its output is high while the
// channel holds the spacer (all wires low) and falls as soon as a codeword
// arrives, so in a four-phase pipeline it is the inverted acknowledge that a
// stage returns to its predecessor. A codeword with several wires high also
// reads as complete; the detector does not check validity. Combinational.
module completion_detector #(
  parameter int unsigned N_WIRES = 4
) (
  input  logic [N_WIRES-1:0] wires_i,
  output logic               empty_o
);

  assign empty_o = ~|wires_i;

endmodule
