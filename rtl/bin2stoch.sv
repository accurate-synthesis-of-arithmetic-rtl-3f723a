// bin2stoch: binary-to-stochastic number converter.
//
// Produces the n-bit stream of a value k/n, k = 0..n, one bit per cycle:
// bit i of the stream (pos = i) is 1 when i < k, so the stream holds exactly
// k ones. Because the multiplier and adder are exact for any placement of
// the ones, no random source is needed and a comparator against the bit
// position is enough; this placement (ones first) is this design's choice.
// Outside the n-bit window (win = 0) the output is 0, which the scaled adder
// relies on.
//
// Interface: combinational; value must be held for the n window cycles.
module bin2stoch
  import sc_pkg::*;
#(
  parameter int unsigned VW = LOG2N_MAX + 1   // width of value (0..N_MAX)
) (
  input  logic [VW-1:0]        value,   // k, number of ones
  input  logic [LOG2N_MAX-1:0] pos,     // bit position within the window
  input  logic                 win,     // 1 during the n-bit input window
  output logic                 bit_o
);

  assign bit_o = win && (VW'(pos) < value);

endmodule
