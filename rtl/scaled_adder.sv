// scaled_adder: exact two-input stochastic scaled adder, y = (x1 + x2) / 2.
//
// An exact average of two n-bit streams needs a 2n-bit output. The second
// input is delayed by n bit periods in the tunable delay line so that it
// follows the first in time; the two are then merged bit by bit. Each input
// stream carries its n bits in the first n cycles of an operation and zeros
// after them, so the merge never sees two ones at once and the 2n-bit output
// is the first stream followed by the second: ones(y) = ones(x1) + ones(x2),
// value ones(y)/2n = (x1 + x2)/2 exactly.
//
// Delay by n and merge follow the reference circuit. The merge is written as
// an OR, the function the reference example's bit sequences show; with
// disjoint windows an XOR would behave the same.
//
// The second input must also have been 0 for the n cycles before an
// operation, or its earlier bits appear in the first half of the output;
// sc_arith_top meets this because its operations last n^2 >= 2n bits.
//
// Interface: dig = n - 1. One bit per cycle, output combinational from x1
// and the delay line; bits 0..2n-1 of an operation form the sum stream.
module scaled_adder
  import sc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dig_t dig,     // delay code, n - 1 for n-bit inputs
  input  logic x1,
  input  logic x2,
  output logic y
);

  logic x2_late;

  tunable_delay u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .dig  (dig),
    .din  (x2),
    .dout (x2_late)
  );

  assign y = x1 | x2_late;

endmodule
