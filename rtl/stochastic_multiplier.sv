// stochastic_multiplier: exact two-input stochastic multiplier.
//
// Multiplying two n-bit streams exactly needs an n^2-bit product stream in
// which every bit of one input meets every bit of the other exactly once.
// The first input goes through the repeating circuit (n copies of itself),
// the second through the bit-shifting circuit (itself, then its n-1
// one-bit rotations), and an AND gate combines the two n^2-bit streams. Over
// the n^2 output bits the number of ones is exactly ones(x1) * ones(x2), so
// the product value ones/n^2 equals x1 * x2 with no error.
//
// The structure follows the reference circuit. The caller supplies the
// select signals and the two delay codes (n - 1 for the repeating circuit,
// n - 2 for the bit-shifting circuit); sc_arith_top derives them from the
// size mode.
//
// Timing: one bit per cycle. The inputs are read during the first n bits of
// an operation (sel0 = 0); the product stream appears in the same cycles as
// the bits it is made from, n^2 cycles in all, combinationally from the
// inputs during the first block.
module stochastic_multiplier
  import sc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dig_t dig_rep,   // repeating-circuit delay code (n - 1)
  input  dig_t dig_shf,   // bit-shifting-circuit delay code (n - 2)
  input  logic sel0,
  input  logic sel1,
  input  logic x1,        // first input stream (repeated)
  input  logic x2,        // second input stream (rotated)
  output logic y,         // product stream
  output logic rep,       // repeated sequence (observation)
  output logic shf        // bit-shifted sequence (observation)
);

  repeating_circuit u_rep (
    .clk  (clk),
    .rst_n(rst_n),
    .dig  (dig_rep),
    .sel0 (sel0),
    .din  (x1),
    .dout (rep)
  );

  bit_shifting_circuit u_shf (
    .clk  (clk),
    .rst_n(rst_n),
    .dig  (dig_shf),
    .sel0 (sel0),
    .sel1 (sel1),
    .din  (x2),
    .dout (shf)
  );

  assign y = rep & shf;

endmodule
