// repeating_circuit: repeats an n-bit input sequence n times.
//
// A 2-to-1 multiplexer chooses between the circuit input and the output
// delayed by n bit periods. While sel0 is 0 (the first n bits of an
// operation) the input passes straight to the output; afterwards sel0 is 1
// and the output is fed back through the tunable delay line, so every later
// n-bit block is a copy of the first. The delay line must be set to n bit
// periods (dig = n - 1). Both follow the reference structure; the clocked
// delay line is this design's realisation of the delay block.
//
// Interface: one bit per cycle; dout is combinational from din and sel0.
module repeating_circuit
  import sc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dig_t dig,     // delay code, n - 1 for an n-bit sequence
  input  logic sel0,    // 0: pass input, 1: recirculate delayed output
  input  logic din,
  output logic dout
);

  logic delayed;

  assign dout = sel0 ? delayed : din;

  tunable_delay u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .dig  (dig),
    .din  (dout),
    .dout (delayed)
  );

endmodule
