// bit_shifting_circuit: emits an n-bit sequence and then its n-1 successive
// one-bit left rotations (n blocks of n bits in all).
//
// MUX-1 passes the input during the first n bits (sel0 = 0) and the output
// of the delay line afterwards; its output is the circuit output. A
// flip-flop captures the first bit of each n-bit block (enabled when sel1 is
// 0, which happens on the first bit of every block) and holds it while the
// other bits pass. MUX-2 forwards the output bit when sel1 is 1 and the held
// first bit when sel1 is 0; the delay line delays MUX-2 by n-1 bit periods
// (dig = n - 2). Net effect: block k+1 is block k rotated left by one bit,
// its first bit moved to the last position.
//
// The multiplexers, flip-flop and delay follow the reference structure.
// Clocking the flip-flop every cycle with a capture enable of ~sel1 is this
// design's choice.
//
// Interface: one bit per cycle; dout is combinational from din, sel0 and
// the state.
module bit_shifting_circuit
  import sc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dig_t dig,     // delay code, n - 2 for an n-bit sequence
  input  logic sel0,    // MUX-1 select: 0 input, 1 delayed feedback
  input  logic sel1,    // MUX-2 select: 0 held first bit, 1 current bit
  input  logic din,
  output logic dout
);

  logic first_q;    // held first bit of the current block
  logic mux2;
  logic delayed;

  assign dout = sel0 ? delayed : din;       // MUX-1
  assign mux2 = sel1 ? dout    : first_q;   // MUX-2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     first_q <= 1'b0;
    else if (!sel1) first_q <= dout;
  end

  tunable_delay u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .dig  (dig),
    .din  (mux2),
    .dout (delayed)
  );

endmodule
