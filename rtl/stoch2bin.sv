// stoch2bin: stochastic-to-binary number converter.
//
// Counts the ones of a stream over an operation; the count over an L-bit
// stream is the binary numerator of the value count/L. clear zeroes the
// counter (start of an operation), en marks the cycles whose bit belongs to
// the stream. The count is registered: it includes a bit one cycle after
// that bit is presented. Counting ones is the simplest converter and is
// this design's choice.
module stoch2bin #(
  parameter int unsigned CW = 7    // counter width; 7 holds 0..64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          bit_i,
  output logic [CW-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           count <= '0;
    else if (clear)       count <= '0;
    else if (en && bit_i) count <= count + 1'b1;
  end

endmodule
