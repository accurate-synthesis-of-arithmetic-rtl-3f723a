// tunable_delay: digitally adjustable bit-stream delay line.
//
// Delays a serial bit stream by (dig + 1) bit periods: code 3'b000 gives one
// bit period, code 3'b111 gives eight. The structure does not change with the
// delay: the stream runs through MAX_DELAY flip-flops and the code picks the
// tap. In the reference circuit this is an analog, transistor-level delay
// line whose delay is set by three digital inputs (DIG_0..DIG_2) over the
// same 1X..8X range, X being one bit width; here, with one stream bit per
// clock cycle, the same function is a clocked shift register. The linear
// code-to-delay mapping between the two end points is this design's choice.
//
// Interface: din is sampled every cycle; dout(t) = din(t - dig - 1).
// The line resets to all zeros.
module tunable_delay
  import sc_pkg::*;
#(
  parameter int unsigned DW   = DIG_W,      // delay code width
  parameter int unsigned MAXD = MAX_DELAY  // number of stages, 2**DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] dig,    // delay code: delay = dig + 1 bit periods
  input  logic          din,
  output logic          dout
);

  logic [MAXD-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage <= '0;
    else        stage <= {stage[MAXD-2:0], din};
  end

  assign dout = stage[dig];

endmodule
