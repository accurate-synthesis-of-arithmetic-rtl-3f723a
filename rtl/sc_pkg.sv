// sc_pkg: shared constants and types of the exact (correlation-based)
// stochastic arithmetic design.
//
// One stream bit is carried per clock cycle. An input value is a count k of
// ones in an n-bit stream (value k/n). Two stream lengths are supported,
// n = 4 and n = 8, the two sizes the select generator provides. The tunable
// delay line has a 3-bit delay code (DIG), giving 1 to 8 bit periods of
// delay, which bounds n at 8.
package sc_pkg;

  // Width of the delay code of the tunable delay line (three DIG inputs).
  localparam int unsigned DIG_W     = 3;
  // Longest delay of the line, in bit periods: code 3'b111 gives 8.
  localparam int unsigned MAX_DELAY = 1 << DIG_W;
  // Base-2 logarithm of the largest input stream length n (8).
  localparam int unsigned LOG2N_MAX = 3;
  // Stages of the select generator's divider chain: one bit index within a
  // block plus one block index, each LOG2N_MAX bits wide.
  localparam int unsigned DIV_STAGES = 2 * LOG2N_MAX;

  // Stream length selection.
  typedef enum logic {
    SIZE_4 = 1'b0,   // n = 4, 16-bit product stream, 8-bit sum stream
    SIZE_8 = 1'b1    // n = 8, 64-bit product stream, 16-bit sum stream
  } size_e;

  typedef logic [DIG_W-1:0] dig_t;

  // Stream length n for a size mode.
  function automatic int unsigned stream_len(size_e s);
    return (s == SIZE_8) ? 8 : 4;
  endfunction

  // Delay code for a delay of d bit periods (1 <= d <= MAX_DELAY).
  function automatic dig_t dig_for(int unsigned d);
    return dig_t'(d - 1);
  endfunction

endpackage
