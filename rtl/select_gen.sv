// select_gen: select-signal generator for 4-bit and 8-bit operation.
//
// A chain of six divide-by-two stages counts stream bits: stages 0..2 form
// the bit position inside an n-bit block, stages 2..3 (n = 4) or 3..5
// (n = 8) the block index. OR gates merge the stage outputs:
//   SEL-1 = OR of the bit-position stages: 0 only on the first bit of
//           every n-bit block;
//   SEL-0 = OR of the block-index stages: 0 during the first n bits of an
//           operation, 1 for the remaining n^2 - n bits.
// Both repeat every n^2 bits, so operations can follow back to back.
// Six divider flip-flops and OR-gate merging follow the reference circuit;
// which stage feeds which OR gate is derived here from the waveforms it must
// produce. The divider is written as a synchronous counter advanced once per
// bit (one clock cycle), with a synchronous clear that starts an operation;
// both are this design's choices.
//
// Interface: cnt and the select outputs are registered/decoded from the
// chain, valid in the cycle of the stream bit they belong to. After clear is
// asserted in a cycle, the next cycle is bit 0 of a new operation.
module select_gen
  import sc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,    // restart at bit 0 next cycle
  output logic [DIV_STAGES-1:0] cnt,      // divider chain state (bit index)
  output logic                  sel0_4,
  output logic                  sel1_4,
  output logic                  sel0_8,
  output logic                  sel1_8
);

  // Each stage toggles when all stages below it are 1 (divide by two).
  logic [DIV_STAGES-1:0] carry;

  always_comb begin
    logic c;
    c = 1'b1;
    for (int i = 0; i < DIV_STAGES; i++) begin
      carry[i] = c;
      c        = c & cnt[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (clear) cnt <= '0;
    else            cnt <= cnt ^ carry;
  end

  assign sel1_4 = cnt[0] | cnt[1];
  assign sel0_4 = cnt[2] | cnt[3];
  assign sel1_8 = cnt[0] | cnt[1] | cnt[2];
  assign sel0_8 = cnt[3] | cnt[4] | cnt[5];

endmodule
