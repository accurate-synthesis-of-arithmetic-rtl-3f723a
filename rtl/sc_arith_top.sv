// sc_arith_top: binary-in / binary-out exact stochastic multiplier and
// scaled adder.
//
// Two operands a and b (numerators of a/n and b/n, 0..n) are turned into
// n-bit streams, one bit per clock cycle, or, with stream_src = 1, two n-bit
// streams are taken directly from x1_in and x2_in; they are fed at the
// same time to the
// exact stochastic multiplier (n^2-bit product stream) and the exact scaled
// adder (2n-bit sum stream). Counters turn the streams back into binary:
//   prod = a * b        (value prod / n^2 = (a/n) * (b/n))
//   sum  = a + b        (value sum / 2n  = (a/n + b/n) / 2)
// The product and sum are available both as streams and as binary counts.
// The size input selects n = 4 or n = 8: it picks which pair of select
// signals from the select generator is used and the delay codes of the
// three tunable delay lines (n - 1 for the repeating circuit and the adder,
// n - 2 for the bit-shifting circuit).
//
// The multiplier, adder, select generator and delay lines follow the
// reference circuits; the converters, the start/done handshake and running
// both operations side by side on the same operands are this design's own.
//
// Timing: start is accepted when busy is 0; a, b, size and stream_src are
// captured in that cycle. Stream bit 0 is in the next cycle; in stream mode
// x1_in and x2_in are read in bits 0..n-1 (the cycles where sel0 is 0 and
// busy is 1) and ignored otherwise. The sum stream ends after
// 2n bits: sum_done pulses in the cycle after its last bit, with sum final.
// The product stream ends after n^2 bits: done pulses in the cycle after its
// last bit, with prod and sum final, and busy falls in that cycle, so a new
// start may be given together with done. An operation takes n^2 + 1 cycles
// from start to done (17 for n = 4, 65 for n = 8).
module sc_arith_top
  import sc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  size_e                size,        // SIZE_4: n = 4, SIZE_8: n = 8
  input  logic [LOG2N_MAX:0]   a,           // first operand, 0..n
  input  logic [LOG2N_MAX:0]   b,           // second operand, 0..n
  input  logic                 stream_src,  // 1: operands from x1_in/x2_in
  input  logic                 x1_in,       // first operand stream bit
  input  logic                 x2_in,       // second operand stream bit
  output logic                 busy,
  output logic                 done,        // product (and sum) final
  output logic                 sum_done,    // sum final
  output logic [2*LOG2N_MAX:0] prod,        // a * b, 0..n^2
  output logic [LOG2N_MAX+1:0] sum,         // a + b, 0..2n
  output logic                 prod_stream, // product bit stream
  output logic                 sum_stream,  // sum bit stream
  output logic                 rep_stream,  // repeated first operand
  output logic                 shf_stream,  // bit-shifted second operand
  output logic                 sel0,        // active SEL-0
  output logic                 sel1         // active SEL-1
);

  size_e                size_q;
  logic [LOG2N_MAX:0]   a_q, b_q;
  logic                 ext_q;
  logic                 x1_bin, x2_bin;
  logic [DIV_STAGES-1:0] cnt;
  logic                 sel0_4, sel1_4, sel0_8, sel1_8;
  logic [LOG2N_MAX-1:0] pos;
  logic                 win;
  logic                 x1, x2;
  logic                 last_bit, last_sum_bit;
  dig_t                 dig_n, dig_nm1;
  logic                 accept;

  assign accept = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      size_q <= SIZE_4;
      a_q    <= '0;
      b_q    <= '0;
      ext_q  <= 1'b0;
    end else if (accept) begin
      ext_q  <= stream_src;
      size_q <= size;
      a_q    <= a;
      b_q    <= b;
    end
  end

  // Bit counter and select signals.
  select_gen u_sel (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (accept),
    .cnt   (cnt),
    .sel0_4(sel0_4),
    .sel1_4(sel1_4),
    .sel0_8(sel0_8),
    .sel1_8(sel1_8)
  );

  always_comb begin
    if (size_q == SIZE_8) begin
      sel0         = sel0_8;
      sel1         = sel1_8;
      pos          = cnt[2:0];
      dig_n        = dig_for(8);
      dig_nm1      = dig_for(7);
      last_bit     = busy && (cnt == (DIV_STAGES)'(63));
      last_sum_bit = busy && (cnt == (DIV_STAGES)'(15));
    end else begin
      sel0         = sel0_4;
      sel1         = sel1_4;
      pos          = {1'b0, cnt[1:0]};
      dig_n        = dig_for(4);
      dig_nm1      = dig_for(3);
      last_bit     = busy && (cnt == (DIV_STAGES)'(15));
      last_sum_bit = busy && (cnt == (DIV_STAGES)'(7));
    end
  end

  // Input streams only during the first n bits of a running operation.
  assign win = busy && !sel0;

  bin2stoch u_b2s_a (.value(a_q), .pos(pos), .win(win), .bit_o(x1_bin));
  bin2stoch u_b2s_b (.value(b_q), .pos(pos), .win(win), .bit_o(x2_bin));

  // Operand source: converted binary operands or external streams.
  assign x1 = ext_q ? (win & x1_in) : x1_bin;
  assign x2 = ext_q ? (win & x2_in) : x2_bin;

  stochastic_multiplier u_mul (
    .clk    (clk),
    .rst_n  (rst_n),
    .dig_rep(dig_n),
    .dig_shf(dig_nm1),
    .sel0   (sel0),
    .sel1   (sel1),
    .x1     (x1),
    .x2     (x2),
    .y      (prod_stream),
    .rep    (rep_stream),
    .shf    (shf_stream)
  );

  scaled_adder u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .dig  (dig_n),
    .x1   (x1),
    .x2   (x2),
    .y    (sum_stream)
  );

  stoch2bin #(.CW(2*LOG2N_MAX+1)) u_s2b_prod (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(accept),
    .en   (busy),
    .bit_i(prod_stream),
    .count(prod)
  );

  stoch2bin #(.CW(LOG2N_MAX+2)) u_s2b_sum (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(accept),
    .en   (busy),
    .bit_i(sum_stream),
    .count(sum)
  );

  // Operation control.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      sum_done <= 1'b0;
    end else begin
      done     <= last_bit;
      sum_done <= last_sum_bit;
      if (accept)        busy <= 1'b1;
      else if (last_bit) busy <= 1'b0;
    end
  end

  // Operands must not exceed the stream length.
  logic [LOG2N_MAX:0] n_in;
  assign n_in = (LOG2N_MAX+1)'(stream_len(size));

  operand_range : assert property (@(posedge clk) disable iff (!rst_n)
    accept && !stream_src |-> (a <= n_in) && (b <= n_in));

endmodule
