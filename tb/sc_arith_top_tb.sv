// sc_arith_top_tb: end-to-end test of the exact stochastic arithmetic unit.
//
// Runs every operand pair a, b in 0..n for n = 4 and n = 8 (162 operations)
// at the default configuration, then operations whose operands are given as
// streams (stream_src = 1), including the examples 1,0,1,0 x 0,1,0,0 = 2/16
// and (1,1,0,0 + 1,0,0,0)/2 = 3/8, and checks, independently of the design:
//   - prod = a * b and sum = a + b (exact, no error for any input);
//   - start-to-done latency n^2 + 1 cycles and start-to-sum_done 2n + 1;
//   - every bit of the repeated stream, rep(t) = A[t mod n], and of the
//     bit-shifted stream, shf(t) = B[((t mod n) + t/n) mod n], where
//     A[i] = (i < a) and B[i] = (i < b) are the converted operands, or the
//     operand streams themselves in stream mode (a, b = their ones);
//   - every product bit, rep & shf, and every sum bit (A, then B, then 0).
// It also counts the mechanisms the design has and fails if one never
// occurs: operations in each size mode, recirculation through the delay
// lines (SEL-0 = 1), first-bit re-insertion in the bit-shifting circuit
// (SEL-0 = 1 and SEL-1 = 0), the delayed second operand in the sum stream,
// size switches between operations, a start given together with done,
// a start ignored while busy, and operations in stream-input mode. The smallest-value cases 1/4 * 1/4 and
// 1/8 * 1/8 are reported separately.
module sc_arith_top_tb;
  import sc_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start;
  size_e      size;
  logic [3:0] a, b;
  logic       stream_src, x1_in, x2_in;
  logic       busy, done, sum_done;
  logic [6:0] prod;
  logic [4:0] sum;
  logic       prod_stream, sum_stream, rep_stream, shf_stream, sel0, sel1;

  int checks = 0, failures = 0;
  int n_ops4 = 0, n_ops8 = 0, n_recirc = 0, n_reinsert = 0, n_sum_late = 0;
  int n_switch = 0, n_b2b = 0, n_ignored = 0, n_small = 0, n_stream = 0;

  always #5 clk = ~clk;

  sc_arith_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .size(size), .a(a), .b(b),
    .stream_src(stream_src), .x1_in(x1_in), .x2_in(x2_in),
    .busy(busy), .done(done), .sum_done(sum_done), .prod(prod), .sum(sum),
    .prod_stream(prod_stream), .sum_stream(sum_stream),
    .rep_stream(rep_stream), .shf_stream(shf_stream),
    .sel0(sel0), .sel1(sel1));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // One operation, called at a negedge. Start is raised at once, so an
  // operation called right after another starts in the cycle done is high;
  // the bits follow in the next n^2 cycles.
  // pa/pb are the operand streams in stream mode (ext = 1); in binary mode
  // they are ignored and av/bv are the operands.
  task automatic run_op(int n, int av_i, int bv_i, bit poke_busy,
                        bit ext = 1'b0, logic [7:0] pa = '0, logic [7:0] pb = '0);
    int   t, sum_cycle, av, bv;
    logic ea, eb, er, es, ep, esum;
    logic [7:0] sa, sb;
    av = 0; bv = 0;
    for (int i = 0; i < 8; i++) begin
      sa[i] = ext ? (i < n && pa[i]) : (i < av_i);
      sb[i] = ext ? (i < n && pb[i]) : (i < bv_i);
      av += int'(sa[i]);
      bv += int'(sb[i]);
    end
    if (ext) n_stream++;
    stream_src = ext;
    if (done) n_b2b++;
    if (n == 8 && size != SIZE_8 || n == 4 && size != SIZE_4) n_switch++;
    start = 1'b1;
    size  = (n == 8) ? SIZE_8 : SIZE_4;
    a     = 4'(av);
    b     = 4'(bv);
    @(negedge clk);
    start = 1'b0;
    stream_src = 1'($urandom_range(1, 0));   // only sampled at start
    sum_cycle = -1;
    for (t = 0; t < n * n; t++) begin
      // stream bit t is present now
      if (poke_busy && t == 3) begin
        start = 1'b1;               // must be ignored
        a = 4'(n - av);
        b = 4'(n - bv);
        n_ignored++;
      end
      // stream inputs: operand bits in block 0, random bits elsewhere
      x1_in = (t < n) ? sa[t] : 1'($urandom_range(1, 0));
      x2_in = (t < n) ? sb[t] : 1'($urandom_range(1, 0));
      #1;
      er   = sa[t % n];
      es   = sb[((t % n) + t / n) % n];
      ep   = er & es;
      esum = (t < n) ? sa[t] : (t < 2 * n) ? sb[t - n] : 1'b0;
      checks++;
      if (!busy || rep_stream !== er || shf_stream !== es ||
          prod_stream !== ep || sum_stream !== esum)
        fail($sformatf("n=%0d a=%0d b=%0d t=%0d busy=%b rep=%b/%b shf=%b/%b prod=%b/%b sum=%b/%b",
                       n, av, bv, t, busy, rep_stream, er, shf_stream, es,
                       prod_stream, ep, sum_stream, esum));
      if (sel0) n_recirc++;
      if (sel0 && !sel1) n_reinsert++;
      if (t >= n && t < 2 * n && sum_stream) n_sum_late++;
      if (sum_done) sum_cycle = t;
      @(negedge clk);
      start = 1'b0;
      a = 4'(av);
      b = 4'(bv);
      x1_in = 1'($urandom_range(1, 0));
      x2_in = 1'($urandom_range(1, 0));
    end
    // cycle n^2 after the start cycle's successor: done must be high now
    checks++;
    if (!done || busy) fail($sformatf("n=%0d done=%b busy=%b at cycle %0d", n, done, busy, n * n + 1));
    checks++;
    if (int'(prod) != av * bv) fail($sformatf("n=%0d a=%0d b=%0d prod=%0d exp=%0d", n, av, bv, prod, av * bv));
    checks++;
    if (int'(sum) != av + bv) fail($sformatf("n=%0d a=%0d b=%0d sum=%0d exp=%0d", n, av, bv, sum, av + bv));
    // sum_done pulses in the cycle after bit 2n-1, i.e. during bit 2n
    checks++;
    if (sum_cycle != 2 * n) fail($sformatf("n=%0d sum_done at bit %0d, exp %0d", n, sum_cycle, 2 * n));
    if (n == 4) n_ops4++; else n_ops8++;
    if (ext)
      $display("stream operands n=%0d %b x %b: product %0d/%0d, scaled sum %0d/%0d",
               n, sa, sb, prod, n * n, sum, 2 * n);
    if (av == 1 && bv == 1 && !poke_busy && !ext) begin
      n_small++;
      $display("smallest values n=%0d: product %0d/%0d, scaled sum %0d/%0d",
               n, prod, n * n, sum, 2 * n);
    end
  endtask

  initial begin
    start = 1'b0;
    size  = SIZE_4;
    a = '0;
    b = '0;
    stream_src = 1'b0;
    x1_in = 1'b0;
    x2_in = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      int n;
      n = (k == 0) ? 4 : 8;
      for (int av = 0; av <= n; av++)
        for (int bv = 0; bv <= n; bv++)
          run_op(n, av, bv, (av == 2 && bv == 1));
    end
    // alternate sizes, with idle gaps and back to back
    for (int k = 0; k < 20; k++) begin
      int n;
      n = (k % 2 == 0) ? 8 : 4;
      if (k % 3 == 0) repeat (k % 5) @(negedge clk);
      run_op(n, int'($urandom_range(n, 0)), int'($urandom_range(n, 0)), 1'b0);
    end
    // stream operands (bit i of the vector is stream bit i)
    run_op(4, 0, 0, 1'b0, 1'b1, 8'b0000_0101, 8'b0000_0010);  // 1,0,1,0 x 0,1,0,0
    run_op(4, 0, 0, 1'b0, 1'b1, 8'b0000_0011, 8'b0000_0001);  // 1,1,0,0 + 1,0,0,0
    for (int k = 0; k < 20; k++)
      run_op((k % 2 == 0) ? 8 : 4, 0, 0, (k == 5), 1'b1,
             8'($urandom_range(255, 0)), 8'($urandom_range(255, 0)));
    $display("mechanisms: ops4=%0d ops8=%0d recirculate=%0d reinsert=%0d sum_second_operand=%0d size_switch=%0d back_to_back=%0d start_ignored=%0d smallest=%0d stream_ops=%0d",
             n_ops4, n_ops8, n_recirc, n_reinsert, n_sum_late, n_switch, n_b2b, n_ignored, n_small, n_stream);
    if (n_ops4 == 0)     fail("no n=4 operation");
    if (n_ops8 == 0)     fail("no n=8 operation");
    if (n_recirc == 0)   fail("no recirculation");
    if (n_reinsert == 0) fail("no first-bit re-insertion");
    if (n_sum_late == 0) fail("no delayed second operand in a sum");
    if (n_switch == 0)   fail("no size switch");
    if (n_b2b == 0)      fail("no back-to-back operation");
    if (n_ignored == 0)  fail("no ignored start");
    if (n_stream == 0)   fail("no stream-input operation");
    if (n_small < 2)    fail("smallest-value cases missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
