// stochastic_multiplier_tb: self-checking test of the exact multiplier.
// The testbench generates SEL-0/SEL-1 from its own bit counter, applies two
// n-bit sequences (n = 4 and 8) and checks every product bit,
// y(t) = x1[t mod n] & x2[((t mod n) + t/n) mod n], and the total number of
// ones over the n^2 bits, which must equal ones(x1) * ones(x2) exactly.
// The first operation is the worked example x1 = 1,0,1,0 (2/4) and
// x2 = 0,1,0,0 (1/4), whose product stream holds 2 ones out of 16.
module stochastic_multiplier_tb;
  import sc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sel0, sel1, x1, x2, y, rep, shf;
  dig_t dig_rep, dig_shf;
  int   checks = 0, failures = 0;
  logic s1 [0:7];
  logic s2 [0:7];

  always #5 clk = ~clk;

  stochastic_multiplier dut (.clk(clk), .rst_n(rst_n), .dig_rep(dig_rep),
    .dig_shf(dig_shf), .sel0(sel0), .sel1(sel1), .x1(x1), .x2(x2), .y(y),
    .rep(rep), .shf(shf));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(int n);
    int ones_y, ones1, ones2;
    logic e;
    ones_y = 0; ones1 = 0; ones2 = 0;
    for (int i = 0; i < n; i++) begin
      ones1 += int'(s1[i]);
      ones2 += int'(s2[i]);
    end
    dig_rep = dig_for(n);
    dig_shf = dig_for(n - 1);
    for (int t = 0; t < n * n; t++) begin
      @(negedge clk);
      sel0 = (t >= n);
      sel1 = (t % n) != 0;
      x1   = (t < n) ? s1[t] : 1'($urandom_range(1, 0));
      x2   = (t < n) ? s2[t] : 1'($urandom_range(1, 0));
      #1;
      e = s1[t % n] & s2[((t % n) + t / n) % n];
      ones_y += int'(y);
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL n=%0d t=%0d y=%b exp=%b", n, t, y, e);
      end
    end
    checks++;
    if (ones_y != ones1 * ones2) begin
      failures++;
      $display("FAIL n=%0d ones=%0d exp=%0d", n, ones_y, ones1 * ones2);
    end
  endtask

  initial begin
    sel0 = 1'b0; sel1 = 1'b0; x1 = 1'b0; x2 = 1'b0;
    dig_rep = '0; dig_shf = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (s1[i]) begin s1[i] = 1'b0; s2[i] = 1'b0; end
    s1[0] = 1'b1; s1[2] = 1'b1; s2[1] = 1'b1;
    run_op(4);
    // smallest values: 1/4 * 1/4 and 1/8 * 1/8
    foreach (s1[i]) begin s1[i] = 1'b0; s2[i] = 1'b0; end
    s1[3] = 1'b1; s2[2] = 1'b1;
    run_op(4);
    s1[3] = 1'b0; s2[2] = 1'b0; s1[7] = 1'b1; s2[5] = 1'b1;
    run_op(8);
    foreach (s1[i]) begin s1[i] = 1'b1; s2[i] = 1'b1; end
    run_op(8);
    for (int k = 0; k < 40; k++) begin
      foreach (s1[i]) begin
        s1[i] = 1'($urandom_range(1, 0));
        s2[i] = 1'($urandom_range(1, 0));
      end
      run_op((k % 2 == 0) ? 8 : 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
