// scaled_adder_tb: self-checking test of the exact scaled adder.
// Two n-bit sequences (n = 4 and 8) are applied in the first n cycles of an
// operation, zeros after them and for n cycles before them. The 2n-bit output must be the first sequence
// followed by the second, and hold exactly ones(x1) + ones(x2) ones. The
// first operation is the example 1,1,0,0 (2/4) plus 1,0,0,0 (1/4), giving
// 1,1,0,0,1,0,0,0 (3/8).
module scaled_adder_tb;
  import sc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dig_t dig;
  logic x1, x2, y;
  int   checks = 0, failures = 0;
  logic s1 [0:7];
  logic s2 [0:7];

  always #5 clk = ~clk;

  scaled_adder dut (.clk(clk), .rst_n(rst_n), .dig(dig), .x1(x1), .x2(x2), .y(y));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(int n);
    int ones_y, ones_in;
    logic e;
    ones_y = 0; ones_in = 0;
    for (int i = 0; i < n; i++) ones_in += int'(s1[i]) + int'(s2[i]);
    dig = dig_for(n);
    // x2 has been 0 for at least n cycles before bit 0 (see scaled_adder)
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      x1 = 1'b0;
      x2 = 1'b0;
    end
    for (int t = 0; t < 2 * n; t++) begin
      @(negedge clk);
      x1 = (t < n) ? s1[t] : 1'b0;
      x2 = (t < n) ? s2[t] : 1'b0;
      #1;
      e = (t < n) ? s1[t] : s2[t - n];
      ones_y += int'(y);
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL n=%0d t=%0d y=%b exp=%b", n, t, y, e);
      end
    end
    checks++;
    if (ones_y != ones_in) begin
      failures++;
      $display("FAIL n=%0d ones=%0d exp=%0d", n, ones_y, ones_in);
    end
  endtask

  initial begin
    x1 = 1'b0; x2 = 1'b0; dig = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (s1[i]) begin s1[i] = 1'b0; s2[i] = 1'b0; end
    s1[0] = 1'b1; s1[1] = 1'b1; s2[0] = 1'b1;
    run_op(4);
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
