// bit_shifting_circuit_tb: self-checking test of the bit-shifting circuit.
// For n = 4 and n = 8 the testbench drives SEL-0 (0 during the first n
// bits) and SEL-1 (0 on the first bit of every n-bit block) from its own bit
// counter and checks that block k of the output is the input sequence
// rotated left by k bits: out(t) = seq[((t mod n) + t/n) mod n]. The first
// operation uses the 1,0,0,0 example sequence, the second 0,1,0,0.
module bit_shifting_circuit_tb;
  import sc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dig_t dig;
  logic sel0, sel1, din, dout;
  int   checks = 0, failures = 0;
  logic seq [0:7];

  always #5 clk = ~clk;

  bit_shifting_circuit dut (.clk(clk), .rst_n(rst_n), .dig(dig), .sel0(sel0),
                            .sel1(sel1), .din(din), .dout(dout));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(int n);
    logic exp_bit;
    for (int t = 0; t < n * n; t++) begin
      @(negedge clk);
      sel0 = (t >= n);
      sel1 = (t % n) != 0;
      din  = (t < n) ? seq[t] : 1'($urandom_range(1, 0));
      #1;
      exp_bit = seq[((t % n) + t / n) % n];
      checks++;
      if (dout !== exp_bit) begin
        failures++;
        $display("FAIL n=%0d t=%0d dout=%b exp=%b", n, t, dout, exp_bit);
      end
    end
  endtask

  initial begin
    sel0 = 1'b0; sel1 = 1'b0; din = 1'b0; dig = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (seq[i]) seq[i] = 1'b0;
    dig = dig_for(3);
    seq[0] = 1'b1;
    run_op(4);                      // 1,0,0,0
    seq[0] = 1'b0; seq[1] = 1'b1;
    run_op(4);                      // 0,1,0,0
    for (int k = 0; k < 30; k++) begin
      int n;
      n = (k % 2 == 0) ? 8 : 4;
      dig = dig_for(n - 1);
      foreach (seq[i]) seq[i] = 1'($urandom_range(1, 0));
      run_op(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
