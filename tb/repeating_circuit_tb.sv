// repeating_circuit_tb: self-checking test of the repeating circuit.
// For n = 4 and n = 8 the testbench drives SEL-0 from its own bit counter
// (0 during the first n bits of each n^2-bit operation), feeds an n-bit
// sequence followed by random bits that must be ignored, and checks that
// output bit t equals input bit (t mod n) for all n^2 bits. The first
// operation uses the 1,0,1,0 example sequence. Operations run back to back.
module repeating_circuit_tb;
  import sc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dig_t dig;
  logic sel0, din, dout;
  int   checks = 0, failures = 0;
  logic seq [0:7];

  always #5 clk = ~clk;

  repeating_circuit dut (.clk(clk), .rst_n(rst_n), .dig(dig), .sel0(sel0),
                         .din(din), .dout(dout));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(int n);
    for (int t = 0; t < n * n; t++) begin
      @(negedge clk);
      sel0 = (t >= n);
      din  = (t < n) ? seq[t] : 1'($urandom_range(1, 0));
      #1;
      checks++;
      if (dout !== seq[t % n]) begin
        failures++;
        $display("FAIL n=%0d t=%0d dout=%b exp=%b", n, t, dout, seq[t % n]);
      end
    end
  endtask

  initial begin
    sel0 = 1'b0; din = 1'b0; dig = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (seq[i]) seq[i] = 1'b0;
    // the 1,0,1,0 example, n = 4
    seq[0] = 1'b1; seq[1] = 1'b0; seq[2] = 1'b1; seq[3] = 1'b0;
    dig = dig_for(4);
    run_op(4);
    for (int k = 0; k < 30; k++) begin
      int n;
      n = (k % 2 == 0) ? 8 : 4;
      dig = dig_for(n);
      foreach (seq[i]) seq[i] = 1'($urandom_range(1, 0));
      run_op(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
