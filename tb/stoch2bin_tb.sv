// stoch2bin_tb: self-checking test of the stochastic-to-binary counter.
// Random bits and enables are applied for several operations separated by
// clear; after every cycle the count is compared with a reference count.
module stoch2bin_tb;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear, en, bit_i;
  logic [6:0] count;
  int         checks = 0, failures = 0;
  int         ref_count;

  always #5 clk = ~clk;

  stoch2bin dut (.clk(clk), .rst_n(rst_n), .clear(clear), .en(en),
                           .bit_i(bit_i), .count(count));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; en = 1'b0; bit_i = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 20; op++) begin
      @(negedge clk);
      clear = 1'b1; en = 1'b1; bit_i = 1'b1;   // clear wins over counting
      @(posedge clk);
      ref_count = 0;
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        checks++;
        if (int'(count) != ref_count) begin
          failures++;
          $display("FAIL op=%0d i=%0d count=%0d exp=%0d", op, i, count, ref_count);
        end
        clear = 1'b0;
        en    = ($urandom_range(3, 0) != 0);
        bit_i = $urandom_range(1, 0) == 1;
        if (op == 0) begin en = 1'b1; bit_i = 1'b1; end  // reach 64
        @(posedge clk);
        if (en && bit_i) ref_count++;
      end
      @(negedge clk);
      checks++;
      if (int'(count) != ref_count) begin
        failures++;
        $display("FAIL op=%0d final count=%0d exp=%0d", op, count, ref_count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
