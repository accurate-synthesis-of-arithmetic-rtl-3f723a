// select_gen_tb: self-checking test of the select-signal generator.
// After a clear, the bit counter and the four select signals are compared,
// for 200 bits, with their definitions in terms of the bit index t:
//   SEL-1 (n) = (t mod n) != 0,  SEL-0 (n) = (t mod n^2) >= n.
// A second clear in mid-run must restart the sequence.
module select_gen_tb;
  import sc_pkg::*;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  clear;
  logic [DIV_STAGES-1:0] cnt;
  logic                  sel0_4, sel1_4, sel0_8, sel1_8;
  int                    checks = 0, failures = 0;

  always #5 clk = ~clk;

  select_gen dut (.clk(clk), .rst_n(rst_n), .clear(clear), .cnt(cnt),
                  .sel0_4(sel0_4), .sel1_4(sel1_4), .sel0_8(sel0_8), .sel1_8(sel1_8));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bit(int t);
    logic e04, e14, e08, e18;
    e14 = (t % 4) != 0;
    e04 = (t % 16) >= 4;
    e18 = (t % 8) != 0;
    e08 = (t % 64) >= 8;
    checks++;
    if (int'(cnt) != t % 64 || sel0_4 !== e04 || sel1_4 !== e14 ||
        sel0_8 !== e08 || sel1_8 !== e18) begin
      failures++;
      $display("FAIL t=%0d cnt=%0d sel0_4=%b sel1_4=%b sel0_8=%b sel1_8=%b",
               t, cnt, sel0_4, sel1_4, sel0_8, sel1_8);
    end
  endtask

  initial begin
    clear = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);   // counter runs off zero
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int t = 0; t < 200; t++) begin
      check_bit(t);
      @(negedge clk);
    end
    clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int t = 0; t < 70; t++) begin
      check_bit(t);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
