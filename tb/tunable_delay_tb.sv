// tunable_delay_tb: self-checking test of the tunable delay line.
// For every delay code 0..7 a random stream is sent through the line and
// each output bit is compared with the input bit (code + 1) cycles earlier,
// taken from a history kept by the testbench. A watchdog ends the run.
module tunable_delay_tb;
  import sc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dig_t dig;
  logic din, dout;
  int   checks = 0, failures = 0;
  logic hist [0:63];
  int   t;

  always #5 clk = ~clk;

  tunable_delay dut (.clk(clk), .rst_n(rst_n), .dig(dig), .din(din), .dout(dout));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dig = '0;
    din = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 8; d++) begin
      dig = dig_t'(d);
      t = 0;
      // flush with zeros, then send a random stream
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        din = (i < 8) ? 1'b0 : 1'(urandom_bit());
        hist[i] = din;
        if (i >= 8) begin
          checks++;
          if (dout !== hist[i-d-1]) begin
            failures++;
            $display("FAIL dig=%0d i=%0d dout=%b exp=%b", d, i, dout, hist[i-d-1]);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int urandom_bit();
    return int'($urandom_range(1, 0));
  endfunction

endmodule
