// bin2stoch_tb: exhaustive test of the binary-to-stochastic converter.
// Every value 0..8, position 0..7 and window state is applied; the output
// must be 1 exactly when the window is open and the position is below the
// value, and each 8-bit window must hold exactly value ones.
module bin2stoch_tb;
  import sc_pkg::*;

  logic [3:0] value;
  logic [2:0] pos;
  logic       win;
  logic       bit_o;
  int         checks = 0, failures = 0;
  int         ones;

  bin2stoch dut (.value(value), .pos(pos), .win(win), .bit_o(bit_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 8; v++) begin
      for (int w = 0; w < 2; w++) begin
        ones = 0;
        for (int p = 0; p < 8; p++) begin
          value = 4'(v);
          pos   = 3'(p);
          win   = 1'(w);
          #1;
          ones += int'(bit_o);
          checks++;
          if (bit_o !== (w == 1 && p < v)) begin
            failures++;
            $display("FAIL v=%0d p=%0d w=%0d out=%b", v, p, w, bit_o);
          end
        end
        checks++;
        if (ones != (w == 1 ? v : 0)) begin
          failures++;
          $display("FAIL v=%0d w=%0d ones=%0d", v, w, ones);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
