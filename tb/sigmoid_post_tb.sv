// sigmoid_post_tb: exhaustive check of the sigmoid output stage.
//
// For every tanh value t in [-1, 1] (Q7: -32..32) the stage must return
// floor((t + 32) / 2), i.e. (t + 1) / 2 in Q7 with the shift's rounding.
module sigmoid_post_tb;
  import nn_accel_pkg::*;

  q7_t t, s;
  int  checks = 0, failures = 0;

  sigmoid_post dut (.t(t), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = -32; v <= 32; v++) begin
      t = q7_t'(v);
      #1;
      e = (v + 32) / 2;   // v + 32 >= 0, so this is the floor
      checks++;
      if (int'(s) != e) begin
        failures++;
        $display("FAIL t=%0d s=%0d expected=%0d", v, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
