// tanh_ralut_tb: exhaustive check of the tanh range addressable LUT.
//
// For every magnitude 15..127 the expected output is the nearest Q7 value
// to tanh(|x|), limited to the table's range 15/32 .. 32/32; it is worked
// out here with real arithmetic, independent of the table constants.
// Also checks that no output is further than one LSB from tanh.
module tanh_ralut_tb;
  import nn_accel_pkg::*;

  logic [6:0] mag;
  q7_t        y;
  int         checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  tanh_ralut dut (.mag(mag), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  exp_y;
    real err;
    for (int m = 15; m < 128; m++) begin
      mag = 7'(m);
      #1;
      exp_y = int'($floor(32.0 * $tanh(real'(m) / 32.0) + 0.5));
      if (exp_y < 15) exp_y = 15;
      if (exp_y > 32) exp_y = 32;
      checks++;
      if (int'(y) != exp_y) begin
        failures++;
        $display("FAIL mag=%0d y=%0d expected=%0d", m, y, exp_y);
      end
      err = rabs(real'(y) / 32.0 - $tanh(real'(m) / 32.0));
      checks++;
      if (err > 1.0 / 32.0 + 1e-3) begin
        failures++;
        $display("FAIL mag=%0d error %f above one LSB (plus the 0.4671 edge)", m, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
