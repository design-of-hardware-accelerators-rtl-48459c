// tanh_approx_tb: exhaustive check of the Q7 tanh approximation.
//
// All 256 inputs are applied. The expected value is computed here from
// the method: x itself for |x| <= 14/32, otherwise the nearest Q7 value to
// tanh(|x|) limited to 15/32 .. 1, with the sign of x restored. The error
// against the real tanh must stay below two LSBs (2/32) everywhere.
module tanh_approx_tb;
  import nn_accel_pkg::*;

  q7_t x, y;
  int  checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  tanh_approx dut (.x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  m, e;
    real err, max_err;
    max_err = 0.0;
    for (int v = -128; v < 128; v++) begin
      x = q7_t'(v);
      #1;
      m = (v < 0) ? -v : v;
      if (m <= 14) e = m;
      else begin
        e = int'($floor(32.0 * $tanh(real'(m) / 32.0) + 0.5));
        if (e < 15) e = 15;
        if (e > 32) e = 32;
      end
      if (v < 0) e = -e;
      checks++;
      if (int'(y) != e) begin
        failures++;
        $display("FAIL x=%0d y=%0d expected=%0d", v, y, e);
      end
      err = rabs(real'(y) / 32.0 - $tanh(real'(v) / 32.0));
      if (err > max_err) max_err = err;
    end
    checks++;
    if (max_err >= 2.0 / 32.0) begin
      failures++;
      $display("FAIL max error %f not below two LSBs", max_err);
    end
    $display("max |error| over all Q7 inputs: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
