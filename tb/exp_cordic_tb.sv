// exp_cordic_tb: checks the pipelined CORDIC e-function unit.
//
// All Q7 inputs are streamed in back to back (one per cycle) to check the
// full throughput; each result must leave the pipeline exactly three
// cycles after its input. The expected values come from an integer model
// of the three CORDIC iterations written here, with the angle constants
// computed from atanh() at run time. Over [-1, 1] the result must also be
// within 0.26 of the real e^x.
module exp_cordic_tb;
  import nn_accel_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  q7_t  phi = '0, y;
  int   checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always #5 clk = ~clk;

  exp_cordic dut (.*);

  function automatic int asr(int v, int s);
    return v >>> s;
  endfunction

  function automatic int exp_ref(int p);
    int x, y, z, xn, sg;
    x = int'($floor(1.2075 * 32.0 + 0.5));
    y = 0;
    z = (p < 0) ? -p : p;
    for (int i = 1; i <= 3; i++) begin
      sg = (z >= 0) ? 1 : -1;
      xn = x + sg * asr(y, i);
      y  = y + sg * asr(x, i);
      x  = xn;
      z  = z - sg * int'($floor(32.0 * $atanh(1.0 / real'(1 << i)) + 0.5));
    end
    return (p > 0) ? x + y : x - y;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  cyc = 0;
  int  exp_q[$], phi_q[$], t_q[$];
  real max_err = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int  e, p, t;
      real err;
      e = exp_q.pop_front();
      p = phi_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (int'(y) != e) begin
        failures++;
        $display("FAIL phi=%0d y=%0d expected=%0d", p, y, e);
      end
      checks++;
      if (cyc - t != 3) begin
        failures++;
        $display("FAIL phi=%0d latency %0d cycles, expected 3", p, cyc - t);
      end
      if (p >= -32 && p <= 32) begin
        err = rabs(real'(y) / 32.0 - $exp(real'(p) / 32.0));
        if (err > max_err) max_err = err;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = -128; v < 128; v++) begin
      phi <= q7_t'(v); in_valid <= 1;
      exp_q.push_back(exp_ref(v)); phi_q.push_back(v); t_q.push_back(cyc + 1);  // edge that samples the input
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (max_err > 0.26) begin failures++; $display("FAIL max error %f", max_err); end
    $display("max |e^x error| on [-1,1]: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
