// act_tanh_sigmoid_tb: checks the combined tanh/sigmoid accelerator.
//
// Every Q7 input is sent in both modes, back to back (one per cycle, the
// mode alternating), and each result must appear exactly one cycle later.
// Expected values come from a reference model of the method written here:
// tanh_ref() below, and sigmoid = floor((tanh_ref(floor(x/2)) + 32) / 2).
// The error against the real functions over x in [-1, 1] must be below
// two LSBs.
module act_tanh_sigmoid_tb;
  import nn_accel_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, sel_sigmoid = 0, out_valid;
  q7_t  x = '0, y;
  int   checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always #5 clk = ~clk;

  act_tanh_sigmoid dut (.*);

  function automatic int tanh_ref(int v);
    int m, e;
    m = (v < 0) ? -v : v;
    if (m <= 14) e = m;
    else begin
      e = int'($floor(32.0 * $tanh(real'(m) / 32.0) + 0.5));
      if (e < 15) e = 15;
      if (e > 32) e = 32;
    end
    return (v < 0) ? -e : e;
  endfunction

  function automatic int floor_div2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-result queue, filled at issue and checked one cycle later
  int  exp_q[$];
  int  x_q[$];
  bit  sel_q[$];
  real max_t = 0.0, max_s = 0.0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int  e, xv;
      bit  s;
      real err;
      e  = exp_q.pop_front();
      xv = x_q.pop_front();
      s  = sel_q.pop_front();
      checks++;
      if (int'(y) != e) begin
        failures++;
        $display("FAIL %s x=%0d y=%0d expected=%0d", s ? "sigm" : "tanh", xv, y, e);
      end
      if (xv >= -32 && xv <= 32) begin
        if (s) err = rabs(real'(y) / 32.0 - 1.0 / (1.0 + $exp(-real'(xv) / 32.0)));
        else   err = rabs(real'(y) / 32.0 - $tanh(real'(xv) / 32.0));
        if (s && err > max_s) max_s = err;
        if (!s && err > max_t) max_t = err;
      end
    end
  end

  initial begin
    int latency;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // latency: one operand, count cycles to out_valid
    x <= 8'sd20; sel_sigmoid <= 0; in_valid <= 1;
    exp_q.push_back(tanh_ref(20)); x_q.push_back(20); sel_q.push_back(0);
    @(posedge clk);
    #1;
    in_valid <= 0;
    latency = 1;
    while (!out_valid) begin @(posedge clk); #1; latency++; end
    checks++;
    if (latency != 1) begin failures++; $display("FAIL latency %0d", latency); end
    @(posedge clk);
    // back-to-back stream over all inputs, both modes
    for (int v = -128; v < 128; v++) begin
      for (int s = 0; s < 2; s++) begin
        x <= q7_t'(v); sel_sigmoid <= s[0]; in_valid <= 1;
        exp_q.push_back(s[0] ? floor_div2(tanh_ref(floor_div2(v)) + 32) : tanh_ref(v));
        x_q.push_back(v); sel_q.push_back(s[0]);
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (max_t >= 2.0 / 32.0 || max_s >= 2.0 / 32.0) begin
      failures++; $display("FAIL max error tanh %f sigmoid %f", max_t, max_s);
    end
    $display("max |error| on [-1,1]: tanh %f sigmoid %f", max_t, max_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
