// simd_mul_tb: checks the SIMD / 32-bit multiplier in all modes.
//
// Random and corner operands are sent back to back in the three modes and
// all signedness combinations. Expected results are built here from
// 64-bit arithmetic: the full 32x32 product, four 8x8 products packed as
// 16-bit fields, or two 16x16 products packed as 32-bit fields. Each
// result must appear exactly one cycle after its operands.
module simd_mul_tb;
  import nn_accel_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, a_signed = 0, b_signed = 0;
  mul_mode_e   mode = MM_MUL32;
  logic [31:0] a = '0, b = '0;
  logic        out_valid;
  logic [63:0] result;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  simd_mul dut (.*);

  function automatic longint ext(logic [31:0] v, int w, bit s);
    longint r;
    r = (w == 32) ? longint'({32'b0, v}) : (longint'(v) & ((64'd1 << w) - 1));
    if (s && v[w-1]) r = r - (64'sd1 <<< w);
    return r;
  endfunction

  function automatic logic [63:0] mul_ref(mul_mode_e m, bit sa, bit sb,
                                          logic [31:0] x, logic [31:0] y);
    logic [63:0] r;
    longint      p;
    r = '0;
    case (m)
      MM_MUL32: r = ext(x, 32, sa) * ext(y, 32, sb);
      MM_SIMD8:
        for (int i = 0; i < 4; i++) begin
          p = ext(x >> (8 * i), 8, sa) * ext(y >> (8 * i), 8, sb);
          r[16*i +: 16] = p[15:0];
        end
      MM_SIMD16:
        for (int i = 0; i < 2; i++) begin
          p = ext(x >> (16 * i), 16, sa) * ext(y >> (16 * i), 16, sb);
          r[32*i +: 32] = p[31:0];
        end
      default: r = '0;
    endcase
    return r;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          cyc = 0;
  logic [63:0] exp_q[$];
  int          t_q[$];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [63:0] e;
      int          t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (result != e) begin
        failures++;
        $display("FAIL result %h expected %h", result, e);
      end
      checks++;
      if (cyc - t != 1) begin
        failures++;
        $display("FAIL latency %0d", cyc - t);
      end
    end
  end

  task automatic send(mul_mode_e m, bit sa, bit sb, logic [31:0] x, logic [31:0] y);
    mode <= m; a_signed <= sa; b_signed <= sb; a <= x; b <= y; in_valid <= 1;
    exp_q.push_back(mul_ref(m, sa, sb, x, y));
    t_q.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    automatic logic [31:0] corners [6] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000,
                                 32'h7FFF_FFFF, 32'h8080_8080, 32'h0001_FFFF};
    automatic mul_mode_e modes [3] = '{MM_MUL32, MM_SIMD8, MM_SIMD16};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (modes[k]) begin
      for (int s = 0; s < 4; s++) begin
        foreach (corners[i]) foreach (corners[j])
          send(modes[k], s[0], s[1], corners[i], corners[j]);
        for (int n = 0; n < 300; n++) send(modes[k], s[0], s[1], $urandom, $urandom);
      end
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
