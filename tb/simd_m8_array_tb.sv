// simd_m8_array_tb: checks the four 8-bit multipliers in both modes.
//
// Random and corner operands, all four signedness combinations. In SIMD
// mode each lane's low 16 bits must equal the 8x8 product of its bytes;
// in combined mode the output must equal the 16x16 product of the low
// halfwords. Expected values use the simulator's own wide arithmetic.
module simd_m8_array_tb;

  logic               combine, a_signed, b_signed;
  logic [31:0]        a, b;
  logic signed [17:0] lane [4];
  logic signed [33:0] comb;
  int                 checks = 0, failures = 0;

  simd_m8_array dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ext(logic [31:0] v, int w, bit s);
    longint r;
    r = longint'(v) & ((64'd1 << w) - 1);
    if (s && v[w-1]) r = r - (64'sd1 <<< w);
    return r;
  endfunction

  task automatic check_one();
    longint pa, pb, e;
    for (int m = 0; m < 2; m++) begin
      combine = m[0];
      #1;
      if (!combine) begin
        for (int i = 0; i < 4; i++) begin
          pa = ext(a >> (8 * i), 8, a_signed);
          pb = ext(b >> (8 * i), 8, b_signed);
          e  = pa * pb;
          checks++;
          if (lane[i][15:0] != e[15:0]) begin
            failures++;
            $display("FAIL simd lane %0d a=%h b=%h sa=%0b sb=%0b got %h exp %h",
                     i, a, b, a_signed, b_signed, lane[i][15:0], e[15:0]);
          end
        end
      end else begin
        pa = ext(a, 16, a_signed);
        pb = ext(b, 16, b_signed);
        e  = pa * pb;
        checks++;
        if (longint'(comb) != e) begin
          failures++;
          $display("FAIL comb a=%h b=%h sa=%0b sb=%0b got %0d exp %0d",
                   a[15:0], b[15:0], a_signed, b_signed, comb, e);
        end
      end
    end
  endtask

  initial begin
    automatic logic [31:0] corners [6] = '{32'h0, 32'hFFFF_FFFF, 32'h8080_8080,
                                 32'h7F7F_7F7F, 32'h8000_7FFF, 32'h0180_FF01};
    for (int s = 0; s < 4; s++) begin
      a_signed = s[0];
      b_signed = s[1];
      foreach (corners[i]) foreach (corners[j]) begin
        a = corners[i]; b = corners[j];
        check_one();
      end
      for (int n = 0; n < 500; n++) begin
        a = $urandom; b = $urandom;
        check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
