// nn_accel_top_tb: end-to-end test of the accelerator subsystem.
//
// Part 1 issues every operation back to back with random and corner
// operands, so that later requests stall while one is in flight, and
// checks every register write (register number, data, and the two writes
// of the 64-bit SIMD results) against reference models written here.
//
// Part 2 runs four complete MicroNet inferences (13 inputs, 32 hidden
// nodes) the way the core's software would use the accelerator, with
// random Q7 weights:
//   * 13-32-1, sigmoid hidden layer, ReLU output node (sign decides),
//   * 13-32-2, tanh hidden layer, arg-max output,
//   * 13-32-2, sigmoid hidden layer, softmax output via e^x,
//   * 13-32-2, sigmoid hidden layer, arg-max output.
// Dot products use SMUL8 on four packed Q7 bytes (the software sums the
// 16-bit products), activations use the tanh/sigmoid/exp operations.
// Every intermediate value is compared with a reference inference that
// multiplies directly and uses the reference activation models.
//
// Each mechanism (stall, two-write result, every operation, the three
// tanh regions, both signs of the e-function input) is counted; one that
// never happened counts as a failure. The top is used with its defaults.
module nn_accel_top_tb;
  import nn_accel_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        req_valid = 0, req_ready;
  logic [3:0]  req_op = '0;
  logic [31:0] req_rs1 = '0, req_rs2 = '0;
  logic [4:0]  req_rd = '0;
  logic        wb_valid;
  logic [4:0]  wb_rd;
  logic [31:0] wb_data;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  nn_accel_top dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // reference models
  // ------------------------------------------------------------------
  function automatic longint ext(logic [31:0] v, int w, bit s);
    longint r;
    r = (w == 32) ? longint'({32'b0, v}) : (longint'(v) & ((64'd1 << w) - 1));
    if (s && v[w-1]) r = r - (64'sd1 <<< w);
    return r;
  endfunction

  function automatic int floor_div2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

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

  function automatic int sigm_ref(int v);
    return floor_div2(tanh_ref(floor_div2(v)) + 32);
  endfunction

  function automatic int exp_ref(int p);
    int x, y, z, xn, sg;
    x = int'($floor(1.2075 * 32.0 + 0.5));
    y = 0;
    z = (p < 0) ? -p : p;
    for (int i = 1; i <= 3; i++) begin
      sg = (z >= 0) ? 1 : -1;
      xn = x + sg * (y >>> i);
      y  = y + sg * (x >>> i);
      x  = xn;
      z  = z - sg * int'($floor(32.0 * $atanh(1.0 / real'(1 << i)) + 0.5));
    end
    return (p > 0) ? x + y : x - y;
  endfunction

  // expected register writes of one operation
  typedef struct { logic [4:0] rd; logic [31:0] data; } wr_t;

  function automatic void op_ref(acc_op_e o, logic [31:0] a, logic [31:0] b,
                                 logic [4:0] rd, ref wr_t w[$]);
    logic [63:0] r;
    longint      p;
    int          q;
    r = '0;
    case (o)
      OP_MUL:    begin r = ext(a, 32, 1) * ext(b, 32, 1); w.push_back('{rd, r[31:0]}); end
      OP_MULH:   begin r = ext(a, 32, 1) * ext(b, 32, 1); w.push_back('{rd, r[63:32]}); end
      OP_MULHSU: begin r = ext(a, 32, 1) * ext(b, 32, 0); w.push_back('{rd, r[63:32]}); end
      OP_MULHU:  begin r = ext(a, 32, 0) * ext(b, 32, 0); w.push_back('{rd, r[63:32]}); end
      OP_SMUL8, OP_UMUL8: begin
        for (int i = 0; i < 4; i++) begin
          p = ext(a >> (8 * i), 8, o == OP_SMUL8) * ext(b >> (8 * i), 8, o == OP_SMUL8);
          r[16*i +: 16] = p[15:0];
        end
        w.push_back('{rd, r[31:0]});
        w.push_back('{rd + 5'd1, r[63:32]});
      end
      OP_SMUL16, OP_UMUL16: begin
        for (int i = 0; i < 2; i++) begin
          p = ext(a >> (16 * i), 16, o == OP_SMUL16) * ext(b >> (16 * i), 16, o == OP_SMUL16);
          r[32*i +: 32] = p[31:0];
        end
        w.push_back('{rd, r[31:0]});
        w.push_back('{rd + 5'd1, r[63:32]});
      end
      OP_TANH: begin q = tanh_ref(int'(signed'(a[7:0]))); w.push_back('{rd, 32'(q)}); end
      OP_SIGM: begin q = sigm_ref(int'(signed'(a[7:0]))); w.push_back('{rd, 32'(q)}); end
      OP_EXP:  begin q = exp_ref(int'(signed'(a[7:0])));  w.push_back('{rd, 32'(q)}); end
      default: ;
    endcase
  endfunction

  // ------------------------------------------------------------------
  // register file model and write checker
  // ------------------------------------------------------------------
  logic [31:0] rf [32];
  wr_t         exp_q[$];

  always @(posedge clk) begin
    if (rst_n && wb_valid) begin
      wr_t e;
      rf[wb_rd] <= wb_data;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected write rd=%0d data=%h", wb_rd, wb_data);
      end else begin
        e = exp_q.pop_front();
        if (wb_rd != e.rd || wb_data != e.data) begin
          failures++;
          $display("FAIL write rd=%0d data=%h expected rd=%0d data=%h",
                   wb_rd, wb_data, e.rd, e.data);
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // mechanism counters
  // ------------------------------------------------------------------
  int         n_stall = 0, n_two = 0;
  logic       prev_wb = 0;
  logic [4:0] prev_rd = '0;
  int n_op [11];
  int n_lin = 0, n_ralut = 0, n_border = 0, n_exp_pos = 0, n_exp_neg = 0;

  always @(negedge clk) begin
    if (rst_n && req_valid && !req_ready) n_stall++;
    // two writes on consecutive cycles to rd and rd+1: one 64-bit result
    if (rst_n && wb_valid && prev_wb && wb_rd == prev_rd + 5'd1) n_two++;
    prev_wb <= rst_n && wb_valid && !(prev_wb && wb_rd == prev_rd + 5'd1);
    prev_rd <= wb_rd;
  end

  function automatic void count_op(acc_op_e o, logic [31:0] a);
    int v, m;
    n_op[int'(o)]++;
    v = int'(signed'(a[7:0]));
    if (o == OP_SIGM) v = floor_div2(v);
    m = (v < 0) ? -v : v;
    if (o == OP_TANH || o == OP_SIGM) begin
      if (m <= 14)      n_lin++;
      else if (m < 128) n_ralut++;
      else              n_border++;
    end
    if (o == OP_EXP) begin
      if (v > 0) n_exp_pos++; else n_exp_neg++;
    end
  endfunction

  // Present one request and return at the clock edge that accepts it.
  // Signals are driven and sampled one time unit after a clock edge. The
  // request stays asserted while req_ready is low, so a busy subsystem
  // stalls it.
  task automatic issue(acc_op_e o, logic [31:0] a, logic [31:0] b, logic [4:0] rd);
    wr_t w[$];
    op_ref(o, a, b, rd, w);
    count_op(o, a);
    #1;
    req_valid = 1; req_op = 4'(o); req_rs1 = a; req_rs2 = b; req_rd = rd;
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    foreach (w[i]) exp_q.push_back(w[i]);
  endtask

  // Drop the request and wait until every expected write has happened.
  task automatic drain();
    #1;
    req_valid = 0;
    while (exp_q.size() != 0 || !req_ready) begin @(posedge clk); #1; end
  endtask

  // Issue one operation and wait for its result.
  task automatic run(acc_op_e o, logic [31:0] a, logic [31:0] b, logic [4:0] rd);
    issue(o, a, b, rd);
    drain();
  endtask

  // ------------------------------------------------------------------
  // MicroNet inference
  // ------------------------------------------------------------------
  localparam int NI = 13, NH = 32;
  localparam int NIP = 16;   // inputs padded to whole SMUL8 groups

  function automatic int sat8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  // software dot product of n Q7 values via SMUL8; result in 1/1024 units
  task automatic dot_hw(input int x[], input int w[], input int n, output int acc);
    acc = 0;
    for (int g = 0; g < n; g += 4) begin
      logic [31:0] pa, pb;
      for (int i = 0; i < 4; i++) begin
        pa[8*i +: 8] = (g + i < n) ? 8'(x[g+i]) : 8'd0;
        pb[8*i +: 8] = (g + i < n) ? 8'(w[g+i]) : 8'd0;
      end
      run(OP_SMUL8, pa, pb, 5'd10);
      acc += int'(signed'(rf[10][15:0])) + int'(signed'(rf[10][31:16]))
           + int'(signed'(rf[11][15:0])) + int'(signed'(rf[11][31:16]));
    end
  endtask

  // kind 0: 13-32-1 sigmoid/ReLU, 1: 13-32-2 tanh/arg-max, 2: 13-32-2 sigmoid/softmax,
  // 3: 13-32-2 sigmoid/arg-max
  task automatic micronet(input int kind);
    int x[] = new[NI];
    int w1[][] = new[NH];
    int b1[] = new[NH];
    int nout;
    int w2[][];
    int b2[];
    int h_hw[] = new[NH];
    int o_hw[], o_sw[];
    int acc, h_sw, e_hw[2], e_sw[2], cls_hw, cls_sw;
    acc_op_e act;
    nout = (kind == 0) ? 1 : 2;
    act  = (kind == 1) ? OP_TANH : OP_SIGM;
    w2 = new[nout]; b2 = new[nout]; o_hw = new[nout]; o_sw = new[nout];
    foreach (x[i]) x[i] = $urandom_range(0, 128) - 64;            // [-2, 2]
    for (int j = 0; j < NH; j++) begin
      w1[j] = new[NI];
      foreach (w1[j][i]) w1[j][i] = $urandom_range(0, 48) - 24;     // [-0.75, 0.75]
      b1[j] = $urandom_range(0, 64) - 32;
    end
    for (int k = 0; k < nout; k++) begin
      w2[k] = new[NH];
      foreach (w2[k][j]) w2[k][j] = $urandom_range(0, 48) - 24;
      b2[k] = $urandom_range(0, 32) - 16;
    end
    // hidden layer
    for (int j = 0; j < NH; j++) begin
      int pre;
      dot_hw(x, w1[j], NI, acc);
      pre = sat8((acc + (b1[j] <<< 5)) >>> 5);
      run(act, 32'(pre), 32'd0, 5'd12);
      h_hw[j] = int'(signed'(rf[12][7:0]));
      // reference: direct products
      acc = 0;
      for (int i = 0; i < NI; i++) acc += x[i] * w1[j][i];
      h_sw = (act == OP_TANH) ? tanh_ref(sat8((acc + (b1[j] <<< 5)) >>> 5))
                              : sigm_ref(sat8((acc + (b1[j] <<< 5)) >>> 5));
      checks++;
      if (h_hw[j] != h_sw) begin
        failures++;
        $display("FAIL net %0d hidden %0d: %0d expected %0d", kind, j, h_hw[j], h_sw);
      end
    end
    // output layer
    for (int k = 0; k < nout; k++) begin
      dot_hw(h_hw, w2[k], NH, acc);
      o_hw[k] = sat8((acc + (b2[k] <<< 5)) >>> 5);
      acc = 0;
      for (int j = 0; j < NH; j++) acc += h_hw[j] * w2[k][j];
      o_sw[k] = sat8((acc + (b2[k] <<< 5)) >>> 5);
      checks++;
      if (o_hw[k] != o_sw[k]) begin
        failures++;
        $display("FAIL net %0d output %0d: %0d expected %0d", kind, k, o_hw[k], o_sw[k]);
      end
    end
    if (kind == 0) begin
      cls_hw = (o_hw[0] > 0) ? 1 : 0;     // ReLU output: positive means AF
      cls_sw = (o_sw[0] > 0) ? 1 : 0;
    end else if (kind != 2) begin
      cls_hw = (o_hw[1] > o_hw[0]) ? 1 : 0;
      cls_sw = (o_sw[1] > o_sw[0]) ? 1 : 0;
    end else begin
      // softmax numerators e^(o_k - o_max), argument limited to [-1, 0]
      int mx;
      mx = (o_hw[0] > o_hw[1]) ? o_hw[0] : o_hw[1];
      for (int k = 0; k < 2; k++) begin
        int d;
        d = o_hw[k] - mx;
        if (d < -32) d = -32;
        run(OP_EXP, 32'(d), 32'd0, 5'd13);
        e_hw[k] = int'(signed'(rf[13][7:0]));
        e_sw[k] = exp_ref(d);
        checks++;
        if (e_hw[k] != e_sw[k]) begin
          failures++;
          $display("FAIL net 2 exp %0d: %0d expected %0d", k, e_hw[k], e_sw[k]);
        end
      end
      cls_hw = (e_hw[1] > e_hw[0]) ? 1 : 0;
      cls_sw = (e_sw[1] > e_sw[0]) ? 1 : 0;
      $display("net 2 softmax: p(AF) = %f", real'(e_hw[1]) / real'(e_hw[0] + e_hw[1]));
    end
    checks++;
    if (cls_hw != cls_sw) begin
      failures++;
      $display("FAIL net %0d class %0d expected %0d", kind, cls_hw, cls_sw);
    end
    $display("net %0d: outputs %0d %0d, class %0d", kind, o_hw[0], (nout > 1) ? o_hw[1] : 0, cls_hw);
  endtask

  // ------------------------------------------------------------------
  // test sequence
  // ------------------------------------------------------------------
  initial begin
    automatic acc_op_e ops [11] = '{OP_MUL, OP_MULH, OP_MULHSU, OP_MULHU, OP_SMUL8, OP_UMUL8,
                              OP_SMUL16, OP_UMUL16, OP_TANH, OP_SIGM, OP_EXP};
    automatic logic [31:0] corners [5] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0080,
                                 32'h7FFF_FF7F, 32'h0000_0020};
    foreach (rf[i]) rf[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // part 1: back-to-back operations
    foreach (ops[k]) begin
      foreach (corners[i]) issue(ops[k], corners[i], corners[(i + 2) % 5], 5'(2 * i));
      for (int n = 0; n < 60; n++) issue(ops[k], $urandom, $urandom, 5'($urandom_range(0, 30)));
    end
    // every Q7 input through the activation and e-function units
    for (int v = -128; v < 128; v++) begin
      issue(OP_TANH, 32'(v), 32'd0, 5'd1);
      issue(OP_SIGM, 32'(v), 32'd0, 5'd2);
      if (v >= -32 && v <= 32) issue(OP_EXP, 32'(v), 32'd0, 5'd3);
    end
    drain();

    // latency of one multiplication and one e^x (accept edge to write)
    foreach (ops[k]) if (ops[k] == OP_MUL || ops[k] == OP_EXP) begin
      int lat, want;
      want = (ops[k] == OP_EXP) ? 3 : 1;   // unit latency
      issue(ops[k], 32'd5, 32'd7, 5'd4);
      #1;
      req_valid = 0;
      lat = 0;
      while (!wb_valid) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != want) begin
        failures++;
        $display("FAIL %s: write %0d cycles after accept, expected %0d", ops[k].name(), lat, want);
      end
      drain();
    end

    // part 2: MicroNet inferences
    for (int kind = 0; kind < 4; kind++) micronet(kind);

    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d writes missing", exp_q.size()); end

    // mechanisms
    foreach (ops[k]) begin
      checks++;
      if (n_op[int'(ops[k])] == 0) begin failures++; $display("FAIL %s never ran", ops[k].name()); end
    end
    checks++;
    if (n_stall == 0 || n_two == 0 || n_lin == 0 || n_ralut == 0 || n_border == 0
        || n_exp_pos == 0 || n_exp_neg == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("stall cycles %0d, two-write results %0d, tanh/sigmoid linear %0d RALUT %0d border %0d, exp x>0 %0d x<=0 %0d",
             n_stall, n_two, n_lin, n_ralut, n_border, n_exp_pos, n_exp_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
