// wb_seq_tb: checks the write-back sequencer.
//
// Offers a mix of one-word and two-word results, each as soon as in_ready
// allows. Every one-word result must produce one write of its low word to
// rd; every two-word result must produce two writes on consecutive cycles,
// low word to rd and high word to rd+1, with in_ready low in between.
module wb_seq_tb;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready, in_two = 0;
  logic [4:0]  in_rd = '0;
  logic [63:0] in_data = '0;
  logic        wb_valid;
  logic [4:0]  wb_rd;
  logic [31:0] wb_data;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  wb_seq dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [4:0] rd; logic [31:0] data; bit follows; } wr_t;
  wr_t exp_q[$];
  int  n_two = 0, n_stall = 0;
  int  cyc = 0, last_wr = -10;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && wb_valid) begin
      wr_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected write rd=%0d", wb_rd);
      end else begin
        e = exp_q.pop_front();
        if (wb_rd != e.rd || wb_data != e.data) begin
          failures++;
          $display("FAIL write rd=%0d data=%h expected rd=%0d data=%h", wb_rd, wb_data, e.rd, e.data);
        end
        if (e.follows) begin
          checks++;
          if (cyc != last_wr + 1) begin
            failures++;
            $display("FAIL high word written %0d cycles after the low word", cyc - last_wr);
          end
        end
      end
      last_wr = cyc;
    end
  end

  initial begin
    logic [63:0] d;
    logic [4:0]  rd;
    bit          two;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      d   = {$urandom, $urandom};
      rd  = 5'($urandom);
      two = $urandom_range(0, 1) == 1;
      #1;
      while (!in_ready) begin n_stall++; @(posedge clk); #1; end
      in_valid <= 1; in_rd <= rd; in_two <= two; in_data <= d;
      exp_q.push_back('{rd, d[31:0], 1'b0});
      if (two) begin exp_q.push_back('{rd + 5'd1, d[63:32], 1'b1}); n_two++; end
      @(posedge clk);
      in_valid <= 0;
      if ($urandom_range(0, 3) == 0) @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d writes missing", exp_q.size()); end
    checks++;
    if (n_two == 0 || n_stall == 0) begin failures++; $display("FAIL two-word results %0d, stalls %0d", n_two, n_stall); end
    $display("two-word results %0d, cycles with in_ready low %0d", n_two, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
