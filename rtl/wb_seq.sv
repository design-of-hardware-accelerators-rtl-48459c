// wb_seq: writes accelerator results to the register file, 32 bits at a time.
//
// A 64-bit SIMD result does not fit one 32-bit register write, so it is
// written in two consecutive writes: the low word to register rd in the
// cycle after the result is taken, the high word to rd+1 one cycle later.
// Results of one word take a single write. While the high word is pending
// the sequencer cannot take a new result (in_ready = 0).
//
// Interface: in_valid/in_rd/in_two/in_data deliver a result; it must only
// be offered while in_ready is high (checked by an assertion, since the
// units feeding it have fixed latency and cannot wait). wb_valid/wb_rd/
// wb_data form the register-file write port, one write per cycle. Reset is
// active low.
//
// The two 32-bit writes per 64-bit result follow the accelerator
// description; the register pair rd, rd+1 and the low-word-first order are
// this design's choice.
module wb_seq (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [4:0]  in_rd,
  input  logic        in_two,
  input  logic [63:0] in_data,
  output logic        wb_valid,
  output logic [4:0]  wb_rd,
  output logic [31:0] wb_data
);

  logic        pend;
  logic [4:0]  pend_rd;
  logic [31:0] pend_data;

  assign in_ready = !pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      pend_rd   <= '0;
      pend_data <= '0;
      wb_valid  <= 1'b0;
      wb_rd     <= '0;
      wb_data   <= '0;
    end else if (in_valid && in_ready) begin
      wb_valid  <= 1'b1;
      wb_rd     <= in_rd;
      wb_data   <= in_data[31:0];
      pend      <= in_two;
      pend_rd   <= in_rd + 5'd1;
      pend_data <= in_data[63:32];
    end else if (pend) begin
      wb_valid  <= 1'b1;
      wb_rd     <= pend_rd;
      wb_data   <= pend_data;
      pend      <= 1'b0;
    end else begin
      wb_valid  <= 1'b0;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> in_ready)
    else $error("wb_seq: result offered while the high word is pending");

endmodule
