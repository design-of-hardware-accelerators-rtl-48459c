// act_tanh_sigmoid: combined tanh / sigmoid activation accelerator.
//
// One tanh core serves both functions. For tanh the Q7 input goes straight
// to the core. For the sigmoid the input is first halved by an arithmetic
// right shift, the core computes tanh(x/2) and sigmoid_post adds one and
// halves the result. The input shift and the output selection sit in this
// module; the core and the sigmoid stage are shared.
//
// Interface: in_valid/x/sel_sigmoid give one Q7 operand per cycle;
// out_valid/y return its result one clock later (one output register,
// throughput one operand per cycle). Reset is active low and clears only
// out_valid.
//
// The sharing of the tanh core and the place of the shifts follow the
// accelerator description; the single output register is this design's
// choice.
module act_tanh_sigmoid
  import nn_accel_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic sel_sigmoid,   // 0: tanh, 1: sigmoid
  input  q7_t  x,
  output logic out_valid,
  output q7_t  y
);

  q7_t core_in, core_out, sig_out, y_d;

  assign core_in = sel_sigmoid ? (x >>> 1) : x;

  tanh_approx u_tanh (
    .x (core_in),
    .y (core_out)
  );

  sigmoid_post u_sig (
    .t (core_out),
    .s (sig_out)
  );

  assign y_d = sel_sigmoid ? sig_out : core_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= y_d;
    end
  end

endmodule
