// sigmoid_post: output stage that turns tanh(x/2) into the sigmoid S(x).
//
// Uses S(x) = (tanh(x/2) + 1) / 2: one is added to the Q7 tanh value and
// the sum is shifted right by one bit. The input halving is done by the
// caller (act_tanh_sigmoid), so this stage holds only the adder and the
// shift.
//
// Interface: t is tanh(x/2) in Q7 (within [-1, 1]); s is S(x) in Q7
// (within [0, 1]). Purely combinational. The relation and the split into an
// add-and-shift stage follow the accelerator description.
module sigmoid_post
  import nn_accel_pkg::*;
(
  input  q7_t t,
  output q7_t s
);

  logic signed [Q7_W:0] sum;   // one guard bit for t + 1

  assign sum = {t[Q7_W-1], t} + (Q7_W+1)'(Q7_ONE);
  assign s   = q7_t'(sum >>> 1);

endmodule
