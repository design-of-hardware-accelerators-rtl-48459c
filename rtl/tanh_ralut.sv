// tanh_ralut: range addressable look-up table for the saturating part of tanh.
//
// Instead of one entry per input value, the table is organised by output
// value: its 18 entries are the equidistant Q7 outputs 15/32 .. 32/32, which
// together cover every Q7 number between the end of the linear region
// (0.4671) and the asymptote 1. Each entry k >= 1 is addressed by a range
// of input magnitudes that starts at TANH_RALUT_X[k-1]; the entry whose
// range holds |x| is selected by comparing |x| against all 17 range starts
// in parallel and counting how many it has reached.
//
// Interface: mag is the unsigned magnitude |x| in Q7 LSBs (only meaningful
// for |x| > 14/32, the caller handles the linear region); y is the
// non-negative Q7 result 15/32 .. 1. Purely combinational.
//
// The 18-entry organisation and the covered range follow the accelerator
// description; the placement of the range starts (nearest output value,
// computed in nn_accel_pkg) is this design's choice.
module tanh_ralut
  import nn_accel_pkg::*;
(
  input  logic [6:0] mag,
  output q7_t        y
);

  logic [4:0] idx;

  always_comb begin
    idx = '0;
    for (int k = 0; k < RALUT_ENTRIES - 1; k++) begin
      if (mag >= TANH_RALUT_X[k]) idx = 5'(k + 1);
    end
    y = q7_t'(RALUT_Y0) + q7_t'(idx);
  end

endmodule
