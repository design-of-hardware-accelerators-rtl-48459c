// tanh_approx: Q7 hyperbolic tangent built from a linearization and a RALUT.
//
// tanh is odd, so the result is computed for |x| and the sign restored at
// the end: a multiplexer and an inverter take the magnitude of x, a second
// pair negates the result again when x[7] is set. For the magnitude one of
// three sources is chosen:
//   * |x| <= 14/32 (below 0.4671): linearization tanh(x) ~= x,
//   * the range addressable LUT (tanh_ralut) for larger magnitudes,
//   * the border value 1.0 when |x| does not fit the RALUT's 7-bit address,
//     which only happens for x = -4 (magnitude 128).
//
// Interface: x and y are Q7 (5 fraction bits). Purely combinational; the
// accelerator wrapper registers the result.
//
// Linearization limit, RALUT size and the sign symmetry follow the
// accelerator description; using the border value only for the one
// magnitude the RALUT cannot address is this design's choice.
module tanh_approx
  import nn_accel_pkg::*;
(
  input  q7_t x,
  output q7_t y
);

  logic       neg;
  logic [7:0] mag;     // |x|, 0..128
  q7_t        ralut_y;
  q7_t        y_mag;

  assign neg = x[7];
  assign mag = neg ? 8'(-x) : 8'(x);

  tanh_ralut u_ralut (
    .mag (mag[6:0]),
    .y   (ralut_y)
  );

  always_comb begin
    if (mag[7])                    y_mag = Q7_ONE;          // border value
    else if (mag <= 8'(TANH_LIN_MAX)) y_mag = q7_t'(mag);      // linearization
    else                           y_mag = ralut_y;         // RALUT
    y = neg ? -y_mag : y_mag;
  end

endmodule
