// exp_cordic: Q7 e-function accelerator based on a hyperbolic CORDIC.
//
// The CORDIC rotates the start vector (x, y) = (P', 0), P' = 1.2075, by the
// angle |phi| in three micro-rotations (i = 1, 2, 3). Afterwards
// x ~= cosh(|phi|) and y ~= sinh(|phi|), and
//   e^phi ~= x + y   for phi > 0,
//   e^phi ~= x - y   for phi <= 0,
// because cosh is even and sinh is odd. The angle table atanh(2^-i) is a
// three-entry constant table. Each micro-rotation is one pipeline stage
// (exp_cordic_stage), so the unit accepts one operand per clock and
// returns its result STAGES clocks later. Only inputs in [-1, 1] are
// meant to be used; larger magnitudes give a bounded but inaccurate value.
// With three stages the largest error over [-1, 1] is about 0.25
// (e.g. e^1 is returned as 79/32 = 2.47).
//
// Interface: in_valid/phi (Q7) in, out_valid/y (Q7) out after 3 cycles.
// Reset is active low and clears the valid bits.
//
// Equations, start values, the three stages and the three-step pipeline
// follow the accelerator description; running the CORDIC on |phi|, which
// makes the description's x - y rule for phi <= 0 exact, is this design's
// reading.
module exp_cordic
  import nn_accel_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  q7_t  phi,
  output logic out_valid,
  output q7_t  y
);

  localparam int unsigned N = CORDIC_STAGES;

  logic                 v   [N+1];
  logic                 neg [N+1];
  q7_t                  xs  [N+1];
  q7_t                  ys  [N+1];
  logic signed [Q7_W:0] zs  [N+1];

  logic signed [Q7_W:0] phi_w;

  assign phi_w  = {phi[Q7_W-1], phi};
  assign v[0]   = in_valid;
  assign neg[0] = phi[Q7_W-1] || (phi == '0);   // phi <= 0
  assign xs[0]  = CORDIC_P;
  assign ys[0]  = '0;
  assign zs[0]  = phi[Q7_W-1] ? -phi_w : phi_w;

  for (genvar i = 0; i < N; i++) begin : g_stage
    exp_cordic_stage #(
      .SHIFT (i + 1),
      .ATANH (CORDIC_ATANH[i])
    ) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v[i]),
      .in_neg    (neg[i]),
      .in_x      (xs[i]),
      .in_y      (ys[i]),
      .in_z      (zs[i]),
      .out_valid (v[i+1]),
      .out_neg   (neg[i+1]),
      .out_x     (xs[i+1]),
      .out_y     (ys[i+1]),
      .out_z     (zs[i+1])
    );
  end

  assign out_valid = v[N];
  assign y         = neg[N] ? (xs[N] - ys[N]) : (xs[N] + ys[N]);

endmodule
