// exp_cordic_stage: one registered micro-rotation of the hyperbolic CORDIC.
//
// Computes, with sigma = +1 when z >= 0 and -1 otherwise,
//   x' = x + sigma * (y >>> SHIFT)
//   y' = y + sigma * (x >>> SHIFT)
//   z' = z - sigma * ATANH            (ATANH = atanh(2^-SHIFT) in Q7)
// and stores the result, together with the valid bit and the sign of the
// original operand, in a pipeline register.
//
// Interface: all values are Q7-scaled (5 fraction bits); z is one bit wider
// so that any Q7 magnitude fits. One cycle of latency, one rotation per
// cycle. Reset (active low) clears the valid bit only.
//
// The iteration equations follow the accelerator description; taking
// sigma = +1 for z = 0 is this design's choice.
module exp_cordic_stage
  import nn_accel_pkg::*;
#(
  parameter int unsigned SHIFT = 1,
  parameter q7_t         ATANH = 8'sd18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_neg,
  input  q7_t                  in_x,
  input  q7_t                  in_y,
  input  logic signed [Q7_W:0] in_z,
  output logic                 out_valid,
  output logic                 out_neg,
  output q7_t                  out_x,
  output q7_t                  out_y,
  output logic signed [Q7_W:0] out_z
);

  q7_t                  x_sh, y_sh, x_n, y_n;
  logic signed [Q7_W:0] z_n, atanh_w;

  assign x_sh    = in_x >>> SHIFT;
  assign y_sh    = in_y >>> SHIFT;
  assign atanh_w = (Q7_W+1)'(ATANH);

  always_comb begin
    if (!in_z[Q7_W]) begin   // sigma = +1
      x_n = in_x + y_sh;
      y_n = in_y + x_sh;
      z_n = in_z - atanh_w;
    end else begin           // sigma = -1
      x_n = in_x - y_sh;
      y_n = in_y - x_sh;
      z_n = in_z + atanh_w;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_neg   <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_z     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_neg <= in_neg;
        out_x   <= x_n;
        out_y   <= y_n;
        out_z   <= z_n;
      end
    end
  end

endmodule
