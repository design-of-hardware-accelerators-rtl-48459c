// simd_m8_array: four 8-bit multipliers that work as SIMD lanes or as one
// 16x16 multiplier.
//
// SIMD mode (combine = 0): lane i multiplies a[8i+7:8i] by b[8i+7:8i].
// Combined mode (combine = 1): the low halfwords p = a[15:0], q = b[15:0]
// are split into bytes, p = pH*2^8 + pL and q = qH*2^8 + qL, and
//   p*q = pH*qH*2^16 + (pH*qL + pL*qH)*2^8 + pL*qL,
// so each of the four multipliers computes one byte product and a
// three-input adder sums {pH*qH, pL*qL} (which do not overlap) with the
// two shifted cross products.
//
// Each multiplier is 9x9 signed; an operand byte is sign- or zero-extended
// to 9 bits, so the same hardware does signed and unsigned products. In
// combined mode only the upper bytes carry the operand's sign.
//
// Interface: a_signed/b_signed choose the operand types, lane[i] is the
// 8x8 product of lane i (its low 16 bits are the SIMD result), comb is the
// 16x16 product (valid in combined mode). Purely combinational.
//
// Four 8-bit multipliers, the decomposition and the three-input adder
// follow the accelerator description; 9x9 signed multipliers for mixed
// signedness are this design's choice.
module simd_m8_array (
  input  logic                combine,
  input  logic                a_signed,
  input  logic                b_signed,
  input  logic [31:0]         a,
  input  logic [31:0]         b,
  output logic signed [17:0]  lane [4],
  output logic signed [33:0]  comb
);

  logic [7:0] opa [4];
  logic [7:0] opb [4];
  logic       sga [4];
  logic       sgb [4];

  always_comb begin
    if (combine) begin
      // lane 0: pL*qL, lane 1: pL*qH, lane 2: pH*qL, lane 3: pH*qH
      opa[0] = a[7:0];  opb[0] = b[7:0];  sga[0] = 1'b0;     sgb[0] = 1'b0;
      opa[1] = a[7:0];  opb[1] = b[15:8]; sga[1] = 1'b0;     sgb[1] = b_signed;
      opa[2] = a[15:8]; opb[2] = b[7:0];  sga[2] = a_signed; sgb[2] = 1'b0;
      opa[3] = a[15:8]; opb[3] = b[15:8]; sga[3] = a_signed; sgb[3] = b_signed;
    end else begin
      for (int i = 0; i < 4; i++) begin
        opa[i] = a[8*i +: 8];
        opb[i] = b[8*i +: 8];
        sga[i] = a_signed;
        sgb[i] = b_signed;
      end
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_m8
    logic signed [8:0] xa, xb;
    assign xa      = {sga[i] & opa[i][7], opa[i]};
    assign xb      = {sgb[i] & opb[i][7], opb[i]};
    assign lane[i] = xa * xb;
  end

  // Three-input adder: {pH*qH, pL*qL} + (pL*qH << 8) + (pH*qL << 8).
  // pL*qL is unsigned and below 2^16, so it fills the low 16 bits alone.
  logic signed [33:0] outer;
  assign outer = {lane[3][17:0], lane[0][15:0]};
  assign comb  = outer + (34'(lane[1]) <<< 8) + (34'(lane[2]) <<< 8);

endmodule
