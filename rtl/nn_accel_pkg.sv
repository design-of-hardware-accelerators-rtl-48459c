// Shared types and constants of the Q7 neural-network accelerators.
//
// Number format: every accelerator works on the 8-bit signed fixed-point
// type "Q7" with one sign bit, two integer bits and five fraction bits
// (bit weights -4, 2, 1, 1/2 .. 1/32), so one LSB is 1/32 and the range is
// [-4, 3.96875]. This format is the one the accelerators are defined for.
//
// The constant tables below are derived from the formulas given next to
// them; they are written out because they are small and must be
// synthesizable.
package nn_accel_pkg;

  // Q7 value: 8-bit two's complement, 5 fraction bits.
  localparam int unsigned Q7_W    = 8;
  localparam int unsigned Q7_FRAC = 5;
  typedef logic signed [Q7_W-1:0] q7_t;

  localparam q7_t Q7_ONE     = q7_t'(1 << Q7_FRAC);   // +1.0

  // ---------------------------------------------------------------------
  // tanh approximation
  // ---------------------------------------------------------------------
  // Linear region tanh(x) ~= x holds within one LSB (1/32) for
  // |x| < 0.4671, i.e. for |x| <= 14/32 in Q7.
  localparam int unsigned TANH_LIN_MAX = 14;

  // The range addressable LUT holds 18 equidistant output values
  // y = 15/32 .. 32/32 (0.4671 .. 1). Entry k (k = 1..17) starts at the
  // input magnitude TANH_RALUT_X[k-1] = ceil(32 * atanh((y_k - 1/64)))
  // with y_k = (15+k)/32, so that each input gets the nearest of the 18
  // values. Entry 0 (y = 15/32) covers 15/32 <= |x| < 17/32.
  localparam int unsigned RALUT_ENTRIES = 18;
  localparam int unsigned RALUT_Y0      = 15;
  localparam logic [6:0] TANH_RALUT_X [RALUT_ENTRIES-1] = '{
    7'd17, 7'd19, 7'd20, 7'd22, 7'd23, 7'd25, 7'd27, 7'd28, 7'd31,
    7'd33, 7'd35, 7'd38, 7'd42, 7'd46, 7'd52, 7'd60, 7'd78
  };

  // ---------------------------------------------------------------------
  // e-function (hyperbolic CORDIC)
  // ---------------------------------------------------------------------
  localparam int unsigned CORDIC_STAGES = 3;
  // atanh(2^-i) in Q7 for i = 1..3: round(32 * atanh(2^-i)).
  localparam q7_t CORDIC_ATANH [CORDIC_STAGES] = '{8'sd18, 8'sd8, 8'sd4};
  // Start value x_1 = P' = 1.2075 in Q7: round(32 * 1.2075).
  localparam q7_t CORDIC_P = 8'sd39;

  // ---------------------------------------------------------------------
  // Accelerator operations
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    OP_MUL    = 4'd0,  // 32x32, low word
    OP_MULH   = 4'd1,  // 32x32 signed x signed, high word
    OP_MULHSU = 4'd2,  // 32x32 signed x unsigned, high word
    OP_MULHU  = 4'd3,  // 32x32 unsigned x unsigned, high word
    OP_SMUL8  = 4'd4,  // four signed 8x8 products, 64-bit result
    OP_UMUL8  = 4'd5,  // four unsigned 8x8 products, 64-bit result
    OP_SMUL16 = 4'd6,  // two signed 16x16 products, 64-bit result
    OP_UMUL16 = 4'd7,  // two unsigned 16x16 products, 64-bit result
    OP_TANH   = 4'd8,  // Q7 tanh of rs1[7:0]
    OP_SIGM   = 4'd9,  // Q7 sigmoid of rs1[7:0]
    OP_EXP    = 4'd10  // Q7 e^x of rs1[7:0], x in [-1, 1]
  } acc_op_e;

  // Modes of the SIMD / 32-bit multiplier.
  typedef enum logic [1:0] {
    MM_MUL32  = 2'd0,
    MM_SIMD8  = 2'd1,
    MM_SIMD16 = 2'd2
  } mul_mode_e;

endpackage
