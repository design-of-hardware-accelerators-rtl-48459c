// simd_mul: multiplier with 8-bit SIMD, 16-bit SIMD and 32x32 modes.
//
// The unit holds four 8-bit multipliers (simd_m8_array, "M8"), two 16-bit
// multipliers ("M16") and one extra 16-bit multiplier, and reuses them
// across modes instead of having one multiplier per data type:
//   MM_SIMD8  : the four M8 multiply the four byte pairs of a and b;
//               result = {p3, p2, p1, p0}, four 16-bit products.
//   MM_SIMD16 : the two M16 multiply the two halfword pairs;
//               result = {p1, p0}, two 32-bit products.
//   MM_MUL32  : a = aH:aL, b = bH:bL (16-bit halves). The M8 array,
//               combined into one 16x16 multiplier, gives aL*bL, the M16
//               give aH*bL and aL*bH, the extra M16 gives aH*bH, and
//               result = aH*bH*2^32 + (aH*bL + aL*bH)*2^16 + aL*bL,
//               formed by shifters and a three-input adder.
// All multipliers are signed with one extension bit, so a_signed/b_signed
// select signed or unsigned operands in every mode (RV32M MUL/MULH/MULHSU/
// MULHU and the SMUL8/UMUL8/SMUL16/UMUL16 SIMD operations).
//
// Interface: in_valid/mode/a_signed/b_signed/a/b in; out_valid/result
// (64 bits) one clock later, one operation per clock. Reset is active low
// and clears out_valid.
//
// The multiplier counts, their reuse and the 64-bit result follow the
// accelerator description; the assignment of partial products to the
// multipliers and the single output register are this design's choice.
module simd_mul
  import nn_accel_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  mul_mode_e   mode,
  input  logic        a_signed,
  input  logic        b_signed,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [63:0] result
);

  // ---------------- 8-bit multipliers ----------------
  logic signed [17:0] m8_lane [4];
  logic signed [33:0] m8_comb;

  simd_m8_array u_m8 (
    .combine  (mode == MM_MUL32),
    .a_signed (mode == MM_MUL32 ? 1'b0 : a_signed),
    .b_signed (mode == MM_MUL32 ? 1'b0 : b_signed),
    .a        (a),
    .b        (b),
    .lane     (m8_lane),
    .comb     (m8_comb)
  );

  // ---------------- 16-bit multipliers ----------------
  logic [15:0]        m16_a [3];
  logic [15:0]        m16_b [3];
  logic               m16_sa [3];
  logic               m16_sb [3];
  logic signed [33:0] m16_p [3];

  always_comb begin
    if (mode == MM_MUL32) begin
      m16_a[0] = a[31:16]; m16_b[0] = b[15:0];  m16_sa[0] = a_signed; m16_sb[0] = 1'b0;
      m16_a[1] = a[15:0];  m16_b[1] = b[31:16]; m16_sa[1] = 1'b0;     m16_sb[1] = b_signed;
    end else begin
      m16_a[0] = a[15:0];  m16_b[0] = b[15:0];  m16_sa[0] = a_signed; m16_sb[0] = b_signed;
      m16_a[1] = a[31:16]; m16_b[1] = b[31:16]; m16_sa[1] = a_signed; m16_sb[1] = b_signed;
    end
    // extra multiplier, used by the 32x32 mode only
    m16_a[2] = a[31:16]; m16_b[2] = b[31:16]; m16_sa[2] = a_signed; m16_sb[2] = b_signed;
  end

  for (genvar i = 0; i < 3; i++) begin : g_m16
    logic signed [16:0] xa, xb;
    assign xa       = {m16_sa[i] & m16_a[i][15], m16_a[i]};
    assign xb       = {m16_sb[i] & m16_b[i][15], m16_b[i]};
    assign m16_p[i] = 34'(xa * xb);
  end

  // ---------------- result assembly ----------------
  logic [63:0] res_d;
  logic [63:0] outer;

  // aL*bL is unsigned and below 2^32, so it fills the low word alone.
  assign outer = {m16_p[2][31:0], m8_comb[31:0]};

  always_comb begin
    unique case (mode)
      MM_SIMD8:  res_d = {m8_lane[3][15:0], m8_lane[2][15:0],
                          m8_lane[1][15:0], m8_lane[0][15:0]};
      MM_SIMD16: res_d = {m16_p[1][31:0], m16_p[0][31:0]};
      MM_MUL32:  res_d = outer + (64'(m16_p[0]) << 16) + (64'(m16_p[1]) << 16);
      default:   res_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) result <= res_d;
    end
  end

endmodule
