// nn_accel_top: Q7 neural-network accelerator subsystem of a RISC-V core.
//
// Speeds up the inference of small quantized (Q7) fully connected networks
// by offering the core four kinds of operations:
//   * multiplication: RV32M MUL/MULH/MULHSU/MULHU and the 8- and 16-bit
//     SIMD multiplications SMUL8/UMUL8/SMUL16/UMUL16, all in one shared
//     multiplier (simd_mul),
//   * tanh and sigmoid of a Q7 value (act_tanh_sigmoid),
//   * e^x of a Q7 value in [-1, 1] for softmax (exp_cordic).
// ReLU is cheap in software and has no unit here.
//
// Operation: the core presents an operation with req_valid, req_op
// (nn_accel_pkg::acc_op_e), the operands req_rs1/req_rs2 and the
// destination register req_rd. The subsystem handles one operation at a
// time: req_ready is low while an operation is in flight, so a following
// request stalls. The selected unit computes the result (1 cycle for the
// multiplier and tanh/sigmoid, 3 cycles for the e-function pipeline) and
// wb_seq writes it back through wb_valid/wb_rd/wb_data: one write for
// 32-bit results (MUL* low/high word, Q7 results sign-extended), two
// writes (rd then rd+1) for the 64-bit SIMD results. Q7 operands are
// taken from req_rs1[7:0].
//
// Timing: for a request accepted at clock edge t, wb_valid is high after
// edge t+L (L = unit latency: 1, or 3 for e^x) and the register file takes
// the (first) word at edge t+L+1; a second word follows one cycle later.
// req_ready is high again while the last word is on the write port, so
// the next request can be taken at the same edge as that write. Reset is
// active low and asynchronous.
//
// The units and their functions follow the accelerator description; the
// request/write-back interface, the operation encoding and the one-at-a-
// time issue are this design's choices, because the core integration is
// not specified in detail.
module nn_accel_top
  import nn_accel_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // request from the core
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [3:0]  req_op,
  input  logic [31:0] req_rs1,
  input  logic [31:0] req_rs2,
  input  logic [4:0]  req_rd,
  // register-file write port
  output logic        wb_valid,
  output logic [4:0]  wb_rd,
  output logic [31:0] wb_data
);

  typedef enum logic [1:0] {
    UNIT_MUL = 2'd0,
    UNIT_ACT = 2'd1,
    UNIT_EXP = 2'd2
  } unit_e;

  // ---------------- request decode ----------------
  acc_op_e   op;
  unit_e     dec_unit;
  mul_mode_e dec_mode;
  logic      dec_sa, dec_sb, dec_hi, dec_two;

  assign op = acc_op_e'(req_op);

  always_comb begin
    dec_unit = UNIT_MUL;
    dec_mode = MM_MUL32;
    dec_sa   = 1'b0;
    dec_sb   = 1'b0;
    dec_hi   = 1'b0;
    dec_two  = 1'b0;
    case (op)
      OP_MUL:    begin dec_sa = 1'b1; dec_sb = 1'b1; end
      OP_MULH:   begin dec_sa = 1'b1; dec_sb = 1'b1; dec_hi = 1'b1; end
      OP_MULHSU: begin dec_sa = 1'b1; dec_hi = 1'b1; end
      OP_MULHU:  begin dec_hi = 1'b1; end
      OP_SMUL8:  begin dec_mode = MM_SIMD8;  dec_sa = 1'b1; dec_sb = 1'b1; dec_two = 1'b1; end
      OP_UMUL8:  begin dec_mode = MM_SIMD8;  dec_two = 1'b1; end
      OP_SMUL16: begin dec_mode = MM_SIMD16; dec_sa = 1'b1; dec_sb = 1'b1; dec_two = 1'b1; end
      OP_UMUL16: begin dec_mode = MM_SIMD16; dec_two = 1'b1; end
      OP_TANH:   dec_unit = UNIT_ACT;
      OP_SIGM:   dec_unit = UNIT_ACT;
      OP_EXP:    dec_unit = UNIT_EXP;
      default:   ;
    endcase
  end

  // ---------------- issue control ----------------
  logic       busy;         // an operation is in a unit
  logic [4:0] cur_rd;
  logic       cur_hi, cur_two;
  logic       seq_ready;
  logic       issue;

  assign req_ready = !busy && seq_ready;
  assign issue     = req_valid && req_ready;

  // ---------------- units ----------------
  logic        mul_ov, act_ov, exp_ov;
  logic [63:0] mul_res;
  q7_t         act_res, exp_res;

  simd_mul u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (issue && dec_unit == UNIT_MUL),
    .mode      (dec_mode),
    .a_signed  (dec_sa),
    .b_signed  (dec_sb),
    .a         (req_rs1),
    .b         (req_rs2),
    .out_valid (mul_ov),
    .result    (mul_res)
  );

  act_tanh_sigmoid u_act (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (issue && dec_unit == UNIT_ACT),
    .sel_sigmoid (op == OP_SIGM),
    .x           (q7_t'(req_rs1[7:0])),
    .out_valid   (act_ov),
    .y           (act_res)
  );

  exp_cordic u_exp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (issue && dec_unit == UNIT_EXP),
    .phi       (q7_t'(req_rs1[7:0])),
    .out_valid (exp_ov),
    .y         (exp_res)
  );

  // ---------------- result selection and write-back ----------------
  logic        res_valid;
  logic [63:0] res_data;

  assign res_valid = mul_ov || act_ov || exp_ov;

  always_comb begin
    if (mul_ov)      res_data = cur_hi ? {32'b0, mul_res[63:32]} : mul_res;
    else if (act_ov) res_data = 64'(signed'(act_res));
    else             res_data = 64'(signed'(exp_res));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cur_rd  <= '0;
      cur_hi  <= 1'b0;
      cur_two <= 1'b0;
    end else if (issue) begin
      busy    <= 1'b1;
      cur_rd  <= req_rd;
      cur_hi  <= dec_hi;
      cur_two <= dec_two;
    end else if (res_valid) begin
      busy    <= 1'b0;
    end
  end

  wb_seq u_wb (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (res_valid),
    .in_ready (seq_ready),
    .in_rd    (cur_rd),
    .in_two   (cur_two),
    .in_data  (res_data),
    .wb_valid (wb_valid),
    .wb_rd    (wb_rd),
    .wb_data  (wb_data)
  );

  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({mul_ov, act_ov, exp_ov}))
    else $error("nn_accel_top: two units returned a result in the same cycle");

endmodule
