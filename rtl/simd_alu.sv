// simd_alu: the 32-lane x 32-bit SIMD function unit (ALU_SIMD) of the TTA processor.
//
// It holds two operand registers, A and C, and is started by a move into its trigger
// port, which carries operand B and the opcode. The lane-wise result is registered:
// an operation triggered in cycle t can be read from `result` in cycle t+1 (latency 1).
// An operand moved in the same cycle as the trigger is used by that operation.
//
// Operations, per lane i (signed 32-bit integers unless stated):
//   add, sub, and, or, xor        A op B
//   shl, shr                      A << B[4:0], A >>> B[4:0] (arithmetic)
//   abs, clz                      |B|, count of leading zeros of B (32 for zero)
//   eq, gt, lt                    1 if A op B, else 0
//   max, min                      max/min(A, B)
//   cas   conditional add/sub     C < 0 ? A - B : A + B   (CORDIC iteration step)
//   mulsh multiply-shift          (A * B) >>> C[5:0] on the 64-bit product, low 32 bits
//   sel   conditional select      C != 0 ? A : B
// The list of operations follows the document (its basic set plus the conditional
// add/subtract, count-leading-zeros, multiply-shift and select instructions). Which
// operand feeds which input, the 0/1 compare results and the arithmetic shift are
// this design's choices.
module simd_alu
  import tta_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     a_we,     // operand A write
  input  vec_t     a_in,
  input  logic     c_we,     // operand C write
  input  vec_t     c_in,
  input  logic     t_we,     // trigger: start operation t_op with operand B = t_in
  input  simd_op_e t_op,
  input  vec_t     t_in,
  output vec_t     result
);

  vec_t a_q, c_q;
  vec_t a_eff, c_eff, res_d;

  function automatic logic [5:0] clz32(logic [31:0] x);
    logic [5:0] n;
    n = 6'd32;
    for (int b = 0; b < 32; b++)
      if (x[b]) n = 6'(31 - b);
    return n;
  endfunction

  function automatic logic [31:0] lane_op(simd_op_e op, logic signed [31:0] a,
                                          logic signed [31:0] b, logic signed [31:0] c);
    logic signed [63:0] prod;
    prod = 64'(a) * 64'(b);
    unique case (op)
      V_ADD:   return a + b;
      V_SUB:   return a - b;
      V_AND:   return a & b;
      V_OR:    return a | b;
      V_XOR:   return a ^ b;
      V_SHL:   return a << b[4:0];
      V_SHR:   return a >>> b[4:0];
      V_ABS:   return (b < 0) ? -b : b;
      V_EQ:    return {31'd0, a == b};
      V_GT:    return {31'd0, a > b};
      V_LT:    return {31'd0, a < b};
      V_MAX:   return (a > b) ? a : b;
      V_MIN:   return (a < b) ? a : b;
      V_CAS:   return c[31] ? a - b : a + b;
      V_MULSH: return 32'(prod >>> c[5:0]);
      V_CLZ:   return {26'd0, clz32(b)};
      V_SEL:   return (c != 0) ? a : b;
      default: return '0;
    endcase
  endfunction

  always_comb begin
    a_eff = a_we ? a_in : a_q;
    c_eff = c_we ? c_in : c_q;
    for (int i = 0; i < LANES; i++)
      res_d[i*EW +: EW] = lane_op(t_op, a_eff[i*EW +: EW], t_in[i*EW +: EW], c_eff[i*EW +: EW]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      c_q    <= '0;
      result <= '0;
    end else begin
      if (a_we) a_q <= a_in;
      if (c_we) c_q <= c_in;
      if (t_we) result <= res_d;
    end
  end

endmodule
