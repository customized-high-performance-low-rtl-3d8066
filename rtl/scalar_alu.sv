// scalar_alu: the 32-bit scalar function unit (ALU) of the TTA processor, used for
// addresses, loop counters and branch conditions.
//
// Operand A is held in a register written by a move into the operand port; a move into
// the trigger port supplies operand B and the opcode and starts the operation. The
// result register can be read in the cycle after the trigger (latency 1). An operand
// moved in the same cycle as the trigger is used by that operation.
//
// Operations: add, sub, and, or, xor, shl, shr (arithmetic), shru (logical), eq, gt
// (signed), gtu (unsigned), mul (low 32 bits). Compares return 1 or 0 and are moved to
// the boolean register to guard later moves. The document names this unit only; the
// operation set is this design's choice, modelled on a basic integer ALU.
module scalar_alu
  import tta_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    a_we,
  input  word_t   a_in,
  input  logic    t_we,
  input  alu_op_e t_op,
  input  word_t   t_in,
  output word_t   result
);

  word_t a_q, a_eff, res_d;

  always_comb begin
    a_eff = a_we ? a_in : a_q;
    unique case (t_op)
      ALU_ADD:  res_d = a_eff + t_in;
      ALU_SUB:  res_d = a_eff - t_in;
      ALU_AND:  res_d = a_eff & t_in;
      ALU_OR:   res_d = a_eff | t_in;
      ALU_XOR:  res_d = a_eff ^ t_in;
      ALU_SHL:  res_d = a_eff << t_in[4:0];
      ALU_SHR:  res_d = word_t'($signed(a_eff) >>> t_in[4:0]);
      ALU_SHRU: res_d = a_eff >> t_in[4:0];
      ALU_EQ:   res_d = word_t'(a_eff == t_in);
      ALU_GT:   res_d = word_t'($signed(a_eff) > $signed(t_in));
      ALU_GTU:  res_d = word_t'(a_eff > t_in);
      ALU_MUL:  res_d = a_eff * t_in;
      default:  res_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      result <= '0;
    end else begin
      if (a_we) a_q <= a_in;
      if (t_we) result <= res_d;
    end
  end

endmodule
