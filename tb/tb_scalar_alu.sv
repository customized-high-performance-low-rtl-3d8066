// tb_scalar_alu: self-checking test of the scalar ALU. Every operation is run on random
// and corner-case operands, with operand A written before or together with the
// trigger; results are compared with a reference model and the one-cycle latency is
// checked.
module tb_scalar_alu;
  import tta_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  logic a_we, t_we;
  word_t a_in, t_in, result;
  alu_op_e t_op;
  int checks = 0, failures = 0;

  scalar_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_op(alu_op_e op, word_t a, word_t b);
    int sa, sb;
    sa = a; sb = b;
    case (op)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a - b;
      ALU_AND:  return a & b;
      ALU_OR:   return a | b;
      ALU_XOR:  return a ^ b;
      ALU_SHL:  return a << (b % 32);
      ALU_SHR:  return sa >>> (b % 32);
      ALU_SHRU: return a >> (b % 32);
      ALU_EQ:   return (a == b) ? 1 : 0;
      ALU_GT:   return (sa > sb) ? 1 : 0;
      ALU_GTU:  return (a > b) ? 1 : 0;
      ALU_MUL:  return word_t'(longint'(a) * longint'(b));
      default:  return 0;
    endcase
  endfunction

  task automatic run(alu_op_e op, word_t a, word_t b, bit same);
    word_t prev_res;
    @(negedge clk);
    a_we = 1; a_in = a;
    if (!same) begin @(negedge clk); a_we = 0; a_in = '0; end
    t_we = 1; t_op = op; t_in = b;
    prev_res = result;
    #1 checks++;
    if (result !== prev_res) failures++;
    @(negedge clk);
    t_we = 0; a_we = 0;
    checks++;
    if (result !== ref_op(op, a, b)) begin
      failures++;
      $display("%s %h %h: got %h exp %h", op.name(), a, b, result, ref_op(op, a, b));
    end
  endtask

  initial begin
    word_t corner [4] = '{32'h0, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff};
    a_we = 0; t_we = 0; a_in = 0; t_in = 0; t_op = ALU_ADD;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int op = 0; op <= int'(ALU_MUL); op++) begin
      for (int r = 0; r < 40; r++) run(alu_op_e'(op), $urandom, $urandom, r[0]);
      foreach (corner[i]) foreach (corner[j]) run(alu_op_e'(op), corner[i], corner[j], 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
