// tb_gcu: self-checking test of the global control unit on its own. A cycle-level
// model written here follows the fetch address, the execute flag, jumps (one delay
// slot), calls (return address after the delay slot), the boolean register and the
// lock, under random stimulus.
module tb_gcu;
  import tta_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  logic lock = 0, t_we = 0, b_we = 0, b_in = 0;
  gcu_op_e t_op = GCU_JUMP;
  word_t t_in = '0;
  logic imem_re, exec, guard;
  pc_t pc;
  word_t ra;
  int checks = 0, failures = 0;
  int n_jump = 0, n_call = 0, n_lock = 0;

  gcu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pc_t   m_pc;
  logic  m_valid, m_guard;
  word_t m_ra;

  task automatic compare();
    checks++;
    if (pc !== m_pc || exec !== (m_valid && !lock) || ra !== m_ra || guard !== m_guard ||
        imem_re !== !lock) begin
      failures++;
      $display("pc %0d/%0d exec %b ra %0d/%0d guard %b/%b", pc, m_pc, exec, ra, m_ra, guard, m_guard);
    end
  endtask

  initial begin
    m_pc = 0; m_valid = 0; m_guard = 0; m_ra = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      lock = ($urandom_range(0, 9) < 2);
      t_we = 0; b_we = 0;
      if (!lock && m_valid) begin
        t_we = ($urandom_range(0, 9) < 2);
        b_we = ($urandom_range(0, 9) < 3);
      end
      t_op = gcu_op_e'($urandom_range(0, 1));
      t_in = $urandom;
      b_in = $urandom_range(0, 1);
      #1 compare();
      @(posedge clk);
      if (lock) n_lock++;
      if (!lock) begin
        m_valid = 1;
        if (t_we) begin
          if (t_op == GCU_CALL) begin m_ra = word_t'(m_pc) + 1; n_call++; end
          else n_jump++;
          m_pc = pc_t'(t_in);
        end else m_pc = m_pc + 1;
        if (b_we) m_guard = b_in;
      end
      @(negedge clk);
    end
    checks++;
    if (n_jump == 0 || n_call == 0 || n_lock == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
