// tb_simd_alu: self-checking test of the SIMD ALU. For every operation it drives
// random and corner-case vectors (with operands written both ahead of and together
// with the trigger), compares all 32 lanes with a reference model written here, and
// checks the one-cycle latency: the result register changes only at the edge that
// follows the trigger.
module tb_simd_alu;
  import tta_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  logic a_we, c_we, t_we;
  vec_t a_in, c_in, t_in, result;
  simd_op_e t_op;
  int checks = 0, failures = 0;

  simd_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_lane(simd_op_e op, int a, int b, int c);
    longint p;
    int n;
    case (op)
      V_ADD: return a + b;
      V_SUB: return a - b;
      V_AND: return a & b;
      V_OR:  return a | b;
      V_XOR: return a ^ b;
      V_SHL: return a << (b & 31);
      V_SHR: return a >>> (b & 31);
      V_ABS: return (b < 0) ? -b : b;
      V_EQ:  return (a == b) ? 1 : 0;
      V_GT:  return (a > b) ? 1 : 0;
      V_LT:  return (a < b) ? 1 : 0;
      V_MAX: return (a > b) ? a : b;
      V_MIN: return (a < b) ? a : b;
      V_CAS: return (c < 0) ? a - b : a + b;
      V_MULSH: begin p = longint'(a) * longint'(b); p = p >>> (c & 63); return p[31:0]; end
      V_CLZ: begin
        n = 0;
        while (n < 32 && b[31-n] == 1'b0) n++;
        return n;
      end
      V_SEL: return (c != 0) ? a : b;
      default: return 0;
    endcase
  endfunction

  function automatic vec_t rand_vec(int mode);
    vec_t v;
    for (int i = 0; i < LANES; i++) begin
      case (mode)
        0: v[i*EW +: EW] = $urandom;
        1: v[i*EW +: EW] = $urandom_range(0, 40) - 20;
        2: v[i*EW +: EW] = (i % 3 == 0) ? 32'h8000_0000 : (i % 3 == 1) ? 32'h7fff_ffff : 32'h0;
        default: v[i*EW +: EW] = $urandom >> $urandom_range(0, 31);
      endcase
    end
    return v;
  endfunction

  task automatic run_op(simd_op_e op, vec_t a, vec_t b, vec_t c, bit same_cycle);
    vec_t prev_res, expv;
    if (!same_cycle) begin
      @(negedge clk);
      a_we = 1; a_in = a; c_we = 1; c_in = c;
      @(negedge clk);
      a_we = 0; c_we = 0; a_in = '0; c_in = '0;
    end else begin
      @(negedge clk);
      a_we = 1; a_in = a; c_we = 1; c_in = c;
    end
    t_we = 1; t_op = op; t_in = b;
    prev_res = result;
    #1;
    checks++;
    if (result !== prev_res) begin failures++; $display("result changed before the edge"); end
    @(negedge clk);
    t_we = 0; a_we = 0; c_we = 0;
    for (int i = 0; i < LANES; i++)
      expv[i*EW +: EW] = ref_lane(op, a[i*EW +: EW], b[i*EW +: EW], c[i*EW +: EW]);
    checks++;
    if (result !== expv) begin
      failures++;
      for (int i = 0; i < LANES; i++)
        if (result[i*EW +: EW] !== expv[i*EW +: EW]) begin
          $display("op %s lane %0d: a=%h b=%h c=%h got %h exp %h", op.name(), i, a[i*EW +: EW],
                   b[i*EW +: EW], c[i*EW +: EW], result[i*EW +: EW], expv[i*EW +: EW]);
          break;
        end
    end
  endtask

  initial begin
    a_we = 0; c_we = 0; t_we = 0; a_in = '0; c_in = '0; t_in = '0; t_op = V_ADD;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int op = 0; op <= int'(V_SEL); op++)
      for (int r = 0; r < 24; r++)
        run_op(simd_op_e'(op), rand_vec(r % 4), rand_vec((r + 1) % 4),
               (op == int'(V_MULSH)) ? rand_vec(1) : rand_vec((r + 2) % 4), r[0]);
    // operand registers hold their value across triggers
    run_op(V_SUB, rand_vec(0), rand_vec(0), rand_vec(0), 0);
    @(negedge clk);
    t_we = 1; t_op = V_ADD; t_in = '0;
    @(negedge clk);
    t_we = 0;
    checks++;
    if (result !== dut.a_q) begin failures++; $display("operand A not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
